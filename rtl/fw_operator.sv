// fw_operator: one Floyd-Warshall operator, an adder and a comparator.
//
// Computes q = min(d, a + b), the FW relaxation d[i,j] = min(d[i,j],
// d[i,k] + d[k,j]) with a = d[i,k] (pivot column element) and b = d[k,j]
// (pivot row element). The sum saturates at the all-ones code, so infinity
// plus anything stays infinity and a padded (disconnected) node never
// produces a wrapped-around short path. When en is low, d passes unchanged.
//
// Purely combinational; the PE registers the result. That each operator is
// one adder plus one comparator follows the kernel description; saturation
// and the unsigned encoding are this design's choices.
module fw_operator #(
  parameter int unsigned W = 16
) (
  input  logic         en,
  input  logic [W-1:0] d,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q
);
  logic [W:0]   sum;
  logic [W-1:0] sum_sat;

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b};
    sum_sat = sum[W] ? {W{1'b1}} : sum[W-1:0];
    q       = (en && (sum_sat < d)) ? sum_sat : d;
  end
endmodule
