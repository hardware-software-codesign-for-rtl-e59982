// fw_pe_array: the linear array of B processing elements.
//
// PE 0 takes the tagged beat stream from the global PE control, every PE
// hands its beat and tag to the next, and PE B-1 delivers the stream with
// every tile row fully updated (all B iterations of the outer FW loop
// applied). Pivot segments also leave the last PE; the consumer keeps only
// SEG_TILE beats. Latency is B cycles of en; en stalls all PEs together.
// B PEs with L operators each, B x L operators in all, as in the kernel
// description.
module fw_pe_array
  import fw_pkg::*;
#(
  parameter int unsigned B = 32,
  parameter int unsigned L = 4,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  tag_t                in_tag,
  input  logic [L-1:0][W-1:0] in_data,
  output tag_t                out_tag,
  output logic [L-1:0][W-1:0] out_data
);
  tag_t                tag_c  [B+1];
  logic [L-1:0][W-1:0] data_c [B+1];

  assign tag_c[0]  = in_tag;
  assign data_c[0] = in_data;

  for (genvar r = 0; r < B; r++) begin : g_pe
    fw_pe #(.B(B), .L(L), .W(W), .IDX(r)) u_pe (
      .clk, .rst_n, .en,
      .in_tag (tag_c[r]),   .in_data (data_c[r]),
      .out_tag(tag_c[r+1]), .out_data(data_c[r+1])
    );
  end

  assign out_tag  = tag_c[B];
  assign out_data = data_c[B];
endmodule
