// fw_pe: processing element IDX of the linear Floyd-Warshall array.
//
// PE r does the work of outer-loop iteration k = r for one B x B tile. It
// keeps pivot row r (p1, B elements) and pivot column r (p2, B elements)
// and has L operators, so it handles the L elements of one beat per cycle.
//
// The tile stream (see fw_pkg) first carries pivot rows and columns,
// alternating row m / column m. Arriving at PE r:
//   * segment index m == r: the segment is copied into p1 (row) or p2
//     (column). PEs 0..r-1 have already applied iterations 0..r-1 to it, so
//     it holds exactly the pivot row/column that iteration r needs.
//   * m > r: the segment is relaxed with iteration r, if the tile kind says
//     that this kind of segment is computed (rows for self- and column-
//     dependent tiles, columns for self- and row-dependent tiles). Row m
//     element j uses p2[m] + p1[j]; column m element i uses p2[i] + p1[m].
//   * m < r: passed unchanged; later PEs do not need it.
// Then the B tile rows follow; tile row i element j becomes
// min(d, p2[i] + p1[j]).
// Because the stream of one tile fully passes PE r before the next tile's
// pivot row r arrives, tiles follow each other back to back with a single
// set of pivot registers.
//
// Timing: one register stage, latency 1 cycle when en is high; en low
// freezes the PE (global stall). The two-pass organisation (pivots first,
// then the streamed update) and p1/p2 storage follow the kernel
// description; the interleaved pivot pass is this design's own scheme.
module fw_pe
  import fw_pkg::*;
#(
  parameter int unsigned B   = 32,
  parameter int unsigned L   = 4,
  parameter int unsigned W   = 16,
  parameter int unsigned IDX = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  tag_t                in_tag,
  input  logic [L-1:0][W-1:0] in_data,
  output tag_t                out_tag,
  output logic [L-1:0][W-1:0] out_data
);
  localparam int unsigned BW = (B > 1) ? $clog2(B) : 1;

  logic [W-1:0] p1 [B];  // pivot row IDX
  logic [W-1:0] p2 [B];  // pivot column IDX

  logic [BW-1:0]       m;      // segment index
  logic [BW-1:0]       pos [L]; // element position of each lane in the segment
  logic                upd;
  logic [W-1:0]        opa [L];
  logic [W-1:0]        opb [L];
  logic [L-1:0][W-1:0] res;

  always_comb begin
    m = in_tag.idx[BW-1:0];
    unique case (in_tag.seg)
      SEG_ROW:  upd = in_tag.upd_rows && (in_tag.idx > IDX_W'(IDX));
      SEG_COL:  upd = in_tag.upd_cols && (in_tag.idx > IDX_W'(IDX));
      SEG_TILE: upd = 1'b1;
      default:  upd = 1'b0;
    endcase
    upd = upd && in_tag.valid;
    for (int e = 0; e < L; e++) begin
      pos[e] = BW'(in_tag.beat * L + e);
      if (in_tag.seg == SEG_COL) begin
        opa[e] = p2[pos[e]];
        opb[e] = p1[m];
      end else begin
        opa[e] = p2[m];
        opb[e] = p1[pos[e]];
      end
    end
  end

  for (genvar e = 0; e < L; e++) begin : g_op
    fw_operator #(.W(W)) u_op (
      .en(upd), .d(in_data[e]), .a(opa[e]), .b(opb[e]), .q(res[e])
    );
  end

  // Pivot capture.
  always_ff @(posedge clk) begin
    if (en && in_tag.valid && (in_tag.idx == IDX_W'(IDX))) begin
      for (int e = 0; e < L; e++) begin
        if (in_tag.seg == SEG_ROW) p1[pos[e]] <= in_data[e];
        if (in_tag.seg == SEG_COL) p2[pos[e]] <= in_data[e];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag  <= '0;
      out_data <= '0;
    end else if (en) begin
      out_tag  <= in_tag;
      out_data <= res;
    end
  end
endmodule
