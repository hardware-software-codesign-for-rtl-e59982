// fw_global_ctrl: global PE control of the Floyd-Warshall kernel.
//
// Turns the raw beat stream read from the source buffer into tagged beats
// for PE 0. Counters track the beat inside a segment (0..B/L-1) and the
// segment inside a tile (0..3B-1): segments 0..2B-1 alternate pivot row m
// and pivot column m (m = segment/2), segments 2B..3B-1 are tile rows
// 0..B-1. The tile kind of the request decides whether the PEs compute the
// pivot rows, the pivot columns, both or neither. Tiles of one request
// follow each other with no gap; tiles_in counts the tiles taken.
//
// Interface: start (one cycle) loads tile_kind and clears the counters.
// A beat is taken when in_valid and en are both high (in_ready = en); the
// tagged beat appears on out_tag/out_data one cycle later. When no beat is
// taken while en is high, a bubble (valid = 0) is sent. en low holds the
// output (global stall).
//
// The kernel description names this block and shows its control reaching
// the PEs alongside the data; the stream layout and counters are this
// design's own.
module fw_global_ctrl
  import fw_pkg::*;
#(
  parameter int unsigned B = 32,
  parameter int unsigned L = 4,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  tile_kind_e          tile_kind,
  input  logic                en,
  input  logic                in_valid,
  input  logic [L*W-1:0]      in_data,
  output logic                in_ready,
  output tag_t                out_tag,
  output logic [L-1:0][W-1:0] out_data,
  output logic [31:0]         tiles_in
);
  localparam int unsigned BEATS = B / L;   // beats per segment
  localparam int unsigned SEGS  = 3 * B;   // segments per tile

  logic [IDX_W-1:0] beat_q;
  logic [IDX_W+1:0] seg_q;
  logic             upd_rows_q, upd_cols_q;
  tag_t             tag_n;
  logic             take;

  assign in_ready = en;
  assign take     = en && in_valid;

  always_comb begin
    tag_n          = '0;
    tag_n.valid    = in_valid;
    tag_n.beat     = beat_q;
    tag_n.upd_rows = upd_rows_q;
    tag_n.upd_cols = upd_cols_q;
    if (seg_q < (IDX_W+2)'(2 * B)) begin
      tag_n.seg = seg_q[0] ? SEG_COL : SEG_ROW;
      tag_n.idx = IDX_W'(seg_q >> 1);
    end else begin
      tag_n.seg = SEG_TILE;
      tag_n.idx = IDX_W'(seg_q - (IDX_W+2)'(2 * B));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_q     <= '0;
      seg_q      <= '0;
      upd_rows_q <= 1'b0;
      upd_cols_q <= 1'b0;
      tiles_in   <= '0;
      out_tag    <= '0;
      out_data   <= '0;
    end else if (start) begin
      beat_q     <= '0;
      seg_q      <= '0;
      upd_rows_q <= upd_rows_of(tile_kind);
      upd_cols_q <= upd_cols_of(tile_kind);
      tiles_in   <= '0;
      out_tag    <= '0;
    end else if (en) begin
      out_tag  <= tag_n;
      out_data <= in_data;
      if (take) begin
        if (beat_q == IDX_W'(BEATS - 1)) begin
          beat_q <= '0;
          if (seg_q == (IDX_W+2)'(SEGS - 1)) begin
            seg_q    <= '0;
            tiles_in <= tiles_in + 32'd1;
          end else begin
            seg_q <= seg_q + 1'b1;
          end
        end else begin
          beat_q <= beat_q + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (B % L == 0) else $error("B must be a multiple of L");
    assert (B <= 256)   else $error("B above 256 does not fit the tag fields");
  end
endmodule
