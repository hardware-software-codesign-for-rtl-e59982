// fw_global_ctrl_tb: checks the tagging of the tile stream (B = 8, L = 2).
//
// Two requests (self-dependent, then doubly-dependent) of two tiles each
// are fed with random gaps in the input and random cycles with en low.
// Every beat that leaves the block one enabled cycle after it was taken is
// compared with the tag worked out from its running count n inside the
// request: beat = n mod B/L, segment s = (n div B/L) mod 3B, pivot row s/2
// for even s < 2B, pivot column s/2 for odd s < 2B, tile row s-2B after
// that; the update flags follow the tile kind. Bubbles must carry
// valid = 0, and the tile counter must reach 2.
module fw_global_ctrl_tb;
  import fw_pkg::*;

  localparam int B = 8, L = 2, W = 16;
  localparam int BEATS = B / L, TILE = 3 * B * B / L;

  logic clk = 0, rst_n = 0, start = 0, en = 0, in_valid = 0, in_ready;
  always #5 clk = ~clk;
  tile_kind_e          tile_kind = TILE_SELF;
  logic [L*W-1:0]      in_data = '0;
  tag_t                out_tag;
  logic [L-1:0][W-1:0] out_data;
  logic [31:0]         tiles_in;

  fw_global_ctrl #(.B(B), .L(L), .W(W)) dut (.clk, .rst_n, .start, .tile_kind, .en, .in_valid,
    .in_data, .in_ready, .out_tag, .out_data, .tiles_in);

  int checks = 0, failures = 0;

  task automatic run(tile_kind_e kind);
    int n = 0;
    @(negedge clk);
    tile_kind = kind; start = 1;
    @(negedge clk);
    start = 0;
    while (n < 2 * TILE) begin
      bit took;
      in_valid = ($urandom_range(0, 4) != 0);
      en       = ($urandom_range(0, 5) != 0);
      in_data  = (L*W)'(n * 7919 + 13);
      @(posedge clk);
      took = in_valid && en && in_ready;
      checks++;
      if (in_ready != en) begin failures++; $display("FAIL: in_ready != en"); end
      #1;
      if (en) begin
        checks++;
        if (took) begin
          int s, bt;
          tag_t exp;
          bt = n % BEATS;
          s  = (n / BEATS) % (3 * B);
          exp = '0;
          exp.valid = 1;
          exp.beat = IDX_W'(bt);
          exp.upd_rows = upd_rows_of(kind);
          exp.upd_cols = upd_cols_of(kind);
          if (s < 2 * B) begin
            exp.seg = (s % 2 == 1) ? SEG_COL : SEG_ROW;
            exp.idx = IDX_W'(s / 2);
          end else begin
            exp.seg = SEG_TILE;
            exp.idx = IDX_W'(s - 2 * B);
          end
          if (out_tag != exp || out_data != (L*W)'(n * 7919 + 13)) begin
            failures++;
            if (failures < 10)
              $display("FAIL: beat %0d tag seg=%0d idx=%0d beat=%0d, expected seg=%0d idx=%0d beat=%0d",
                       n, out_tag.seg, out_tag.idx, out_tag.beat, exp.seg, exp.idx, exp.beat);
          end
          n++;
        end else if (out_tag.valid) begin
          failures++;
          $display("FAIL: bubble marked valid");
        end
      end
      @(negedge clk);
    end
    checks++;
    if (tiles_in != 2) begin failures++; $display("FAIL: tiles_in=%0d", tiles_in); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(TILE_SELF);
    run(TILE_DOUBLY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
