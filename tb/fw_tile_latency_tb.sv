// fw_tile_latency_tb: single-tile runs of the 8x8, 16x16 and 32x32 kernels
// (B = 8, 16, 32 with L = 4), the sizes of the single-tile measurements.
//
// Each kernel processes one self-dependent tile (see fw_tile_run). The
// results are checked against Floyd-Warshall, and the request-to-done
// cycle count must lie between the streaming time 3*B*B/L and that plus a
// fill and request overhead of B + 40 cycles. Times at 170 MHz are printed.
module fw_tile_latency_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   fin [3];
  int     chk [3], fl [3];
  longint cyc [3];
  localparam int BS [3] = '{8, 16, 32};

  fw_tile_run #(.B(8))  u8  (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]), .cycles(cyc[0]));
  fw_tile_run #(.B(16)) u16 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]), .cycles(cyc[1]));
  fw_tile_run #(.B(32)) u32 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]), .cycles(cyc[2]));

  int checks = 0, failures = 0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    for (int n = 0; n < 3; n++) begin
      longint lo, hi;
      lo = 3 * BS[n] * BS[n] / 4;
      hi = lo + longint'(BS[n]) + longint'(40);
      checks += chk[n] + 1;
      failures += fl[n];
      if (cyc[n] < lo || cyc[n] > hi) begin
        failures++;
        $display("FAIL: B=%0d took %0d cycles, expected %0d..%0d", BS[n], cyc[n], lo, hi);
      end
      $display("%0dx%0d tile: %0d cycles, %0d ns at 170 MHz", BS[n], BS[n], cyc[n],
               cyc[n] * 1000 / 170);
    end
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
