// fw_regs_tb: checks the host register set.
//
// Writes random values to the address, length and tile-kind registers and
// reads them back; checks that only a write to the destination-address
// register produces a start pulse, exactly one cycle long and in the cycle
// after the write; checks that STATUS shows done and busy from the I/O
// engine and the tile count, and that a pending start reads as busy and
// not done.
module fw_regs_tb;
  import fw_pkg::*;

  logic          clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic          reg_we = 0;
  logic [2:0]    reg_waddr = 0, reg_raddr = 0;
  logic [63:0]   reg_wdata = 0, reg_rdata;
  logic          busy = 0, done = 0, start;
  logic [31:0]   tiles_in = 0;
  logic [63:0]   src_addr, dst_addr;
  logic [31:0]   src_words, dst_words;
  tile_kind_e    tile_kind;

  fw_regs #(.AW(64)) dut (.*);

  int checks = 0, failures = 0, starts = 0;
  always @(posedge clk) if (start) starts++;

  task automatic wr(logic [2:0] a, logic [63:0] v);
    @(negedge clk);
    reg_we = 1; reg_waddr = a; reg_wdata = v;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic rd_check(logic [2:0] a, logic [63:0] exp);
    reg_raddr = a;
    #1;
    checks++;
    if (reg_rdata !== exp) begin
      failures++; $display("FAIL: reg %0d = %h expected %h", a, reg_rdata, exp);
    end
  endtask

  initial begin
    logic [63:0] sa, da, sw, dw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      tile_kind_e k;
      int s0;
      sa = {$urandom, $urandom}; da = {$urandom, $urandom};
      sw = 64'($urandom); dw = 64'($urandom);
      k  = tile_kind_e'($urandom_range(0, 3));
      s0 = starts;
      wr(REG_SRC_ADDR, sa);
      wr(REG_SRC_WORDS, sw);
      wr(REG_DST_WORDS, dw);
      wr(REG_TILE_KIND, 64'(k));
      checks++;
      if (starts != s0) begin failures++; $display("FAIL: start without destination write"); end
      rd_check(REG_SRC_ADDR, sa);
      rd_check(REG_SRC_WORDS, {32'd0, sw[31:0]});
      rd_check(REG_DST_WORDS, {32'd0, dw[31:0]});
      rd_check(REG_TILE_KIND, 64'(k));
      checks++;
      if (src_addr != sa || src_words != sw[31:0] || dst_words != dw[31:0] || tile_kind != k) begin
        failures++; $display("FAIL: register outputs");
      end
      // destination write: start follows in the next cycle, for one cycle
      done = 1;
      @(negedge clk);
      reg_we = 1; reg_waddr = REG_DST_ADDR; reg_wdata = da;
      @(negedge clk);
      reg_we = 0;
      checks++;
      if (!start || dst_addr != da) begin failures++; $display("FAIL: no start after write"); end
      rd_check(REG_STATUS, {tiles_in, 30'd0, 1'b1, 1'b0});  // pending start: busy, not done
      @(negedge clk);
      checks++;
      if (start || starts != s0 + 1) begin failures++; $display("FAIL: start pulse length"); end
      rd_check(REG_DST_ADDR, da);
      busy = 1; done = 0; tiles_in = 32'(n);
      rd_check(REG_STATUS, {32'(n), 30'd0, 1'b1, 1'b0});
      busy = 0; done = 1;
      rd_check(REG_STATUS, {32'(n), 30'd0, 1'b0, 1'b1});
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
