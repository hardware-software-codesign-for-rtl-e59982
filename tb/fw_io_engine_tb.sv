// fw_io_engine_tb: checks the I/O engine against a memory model and a
// stand-in kernel.
//
// The memory holds a source buffer of 60 beats with known contents and
// answers reads in order after a random latency; rd_req_ready and wr_ready
// are random. The stand-in kernel takes input beats at random, and for
// every third beat it takes it returns a result beat (the input inverted),
// pushing only when res_space is high. Checked: the beats reach the kernel
// in buffer order, the 20 result beats land at consecutive destination
// addresses with the right data, nothing is written past the destination
// length, done rises only after the last write and busy drops with it.
// A second request checks that start clears done and the counters.
module fw_io_engine_tb;
  localparam int L = 4, W = 16, AW = 64;
  localparam int SRC_WORDS = 60, DST_WORDS = 20;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic [AW-1:0]  src_addr = 64'h1000, dst_addr = 64'h8000;
  logic [31:0]    src_words = SRC_WORDS, dst_words = DST_WORDS;
  logic           busy, done;
  logic           rd_req_valid, rd_req_ready = 0, rd_rsp_valid = 0;
  logic [AW-1:0]  rd_req_addr;
  logic [L*W-1:0] rd_rsp_data = '0;
  logic           wr_valid, wr_ready = 0;
  logic [AW-1:0]  wr_addr;
  logic [L*W-1:0] wr_data;
  logic           k_in_valid, k_in_ready = 0;
  logic [L*W-1:0] k_in_data;
  logic           res_push = 0, res_space;
  logic [L*W-1:0] res_data = '0;

  fw_io_engine #(.L(L), .W(W), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] mem [4096];
  longint q_addr[$], q_due[$];
  longint cyc = 0;
  logic [63:0] res_q[$];
  int k_taken = 0, writes = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (rd_req_valid && rd_req_ready) begin
        q_addr.push_back(rd_req_addr);
        q_due.push_back(cyc + longint'($urandom_range(1, 8)));
      end
      if (q_addr.size() > 0 && q_due[0] <= cyc) begin
        rd_rsp_valid <= 1;
        rd_rsp_data  <= mem[12'(q_addr[0] >> 3)];
        void'(q_addr.pop_front()); void'(q_due.pop_front());
      end else rd_rsp_valid <= 0;
      // kernel stand-in
      if (k_in_valid && k_in_ready) begin
        checks++;
        if (k_in_data != mem[12'((src_addr >> 3) + 64'(k_taken))]) begin
          failures++; $display("FAIL: kernel beat %0d out of order", k_taken);
        end
        if (k_taken % 3 == 2) res_q.push_back(~k_in_data);
        k_taken++;
      end
      if (res_push) void'(res_q.pop_front());
      if (wr_valid && wr_ready) begin
        checks++;
        if (wr_addr != dst_addr + 64'(8 * writes) ||
            wr_data != ~mem[12'((src_addr >> 3) + 64'(3 * writes + 2))]) begin
          failures++; $display("FAIL: write %0d addr %h data %h", writes, wr_addr, wr_data);
        end
        checks++;
        if (done) begin failures++; $display("FAIL: done before last write"); end
        writes++;
      end
      rd_req_ready <= ($urandom_range(0, 3) != 0);
      wr_ready     <= ($urandom_range(0, 2) != 0);
      k_in_ready   <= ($urandom_range(0, 2) != 0);
    end
  end
  // result beats are offered when the stand-in has one and there is room
  always @(negedge clk) begin
    res_push <= (res_q.size() > 0) && res_space && ($urandom_range(0, 3) != 0);
    res_data <= (res_q.size() > 0) ? res_q[0] : '0;
  end

  task automatic request(logic [AW-1:0] sa, logic [AW-1:0] da);
    @(negedge clk);
    src_addr = sa; dst_addr = da;
    k_taken = 0; writes = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy || done) begin failures++; $display("FAIL: start did not set busy/clear done"); end
    while (!done) @(negedge clk);
    checks++;
    if (writes != DST_WORDS || busy) begin
      failures++; $display("FAIL: done with %0d writes, busy=%0d", writes, busy);
    end
    repeat (30) @(negedge clk);
    checks++;
    if (writes != DST_WORDS || k_taken != SRC_WORDS || !done) begin
      failures++; $display("FAIL: after done: writes=%0d taken=%0d", writes, k_taken);
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) mem[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    request(64'h1000, 64'h8000);
    request(64'h2000, 64'h7000);
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
