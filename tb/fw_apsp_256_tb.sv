// fw_apsp_256_tb: all-pairs shortest paths on a 256-node graph with the
// kernel at its default size (B = 32, L = 4, 16-bit distances).
//
// 256 nodes is 8 x 8 tiles, so the blocked algorithm runs 8 rounds and 512
// tile computations. Per round the host issues one request for the
// self-dependent tile, one for the 7 row-dependent tiles, one for the 7
// column-dependent tiles and requests of at most 32 doubly-dependent tiles
// (32 being the chunk size used when copying is overlapped with compute).
// Host copying is done between requests in zero simulated time; the memory
// model answers at one beat per cycle with a fixed latency, so the counted
// cycles are the kernel's own compute time.
//
// Checks: the final 256 x 256 matrix against a plain Floyd-Warshall, and
// the total compute cycles against 3*B*B/L cycles per tile plus a fill
// and request overhead of at most B + 60 cycles per request. The time per
// tile at a 170 MHz clock is printed.
module fw_apsp_256_tb;
  import fw_pkg::*;

  localparam int B = 32, L = 4, W = 16;
  localparam int N = 256, T = N / B, CHUNK = 32;
  localparam logic [W-1:0] INF = '1;
  localparam int TILE_BEATS = 3 * B * B / L;
  localparam int RES_BEATS  = B * B / L;
  localparam longint SRC_BASE = 64'h0;
  localparam longint DST_BASE = 64'h10_0000;
  localparam int MEMW = 262144;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           reg_we = 0;
  logic [2:0]     reg_waddr = 0, reg_raddr = REG_STATUS;
  logic [63:0]    reg_wdata = 0, reg_rdata;
  logic           rd_req_valid, rd_rsp_valid = 0;
  logic [63:0]    rd_req_addr, rd_rsp_data = 0;
  logic           wr_valid;
  logic [63:0]    wr_addr, wr_data;

  fw_accel_top dut (
    .clk, .rst_n, .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .rd_req_valid, .rd_req_ready(1'b1), .rd_req_addr, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_ready(1'b1), .wr_addr, .wr_data
  );

  int checks = 0, failures = 0;
  logic [63:0] mem [MEMW];
  logic [63:0] rq [$];
  logic        p1v = 0, p2v = 0;
  logic [63:0] p1a = 0, p2a = 0;

  // memory: reads answered in order, three cycles after the request
  always @(posedge clk) begin
    if (wr_valid) mem[wr_addr[20:3]] = wr_data;
    rd_rsp_valid <= p2v;
    rd_rsp_data  <= mem[p2a[20:3]];
    p2v <= p1v; p2a <= p1a;
    p1v <= rd_req_valid; p1a <= rd_req_addr;
  end

  logic [W-1:0] d [N][N];
  logic [W-1:0] r [N][N];

  function automatic logic [W-1:0] sat_add(logic [W-1:0] a, logic [W-1:0] b);
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[W] ? INF : s[W-1:0];
  endfunction

  longint busy_cycles = 0;
  int requests = 0, tiles = 0;

  task automatic run_request(tile_kind_e kind, int t, int ti[$], int tj[$]);
    int k;
    logic [17:0] w;
    longint t0;
    k = ti.size();
    w = 18'(SRC_BASE / 8);
    for (int n = 0; n < k; n++)
      for (int s = 0; s < 3 * B; s++)
        for (int b = 0; b < B / L; b++) begin
          logic [63:0] v;
          for (int e = 0; e < L; e++)
            if (s >= 2 * B)     v[16*e +: 16] = d[ti[n]*B + s - 2*B][tj[n]*B + b*L + e];
            else if (s[0])      v[16*e +: 16] = d[ti[n]*B + b*L + e][t*B + s/2];
            else                v[16*e +: 16] = d[t*B + s/2][tj[n]*B + b*L + e];
          mem[w++] = v;
        end
    @(negedge clk);
    reg_we = 1; reg_waddr = REG_SRC_ADDR;  reg_wdata = SRC_BASE;             @(negedge clk);
    reg_waddr = REG_SRC_WORDS; reg_wdata = 64'(k * TILE_BEATS);             @(negedge clk);
    reg_waddr = REG_DST_WORDS; reg_wdata = 64'(k * RES_BEATS);              @(negedge clk);
    reg_waddr = REG_TILE_KIND; reg_wdata = 64'(kind);                       @(negedge clk);
    reg_waddr = REG_DST_ADDR;  reg_wdata = DST_BASE;
    t0 = $time;
    @(negedge clk);
    reg_we = 0;
    do @(posedge clk); while (!reg_rdata[0]);
    busy_cycles += ($time - t0) / 10;
    w = 18'(DST_BASE / 8);
    for (int n = 0; n < k; n++)
      for (int i = 0; i < B; i++)
        for (int b = 0; b < B / L; b++) begin
          logic [63:0] v;
          v = mem[w++];
          for (int e = 0; e < L; e++) d[ti[n]*B + i][tj[n]*B + b*L + e] = v[16*e +: 16];
        end
    requests++;
    tiles += k;
  endtask

  initial begin
    longint lo, hi;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (i == j)                            d[i][j] = '0;
        else if ($urandom_range(0, 999) < 15)  d[i][j] = W'($urandom_range(1, 1000));
        else                                   d[i][j] = INF;
        r[i][j] = d[i][j];
      end
    for (int k = 0; k < N; k++)
      for (int i = 0; i < N; i++)
        if (r[i][k] != INF)
          for (int j = 0; j < N; j++)
            if (sat_add(r[i][k], r[k][j]) < r[i][j]) r[i][j] = sat_add(r[i][k], r[k][j]);

    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < T; t++) begin
      int ti[$], tj[$];
      ti = {t}; tj = {t};
      run_request(TILE_SELF, t, ti, tj);
      ti = {}; tj = {};
      for (int i = 0; i < T; i++) if (i != t) begin ti.push_back(i); tj.push_back(t); end
      run_request(TILE_ROW_DEP, t, ti, tj);
      ti = {}; tj = {};
      for (int j = 0; j < T; j++) if (j != t) begin ti.push_back(t); tj.push_back(j); end
      run_request(TILE_COL_DEP, t, ti, tj);
      ti = {}; tj = {};
      for (int i = 0; i < T; i++)
        for (int j = 0; j < T; j++)
          if (i != t && j != t) begin
            ti.push_back(i); tj.push_back(j);
            if (ti.size() == CHUNK) begin
              run_request(TILE_DOUBLY, t, ti, tj);
              ti = {}; tj = {};
            end
          end
      if (ti.size() > 0) run_request(TILE_DOUBLY, t, ti, tj);
    end

    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (d[i][j] != r[i][j]) begin
          failures++;
          if (failures < 10) $display("FAIL: d[%0d][%0d] = %0d, expected %0d", i, j, d[i][j], r[i][j]);
        end
      end
    lo = longint'(tiles) * TILE_BEATS;
    hi = lo + longint'(requests) * (longint'(B) + longint'(60));
    checks++;
    if (tiles != T * T * T || busy_cycles < lo || busy_cycles > hi) begin
      failures++;
      $display("FAIL: %0d tiles in %0d requests took %0d cycles, expected %0d..%0d",
               tiles, requests, busy_cycles, lo, hi);
    end
    $display("%0d nodes: %0d tiles, %0d requests, %0d kernel cycles, %0d.%02d us per tile at 170 MHz",
             N, tiles, requests, busy_cycles, busy_cycles * 100 / longint'(tiles) / 170 / 100,
             busy_cycles * 100 / longint'(tiles) / 170 % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
