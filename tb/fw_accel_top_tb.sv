// fw_accel_top_tb: end-to-end test of the Floyd-Warshall kernel at its
// default size (B = 32, L = 4, 16-bit distances).
//
// The testbench plays the host. It builds a random directed graph of 90
// nodes with weights 1..200, pads it with infinity to 96 nodes (3 x 3 tiles
// of 32 x 32), and runs the blocked algorithm: in each of the 3 rounds one
// request for the self-dependent tile, one for the row-dependent tiles, one
// for the column-dependent tiles and one for the doubly-dependent tiles.
// For each request it copies pivot rows, pivot columns and tiles into a
// source buffer of a memory model, programs the registers, writes the
// destination address, polls the done bit and copies the results back.
// The final matrix is compared with a plain triple-loop Floyd-Warshall.
//
// The memory model answers reads in order with a random latency and
// randomly withholds rd_req_ready and wr_ready, so the kernel sees input
// bubbles and result back-pressure (array stalls). The last doubly-dependent
// request runs with an ideal memory and its cycle count is checked against
// 3*B*B/L cycles per tile. Every mechanism (each tile kind, multi-tile
// requests, stalls, bubbles, padding) must occur at least once.
module fw_accel_top_tb;
  import fw_pkg::*;

  localparam int B   = 32;
  localparam int L   = 4;
  localparam int W   = 16;
  localparam int NG  = 90;             // graph nodes
  localparam int T   = 3;              // tiles per dimension
  localparam int N   = T * B;          // padded size
  localparam logic [W-1:0] INF = '1;
  localparam int TILE_BEATS = 3 * B * B / L;
  localparam int RES_BEATS  = B * B / L;
  localparam longint SRC_BASE = 64'h1_0000;
  localparam longint DST_BASE = 64'h4_0000;
  localparam int MEMW = 65536;         // 64-bit words of the memory model

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           reg_we = 0;
  logic [2:0]     reg_waddr = 0, reg_raddr = 0;
  logic [63:0]    reg_wdata = 0, reg_rdata;
  logic           rd_req_valid, rd_req_ready = 0;
  logic [63:0]    rd_req_addr;
  logic           rd_rsp_valid = 0;
  logic [63:0]    rd_rsp_data = 0;
  logic           wr_valid, wr_ready = 0;
  logic [63:0]    wr_addr, wr_data;

  fw_accel_top dut (
    .clk, .rst_n, .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- memory model (communication buffer) ----------------
  logic [63:0] mem [MEMW];
  bit ideal = 0;
  longint rq_addr[$], rq_due[$];
  int stall_cycles = 0, bubble_cycles = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_req_valid && rd_req_ready) begin
        int lat;
        rq_addr.push_back(rd_req_addr);
        lat = ideal ? 2 : 2 + int'($urandom_range(0, 6));
        rq_due.push_back(cycle + longint'(lat));
      end
      if (wr_valid && wr_ready) mem[wr_addr[18:3]] = wr_data;
      if (rq_addr.size() > 0 && rq_due[0] <= cycle) begin
        rd_rsp_valid <= 1'b1;
        rd_rsp_data  <= mem[rq_addr[0][18:3]];
        void'(rq_addr.pop_front());
        void'(rq_due.pop_front());
      end else begin
        rd_rsp_valid <= 1'b0;
      end
      rd_req_ready <= ideal ? 1'b1 : ($urandom_range(0, 9) != 0);
      // long write pauses make the result FIFO fill and the array stall
      wr_ready     <= ideal ? 1'b1 : ((cycle % 400) < 300 && $urandom_range(0, 4) != 0);
      if (!dut.en) stall_cycles++;
      if (dut.busy && dut.en && !dut.k_in_valid) bubble_cycles++;
    end
  end

  // ---------------- host side ----------------
  logic [W-1:0] d   [N][N];   // matrix under blocked computation
  logic [W-1:0] ref_d [N][N]; // reference

  function automatic logic [W-1:0] sat_add(logic [W-1:0] a, logic [W-1:0] b);
    logic [W:0] s = {1'b0, a} + {1'b0, b};
    return s[W] ? INF : s[W-1:0];
  endfunction

  task automatic reg_write(logic [2:0] a, logic [63:0] v);
    @(negedge clk);
    reg_we = 1; reg_waddr = a; reg_wdata = v;
    @(negedge clk);
    reg_we = 0;
  endtask

  int kind_count [4];
  int multi_tile_requests = 0;
  int tiles_total = 0;

  // Process a list of tiles (tile coordinates) of one kind in round t.
  task automatic run_request(tile_kind_e kind, int t, int ti[$], int tj[$], output longint cyc);
    int k = ti.size();
    logic [15:0] w = 16'(SRC_BASE / 8);
    longint t0;
    logic [63:0] st;
    // source buffer: per tile, pivot rows/columns interleaved, then the tile
    for (int n = 0; n < k; n++) begin
      int I = ti[n], J = tj[n];
      for (int m = 0; m < B; m++) begin
        for (int b = 0; b < B / L; b++) begin   // pivot row m: d[t*B+m][J*B+..]
          logic [63:0] v;
          for (int e = 0; e < L; e++) v[16*e +: 16] = d[t*B+m][J*B+b*L+e];
          mem[w++] = v;
        end
        for (int b = 0; b < B / L; b++) begin   // pivot column m: d[I*B+..][t*B+m]
          logic [63:0] v;
          for (int e = 0; e < L; e++) v[16*e +: 16] = d[I*B+b*L+e][t*B+m];
          mem[w++] = v;
        end
      end
      for (int i = 0; i < B; i++)
        for (int b = 0; b < B / L; b++) begin
          logic [63:0] v;
          for (int e = 0; e < L; e++) v[16*e +: 16] = d[I*B+i][J*B+b*L+e];
          mem[w++] = v;
        end
    end
    reg_write(REG_SRC_ADDR, SRC_BASE);
    reg_write(REG_SRC_WORDS, 64'(k * TILE_BEATS));
    reg_write(REG_DST_WORDS, 64'(k * RES_BEATS));
    reg_write(REG_TILE_KIND, 64'(kind));
    t0 = cycle;
    reg_write(REG_DST_ADDR, DST_BASE);
    // poll the done bit
    reg_raddr = REG_STATUS;
    do @(posedge clk); while (!reg_rdata[0]);
    cyc = cycle - t0;
    st = reg_rdata;
    checks++;
    if (st[63:32] != 32'(k)) begin
      failures++;
      $display("FAIL: STATUS tile count %0d, expected %0d", st[63:32], k);
    end
    // copy the results back
    w = 16'(DST_BASE / 8);
    for (int n = 0; n < k; n++)
      for (int i = 0; i < B; i++)
        for (int b = 0; b < B / L; b++) begin
          logic [63:0] v = mem[w++];
          for (int e = 0; e < L; e++) d[ti[n]*B+i][tj[n]*B+b*L+e] = v[16*e +: 16];
        end
    kind_count[kind] += k;
    tiles_total += k;
    if (k > 1) multi_tile_requests++;
  endtask

  // ---------------- test ----------------
  initial begin
    int pad_inf;
    longint cyc, ideal_cyc;
    int ideal_tiles;
    pad_inf = 0;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (i >= NG || j >= NG)              d[i][j] = INF;   // padding
        else if (i == j)                     d[i][j] = '0;
        else if ($urandom_range(0, 99) < 6)  d[i][j] = W'($urandom_range(1, 200));
        else                                 d[i][j] = INF;
        ref_d[i][j] = d[i][j];
      end
    // reference: plain Floyd-Warshall
    for (int k = 0; k < N; k++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          if (sat_add(ref_d[i][k], ref_d[k][j]) < ref_d[i][j])
            ref_d[i][j] = sat_add(ref_d[i][k], ref_d[k][j]);
        end

    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    for (int t = 0; t < T; t++) begin
      int ti[$], tj[$];
      ti = {t}; tj = {t};
      run_request(TILE_SELF, t, ti, tj, cyc);
      ti = {}; tj = {};
      for (int i = 0; i < T; i++) if (i != t) begin ti.push_back(i); tj.push_back(t); end
      run_request(TILE_ROW_DEP, t, ti, tj, cyc);
      ti = {}; tj = {};
      for (int j = 0; j < T; j++) if (j != t) begin ti.push_back(t); tj.push_back(j); end
      run_request(TILE_COL_DEP, t, ti, tj, cyc);
      ti = {}; tj = {};
      for (int i = 0; i < T; i++) for (int j = 0; j < T; j++)
        if (i != t && j != t) begin ti.push_back(i); tj.push_back(j); end
      if (t == T - 1) begin
        ideal = 1;
        repeat (20) @(posedge clk);
      end
      run_request(TILE_DOUBLY, t, ti, tj, cyc);
      if (t == T - 1) begin
        ideal_cyc = cyc;
        ideal_tiles = ti.size();
      end
    end

    // compare the whole matrix
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (d[i][j] != ref_d[i][j]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: d[%0d][%0d] = %0d, expected %0d", i, j, d[i][j], ref_d[i][j]);
        end
        if ((i >= NG || j >= NG) && d[i][j] == INF) pad_inf++;
      end

    // throughput: 3*B*B/L cycles per tile, plus pipeline fill
    checks++;
    if (ideal_cyc < longint'(ideal_tiles * TILE_BEATS) ||
        ideal_cyc > longint'(ideal_tiles * TILE_BEATS) + (longint'(B) + longint'(60))) begin
      failures++;
      $display("FAIL: %0d tiles took %0d cycles, expected %0d..%0d", ideal_tiles, ideal_cyc,
               ideal_tiles * TILE_BEATS, ideal_tiles * TILE_BEATS + B + 60);
    end
    $display("ideal memory: %0d tiles in %0d cycles (%0d per tile)", ideal_tiles, ideal_cyc,
             ideal_cyc / longint'(ideal_tiles));

    // every mechanism must have happened
    $display("tiles: self=%0d row-dep=%0d col-dep=%0d doubly=%0d multi-tile requests=%0d",
             kind_count[TILE_SELF], kind_count[TILE_ROW_DEP], kind_count[TILE_COL_DEP],
             kind_count[TILE_DOUBLY], multi_tile_requests);
    $display("stall cycles=%0d input bubbles=%0d padded infinite entries=%0d",
             stall_cycles, bubble_cycles, pad_inf);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (kind_count[k] == 0) begin failures++; $display("FAIL: tile kind %0d never ran", k); end
    end
    checks++; if (multi_tile_requests == 0) begin failures++; $display("FAIL: no multi-tile request"); end
    checks++; if (stall_cycles == 0)        begin failures++; $display("FAIL: array never stalled"); end
    checks++; if (bubble_cycles == 0)       begin failures++; $display("FAIL: no input bubble"); end
    checks++; if (pad_inf == 0)             begin failures++; $display("FAIL: padding not exercised"); end
    checks++;
    if (tiles_total != T * T * T) begin
      failures++; $display("FAIL: %0d tiles processed, expected %0d", tiles_total, T * T * T);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
