// fw_tile_run: testbench helper. Runs one self-dependent B x B tile through
// a kernel built with tile size B (L = 4, 16-bit distances) and reports the
// number of cycles from the start of the request to the done bit.
//
// The tile is a random directed graph (weights 1..500, some missing edges)
// with a zero diagonal. The host side is modelled directly: the source
// buffer is filled with pivot rows and columns (all from the tile itself)
// and the tile rows, the memory answers one beat per cycle two cycles after
// each request, and writes are always accepted. The result is compared
// with a plain Floyd-Warshall on the tile. finished rises at the end.
module fw_tile_run #(
  parameter int B = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  output int          checks,
  output int          failures,
  output longint      cycles
);
  import fw_pkg::*;

  localparam int L = 4, W = 16;
  localparam logic [W-1:0] INF = '1;
  localparam int MEMW = 4096;

  logic           reg_we;
  logic [2:0]     reg_waddr, reg_raddr;
  logic [63:0]    reg_wdata, reg_rdata;
  logic           rd_req_valid, rd_rsp_valid;
  logic [63:0]    rd_req_addr, rd_rsp_data;
  logic           wr_valid;
  logic [63:0]    wr_addr, wr_data;

  fw_accel_top #(.B(B), .L(L), .W(W)) dut (
    .clk, .rst_n, .reg_we, .reg_waddr, .reg_wdata, .reg_raddr, .reg_rdata,
    .rd_req_valid, .rd_req_ready(1'b1), .rd_req_addr, .rd_rsp_valid, .rd_rsp_data,
    .wr_valid, .wr_ready(1'b1), .wr_addr, .wr_data
  );

  logic [63:0] mem [MEMW];
  logic        p1v, p1v_q;
  logic [63:0] p1a, p1a_q;

  always @(posedge clk) begin
    if (!rst_n) begin
      p1v = 0; p1v_q = 0; rd_rsp_valid <= 0;
    end else begin
      if (wr_valid) mem[wr_addr[14:3]] = wr_data;
      rd_rsp_valid <= p1v_q;
      rd_rsp_data  <= mem[p1a_q[14:3]];
      p1v_q = p1v; p1a_q = p1a;
      p1v = rd_req_valid; p1a = rd_req_addr;
    end
  end

  logic [W-1:0] d [B][B], r [B][B];

  initial begin
    int w;
    longint t0;
    logic [63:0] v;
    finished = 0; checks = 0; failures = 0; cycles = 0;
    reg_we = 0; reg_waddr = 0; reg_wdata = 0; reg_raddr = REG_STATUS;
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        if (i == j)                           d[i][j] = '0;
        else if ($urandom_range(0, 3) != 0)   d[i][j] = W'($urandom_range(1, 500));
        else                                  d[i][j] = INF;
        r[i][j] = d[i][j];
      end
    for (int k = 0; k < B; k++)
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++)
          if (r[i][k] != INF && r[k][j] != INF && r[i][k] + r[k][j] < r[i][j])
            r[i][j] = r[i][k] + r[k][j];
    w = 0;
    for (int s = 0; s < 3 * B; s++)
      for (int b = 0; b < B / L; b++) begin
        for (int e = 0; e < L; e++)
          if (s >= 2 * B)  v[16*e +: 16] = d[s - 2*B][b*L + e];
          else if (s[0])   v[16*e +: 16] = d[b*L + e][s/2];
          else             v[16*e +: 16] = d[s/2][b*L + e];
        mem[w++] = v;
      end
    @(posedge rst_n);
    repeat (3) @(negedge clk);
    reg_we = 1; reg_waddr = REG_SRC_ADDR;  reg_wdata = 64'h0;                  @(negedge clk);
    reg_waddr = REG_SRC_WORDS; reg_wdata = 64'(3 * B * B / L);                  @(negedge clk);
    reg_waddr = REG_DST_WORDS; reg_wdata = 64'(B * B / L);                      @(negedge clk);
    reg_waddr = REG_TILE_KIND; reg_wdata = 64'(TILE_SELF);                      @(negedge clk);
    reg_waddr = REG_DST_ADDR;  reg_wdata = 64'h4000;
    t0 = $time;
    @(negedge clk);
    reg_we = 0;
    do @(posedge clk); while (!reg_rdata[0]);
    cycles = ($time - t0) / 10;
    w = 'h4000 / 8;
    for (int i = 0; i < B; i++)
      for (int b = 0; b < B / L; b++) begin
        v = mem[w++];
        for (int e = 0; e < L; e++) begin
          checks++;
          if (v[16*e +: 16] != r[i][b*L + e]) begin
            failures++;
            $display("FAIL: B=%0d d[%0d][%0d] = %0d, expected %0d", B, i, b*L + e,
                     v[16*e +: 16], r[i][b*L + e]);
          end
        end
      end
    finished = 1;
  end
endmodule
