// fw_pe_array_tb: checks the PE array (B = 8, L = 2) on whole tiles.
//
// Twelve tiles, three of each kind in mixed order, are streamed back to
// back with random bubbles and random stall cycles. Each tile has random
// pivot-row, pivot-column and update tiles (for the kinds that compute their
// own pivots, the same data is sent in place of the pivot source). The tile
// rows leaving the last PE are compared with the blocked Floyd-Warshall
// update computed in the testbench:
//   for k: for i, j: C[i][j] = min(C[i][j], Q[i][k] + R[k][j])
// where Q is C itself for self- and row-dependent tiles and R is C itself
// for self- and column-dependent tiles. The first result also checks the
// latency of B cycles.
module fw_pe_array_tb;
  import fw_pkg::*;

  localparam int B = 8, L = 2, W = 16, NT = 12;
  localparam logic [W-1:0] INF = '1;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  tag_t                in_tag = '0, out_tag;
  logic [L-1:0][W-1:0] in_data = '0, out_data;

  fw_pe_array #(.B(B), .L(L), .W(W)) dut (.clk, .rst_n, .en, .in_tag, .in_data,
                                          .out_tag, .out_data);

  int checks = 0, failures = 0;
  logic [W-1:0] R [NT][B][B], Q [NT][B][B], C [NT][B][B], X [NT][B][B];
  tile_kind_e kinds [NT];

  function automatic logic [W-1:0] sadd(logic [W-1:0] a, logic [W-1:0] b);
    int s = int'(a) + int'(b);
    return (s > int'(INF)) ? INF : W'(s);
  endfunction

  function automatic logic [W-1:0] rnd();
    return ($urandom_range(0, 5) == 0) ? INF : W'($urandom_range(0, 2000));
  endfunction

  // stream driver
  initial begin
    tag_t tg;
    logic [L-1:0][W-1:0] dv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      tg = '0; tg.valid = 1;
      tg.upd_rows = upd_rows_of(kinds[t]);
      tg.upd_cols = upd_cols_of(kinds[t]);
      for (int s = 0; s < 3 * B; s++)
        for (int b = 0; b < B / L; b++) begin
          if (s < 2 * B) begin
            tg.seg = s[0] ? SEG_COL : SEG_ROW;
            tg.idx = IDX_W'(s / 2);
          end else begin
            tg.seg = SEG_TILE;
            tg.idx = IDX_W'(s - 2 * B);
          end
          tg.beat = IDX_W'(b);
          for (int e = 0; e < L; e++)
            case (tg.seg)
              SEG_ROW: dv[e] = R[t][3'(tg.idx)][b*L+e];
              SEG_COL: dv[e] = Q[t][b*L+e][3'(tg.idx)];
              default: dv[e] = C[t][3'(tg.idx)][b*L+e];
            endcase
          // random bubbles (no data) and stalls (en low)
          while ($urandom_range(0, 6) == 0) begin
            @(negedge clk);
            in_tag = '0; in_data = '1;
            en = ($urandom_range(0, 1) == 0);
          end
          @(negedge clk);
          in_tag = tg; in_data = dv;
          en = 1;
          while ($urandom_range(0, 5) == 0) begin
            en = 0;
            @(negedge clk);
          end
          en = 1;
        end
    end
    @(negedge clk);
    in_tag = '0;
    en = 1;
  end

  // result collector
  int en_cnt = 0, en_at_first_in = -1;
  bit seen_out = 0;
  always @(posedge clk) begin
    if (en) en_cnt++;
    if (en && in_tag.valid && in_tag.seg == SEG_TILE && en_at_first_in < 0)
      en_at_first_in = en_cnt;
  end

  initial begin
    int t, n;
    t = 0;
    n = 0;
    for (int k = 0; k < NT; k++) begin
      kinds[k] = tile_kind_e'(k % 4 == 0 ? 3 : (k * 7) % 4);
      for (int i = 0; i < B; i++)
        for (int j = 0; j < B; j++) begin
          C[k][i][j] = rnd(); R[k][i][j] = rnd(); Q[k][i][j] = rnd();
        end
      if (upd_cols_of(kinds[k])) Q[k] = C[k];   // pivot columns from the tile
      if (upd_rows_of(kinds[k])) R[k] = C[k];   // pivot rows from the tile
      X[k] = C[k];
      for (int kk = 0; kk < B; kk++)
        for (int i = 0; i < B; i++)
          for (int j = 0; j < B; j++) begin
            logic [W-1:0] a, b;
            a = upd_cols_of(kinds[k]) ? X[k][i][kk] : Q[k][i][kk];
            b = upd_rows_of(kinds[k]) ? X[k][kk][j] : R[k][kk][j];
            if (sadd(a, b) < X[k][i][j]) X[k][i][j] = sadd(a, b);
          end
    end
    while (t < NT) begin
      bit adv;
      @(posedge clk);
      adv = en;
      #1;
      // a beat is new when the array advanced on this edge
      if (adv && out_tag.valid && out_tag.seg == SEG_TILE) begin
        if (!seen_out) begin
          seen_out = 1;
          checks++;
          if (en_cnt - en_at_first_in + 1 != B) begin
            failures++;
            $display("FAIL: latency %0d enabled cycles, expected %0d",
                     en_cnt - en_at_first_in + 1, B);
          end
        end
        for (int e = 0; e < L; e++) begin
          int i, j;
          i = n / (B / L);
          j = (n % (B / L)) * L + e;
          checks++;
          if (out_data[e] != X[t][i][j]) begin
            failures++;
            if (failures < 10)
              $display("FAIL: tile %0d kind %0d [%0d][%0d] = %0d expected %0d", t, kinds[t],
                       i, j, out_data[e], X[t][i][j]);
          end
        end
        n++;
        if (n == B * B / L) begin n = 0; t++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
