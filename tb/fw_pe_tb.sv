// fw_pe_tb: checks one processing element (B = 8, L = 2, position 3).
//
// For each tile kind the testbench sends a full tile stream with random
// pivot-row tile R, pivot-column tile Q and tile C, tagging the beats
// itself. The expected output of every beat is worked out from the rule of
// iteration k = 3: the PE's pivot row is row 3 of R and its pivot column is
// column 3 of Q as they arrive; pivot segments with index above 3 are
// relaxed only if the kind computes them; tile elements always are. Random
// cycles with en low check that the PE holds still, and the output is
// checked one cycle after each beat (latency 1).
module fw_pe_tb;
  import fw_pkg::*;

  localparam int B = 8, L = 2, W = 16, IDX = 3;
  localparam logic [W-1:0] INF = '1;

  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  tag_t                in_tag = '0, out_tag;
  logic [L-1:0][W-1:0] in_data = '0, out_data;

  fw_pe #(.B(B), .L(L), .W(W), .IDX(IDX)) dut (.clk, .rst_n, .en, .in_tag, .in_data,
                                               .out_tag, .out_data);

  int checks = 0, failures = 0;
  logic [W-1:0] R [B][B], Q [B][B], C [B][B];

  function automatic logic [W-1:0] relax(logic [W-1:0] dv, logic [W-1:0] av, logic [W-1:0] bv);
    int s = int'(av) + int'(bv);
    if (s > int'(INF)) s = int'(INF);
    return (s < int'(dv)) ? W'(s) : dv;
  endfunction

  function automatic logic [W-1:0] rnd();
    return ($urandom_range(0, 7) == 0) ? INF : W'($urandom_range(0, 3000));
  endfunction

  // send one beat, then check the registered output
  task automatic send(tag_t tg, logic [L-1:0][W-1:0] dv, logic [L-1:0][W-1:0] ev);
    tag_t held;
    logic [L-1:0][W-1:0] held_d;
    // a stalled cycle with a different input must not change anything
    if ($urandom_range(0, 5) == 0) begin
      held = out_tag; held_d = out_data;
      @(negedge clk);
      en = 0; in_tag = '0; in_tag.valid = 1; in_data = '0;
      @(negedge clk);
      checks++;
      if (out_tag != held || out_data != held_d) begin
        failures++; $display("FAIL: PE moved while stalled");
      end
    end
    @(negedge clk);
    en = 1; in_tag = tg; in_data = dv;
    @(negedge clk);
    en = 0;
    checks++;
    if (out_tag != tg || out_data != ev) begin
      failures++;
      $display("FAIL: seg=%0d idx=%0d beat=%0d out=%h expected %h", tg.seg, tg.idx, tg.beat,
               out_data, ev);
    end
  endtask

  task automatic run_kind(tile_kind_e kind);
    tag_t tg;
    logic [L-1:0][W-1:0] dv, ev;
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        R[i][j] = rnd(); Q[i][j] = rnd(); C[i][j] = rnd();
      end
    tg = '0; tg.valid = 1;
    tg.upd_rows = upd_rows_of(kind);
    tg.upd_cols = upd_cols_of(kind);
    for (int m = 0; m < B; m++) begin
      for (int b = 0; b < B / L; b++) begin
        tg.seg = SEG_ROW; tg.idx = IDX_W'(m); tg.beat = IDX_W'(b);
        for (int e = 0; e < L; e++) begin
          dv[e] = R[m][b*L+e];
          ev[e] = (m > IDX && tg.upd_rows) ? relax(dv[e], Q[m][IDX], R[IDX][b*L+e]) : dv[e];
        end
        send(tg, dv, ev);
      end
      for (int b = 0; b < B / L; b++) begin
        tg.seg = SEG_COL; tg.idx = IDX_W'(m); tg.beat = IDX_W'(b);
        for (int e = 0; e < L; e++) begin
          dv[e] = Q[b*L+e][m];
          ev[e] = (m > IDX && tg.upd_cols) ? relax(dv[e], Q[b*L+e][IDX], R[IDX][m]) : dv[e];
        end
        send(tg, dv, ev);
      end
    end
    for (int i = 0; i < B; i++)
      for (int b = 0; b < B / L; b++) begin
        tg.seg = SEG_TILE; tg.idx = IDX_W'(i); tg.beat = IDX_W'(b);
        for (int e = 0; e < L; e++) begin
          dv[e] = C[i][b*L+e];
          ev[e] = relax(dv[e], Q[i][IDX], R[IDX][b*L+e]);
        end
        send(tg, dv, ev);
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_kind(TILE_SELF);
    run_kind(TILE_ROW_DEP);
    run_kind(TILE_COL_DEP);
    run_kind(TILE_DOUBLY);
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
