// tb_bist_controller: runs the controller in both modes (L = 4, NSEEDS = 3)
// and counts its outputs: clocks from Start to Done, shift clocks, capture
// clocks, Johnson and LFSR steps, analyzer enables, the column sequence
// 0..L-1 in every shift window, a single check pulse, and Done held until
// Start falls.
module tb_bist_controller;
  import msic_pkg::*;
  localparam int L = 4, NSEEDS = 3;
  logic clk = 0, rst_n = 0, start = 0;
  test_mode_e mode = MODE_PER_SCAN;
  logic test_mode, se, seed_en, seed_load, code_en, rj_mode, jc_init;
  logic misr_clr, misr_en, misr_sel_po, check, done;
  logic [1:0] col;
  bist_state_e state;
  int checks = 0, failures = 0;

  bist_controller #(.L(L), .NSEEDS(NSEEDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what, input int got = 0, input int expv = 0);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, expv); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input test_mode_e m);
    int cyc = 0, n_se = 0, n_cap = 0, n_code = 0, n_seed = 0, n_misr = 0, n_chk = 0;
    int n_init = 0, exp_col = 0, n_colerr = 0, n_clr = 0;
    mode = m; start = 1;
    #1; if (misr_clr) n_clr++;
    @(negedge clk);
    while (!done && cyc < 100000) begin
      cyc++;
      if (se) begin
        n_se++;
        if (col != exp_col[1:0]) n_colerr++;
        exp_col = (exp_col + 1) % L;
      end
      if (state == ST_CAPTURE) begin
        n_cap++;
        if (se || !misr_sel_po) n_colerr++;
      end
      if (code_en) n_code++;
      if (seed_en) n_seed++;
      if (misr_en) n_misr++;
      if (check) n_chk++;
      if (!rj_mode) n_init++;
      if (!test_mode) n_colerr++;
      @(negedge clk);
    end
    chk(n_clr == 1, "analyzer cleared on start", n_clr, 1);
    if (m == MODE_PER_SCAN) begin
      chk(cyc == L + NSEEDS*2*L*(L+1) + L + 1, "clocks start to done", cyc, L + NSEEDS*2*L*(L+1) + L + 1);
      chk(n_se == NSEEDS*2*L*L + L, "shift clocks", n_se, NSEEDS*2*L*L + L);
      chk(n_cap == NSEEDS*2*L, "captures", n_cap, NSEEDS*2*L);
      chk(n_misr == (NSEEDS*2*L - 1)*L + NSEEDS*2*L + L, "analyzer clocks", n_misr, (NSEEDS*2*L - 1)*L + NSEEDS*2*L + L);
    end else begin
      chk(cyc == L + NSEEDS*2*L + 1, "clocks start to done", cyc, L + NSEEDS*2*L + 1);
      chk(n_se == 0, "no shifting", n_se, 0);
      chk(n_misr == NSEEDS*2*L, "analyzer clocks", n_misr, NSEEDS*2*L);
    end
    chk(n_code == L + NSEEDS*2*L, "Johnson steps", n_code, L + NSEEDS*2*L);
    chk(n_seed == NSEEDS, "seed steps", n_seed, NSEEDS);
    chk(n_init == L, "initialisation clocks", n_init, L);
    chk(n_chk == 1, "one check", n_chk, 1);
    chk(n_colerr == 0, "column sequence and capture outputs", n_colerr, 0);
    repeat (3) @(negedge clk);
    chk(done && state == ST_DONE, "done held");
    start = 0;
    @(negedge clk);
    chk(!done && !test_mode && state == ST_IDLE, "back to idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!test_mode && !done, "idle after reset");
    run(MODE_PER_SCAN);
    run(MODE_PER_CLOCK);
    run(MODE_PER_SCAN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
