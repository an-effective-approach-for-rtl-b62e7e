// tb_msic_bist_top: end-to-end test of the MSIC BIST at its default sizes
// (8 scan chains of 8 flip-flops, 8-bit LFSR run through all 255 seeds).
//
// A behavioural scan circuit (scan_cut_model) is connected to the BIST. For
// each run the testbench first computes the expected signature with its own
// model of the whole test (LFSR, Johnson counter, Gray code, scan shifting,
// capture and MISR), gives it to the BIST as golden_sig, starts the BIST and
// checks pass/fail and the number of clocks from start to done. Runs: test-per-
// scan with Johnson codewords, with Gray-coded codewords, test-per-clock, and
// test-per-scan with a stuck-at fault in the circuit (must fail).
// Monitors check that, under one seed, consecutive vectors loaded into the
// chains differ in exactly one bit per chain; that the scalable SIC counter's
// codeword changes by one bit per vector; that the system inputs reach the
// circuit when the BIST is idle; and that the weighted generator keeps its
// forced bits. Each mechanism is counted and must occur at least once.
module tb_msic_bist_top;
  import msic_pkg::*;
  import cut_fn_pkg::*;

  localparam int R = 16, NSEEDS = 255;

  logic clk = 0, rst_n = 0, bist_start = 0, fault = 0, wpg_cin = 0;
  test_mode_e mode = MODE_PER_SCAN;
  code_sel_e  code_sel = CODE_JOHNSON;
  logic [R-1:0] golden_sig = '0, signature;
  logic bist_done, pass, fail;
  logic [7:0] tpg_seed, tpg_code;
  logic [P-1:0] sys_in = '0, cut_pi;
  logic cut_se, cut_tpc_valid;
  logic [M-1:0] cut_scan_in, cut_scan_out;
  logic [M*L-1:0] cut_tpc_vec;
  logic [Q-1:0] cut_po;
  logic sic_m_johnson;
  logic [7:0] sic_codeword, wpg_pattern;
  logic wpg_run;
  logic [1:0] wpg_session;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_shift = 0, n_capture = 0, n_seed = 0, n_init = 0, n_pclock = 0, n_unload = 0;
  int n_gray = 0, n_iso = 0, n_pass = 0, n_fail = 0, n_msic = 0, n_sic = 0, n_wpg = 0;

  msic_bist_top dut (.*);

  scan_cut_model cut (
    .clk, .se(cut_se), .scan_in(cut_scan_in), .pi(cut_pi),
    .tpc_vec(cut_tpc_vec), .tpc_valid(cut_tpc_valid), .fault,
    .scan_out(cut_scan_out), .po(cut_po)
  );

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model of one complete test ----------------
  function automatic logic [L-1:0] gray_of(input logic [L-1:0] j);
    logic [L-1:0] g;
    g[0] = j[0];
    for (int i = 1; i < L; i++) g[i] = j[i] ^ j[i-1];
    return g;
  endfunction

  function automatic logic [R-1:0] ref_signature(input test_mode_e m, input code_sel_e sel);
    logic [7:0] seed = 8'h01;
    logic [L-1:0] jc = '0, code;
    chains_t ch = '0, x;
    logic [M-1:0] so;
    logic [R-1:0] sig = '0;
    bit first = 1;
    for (int s = 0; s < NSEEDS; s++) begin
      for (int v = 0; v < 2 * L; v++) begin
        code = (sel == CODE_GRAY) ? gray_of(jc) : jc;
        for (int i = 0; i < M; i++) x[i] = seed[i] ? ~code : code;
        if (m == MODE_PER_CLOCK) begin
          sig = misr_step(sig, outputs(x, seed));
        end else begin
          for (int k = 0; k < L; k++) begin
            for (int i = 0; i < M; i++) so[i] = ch[i][L-1];
            if (!first) sig = misr_step(sig, so);
            for (int i = 0; i < M; i++) ch[i] = {ch[i][L-2:0], x[i][k]};
          end
          first = 0;
          sig = misr_step(sig, outputs(ch, seed));
          ch = next_state(ch, seed);
        end
        jc = {jc[L-2:0], ~jc[L-1]};
      end
      seed = {seed[0] ^ seed[2] ^ seed[3] ^ seed[4], seed[7:1]};
    end
    if (m == MODE_PER_SCAN)
      for (int k = 0; k < L; k++) begin
        for (int i = 0; i < M; i++) so[i] = ch[i][L-1];
        sig = misr_step(sig, so);
        for (int i = 0; i < M; i++) ch[i] = {ch[i][L-2:0], 1'b0};
      end
    return sig;
  endfunction

  // ---------------- monitors ----------------
  chains_t prev_chain;
  logic [7:0] prev_seed, prev_sic;
  bit have_prev = 0, have_sic = 0, prev_run = 0;

  function automatic bit is_johnson(input logic [7:0] w);
    for (int k = 0; k < 16; k++) begin
      logic [7:0] v;
      for (int i = 0; i < 8; i++) v[i] = (k <= 8) ? (i < k) : (i >= k - 8);
      if (w == v) return 1;
    end
    return 0;
  endfunction

  always @(negedge clk) if (rst_n) begin
    bist_state_e st;
    st = dut.u_ctrl.state;
    if (st == ST_SHIFT) n_shift++;
    if (st == ST_UNLOAD) n_unload++;
    if (st == ST_INIT) n_init++;
    if (st == ST_PCLOCK) begin
      n_pclock++;
      if (code_sel == CODE_GRAY) n_gray++;
    end
    if (st == ST_IDLE) begin
      n_iso++;
      chk(cut_pi == sys_in, "system inputs reach the circuit when idle");
      have_prev = 0; have_sic = 0;
    end
    if (st == ST_CAPTURE) begin
      n_capture++;
      if (code_sel == CODE_GRAY) n_gray++;
      // multiple single input change: same seed, Johnson codes -> one bit per chain
      if (have_prev && prev_seed == tpg_seed && code_sel == CODE_JOHNSON) begin
        for (int i = 0; i < M; i++)
          chk($countones(cut.chain[i] ^ prev_chain[i]) == 1, "one changed bit per chain");
        n_msic++;
      end
      if (have_prev && prev_seed != tpg_seed) n_seed++;
      prev_chain = cut.chain; prev_seed = tpg_seed; have_prev = 1;
      // scalable SIC counter codeword
      chk(is_johnson(sic_codeword), "SIC counter holds a Johnson codeword");
      if (have_sic) begin
        chk($countones(sic_codeword ^ prev_sic) == 1, "SIC codeword changes by one bit");
        n_sic++;
      end
      prev_sic = sic_codeword; have_sic = 1;
    end
    if (wpg_run && !prev_run) n_wpg++;
    if (wpg_run && wpg_session == 2'd1) chk(wpg_pattern[7:4] == 4'hF, "weighted bits held at 1");
    if (wpg_run && wpg_session == 2'd2) chk(wpg_pattern[7:4] == 4'h0 && wpg_pattern[3:0] == 4'hF, "weighted bits held at 0/1");
    prev_run = wpg_run;
  end

  // ---------------- one BIST run ----------------
  task automatic run(input test_mode_e m, input code_sel_e sel, input bit flt, input bit expect_pass);
    int cyc = 0, exp_cyc;
    mode = m; code_sel = sel; fault = flt;
    golden_sig = ref_signature(m, sel);
    exp_cyc = (m == MODE_PER_SCAN) ? L + NSEEDS*2*L*(L+1) + L + 1 : L + NSEEDS*2*L + 1;
    @(negedge clk);
    bist_start = 1;
    @(negedge clk);
    while (!bist_done && cyc < 100000) begin cyc++; @(negedge clk); end
    chk(cyc == exp_cyc, "clocks from start to done");
    if (cyc != exp_cyc) $display("  clocks %0d expected %0d", cyc, exp_cyc);
    chk(pass == expect_pass && fail == !expect_pass, "verdict");
    if (expect_pass) chk(signature == golden_sig, "signature");
    if (pass) n_pass++;
    if (fail) n_fail++;
    $display("run mode=%s code=%s fault=%0b: signature %h expected %h pass=%0b clocks=%0d",
             m.name(), sel.name(), flt, signature, golden_sig, pass, cyc);
    bist_start = 0;
    fault = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    wpg_cin = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4; n++) begin sys_in = $urandom; @(negedge clk); end
    run(MODE_PER_SCAN,  CODE_JOHNSON, 0, 1);
    sys_in = 8'h5A;
    run(MODE_PER_SCAN,  CODE_GRAY,    0, 1);
    run(MODE_PER_CLOCK, CODE_JOHNSON, 0, 1);
    run(MODE_PER_SCAN,  CODE_JOHNSON, 1, 0);
    $display("mechanisms: shift=%0d capture=%0d seed_changes=%0d init=%0d per_clock=%0d unload=%0d gray=%0d",
             n_shift, n_capture, n_seed, n_init, n_pclock, n_unload, n_gray);
    $display("            isolation=%0d pass=%0d fail=%0d msic_checks=%0d sic_steps=%0d wpg_sessions=%0d",
             n_iso, n_pass, n_fail, n_msic, n_sic, n_wpg);
    chk(n_shift > 0, "shift happened");
    chk(n_capture > 0, "capture happened");
    chk(n_seed > 0, "seed change happened");
    chk(n_init > 0, "Johnson initialisation happened");
    chk(n_pclock > 0, "test-per-clock happened");
    chk(n_unload > 0, "unload happened");
    chk(n_gray > 0, "Gray-coded run happened");
    chk(n_iso > 0, "input isolation exercised");
    chk(n_pass > 0, "a pass verdict happened");
    chk(n_fail > 0, "a fail verdict happened");
    chk(n_msic > 0, "single input change checked");
    chk(n_sic > 0, "scalable SIC steps checked");
    chk(n_wpg > 0, "weighted sessions happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
