// tb_msic_switching: measures the switching activity of MSIC patterns against
// plain pseudo-random scan patterns, at the generator's default sizes
// (8 chains of 8 flip-flops, 8-bit seed), over 64 seeds x 16 vectors.
//
// Two counts are kept for each source:
//   shift transitions   - changes between successive bits entering a chain
//                         (each one ripples through the chain while shifting);
//   vector transitions  - flip-flops whose value differs between consecutive
//                         loaded vectors (what the circuit sees at capture).
// The MSIC generator is driven as the controller drives it (one Johnson step
// per vector, one seed step per 2L vectors). The pseudo-random reference
// shifts the bits of a 16-bit LFSR, stepped every clock, into all chains.
// Checks: at most 2 shift transitions per chain per vector and exactly one
// vector transition per chain under one seed for MSIC, and both totals below
// the pseudo-random ones.
module tb_msic_switching;
  import msic_pkg::*;
  localparam int M = 8, L = 8, NSEED = 64;
  logic clk = 0, rst_n = 0, seed_en = 0, seed_load = 0, code_en = 0;
  logic rj_mode = 1, init = 0;
  code_sel_e code_sel = CODE_JOHNSON;
  logic [2:0] col = 0;
  logic [M-1:0] scan_in;
  logic [M*L-1:0] tpc_vec;
  logic [7:0] pi, seed;
  logic [L-1:0] code;
  int checks = 0, failures = 0;

  msic_tpg dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] ch [M], prev [M];
    logic [M-1:0] last_in;
    logic [15:0] r = 16'hACE1;
    int msic_shift = 0, msic_vec = 0, rnd_shift = 0, rnd_vec = 0;
    int per_chain;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- MSIC ----
    for (int s = 0; s < NSEED; s++) begin
      for (int v = 0; v < 2 * L; v++) begin
        for (int k = 0; k < L; k++) begin
          col = k[2:0];
          #1;
          for (int i = 0; i < M; i++) begin
            if (k > 0 && scan_in[i] != last_in[i]) msic_shift++;
            ch[i][k] = scan_in[i];
          end
          last_in = scan_in;
          @(negedge clk);
        end
        for (int i = 0; i < M; i++) begin
          per_chain = 0;
          for (int k = 1; k < L; k++) per_chain += (ch[i][k] != ch[i][k-1]);
          chk(per_chain <= 2, "at most two shift transitions per chain");
        end
        if (v > 0)
          for (int i = 0; i < M; i++) begin
            chk($countones(ch[i] ^ prev[i]) == 1, "one vector transition per chain");
            msic_vec += $countones(ch[i] ^ prev[i]);
          end
        prev = ch;
        code_en = 1; seed_en = (v == 2 * L - 1);
        @(negedge clk);
        code_en = 0; seed_en = 0;
      end
    end
    // ---- pseudo-random reference: x^16 + x^14 + x^13 + x^11 + 1 ----
    for (int s = 0; s < NSEED; s++) begin
      for (int v = 0; v < 2 * L; v++) begin
        for (int k = 0; k < L; k++) begin
          for (int i = 0; i < M; i++) begin
            ch[i][k] = r[i];
            if (k > 0 && ch[i][k] != ch[i][k-1]) rnd_shift++;
          end
          r = {r[14:0], r[15] ^ r[13] ^ r[12] ^ r[10]};
        end
        if (v > 0) for (int i = 0; i < M; i++) rnd_vec += $countones(ch[i] ^ prev[i]);
        prev = ch;
      end
    end
    $display("shift transitions:  MSIC %0d  pseudo-random %0d", msic_shift, rnd_shift);
    $display("vector transitions: MSIC %0d  pseudo-random %0d (same-seed vectors only for MSIC: %0d)",
             msic_vec, rnd_vec, NSEED * (2 * L - 1) * M);
    chk(msic_vec == NSEED * (2 * L - 1) * M, "MSIC vector transitions: one per chain per vector");
    chk(msic_shift < rnd_shift, "fewer shift transitions than pseudo-random");
    chk(msic_vec < rnd_vec, "fewer vector transitions than pseudo-random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
