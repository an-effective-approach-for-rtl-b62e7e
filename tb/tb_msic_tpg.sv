// tb_msic_tpg: checks the MSIC generator against an independent model.
// The model keeps its own LFSR (feedback q0^q2^q3^q4, shifting right) and
// Johnson counter. For each seed and each of the 2L codewords it shifts the
// L columns out (col = 0..L-1) and checks scan_in, the parallel vector and the
// primary inputs; it checks that the chain contents of consecutive vectors
// under one seed differ in exactly one bit per chain (Johnson codes), and the
// Gray-coded codeword on a second pass.
module tb_msic_tpg;
  import msic_pkg::*;
  localparam int M = 8, L = 8, W = 8, P = 8;
  logic clk = 0, rst_n = 0, seed_en = 0, seed_load = 0, code_en = 0;
  logic rj_mode = 1, init = 0;
  code_sel_e code_sel = CODE_JOHNSON;
  logic [2:0] col = 0;
  logic [M-1:0] scan_in;
  logic [M*L-1:0] tpc_vec;
  logic [P-1:0] pi;
  logic [W-1:0] seed, m_seed;
  logic [L-1:0] code, m_jc, m_code;
  logic [L-1:0] chain [M], prev_chain [M];
  int checks = 0, failures = 0;
  int sic_ok = 0;

  msic_tpg #(.M(M), .L(L), .W(W), .P(P)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_pass(input code_sel_e sel, input int nseeds);
    code_sel = sel;
    for (int s = 0; s < nseeds; s++) begin
      for (int v = 0; v < 2 * L; v++) begin
        if (sel == CODE_GRAY) begin
          m_code[0] = m_jc[0];
          for (int i = 1; i < L; i++) m_code[i] = m_jc[i-1] ^ m_jc[i];
        end else m_code = m_jc;
        for (int k = 0; k < L; k++) begin
          col = k[2:0];
          #1;
          for (int i = 0; i < M; i++) begin
            chk(scan_in[i] == (m_seed[i] ^ m_code[k]), "scan_in");
            chain[i][k] = scan_in[i];
          end
          @(negedge clk);
        end
        for (int i = 0; i < M; i++)
          chk(tpc_vec[i*L +: L] == (m_code ^ {L{m_seed[i]}}), "parallel vector");
        chk(pi == m_seed[P-1:0], "primary inputs");
        chk(code == m_code, "codeword");
        if (v > 0 && sel == CODE_JOHNSON)
          for (int i = 0; i < M; i++) begin
            chk($countones(chain[i] ^ prev_chain[i]) == 1, "single input change per chain");
            sic_ok++;
          end
        prev_chain = chain;
        // one Johnson step per vector, one seed step per 2L vectors
        code_en = 1; seed_en = (v == 2 * L - 1);
        @(negedge clk);
        code_en = 0; seed_en = 0;
        m_jc = {m_jc[L-2:0], ~m_jc[L-1]};
        if (v == 2 * L - 1) m_seed = {m_seed[0] ^ m_seed[2] ^ m_seed[3] ^ m_seed[4], m_seed[W-1:1]};
      end
    end
  endtask

  initial begin
    m_seed = 8'h01; m_jc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_pass(CODE_JOHNSON, 6);
    run_pass(CODE_GRAY, 3);
    // reload the first seed
    seed_load = 1; @(negedge clk); seed_load = 0;
    chk(seed == 8'h01, "seed reload");
    chk(sic_ok > 0, "single input change checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
