// msic_bist_top: scan-based BIST with a multiple single input change (MSIC)
// test pattern generator, plus two further low-switching pattern generators.
//
// BIST part: the test controller sequences the MSIC generator, the input
// isolation multiplexer and the MISR response analyzer around an external
// circuit under test (CUT) with M scan chains of length L, P primary inputs
// and Q primary outputs. In test-per-scan mode the generator drives the scan
// inputs one MSIC column per clock (cut_se high) and the CUT captures with
// cut_se low; in test-per-clock mode cut_tpc_valid is high and the CUT is to
// apply the M*L-bit vector cut_tpc_vec each clock. The analyzer folds the scan
// outputs during shifts and the primary outputs at captures, and at the end
// compares the signature with golden_sig: pass or fail with bist_done.
// tpg_seed and tpg_code show the current LFSR seed and SIC codeword.
// Outside test mode the CUT's primary inputs follow sys_in.
//
// Beside it, with their own outputs: the scalable SIC counter, clocked by the
// same scan enable, delivers an SIC_M-bit Johnson codeword per vector, and the
// accumulator-based weighted pattern generator free-runs from reset.
//
// The block set follows the design; how the generators sit side by side and
// all sizes are described in each block. Timing: one clock domain, rst_n
// asynchronous active-low; a test-per-scan run lasts
// L + NSEEDS*2L*(L+1) + L + 1 clocks from bist_start to bist_done.
module msic_bist_top
  import msic_pkg::*;
#(
  parameter int unsigned M      = 8,
  parameter int unsigned L      = 8,
  parameter int unsigned W      = 8,
  parameter int unsigned P      = 8,
  parameter int unsigned Q      = 8,
  parameter int unsigned R      = 16,
  parameter int unsigned NSEEDS = 255,
  parameter int unsigned SIC_M  = 8,
  parameter int unsigned WPG_N  = 8,
  parameter int unsigned D      = (M > Q) ? M : Q,
  parameter int unsigned CW     = (L > 1) ? $clog2(L) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // BIST control and verdict
  input  logic             bist_start,
  input  test_mode_e       mode,
  input  code_sel_e        code_sel,
  input  logic [R-1:0]     golden_sig,
  output logic             bist_done,
  output logic             pass,
  output logic             fail,
  output logic [R-1:0]     signature,
  output logic [W-1:0]     tpg_seed,
  output logic [L-1:0]     tpg_code,
  // system side
  input  logic [P-1:0]     sys_in,
  // circuit under test
  output logic [P-1:0]     cut_pi,
  output logic             cut_se,
  output logic [M-1:0]     cut_scan_in,
  output logic [M*L-1:0]   cut_tpc_vec,
  output logic             cut_tpc_valid,
  input  logic [M-1:0]     cut_scan_out,
  input  logic [Q-1:0]     cut_po,
  // scalable SIC counter
  output logic             sic_m_johnson,
  output logic [SIC_M-1:0] sic_codeword,
  // weighted pattern generator
  input  logic             wpg_cin,
  output logic [WPG_N-1:0] wpg_pattern,
  output logic             wpg_run,
  output logic [1:0]       wpg_session
);

  logic          test_mode, seed_en, seed_load, code_en, rj_mode, jc_init;
  logic          misr_clr, misr_en, misr_sel_po, check;
  logic [CW-1:0] col;
  logic [P-1:0]  tpg_pi;
  logic [D-1:0]  misr_d;
  bist_state_e   state;

  bist_controller #(.L(L), .NSEEDS(NSEEDS)) u_ctrl (
    .clk, .rst_n,
    .start(bist_start), .mode,
    .test_mode, .se(cut_se), .col,
    .seed_en, .seed_load, .code_en, .rj_mode, .jc_init,
    .misr_clr, .misr_en, .misr_sel_po, .check,
    .done(bist_done), .state
  );

  msic_tpg #(.M(M), .L(L), .W(W), .P(P)) u_tpg (
    .clk, .rst_n,
    .seed_en, .seed_load, .code_en, .rj_mode, .init(jc_init),
    .code_sel, .col,
    .scan_in(cut_scan_in), .tpc_vec(cut_tpc_vec), .pi(tpg_pi),
    .seed(tpg_seed), .code(tpg_code)
  );

  input_isolation #(.P(P)) u_iso (
    .test_mode, .sys_in, .tpg_in(tpg_pi), .cut_in(cut_pi)
  );

  always_comb begin
    misr_d = misr_sel_po ? D'(cut_po) : D'(cut_scan_out);
    cut_tpc_valid = (state == ST_PCLOCK);
  end

  misr_ora #(.R(R), .D(D)) u_ora (
    .clk, .rst_n,
    .clr(misr_clr), .en(misr_en), .d(misr_d),
    .check, .expected(golden_sig),
    .signature, .pass, .fail
  );

  scalable_sic_counter #(.M(SIC_M), .SHIFT_LEN(L)) u_sic (
    .clk, .rst_n, .se(cut_se),
    .m_johnson(sic_m_johnson), .sr(sic_codeword), .vec_index()
  );

  weighted_pattern_gen #(.N(WPG_N)) u_wpg (
    .clk, .rst_n, .cin(wpg_cin),
    .a(wpg_pattern), .cout(), .b(), .session(wpg_session), .run(wpg_run)
  );

endmodule
