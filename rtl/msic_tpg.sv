// msic_tpg: multiple single input change (MSIC) test pattern generator.
//
// An LFSR supplies a seed S; a reconfigurable Johnson counter supplies an
// L-bit codeword J, optionally passed through a Gray code converter; an XOR
// network forms x[i][k] = S_i XOR code_k. In test-per-scan use, scan chain i
// is driven with x[i][col] while col runs 0..L-1, so each chain is filled with
// one codeword (inverted where S_i = 1). The Johnson counter steps once per
// vector and the LFSR once every 2L vectors, so consecutive vectors differ in
// exactly one bit of each chain while the seed is held. In test-per-clock use
// the whole matrix is presented at once on tpc_vec. The seed's low P bits
// drive the primary inputs. The structure follows the design; the LFSR
// polynomial and the seed-step rate are this design's choices.
//
// Interface: seed_en steps the LFSR, seed_load reloads its first seed, code_en steps the Johnson counter,
// rj_mode/init reconfigure it, code_sel picks Johnson or Gray code, col picks
// the column shifted in this clock. Timing: scan_in, tpc_vec and pi are
// combinational from the registers and col; the registers step on the rising
// edge after their enables.
module msic_tpg
  import msic_pkg::*;
#(
  parameter int unsigned M  = 8,   // scan chains
  parameter int unsigned L  = 8,   // scan chain length = Johnson counter length
  parameter int unsigned W  = 8,   // LFSR width (seed bits S0..S(W-1))
  parameter int unsigned P  = 8,   // primary inputs driven from the seed
  parameter int unsigned CW = (L > 1) ? $clog2(L) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                seed_en,
  input  logic                seed_load,
  input  logic                code_en,
  input  logic                rj_mode,
  input  logic                init,
  input  code_sel_e           code_sel,
  input  logic [CW-1:0]       col,
  output logic [M-1:0]        scan_in,
  output logic [M*L-1:0]      tpc_vec,
  output logic [P-1:0]        pi,
  output logic [W-1:0]        seed,
  output logic [L-1:0]        code
);

  logic [L-1:0]        jc_q;
  logic [L-1:0]        gray_q;
  logic [M-1:0][L-1:0] x;

  msic_lfsr #(.W(W)) u_lfsr (
    .clk, .rst_n, .en(seed_en), .load(seed_load), .q(seed)
  );

  johnson_counter #(.L(L)) u_jc (
    .clk, .rst_n, .en(code_en), .rj_mode, .init, .q(jc_q)
  );

  gray_converter #(.L(L)) u_gray (.j(jc_q), .g(gray_q));

  always_comb code = (code_sel == CODE_GRAY) ? gray_q : jc_q;

  msic_xor_network #(.M(M), .L(L)) u_xor (
    .s(seed[M-1:0]), .code, .x
  );

  always_comb begin
    for (int i = 0; i < M; i++) scan_in[i] = x[i][col];
  end

  always_comb tpc_vec = x;
  always_comb pi      = seed[P-1:0];

  initial assert (M <= W && P <= W)
    else $error("msic_tpg: M and P must not exceed the LFSR width W");

endmodule
