// msic_lfsr: seed generator of the MSIC pattern generator.
//
// A W-bit Fibonacci LFSR that shifts towards bit 0 and enters the feedback
// bit at the most significant end, so each state is the previous one shifted
// right by one place with a new top bit. The feedback is the XOR of the state
// bits selected by TAPS. The default taps (bits 0, 2, 3, 4) give a maximal
// length sequence of 2^W-1 states for W = 8; the polynomial is this design's
// choice. The state S is the seed: its low bits are XORed with the Johnson
// codeword for the scan chains and also drive the primary inputs.
//
// Interface: en advances the register one step per clock; load (which wins)
// reloads SEED so that every test run starts from the same seed. rst_n is an
// asynchronous active-low reset to SEED, which must be non-zero.
// Timing: q changes on the rising clock edge after en is sampled high.
module msic_lfsr #(
  parameter int unsigned    W    = 8,
  parameter logic [W-1:0]   TAPS = W'('h1D),
  parameter logic [W-1:0]   SEED = W'('h01)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  output logic [W-1:0] q
);

  logic fb;

  always_comb fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= SEED;
    else if (load)  q <= SEED;
    else if (en)    q <= {fb, q[W-1:1]};
  end

  initial assert (SEED != '0) else $error("msic_lfsr: SEED must be non-zero");

endmodule
