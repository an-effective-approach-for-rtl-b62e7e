// johnson_counter: reconfigurable l-bit Johnson counter of the MSIC generator.
//
// A chain of L D flip-flops D1..Dl (q[0] is D1, q[L-1] is Dl). In counting
// mode (rj_mode = 1) the first flip-flop takes the inverse of the last, so
// from all-zeros the register walks through 2L Johnson codewords, each
// differing from the last in one bit. In initialisation mode (rj_mode = 0) the
// first flip-flop takes the serial input init instead, so any start codeword
// can be shifted in. The Init and RJ-Mode inputs and the feedback from the last
// stage follow the reconfigurable counter of the design; how they are combined
// at the first stage is this design's choice.
//
// Interface: en advances the register once per clock (it is the counter's
// clock enable). rst_n is an asynchronous active-low reset to all zeros.
// Timing: q changes on the rising clock edge after en is sampled high.
module johnson_counter #(
  parameter int unsigned L = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         rj_mode,
  input  logic         init,
  output logic [L-1:0] q
);

  logic d1;

  always_comb d1 = rj_mode ? ~q[L-1] : init;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= {q[L-2:0], d1};
  end

  initial assert (L >= 2) else $error("johnson_counter: L must be at least 2");

endmodule
