// msic_xor_network: expands one seed into an M x L matrix of MSIC bits.
//
// Combinational. Bit x[i][k] is seed bit S_i XOR codeword bit k. Scan chain i
// receives row i: in shift clock k it is given x[i][k], so after L clocks it
// holds the whole codeword, inverted where S_i = 1. When the codeword then
// advances by one Johnson step, every chain sees a single changed bit: the
// multiple single input change property.
//
// Interface: s (M seed bits), code (L codeword bits), x (M rows of L bits).
// Timing: no clock, no latency.
module msic_xor_network #(
  parameter int unsigned M = 8,
  parameter int unsigned L = 8
) (
  input  logic [M-1:0]         s,
  input  logic [L-1:0]         code,
  output logic [M-1:0][L-1:0]  x
);

  always_comb begin
    for (int i = 0; i < M; i++) x[i] = code ^ {L{s[i]}};
  end

endmodule
