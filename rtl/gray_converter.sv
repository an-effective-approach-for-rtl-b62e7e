// gray_converter: Gray code converter behind the Johnson counter.
//
// Combinational. The codeword J1..Jl is read as a binary number with J1
// (j[0]) as its most significant bit and converted to Gray code the usual way:
// g1 = J1 and g_i = J_(i-1) XOR J_i. For a Johnson codeword the result has one
// or two ones, marking where the run of ones starts and ends.
//
// Interface: j in, g out, both L bits wide. Timing: no clock, no latency.
module gray_converter #(
  parameter int unsigned L = 8
) (
  input  logic [L-1:0] j,
  output logic [L-1:0] g
);

  always_comb begin
    g[0] = j[0];
    for (int i = 1; i < L; i++) g[i] = j[i-1] ^ j[i];
  end

endmodule
