// cut_fn_pkg: logic functions of the behavioural circuit under test used by
// the end-to-end testbench. The circuit has M = 8 scan chains of L = 8
// flip-flops, P = 8 primary inputs and Q = 8 primary outputs. Its next state
// and outputs are arbitrary but fixed mixing functions of the chain contents
// and the primary inputs, so that a wrong pattern or response changes the
// signature. A parallel (test-per-clock) vector is applied through the same
// output function.
package cut_fn_pkg;
  localparam int M = 8, L = 8, P = 8, Q = 8;
  typedef logic [M-1:0][L-1:0] chains_t;

  function automatic chains_t next_state(input chains_t c, input logic [P-1:0] pi);
    chains_t n;
    for (int i = 0; i < M; i++)
      n[i] = {c[i][L-2:0], c[i][L-1]} ^ (c[(i+1)%M] & c[(i+3)%M]) ^ {L{pi[i%P]}} ^ L'(i);
    return n;
  endfunction

  function automatic logic [Q-1:0] outputs(input chains_t c, input logic [P-1:0] pi);
    logic [Q-1:0] o;
    o = pi;
    for (int i = 0; i < M; i++) o ^= Q'((c[i] << (i % L)) | (c[i] >> (L - i % L))) ^ Q'(c[i] & c[(i+2)%M]);
    return o;
  endfunction

  // Reference MISR step, bit by bit: x^16 + x^12 + x^3 + x + 1.
  function automatic logic [15:0] misr_step(input logic [15:0] s, input logic [7:0] d);
    logic [15:0] n;
    localparam logic [15:0] POLY = 16'h100B;
    for (int i = 0; i < 16; i++)
      n[i] = (i == 0 ? 1'b0 : s[i-1]) ^ (s[15] & POLY[i]) ^ (i < 8 ? d[i] : 1'b0);
    return n;
  endfunction
endpackage
