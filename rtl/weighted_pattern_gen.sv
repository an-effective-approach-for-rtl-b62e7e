// weighted_pattern_gen: accumulator-based weighted pattern generator.
//
// N accumulator cells form register A, the adder and register B. A session
// counter and decoding logic drive each cell's Set and Reset. In a session a
// bit can be held at 1 (Set), held at 0 (Reset) or left free (weight 0.5);
// forced cells pass the carry straight through, so the free bits keep counting
// as one accumulator, A <= A + B + cin over the free bits. The output A[N-1:0]
// is the test pattern.
//
// Sequencing (this design's choice): each session starts with one
// initialisation clock in which every cell is forced, loading B with B_INIT
// (and A with its inverse); then SESS_LEN run clocks follow with the session's
// weights, ONE_MASK[s] for bits held at 1 and ZERO_MASK[s] for bits held at 0.
// After NSESS sessions the counter wraps to session 0. The structure (register
// B, adder, register A, session counter and logic driving Set[n-1:0] and
// Reset[n-1:0]) follows the design; the session count and length, the weight
// tables and B_INIT are not given there and are assumed.
//
// Interface: cout is the carry out of the top cell. run is high in run clocks, when a is a pattern of session
// `session`. rst_n is an asynchronous active-low reset; while it is low every
// cell is forced to its initial value.
// Timing: Set/Reset come from flip-flops; a changes after each rising edge.
module weighted_pattern_gen #(
  parameter int unsigned            N         = 8,
  parameter int unsigned            NSESS     = 4,
  parameter int unsigned            SESS_LEN  = 16,
  parameter logic [N-1:0]           B_INIT    = N'('hB5),
  parameter logic [NSESS-1:0][N-1:0] ONE_MASK  = {N'('h00), N'('h0F), N'('hF0), N'('h00)},
  parameter logic [NSESS-1:0][N-1:0] ZERO_MASK = {N'('hAA), N'('hF0), N'('h00), N'('h00)},
  parameter int unsigned            SW        = (NSESS > 1) ? $clog2(NSESS) : 1,
  parameter int unsigned            LW        = (SESS_LEN > 1) ? $clog2(SESS_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cin,
  output logic [N-1:0]  a,
  output logic          cout,
  output logic [N-1:0]  b,
  output logic [SW-1:0] session,
  output logic          run
);

  logic [N-1:0]  set_q, reset_q;
  logic [N:0]    carry;
  logic [LW-1:0] cnt;

  // Session counter and Set/Reset logic.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run     <= 1'b0;
      cnt     <= '0;
      session <= '0;
      set_q   <= ~B_INIT;
      reset_q <= B_INIT;
    end else if (!run) begin
      run     <= 1'b1;
      cnt     <= '0;
      set_q   <= ONE_MASK[session];
      reset_q <= ZERO_MASK[session];
    end else if (cnt == LW'(SESS_LEN - 1)) begin
      run     <= 1'b0;
      session <= (session == SW'(NSESS - 1)) ? '0 : session + 1'b1;
      set_q   <= ~B_INIT;
      reset_q <= B_INIT;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  // Register B, adder and register A as a chain of accumulator cells.
  assign carry[0] = cin;
  assign cout     = carry[N];

  for (genvar i = 0; i < N; i++) begin : g_cell
    accumulator_cell u_cell (
      .clk,
      .set  (set_q[i]),
      .reset(reset_q[i]),
      .cin  (carry[i]),
      .cout (carry[i+1]),
      .a    (a[i]),
      .b    (b[i])
    );
  end

  initial assert ((ONE_MASK & ZERO_MASK) == '0)
    else $error("weighted_pattern_gen: a bit cannot be held at 1 and 0 at once");

endmodule
