// accumulator_cell: one bit of the accumulator-based weighted pattern generator.
//
// A full adder adds A[i], B[i] and the carry in; its sum is stored in the A
// flip-flop, whose output is fed back to the adder. Both the A flip-flop and
// the B (driving register) flip-flop have active-high asynchronous set and
// reset. Holding set forces A[i] = 1 and B[i] = 0; holding reset forces
// A[i] = 0 and B[i] = 1. Either way A[i] != B[i], and the full adder's truth
// table then gives cout = cin: the cell outputs a constant and passes the
// carry through, so the remaining cells keep counting as one accumulator. With
// neither held, A[i] accumulates normally and B[i] keeps its last value.
// The adder, the two flip-flops with set/reset and the feedback of A follow the
// design; which flip-flop input each of Set/Reset drives, and reset winning
// over set, are this design's choices.
//
// Interface: set, reset are level inputs; cin/cout chain the cells.
// Timing: A[i] takes the sum on the rising clock edge; set/reset act at once.
// Each flip-flop has both an asynchronous set and an asynchronous reset, as in
// the cell this models; synthesis flows without set/reset flip-flops in their
// library must map them to an equivalent.
module accumulator_cell (
  input  logic clk,
  input  logic set,
  input  logic reset,
  input  logic cin,
  output logic cout,
  output logic a,
  output logic b
);

  logic s;

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

  // A flip-flop: D = full adder sum; set forces 1, reset forces 0.
  always_ff @(posedge clk or posedge reset or posedge set) begin
    if (reset)    a <= 1'b0;
    else if (set) a <= 1'b1;
    else          a <= s;
  end

  // B flip-flop: holds its value; set/reset drive it opposite to A.
  always_ff @(posedge clk or posedge reset or posedge set) begin
    if (reset)    b <= 1'b1;
    else if (set) b <= 1'b0;
    else          b <= b;
  end

endmodule
