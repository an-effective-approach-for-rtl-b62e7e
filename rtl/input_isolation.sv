// input_isolation: input isolation circuitry of the BIST.
//
// In test mode the circuit under test's primary inputs are driven by the test
// pattern generator; otherwise by the system inputs. The multiplexer follows
// the BIST block diagram; its width is a parameter.
//
// Interface: test_mode selects, tpg_in and sys_in are the two sources.
// Timing: combinational.
module input_isolation #(
  parameter int unsigned P = 8
) (
  input  logic         test_mode,
  input  logic [P-1:0] sys_in,
  input  logic [P-1:0] tpg_in,
  output logic [P-1:0] cut_in
);

  always_comb cut_in = test_mode ? tpg_in : sys_in;

endmodule
