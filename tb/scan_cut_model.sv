// scan_cut_model: behavioural circuit under test for the end-to-end test.
// With se high every chain shifts one place (scan_in enters at bit 0, bit L-1
// leaves on scan_out); with se low the chains capture next_state(). The
// primary outputs are outputs() of the chains, or of the parallel vector when
// tpc_valid is high. fault forces primary output bit 3 to 0 to model a
// stuck-at fault.
module scan_cut_model
  import cut_fn_pkg::*;
(
  input  logic               clk,
  input  logic               se,
  input  logic [M-1:0]       scan_in,
  input  logic [P-1:0]       pi,
  input  logic [M*L-1:0]     tpc_vec,
  input  logic               tpc_valid,
  input  logic               fault,
  output logic [M-1:0]       scan_out,
  output logic [Q-1:0]       po
);
  chains_t chain = '0;
  logic [Q-1:0] o;

  always_comb begin
    for (int i = 0; i < M; i++) scan_out[i] = chain[i][L-1];
    o  = tpc_valid ? outputs(chains_t'(tpc_vec), pi) : outputs(chain, pi);
    po = fault ? (o & ~Q'(8)) : o;
  end

  always_ff @(posedge clk) begin
    if (se) for (int i = 0; i < M; i++) chain[i] <= {chain[i][L-2:0], scan_in[i]};
    else    chain <= next_state(chain, pi);
  end
endmodule
