// misr_ora: output response analyzer of the BIST.
//
// A multiple input signature register (MISR) folds the circuit's responses
// into an R-bit signature. Each enabled clock the register shifts left by one,
// XORs in the characteristic polynomial POLY when the bit shifted out is 1,
// and XORs in the D-bit response word (zero-extended to R bits). When check
// is pulsed the signature is compared with the expected one and pass or fail
// is raised and held until the next clear. The use of a MISR and a
// pass/fail verdict follows the design; widths and polynomial are this
// design's choices (POLY is x^16 + x^12 + x^3 + x + 1).
//
// Interface: clr zeroes the signature and the verdict, en folds d in, check
// compares with expected. Timing: all updates on the rising clock edge; pass
// and fail are valid from the clock after check.
module misr_ora #(
  parameter int unsigned  R    = 16,
  parameter int unsigned  D    = 16,
  parameter logic [R-1:0] POLY = R'('h100B)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [D-1:0] d,
  input  logic         check,
  input  logic [R-1:0] expected,
  output logic [R-1:0] signature,
  output logic         pass,
  output logic         fail
);

  logic [R-1:0] next_sig;

  always_comb
    next_sig = {signature[R-2:0], 1'b0} ^ (signature[R-1] ? POLY : '0) ^ R'(d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signature <= '0;
      pass      <= 1'b0;
      fail      <= 1'b0;
    end else if (clr) begin
      signature <= '0;
      pass      <= 1'b0;
      fail      <= 1'b0;
    end else begin
      if (en) signature <= next_sig;
      if (check) begin
        pass <= (signature == expected);
        fail <= (signature != expected);
      end
    end
  end

  initial assert (D <= R) else $error("misr_ora: D must not exceed R");

endmodule
