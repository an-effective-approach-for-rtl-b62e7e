// scalable_sic_counter: counter-based single input change generator.
//
// For scan chains much longer than the codeword, this generator produces the
// 2M Johnson codewords of an M-bit register without an l-bit Johnson counter.
// A K-bit adder register counts test vectors (session index a = 0..2M-1,
// stepped on each rising edge of scan enable SE). While SE is low (capture) a
// row of multiplexers loads the K-bit subtractor from the adder side; while SE
// is high (shift) the subtractor counts down to zero, one step per clock. The
// subtractor drives the serial output M_Johnson, which is shifted into the
// M-bit shift register:
//
//   a <= M : load SHIFT_LEN-M+a,     M_Johnson = 1 while the count is non-zero
//   a >  M : load SHIFT_LEN-M+(a-M), M_Johnson = 0 while the count is non-zero
//
// After a shift window of SHIFT_LEN clocks the register holds the Johnson
// codeword number a, equal to an M-bit Johnson counter stepped a times from
// zero (bit 0 is its first stage). Consecutive vectors therefore differ in one
// bit. The adder, subtractor, SE-controlled multiplexers and M-bit shift
// register follow the design; the load values, the polarity bit and the
// single-clock timing (SE edges detected on clk) are this design's choices.
//
// Interface: se is the scan enable. m_johnson is the serial codeword bit of
// the current clock, sr the shift register, vec_index the number of the
// codeword that the next capture loads. rst_n is asynchronous active-low.
// Timing: a shift window must be SHIFT_LEN clocks of se = 1 after at least
// one clock of se = 0.
module scalable_sic_counter #(
  parameter int unsigned M         = 8,
  parameter int unsigned SHIFT_LEN = 8,
  parameter int unsigned K         = $clog2(SHIFT_LEN + 1) > $clog2(2 * M)
                                     ? $clog2(SHIFT_LEN + 1) : $clog2(2 * M)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         se,
  output logic         m_johnson,
  output logic [M-1:0] sr,
  output logic [K-1:0] vec_index
);

  logic [K-1:0] add_q;     // adder register: Johnson codeword number
  logic [K-1:0] sub_q;     // subtractor register: clocks left in the run
  logic         pol_q;     // polarity of the run
  logic [K-1:0] load_val;
  logic         load_pol;
  logic         se_d;

  // Adder side combinational logic: value to load for codeword add_q.
  always_comb begin
    load_pol = (add_q > K'(M));
    load_val = K'(SHIFT_LEN - M) + (load_pol ? add_q - K'(M) : add_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      se_d  <= 1'b0;
      add_q <= '0;
      sub_q <= K'(SHIFT_LEN - M);
      pol_q <= 1'b0;
      sr    <= '0;
    end else begin
      se_d <= se;
      if (se && !se_d)
        add_q <= (add_q == K'(2 * M - 1)) ? '0 : add_q + 1'b1;
      if (!se) begin
        sub_q <= load_val;
        pol_q <= load_pol;
      end else begin
        if (sub_q != '0) sub_q <= sub_q - 1'b1;
        sr <= {m_johnson, sr[M-1:1]};
      end
    end
  end

  always_comb m_johnson = pol_q ^ (sub_q != '0);
  always_comb vec_index = add_q;

  initial assert (SHIFT_LEN >= M)
    else $error("scalable_sic_counter: SHIFT_LEN must be at least M");

endmodule
