// tb_scalable_sic_counter: runs 3*2M test vectors of SHIFT_LEN shift clocks
// each (with one or two capture clocks between them) and checks that after
// each shift window the M-bit shift register holds Johnson codeword number a
// (low a bits set for a <= M, else all set but the low a-M), cycling with
// period 2M, and that consecutive codewords differ in one bit.
module tb_scalable_sic_counter;
  localparam int M = 4, SHIFT_LEN = 11;
  logic clk = 0, rst_n = 0, se = 0;
  logic m_johnson;
  logic [M-1:0] sr, expv, prev;
  logic [4:0] vec_index;
  int checks = 0, failures = 0;

  scalable_sic_counter #(.M(M), .SHIFT_LEN(SHIFT_LEN), .K(5)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] johnson(input int k);
    logic [M-1:0] v;
    k = k % (2 * M);
    for (int i = 0; i < M; i++) v[i] = (k <= M) ? (i < k) : (i >= k - M);
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev = '1;
    for (int a = 0; a < 6 * M; a++) begin
      se = 0;
      repeat (1 + (a % 2)) @(negedge clk);
      se = 1;
      repeat (SHIFT_LEN) @(negedge clk);
      se = 0;
      expv = johnson(a);
      checks++;
      if (sr !== expv) begin
        failures++;
        $display("FAIL vector %0d sr=%b exp=%b", a, sr, expv);
      end
      if (a > 0) begin
        checks++;
        if ($countones(sr ^ prev) != 1) begin
          failures++;
          $display("FAIL vector %0d not a single change", a);
        end
      end
      prev = sr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
