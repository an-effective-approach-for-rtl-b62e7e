// tb_johnson_counter: checks the reconfigurable Johnson counter.
// Counting mode: from zero the state after k steps has its low k bits set
// (k <= L) or all bits set except the low k-L (k > L); the period is 2L and
// each step changes one bit. Initialisation mode shifts the serial input in.
module tb_johnson_counter;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, en = 0, rj_mode = 1, init = 0;
  logic [L-1:0] q, prev, expv;
  int checks = 0, failures = 0;

  johnson_counter #(.L(L)) dut (.clk, .rst_n, .en, .rj_mode, .init, .q);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s q=%b exp=%b", what, q, expv); end
  endtask

  function automatic logic [L-1:0] johnson(input int k);
    logic [L-1:0] v;
    k = k % (2 * L);
    for (int i = 0; i < L; i++) v[i] = (k <= L) ? (i < k) : (i >= k - L);
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
    expv = '0; chk(q == '0, "reset");
    en = 1;
    for (int k = 1; k <= 3 * L; k++) begin
      prev = q;
      @(negedge clk);
      expv = johnson(k);
      chk(q == expv, "count");
      chk($countones(q ^ prev) == 1, "single bit change");
    end
    en = 0;
    prev = q;
    repeat (3) @(negedge clk);
    expv = prev; chk(q == prev, "hold");
    // initialisation mode: shift in 1,0,1,1,0,0,1,0
    rj_mode = 0; en = 1;
    for (int k = 0; k < L; k++) begin
      init = (8'b0100_1101 >> k) & 1'b1;
      @(negedge clk);
    end
    expv = 8'b1011_0010;
    chk(q == expv, "init shift");
    // back to counting from the loaded state
    rj_mode = 1;
    @(negedge clk);
    expv = 8'b0110_0100;
    chk(q == expv, "count after init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
