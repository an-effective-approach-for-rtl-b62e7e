// tb_accumulator_cell: checks one accumulator cell.
// Forced cells: set gives A=1, B=0, reset gives A=0, B=1, and in both cases
// cout equals cin (full adder with A != B). Free cell: A takes A^B^cin each
// clock and cout is the majority of A, B, cin; B keeps its value.
module tb_accumulator_cell;
  logic clk = 0, set = 0, reset = 0, cin = 0;
  logic cout, a, b, ea, eb;
  int checks = 0, failures = 0;

  accumulator_cell dut (.clk, .set, .reset, .cin, .cout, .a, .b);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%b b=%b cin=%b cout=%b", what, a, b, cin, cout); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      // forced, asynchronously (checked mid-cycle) and across clock edges
      set = n[0]; reset = ~n[0];
      #1;
      chk(a == n[0] && b == ~n[0], "async force");
      for (int c = 0; c < 2; c++) begin
        cin = c[0]; #1;
        chk(cout == cin, "carry passes when forced");
      end
      @(negedge clk);
      chk(a == n[0] && b == ~n[0], "force held over clock");
      // free running for a few clocks
      set = 0; reset = 0;
      for (int k = 0; k < 3; k++) begin
        cin = $urandom;
        #1;
        chk(cout == ((a & b) | (a & cin) | (b & cin)), "free carry");
        ea = a ^ b ^ cin; eb = b;
        @(negedge clk);
        chk(a == ea && b == eb, "free accumulate");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
