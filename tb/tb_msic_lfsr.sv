// tb_msic_lfsr: checks the seed LFSR against a bit-level reference.
// The reference computes the feedback as q[0]^q[2]^q[3]^q[4] (the default
// taps) and checks one full period: 255 distinct non-zero states returning to
// the seed, holding when en is low, and reloading the seed on load.
module tb_msic_lfsr;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [7:0] q, ref_q;
  int checks = 0, failures = 0;
  bit seen [256];

  msic_lfsr dut (.clk, .rst_n, .en, .load, .q);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s q=%h ref=%h", what, q, ref_q); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 8'h01;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(q == 8'h01, "reset value");
    en = 1;
    for (int n = 1; n <= 255; n++) begin
      @(negedge clk);
      ref_q = {ref_q[0] ^ ref_q[2] ^ ref_q[3] ^ ref_q[4], ref_q[7:1]};
      chk(q == ref_q, "step");
      chk(q != 0, "non-zero");
      if (n < 255) begin
        chk(!seen[q], "distinct");
        seen[q] = 1;
      end
    end
    chk(q == 8'h01, "period 255");
    // hold
    @(negedge clk); ref_q = {ref_q[0] ^ ref_q[2] ^ ref_q[3] ^ ref_q[4], ref_q[7:1]};
    en = 0;
    repeat (3) @(negedge clk);
    chk(q == ref_q, "hold with en low");
    // reload
    en = 1; load = 1;
    @(negedge clk);
    chk(q == 8'h01, "load seed");
    load = 0; en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
