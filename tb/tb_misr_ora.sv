// tb_misr_ora: checks the MISR signature against a bit-level reference
// (next[i] = sig[i-1] ^ (sig[15] & POLY[i]) ^ d[i], POLY = 0x100B), then the
// pass/fail verdict with a right and a wrong expected value, hold when en is
// low, and clear.
module tb_misr_ora;
  localparam int R = 16, D = 16;
  localparam logic [R-1:0] POLY = 16'h100B;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, check = 0;
  logic [D-1:0] d;
  logic [R-1:0] expected, signature, ref_sig, nxt;
  logic pass, fail;
  int checks = 0, failures = 0;

  misr_ora #(.R(R), .D(D)) dut (.clk, .rst_n, .clr, .en, .d, .check, .expected,
                                .signature, .pass, .fail);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s sig=%h ref=%h", what, signature, ref_sig); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; expected = '0; ref_sig = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(signature == 0, "reset");
    for (int n = 0; n < 100; n++) begin
      en = (n % 7 != 3);
      d  = $urandom;
      @(negedge clk);
      if (en) begin
        for (int i = 0; i < R; i++)
          nxt[i] = (i == 0 ? 1'b0 : ref_sig[i-1]) ^ (ref_sig[R-1] & POLY[i]) ^ d[i];
        ref_sig = nxt;
      end
      chk(signature == ref_sig, "signature");
    end
    en = 0;
    expected = ref_sig; check = 1;
    @(negedge clk); check = 0;
    chk(pass && !fail, "pass on match");
    expected = ref_sig ^ 16'h0100; check = 1;
    @(negedge clk); check = 0;
    chk(!pass && fail, "fail on mismatch");
    clr = 1;
    @(negedge clk); clr = 0;
    chk(signature == 0 && !pass && !fail, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
