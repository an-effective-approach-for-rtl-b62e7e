// tb_gray_converter: exhaustive check of the Gray converter for L = 8.
// Reference: read j with j[0] as the most significant bit, form b ^ (b >> 1),
// and map back to the same bit order.
module tb_gray_converter;
  localparam int L = 8;
  logic [L-1:0] j, g, b, gb, expv;
  int checks = 0, failures = 0;

  gray_converter #(.L(L)) dut (.j, .g);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      j = v[L-1:0];
      #1;
      for (int i = 0; i < L; i++) b[L-1-i] = j[i];
      gb = b ^ (b >> 1);
      for (int i = 0; i < L; i++) expv[i] = gb[L-1-i];
      checks++;
      if (g !== expv) begin
        failures++;
        $display("FAIL j=%b g=%b exp=%b", j, g, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
