// tb_msic_xor_network: random check of x[i][k] = s[i] ^ code[k].
// A chain whose seed bit is 1 must hold the inverted codeword, otherwise the
// codeword itself.
module tb_msic_xor_network;
  localparam int M = 8, L = 8;
  logic [M-1:0] s;
  logic [L-1:0] code;
  logic [M-1:0][L-1:0] x;
  int checks = 0, failures = 0;

  msic_xor_network #(.M(M), .L(L)) dut (.s, .code, .x);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      s = $urandom; code = $urandom;
      #1;
      for (int i = 0; i < M; i++) begin
        checks++;
        if (x[i] !== (s[i] ? ~code : code)) begin
          failures++;
          $display("FAIL s=%b code=%b row %0d=%b", s, code, i, x[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
