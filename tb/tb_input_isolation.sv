// tb_input_isolation: the circuit's inputs follow the generator in test mode
// and the system inputs otherwise.
module tb_input_isolation;
  localparam int P = 8;
  logic test_mode;
  logic [P-1:0] sys_in, tpg_in, cut_in;
  int checks = 0, failures = 0;

  input_isolation #(.P(P)) dut (.test_mode, .sys_in, .tpg_in, .cut_in);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      test_mode = n[0];
      sys_in = $urandom; tpg_in = $urandom;
      if (sys_in == tpg_in) tpg_in = ~sys_in;
      #1;
      checks++;
      if (cut_in !== (n[0] ? tpg_in : sys_in)) begin
        failures++;
        $display("FAIL mode=%b cut_in=%h", test_mode, cut_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
