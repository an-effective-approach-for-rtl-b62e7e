// tb_weighted_pattern_gen: checks the weighted pattern generator with its
// default parameters against a cell-by-cell reference. The reference
// follows the session sequence (one forcing clock, SESS_LEN run clocks, four
// sessions, wrapping) and, in run clocks, ripples A + B + cin through the
// free cells while forced cells hold their value and pass the carry. It also
// checks that bits weighted 1 or 0 never leave that value and counts how
// often each free bit toggles.
module tb_weighted_pattern_gen;
  localparam int N = 8, NSESS = 4, SESS_LEN = 16;
  localparam logic [N-1:0] B_INIT = 8'hB5;
  localparam logic [N-1:0] ONE  [NSESS] = '{8'h00, 8'hF0, 8'h0F, 8'h00};
  localparam logic [N-1:0] ZERO [NSESS] = '{8'h00, 8'h00, 8'hF0, 8'hAA};
  logic clk = 0, rst_n = 0, cin = 0;
  logic [N-1:0] a, b, ra, rb;
  logic cout;
  logic [1:0] session;
  logic run;
  int checks = 0, failures = 0;
  int sess_seen = 0, toggles = 0;

  weighted_pattern_gen dut (.clk, .rst_n, .cin, .a, .cout, .b, .session, .run);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%b ra=%b b=%b rb=%b t=%0t", what, a, ra, b, rb, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c, s;
    logic [N-1:0] na;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!run && a == ~B_INIT && b == B_INIT, "reset forcing");
    for (int pass = 0; pass < 2; pass++) begin
      for (int ss = 0; ss < NSESS; ss++) begin
        // forcing clock
        chk(!run, "forcing clock");
        @(negedge clk);
        sess_seen++;
        // model state at session start: B = B_INIT except forced bits
        ra = (~B_INIT | ONE[ss]) & ~ZERO[ss];
        rb = (B_INIT & ~ONE[ss]) | ZERO[ss];
        for (int k = 0; k < SESS_LEN; k++) begin
          chk(run && session == ss[1:0], "run clock / session");
          chk(a == ra && b == rb, "pattern");
          chk((a & ONE[ss]) == ONE[ss] && (a & ZERO[ss]) == 0, "weights 1 and 0");
          cin = $urandom;
          #1;
          c = cin;
          for (int i = 0; i < N; i++) begin
            s = ra[i] ^ rb[i] ^ c;
            c = (ra[i] & rb[i]) | (ra[i] & c) | (rb[i] & c);
            na[i] = (ONE[ss][i] | ZERO[ss][i]) ? ra[i] : s;
          end
          chk(cout == c, "carry out");
          toggles += $countones(na ^ ra);
          ra = na;
          @(negedge clk);
        end
      end
    end
    chk(toggles > 0, "free bits change");
    $display("sessions=%0d free-bit toggles=%0d", sess_seen, toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
