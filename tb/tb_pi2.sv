// tb_pi2: exhaustive self-checking test of the carry-less unit Pi2.
// Expected {c_out, s_out} = a*b + s_in for all 8 input combinations.
module tb_pi2;
  logic a, b, s_in, s_out, c_out;
  int checks = 0, failures = 0;

  pi2 dut (.a(a), .b(b), .s_in(s_in), .s_out(s_out), .c_out(c_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, s_in} = 3'(v);
      #1;
      checks++;
      if ({c_out, s_out} != 2'(int'(a && b) + int'(s_in))) begin
        failures++;
        $display("FAIL a=%b b=%b s_in=%b -> c=%b s=%b", a, b, s_in, c_out, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
