// tb_pi0: exhaustive self-checking test of the exact partial product unit.
// All 16 input combinations; expected {c_out, s_out} = a*b + s_in + c_in.
module tb_pi0;
  logic a, b, s_in, c_in, s_out, c_out;
  int checks = 0, failures = 0;

  pi0 dut (.a(a), .b(b), .s_in(s_in), .c_in(c_in), .s_out(s_out), .c_out(c_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, s_in, c_in} = 4'(v);
      #1;
      checks++;
      if ({c_out, s_out} != 2'(int'(a && b) + int'(s_in) + int'(c_in))) begin
        failures++;
        $display("FAIL a=%b b=%b s_in=%b c_in=%b -> c=%b s=%b", a, b, s_in, c_in, c_out, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
