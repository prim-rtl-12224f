// tb_pi3: exhaustive self-checking test of the three-PP unit Pi3.
// Expected {c_out, s_out} = pp_in + a[0]*b[0] + a[1]*b[1] for all 32 inputs.
module tb_pi3;
  logic       pp_in, s_out, c_out;
  logic [1:0] a, b;
  int checks = 0, failures = 0;

  pi3 dut (.pp_in(pp_in), .a(a), .b(b), .s_out(s_out), .c_out(c_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {pp_in, a, b} = 5'(v);
      #1;
      checks++;
      if ({c_out, s_out} != 2'(int'(pp_in) + int'(a[0] && b[0]) + int'(a[1] && b[1]))) begin
        failures++;
        $display("FAIL pp_in=%b a=%b b=%b -> c=%b s=%b", pp_in, a, b, c_out, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
