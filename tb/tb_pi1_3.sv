// tb_pi1_3: exhaustive self-checking test of the OR-based unit Pi1_3.
// Every combination of pp_in, a and b; the expected output is 1 exactly when
// at least one of the 4 partial products (pp_in and a[n]*b[n]) is 1.
module tb_pi1_3;
  localparam int K = 3;
  logic         pp_in, s_out;
  logic [K-1:0] a, b;
  int checks = 0, failures = 0;

  pi1_3 dut (.pp_in(pp_in), .a(a), .b(b), .s_out(s_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * K + 1)); v++) begin
      int ones;
      {pp_in, a, b} = (2 * K + 1)'(v);
      #1;
      ones = int'(pp_in);
      for (int n = 0; n < K; n++) ones += int'(a[n] && b[n]);
      checks++;
      if (s_out !== (ones > 0)) begin
        failures++;
        $display("FAIL pp_in=%b a=%b b=%b -> %b", pp_in, a, b, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
