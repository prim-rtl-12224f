// tb_prim_mul8x4: exhaustive self-checking test of the 8x4 multipliers G_1..G_a.
// Ten instances (X = 1..10) see every a (0..255) and b (0..15); each output is
// compared with the column-OR / exact-sum reference model. G_1 must equal a*b.
// It also checks that carry disregard happens: each approximate configuration
// must differ from the exact product for some input.
module tb_prim_mul8x4;
  import prim_ref_pkg::*;
  logic [7:0]  a;
  logic [3:0]  b;
  logic [11:0] p [1:10];
  int checks = 0, failures = 0;
  int approx_hits [1:10];

  for (genvar x = 1; x <= 10; x++) begin : g_dut
    prim_mul8x4 #(.X(x)) dut (.a(a), .b(b), .p(p[x]));
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 1; x <= 10; x++) approx_hits[x] = 0;
    for (int av = 0; av < 256; av++) begin
      for (int bv = 0; bv < 16; bv++) begin
        a = 8'(av);
        b = 4'(bv);
        #1;
        for (int x = 1; x <= 10; x++) begin
          int unsigned exp_p;
          exp_p = ref_mul8x4(av, bv, x);
          checks++;
          if (32'(p[x]) != exp_p) begin
            failures++;
            if (failures < 20)
              $display("FAIL G_%0d a=%0d b=%0d got %0d exp %0d", x, av, bv, p[x], exp_p);
          end
          if (32'(p[x]) != 32'(av * bv)) approx_hits[x]++;
        end
      end
    end
    checks++;
    if (approx_hits[1] != 0) begin
      failures++;
      $display("FAIL G_1 is not exact");
    end
    for (int x = 2; x <= 10; x++) begin
      checks++;
      if (approx_hits[x] == 0) begin
        failures++;
        $display("FAIL G_%0d never approximates", x);
      end
      $display("G_%0d: %0d of 4096 products differ from a*b", x, approx_hits[x]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
