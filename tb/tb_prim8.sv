// tb_prim8: exhaustive test of all thirteen PRIM8 configurations and the exact
// multiplier over all 65,536 operand pairs.
// Every product is compared bit for bit with the reference model. The error
// statistics over the whole input space (mean error distance MED, mean relative
// error distance MRED, probability of correctness PC, number of effective bits
// NoEB) are then compared with the published figures for each configuration,
// to the precision they were printed with.
module tb_prim8;
  import prim_ref_pkg::*;
  localparam int NC = 14;  // 0: exact, 1..13: PRIM8 configurations
  localparam int          CX [NC] = '{1, 4, 5, 6, 7, 8, 9, 10, 5, 6, 7, 8, 9, 10};
  localparam bit          CR [NC] = '{0, 0, 0, 0, 0, 0, 0, 0,  1, 1, 1, 1, 1, 1};
  // published MED, MRED, PC(%), NoEB per configuration
  localparam real MED  [NC] = '{0.0, 3.3, 8.4, 18.5, 38.7, 79.2, 123.2, 155.2,
                                11.1, 29.4, 68.8, 150.3, 263.7, 400.7};
  localparam real MRED [NC] = '{0.0, 0.0010, 0.0022, 0.0041, 0.0071, 0.0115, 0.0153, 0.0173,
                                0.0028, 0.0062, 0.0120, 0.0210, 0.0311, 0.0407};
  localparam real PC   [NC] = '{100.0, 68.3, 59.6, 53.3, 48.7, 44.9, 43.4, 42.9,
                                53.6, 41.1, 31.5, 24.3, 21.1, 19.8};
  localparam real NOEB [NC] = '{16.0, 13.03, 11.91, 10.86, 9.83, 8.82, 8.12, 7.67,
                                11.64, 10.42, 9.30, 8.23, 7.39, 6.74};

  logic [7:0]  a, b;
  logic [15:0] p [NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    prim8 #(.X(CX[c]), .APPROX_ADDER(CR[c])) dut (.a(a), .b(b), .p(p[c]));
  end

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real v, real ref_v, real tol);
    return (v - ref_v <= tol) && (ref_v - v <= tol);
  endfunction

  initial begin : main
    longint unsigned sum_ed [NC];
    real             sum_red [NC];
    real             sum_se [NC];
    int              correct [NC];
    int              mism;
    mism = 0;
    for (int c = 0; c < NC; c++) begin
      sum_ed[c] = 0; sum_red[c] = 0.0; sum_se[c] = 0.0; correct[c] = 0;
    end
    for (int av = 0; av < 256; av++) begin
      for (int bv = 0; bv < 256; bv++) begin
        a = 8'(av);
        b = 8'(bv);
        #1;
        for (int c = 0; c < NC; c++) begin
          int ed;
          if (32'(p[c]) != ref_prim8(av, bv, CX[c], CR[c])) begin
            mism++;
            if (mism < 20)
              $display("FAIL cfg %0d a=%0d b=%0d got %0d exp %0d", c, av, bv, p[c],
                       ref_prim8(av, bv, CX[c], CR[c]));
          end
          ed = av * bv - int'(p[c]);
          if (ed < 0) ed = -ed;
          sum_ed[c] += longint'(ed);
          sum_se[c] += real'(ed) * real'(ed);
          if (av * bv != 0) sum_red[c] += real'(ed) / real'(av * bv);
          if (ed == 0) correct[c]++;
        end
      end
    end
    checks++;
    if (mism != 0) failures++;
    for (int c = 0; c < NC; c++) begin
      real med, mred, pc, noeb;
      med  = real'(sum_ed[c]) / 65536.0;
      mred = sum_red[c] / 65536.0;
      pc   = 100.0 * real'(correct[c]) / 65536.0;
      noeb = 16.0 - $ln(1.0 + $sqrt(sum_se[c] / 65536.0)) / $ln(2.0);
      $display("cfg X=%0d approx_adder=%0d: MED %.2f MRED %.5f NMED %.5f PC %.2f%% NoEB %.2f",
               CX[c], CR[c], med, mred, med / 65025.0, pc, noeb);
      checks += 4;
      if (!near(med, MED[c], 0.15))    begin failures++; $display("FAIL MED");  end
      if (!near(mred, MRED[c], 0.0004)) begin failures++; $display("FAIL MRED"); end
      if (!near(pc, PC[c], 0.15))      begin failures++; $display("FAIL PC");   end
      if (!near(noeb, NOEB[c], 0.02))  begin failures++; $display("FAIL NoEB"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
