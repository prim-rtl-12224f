// tb_prim_rca: self-checking test of the 12-bit ripple-carry adder for every
// OR-part width used by the PRIM8 family (0 = exact, 1..6 = x-4 for x = 5..10).
// Exhaustive over the low 6 bits of both addends combined with random upper
// bits, plus edge cases; sum and carry out are compared with a reference.
module tb_prim_rca;
  import prim_ref_pkg::*;
  logic [11:0] x, y;
  logic [11:0] s [0:6];
  logic        co [0:6];
  int checks = 0, failures = 0;

  for (genvar k = 0; k <= 6; k++) begin : g_dut
    prim_rca #(.W(12), .OR_BITS(k)) dut (.x(x), .y(y), .s(s[k]), .cout(co[k]));
  end

  task automatic check_all();
    #1;
    for (int k = 0; k <= 6; k++) begin
      int unsigned m = (1 << k) - 1;
      int unsigned full = ((int'(x) | int'(y)) & m) + (((int'(x) >> k) + (int'(y) >> k)) << k);
      checks++;
      if ({co[k], s[k]} != 13'(full) || 32'(s[k]) != ref_add12(32'(x), 32'(y), k)) begin
        failures++;
        if (failures < 20)
          $display("FAIL OR_BITS=%0d x=%h y=%h got %b_%h exp %h", k, x, y, co[k], s[k], full);
      end
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lo = 0; lo < 4096; lo++) begin
      x = {6'($urandom), 6'(lo)};
      y = {6'($urandom), 6'(lo >> 6)};
      check_all();
    end
    x = 12'hFFF; y = 12'h001; check_all();
    x = 12'hFFF; y = 12'hFFF; check_all();
    x = 12'h000; y = 12'h000; check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
