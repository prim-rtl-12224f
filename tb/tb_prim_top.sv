// tb_prim_top: end-to-end test of prim_top at its default parameters.
//
// Part 1: the thirteen PRIM8 outputs are checked against the reference model
// for all corner operands and 20,000 random pairs. It counts how often each
// mechanism shows: Group A's carry disregard changing a product (every
// configuration), the OR-approximated adder changing a product (the six
// R(16-x) configurations, compared with the R12 one of the same x), and exact
// results. Each must occur at least once.
// Part 2: windows of random pixels stream into the Gaussian filter with idle
// cycles and one reset; every result is checked one cycle after its window.
module tb_prim_top;
  import prim_pkg::*;
  import prim_ref_pkg::*;

  logic [7:0]                a, b;
  logic [NUM_CFG-1:0][15:0]  p;
  logic                      clk = 1'b0;
  logic                      rst_n;
  logic                      in_valid;
  logic [8:0][7:0]           win;
  logic                      out_valid;
  logic [7:0]                pix_out;
  int checks = 0, failures = 0;

  prim_top dut (
    .a(a), .b(b), .p(p), .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win(win),
    .out_valid(out_valid), .pix_out(pix_out)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int disregard_hits [NUM_CFG];
  int or_adder_hits  [NUM_CFG];
  int exact_hits     [NUM_CFG];

  task automatic check_pair(int av, int bv);
    a = 8'(av);
    b = 8'(bv);
    #1;
    for (int n = 0; n < NUM_CFG; n++) begin
      prim_cfg_t c;
      int unsigned exp_p, r12;
      c = cfg(n);
      exp_p = ref_prim8(av, bv, 32'(c.x), c.approx_r);
      r12   = ref_prim8(av, bv, 32'(c.x), 1'b0);
      checks++;
      if (32'(p[n]) != exp_p) begin
        failures++;
        if (failures < 20)
          $display("FAIL cfg %0d a=%0d b=%0d got %0d exp %0d", n, av, bv, p[n], exp_p);
      end
      if (r12 != 32'(av * bv)) disregard_hits[n]++;
      if (c.approx_r && exp_p != r12) or_adder_hits[n]++;
      if (32'(p[n]) == 32'(av * bv)) exact_hits[n]++;
    end
  endtask

  function automatic int ref_filter(logic [8:0][7:0] w);
    int s = 0;
    for (int n = 0; n < 9; n++) s += int'(ref_prim8(32'(w[n]), 32'(gk(n)), 10, 1'b1));
    return (s + 511) / 1023;
  endfunction

  initial begin : main
    int windows, idles, resets;
    int expect_pix;
    for (int n = 0; n < NUM_CFG; n++) begin
      disregard_hits[n] = 0; or_adder_hits[n] = 0; exact_hits[n] = 0;
    end
    windows = 0; idles = 0; resets = 0;
    rst_n = 1'b0; in_valid = 1'b0; win = '0;

    // ---- part 1: the multiplier family ----
    for (int av = 0; av < 256; av += 255)
      for (int bv = 0; bv < 256; bv++) check_pair(av, bv);
    for (int i = 0; i < 20000; i++) check_pair(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    for (int n = 0; n < NUM_CFG; n++) begin
      prim_cfg_t c;
      c = cfg(n);
      $display("PRIM8 x=%0d approx_adder=%0d: carry disregard changed %0d, OR adder changed %0d, exact %0d",
               c.x, c.approx_r, disregard_hits[n], or_adder_hits[n], exact_hits[n]);
      checks += 2;
      if (disregard_hits[n] == 0) begin failures++; $display("FAIL no carry-disregard error seen"); end
      if (exact_hits[n] == 0)     begin failures++; $display("FAIL no exact product seen"); end
      if (c.approx_r) begin
        checks++;
        if (or_adder_hits[n] == 0) begin failures++; $display("FAIL OR adder never mattered"); end
      end
    end

    // ---- part 2: the Gaussian filter ----
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int kind;
      kind = int'($urandom_range(0, 19));
      @(negedge clk);
      if (kind == 0) begin
        in_valid = 1'b0;
        idles++;
      end else if (kind == 1 && i > 100) begin
        in_valid = 1'b1;
        rst_n = 1'b0;
        resets++;
      end else begin
        in_valid = 1'b1;
        for (int k = 0; k < 9; k++) win[k] = 8'($urandom);
        expect_pix = ref_filter(win);
        windows++;
      end
      @(posedge clk); #1;
      checks++;
      if (kind == 0 || (kind == 1 && i > 100)) begin
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid high after idle or reset");
        end
      end else if (!out_valid || int'(pix_out) != expect_pix) begin
        failures++;
        if (failures < 20)
          $display("FAIL filter valid=%b got %0d exp %0d", out_valid, pix_out, expect_pix);
      end
      rst_n = 1'b1;
    end
    $display("filter: %0d windows, %0d idle cycles, %0d resets", windows, idles, resets);
    checks += 3;
    if (windows == 0) failures++;
    if (idles == 0)   failures++;
    if (resets == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
