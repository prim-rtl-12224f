// tb_gauss_filter: self-checking test of the 3x3 Gaussian filter, run on a
// generated noisy image with the exact multiplier and all thirteen PRIM8
// configurations side by side.
//
// The image (IMG x IMG pixels) is a smooth gradient with a bright square plus
// pseudo-random noise; windows at the border repeat the edge pixels. One window
// is offered per clock, with some idle cycles and a reset in between. Each
// filter's output is compared with a reference built from the multiplier model
// and round(sum / 1023), its latency must be exactly one cycle, and for each
// configuration the maximum error distance and the PSNR against the exact
// filter are reported, as in the published filter study.
module tb_gauss_filter;
  import prim_pkg::*;
  import prim_ref_pkg::*;
  localparam int IMG = 32;
  localparam int NC  = 14;
  localparam int          CX [NC] = '{1, 4, 5, 6, 7, 8, 9, 10, 5, 6, 7, 8, 9, 10};
  localparam bit          CR [NC] = '{0, 0, 0, 0, 0, 0, 0, 0,  1, 1, 1, 1, 1, 1};

  logic            clk = 1'b0;
  logic            rst_n;
  logic            in_valid;
  logic [8:0][7:0] win;
  logic            out_valid [NC];
  logic [7:0]      pix_out [NC];
  int checks = 0, failures = 0;

  byte unsigned img [IMG][IMG];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    gauss_filter #(.X(CX[c]), .APPROX_ADDER(CR[c])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win(win),
      .out_valid(out_valid[c]), .pix_out(pix_out[c])
    );
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_filter(logic [8:0][7:0] w, int c);
    int s = 0;
    for (int n = 0; n < 9; n++) s += int'(ref_prim8(32'(w[n]), 32'(gk(n)), CX[c], CR[c]));
    return (s + 511) / 1023;
  endfunction

  function automatic byte unsigned px(int r, int q);
    if (r < 0) r = 0;
    if (r >= IMG) r = IMG - 1;
    if (q < 0) q = 0;
    if (q >= IMG) q = IMG - 1;
    return img[r][q];
  endfunction

  initial begin : main
    int max_ed [NC];
    real se [NC];
    int n_out;
    int expect_pix [NC];
    n_out = 0;
    for (int c = 0; c < NC; c++) begin max_ed[c] = 0; se[c] = 0.0; end
    for (int r = 0; r < IMG; r++)
      for (int q = 0; q < IMG; q++) begin
        int v;
        v = 40 + 4 * r + 2 * q + ((r > 8 && r < 22 && q > 10 && q < 24) ? 90 : 0);
        v += int'($urandom_range(0, 60)) - 30;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        img[r][q] = 8'(v);
      end

    rst_n = 1'b0; in_valid = 1'b0; win = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < IMG; r++) begin
      for (int q = 0; q < IMG; q++) begin
        // offer one window; occasionally leave an idle cycle first
        if ($urandom_range(0, 7) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          @(posedge clk); #1;
          checks++;
          if (out_valid[0] !== 1'b0) begin
            failures++;
            $display("FAIL out_valid high one cycle after an idle input");
          end
        end
        @(negedge clk);
        in_valid = 1'b1;
        for (int dr = -1; dr <= 1; dr++)
          for (int dq = -1; dq <= 1; dq++)
            win[(dr + 1) * 3 + (dq + 1)] = px(r + dr, q + dq);
        for (int c = 0; c < NC; c++) expect_pix[c] = ref_filter(win, c);
        @(posedge clk); #1;
        n_out++;
        for (int c = 0; c < NC; c++) begin
          int ed;
          checks++;
          if (!out_valid[c] || int'(pix_out[c]) != expect_pix[c]) begin
            failures++;
            if (failures < 20)
              $display("FAIL cfg %0d pixel (%0d,%0d) valid=%b got %0d exp %0d", c, r, q,
                       out_valid[c], pix_out[c], expect_pix[c]);
          end
          ed = int'(pix_out[c]) - int'(pix_out[0]);
          if (ed < 0) ed = -ed;
          if (ed > max_ed[c]) max_ed[c] = ed;
          se[c] += real'(ed * ed);
        end
      end
    end
    // idle input: out_valid must drop one cycle later
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid[0] !== 1'b0) begin failures++; $display("FAIL out_valid stuck high"); end
    // reset while a window is offered: out_valid stays low
    @(negedge clk);
    in_valid = 1'b1; rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid[0] !== 1'b0) begin failures++; $display("FAIL out_valid during reset"); end
    rst_n = 1'b1; in_valid = 1'b0;

    // the exact filter must not differ from itself; approximate ones stay close
    for (int c = 1; c < NC; c++) begin
      real psnr;
      psnr = (se[c] == 0.0) ? 999.0 :
             10.0 * $log10(255.0 * 255.0 / (se[c] / real'(IMG * IMG)));
      $display("filter X=%0d approx_adder=%0d: max ED vs exact %0d, PSNR vs exact %.2f dB",
               CX[c], CR[c], max_ed[c], psnr);
      checks++;
      if (max_ed[c] > 16) begin failures++; $display("FAIL max ED too large"); end
    end
    checks++;
    if (n_out != IMG * IMG) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
