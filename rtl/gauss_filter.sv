// gauss_filter: 3x3 low-pass Gaussian filter built on PRIM8 multipliers.
//
// Each clock with in_valid high, the nine pixels of a 3x3 window (row-major,
// win[4] the centre) are multiplied by the kernel
//     97 121  97
//    121 151 121   / 1023
//     97 121  97
// using nine prim8 multipliers (pixel as first operand, coefficient as second),
// summed, and divided by 1023 with rounding to nearest. The division is a
// multiply by 262401 and a shift right by 28, which equals round(sum / 1023)
// for every sum up to 255 * 1023; the result is saturated to 255.
// Timing: pix_out and out_valid are registered, one cycle after the window.
// rst_n (active low, synchronous) clears out_valid. The kernel follows the
// published case study; the window interface, rounding and one-cycle timing are
// this implementation's choices.
module gauss_filter #(
  parameter int unsigned X            = 10,
  parameter bit          APPROX_ADDER = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [8:0][7:0] win,
  output logic            out_valid,
  output logic [7:0]      pix_out
);
  import prim_pkg::*;

  localparam logic [18:0] RECIP = 19'd262401;  // ceil(2^28 / 1023)
  localparam int          SHIFT = 28;

  logic [8:0][15:0] prod;
  logic [19:0]      acc;
  logic [38:0]      scaled;
  logic [10:0]      quot;
  logic [7:0]       pix_next;

  for (genvar n = 0; n < 9; n++) begin : g_mul
    prim8 #(.X(X), .APPROX_ADDER(APPROX_ADDER)) u_mul (
      .a(win[n]), .b(gk(n)), .p(prod[n])
    );
  end

  always_comb begin
    acc = '0;
    for (int n = 0; n < 9; n++) acc += 20'(prod[n]);
    scaled   = (39'(acc) + 39'd511) * 39'(RECIP);
    quot     = 11'(scaled >> SHIFT);
    pix_next = (quot > 11'd255) ? 8'd255 : quot[7:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pix_out   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pix_out <= pix_next;
    end
  end
endmodule
