// prim_top: the PRIM8 approximate multiplier family and its filter application.
//
// Part 1 applies one operand pair (a, b) to all thirteen PRIM8 configurations
// at once: p[0..6] are PRIM8_41R12 .. PRIM8_a1R12 (exact 12-bit adder), p[7..12]
// are PRIM8_51R11 .. PRIM8_a1R6 (OR-approximated adder). Combinational.
// Part 2 is the 3x3 Gaussian filter built from the PRIM8 configuration selected
// by FILTER_X / FILTER_APPROX_ADDER (default PRIM8_a1R6); one window per clock,
// result one cycle later. Bringing all thirteen multipliers out side by side is
// this implementation's choice; the published work evaluates them as a family.
module prim_top #(
  parameter int unsigned FILTER_X            = 10,
  parameter bit          FILTER_APPROX_ADDER = 1'b1
) (
  input  logic [7:0]                         a,
  input  logic [7:0]                         b,
  output logic [prim_pkg::NUM_CFG-1:0][15:0] p,
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [8:0][7:0]                    win,
  output logic                               out_valid,
  output logic [7:0]                         pix_out
);
  import prim_pkg::*;

  for (genvar n = 0; n < NUM_CFG; n++) begin : g_cfg
    localparam prim_cfg_t C = cfg(n);
    prim8 #(.X(int'(C.x)), .APPROX_ADDER(C.approx_r)) u_prim8 (.a(a), .b(b), .p(p[n]));
  end

  gauss_filter #(.X(FILTER_X), .APPROX_ADDER(FILTER_APPROX_ADDER)) u_filter (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .win(win),
    .out_valid(out_valid), .pix_out(pix_out)
  );
endmodule
