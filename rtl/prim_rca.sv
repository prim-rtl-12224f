// prim_rca: ripple-carry adder with an optional OR-approximated low part.
//
// Bits 0..OR_BITS-1 are s[k] = x[k] | y[k] with no carry; bits OR_BITS..W-1
// form an exact ripple-carry adder (a chain of full adders) whose carry in is 0.
// OR_BITS = 0 gives the exact W-bit RCA (class PRIM8_x1R12); OR_BITS = x-4
// gives the (16-x)-bit exact RCA of class PRIM8_x1R(16-x). Purely combinational;
// the carry out of the top bit appears on cout.
module prim_rca #(
  parameter int unsigned W       = 12,
  parameter int unsigned OR_BITS = 0
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s,
  output logic         cout
);
  if (OR_BITS > W) begin : g_bad
    $error("prim_rca: OR_BITS must not exceed W");
  end

  logic [W:0] c;  // c[k] is the carry into bit k
  assign c[0] = 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_bit
    if (k < OR_BITS) begin : g_or
      assign s[k]   = x[k] | y[k];
      assign c[k+1] = 1'b0;
    end else begin : g_fa
      full_adder u_fa (.a(x[k]), .b(y[k]), .ci(c[k]), .s(s[k]), .co(c[k+1]));
    end
  end
  assign cout = c[W];
endmodule
