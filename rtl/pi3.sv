// pi3: carry-less three-PP unit (Pi3), replacing the row-1 and row-2 cells of
// the first column after a carry-disregard region.
// Two AND gates form a[0]&b[0] (row 1) and a[1]&b[1] (row 2); one full adder
// sums them with pp_in, the row-0 partial product of the same column. The sum
// is the column's running sum after row 2; the single carry (weight +1) goes to
// the row-2 cell of the next column. Purely combinational. The split into two
// ANDs plus one full adder is this implementation's reading of the unit.
module pi3 (
  input  logic       pp_in,
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic       s_out,
  output logic       c_out
);
  logic [1:0] pp;
  assign pp = a & b;
  full_adder u_fa (.a(pp_in), .b(pp[0]), .ci(pp[1]), .s(s_out), .co(c_out));
endmodule
