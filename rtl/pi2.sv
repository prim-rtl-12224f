// pi2: carry-less partial product unit (Pi2).
// Used right after a carry-disregard region, where a cell receives no carry:
// an AND gate forms a & b and a half adder adds it to the sum from the row above.
// The carry goes on to the next cell of the row. Purely combinational.
module pi2 (
  input  logic a,
  input  logic b,
  input  logic s_in,
  output logic s_out,
  output logic c_out
);
  logic pp;
  assign pp = a & b;
  half_adder u_ha (.a(s_in), .b(pp), .s(s_out), .co(c_out));
endmodule
