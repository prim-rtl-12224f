// pi0: exact partial product unit of the array multiplier.
// An AND gate forms the partial product a & b and a full adder adds it to the
// sum arriving from the row above (s_in) and the carry from the neighbouring
// cell of the same row (c_in). Purely combinational. The AND + FA structure is
// the classic array cell; tying s_in to 0 where no sum arrives is a choice of
// this implementation.
module pi0 (
  input  logic a,
  input  logic b,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out
);
  logic pp;
  assign pp = a & b;
  full_adder u_fa (.a(s_in), .b(pp), .ci(c_in), .s(s_out), .co(c_out));
endmodule
