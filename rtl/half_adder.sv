// half_adder: one-bit half adder, s = a ^ b, co = a & b.
// Combinational helper used by the carry-less partial product unit Pi2.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
