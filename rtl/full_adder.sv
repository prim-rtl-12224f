// full_adder: one-bit full adder, s = a ^ b ^ ci, co = majority(a, b, ci).
// Combinational helper used by the exact partial product unit (Pi0), the
// three-PP unit (Pi3) and the ripple-carry adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
