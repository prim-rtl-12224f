// pi1_1: OR-based carry-disregard partial product unit (Pi1_1).
// Two partial products: one AND gate, one OR gate.
// The unit sums one column of a carry-disregard region: the top partial product
// of the column arrives as pp_in (from a separate AND gate) and the other 1 are
// formed here from a[n] & b[n]. Their OR is the column's output bit; no carry
// enters or leaves. Purely combinational. Taking the top PP as an input is this
// implementation's reading of the gate counts.
module pi1_1 (
  input  logic         pp_in,
  input  logic [0:0] a,
  input  logic [0:0] b,
  output logic         s_out
);
  assign s_out = pp_in | (|(a & b));
endmodule
