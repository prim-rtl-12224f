// pi1_3: OR-based carry-disregard partial product unit (Pi1_3).
// Four partial products: three AND gates, three OR gates. This is the approximate 4:1
// compressor: an even, non-zero count of ones gives 1 where an exact sum bit would
// give 0, which offsets the value lost by dropping the carries.
// The unit sums one column of a carry-disregard region: the top partial product
// of the column arrives as pp_in (from a separate AND gate) and the other 3 are
// formed here from a[n] & b[n]. Their OR is the column's output bit; no carry
// enters or leaves. Purely combinational. Taking the top PP as an input is this
// implementation's reading of the gate counts.
module pi1_3 (
  input  logic         pp_in,
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic         s_out
);
  assign s_out = pp_in | (|(a & b));
endmodule
