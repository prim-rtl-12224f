// prim_ref_pkg: bit-level reference model of the PRIM8 family for testbenches.
// It works on the definition, not on the circuit: in an 8x4 multiplier G_x the
// partial products of weight w < x are ORed into bit w, those of weight >= x
// are summed exactly. A PRIM8 adds Group A (G_x on b[3:0]) shifted down by four
// to Group B (G_1 on b[7:4]), ORing the adder's bits 0..or_bits-1 with no carry.
package prim_ref_pkg;

  function automatic int unsigned ref_mul8x4(int unsigned a, int unsigned b4, int unsigned x);
    int unsigned r = 0;
    for (int w = 0; w <= 10; w++) begin
      int unsigned cnt = 0;
      for (int i = 0; i < 8; i++) begin
        if (w - i >= 0 && w - i < 4) cnt += ((a >> i) & 1) & ((b4 >> (w - i)) & 1);
      end
      if (w < int'(x)) r |= ((cnt != 0) ? 1 : 0) << w;
      else             r += cnt << w;
    end
    return r;
  endfunction

  function automatic int unsigned ref_add12(int unsigned x, int unsigned y, int unsigned or_bits);
    int unsigned m = (1 << or_bits) - 1;
    return (((x | y) & m) + (((x >> or_bits) + (y >> or_bits)) << or_bits)) & 32'hFFF;
  endfunction

  function automatic int unsigned ref_prim8(int unsigned a, int unsigned b, int unsigned x,
                                            bit approx_adder);
    int unsigned pa = ref_mul8x4(a, b & 15, x);
    int unsigned pb = ref_mul8x4(a, b >> 4, 1);
    int unsigned ob = (approx_adder && x > 4) ? x - 4 : 0;
    return (ref_add12(pa >> 4, pb, ob) << 4) | (pa & 15);
  endfunction

endpackage
