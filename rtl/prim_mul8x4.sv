// prim_mul8x4: configurable 8x4 unsigned array multiplier G_x.
//
// p = a * b is formed as a four-row array (rows j = 0..3, one per bit of b).
// Row 0 is AND gates; each later row adds its partial products a[i] & b[j] to
// the running sum, its carries rippling along the row. Column c of the array
// holds the partial products of weight c-1.
//
// Carry disregard: in columns 1..X (weights 0..X-1) no carries are produced or
// consumed. Each such column is one OR-based unit (Pi1_1, Pi1_2 or the 4:1
// compressor Pi1_3) whose output is the OR of the column's partial products.
// Above that region the array is exact, but the first cells lack a carry input:
// rows 1 and 2 of column X+1 become one Pi3 (three PPs, one carry), row 3 of that
// column a Pi2, and the row-1 cell of column X+2 a Pi2 too; a cell with neither
// sum nor carry input is a bare AND. prim_pkg::cell_kinds() does this placement.
// X = 1 is the exact multiplier; X = 10 (G_a) is made of OR units only.
//
// With X = 10 no carry survives anywhere, so p[11] is constant 0; with X < 10
// it is the array's final carry.
// Purely combinational. Result: for weights w < X, p[w] = OR of the column;
// above, the exact sum of the remaining columns with their carries.
// The column-level description (which units sit in which column) follows the
// published design; the exact cell positions are this implementation's
// reconstruction, and reproduce its published error statistics.
module prim_mul8x4 #(
  parameter int unsigned X = 10  // last carry-disregard column, 1..10
) (
  input  logic [7:0]  a,
  input  logic [3:0]  b,
  output logic [11:0] p
);
  import prim_pkg::*;

  localparam kind_map_t KM = cell_kinds(int'(X));

  if (X < 1 || X > 10) begin : g_bad_x
    $error("prim_mul8x4: X must be within 1..10");
  end

  logic [7:0] row0;                 // row 0 partial products a[i] & b[0]
  logic [7:0] sum [1:3];            // sum output of cell (i, j)
  logic [7:0] cy  [1:3];            // carry output of cell (i, j)
  logic [9:0]  col;                 // OR-unit outputs of the disregard region

  assign row0 = a & {8{b[0]}};

  // ---------------- rows 1..3 of the array ----------------
  for (genvar j = 1; j <= 3; j++) begin : g_row
    for (genvar i = 0; i <= 7; i++) begin : g_cell
      localparam cell_kind_e K = KM[j][i];
      // sum from the row above (row j-1 at the same weight, or its carry out)
      // and carry from the cell to the right; used by Pi0 and Pi2 cells only
      logic s_in, c_in;
      if (K == K_FA || K == K_HA) begin : g_in
        if (j == 1) begin : g_s1
          assign s_in = (i <= 6) ? row0[(i <= 6) ? i + 1 : 0] : 1'b0;
        end else begin : g_sn
          assign s_in = (i <= 6) ? sum[j-1][(i <= 6) ? i + 1 : 0] : cy[j-1][7];
        end
        if (i >= 1) begin : g_c
          assign c_in = cy[j][(i >= 1) ? i - 1 : 0];
        end else begin : g_c0
          assign c_in = 1'b0;
        end
      end else begin : g_no_in
        assign s_in = 1'b0;
        assign c_in = 1'b0;
      end

      if (K == K_FA) begin : g_pi0
        pi0 u_cell (.a(a[i]), .b(b[j]), .s_in(s_in), .c_in(c_in),
                    .s_out(sum[j][i]), .c_out(cy[j][i]));
      end else if (K == K_HA) begin : g_pi2
        // c_in is 0 here by construction
        pi2 u_cell (.a(a[i]), .b(b[j]), .s_in(s_in),
                    .s_out(sum[j][i]), .c_out(cy[j][i]));
      end else if (K == K_AND) begin : g_and
        assign sum[j][i] = a[i] & b[j];
        assign cy[j][i]  = 1'b0;
      end else if (K == K_PI3_2) begin : g_pi3
        // rows 1 and 2 of column X+1; the row-0 PP of weight X is row0[X]
        logic pp_top;
        if (X <= 7) begin : g_top
          assign pp_top = row0[(X <= 7) ? X : 0];
        end else begin : g_notop
          assign pp_top = 1'b0;
        end
        pi3 u_cell (.pp_in(pp_top), .a({a[i], a[i+1]}), .b({b[2], b[1]}),
                    .s_out(sum[j][i]), .c_out(cy[j][i]));
      end else begin : g_none
        // K_OR or K_PI3_1: the work is done by a column unit or by the Pi3
        assign sum[j][i] = 1'b0;
        assign cy[j][i]  = 1'b0;
      end
    end
  end

  // ---------------- OR-based columns 1..X ----------------
  for (genvar w = 0; w <= 9; w++) begin : g_col
    if (w < X) begin : g_dis
      localparam int JLO = (w > 7) ? w - 7 : 0;
      localparam int JHI = (w < 3) ? w : 3;
      localparam int N   = JHI - JLO;  // partial products besides the top one
      logic pp_top;
      assign pp_top = a[w-JLO] & b[JLO];
      if (N == 0) begin : g_and
        assign col[w] = pp_top;
      end else begin : g_or
        logic [N-1:0] ca, cb;
        for (genvar n = 0; n < N; n++) begin : g_pp
          assign ca[n] = a[w-JLO-1-n];
          assign cb[n] = b[JLO+1+n];
        end
        if (N == 1) begin : g_u1
          pi1_1 u_or (.pp_in(pp_top), .a(ca), .b(cb), .s_out(col[w]));
        end else if (N == 2) begin : g_u2
          pi1_2 u_or (.pp_in(pp_top), .a(ca), .b(cb), .s_out(col[w]));
        end else begin : g_u3
          pi1_3 u_or (.pp_in(pp_top), .a(ca), .b(cb), .s_out(col[w]));
        end
      end
    end else begin : g_ex
      assign col[w] = 1'b0;
    end
  end

  // ---------------- product bits ----------------
  for (genvar w = 0; w <= 11; w++) begin : g_p
    if (w < X) begin : g_from_col
      assign p[w] = col[(w <= 9) ? w : 0];
    end else if (w == 1) begin : g_r1
      assign p[w] = sum[1][0];
    end else if (w == 2) begin : g_r2
      assign p[w] = sum[2][0];
    end else if (w <= 10) begin : g_r3
      assign p[w] = sum[3][(w >= 3 && w <= 10) ? w - 3 : 0];
    end else begin : g_cout
      assign p[w] = cy[3][7];
    end
  end
endmodule
