// prim_pkg: shared types and constants of the PRIM8 approximate multiplier family.
//
// The 8x4 array multiplier G_x (prim_mul8x4) is placed by a constant function,
// cell_kinds(), that decides for every cell of rows 1..3 which partial product
// unit it is. Column c of the 8x4 array holds partial products of weight c-1;
// "carry disregard up to column x" means weights 0..x-1 are ORed and produce no
// carry. The table of the 13 PRIM8 configurations and the Gaussian kernel of the
// filter case study are also kept here. Nothing here is clocked.
package prim_pkg;

  // Kind of one cell (row j >= 1, multiplicand index i) of the 8x4 array.
  typedef enum logic [2:0] {
    K_OR    = 3'd0,  // weight < x: absorbed by the column's OR unit (Pi1_k)
    K_AND   = 3'd1,  // no sum in, no carry in: a bare AND gate
    K_HA    = 3'd2,  // sum in, no carry in: Pi2 (AND + half adder)
    K_FA    = 3'd3,  // carry in (sum in or 0): Pi0 (AND + full adder)
    K_PI3_1 = 3'd4,  // row-1 half of a Pi3 (produces nothing itself)
    K_PI3_2 = 3'd5   // row-2 half of a Pi3 (holds the Pi3 instance)
  } cell_kind_e;

  typedef cell_kind_e [3:1][7:0] kind_map_t;

  // True when the 8x4 multiplier G_x merges rows 1 and 2 of column x+1 into a Pi3.
  function automatic bit has_pi3(int x);
    return (x >= 2) && (x <= 8);
  endfunction

  // Cell placement of G_x. Row 0 is plain AND gates. A cell of row j at weight
  // w = i + j takes its sum from row j-1 at the same weight (the last cell takes
  // row j-1's carry out) and its carry from the cell to its right in row j.
  function automatic kind_map_t cell_kinds(int x);
    kind_map_t k;
    bit s_av, c_av;
    for (int j = 1; j <= 3; j++) begin
      for (int i = 0; i <= 7; i++) begin
        if (i + j < x) begin
          k[j][i] = K_OR;
        end else if (has_pi3(x) && (i + j == x) && (j <= 2)) begin
          k[j][i] = (j == 1) ? K_PI3_1 : K_PI3_2;
        end else begin
          if (j == 1)
            s_av = (i + 1 <= 7) && (i + 1 >= x);
          else if (i <= 6)
            s_av = (k[j-1][i+1] != K_OR) && (k[j-1][i+1] != K_PI3_1);
          else
            s_av = (k[j-1][7] == K_HA) || (k[j-1][7] == K_FA);
          c_av = (i >= 1) && ((k[j][i-1] == K_HA) || (k[j][i-1] == K_FA) ||
                              (k[j][i-1] == K_PI3_2));
          k[j][i] = c_av ? K_FA : (s_av ? K_HA : K_AND);
        end
      end
    end
    return k;
  endfunction

  // The 13 PRIM8 configurations of the family, in table order:
  // PRIM8_x1R12 for x = 4..10, then PRIM8_x1R(16-x) for x = 5..10.
  localparam int NUM_CFG = 13;
  typedef struct packed {
    logic [3:0] x;         // last carry-disregard column of Group A
    logic       approx_r;  // 1: 12-bit adder ORs bits 0..x-5
  } prim_cfg_t;

  function automatic prim_cfg_t cfg(int n);
    prim_cfg_t c;
    if (n < 7) begin
      c.x = 4'(n + 4);
      c.approx_r = 1'b0;
    end else begin
      c.x = 4'(n - 2);
      c.approx_r = 1'b1;
    end
    return c;
  endfunction

  // 3x3 Gaussian kernel, normalised by 1023 (= sum of the coefficients).
  localparam logic [7:0] GK_CORNER = 8'd97;
  localparam logic [7:0] GK_EDGE   = 8'd121;
  localparam logic [7:0] GK_CENTER = 8'd151;

  // Coefficient of window position n (row-major, n = 0..8).
  function automatic logic [7:0] gk(int n);
    if (n == 4) return GK_CENTER;
    if (n % 2 == 1) return GK_EDGE;
    return GK_CORNER;
  endfunction

endpackage
