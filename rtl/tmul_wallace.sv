// N x N trit combinational multiplier with a Wallace reduction tree of
// ternary (4,2) and (3,2) counters and ternary half adders.
//
// Partial products. Each pair of trits a[i], b[j] goes to a one-trit
// multiplier, which gives a product trit of weight 3^(i+j) and a carry trit
// of weight 3^(i+j+1) (only 2*2 has a carry). The matrix therefore has 2N
// rows where a binary one has N: row 2j holds the product trits of b[j]
// (columns j..j+N-1) and row 2j+1 its carry trits (columns j+1..j+N).
//
// Reduction. Each stage cuts the rows into bands of four consecutive rows
// and reduces every band to two rows, a sum row S and a carry row K. Column
// by column, a band holds k trits:
//     k = 4  a (4,2) counter: sum to S[c], carry (0..2) to K[c+1]
//     k = 3  a (3,2) counter: sum to S[c], carry to K[c+1]
//     k = 2  both trits move on (S[c], K[c]) if no carry already took K[c];
//            otherwise a ternary half adder: sum to S[c], carry to K[c+1]
//     k = 1  the trit moves to S[c]
// For N = 8 this is 16 -> 8 -> 4 -> 2 rows in three stages; the first stage
// uses 24 (4,2) and 8 (3,2) counters. Which slots are occupied, and so
// which cell goes where, is worked out at elaboration by the constant
// functions below, so N is a free parameter. Empty slots are tied to 0.
//
// Final adder. The last two rows are added by a ripple chain: a ternary
// half adder in the lowest column holding two trits, then (3,2) counters
// whose ternary carry runs up to the top trit.
//
// The counters, the one-trit multiplier function, the four-row bands and the
// stage structure follow the design. The exact placement rule above (and so
// the counter counts in later stages, TC42_COUNT etc.) and the ripple final
// adder are this RTL's choices. Purely combinational, no clock or reset.
//
// Ports: a, b are N trits each, trit i in bits [2i+1:2i]; p is the 2N-trit
// product in the same layout.
module tmul_wallace
  import ternary_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [2*N-1:0] a,
  input  logic [2*N-1:0] b,
  output logic [4*N-1:0] p
);

  localparam int NN     = int'(N);
  localparam int ROWS   = 2 * NN;
  localparam int COLS   = 2 * NN + 1;   // one spare column above the product
  localparam int MAXSTG = 8;     // enough for N up to 256

  // Cell chosen for one column of one band.
  localparam int A_NONE = 0, A_P1 = 1, A_P2 = 2, A_HA = 3, A_C32 = 4, A_C42 = 5;

  // ---------------------------------------------------------------------
  // Elaboration-time bookkeeping of slot occupancy.
  // ---------------------------------------------------------------------
  localparam int NB = (ROWS + 3) / 4;   // most bands in any stage

  typedef bit [ROWS*COLS-1:0]                  occ_t;     // bit r*COLS+c: slot (r,c) used
  typedef bit [MAXSTG:0][ROWS*COLS-1:0]        occ_tab_t; // per stage
  typedef bit [COLS-1:0][2:0]                  band_t;    // cell per column
  typedef bit [MAXSTG-1:0][NB-1:0][COLS-1:0][2:0] act_tab_t;

  function automatic occ_t occ0();
    occ_t o = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int j = r / 2;
        o[r*COLS + c] = (r % 2 == 0) ? (c >= j && c <= j + NN - 1)
                                     : (c >= j + 1 && c <= j + NN);
      end
    return o;
  endfunction

  // Rows entering stage s: every band of four (or fewer) rows leaves two.
  function automatic int nrows(int s);
    int r = ROWS;
    for (int k = 0; k < s; k++) r = 2 * (r / 4) + ((r % 4 == 0) ? 0 : (r % 4 == 1) ? 1 : 2);
    return r;
  endfunction

  function automatic int band_k(occ_t o, int rows, int g, int c);
    int k = 0;
    for (int r = 4*g; r < 4*g + 4 && r < rows; r++) if (o[r*COLS + c]) k++;
    return k;
  endfunction

  // Cells of band g, column by column from the bottom, given the occupancy
  // entering the stage. 'busy' tells that the column below sent a carry.
  function automatic band_t band_acts(occ_t o, int rows, int g);
    band_t res  = '0;
    bit    busy = 0;
    for (int c = 0; c < COLS; c++) begin
      int k = band_k(o, rows, g, c);
      int act;
      act = (k >= 4) ? A_C42 : (k == 3) ? A_C32 :
            (k == 2) ? (busy ? A_HA : A_P2) : (k == 1) ? A_P1 : A_NONE;
      res[c] = 3'(act);
      busy   = (act >= A_HA);
    end
    return res;
  endfunction

  function automatic occ_t step(occ_t o, int rows);
    occ_t n = '0;
    for (int g = 0; 4*g < rows; g++) begin
      band_t acts = band_acts(o, rows, g);
      for (int c = 0; c < COLS; c++) begin
        int act = int'(acts[c]);
        if (act != A_NONE)               n[2*g*COLS + c]       = 1;
        if (act == A_P2)                 n[(2*g+1)*COLS + c]   = 1;
        if (act >= A_HA && c + 1 < COLS) n[(2*g+1)*COLS + c+1] = 1;
      end
    end
    return n;
  endfunction

  function automatic occ_tab_t build_occ();
    occ_tab_t t = '0;
    t[0] = occ0();
    for (int s = 0; s < MAXSTG; s++) t[s+1] = step(t[s], nrows(s));
    return t;
  endfunction

  function automatic act_tab_t build_act();
    occ_tab_t o = build_occ();
    act_tab_t t = '0;
    for (int s = 0; s < MAXSTG; s++)
      for (int g = 0; g < NB; g++)
        if (4*g < nrows(s)) t[s][g] = band_acts(o[s], nrows(s), g);
    return t;
  endfunction

  function automatic int num_stages();
    for (int s = 0; s < MAXSTG; s++) if (nrows(s) <= 2) return s;
    return MAXSTG;
  endfunction

  // Tables computed once at elaboration.
  localparam occ_tab_t OCC     = build_occ();
  localparam act_tab_t ACT_TAB = build_act();

  function automatic bit is_occ(int s, int r, int c);
    return OCC[s][r*COLS + c];
  endfunction

  function automatic int act_at(int s, int g, int c);
    return int'(ACT_TAB[s][g][c]);
  endfunction

  // Row index of the i-th occupied slot of band g in column c at stage s.
  function automatic int nth_row(int s, int g, int c, int i);
    int n = 0;
    for (int r = 4*g; r < 4*g + 4 && r < nrows(s); r++)
      if (OCC[s][r*COLS + c]) begin
        if (n == i) return r;
        n++;
      end
    return 0;
  endfunction

  // Lowest column of the final two rows in which both slots are occupied.
  function automatic int first_two();
    for (int c = 0; c < COLS; c++)
      if (is_occ(num_stages(), 0, c) && is_occ(num_stages(), 1, c)) return c;
    return COLS;
  endfunction

  function automatic int count_act(int a_kind);
    int t = 0;
    for (int s = 0; s < num_stages(); s++)
      for (int g = 0; g < NB; g++)
        for (int c = 0; c < COLS; c++) if (4*g < nrows(s) && act_at(s, g, c) == a_kind) t++;
    return t;
  endfunction

  localparam int NSTG = num_stages();
  localparam int F2   = first_two();

  // Cell counts, for reports.
  localparam int TMUL1_COUNT    = NN * NN;
  localparam int STAGE_COUNT    = NSTG;
  localparam int TC42_COUNT     = count_act(A_C42);
  localparam int TC32_TREE      = count_act(A_C32);
  localparam int TC32_CPA       = (F2 < 2*NN - 1) ? 2*NN - 1 - F2 : 0;
  localparam int TC32_COUNT     = TC32_TREE + TC32_CPA;
  localparam int THA_COUNT      = count_act(A_HA) + ((F2 < 2*NN) ? 1 : 0);

  if (NSTG >= MAXSTG) begin : g_no_converge
    $error("tmul_wallace: reduction does not converge");
  end

  // g_lvl[s].v[r][c]: slot of row r, column c at the input of stage s.
  for (genvar s = 0; s <= NSTG; s++) begin : g_lvl
    trit_t v [ROWS][COLS];
  end

  // ---------------------------------------------------------------------
  // Partial products: row 2j products, row 2j+1 carries.
  // ---------------------------------------------------------------------
  for (genvar i = 0; i < NN; i++) begin : g_pp_i
    for (genvar j = 0; j < NN; j++) begin : g_pp_j
      tmul1 u_m (
        .a(a[2*i +: 2]), .b(b[2*j +: 2]),
        .p(g_lvl[0].v[2*j][i+j]), .c(g_lvl[0].v[2*j+1][i+j+1])
      );
    end
  end

  // Empty slots are level 0.
  for (genvar s = 0; s <= NSTG; s++) begin : g_fill_s
    for (genvar r = 0; r < ROWS; r++) begin : g_fill_r
      for (genvar c = 0; c < COLS; c++) begin : g_fill_c
        if (!is_occ(s, r, c)) begin : g_zero
          assign g_lvl[s].v[r][c] = T0;
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // Reduction stages: bands of four rows to two.
  // ---------------------------------------------------------------------
  for (genvar s = 0; s < NSTG; s++) begin : g_stg
    for (genvar g = 0; 4*g < nrows(s); g++) begin : g_band
      for (genvar c = 0; c < COLS; c++) begin : g_col
        localparam int ACT = act_at(s, g, c);
        localparam int R0  = nth_row(s, g, c, 0);
        localparam int R1  = nth_row(s, g, c, 1);
        localparam int R2  = nth_row(s, g, c, 2);
        localparam int R3  = nth_row(s, g, c, 3);
        trit_t cy;

        if (ACT == A_C42) begin : g_c42
          tcnt42 u_c (
            .x1(g_lvl[s].v[R0][c]), .x2(g_lvl[s].v[R1][c]),
            .x3(g_lvl[s].v[R2][c]), .x4(g_lvl[s].v[R3][c]),
            .sum(g_lvl[s+1].v[2*g][c]), .cout(cy)
          );
        end else if (ACT == A_C32) begin : g_c32
          tcnt32 u_c (
            .a(g_lvl[s].v[R0][c]), .b(g_lvl[s].v[R1][c]), .cin(g_lvl[s].v[R2][c]),
            .sum(g_lvl[s+1].v[2*g][c]), .cout(cy)
          );
        end else if (ACT == A_HA) begin : g_ha
          tha u_c (
            .a(g_lvl[s].v[R0][c]), .b(g_lvl[s].v[R1][c]),
            .sum(g_lvl[s+1].v[2*g][c]), .cout(cy)
          );
        end else begin : g_wire
          assign cy = T0;
          if (ACT == A_P1 || ACT == A_P2) begin : g_p1
            assign g_lvl[s+1].v[2*g][c] = g_lvl[s].v[R0][c];
          end
          if (ACT == A_P2) begin : g_p2
            assign g_lvl[s+1].v[2*g+1][c] = g_lvl[s].v[R1][c];
          end
        end

        if (ACT >= A_HA && c + 1 < COLS) begin : g_up
          assign g_lvl[s+1].v[2*g+1][c+1] = cy;
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // Final ripple adder over the two remaining rows.
  // ---------------------------------------------------------------------
  // g_cpa[c].co is the ripple carry out of column c.
  for (genvar c = 0; c < 2*NN; c++) begin : g_cpa
    trit_t co;
    if (c < F2) begin : g_single
      // At most one slot is occupied here; the other holds 0.
      assign p[2*c +: 2] = is_occ(NSTG, 0, c) ? g_lvl[NSTG].v[0][c] : g_lvl[NSTG].v[1][c];
      assign co          = T0;
    end else if (c == F2) begin : g_ha
      tha u_ha (
        .a(g_lvl[NSTG].v[0][c]), .b(g_lvl[NSTG].v[1][c]),
        .sum(p[2*c +: 2]), .cout(co)
      );
    end else begin : g_fa
      tcnt32 u_fa (
        .a(g_lvl[NSTG].v[0][c]), .b(g_lvl[NSTG].v[1][c]), .cin(g_cpa[c-1].co),
        .sum(p[2*c +: 2]), .cout(co)
      );
    end
  end

endmodule
