// N x N bit combinational multiplier with a Wallace reduction tree of binary
// (7,3) and (3,2) counters: the binary counterpart of the ternary
// multiplier, sized so that both handle about the same amount of
// information (12 bits against 8 trits).
//
// Partial products. a[i] & b[j] is one AND gate, weight 2^(i+j): N rows of
// N bits, one bit per pair instead of the ternary product-and-carry pair.
//
// Reduction. Column by column, each stage cuts a column of h bits into
// groups of seven for (7,3) counters (outputs to columns c, c+1, c+2); of
// the rest, each group of three goes to a full adder (outputs to c, c+1)
// and one or two bits pass on. Once no column is more than three bits high,
// a column left with two bits that also receives a carry from below takes a
// half adder, so that this last stage leaves at most two bits everywhere.
// In the next stage a column lists, in order: its own counter outputs,
// pass-through bits, carries from column c-1 ((7,3) middle outputs, then
// full- and half-adder carries), then (7,3) top outputs from column c-2.
// Heights and positions are computed once at elaboration.
//
// Final adder: a half adder in the lowest column holding two bits, then a
// ripple chain of full adders.
//
// The counters and the AND-gate partial products follow the design; the
// grouping rule and the ripple final adder are this RTL's choices, so the
// counter counts (C73_COUNT, ...) differ from the design's figures.
// FA_STYLE picks the full-adder circuit everywhere (0: 14T, 1: 28T).
// Purely combinational.
module bmul_wallace #(
  parameter int unsigned N        = 12,
  parameter int unsigned FA_STYLE = 0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int NN     = int'(N);
  localparam int COLS   = 2 * NN + 2;   // two spare columns above the product
  localparam int MAXH   = NN + 2;
  localparam int MAXSTG = 8;

  // Per stage and column: [15:0] height entering the stage, [16] half-adder
  // flag of that column in that stage.
  typedef bit [MAXSTG:0][COLS-1:0][16:0] h_tab_t;

  function automatic int n73(int h);
    return h / 7;
  endfunction
  function automatic int n32(int h);
    return (h % 7) / 3;
  endfunction
  function automatic int nrest(int h);
    return (h % 7) % 3;
  endfunction

  // Half adders: in a stage whose columns are all at most three high, a
  // column left with two bits that also receives a carry from below uses a
  // half adder, so that the stage ends with at most two bits everywhere.
  function automatic h_tab_t build();
    h_tab_t t = '0;
    for (int c = 0; c < COLS; c++) begin
      int lo = (c > NN - 1) ? c - (NN - 1) : 0;
      int hi = (c < NN - 1) ? c : NN - 1;
      t[0][c][15:0] = (c <= 2*NN - 2) ? 16'(hi - lo + 1) : 16'd0;
    end
    for (int s = 0; s < MAXSTG; s++) begin
      int m  = 0;
      bit cy = 0;   // column c-1 sends a carry
      for (int c = 0; c < COLS; c++) if (int'(t[s][c][15:0]) > m) m = int'(t[s][c][15:0]);
      for (int c = 0; c < COLS; c++) begin
        int h = int'(t[s][c][15:0]);
        t[s][c][16] = (m <= 3) && nrest(h) == 2 && cy;
        cy = (n73(h) + n32(h) + int'(t[s][c][16])) > 0;
      end
      for (int c = 0; c < COLS; c++) begin
        int h  = int'(t[s][c][15:0]);
        int nh = n73(h) + n32(h) + nrest(h) - int'(t[s][c][16]);
        if (c >= 1) nh += n73(int'(t[s][c-1][15:0])) + n32(int'(t[s][c-1][15:0])) + int'(t[s][c-1][16]);
        if (c >= 2) nh += n73(int'(t[s][c-2][15:0]));
        t[s+1][c][15:0] = 16'(nh);
      end
    end
    return t;
  endfunction

  localparam h_tab_t HT = build();

  function automatic int col_h(int s, int c);
    return (c < 0 || c >= COLS) ? 0 : int'(HT[s][c][15:0]);
  endfunction

  function automatic int has_ha(int s, int c);
    return (c < 0 || c >= COLS) ? 0 : int'(HT[s][c][16]);
  endfunction

  function automatic int num_stages();
    for (int s = 0; s < MAXSTG; s++) begin
      int m = 0;
      for (int c = 0; c < COLS; c++) if (col_h(s, c) > m) m = col_h(s, c);
      if (m <= 2) return s;
    end
    return MAXSTG;
  endfunction

  localparam int NSTG = num_stages();

  function automatic int first_two();
    for (int c = 0; c < COLS; c++) if (col_h(NSTG, c) == 2) return c;
    return COLS;
  endfunction

  // kind 0: (7,3), 1: full adders, 2: half adders.
  function automatic int count_cells(int kind);
    int t = 0;
    for (int s = 0; s < NSTG; s++)
      for (int c = 0; c < COLS; c++)
        t += (kind == 0) ? n73(col_h(s, c)) : (kind == 1) ? n32(col_h(s, c)) : has_ha(s, c);
    return t;
  endfunction

  function automatic int max_height();
    int m = 0;
    for (int s = 0; s <= NSTG; s++)
      for (int c = 0; c < COLS; c++) if (col_h(s, c) > m) m = col_h(s, c);
    return m;
  endfunction

  localparam int F2 = first_two();

  // Cell counts, for reports.
  localparam int AND_COUNT   = NN * NN;
  localparam int STAGE_COUNT = NSTG;
  localparam int C73_COUNT   = count_cells(0);
  localparam int C32_COUNT   = count_cells(1) + ((F2 < 2*NN - 1) ? 2*NN - 1 - F2 : 0);
  localparam int HA_COUNT    = count_cells(2) + ((F2 < 2*NN) ? 1 : 0);

  if (NSTG >= MAXSTG || max_height() > MAXH) begin : g_bad_tree
    $error("bmul_wallace: reduction tree does not fit its tables");
  end

  // g_lvl[s].v[c][k]: bit k of column c entering stage s.
  for (genvar s = 0; s <= NSTG; s++) begin : g_lvl
    logic v [COLS][MAXH];
  end

  // Partial products, ordered by i within a column.
  for (genvar i = 0; i < NN; i++) begin : g_pp_i
    for (genvar j = 0; j < NN; j++) begin : g_pp_j
      localparam int C  = i + j;
      localparam int LO = (C > NN - 1) ? C - (NN - 1) : 0;
      assign g_lvl[0].v[C][i - LO] = a[i] & b[j];
    end
  end

  for (genvar s = 0; s <= NSTG; s++) begin : g_fill_s
    for (genvar c = 0; c < COLS; c++) begin : g_fill_c
      for (genvar k = col_h(s, c); k < MAXH; k++) begin : g_fill_k
        assign g_lvl[s].v[c][k] = 1'b0;
      end
    end
  end

  for (genvar s = 0; s < NSTG; s++) begin : g_stg
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int H  = col_h(s, c);
      localparam int K7 = n73(H);
      localparam int K3 = n32(H);
      localparam int KH = has_ha(s, c);
      localparam int KP = nrest(H) - 2*KH;
      // Slot bases in columns c+1 and c+2 of the next stage: a column lists
      // its own outputs, then carries from c-1, then (7,3) tops from c-2.
      localparam int H1 = col_h(s, c + 1);
      localparam int B1 = n73(H1) + n32(H1) + nrest(H1) - has_ha(s, c + 1);
      localparam int H2 = col_h(s, c + 2);
      localparam int B2 = n73(H2) + n32(H2) + nrest(H2) - has_ha(s, c + 2)
                        + n73(H1) + n32(H1) + has_ha(s, c + 1);

      for (genvar q = 0; q < K7; q++) begin : g_c73
        logic [6:0] x;
        logic [2:0] o;
        for (genvar k = 0; k < 7; k++) begin : g_in
          assign x[k] = g_lvl[s].v[c][7*q + k];
        end
        bcnt73 #(.FA_STYLE(FA_STYLE)) u_c (.x(x), .out(o));
        assign g_lvl[s+1].v[c][q] = o[0];
        if (c + 1 < COLS) begin : g_o1
          assign g_lvl[s+1].v[c+1][B1 + q] = o[1];
        end
        if (c + 2 < COLS) begin : g_o2
          assign g_lvl[s+1].v[c+2][B2 + q] = o[2];
        end
      end

      for (genvar q = 0; q < K3; q++) begin : g_c32
        logic cy;
        bfa #(.FA_STYLE(FA_STYLE)) u_c (
          .a(g_lvl[s].v[c][7*K7 + 3*q]), .b(g_lvl[s].v[c][7*K7 + 3*q + 1]),
          .c(g_lvl[s].v[c][7*K7 + 3*q + 2]),
          .sum(g_lvl[s+1].v[c][K7 + q]), .cout(cy)
        );
        if (c + 1 < COLS) begin : g_up
          assign g_lvl[s+1].v[c+1][B1 + K7 + q] = cy;
        end
      end

      if (KH != 0) begin : g_ha
        logic cy;
        bha u_c (
          .a(g_lvl[s].v[c][7*K7 + 3*K3]), .b(g_lvl[s].v[c][7*K7 + 3*K3 + 1]),
          .sum(g_lvl[s+1].v[c][K7 + K3]), .cout(cy)
        );
        if (c + 1 < COLS) begin : g_up
          assign g_lvl[s+1].v[c+1][B1 + K7 + K3] = cy;
        end
      end

      for (genvar q = 0; q < KP; q++) begin : g_pass
        assign g_lvl[s+1].v[c][K7 + K3 + KH + q] = g_lvl[s].v[c][7*K7 + 3*K3 + 2*KH + q];
      end
    end
  end

  // Final ripple adder; g_cpa[c].co is the carry out of column c.
  for (genvar c = 0; c < 2*NN; c++) begin : g_cpa
    logic co;
    if (c < F2) begin : g_single
      assign p[c] = g_lvl[NSTG].v[c][0];
      assign co   = 1'b0;
    end else if (c == F2) begin : g_ha
      bha u_ha (.a(g_lvl[NSTG].v[c][0]), .b(g_lvl[NSTG].v[c][1]), .sum(p[c]), .cout(co));
    end else begin : g_fa
      bfa #(.FA_STYLE(FA_STYLE)) u_fa (
        .a(g_lvl[NSTG].v[c][0]), .b(g_lvl[NSTG].v[c][1]), .c(g_cpa[c-1].co),
        .sum(p[c]), .cout(co)
      );
    end
  end

endmodule
