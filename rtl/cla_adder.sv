// cla_adder: N-bit multi-level carry lookahead adder with maximum fan-in R.
//
// Each bit forms p_i = a_i ^ b_i and g_i = a_i & b_i. Bits are grouped R at a
// time into a tree of lookahead units, ceil(log_R(N)) levels deep. On the way
// up every unit forms the group generate and group propagate of its R
// children; on the way down every unit, given the carry into its group, forms
// the carry into each child directly as a sum of products:
//   c_k = G_{k-1} | P_{k-1} G_{k-2} | ... | P_{k-1} ... P_0 c_in
// so no carry ripples through a group. Sum bit i is p_i ^ c_i. The operand is
// padded up to R^levels bits with transparent positions (p = 1, g = 0), so the
// top unit's group signals are those of the N real bits.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout, and the group
// generate/propagate of the whole operand (gout, pout), which a higher
// lookahead level can use. Purely combinational.
//
// The bit equations follow the paper's CLA description; the fan-in R = 4 and
// the exact tree shape are this design's choice.
module cla_adder #(
  parameter int unsigned N = 128,
  parameter int unsigned R = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         gout,
  output logic         pout
);
  // Levels of the lookahead tree and padded operand width.
  function automatic int unsigned num_levels(int unsigned n, int unsigned r);
    int unsigned l, w;
    l = 1;
    w = r;
    while (w < n) begin
      w = w * r;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(N, R);
  localparam int unsigned M      = R ** LEVELS;

  // gg/pp[k][j]: generate/propagate of node j at level k (level 0 = bits).
  // cc[k][j]   : carry into node j at level k.
  logic gg [LEVELS+1][M];
  logic pp [LEVELS+1][M];
  logic cc [LEVELS+1][M];

  always_comb begin
    // Bit level, eq. (1) and (2).
    for (int unsigned i = 0; i < M; i++) begin
      if (i < N) begin
        gg[0][i] = a[i] & b[i];
        pp[0][i] = a[i] ^ b[i];
      end else begin
        gg[0][i] = 1'b0;
        pp[0][i] = 1'b1;
      end
      cc[0][i] = 1'b0;
    end
    for (int unsigned k = 1; k <= LEVELS; k++) begin
      for (int unsigned j = 0; j < M; j++) begin
        gg[k][j] = 1'b0;
        pp[k][j] = 1'b0;
        cc[k][j] = 1'b0;
      end
    end

    // Upward pass: group generate and propagate, sum of products form.
    for (int unsigned k = 1; k <= LEVELS; k++) begin
      for (int unsigned j = 0; j < M / (R ** k); j++) begin
        logic g_acc, p_all, term;
        g_acc = 1'b0;
        p_all = 1'b1;
        for (int unsigned t = 0; t < R; t++) begin
          term = gg[k-1][R*j+t];
          for (int unsigned u = t + 1; u < R; u++) term = term & pp[k-1][R*j+u];
          g_acc = g_acc | term;
          p_all = p_all & pp[k-1][R*j+t];
        end
        gg[k][j] = g_acc;
        pp[k][j] = p_all;
      end
    end

    // Downward pass: carry into every child from the group carry in, eq. (3)
    // expanded so that every child carry is a two-level function.
    cc[LEVELS][0] = cin;
    for (int unsigned k = LEVELS; k >= 1; k--) begin
      for (int unsigned j = 0; j < M / (R ** k); j++) begin
        for (int unsigned c = 0; c < R; c++) begin
          logic c_acc, term;
          // term for the group carry in: all lower children propagate
          term = cc[k][j];
          for (int unsigned u = 0; u < c; u++) term = term & pp[k-1][R*j+u];
          c_acc = term;
          for (int unsigned t = 0; t < c; t++) begin
            term = gg[k-1][R*j+t];
            for (int unsigned u = t + 1; u < c; u++) term = term & pp[k-1][R*j+u];
            c_acc = c_acc | term;
          end
          cc[k-1][R*j+c] = c_acc;
        end
      end
    end

    // Sum bits, eq. (4).
    for (int unsigned i = 0; i < N; i++) sum[i] = pp[0][i] ^ cc[0][i];
    gout = gg[LEVELS][0];
    pout = pp[LEVELS][0];
    cout = gout | (pout & cin);
  end
endmodule
