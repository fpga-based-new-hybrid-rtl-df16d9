// brent_kung_adder: N-bit Brent-Kung parallel prefix adder.
//
// Pre-processing forms (g_i, p_i) = (a_i & b_i, a_i ^ b_i). The prefix graph
// has an upward and a downward tree, L = ceil(log2 N):
//  - upward level l (1..L) combines every node i with (i+1) a multiple of 2^l
//    with the node 2^(l-1) below it, so node 2^l-1 comes to span 2^l-1..0;
//  - downward level l (L-1..1) fills in every node i with
//    (i+1) mod 2^l = 2^(l-1) and i >= 2^l from the complete prefix that ends
//    2^(l-1) below it.
// Upward level L and downward level L-1 read only spans completed by upward
// level L-1, so they share one row: the graph has 2L-2 rows of cells (6 for
// 16 bits, 12 for 128 bits). Fan-out stays at most two and the number of
// combining cells is small, at the price of about twice the depth of the
// Sklansky tree. Post-processing: c_{i+1} = G_{i:0} | P_{i:0} & cin and
// sum_i = p_i ^ c_i.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout. Purely combinational.
//
// The tree and its row count follow the paper's Brent-Kung description and
// 16-bit diagram; the way the adder's carry in enters (in the
// post-processing) is this design's choice.
module brent_kung_adder
  import adder_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned LV   = clog2_min1(N);
  localparam int unsigned ROWS = (LV == 1) ? 1 : 2 * LV - 2;

  gp_t         node [ROWS+1][N];   // node[r][i]: row r of the prefix graph
  logic [N:0]  c;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      node[0][i].g = a[i] & b[i];
      node[0][i].p = a[i] ^ b[i];
    end
    for (int unsigned r = 1; r <= ROWS; r++) begin
      // row r holds upward level r (r <= L) and downward level 2L-1-r (r >= L)
      int unsigned dl;
      dl = 2 * LV - 1 - r;
      for (int unsigned i = 0; i < N; i++) begin
        if (r <= LV && ((i + 1) % (1 << r)) == 0)
          node[r][i] = gp_combine(node[r-1][i], node[r-1][i - (1 << (r - 1))]);
        else if (r >= LV && dl >= 1 && ((i + 1) % (1 << dl)) == (1 << (dl - 1)) && i >= (1 << dl))
          node[r][i] = gp_combine(node[r-1][i], node[r-1][i - (1 << (dl - 1))]);
        else
          node[r][i] = node[r-1][i];
      end
    end
    c[0] = cin;
    for (int unsigned i = 0; i < N; i++) begin
      c[i+1] = node[ROWS][i].g | (node[ROWS][i].p & cin);
      sum[i] = node[0][i].p ^ c[i];
    end
    cout = c[N];
  end
endmodule
