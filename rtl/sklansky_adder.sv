// sklansky_adder: N-bit Sklansky parallel prefix adder.
//
// Pre-processing forms (g_i, p_i) = (a_i & b_i, a_i ^ b_i). The prefix tree
// then has ceil(log2 N) levels. At level l every bit i whose bit (l-1) is set
// combines its span with the span that ends just below the upper half of its
// 2^l block, (g, p) o (g', p') = (g | p & g', p & p'), so after the last
// level node i holds the generate and propagate of bits i..0. The tree has
// minimum depth, at the price of fan-out that doubles from level to level.
// Post-processing: c_{i+1} = G_{i:0} | P_{i:0} & cin and sum_i = p_i ^ c_i.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout. Purely combinational.
//
// The tree follows the paper's Sklansky description and 16-bit diagram; the
// way the adder's carry in enters (in the post-processing) is this design's
// choice.
module sklansky_adder
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
  localparam int unsigned LV = clog2_min1(N);

  gp_t         node [LV+1][N];   // node[l][i]: row l of the prefix graph
  logic [N:0]  c;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      node[0][i].g = a[i] & b[i];
      node[0][i].p = a[i] ^ b[i];
    end
    for (int unsigned l = 1; l <= LV; l++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (((i >> (l - 1)) & 1) != 0)
          node[l][i] = gp_combine(node[l-1][i], node[l-1][((i >> (l - 1)) << (l - 1)) - 1]);
        else
          node[l][i] = node[l-1][i];
      end
    end
    c[0] = cin;
    for (int unsigned i = 0; i < N; i++) begin
      c[i+1] = node[LV][i].g | (node[LV][i].p & cin);
      sum[i] = node[0][i].p ^ c[i];
    end
    cout = c[N];
  end
endmodule
