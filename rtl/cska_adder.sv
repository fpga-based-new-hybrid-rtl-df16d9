// cska_adder: N-bit modified carry skip adder.
//
// The operands are cut into blocks of B bits (the last block takes what is
// left). Each block adds with a B-bit carry lookahead adder rather than the
// ripple carry adder of the classic carry skip scheme. A propagation unit
// forms p_i = a_i ^ b_i for every bit; the AND of a block's p_i is the block
// propagate P. A 2:1 multiplexer per block then passes the block's carry in
// straight to the next block when P = 1 (every bit propagates, so the carry
// out equals the carry in) and the CLA's own carry out when P = 0.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout. Purely combinational.
//
// The block structure (propagation unit, 4-bit CLA blocks, one skip
// multiplexer per block) follows the paper's 16-bit schematic; B = 4 for all
// widths and the handling of a short last block are this design's choice.
module cska_adder #(
  parameter int unsigned N = 128,
  parameter int unsigned B = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = (N + B - 1) / B;

  logic [N-1:0] p;    // propagation unit
  logic [NB:0]  c;    // carry into each block

  assign p    = a ^ b;
  assign c[0] = cin;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    localparam int unsigned LO = i * B;
    localparam int unsigned W  = (N - LO < B) ? (N - LO) : B;

    logic blk_cout, blk_p;
    logic blk_g_unused, blk_p_unused;   // group signals this level does not need

    cla_adder #(.N(W)) u_cla (
      .a   (a[LO +: W]),
      .b   (b[LO +: W]),
      .cin (c[i]),
      .sum (sum[LO +: W]),
      .cout(blk_cout),
      .gout(blk_g_unused),
      .pout(blk_p_unused)
    );

    assign blk_p  = &p[LO +: W];
    // skip multiplexer
    assign c[i+1] = blk_p ? c[i] : blk_cout;
  end

  assign cout = c[NB];
endmodule
