// csla_adder: N-bit carry select adder.
//
// The operands are cut into blocks of B bits (the last block takes what is
// left). The least significant block is a ripple carry adder fed by the
// adder's carry in. Every other block holds two ripple carry adders that add
// the block's bits in parallel, one with carry in 0 and one with carry in 1;
// when the real carry into the block arrives, a 2:1 multiplexer picks the
// matching sum and the block's carry out is c0 | (c1 & carry_in), so the
// carry crosses each block through one multiplexer level instead of B bits.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout. Purely combinational.
//
// The block structure follows the paper's 16-bit schematic; B = 4 for all
// widths and the handling of a short last block are this design's choice.
module csla_adder #(
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

  logic [NB:0] c;   // carry into each block

  assign c[0] = cin;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    localparam int unsigned LO = i * B;
    localparam int unsigned W  = (N - LO < B) ? (N - LO) : B;

    if (i == 0) begin : g_first
      rca_adder #(.N(W)) u_rca (
        .a   (a[LO +: W]),
        .b   (b[LO +: W]),
        .cin (c[0]),
        .sum (sum[LO +: W]),
        .cout(c[1])
      );
    end else begin : g_sel
      logic [W-1:0] s0, s1;
      logic         c0, c1;

      rca_adder #(.N(W)) u_rca0 (
        .a(a[LO +: W]), .b(b[LO +: W]), .cin(1'b0), .sum(s0), .cout(c0)
      );
      rca_adder #(.N(W)) u_rca1 (
        .a(a[LO +: W]), .b(b[LO +: W]), .cin(1'b1), .sum(s1), .cout(c1)
      );

      assign sum[LO +: W] = c[i] ? s1 : s0;
      assign c[i+1]       = c0 | (c1 & c[i]);
    end
  end

  assign cout = c[NB];
endmodule
