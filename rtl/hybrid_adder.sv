// hybrid_adder: N-bit hybrid adder built from L sub-adders in a linear chain.
//
// The operands are split into L contiguous slices. Slice i (i = 0 is the
// least significant) is WIDTHS[i] bits wide and is added by a sub-adder of
// architecture KINDS[i] (ripple carry, carry lookahead, modified carry skip,
// carry select, Sklansky or Brent-Kung). The carry out of each sub-adder is
// the carry in of the next, so the worst-case delay is the largest of
//   DS_1, DC_1 + DS_2, ..., DC_1 + ... + DC_{L-1} + DS_L
// (DS: operand-to-sum delay, DC: operand-to-carry-out delay of a stage).
// Choosing the kinds and widths trades that delay against total area; the
// choice is made offline, and this module builds whatever it is given.
//
// Default configuration: N = 128, L = 2, a 96-bit carry lookahead adder on
// bits 95..0 and a 32-bit ripple carry adder on bits 127..96 (the
// configuration written "RCA(32)|CLA(96)", the best area-delay product of the
// configurations evaluated). Which of the two named stages sits on the low
// bits is this design's reading of that notation.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout. Purely combinational.
// The WIDTHS must add up to N (checked at time zero in simulation).
module hybrid_adder
  import adder_pkg::*;
#(
  parameter int unsigned N                = 128,
  parameter int unsigned L                = 2,
  parameter adder_kind_e KINDS  [L]       = '{ADD_CLA, ADD_RCA},
  parameter int unsigned WIDTHS [L]       = '{96, 32}
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  // Lowest bit of slice i.
  function automatic int unsigned slice_lo(int unsigned i);
    int unsigned lo;
    lo = 0;
    for (int unsigned k = 0; k < i; k++) lo += WIDTHS[k];
    return lo;
  endfunction

  logic [L:0] c;   // c[i]: carry into sub-adder i; c[L] = cout

  assign c[0] = cin;

  for (genvar i = 0; i < L; i++) begin : g_stage
    localparam int unsigned LO = slice_lo(i);
    localparam int unsigned W  = WIDTHS[i];

    sub_adder #(.KIND(KINDS[i]), .N(W)) u_sub (
      .a   (a[LO +: W]),
      .b   (b[LO +: W]),
      .cin (c[i]),
      .sum (sum[LO +: W]),
      .cout(c[i+1])
    );
  end

  assign cout = c[L];

  initial assert (slice_lo(L) == N)
    else $error("hybrid_adder: sub-adder widths add up to %0d, not N = %0d", slice_lo(L), N);
endmodule
