// rca_adder: N-bit ripple carry adder.
//
// N full adders in a chain: the carry out of bit i is the carry in of bit
// i+1, c[0] is the adder's carry in and c[N] its carry out. Smallest and
// slowest of the family: area and delay both grow linearly with N.
//
// Interface: a, b (N bits), cin -> sum (N bits), cout. Purely combinational;
// there is no clock and no latency in cycles.
module rca_adder #(
  parameter int unsigned N = 128
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
