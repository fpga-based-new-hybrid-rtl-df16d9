// tb_adder_configs: runs every 128-bit adder configuration that the design
// space study evaluates, built by parameters from hybrid_adder
// (hybrids) and sub_adder (single adders).
//
// Six two-stage hybrids, named high stage first with the stage widths in
// parentheses: RCA(32)|CLA(96), RCA(65)|CSLA(63), CSKA(93)|CLA(35),
// RCA(35)|SK(93), RCA(4)|CSKA(124), RCA(4)|BK(124); and the six single
// 128-bit adders (one stage of each kind). All twelve get the same operands
// and each result is compared with a + b + cin.
module tb_adder_configs;
  import adder_pkg::*;

  localparam int unsigned N  = 128;
  localparam int unsigned NC = 12;

  logic [N-1:0] a, b;
  logic         cin;
  logic [N-1:0] s  [NC];
  logic         co [NC];

  int checks   = 0;
  int failures = 0;

  // hybrids: index 0 of KINDS / WIDTHS is the low stage
  hybrid_adder #(.L(2), .KINDS('{ADD_CLA,  ADD_RCA }), .WIDTHS('{96, 32}))  u_rca_cla  (.a(a), .b(b), .cin(cin), .sum(s[0]), .cout(co[0]));
  hybrid_adder #(.L(2), .KINDS('{ADD_CSLA, ADD_RCA }), .WIDTHS('{63, 65}))  u_rca_csla (.a(a), .b(b), .cin(cin), .sum(s[1]), .cout(co[1]));
  hybrid_adder #(.L(2), .KINDS('{ADD_CLA,  ADD_CSKA}), .WIDTHS('{35, 93}))  u_cska_cla (.a(a), .b(b), .cin(cin), .sum(s[2]), .cout(co[2]));
  hybrid_adder #(.L(2), .KINDS('{ADD_SK,   ADD_RCA }), .WIDTHS('{93, 35}))  u_rca_sk   (.a(a), .b(b), .cin(cin), .sum(s[3]), .cout(co[3]));
  hybrid_adder #(.L(2), .KINDS('{ADD_CSKA, ADD_RCA }), .WIDTHS('{124, 4}))  u_rca_cska (.a(a), .b(b), .cin(cin), .sum(s[4]), .cout(co[4]));
  hybrid_adder #(.L(2), .KINDS('{ADD_BK,   ADD_RCA }), .WIDTHS('{124, 4}))  u_rca_bk   (.a(a), .b(b), .cin(cin), .sum(s[5]), .cout(co[5]));
  // single 128-bit adders
  sub_adder #(.KIND(ADD_RCA), .N(N)) u_rca  (.a(a), .b(b), .cin(cin), .sum(s[6]),  .cout(co[6]));
  sub_adder #(.KIND(ADD_CLA), .N(N)) u_cla  (.a(a), .b(b), .cin(cin), .sum(s[7]),  .cout(co[7]));
  sub_adder #(.KIND(ADD_CSKA), .N(N)) u_cska (.a(a), .b(b), .cin(cin), .sum(s[8]),  .cout(co[8]));
  sub_adder #(.KIND(ADD_CSLA), .N(N)) u_csla (.a(a), .b(b), .cin(cin), .sum(s[9]),  .cout(co[9]));
  sub_adder #(.KIND(ADD_SK), .N(N)) u_sk   (.a(a), .b(b), .cin(cin), .sum(s[10]), .cout(co[10]));
  sub_adder #(.KIND(ADD_BK), .N(N)) u_bk   (.a(a), .b(b), .cin(cin), .sum(s[11]), .cout(co[11]));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [N:0] r;
      a   = {$urandom, $urandom, $urandom, $urandom};
      b   = (n % 3 == 0) ? ~a : {$urandom, $urandom, $urandom, $urandom};
      if (n % 6 == 3) b[$urandom_range(0, N-1)] ^= 1'b1;
      cin = 1'($urandom_range(0, 1));
      #1;
      r = {1'b0, a} + {1'b0, b} + (N+1)'(cin);
      for (int k = 0; k < NC; k++) begin
        checks++;
        if (s[k] !== r[N-1:0] || co[k] !== r[N]) begin
          failures++;
          if (failures < 10) $display("FAIL config %0d a=%h b=%h cin=%b", k, a, b, cin);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
