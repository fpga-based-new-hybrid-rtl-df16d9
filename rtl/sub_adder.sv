// sub_adder: one stage of the hybrid adder, an N-bit adder of the
// architecture named by KIND.
//
// It only selects, at elaboration time, which of the six adders to build:
// ripple carry, carry lookahead, modified carry skip, carry select, Sklansky
// or Brent-Kung. All six share the interface a, b (N bits), cin -> sum
// (N bits), cout, and are purely combinational.
module sub_adder
  import adder_pkg::*;
#(
  parameter adder_kind_e KIND = ADD_RCA,
  parameter int unsigned N    = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  case (KIND)
    ADD_RCA: begin : g_rca
      rca_adder #(.N(N)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
    end
    ADD_CLA: begin : g_cla
      logic g_unused, p_unused;
      cla_adder #(.N(N)) u_add (
        .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .gout(g_unused), .pout(p_unused)
      );
    end
    ADD_CSKA: begin : g_cska
      cska_adder #(.N(N)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
    end
    ADD_CSLA: begin : g_csla
      csla_adder #(.N(N)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
    end
    ADD_SK: begin : g_sk
      sklansky_adder #(.N(N)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
    end
    default: begin : g_bk
      brent_kung_adder #(.N(N)) u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
    end
  endcase
endmodule
