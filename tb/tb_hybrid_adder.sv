// tb_hybrid_adder: end-to-end testbench of the hybrid adder at its default
// configuration (128 bits, a 96-bit carry lookahead stage on bits 95..0 and a
// 32-bit ripple carry stage on bits 127..96).
//
// Sum and carry out are compared with a + b + cin computed by the simulator.
// Besides random operands it drives operands that make the carry cross the
// boundary between the two stages, operands where it does not, operands that
// propagate the carry in through both stages to the carry out, and operands
// whose carry is generated in the low stage and rippled through the whole high
// stage. Each of these events is counted from the operands, and an event that
// never happened counts as a failure.
module tb_hybrid_adder;
  localparam int unsigned N  = 128;
  localparam int unsigned W0 = 96;   // width of the low stage at the defaults

  logic [N-1:0] a, b, sum;
  logic         cin, cout;

  int checks   = 0;
  int failures = 0;

  // event counters
  int n_cross1     = 0;   // carry 1 into the high stage
  int n_cross0     = 0;   // carry 0 into the high stage
  int n_full_prop  = 0;   // carry in propagated through both stages
  int n_ripple_all = 0;   // low-stage carry rippled through the whole high stage
  int n_cout       = 0;   // carry out 1

  hybrid_adder u_dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  function automatic logic [N-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic check();
    logic [N:0]  r;
    logic [W0:0] r_lo;
    #1;
    r    = {1'b0, a} + {1'b0, b} + (N+1)'(cin);
    r_lo = {1'b0, a[W0-1:0]} + {1'b0, b[W0-1:0]} + (W0+1)'(cin);
    checks++;
    if (sum !== r[N-1:0] || cout !== r[N]) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b sum=%h cout=%b", a, b, cin, sum, cout);
    end
    if (r_lo[W0]) n_cross1++; else n_cross0++;
    if ((a ^ b) == '1 && cin) n_full_prop++;
    if (r_lo[W0] && (a[N-1:W0] ^ b[N-1:W0]) == '1) n_ripple_all++;
    if (r[N]) n_cout++;
  endtask

  initial begin
    a = '0; b = '0; cin = 1'b0;
    check();
    // carry in through both stages
    a = rnd(); b = ~a; cin = 1'b1; check();
    a = '1;    b = '0; cin = 1'b1; check();
    // carry generated at bit 95 rippling through bits 127..96
    a = '0; b = '0; a[W0-1] = 1'b1; b[W0-1] = 1'b1; a[N-1:W0] = '1; cin = 1'b0; check();
    for (int n = 0; n < 20000; n++) begin
      a   = rnd();
      b   = rnd();
      cin = 1'($urandom_range(0, 1));
      case (n % 4)
        1: b = ~a;                                       // long propagate chains
        2: begin b[W0-1:0] = ~a[W0-1:0]; b[N-1:W0] = ~a[N-1:W0]; b[$urandom_range(0, N-1)] ^= 1'b1; end
        3: b[N-1:W0] = ~a[N-1:W0];                       // high stage all propagate
        default: ;
      endcase
      check();
    end
    if (n_cross1 == 0)     begin failures++; $display("FAIL no carry into the high stage"); end
    if (n_cross0 == 0)     begin failures++; $display("FAIL no blocked carry at the stage boundary"); end
    if (n_full_prop == 0)  begin failures++; $display("FAIL no full carry-in propagation"); end
    if (n_ripple_all == 0) begin failures++; $display("FAIL no ripple through the high stage"); end
    if (n_cout == 0)       begin failures++; $display("FAIL no carry out"); end
    $display("events: cross1=%0d cross0=%0d full_prop=%0d ripple_high=%0d cout=%0d",
             n_cross1, n_cross0, n_full_prop, n_ripple_all, n_cout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
