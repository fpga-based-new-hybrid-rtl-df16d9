// tb_cla_adder: self-checking testbench for cla_adder (carry lookahead adder).
//
// Builds the adder at widths 4, 8, 16, 32, 64, 93 and 128 and compares sum and carry out
// with the reference a + b + cin computed by the simulator's own arithmetic.
// Stimulus: every 4-bit operand pair with both carry ins, random operands,
// operands whose bits all propagate (b = ~a, the carry-in-to-carry-out path)
// and the vector shown on the adder's 128-bit simulation chart.
module tb_cla_adder;
  localparam int NW = 7;
  localparam int unsigned WS [NW] = '{4, 8, 16, 32, 64, 93, 128};

  logic [127:0] a, b;
  logic         cin;
  logic [127:0] s  [NW];
  logic         co [NW];
  logic go [NW];
  logic po [NW];

  int checks   = 0;
  int failures = 0;

  for (genvar k = 0; k < NW; k++) begin : g_dut
    logic [WS[k]-1:0] sk;
    cla_adder #(.N(WS[k])) u_dut (
      .a(a[WS[k]-1:0]), .b(b[WS[k]-1:0]), .cin(cin), .sum(sk), .cout(co[k]), .gout(go[k]), .pout(po[k])
    );
    assign s[k] = 128'(sk);
  end

  task automatic check_all();
    for (int k = 0; k < NW; k++) begin
      int unsigned W;
      logic [127:0] mask;
      logic [128:0] ref1, ref0;
      W    = WS[k];
      mask = (W == 128) ? '1 : ((128'd1 << W) - 1);
      ref1 = {1'b0, a & mask} + {1'b0, b & mask} + 129'(cin);
      ref0 = {1'b0, a & mask} + {1'b0, b & mask};
      checks++;
      if (s[k] !== (ref1[127:0] & mask) || co[k] !== ref1[W]) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=%0d a=%h b=%h cin=%b sum=%h cout=%b", W, a & mask, b & mask, cin, s[k], co[k]);
      end
      // group generate = carry out with carry in 0, group propagate = all p_i
      checks++;
      if (go[k] !== ref0[W] || po[k] !== (((a ^ b) & mask) == mask)) begin
        failures++;
        if (failures < 10) $display("FAIL gp N=%0d a=%h b=%h g=%b p=%b", W, a & mask, b & mask, go[k], po[k]);
      end
    end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    // exhaustive over 4-bit operands
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int z = 0; z < 2; z++) begin
          a = 128'(x); b = 128'(y); cin = z[0]; #1;
          check_all();
        end
    // operands and printed sum of the 128-bit simulation chart
    a = 128'hC; b = 128'h8; cin = 1'b1; #1;
    checks++;
    if (s[NW-1] !== 128'h15 || co[NW-1] !== 1'b0) begin
      failures++;
      $display("FAIL chart vector: sum=%h", s[NW-1]);
    end
    check_all();
    // corner cases
    a = '1; b = '0; cin = 1'b1; #1; check_all();
    a = '1; b = '1; cin = 1'b1; #1; check_all();
    a = '0; b = '0; cin = 1'b0; #1; check_all();
    // random, and fully propagating operands
    for (int n = 0; n < 3000; n++) begin
      a   = rnd128();
      b   = (n % 3 == 0) ? ~a : rnd128();
      cin = 1'($urandom_range(0, 1));
      if (n % 5 == 0) b[$urandom_range(0, 127)] ^= 1'b1;
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
