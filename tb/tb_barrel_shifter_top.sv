// tb_barrel_shifter_top: end-to-end test of the top level at its default
// size (8 bits), with no parameter overrides.
//
// Rotator path (d, s, q): the published truth table, then every word under
// every select pattern against a rotate-right reference. Shift/rotate path
// (su_*): every word, amount and operation code against a reference built
// from shift operators, with the rotator driven by unrelated random data at
// the same time to show the two paths are independent.
// Mechanism counters: pass-through (all selects low), each select line
// S0/S1/S2 rotating on its own, all three together, and each of the six
// operations with a non-zero amount. A mechanism never exercised counts as a
// failure. Combinational, 1 ns settling delay; watchdog included.
module tb_barrel_shifter_top;
  import shifter_pkg::*;

  logic [7:0] d, q, su_d, su_q;
  logic [2:0] s, su_amt;
  shift_op_t  su_op;
  int         checks   = 0;
  int         failures = 0;

  // mechanism counters
  int n_pass, n_s0, n_s1, n_s2, n_all;
  int n_srl, n_sra, n_ror, n_sll, n_sla, n_rol;

  barrel_shifter_top dut (
    .d(d), .s(s), .q(q),
    .su_d(su_d), .su_amt(su_amt), .su_op(su_op), .su_q(su_q)
  );

  function automatic logic [7:0] ror(logic [7:0] v, int k);
    return (v >> k) | (v << (8 - k));
  endfunction

  function automatic logic [7:0] su_ref(logic [7:0] v, int k, shift_op_t o);
    if (o.rotate) return o.left ? ((v << k) | (v >> (8 - k))) : ror(v, k);
    if (o.left) begin
      logic [7:0] r = v << k;
      if (o.arith) r[7] = v[7];
      return r;
    end
    return o.arith ? 8'($signed(v) >>> k) : (v >> k);
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (d=%b s=%b su_d=%b amt=%0d op=%b)",
               what, got, exp, d, s, su_d, su_amt, su_op);
    end
  endtask

  task automatic count_rotator();
    case (s)
      3'b000:  n_pass++;
      3'b001:  n_s0++;
      3'b010:  n_s1++;
      3'b100:  n_s2++;
      3'b111:  n_all++;
      default: ;
    endcase
  endtask

  task automatic count_unit();
    if (su_amt == 0) return;
    if (su_op.rotate) begin
      if (su_op.left) n_rol++; else n_ror++;
    end else if (su_op.left) begin
      if (su_op.arith) n_sla++; else n_sll++;
    end else begin
      if (su_op.arith) n_sra++; else n_srl++;
    end
  endtask

  task automatic require(string name, int n);
    checks++;
    $display("mechanism %-26s exercised %0d times", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam logic [7:0] T_Q [8] = '{8'b00001111, 8'b10000111,
                                       8'b11000011, 8'b11100001,
                                       8'b11110000, 8'b01111000,
                                       8'b00111100, 8'b00011110};
    {n_pass, n_s0, n_s1, n_s2, n_all} = '0;
    {n_srl, n_sra, n_ror, n_sll, n_sla, n_rol} = '0;
    su_d = '0; su_amt = '0; su_op = '0;

    // rotator: published truth table, row index = {S0, S1, S2}
    for (int r = 0; r < 8; r++) begin
      d = 8'b00001111;
      s = {r[0], r[1], r[2]};  // s[0] = S0 = r[2], s[2] = S2 = r[0]
      #1;
      count_rotator();
      check("rotator truth table", q, T_Q[r]);
    end

    // both paths together, exhaustive on each
    for (int v = 0; v < 256; v++) begin
      for (int k = 0; k < 8; k++) begin
        for (int o = 0; o < 8; o++) begin
          su_d   = v[7:0];
          su_amt = k[2:0];
          su_op  = shift_op_t'(o[2:0]);
          d      = (o == 0) ? v[7:0] : 8'($urandom);
          s      = (o == 0) ? k[2:0] : 3'($urandom);
          #1;
          count_rotator();
          count_unit();
          check("rotator", q, ror(d, 4 * s[0] + 2 * s[1] + s[2]));
          check("shift unit", su_q, su_ref(su_d, k, su_op));
        end
      end
    end

    require("rotator pass-through", n_pass);
    require("rotate by 4 (S0 only)", n_s0);
    require("rotate by 2 (S1 only)", n_s1);
    require("rotate by 1 (S2 only)", n_s2);
    require("rotate by 7 (all selects)", n_all);
    require("shift right logical", n_srl);
    require("shift right arithmetic", n_sra);
    require("rotate right", n_ror);
    require("shift left logical", n_sll);
    require("shift left arithmetic", n_sla);
    require("rotate left", n_rol);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
