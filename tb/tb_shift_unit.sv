// tb_shift_unit: checks the six operations of the shift/rotate unit.
//
// 1. The published 3-place examples: with the word written MSB first as
//    d0..d7, each result is built here by picking bits by name.
// 2. Every input word, amount and operation code (including the don't-care
//    arithmetic bit of the rotates) against a reference made of SystemVerilog
//    shift operators.
// 3. A 16-bit instance with random words, amounts and codes.
// Combinational, 1 ns settling delay; watchdog included.
module tb_shift_unit;
  import shifter_pkg::*;

  logic [7:0] d, q;
  logic [2:0] amt;
  shift_op_t  op;
  int         checks   = 0;
  int         failures = 0;

  logic [15:0] d16, q16;
  logic [3:0]  amt16;

  shift_unit dut (.d(d), .amt(amt), .op(op), .q(q));
  shift_unit #(.WIDTH(16)) dut16 (.d(d16), .amt(amt16), .op(op), .q(q16));

  function automatic logic [15:0] reference16(logic [15:0] v, int k, shift_op_t o);
    if (o.rotate) begin
      if (o.left) return (v << k) | (v >> (16 - k));
      else        return (v >> k) | (v << (16 - k));
    end
    if (o.left) begin
      logic [15:0] r = v << k;
      if (o.arith) r[15] = v[15];
      return r;
    end
    if (o.arith) return 16'($signed(v) >>> k);
    return v >> k;
  endfunction

  function automatic logic [7:0] reference(logic [7:0] v, int k, shift_op_t o);
    if (o.rotate) begin
      if (o.left) return (v << k) | (v >> (8 - k));
      else        return (v >> k) | (v << (8 - k));
    end
    if (o.left) begin
      logic [7:0] r = v << k;
      if (o.arith) r[7] = v[7];
      return r;
    end
    if (o.arith) return 8'($signed(v) >>> k);
    return v >> k;
  endfunction

  task automatic check(string what, logic [7:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s d=%b amt=%0d op=%b: q=%b expected %b",
               what, d, amt, op, q, exp);
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
    logic b0, b1, b2, b3, b4, b5, b6, b7;
    // 1. published examples, amount 3; d = d0 d1 ... d7 with d0 the MSB
    for (int n = 0; n < 64; n++) begin
      d   = 8'($urandom);
      amt = 3'd3;
      {b0, b1, b2, b3, b4, b5, b6, b7} = d;
      op = '{left: 1'b0, rotate: 1'b0, arith: 1'b0}; #1;
      check("example srl", {3'b000, b0, b1, b2, b3, b4});
      op = '{left: 1'b0, rotate: 1'b0, arith: 1'b1}; #1;
      check("example sra", {b0, b0, b0, b0, b1, b2, b3, b4});
      op = '{left: 1'b0, rotate: 1'b1, arith: 1'b0}; #1;
      check("example ror", {b5, b6, b7, b0, b1, b2, b3, b4});
      op = '{left: 1'b1, rotate: 1'b0, arith: 1'b0}; #1;
      check("example sll", {b3, b4, b5, b6, b7, 3'b000});
      op = '{left: 1'b1, rotate: 1'b0, arith: 1'b1}; #1;
      check("example sla", {b0, b4, b5, b6, b7, 3'b000});
      op = '{left: 1'b1, rotate: 1'b1, arith: 1'b0}; #1;
      check("example rol", {b3, b4, b5, b6, b7, b0, b1, b2});
    end
    // 2. exhaustive
    for (int v = 0; v < 256; v++) begin
      for (int k = 0; k < 8; k++) begin
        for (int o = 0; o < 8; o++) begin
          d   = v[7:0];
          amt = k[2:0];
          op  = shift_op_t'(o[2:0]);
          #1;
          check("exhaustive", reference(d, k, op));
        end
      end
    end
    // 3. 16-bit instance
    for (int n = 0; n < 4096; n++) begin
      d16   = 16'($urandom);
      amt16 = 4'($urandom);
      op    = shift_op_t'(3'($urandom));
      #1;
      checks++;
      if (q16 !== reference16(d16, int'(amt16), op)) begin
        failures++;
        $display("FAIL WIDTH=16 d=%h amt=%0d op=%b: q=%h", d16, amt16, op, q16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
