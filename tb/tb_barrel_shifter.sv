// tb_barrel_shifter: checks the 8-bit multiplexer barrel shifter.
//
// 1. The published truth table: input 00001111 under all eight select
//    combinations, expected outputs written out as constants.
// 2. The published waveform point: s[2:0] = 011 on 00001111 gives 00111100.
// 3. All 256 inputs under all 8 selects against a rotate-right reference,
//    amount = 4*s[0] + 2*s[1] + s[2].
// 4. A 16-bit instance (4 stages) with random words, amount = bit-reversed s.
// Combinational, 1 ns settling delay; watchdog included.
module tb_barrel_shifter;

  logic [7:0]  d, q;
  logic [2:0]  s;
  logic [15:0] d16, q16;
  logic [3:0]  s16;
  int          checks   = 0;
  int          failures = 0;

  barrel_shifter dut (.d(d), .s(s), .q(q));
  barrel_shifter #(.WIDTH(16)) dut16 (.d(d16), .s(s16), .q(q16));

  // truth table rows: {S0, S1, S2} and the output for d = 00001111
  localparam logic [2:0] T_SEL [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                                       3'b100, 3'b101, 3'b110, 3'b111};
  localparam logic [7:0] T_Q   [8] = '{8'b00001111, 8'b10000111,
                                       8'b11000011, 8'b11100001,
                                       8'b11110000, 8'b01111000,
                                       8'b00111100, 8'b00011110};

  task automatic check(string what, logic [7:0] exp);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s d=%b s=%b: q=%b expected %b", what, d, s, q, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. truth table; the row is {S0,S1,S2}, s[0] = S0
    for (int r = 0; r < 8; r++) begin
      d = 8'b00001111;
      s = {T_SEL[r][0], T_SEL[r][1], T_SEL[r][2]};
      #1;
      check("truth table", T_Q[r]);
    end
    // 2. waveform point
    d = 8'b00001111;
    s = 3'b011;
    #1;
    check("waveform", 8'b00111100);
    // 3. exhaustive
    for (int v = 0; v < 256; v++) begin
      for (int k = 0; k < 8; k++) begin
        int amt;
        d   = v[7:0];
        s   = k[2:0];
        amt = 4 * s[0] + 2 * s[1] + s[2];
        #1;
        check("exhaustive", 8'((d >> amt) | (d << (8 - amt))));
      end
    end
    // 4. 16-bit instance
    for (int n = 0; n < 512; n++) begin
      int amt;
      d16 = 16'($urandom);
      s16 = 4'($urandom);
      amt = 8 * s16[0] + 4 * s16[1] + 2 * s16[2] + s16[3];
      #1;
      checks++;
      if (q16 !== 16'((d16 >> amt) | (d16 << (16 - amt)))) begin
        failures++;
        $display("FAIL WIDTH=16 d=%h s=%b: q=%h", d16, s16, q16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
