// tb_mux2: exhaustive check of the 2:1 multiplexer against its truth table.
//
// The eight rows (s, a, b -> y) are written out as constants, not derived
// from a conditional expression, and applied one at a time with a 1 ns
// settling delay. A watchdog ends the run with a failure if it hangs.
module tb_mux2;

  logic a, b, s, y;
  int   checks   = 0;
  int   failures = 0;

  mux2 dut (.a(a), .b(b), .s(s), .y(y));

  // rows of the truth table: {s, a, b, y}
  localparam logic [3:0] TABLE [8] = '{
    4'b000_0, 4'b001_0, 4'b010_1, 4'b011_1,
    4'b100_0, 4'b101_1, 4'b110_0, 4'b111_1
  };

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {s, a, b} = TABLE[r][3:1];
      #1;
      checks++;
      if (y !== TABLE[r][0]) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b: y=%b expected %b", s, a, b, y, TABLE[r][0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
