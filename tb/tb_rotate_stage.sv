// tb_rotate_stage: checks one multiplexer column at the three distances the
// 8-bit shifter uses (1, 2, 4) and at a 16-bit width with distance 8.
//
// Every input word is applied with the select low (expect the word unchanged)
// and high (expect it rotated right by the distance, computed here with
// shift operators). Combinational, 1 ns settling delay; watchdog included.
module tb_rotate_stage;

  logic [7:0]  a8;
  logic [15:0] a16;
  logic        en;
  logic [7:0]  q1, q2, q4;
  logic [15:0] q8;
  int          checks   = 0;
  int          failures = 0;

  rotate_stage #(.WIDTH(8),  .DIST(1)) dut1 (.a(a8),  .en(en), .q(q1));
  rotate_stage #(.WIDTH(8),  .DIST(2)) dut2 (.a(a8),  .en(en), .q(q2));
  rotate_stage #(.WIDTH(8),  .DIST(4)) dut4 (.a(a8),  .en(en), .q(q4));
  rotate_stage #(.WIDTH(16), .DIST(8)) dut8 (.a(a16), .en(en), .q(q8));

  function automatic logic [7:0] ror8(logic [7:0] v, int k);
    return (v >> k) | (v << (8 - k));
  endfunction

  task automatic check8(string name, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b en=%b: q=%b expected %b", name, a8, en, got, exp);
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
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 256; v++) begin
        en  = e[0];
        a8  = v[7:0];
        a16 = {v[7:0], ~v[7:0]} ^ 16'h5a3c;
        #1;
        check8("DIST=1", q1, en ? ror8(a8, 1) : a8);
        check8("DIST=2", q2, en ? ror8(a8, 2) : a8);
        check8("DIST=4", q4, en ? ror8(a8, 4) : a8);
        checks++;
        if (q8 !== (en ? {a16[7:0], a16[15:8]} : a16)) begin
          failures++;
          $display("FAIL WIDTH=16 a=%h en=%b: q=%h", a16, en, q8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
