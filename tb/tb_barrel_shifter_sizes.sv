// tb_barrel_shifter_sizes: runs the multiplexer barrel shifter at the four
// word sizes 8, 16, 32 and 64 bits (3, 4, 5 and 6 stages; 24, 64, 160 and
// 384 2:1 muxes). Each instance gets random words and select patterns and is
// compared with a rotate-right reference whose amount is the select vector
// read with s[0] as the most significant bit (for 8 bits: 4*S0 + 2*S1 + S2).
// Every instance also gets the all-low select (pass-through) and the single
// select of its first stage (rotate by 1). Watchdog included.
module tb_barrel_shifter_sizes;

  logic [7:0]  d8,  q8;
  logic [15:0] d16, q16;
  logic [31:0] d32, q32;
  logic [63:0] d64, q64;
  logic [2:0]  s8;
  logic [3:0]  s16;
  logic [4:0]  s32;
  logic [5:0]  s64;
  int          checks   = 0;
  int          failures = 0;

  barrel_shifter #(.WIDTH(8))  dut8  (.d(d8),  .s(s8),  .q(q8));
  barrel_shifter #(.WIDTH(16)) dut16 (.d(d16), .s(s16), .q(q16));
  barrel_shifter #(.WIDTH(32)) dut32 (.d(d32), .s(s32), .q(q32));
  barrel_shifter #(.WIDTH(64)) dut64 (.d(d64), .s(s64), .q(q64));

  // amount = select vector with its bit order reversed
  function automatic int amount(logic [5:0] s, int stages);
    int a = 0;
    for (int i = 0; i < stages; i++) a = 2 * a + int'(s[i]);
    return a;
  endfunction

  function automatic logic [63:0] ror(logic [63:0] v, int k, int w);
    logic [63:0] mask = (w == 64) ? '1 : ((64'd1 << w) - 1);
    return ((v >> k) | (v << (w - k))) & mask;
  endfunction

  task automatic check(int w, logic [63:0] d, logic [5:0] s, logic [63:0] q);
    int st = $clog2(w);
    logic [63:0] exp = ror(d, amount(s, st), w);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL WIDTH=%0d d=%h s=%b: q=%h expected %h", w, d, s, q, exp);
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
    for (int n = 0; n < 2002; n++) begin
      d8  = 8'($urandom);
      d16 = 16'($urandom);
      d32 = $urandom;
      d64 = {$urandom, $urandom};
      if (n == 0) begin
        s8 = '0; s16 = '0; s32 = '0; s64 = '0;
      end else if (n == 1) begin
        // first stage only: its select is the top bit
        s8 = 3'b100; s16 = 4'b1000; s32 = 5'b10000; s64 = 6'b100000;
      end else begin
        s8  = 3'($urandom);
        s16 = 4'($urandom);
        s32 = 5'($urandom);
        s64 = 6'($urandom);
      end
      #1;
      check(8,  64'(d8),  6'(s8),  64'(q8));
      check(16, 64'(d16), 6'(s16), 64'(q16));
      check(32, 64'(d32), 6'(s32), 64'(q32));
      check(64, d64,      s64,     q64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
