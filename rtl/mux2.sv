// mux2: single-bit 2:1 multiplexer, the only cell the barrel shifter is
// built from.
//
// Function (as in the published truth table): y = a when s = 0, y = b when
// s = 1. It is written at gate level with two AND gates, one OR gate and one
// inverter, the straightforward realisation the design calls for.
//
// Interface: a, b data inputs; s select; y output. Purely combinational.
module mux2 (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic y
);

  logic s_n;
  logic a_sel;
  logic b_sel;

  assign s_n   = ~s;
  assign a_sel = a & s_n;
  assign b_sel = b & s;
  assign y     = a_sel | b_sel;

endmodule
