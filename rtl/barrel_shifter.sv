// barrel_shifter: 8-bit rotate-right barrel shifter made of 2:1 multiplexers.
//
// Three cascaded rotate_stage columns of eight mux2 cells each (24 muxes,
// n*log2(n) for n = 8). The first stage rotates right by 1 when S2 is high,
// the second by 2 when S1 is high, the third by 4 when S0 is high; a low
// select passes its stage's input straight through. Because the stages are
// independent, the total rotate amount is 4*S0 + 2*S1 + S2; e.g. S2 and S0
// together rotate by 5, and all selects low give q = d.
//
// Interface (names as in the published RTL view):
//   d[WIDTH-1:0]  data in (D7..D0)
//   s[STAGES-1:0] select lines, s[0] = S0 (weight 4), s[1] = S1 (weight 2),
//                 s[2] = S2 (weight 1)
//   q[WIDTH-1:0]  rotated data out (Q7..Q0)
// Timing: purely combinational, three mux delays from any input to q; the
// depth is the same for every shift amount.
//
// The stage order, select weights and rotate direction follow the published
// description and truth table. WIDTH may be raised to another power of two;
// select bit s[STAGES-1-j] then drives the stage that rotates by 2**j, which
// is this design's generalisation of the 8-bit select order.
module barrel_shifter #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned STAGES = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0]  d,
  input  logic [STAGES-1:0] s,
  output logic [WIDTH-1:0]  q
);

  // stage_data[j] is the input of stage j; stage_data[STAGES] is the result
  logic [WIDTH-1:0] stage_data [STAGES+1];

  assign stage_data[0] = d;

  for (genvar j = 0; j < STAGES; j++) begin : g_stage
    rotate_stage #(
      .WIDTH(WIDTH),
      .DIST (2 ** j)
    ) u_stage (
      .a (stage_data[j]),
      .en(s[STAGES-1-j]),
      .q (stage_data[j+1])
    );
  end

  assign q = stage_data[STAGES];

endmodule
