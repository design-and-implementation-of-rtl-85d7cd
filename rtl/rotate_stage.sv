// rotate_stage: one column of the multiplexer cascade, a conditional
// rotate-right by a fixed distance.
//
// WIDTH mux2 cells share the select en. Cell i passes input bit i when en is
// low and input bit (i + DIST) mod WIDTH when en is high, so with en high the
// word is rotated right by DIST places: bits leaving the LSB end re-enter at
// the MSB end and none are lost. The first stage of the 8-bit shifter uses
// DIST = 1 ("next-lower" input), the second DIST = 2, the third DIST = 4.
// Which mux pin takes the straight bit is this design's choice (pin a).
//
// Interface: a[WIDTH-1:0] in, en select, q[WIDTH-1:0] out. Combinational.
module rotate_stage #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DIST  = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    mux2 u_mux (
      .a(a[i]),
      .b(a[(i + DIST) % WIDTH]),
      .s(en),
      .y(q[i])
    );
  end

endmodule
