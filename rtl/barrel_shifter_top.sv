// barrel_shifter_top: top level with two independent datapaths side by side.
//
//  * The 8-bit multiplexer barrel shifter (d, s, q): rotates d right by
//    4*s[0] + 2*s[1] + s[2] places through three stages of 2:1 muxes. This
//    is the published circuit with its published port names.
//  * The shift/rotate unit (su_d, su_amt, su_op, su_q): shift right or left,
//    logical or arithmetic, or rotate right or left, by su_amt places, chosen
//    by the {left, rotate, arithmetic} operation code. It contains its own
//    copy of the barrel shifter.
// The two share no signals; they are brought out separately so that the
// rotator keeps exactly its published interface. Purely combinational: no
// clock and no reset.
module barrel_shifter_top
  import shifter_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(WIDTH)
) (
  // multiplexer barrel shifter (rotate right)
  input  logic [WIDTH-1:0] d,
  input  logic [AW-1:0]    s,
  output logic [WIDTH-1:0] q,
  // shift/rotate unit
  input  logic [WIDTH-1:0] su_d,
  input  logic [AW-1:0]    su_amt,
  input  shift_op_t        su_op,
  output logic [WIDTH-1:0] su_q
);

  barrel_shifter #(
    .WIDTH (WIDTH),
    .STAGES(AW)
  ) u_barrel_shifter (
    .d(d),
    .s(s),
    .q(q)
  );

  shift_unit #(
    .WIDTH(WIDTH)
  ) u_shift_unit (
    .d  (su_d),
    .amt(su_amt),
    .op (su_op),
    .q  (su_q)
  );

endmodule
