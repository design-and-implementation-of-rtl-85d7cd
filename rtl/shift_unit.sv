// shift_unit: shift and rotate unit with the 3-bit {left, rotate, arithmetic}
// operation code, built around the multiplexer barrel shifter.
//
// Operations (amount k = amt, data written MSB first as d0 d1 ... d7):
//   shift right logical     k zeros, then the top WIDTH-k bits
//   shift right arithmetic  k copies of the sign bit d0, then the top bits
//   rotate right / left     bits leaving one end re-enter at the other
//   shift left logical      the low WIDTH-k bits, then k zeros
//   shift left arithmetic   as shift left logical, but the sign bit d0 stays
//                           in the MSB (e.g. k = 3 gives d0 d4 d5 d6 d7 0 0 0)
// The operation set and the results follow the published examples; how they
// are produced is this design's choice:
//   1. For a left operation the word is bit-reversed, so every operation
//      becomes a right shift or rotate.
//   2. The rotate-right barrel_shifter rotates it by amt (amt is binary and
//      is reordered into the shifter's select order, S0 = weight 4).
//   3. For a shift, the k bits that wrapped into the top of the word are
//      replaced by the fill bit: 0, or the sign bit for an arithmetic right
//      shift.
//   4. A left result is reversed back; for shift left arithmetic the MSB is
//      then forced to the input's sign bit.
//
// Interface: d[WIDTH-1:0], amt[$clog2(WIDTH)-1:0], op (shifter_pkg::
// shift_op_t), q[WIDTH-1:0]. Purely combinational.
module shift_unit
  import shifter_pkg::*;
#(
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] d,
  input  logic [AW-1:0]    amt,
  input  shift_op_t        op,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] x;        // word in right-shift orientation
  logic [AW-1:0]    sel;      // amt in barrel_shifter select order
  logic [WIDTH-1:0] rot;      // x rotated right by amt
  logic [WIDTH-1:0] shifted;  // rot with wrapped bits replaced by fill
  logic             fill;

  // bit-reverse for left operations
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      x[i] = op.left ? d[WIDTH-1-i] : d[i];
    end
  end

  // amt bit b carries weight 2**b; the shifter's s[AW-1-b] has that weight
  always_comb begin
    for (int b = 0; b < AW; b++) begin
      sel[AW-1-b] = amt[b];
    end
  end

  barrel_shifter #(
    .WIDTH (WIDTH),
    .STAGES(AW)
  ) u_rotator (
    .d(x),
    .s(sel),
    .q(rot)
  );

  // fill: sign bit only for an arithmetic right shift
  assign fill = op.arith & ~op.left & d[WIDTH-1];

  // bit i of rot came from x[(i + amt) mod WIDTH]; it wrapped when
  // i >= WIDTH - amt, i.e. it lies in the top amt positions
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      if (!op.rotate && (i + 32'(amt) >= WIDTH)) begin
        shifted[i] = fill;
      end else begin
        shifted[i] = rot[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      q[i] = op.left ? shifted[WIDTH-1-i] : shifted[i];
    end
    if (op.left && !op.rotate && op.arith) begin
      q[WIDTH-1] = d[WIDTH-1];
    end
  end

endmodule
