// cordic_scaler: constant scaling by S = 0.707 with shifts and add/subtract.
//
// A 45 degree CORDIC step (x - y, y + x) grows the vector by sqrt(2); the
// scaler restores the magnitude. S is realised as 181/256 = 0.70703
// = (128 + 64 - 8 - 2 - 1) / 256, i.e. two additions and three
// subtractions of shifted copies of the input, accumulated at full
// precision and then shifted right by 8 (arithmetic shift, rounding toward
// minus infinity). The value 0.707 and the shift-add-subtract structure are
// the design's; the particular bit pattern is this implementation's choice.
//
// Interface: signed W-bit d in, signed W-bit q out. Combinational.
module cordic_scaler #(
  parameter int unsigned W = 20
) (
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  localparam int unsigned EW = W + 9;   // room for d * 192 before the shift

  logic signed [EW-1:0] de, acc, shifted;

  always_comb begin
    de      = EW'(d);
    acc     = (de <<< 7) + (de <<< 6) - (de <<< 3) - (de <<< 1) - de;
    shifted = acc >>> 8;
    q       = shifted[W-1:0];
  end

endmodule
