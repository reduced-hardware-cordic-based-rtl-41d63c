// twiddle_lut: the 8 x 4 rotation-count ROM of the reduced-hardware CORDIC.
//
// Instead of storing twiddle angles, the CORDIC stores for each twiddle power
// Zin (angle 22.5 * Zin degrees, Zin = 0..7) two 2-bit counts: k0, the number
// of atan(1) = 45 degree rotations, and k1, the number of atan(2^-3) = 7.125
// degree rotations. The table contents are the design's (k1 = 3 gives 21.375
// degrees as the stand-in for 22.5). All counts are non-negative, so the
// sign-magnitude storage the design calls for has no sign bit to hold and
// the entries are plain unsigned 2-bit magnitudes.
//
// Interface: zin (3 bits) in, k = {k0, k1} out. Purely combinational.
module twiddle_lut
  import fft16_pkg::*;
(
  input  logic [TW_W-1:0] zin,
  output rot_count_t      k
);

  always_comb begin
    unique case (zin)
      3'd0: k = '{k0: 2'd0, k1: 2'd0};   //   0.0 degrees
      3'd1: k = '{k0: 2'd0, k1: 2'd3};   //  22.5
      3'd2: k = '{k0: 2'd1, k1: 2'd0};   //  45.0
      3'd3: k = '{k0: 2'd1, k1: 2'd3};   //  67.5
      3'd4: k = '{k0: 2'd2, k1: 2'd0};   //  90.0
      3'd5: k = '{k0: 2'd2, k1: 2'd3};   // 112.5
      3'd6: k = '{k0: 2'd3, k1: 2'd0};   // 135.0
      3'd7: k = '{k0: 2'd3, k1: 2'd3};   // 157.5
      default: k = '{k0: 2'd0, k1: 2'd0};
    endcase
  end

endmodule
