// rh_cordic: reduced-hardware CORDIC rotator (rotation mode).
//
// Rotates the vector (x_in, y_in) anticlockwise by the twiddle angle
// 22.5 * zin degrees, approximated as k0 * atan(1) + k1 * atan(2^-3), where
// k0 and k1 come from the 8 x 4 look-up table. Only two elementary angles
// are used and the direction is always anticlockwise, so there is no angle
// accumulator, no direction multiplexer and no barrel shifter: one
// subtractor, one adder, fixed shifts by 3 and four 2:1 multiplexers.
//
//   m = 0 (45 degree step):        x' = S*(x - y),     y' = S*(y + x)
//   m = 1 (atan(1/8) step):        x' = x - y/8,       y' = y + x/8
//
// M0/M1 select y or y/8 and x or x/8 for the subtractor and adder; M2/M3
// select the scaled (m = 0) or unscaled (m = 1) result, which is fed back
// into the X/Y registers. S = 0.707 (cordic_scaler). The gain of the
// atan(1/8) steps, sqrt(1 + 1/64) = 1.0078 per step, is left uncorrected,
// as the scaler acts only on the 45 degree steps; zin = 1 therefore
// rotates by 21.375 degrees with gain 1.0235.
//
// Structure, table and iteration order follow the design. This
// implementation's own choices: the load on start, GUARD fractional bits and
// one extra integer bit in the X/Y registers, truncating output (arithmetic
// shift right by GUARD), and the exact timing of cordic_fsm.
//
// Timing: start (with zin, x_in, y_in) sampled at edge 0; one rotation per
// clock; stop is high from edge k0+k1+1 until the next start, while x_out
// and y_out hold the result. Latency 1 + k0 + k1 cycles (1 .. 7).
// Outputs m and rot_en expose the state machine for observation.
module rh_cordic
  import fft16_pkg::*;
#(
  parameter int unsigned W     = 18,        // input/output width (signed)
  parameter int unsigned GUARD = DEF_GUARD  // fractional guard bits
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [TW_W-1:0]     zin,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic                stop,
  output logic                m,
  output logic                rot_en
);

  localparam int unsigned IW = W + GUARD + 1;

  rot_count_t k;
  logic signed [IW-1:0] x_q, y_q;
  logic signed [IW-1:0] y_sel, x_sel;     // M0, M1 outputs
  logic signed [IW-1:0] x_diff, y_sum;    // subtractor, adder
  logic signed [IW-1:0] x_scl, y_scl;     // scaler outputs
  logic signed [IW-1:0] x_nxt, y_nxt;     // M2, M3 outputs
  logic signed [W+GUARD:0] x_sh, y_sh;

  twiddle_lut u_lut (
    .zin (zin),
    .k   (k)
  );

  cordic_fsm u_fsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .k      (k),
    .m      (m),
    .rot_en (rot_en),
    .stop   (stop)
  );

  always_comb begin
    y_sel  = m ? (y_q >>> 3) : y_q;   // M0
    x_sel  = m ? (x_q >>> 3) : x_q;   // M1
    x_diff = x_q - y_sel;
    y_sum  = y_q + x_sel;
  end

  cordic_scaler #(.W(IW)) u_scl_x (.d(x_diff), .q(x_scl));
  cordic_scaler #(.W(IW)) u_scl_y (.d(y_sum),  .q(y_scl));

  assign x_nxt = m ? x_diff : x_scl;  // M2
  assign y_nxt = m ? y_sum  : y_scl;  // M3

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
    end else if (start) begin
      x_q <= IW'(x_in) <<< GUARD;
      y_q <= IW'(y_in) <<< GUARD;
    end else if (rot_en) begin
      x_q <= x_nxt;
      y_q <= y_nxt;
    end
  end

  assign x_sh  = x_q >>> GUARD;
  assign y_sh  = y_q >>> GUARD;
  assign x_out = x_sh[W-1:0];
  assign y_out = y_sh[W-1:0];

endmodule
