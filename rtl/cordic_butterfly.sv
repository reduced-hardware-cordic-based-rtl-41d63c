// cordic_butterfly: radix-2 decimation-in-frequency butterfly built from two
// reduced-hardware CORDICs.
//
// For inputs A = a0 + j*b0 and B = a1 + j*b1 and twiddle power tw
// (theta = 22.5 * tw degrees) it produces
//   sum  = (a0 + a1) + j*(b0 + b1)
//   diff = (A - B) * exp(-j*theta)
//        = [(a0-a1)cos(theta) + (b0-b1)sin(theta)]
//          + j*[(b0-b1)cos(theta) - (a0-a1)sin(theta)].
// One CORDIC rotates the real scalar (a0 - a1, 0) and returns
// ((a0-a1)cos, (a0-a1)sin); the other rotates (b0 - b1, 0). Both take the
// same twiddle power. A final adder and subtractor combine them into the
// clockwise product above, so the anticlockwise-only CORDIC serves the
// e^(-j theta) twiddle. This arrangement follows the design; registering
// the sums at start and the widths are this implementation's choices.
//
// Widths: DW-bit inputs; the sums are DW+1 bits; the CORDICs run at DW+2
// bits (room for |a0-a1| and the 1.0235 gain); diff outputs are DW+2 bits.
// Timing: start samples the inputs; done (both CORDIC stop bits) is high
// from 1 + k0 + k1 cycles later until the next start, with all outputs
// stable. sum_* is valid from the cycle after start.
module cordic_butterfly
  import fft16_pkg::*;
#(
  parameter int unsigned DW    = DEF_DW,
  parameter int unsigned GUARD = DEF_GUARD
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [TW_W-1:0]        tw,
  input  logic signed [DW-1:0]   a0,   // real part of upper input
  input  logic signed [DW-1:0]   b0,   // imaginary part of upper input
  input  logic signed [DW-1:0]   a1,   // real part of lower input
  input  logic signed [DW-1:0]   b1,   // imaginary part of lower input
  output logic signed [DW:0]     sum_re,
  output logic signed [DW:0]     sum_im,
  output logic signed [DW+1:0]   diff_re,
  output logic signed [DW+1:0]   diff_im,
  output logic                   done,
  output logic                   m,
  output logic                   rot_en
);

  localparam int unsigned CW = DW + 2;

  logic signed [CW-1:0] da, db;             // a0 - a1, b0 - b1
  logic signed [CW-1:0] ca_x, ca_y, cb_x, cb_y;
  logic stop_a, stop_b, m_b, rot_en_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_re <= '0;
      sum_im <= '0;
    end else if (start) begin
      sum_re <= (DW+1)'(a0) + (DW+1)'(a1);
      sum_im <= (DW+1)'(b0) + (DW+1)'(b1);
    end
  end

  assign da = CW'(a0) - CW'(a1);
  assign db = CW'(b0) - CW'(b1);

  rh_cordic #(.W(CW), .GUARD(GUARD)) u_cordic_a (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .zin    (tw),
    .x_in   (da),
    .y_in   ('0),
    .x_out  (ca_x),
    .y_out  (ca_y),
    .stop   (stop_a),
    .m      (m),
    .rot_en (rot_en)
  );

  rh_cordic #(.W(CW), .GUARD(GUARD)) u_cordic_b (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .zin    (tw),
    .x_in   (db),
    .y_in   ('0),
    .x_out  (cb_x),
    .y_out  (cb_y),
    .stop   (stop_b),
    .m      (m_b),
    .rot_en (rot_en_b)
  );

  assign diff_re = ca_x + cb_y;   // (a0-a1)cos + (b0-b1)sin
  assign diff_im = cb_x - ca_y;   // (b0-b1)cos - (a0-a1)sin
  assign done    = stop_a & stop_b;

  // Both CORDICs get the same twiddle power and run in lock step.
  a_lock_step: assert property (@(posedge clk) disable iff (!rst_n)
    stop_a == stop_b && m == m_b && rot_en == rot_en_b)
    else $error("cordic_butterfly: CORDICs out of step");

endmodule
