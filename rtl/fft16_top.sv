// fft16_top: 16-point radix-2 FFT processor built on the reduced-hardware
// CORDIC.
//
// Samples enter one per cycle through a valid/ready handshake and are stored
// in a 16-word in-place data memory. A single CORDIC butterfly
// (decimation in frequency: sum, and difference rotated by W16^tw) is then
// applied 32 times, 4 stages of 8, under the controller and its address
// generator. Each twiddle rotation is done by the reduced-hardware CORDIC
// with k0 steps of 45 degrees and k1 steps of atan(1/8), read from an 8 x 4
// table of rotation counts instead of a table of angles. Finally the 16
// results are read out in natural order.
//
// Arithmetic: DW-bit two's complement samples; no scaling between stages, and
// butterfly results are truncated to DW bits (wrap-around) when written
// back, so inputs must satisfy |re|, |im| < 2^(DW-1) / 17 to avoid
// overflow (gain 16 of the transform, 1.0235 of the 22.5 degree rotation).
// The twiddle angles are approximate (22.5 degrees is realised as 21.375),
// as in the design's rotation-count table.
//
// Interface: in_valid/in_ready/in_re/in_im (16 samples, natural order);
// out_valid/out_idx/out_last/out_re/out_im (16 results X[0]..X[15] in
// consecutive cycles, no back-pressure); busy during the butterfly passes, with
// stage giving the current stage 0..3.
// Timing per transform: 16 load cycles, sum over the 32 butterflies of
// (2 + k0 + k1) compute cycles (108 in total), 16 output cycles.
module fft16_top
  import fft16_pkg::*;
#(
  parameter int unsigned DW    = DEF_DW,
  parameter int unsigned GUARD = DEF_GUARD
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [DW-1:0]  in_re,
  input  logic signed [DW-1:0]  in_im,
  output logic                  out_valid,
  output logic                  out_last,
  output logic [ADDR_W-1:0]     out_idx,
  output logic signed [DW-1:0]  out_re,
  output logic signed [DW-1:0]  out_im,
  output logic                  busy,
  output logic [1:0]            stage
);

  logic [ADDR_W-1:0] rd_addr_a, rd_addr_b, wr_addr_a, wr_addr_b;
  logic              wr_en_a, wr_en_b, wr_sel_load;
  logic signed [DW-1:0] rd_re_a, rd_im_a, rd_re_b, rd_im_b;
  logic signed [DW-1:0] wr_re_a, wr_im_a, wr_re_b, wr_im_b;
  logic              bf_start, bf_done;
  logic [TW_W-1:0]   bf_tw;
  logic signed [DW:0]   sum_re, sum_im;
  logic signed [DW+1:0] diff_re, diff_im;

  fft_controller u_ctl (
    .clk         (clk),
    .rst_n       (rst_n),
    .in_valid    (in_valid),
    .in_ready    (in_ready),
    .out_valid   (out_valid),
    .out_last    (out_last),
    .out_idx     (out_idx),
    .rd_addr_a   (rd_addr_a),
    .rd_addr_b   (rd_addr_b),
    .wr_en_a     (wr_en_a),
    .wr_sel_load (wr_sel_load),
    .wr_addr_a   (wr_addr_a),
    .wr_en_b     (wr_en_b),
    .wr_addr_b   (wr_addr_b),
    .bf_start    (bf_start),
    .bf_tw       (bf_tw),
    .bf_done     (bf_done),
    .busy        (busy),
    .stage       (stage)
  );

  fft_data_mem #(.DW(DW)) u_mem (
    .clk       (clk),
    .rd_addr_a (rd_addr_a),
    .rd_re_a   (rd_re_a),
    .rd_im_a   (rd_im_a),
    .rd_addr_b (rd_addr_b),
    .rd_re_b   (rd_re_b),
    .rd_im_b   (rd_im_b),
    .wr_en_a   (wr_en_a),
    .wr_addr_a (wr_addr_a),
    .wr_re_a   (wr_re_a),
    .wr_im_a   (wr_im_a),
    .wr_en_b   (wr_en_b),
    .wr_addr_b (wr_addr_b),
    .wr_re_b   (wr_re_b),
    .wr_im_b   (wr_im_b)
  );

  cordic_butterfly #(.DW(DW), .GUARD(GUARD)) u_bfly (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (bf_start),
    .tw      (bf_tw),
    .a0      (rd_re_a),
    .b0      (rd_im_a),
    .a1      (rd_re_b),
    .b1      (rd_im_b),
    .sum_re  (sum_re),
    .sum_im  (sum_im),
    .diff_re (diff_re),
    .diff_im (diff_im),
    .done    (bf_done),
    .m       (),
    .rot_en  ()
  );

  // Port A writes either the incoming sample or the butterfly sum; port B
  // the rotated difference. Results are truncated to DW bits.
  assign wr_re_a = wr_sel_load ? in_re : sum_re[DW-1:0];
  assign wr_im_a = wr_sel_load ? in_im : sum_im[DW-1:0];
  assign wr_re_b = diff_re[DW-1:0];
  assign wr_im_b = diff_im[DW-1:0];

  assign out_re = rd_re_a;
  assign out_im = rd_im_a;

endmodule
