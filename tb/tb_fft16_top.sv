// tb_fft16_top: end-to-end test of the 16-point FFT processor at its
// default parameters.
//
// Transforms, back to back, with random gaps in the input stream:
//   - a constant: X[0] = 16*c and all other bins exactly 0;
//   - an impulse at n = 0: every bin exactly equal to the impulse;
//   - random complex inputs within the no-overflow range |x| < 2^15/17.
// Each result is compared with a floating-point radix-2 DIF model that uses
// the twiddles the CORDIC actually realises (angle k0*45 + k1*atan(1/8)
// degrees, gain (sqrt(2)*181/256)^k0 * sqrt(1+1/64)^k1), within a tolerance
// for the fixed-point truncation. The distance to the exact DFT is also
// reported. Cycle counts are checked: compute phase = sum over the 32
// butterflies of 2 + k0 + k1 cycles, 16 consecutive output cycles.
// The testbench counts how often each mechanism occurred (45 degree steps
// through the scaler, atan(1/8) steps, every twiddle power 0..7, butterflies
// with no rotation, input stalls, transform completions) and counts a
// failure for any that never happened.
module tb_fft16_top;
  import fft16_pkg::*;
  localparam int  DW  = DEF_DW;
  localparam real PI  = 3.14159265358979;
  localparam real TOL = 12.0;
  localparam int  N_RANDOM = 20;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_last, busy;
  logic signed [DW-1:0] in_re, in_im, out_re, out_im;
  logic [3:0] out_idx;
  logic [1:0] stage;
  int checks = 0, failures = 0;
  real max_model_err = 0.0;

  fft16_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_re(in_re), .in_im(in_im), .out_valid(out_valid), .out_last(out_last),
    .out_idx(out_idx), .out_re(out_re), .out_im(out_im), .busy(busy),
    .stage(stage));

  always #5 clk = ~clk;

  // Mechanism counters, taken from inside the design.
  int n_rot45 = 0, n_rot7 = 0, n_norot = 0, n_stall = 0, n_done = 0;
  int n_tw [8];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_bfly.rot_en && !dut.u_bfly.m) n_rot45++;
    if (dut.u_bfly.rot_en &&  dut.u_bfly.m) n_rot7++;
    if (dut.bf_start) begin
      n_tw[dut.bf_tw]++;
      if (dut.bf_tw == 3'd0) n_norot++;
    end
    if (in_ready && !in_valid) n_stall++;
    if (out_valid && out_last) n_done++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Floating-point DIF model with the realised twiddles.
  task automatic model(input real xr [16], input real xi [16],
                       output real yr [16], output real yi [16]);
    real ar [16], ai [16];
    ar = xr; ai = xi;
    for (int s = 0; s < 4; s++) begin
      int span;
      span = 8 >> s;
      for (int g = 0; g < 8 / span; g++)
        for (int pos = 0; pos < span; pos++) begin
          int p, q, t, k0, k1;
          real phi, gn, dr, di;
          p = g * 2 * span + pos;
          q = p + span;
          t = pos * 16 / (2 * span);
          k0 = t / 2; k1 = 3 * (t % 2);
          phi = k0 * PI / 4.0 + k1 * $atan(0.125);
          gn  = ($sqrt(2.0) * 181.0 / 256.0) ** k0 * $sqrt(1.0 + 1.0 / 64.0) ** k1;
          dr = ar[p] - ar[q];
          di = ai[p] - ai[q];
          ar[p] = ar[p] + ar[q];
          ai[p] = ai[p] + ai[q];
          ar[q] = gn * (dr * $cos(phi) + di * $sin(phi));
          ai[q] = gn * (di * $cos(phi) - dr * $sin(phi));
        end
    end
    for (int k = 0; k < 16; k++) begin
      int r;
      r = ((k & 1) << 3) | ((k & 2) << 1) | ((k & 4) >> 1) | ((k & 8) >> 3);
      yr[k] = ar[r];
      yi[k] = ai[r];
    end
  endtask

  task automatic transform(input int xr [16], input int xi [16], input bit exact,
                           input int want_r [16], input int want_i [16]);
    real fr [16], fi [16], mr [16], mi [16];
    real dft_err, e;
    int n, cyc, want_cyc;
    for (int i = 0; i < 16; i++) begin
      fr[i] = real'(xr[i]);
      fi[i] = real'(xi[i]);
    end
    model(fr, fi, mr, mi);
    // load with random stalls
    n = 0;
    while (n < 16) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_re = DW'(xr[n]);
      in_im = DW'(xi[n]);
      #1;
      check(in_ready, "ready while loading");
      if (in_valid) n++;
    end
    @(negedge clk);
    in_valid = 0;
    // compute time, from the reference schedule
    want_cyc = 0;
    for (int s = 0; s < 4; s++)
      for (int j = 0; j < 8; j++) begin
        int span, t;
        span = 8 >> s;
        t = (j % span) * 16 / (2 * span);
        want_cyc += 2 + t / 2 + 3 * (t % 2);
      end
    cyc = 0;
    while (!out_valid && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == want_cyc, $sformatf("compute cycles %0d want %0d", cyc, want_cyc));
    // results
    dft_err = 0.0;
    for (int k = 0; k < 16; k++) begin
      real tr, ti;
      check(out_valid && out_idx == 4'(k) && out_last == (k == 15),
            $sformatf("output framing at %0d", k));
      if (exact)
        check(out_re == DW'(want_r[k]) && out_im == DW'(want_i[k]),
              $sformatf("X[%0d] = (%0d,%0d) want (%0d,%0d)", k, out_re, out_im,
                        want_r[k], want_i[k]));
      else begin
        if (fabs(real'(out_re) - mr[k]) > max_model_err) max_model_err = fabs(real'(out_re) - mr[k]);
        if (fabs(real'(out_im) - mi[k]) > max_model_err) max_model_err = fabs(real'(out_im) - mi[k]);
        check(fabs(real'(out_re) - mr[k]) <= TOL && fabs(real'(out_im) - mi[k]) <= TOL,
              $sformatf("X[%0d] = (%0d,%0d) model (%f,%f)", k, out_re, out_im, mr[k], mi[k]));
      end
      tr = 0.0; ti = 0.0;
      for (int i = 0; i < 16; i++) begin
        tr += fr[i] * $cos(2.0 * PI * i * k / 16.0) + fi[i] * $sin(2.0 * PI * i * k / 16.0);
        ti += fi[i] * $cos(2.0 * PI * i * k / 16.0) - fr[i] * $sin(2.0 * PI * i * k / 16.0);
      end
      e = $sqrt((tr - out_re) ** 2 + (ti - out_im) ** 2);
      if (e > dft_err) dft_err = e;
      @(negedge clk);
    end
    #1;
    check(!out_valid && in_ready, "back to loading");
    if (!exact) $display("largest distance to the exact DFT: %0.1f", dft_err);
  endtask

  initial begin
    int xr [16], xi [16], wr [16], wi [16];
    in_valid = 0; in_re = '0; in_im = '0;
    foreach (n_tw[i]) n_tw[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // constant
    for (int i = 0; i < 16; i++) begin
      xr[i] = 1000; xi[i] = -700; wr[i] = 0; wi[i] = 0;
    end
    wr[0] = 16000; wi[0] = -11200;
    transform(xr, xi, 1, wr, wi);

    // impulse
    for (int i = 0; i < 16; i++) begin
      xr[i] = 0; xi[i] = 0; wr[i] = 1500; wi[i] = -1900;
    end
    xr[0] = 1500; xi[0] = -1900;
    transform(xr, xi, 1, wr, wi);

    // random
    for (int r = 0; r < N_RANDOM; r++) begin
      for (int i = 0; i < 16; i++) begin
        xr[i] = $urandom_range(0, 3800) - 1900;
        xi[i] = $urandom_range(0, 3800) - 1900;
      end
      transform(xr, xi, 0, wr, wi);
    end

    // every mechanism must have happened
    check(n_rot45 > 0, "45 degree steps with the scaler");
    check(n_rot7  > 0, "atan(1/8) steps");
    check(n_norot > 0, "butterflies without rotation");
    check(n_stall > 0, "input stalls");
    check(n_done == N_RANDOM + 2, $sformatf("%0d transforms completed", n_done));
    for (int t = 0; t < 8; t++) check(n_tw[t] > 0, $sformatf("twiddle power %0d used", t));
    $display("45-degree steps %0d, atan(1/8) steps %0d, unrotated butterflies %0d, input stalls %0d, transforms %0d",
             n_rot45, n_rot7, n_norot, n_stall, n_done);
    $display("largest distance to the model: %0.2f LSB", max_model_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
