// tb_cordic_butterfly: random butterflies for every twiddle power. The sum
// outputs must equal a0 + a1 and b0 + b1 exactly; the difference outputs must
// match (A - B) * g * exp(-j*phi) to within 3 LSB, where phi and g are the
// angle k0*45 + k1*atan(1/8) degrees and gain realised by the CORDIC. Also
// checks that done rises 1 + k0 + k1 cycles after start.
module tb_cordic_butterfly;
  localparam int DW = 16;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] tw;
  logic signed [DW-1:0] a0, b0, a1, b1;
  logic signed [DW:0]   sum_re, sum_im;
  logic signed [DW+1:0] diff_re, diff_im;
  logic done, m, rot_en;
  int checks = 0, failures = 0;

  cordic_butterfly #(.DW(DW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .tw(tw),
    .a0(a0), .b0(b0), .a1(a1), .b1(b1),
    .sum_re(sum_re), .sum_im(sum_im), .diff_re(diff_re), .diff_im(diff_im),
    .done(done), .m(m), .rot_en(rot_en));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic bfly(int ar, int ai, int br, int bi, int z);
    int k0, k1, cyc;
    real phi, g, dr, di, er, ei;
    k0 = z / 2;
    k1 = (z % 2) * 3;
    phi = k0 * PI / 4.0 + k1 * $atan(0.125);
    g   = ($sqrt(2.0) * 181.0 / 256.0) ** k0 * $sqrt(1.0 + 1.0 / 64.0) ** k1;
    dr  = real'(ar - br);
    di  = real'(ai - bi);
    er  = g * (dr * $cos(phi) + di * $sin(phi));
    ei  = g * (di * $cos(phi) - dr * $sin(phi));
    @(negedge clk);
    a0 = DW'(ar); b0 = DW'(ai); a1 = DW'(br); b1 = DW'(bi); tw = 3'(z); start = 1;
    @(negedge clk);
    start = 0;
    a0 = '0; b0 = '0; a1 = '0; b1 = '0; tw = '0;
    cyc = 1;
    while (!done && cyc < 20) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 1 + k0 + k1, $sformatf("tw=%0d latency %0d", z, cyc));
    check(sum_re == ar + br && sum_im == ai + bi,
          $sformatf("sum (%0d,%0d) want (%0d,%0d)", sum_re, sum_im, ar + br, ai + bi));
    check(fabs(real'(diff_re) - er) <= 3.0,
          $sformatf("tw=%0d diff_re %0d want %f", z, diff_re, er));
    check(fabs(real'(diff_im) - ei) <= 3.0,
          $sformatf("tw=%0d diff_im %0d want %f", z, diff_im, ei));
  endtask

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int rnd();
    return $signed($urandom_range(0, 65535)) - 32768;
  endfunction

  initial begin
    tw = '0; a0 = '0; b0 = '0; a1 = '0; b1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int z = 0; z < 8; z++) bfly(1000, 0, 0, 0, z);
    for (int z = 0; z < 8; z++) bfly(0, 1000, 0, 0, z);
    for (int z = 0; z < 8; z++) bfly(32767, 32767, -32768, -32768, z);
    for (int i = 0; i < 400; i++) bfly(rnd(), rnd(), rnd(), rnd(), i % 8);
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
