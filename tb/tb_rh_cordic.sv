// tb_rh_cordic: rotates random vectors by every twiddle power and compares
// the result with an ideal rotation by the realised angle
// phi = k0*45 + k1*atan(1/8) degrees, multiplied by the realised gain
// (sqrt(2) * 181/256)^k0 * sqrt(1 + 1/64)^k1, to within 2.5 LSB. Also checks
// the latency 1 + k0 + k1 cycles, that the outputs hold while stop is high,
// and that the realised angle is within 1.2 degrees of 22.5 * zin.
module tb_rh_cordic;
  localparam int W = 18;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] zin;
  logic signed [W-1:0] x_in, y_in, x_out, y_out;
  logic stop, m, rot_en;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  rh_cordic #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .zin(zin),
    .x_in(x_in), .y_in(y_in), .x_out(x_out), .y_out(y_out),
    .stop(stop), .m(m), .rot_en(rot_en));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic rotate(int x, int y, int z);
    int k0, k1, cyc;
    real phi, g, ex, ey, e;
    k0 = z / 2;
    k1 = (z % 2) * 3;
    phi = k0 * PI / 4.0 + k1 * $atan(0.125);
    g   = ($sqrt(2.0) * 181.0 / 256.0) ** k0 * $sqrt(1.0 + 1.0 / 64.0) ** k1;
    ex  = g * (x * $cos(phi) - y * $sin(phi));
    ey  = g * (x * $sin(phi) + y * $cos(phi));
    @(negedge clk);
    x_in = W'(x); y_in = W'(y); zin = 3'(z); start = 1;
    @(negedge clk);
    start = 0;
    x_in = '0; y_in = '0; zin = 3'(7 - z);   // inputs must have been latched
    cyc = 1;
    while (!stop && cyc < 20) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 1 + k0 + k1, $sformatf("zin=%0d latency %0d", z, cyc));
    e = ex - real'(x_out);
    if (e < 0) e = -e;
    if (e > max_err) max_err = e;
    check(e <= 2.5, $sformatf("zin=%0d (%0d,%0d): x %0d want %f", z, x, y, x_out, ex));
    e = ey - real'(y_out);
    if (e < 0) e = -e;
    if (e > max_err) max_err = e;
    check(e <= 2.5, $sformatf("zin=%0d (%0d,%0d): y %0d want %f", z, x, y, y_out, ey));
    check(phi * 180.0 / PI - 22.5 * z < 1.2 && 22.5 * z - phi * 180.0 / PI < 1.2,
          "angle close to twiddle");
    // outputs must hold while stop is high
    begin
      logic signed [W-1:0] hx, hy;
      hx = x_out; hy = y_out;
      repeat (3) @(negedge clk);
      check(stop && x_out == hx && y_out == hy, "result held");
    end
  endtask

  initial begin
    zin = '0; x_in = '0; y_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // unit vectors at full-ish scale
    for (int z = 0; z < 8; z++) rotate(60000, 0, z);
    for (int z = 0; z < 8; z++) rotate(0, -60000, z);
    for (int i = 0; i < 400; i++)
      rotate($signed($urandom_range(0, 160000)) - 80000,
             $signed($urandom_range(0, 160000)) - 80000, i % 8);
    $display("max abs error %f LSB", max_err);
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
