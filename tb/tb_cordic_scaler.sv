// tb_cordic_scaler: drives corner and random values through the 0.707
// scaler and compares with floor(d * 181 / 256) computed by multiplication,
// and with d / sqrt(2) to within 0.05 % of full scale plus one LSB.
module tb_cordic_scaler;
  localparam int W = 20;
  logic signed [W-1:0] d, q;
  int checks = 0, failures = 0;

  cordic_scaler #(.W(W)) dut (.d(d), .q(q));

  task automatic one(longint v);
    longint want;
    real r;
    d = W'(v);
    #1;
    want = (v * 181) >>> 8;
    checks++;
    if (longint'(q) != want) begin
      failures++;
      $display("FAIL d=%0d q=%0d want %0d", v, q, want);
    end
    r = real'(v) / $sqrt(2.0) - real'(q);
    checks++;
    if (r > 1.0 + 0.0005 * 2.0**(W-1) || r < -(1.0 + 0.0005 * 2.0**(W-1))) begin
      failures++;
      $display("FAIL d=%0d far from d/sqrt2", v);
    end
  endtask

  initial begin
    one(0); one(1); one(-1); one(255); one(-256);
    one(2**(W-1) - 1); one(-(2**(W-1)));
    for (int i = 0; i < 2000; i++)
      one(longint'($signed(W'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
