// tb_cordic_fsm: for all 16 combinations of (k0, k1) starts the state
// machine and checks that it performs exactly k0 rotation cycles with m = 0
// followed by k1 with m = 1, that stop rises 1 + k0 + k1 cycles after start
// and then stays high until the next start.
module tb_cordic_fsm;
  import fft16_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  rot_count_t k;
  logic m, rot_en, stop;
  int checks = 0, failures = 0;

  cordic_fsm dut (.clk(clk), .rst_n(rst_n), .start(start), .k(k),
                  .m(m), .rot_en(rot_en), .stop(stop));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    k = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!stop && !rot_en, "idle after reset");
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        int n0, n1, cyc;
        bit order_ok;
        n0 = 0; n1 = 0; cyc = 0; order_ok = 1;
        k = '{k0: 2'(a), k1: 2'(b)};
        start = 1;
        @(negedge clk);
        start = 0;
        k = '{k0: 2'(3 - a), k1: 2'(3 - b)};   // must have been latched
        cyc = 1;
        while (!stop && cyc < 20) begin
          if (rot_en) begin
            if (!m) begin
              n0++;
              if (n1 != 0) order_ok = 0;
            end else n1++;
          end
          @(negedge clk);
          cyc++;
        end
        check(n0 == a, $sformatf("k0=%0d k1=%0d: %0d steps with m=0", a, b, n0));
        check(n1 == b, $sformatf("k0=%0d k1=%0d: %0d steps with m=1", a, b, n1));
        check(order_ok, $sformatf("k0=%0d k1=%0d: m=1 before m=0", a, b));
        check(cyc == 1 + a + b, $sformatf("k0=%0d k1=%0d: latency %0d", a, b, cyc));
        repeat (3) @(negedge clk);
        check(stop && !rot_en, "stop held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
