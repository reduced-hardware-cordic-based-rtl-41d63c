// tb_twiddle_lut: checks every entry of the rotation-count table.
// The expected counts come from the decomposition of 22.5 * z degrees into
// floor(z/2) steps of 45 degrees plus, for odd z, three steps of
// atan(1/8); the testbench also checks that the realised angle
// k0*45 + k1*atan(1/8) lies within 1.2 degrees of the exact twiddle angle.
module tb_twiddle_lut;
  import fft16_pkg::*;

  logic [2:0]  zin;
  rot_count_t  k;
  int checks = 0, failures = 0;

  twiddle_lut dut (.zin(zin), .k(k));

  initial begin
    real ang, want;
    for (int z = 0; z < 8; z++) begin
      zin = 3'(z);
      #1;
      checks++;
      if (k.k0 != 2'(z / 2) || k.k1 != 2'((z % 2) * 3)) begin
        failures++;
        $display("FAIL zin=%0d k0=%0d k1=%0d", z, k.k0, k.k1);
      end
      ang  = 45.0 * k.k0 + real'(k.k1) * $atan(0.125) * 180.0 / 3.14159265358979;
      want = 22.5 * z;
      checks++;
      if (ang - want > 1.2 || want - ang > 1.2) begin
        failures++;
        $display("FAIL zin=%0d angle %f vs %f", z, ang, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
