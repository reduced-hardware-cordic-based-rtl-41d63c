// tb_fft_addr_gen: for every stage and butterfly, compares the generated
// addresses and twiddle power with the in-place radix-2 DIF schedule built
// from groups and positions (p = group*2*span + pos, q = p + span,
// tw = pos * 16 / (2*span)), and checks that every stage touches each of
// the 16 words exactly once.
module tb_fft_addr_gen;
  logic [1:0] stage;
  logic [2:0] bfly;
  logic [3:0] p, q;
  logic [2:0] tw;
  int checks = 0, failures = 0;

  fft_addr_gen dut (.stage(stage), .bfly(bfly), .addr_p(p), .addr_q(q), .tw(tw));

  initial begin
    for (int s = 0; s < 4; s++) begin
      int span, j;
      bit [15:0] seen;
      span = 8 >> s;
      seen = '0;
      j = 0;
      for (int g = 0; g < 8 / span; g++) begin
        for (int pos = 0; pos < span; pos++) begin
          int ep, eq, et;
          ep = g * 2 * span + pos;
          eq = ep + span;
          et = pos * 16 / (2 * span);
          stage = 2'(s); bfly = 3'(j);
          #1;
          checks++;
          if (p != 4'(ep) || q != 4'(eq) || tw != 3'(et)) begin
            failures++;
            $display("FAIL s=%0d j=%0d p=%0d q=%0d tw=%0d want %0d %0d %0d",
                     s, j, p, q, tw, ep, eq, et);
          end
          seen[p] = 1'b1;
          seen[q] = 1'b1;
          j++;
        end
      end
      checks++;
      if (seen != 16'hFFFF) begin
        failures++;
        $display("FAIL stage %0d coverage %h", s, seen);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
