// tb_fft_controller: runs the sequencer through two transforms with a
// behavioural butterfly that raises done 1 + k0 + k1 cycles after start
// (k0 = tw/2, k1 = 3*(tw odd)). Checks the load addresses under random
// input gaps, the order of the 32 butterflies (stage, p, q, twiddle power
// from the in-place DIF schedule), the write-back of both words on done,
// the bit-reversed read-out with out_last, and the compute time: the sum of
// 2 + k0 + k1 over the 32 butterflies.
module tb_fft_controller;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_last;
  logic [3:0] out_idx, rd_addr_a, rd_addr_b, wr_addr_a, wr_addr_b;
  logic wr_en_a, wr_en_b, wr_sel_load, bf_start, bf_done, busy;
  logic [2:0] bf_tw;
  logic [1:0] stage;
  int checks = 0, failures = 0;

  fft_controller dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .out_valid(out_valid), .out_last(out_last), .out_idx(out_idx),
    .rd_addr_a(rd_addr_a), .rd_addr_b(rd_addr_b), .wr_en_a(wr_en_a),
    .wr_sel_load(wr_sel_load), .wr_addr_a(wr_addr_a), .wr_en_b(wr_en_b),
    .wr_addr_b(wr_addr_b), .bf_start(bf_start), .bf_tw(bf_tw),
    .bf_done(bf_done), .busy(busy), .stage(stage));

  always #5 clk = ~clk;

  // Behavioural butterfly timing.
  int bf_left;
  always_ff @(posedge clk) begin
    if (bf_start) bf_left <= 1 + int'(bf_tw) / 2 + 3 * (int'(bf_tw) % 2);
    else if (bf_left > 0) bf_left <= bf_left - 1;
  end
  assign bf_done = (bf_left == 1) || (bf_left == 0);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int bitrev(int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  task automatic transform();
    int n, cyc, want_cyc;
    // load
    n = 0;
    while (n < 16) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      #1;
      check(in_ready && !busy && !out_valid, "ready during load");
      if (in_valid) begin
        check(wr_en_a && wr_sel_load && wr_addr_a == 4'(n) && !wr_en_b,
              $sformatf("load write %0d", n));
        n++;
      end else check(!wr_en_a, "no write without valid");
    end
    @(negedge clk);
    in_valid = 0;
    // compute
    cyc = 0;
    want_cyc = 0;
    for (int s = 0; s < 4; s++) begin
      int span;
      span = 8 >> s;
      for (int g = 0; g < 8 / span; g++) begin
        for (int pos = 0; pos < span; pos++) begin
          int ep, eq, et, w;
          ep = g * 2 * span + pos;
          eq = ep + span;
          et = pos * 16 / (2 * span);
          want_cyc += 2 + et / 2 + 3 * (et % 2);
          #1;
          check(bf_start && busy && !in_ready && stage == 2'(s) && rd_addr_a == 4'(ep) &&
                rd_addr_b == 4'(eq) && bf_tw == 3'(et),
                $sformatf("issue s=%0d p=%0d q=%0d tw=%0d got %0d %0d %0d", s, ep, eq, et,
                          rd_addr_a, rd_addr_b, bf_tw));
          @(negedge clk);
          cyc++;
          w = 0;
          while (!(wr_en_a && wr_en_b) && w < 20) begin
            #1;
            if (wr_en_a || wr_en_b) break;
            @(negedge clk);
            cyc++;
            w++;
          end
          #1;
          check(wr_en_a && wr_en_b && !wr_sel_load && wr_addr_a == 4'(ep) &&
                wr_addr_b == 4'(eq), $sformatf("write-back s=%0d p=%0d", s, ep));
          @(negedge clk);
          cyc++;
        end
      end
    end
    check(cyc == want_cyc, $sformatf("compute cycles %0d want %0d", cyc, want_cyc));
    // output
    for (int i = 0; i < 16; i++) begin
      #1;
      check(out_valid && out_idx == 4'(i) &&
            rd_addr_a == 4'(bitrev(i)) &&
            out_last == (i == 15) && !wr_en_a && !wr_en_b,
            $sformatf("output %0d", i));
      @(negedge clk);
    end
    #1;
    check(in_ready && !out_valid, "back to load");
  endtask

  initial begin
    in_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    transform();
    transform();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
