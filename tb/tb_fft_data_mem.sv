// tb_fft_data_mem: random writes on both ports (never to the same word in
// one cycle) and random reads on both ports, compared with a shadow copy
// kept by the testbench.
module tb_fft_data_mem;
  localparam int DW = 16;
  logic clk = 0;
  logic [3:0] ra, rb, wa, wb;
  logic signed [DW-1:0] rre_a, rim_a, rre_b, rim_b, wre_a, wim_a, wre_b, wim_b;
  logic wea, web;
  logic signed [DW-1:0] sh_re [16], sh_im [16];
  int checks = 0, failures = 0;

  fft_data_mem #(.DW(DW)) dut (
    .clk(clk),
    .rd_addr_a(ra), .rd_re_a(rre_a), .rd_im_a(rim_a),
    .rd_addr_b(rb), .rd_re_b(rre_b), .rd_im_b(rim_b),
    .wr_en_a(wea), .wr_addr_a(wa), .wr_re_a(wre_a), .wr_im_a(wim_a),
    .wr_en_b(web), .wr_addr_b(wb), .wr_re_b(wre_b), .wr_im_b(wim_b));

  always #5 clk = ~clk;

  initial begin
    wea = 0; web = 0; ra = 0; rb = 0; wa = 0; wb = 0;
    wre_a = 0; wim_a = 0; wre_b = 0; wim_b = 0;
    // fill every word through alternating ports
    for (int i = 0; i < 16; i += 2) begin
      @(negedge clk);
      wea = 1; wa = 4'(i);     wre_a = DW'($urandom); wim_a = DW'($urandom);
      web = 1; wb = 4'(i + 1); wre_b = DW'($urandom); wim_b = DW'($urandom);
      sh_re[i] = wre_a; sh_im[i] = wim_a; sh_re[i+1] = wre_b; sh_im[i+1] = wim_b;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra = 4'($urandom); rb = 4'($urandom);
      #1;
      checks++;
      if (rre_a != sh_re[ra] || rim_a != sh_im[ra] ||
          rre_b != sh_re[rb] || rim_b != sh_im[rb]) begin
        failures++;
        $display("FAIL read a=%0d b=%0d", ra, rb);
      end
      wea = 1'($urandom); web = 1'($urandom);
      wa = 4'($urandom);  wb = 4'($urandom);
      if (wb == wa) wb = wa + 1'b1;
      wre_a = DW'($urandom); wim_a = DW'($urandom);
      wre_b = DW'($urandom); wim_b = DW'($urandom);
      if (wea) begin sh_re[wa] = wre_a; sh_im[wa] = wim_a; end
      if (web) begin sh_re[wb] = wre_b; sh_im[wb] = wim_b; end
    end
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
