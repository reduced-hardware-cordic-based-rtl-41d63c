// fft_data_mem: 16-word complex data memory for in-place FFT computation.
//
// Holds the real and imaginary parts of the 16 samples. Two asynchronous
// read ports (A, B) let a butterfly fetch both operands in one cycle; two
// write ports (A, B) write both of its results back in one cycle. If both
// write ports address the same word in the same cycle, port B wins (the
// controller never does this). The design names memory banks as part of an
// FFT processor without detailing them; this register-file organisation is
// the implementation's choice. Contents are not reset.
//
// Timing: reads are combinational; writes take effect at the clock edge.
module fft_data_mem
  import fft16_pkg::*;
#(
  parameter int unsigned DW = DEF_DW
) (
  input  logic                    clk,
  input  logic [ADDR_W-1:0]       rd_addr_a,
  output logic signed [DW-1:0]    rd_re_a,
  output logic signed [DW-1:0]    rd_im_a,
  input  logic [ADDR_W-1:0]       rd_addr_b,
  output logic signed [DW-1:0]    rd_re_b,
  output logic signed [DW-1:0]    rd_im_b,
  input  logic                    wr_en_a,
  input  logic [ADDR_W-1:0]       wr_addr_a,
  input  logic signed [DW-1:0]    wr_re_a,
  input  logic signed [DW-1:0]    wr_im_a,
  input  logic                    wr_en_b,
  input  logic [ADDR_W-1:0]       wr_addr_b,
  input  logic signed [DW-1:0]    wr_re_b,
  input  logic signed [DW-1:0]    wr_im_b
);

  logic signed [DW-1:0] mem_re [N_POINTS];
  logic signed [DW-1:0] mem_im [N_POINTS];

  always_ff @(posedge clk) begin
    if (wr_en_a) begin
      mem_re[wr_addr_a] <= wr_re_a;
      mem_im[wr_addr_a] <= wr_im_a;
    end
    if (wr_en_b) begin
      mem_re[wr_addr_b] <= wr_re_b;
      mem_im[wr_addr_b] <= wr_im_b;
    end
  end

  assign rd_re_a = mem_re[rd_addr_a];
  assign rd_im_a = mem_im[rd_addr_a];
  assign rd_re_b = mem_re[rd_addr_b];
  assign rd_im_b = mem_im[rd_addr_b];

endmodule
