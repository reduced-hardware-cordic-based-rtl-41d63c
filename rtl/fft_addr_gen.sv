// fft_addr_gen: data and twiddle address generator of the 16-point radix-2
// decimation-in-frequency FFT.
//
// Stage s (0..3) has 8 butterflies j = 0..7. With span = 8 >> s, butterfly j
// pairs the in-place memory words p and q = p + span, where p is j with a 0
// inserted at bit position 3 - s, and uses the twiddle power
// tw = (j mod span) * 2^s, i.e. (j << s) kept to 3 bits. After the four
// stages, result X[k] lies at address bit_reverse(k).
// The design states only that an address generator for data and twiddle
// accesses is needed and that there are log2 N stages of N/2 butterflies;
// this standard in-place ordering is the implementation's choice.
//
// Interface: stage (2 bits), bfly (3 bits) in; addr_p, addr_q (4 bits) and
// tw (3 bits) out. Combinational.
module fft_addr_gen
  import fft16_pkg::*;
(
  input  logic [1:0]        stage,
  input  logic [2:0]        bfly,
  output logic [ADDR_W-1:0] addr_p,
  output logic [ADDR_W-1:0] addr_q,
  output logic [TW_W-1:0]   tw
);

  always_comb begin
    unique case (stage)
      2'd0: addr_p = {1'b0, bfly};                 // span 8
      2'd1: addr_p = {bfly[2], 1'b0, bfly[1:0]};   // span 4
      2'd2: addr_p = {bfly[2:1], 1'b0, bfly[0]};   // span 2
      default: addr_p = {bfly, 1'b0};              // span 1
    endcase
    addr_q = addr_p | (ADDR_W'(4'd8) >> stage);
    tw     = TW_W'(bfly << stage);
  end

endmodule
