// fft_controller: sequencer of the 16-point FFT processor.
//
// Runs one transform in three phases:
//   LOAD   - in_ready is high; each accepted sample (in_valid) is written to
//            data memory word 0, 1, ... 15 in arrival order.
//   compute- for stage 0..3 and butterfly 0..7: ISSUE reads words p and q
//            (from fft_addr_gen) and pulses bf_start with the twiddle power;
//            WAIT holds until the butterfly's done (CORDIC stop bit), then
//            writes the sum to p and the rotated difference to q.
//   OUTPUT - 16 cycles with out_valid high; cycle i reads word
//            bit_reverse(i), so results leave in natural order X[0]..X[15];
//            out_last marks X[15].
// Then it returns to LOAD. The design names the control logic and its
// address generation and the stage/butterfly count; the phases, handshake
// (valid/ready in, valid without back-pressure out) and timing are this
// implementation's choices.
//
// Timing: each butterfly takes 2 + k0 + k1 cycles (1 issue cycle, then the
// CORDIC latency 1 + k0 + k1 during which the last cycle writes back);
// a transform's compute phase takes the sum of these over the 32 butterflies.
module fft_controller
  import fft16_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // sample input handshake
  input  logic              in_valid,
  output logic              in_ready,
  // result output
  output logic              out_valid,
  output logic              out_last,
  output logic [ADDR_W-1:0] out_idx,
  // data memory control
  output logic [ADDR_W-1:0] rd_addr_a,
  output logic [ADDR_W-1:0] rd_addr_b,
  output logic              wr_en_a,
  output logic              wr_sel_load,   // 1: port A writes the input sample
  output logic [ADDR_W-1:0] wr_addr_a,
  output logic              wr_en_b,
  output logic [ADDR_W-1:0] wr_addr_b,
  // butterfly control
  output logic              bf_start,
  output logic [TW_W-1:0]   bf_tw,
  input  logic              bf_done,
  // status
  output logic              busy,
  output logic [1:0]        stage
);

  ctl_state_t        state;
  logic [ADDR_W-1:0] cnt;     // sample index in LOAD and OUTPUT
  logic [2:0]        bfly;
  logic [ADDR_W-1:0] addr_p, addr_q;
  logic [ADDR_W-1:0] cnt_rev;

  fft_addr_gen u_agen (
    .stage  (stage),
    .bfly   (bfly),
    .addr_p (addr_p),
    .addr_q (addr_q),
    .tw     (bf_tw)
  );

  assign cnt_rev = {cnt[0], cnt[1], cnt[2], cnt[3]};

  always_comb begin
    in_ready    = (state == CTL_LOAD);
    out_valid   = (state == CTL_OUTPUT);
    out_last    = out_valid && (cnt == ADDR_W'(N_POINTS - 1));
    out_idx     = cnt;
    busy        = (state == CTL_ISSUE) || (state == CTL_WAIT);
    bf_start    = (state == CTL_ISSUE);
    rd_addr_a   = (state == CTL_OUTPUT) ? cnt_rev : addr_p;
    rd_addr_b   = addr_q;
    wr_sel_load = (state == CTL_LOAD);
    wr_en_a     = ((state == CTL_LOAD) && in_valid) ||
                  ((state == CTL_WAIT) && bf_done);
    wr_addr_a   = (state == CTL_LOAD) ? cnt : addr_p;
    wr_en_b     = (state == CTL_WAIT) && bf_done;
    wr_addr_b   = addr_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CTL_LOAD;
      cnt   <= '0;
      bfly  <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        CTL_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == ADDR_W'(N_POINTS - 1)) begin
            state <= CTL_ISSUE;
            stage <= '0;
            bfly  <= '0;
          end
        end
        CTL_ISSUE: state <= CTL_WAIT;
        CTL_WAIT: if (bf_done) begin
          bfly <= bfly + 1'b1;
          if (bfly == 3'(N_BFLY - 1)) begin
            stage <= stage + 1'b1;
            if (stage == 2'(LOG2_N - 1)) begin
              state <= CTL_OUTPUT;
              cnt   <= '0;
            end else begin
              state <= CTL_ISSUE;
            end
          end else begin
            state <= CTL_ISSUE;
          end
        end
        CTL_OUTPUT: begin
          cnt <= cnt + 1'b1;
          if (cnt == ADDR_W'(N_POINTS - 1)) state <= CTL_LOAD;
        end
        default: state <= CTL_LOAD;
      endcase
    end
  end

  // Write ports never collide, and a butterfly is only started after the
  // previous one has been written back.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en_a && wr_en_b && wr_addr_a == wr_addr_b))
    else $error("fft_controller: write port collision");

endmodule
