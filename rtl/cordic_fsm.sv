// cordic_fsm: state machine of the reduced-hardware CORDIC.
//
// A start pulse loads the rotation counts k0 and k1. The machine then runs
// k0 + k1 rotation cycles: output m is 0 for the first k0 of them (45 degree
// steps) and 1 for the next k1 (atan(2^-3) steps). rot_en is high in every
// cycle in which the datapath must perform one rotation. When the last
// rotation has been taken, stop goes to 1 and stays there until the next
// start, marking the X/Y outputs valid.
//
// Timing: start sampled at clock edge 0; rotations happen at edges
// 1 .. k0+k1; stop is high from edge k0+k1+1 on (k0 = k1 = 0 gives stop
// one cycle after start). The counting scheme and this exact timing are this
// design's choice; the design fixes only the order (k0 steps, then k1 steps)
// and the meaning of m and stop. A start while busy restarts the machine.
module cordic_fsm
  import fft16_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  rot_count_t k,
  output logic       m,
  output logic       rot_en,
  output logic       stop
);

  rot_state_t state;
  logic [1:0] cnt0, cnt1;   // remaining 45 degree / 7.125 degree steps

  // Steps left after the one being taken now.
  logic last_step;
  assign last_step = (cnt0 == 2'd0) ? (cnt1 == 2'd1)
                                    : (cnt0 == 2'd1 && cnt1 == 2'd0);

  assign rot_en = (state == ROT_RUN);
  assign m      = (cnt0 == 2'd0);
  assign stop   = (state == ROT_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ROT_IDLE;
      cnt0  <= '0;
      cnt1  <= '0;
    end else if (start) begin
      cnt0  <= k.k0;
      cnt1  <= k.k1;
      state <= (k.k0 == 2'd0 && k.k1 == 2'd0) ? ROT_DONE : ROT_RUN;
    end else if (state == ROT_RUN) begin
      if (cnt0 != 2'd0) cnt0 <= cnt0 - 2'd1;
      else              cnt1 <= cnt1 - 2'd1;
      if (last_step) state <= ROT_DONE;
    end
  end

endmodule
