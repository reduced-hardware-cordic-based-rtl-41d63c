// fft16_pkg: constants and types shared by the reduced-hardware CORDIC
// 16-point FFT processor.
//
// The transform size (16 points, 4 radix-2 stages of 8 butterflies) and the
// 3-bit twiddle power (W16^0 .. W16^7, i.e. 0 .. 157.5 degrees in 22.5 degree
// steps) follow the design. The default sample width and the number of
// fractional guard bits inside the CORDIC are this implementation's choices.
package fft16_pkg;

  // Transform geometry.
  localparam int unsigned N_POINTS   = 16;
  localparam int unsigned LOG2_N     = 4;
  localparam int unsigned N_BFLY     = N_POINTS / 2;   // butterflies per stage
  localparam int unsigned ADDR_W     = LOG2_N;         // data memory address width
  localparam int unsigned TW_W       = 3;              // twiddle power width (0..7)

  // Default widths (chosen here, the design leaves them open).
  localparam int unsigned DEF_DW     = 16;             // real / imaginary sample width
  localparam int unsigned DEF_GUARD  = 3;              // CORDIC fractional guard bits

  // Rotation counts read from the 8 x 4 look-up table: k0 steps of
  // atan(1) = 45 degrees followed by k1 steps of atan(2^-3) = 7.125 degrees.
  typedef struct packed {
    logic [1:0] k0;
    logic [1:0] k1;
  } rot_count_t;

  // Phases of the processor controller.
  typedef enum logic [1:0] {
    CTL_LOAD   = 2'd0,   // accepting the 16 input samples
    CTL_ISSUE  = 2'd1,   // start one butterfly
    CTL_WAIT   = 2'd2,   // wait for the CORDIC stop bit, then write back
    CTL_OUTPUT = 2'd3    // stream the 16 results in natural order
  } ctl_state_t;

  // Phases of the CORDIC state machine.
  typedef enum logic [1:0] {
    ROT_IDLE = 2'd0,
    ROT_RUN  = 2'd1,
    ROT_DONE = 2'd2
  } rot_state_t;

endpackage
