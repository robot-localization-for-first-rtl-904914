// Shared types and constants of the camera/FPGA vision subsystem and of the
// beacon controller.
//
// The frame-control states follow the five-state acquisition / processing /
// display sequence of the vision subsystem.  The BCR word is the bus
// configuration written into the cellular RAM after power-up: synchronous burst
// mode, fixed latency code 6 (7 clocks), active-low WAIT asserted during the
// delay, half drive strength, no burst wrap, 4-word bursts, register select BCR.
// Colour codes are the 8-bit RGB 3-3-2 values that the colour filter writes for
// a normalised beacon or marker colour.
//
// The state list, the BCR bit fields and the beacon colours follow the
// original system; the enum encodings and the RGB 3-3-2 colour codes are this
// design's choices.
package rl_pkg;

  // Acquisition / processing / display state machine
  typedef enum logic [2:0] {
    ST_WAIT       = 3'd0,  // waiting for the start of a camera frame
    ST_CAMERA     = 3'd1,  // camera data are written to RAM
    ST_FINAL      = 3'd2,  // frame ended, draining the pipeline into RAM
    ST_PROCESSOR  = 3'd3,  // the soft processor owns the RAM
    ST_DISPLAY    = 3'd4   // the VGA display reads the RAM
  } frame_state_e;

  // Cellular RAM bus configuration register value, put on the address lines
  // during the configuration write (A[19:18]=10 selects the BCR).
  localparam logic [22:0] BCR_VALUE =
      (23'd2 << 18)  |   // register select: BCR
      (23'd0 << 15)  |   // synchronous burst mode
      (23'd1 << 14)  |   // fixed initial latency
      (23'd6 << 11)  |   // latency code 6 -> 7 clocks
      (23'd0 << 10)  |   // WAIT active low
      (23'd0 << 8)   |   // WAIT asserted during delay
      (23'd1 << 4)   |   // drive strength 1/2
      (23'd1 << 3)   |   // burst no wrap
      (23'd1 << 0);      // burst length 4 words

  // Words per RAM burst and clocks of initial latency
  localparam int unsigned BURST_WORDS = 4;
  localparam int unsigned RAM_LATENCY = 7;

  // Normalised colours, RGB 3-3-2
  localparam logic [7:0] COL_BLACK  = 8'h00;
  localparam logic [7:0] COL_RED    = 8'hE0;
  localparam logic [7:0] COL_GREEN  = 8'h1C;
  localparam logic [7:0] COL_BLUE   = 8'h03;
  localparam logic [7:0] COL_YELLOW = 8'hFC;
  localparam logic [7:0] COL_PURPLE = 8'hE3;
  localparam logic [7:0] COL_CYAN   = 8'h1F;
  localparam logic [7:0] COL_WHITE  = 8'hFF;

  // 24-bit RGB pixel
  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // 24-bit YUV pixel (U and V offset binary, 128 = zero)
  typedef struct packed {
    logic [7:0] y;
    logic [7:0] u;
    logic [7:0] v;
  } yuv_t;

  // Beacon quadrant colours (each lit colour is a mix of red/green/blue columns)
  typedef enum logic [1:0] {
    BC_RED    = 2'd0,
    BC_YELLOW = 2'd1,
    BC_GREEN  = 2'd2,
    BC_PURPLE = 2'd3
  } beacon_color_e;

endpackage
