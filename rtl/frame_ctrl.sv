// Frame controller: acquisition / processing / display sequencing and RAM
// addressing.
//
// The frame store is a single-ported RAM, so the subsystem is in one of five
// states at a time:
//   ST_WAIT       wait for the camera's VREF to fall (start of a frame); the
//                 beacon-filter output is drained and discarded
//   ST_CAMERA     camera bytes are captured; filtered 64-bit words are
//                 written to RAM as they come
//   ST_FINAL      VREF has risen (frame over); the pipeline drains into RAM
//                 until processing_complete and the RAM is idle
//   ST_PROCESSOR  the soft processor owns the RAM: each rising edge of its
//                 blob_read line starts one 4-word burst read; its
//                 blob_next_frame line ends the state
//   ST_DISPLAY    the VGA display reads the frame in a loop while its FIFO is
//                 not almost full
// next_frame (or the automatic restart) and a RAM that is still powering up
// send every state back to ST_WAIT.
//
// Addressing: addr is 0 after reset, in ST_WAIT, on the ST_FINAL to
// ST_PROCESSOR and ST_PROCESSOR to ST_DISPLAY transitions and while the
// display flushes at vertical sync.  Otherwise it advances by 4 (one 64-bit
// burst) on the falling edge of ram_ready, i.e. just after a burst was taken,
// and wraps to 0 after NUM_PIXELS/2 addresses (two 8-bit pixels per 16-bit
// word).
//
// Auto mode: in ST_DISPLAY a timer counts system clocks, wrapping every
// DISPLAY_PERIOD; when it reaches AUTO_FRAME_CYCLES with auto_mode high,
// auto_next_frame pulses and a new frame is grabbed.
//
// vref, blob_read and blob_next_frame come from other clock domains and are
// brought in through two flip-flops each.  All other inputs and all outputs are
// in the 80 MHz system domain.  The states, their transitions, the address rule
// and the auto-restart timer follow the document; draining instead of writing
// in ST_WAIT and waiting for the last burst in ST_FINAL are this design's
// choices.
module frame_ctrl
  import rl_pkg::frame_state_e, rl_pkg::ST_WAIT, rl_pkg::ST_CAMERA, rl_pkg::ST_FINAL,
         rl_pkg::ST_PROCESSOR, rl_pkg::ST_DISPLAY;
#(
  parameter int unsigned HPIXELS           = 640,
  parameter int unsigned VPIXELS           = 480,
  parameter int unsigned DISPLAY_PERIOD    = 80_000_000,  // 1 s at 80 MHz
  parameter int unsigned AUTO_FRAME_CYCLES = 16_000_000   // 0.2 s at 80 MHz
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         next_frame,
  input  logic         auto_mode,
  input  logic         vref,
  input  logic         powering_up,
  input  logic         processing_complete,
  input  logic         ram_ready,
  input  logic         proc_valid,
  input  logic         blob_read,
  input  logic         blob_next_frame,
  input  logic         vga_fifo_full,
  input  logic         vga_flush,
  output frame_state_e state,
  output logic [22:0]  addr,
  output logic         capture_en,
  output logic         cam_read_en,
  output logic         proc_out_ready,
  output logic         ram_write,
  output logic         ram_read,
  output logic         display,
  output logic         processor_active,
  output logic         auto_next_frame,
  output logic         fifo_reset
);
  localparam int unsigned NUM_PIXELS = HPIXELS * VPIXELS;
  localparam int unsigned ADDR_WRAP  = NUM_PIXELS / 2;
  localparam int unsigned TW = $clog2(DISPLAY_PERIOD + 1);

  frame_state_e next_state;
  logic vref_s1, vref_s2, vref_q;
  logic br_s1, br_s2, br_q;
  logic nf_s1, nf_s2;
  logic ready_q;
  logic [TW-1:0] timer;
  logic vref_fall, vref_rise, read_pulse, burst_taken, abort;

  // synchronisers
  always_ff @(posedge clk) begin
    if (rst) begin
      {vref_s1, vref_s2, vref_q} <= '1;
      {br_s1, br_s2, br_q}       <= '0;
      {nf_s1, nf_s2}             <= '0;
      ready_q                    <= 1'b0;
    end else begin
      vref_s1 <= vref;   vref_s2 <= vref_s1;   vref_q <= vref_s2;
      br_s1   <= blob_read; br_s2 <= br_s1;   br_q   <= br_s2;
      nf_s1   <= blob_next_frame; nf_s2 <= nf_s1;
      ready_q <= ram_ready;
    end
  end

  assign vref_fall   = vref_q && !vref_s2;
  assign vref_rise   = !vref_q && vref_s2;
  assign read_pulse  = br_s2 && !br_q;
  assign burst_taken = ready_q && !ram_ready;
  assign abort       = powering_up || next_frame || auto_next_frame;

  always_comb begin
    next_state = state;
    unique case (state)
      ST_WAIT:      if (!abort && vref_fall) next_state = ST_CAMERA;
      ST_CAMERA:    if (abort) next_state = ST_WAIT;
                    else if (vref_rise) next_state = ST_FINAL;
      ST_FINAL:     if (abort) next_state = ST_WAIT;
                    else if (processing_complete && ram_ready) next_state = ST_PROCESSOR;
      ST_PROCESSOR: if (abort) next_state = ST_WAIT;
                    else if (nf_s2) next_state = ST_DISPLAY;
      ST_DISPLAY:   if (abort) next_state = ST_WAIT;
      default:      next_state = ST_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ST_WAIT;
    else     state <= next_state;
  end

  // address generator
  always_ff @(posedge clk) begin
    if (rst || state == ST_WAIT ||
        (state == ST_FINAL && next_state == ST_PROCESSOR) ||
        (state == ST_PROCESSOR && next_state == ST_DISPLAY) ||
        (state == ST_DISPLAY && vga_flush))
      addr <= '0;
    else if (burst_taken)
      addr <= (addr + 23'd4 < 23'(ADDR_WRAP)) ? addr + 23'd4 : '0;
  end

  // auto-restart timer
  always_ff @(posedge clk) begin
    if (rst || state != ST_DISPLAY || timer >= TW'(DISPLAY_PERIOD - 1))
      timer <= '0;
    else
      timer <= timer + 1'b1;
  end

  assign auto_next_frame  = auto_mode && (state == ST_DISPLAY) &&
                            (timer == TW'(AUTO_FRAME_CYCLES));
  assign fifo_reset       = next_frame || auto_next_frame;
  assign capture_en       = (state == ST_CAMERA);
  assign cam_read_en      = (state == ST_WAIT) || (state == ST_CAMERA) || (state == ST_FINAL);
  assign ram_write        = proc_valid && ((state == ST_CAMERA) || (state == ST_FINAL));
  assign proc_out_ready   = (ram_write && ram_ready) || (state == ST_WAIT);
  assign processor_active = (state == ST_PROCESSOR);
  assign display          = (state == ST_DISPLAY);
  assign ram_read         = processor_active ? read_pulse :
                            (display && !vga_fifo_full && !vga_flush);

  initial assert (AUTO_FRAME_CYCLES < DISPLAY_PERIOD)
    else $error("frame_ctrl: the auto restart must fall inside the display period");

endmodule
