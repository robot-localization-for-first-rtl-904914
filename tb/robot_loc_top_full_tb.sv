// Full-size end-to-end testbench of robot_loc_top: no parameter overrides.
//
// What it does: runs the design exactly as built for the board (640x480
// frame, 12000-clock RAM power-up, 1 s display period) against the camera
// model in its 640x480, 60 Hz timing (194 blank pixels per line, 59 blank
// lines) and the cellular-RAM model.  It stores one colour-filtered frame,
// reads all 38,400 64-bit words back through the soft-processor ports and
// compares each with the expected filter output, hands over to the display,
// compares one complete 640x480 VGA frame pixel by pixel, then presses
// next_frame and checks the return to waiting.  It also checks the RAM
// configuration word, the RAM bus protocol and the overflow/underflow flags.
// The shared harness is robot_loc_top_body.svh.
//
// Own choices: only the first-frame scenario is run at full size; the
// auto-restart (0.2 s) and the other scenarios are covered by the reduced
// testbench robot_loc_top_tb.
`timescale 1ns/1ps
module robot_loc_top_full_tb;
  localparam int HP = 640, VP = 480, H_BLANK = 194, V_BLANK = 59;
  localparam int MEM_AW = 18;
  localparam int AF = 16_000_000;
  localparam bit FULL = 1'b1;

`include "robot_loc_top_body.svh"

  robot_loc_top dut (.*);

  initial begin
    #400ms;
    $display("FAIL: watchdog (state %0d)", state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    cam_run = 1;
    repeat (5) @(posedge clk_80m);
    rst = 0;
    repeat (3) @(posedge beacon_clk);
    beacon_rst = 0;

    check(dut.powering_up, "RAM powering up after reset");
    repeat (12_100) @(posedge clk_80m);
    check(!dut.powering_up, "RAM power-up over after 12000 clocks and the BCR write");
    take_frame(1'b1, "frame 1");
    check(bcr == 23'h087019, $sformatf("BCR written as %h", bcr));
    processor_done();
    check_vga_frame("frame 1 display");
    press_next_frame();
    @(negedge clk_80m);
    check(state == rl_pkg::ST_WAIT, "next_frame returns to waiting");

    check(ram_errors == 0, $sformatf("%0d RAM bus protocol errors", ram_errors));
    check(!cam_overflow, "no camera FIFO overflow");
    check(!vga_underflow, "no VGA FIFO underflow");
    check(pass_px > 0 && reject_px > 0, "filter passed and rejected pixels");
    check(vga_full_cycles > 0 && vga_flushes > 0, "display stalled on a full FIFO and flushed");
    $display("pass=%0d reject=%0d ram_write_wait=%0d", pass_px, reject_px, ram_write_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
