// End-to-end testbench of robot_loc_top with a small 16x8 camera frame.
//
// What it does: connects the whole design to a camera model, a cellular-RAM
// model, an emulated soft processor and a VGA checker (shared code in
// robot_loc_top_body.svh) and runs these scenarios in order:
//   1. the RAM powers up while the camera already streams; the frame
//      controller must wait, then store frame 1 with the colour filter on
//   2. the processor reads the whole frame store plus two words (address
//      wrap) and compares each 64-bit word with the expected filter output
//   3. one whole VGA frame is compared pixel by pixel, then next_frame
//   4. frame 2 is stored with the filter off and read back
//   5. auto mode: the display restarts by itself after AUTO_FRAME_CYCLES
//   6. a capture is aborted by next_frame; the next frame is stored cleanly
//   7. the LED beacon is stepped through all 13 patterns
// It also checks the RAM configuration word (BCR 0x87019), the RAM model's
// protocol error count, and that neither camera FIFO overflow nor VGA
// underflow occurred.  Each mechanism (power-up hold, each frame state,
// filter pass/reject, filter mode switch, processor address wrap, display
// wrap, VGA FIFO full, VGA flush, auto restart, capture abort, beacon step)
// is counted; a zero count is a failure.
//
// Own choices: the frame size, power-up time (400 clocks), auto restart
// (20000 clocks) and beacon timer divisors are reduced to keep the run
// short; the VGA timing is the full 640x480 one.
`timescale 1ns/1ps
module robot_loc_top_tb;
  localparam int HP = 16, VP = 8, H_BLANK = 4, V_BLANK = 3;
  localparam int MEM_AW = 12;
  localparam int AF = 20_000, DP = 40_000;
  localparam bit FULL = 1'b0;

`include "robot_loc_top_body.svh"

  robot_loc_top #(
    .HPIXELS(HP), .VPIXELS(VP), .POWERUP_CYCLES(400),
    .DISPLAY_PERIOD(DP), .AUTO_FRAME_CYCLES(AF),
    .BEACON_MUX_DIV(4), .BEACON_BTN_DIV(16)
  ) dut (.*);

  initial begin
    #200ms;
    $display("FAIL: watchdog (state %0d)", state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int s;
    cam_run = 1;
    repeat (5) @(posedge clk_80m);
    rst = 0;
    repeat (3) @(posedge beacon_clk);
    beacon_rst = 0;

    // 1-3: first frame, filter on
    check(dut.powering_up, "RAM powering up after reset");
    take_frame(1'b1, "frame 1");
    check(bcr == 23'h087019 && bcr_writes > 0, $sformatf("BCR written as %h", bcr));
    check(led[7] && gpi3[28:26] == sw, "processor LED and switch inputs");
    processor_done();
    check_vga_frame("frame 1 display");
    press_next_frame();
    @(negedge clk_80m);
    check(state == rl_pkg::ST_WAIT, "next_frame returns to waiting");

    // 4: filter off
    filter_en = 1'b0;
    filter_off_frames++;
    take_frame(1'b0, "frame 2 (filter off)");
    processor_done();
    repeat (2000) @(posedge clk_80m);

    // 5: auto restart
    filter_en = 1'b1;
    auto_mode = 1'b1;
    s = auto_restarts;
    wait_state(rl_pkg::ST_WAIT, AF + 100, "auto restart after the display time");
    check(auto_restarts == s + 1, "one auto restart");
    auto_mode = 1'b0;

    // 6: abort a capture half way, then take the next frame
    wait_state(rl_pkg::ST_CAMERA, 2_000_000, "capture starts");
    wait (href);
    repeat (2) @(negedge href);
    press_next_frame();
    @(negedge clk_80m);
    check(state == rl_pkg::ST_WAIT, "capture aborted");
    take_frame(1'b1, "frame after abort");
    processor_done();

    // 7: beacon patterns
    for (int i = 0; i < 13; i++) beacon_press(40);
    check(beacon_bad == 0 && beacon_pattern == 4'd0,
          $sformatf("beacon stepped 13 times back to pattern 0 (%0d bad, now %0d)", beacon_bad, beacon_pattern));
    check(beacon_row_n != 2'b00, "at most one LED row group lit");

    // protocol and sticky error flags
    check(ram_errors == 0, $sformatf("%0d RAM bus protocol errors", ram_errors));
    check(!cam_overflow, "no camera FIFO overflow");
    check(!vga_underflow, "no VGA FIFO underflow");

    // mechanisms
    $display("mechanisms: powerup_hold=%0d wait=%0d camera=%0d final=%0d processor=%0d display=%0d",
             powerup_holds, st_visits[0], st_visits[1], st_visits[2], st_visits[3], st_visits[4]);
    $display("  pass=%0d reject=%0d filter_off=%0d proc_wrap=%0d display_wrap=%0d vga_full=%0d",
             pass_px, reject_px, filter_off_frames, proc_wraps, display_wraps, vga_full_cycles);
    $display("  vga_flush=%0d auto=%0d abort=%0d beacon=%0d ram_write_wait=%0d",
             vga_flushes, auto_restarts, capture_aborts, beacon_steps, ram_write_waits);
    check(powerup_holds > 0, "mechanism: power-up hold");
    for (int i = 0; i < 5; i++) check(st_visits[i] > 0, $sformatf("mechanism: state %0d", i));
    check(pass_px > 0 && reject_px > 0, "mechanism: filter pass and reject");
    check(filter_off_frames > 0, "mechanism: filter mode switch");
    check(proc_wraps > 0 && display_wraps > 0, "mechanism: address wrap");
    check(vga_full_cycles > 0, "mechanism: VGA FIFO full stall");
    check(vga_flushes > 0, "mechanism: VGA flush");
    check(auto_restarts > 0, "mechanism: auto restart");
    check(capture_aborts > 0, "mechanism: capture abort");
    check(beacon_steps > 0, "mechanism: beacon pattern step");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
