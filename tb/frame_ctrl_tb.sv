// Self-checking testbench for frame_ctrl.
//
// What it does: runs the frame controller with a small frame (8x4 pixels, so
// the address wraps after 16 words = 4 bursts) and short display timers.  A
// simple RAM model drops ram_ready for 11 clocks after every accepted read or
// write, as the burst interface does.  The test walks through every state:
// WAIT -> CAMERA on VREF falling, CAMERA -> FINAL on VREF rising, FINAL ->
// PROCESSOR once processing_complete and the RAM is idle, PROCESSOR ->
// DISPLAY on blob_next_frame, and DISPLAY -> WAIT on the automatic restart,
// next_frame and powering_up.
//
// Checks: state sequence, that addr advances by 4 exactly once per burst,
// wraps at HPIXELS*VPIXELS/2 and is cleared at the points the frame
// controller clears it; that writes only happen in CAMERA/FINAL, that each
// blob_read rising edge gives exactly one read, that display reads stop while
// the VGA FIFO is full or flushing, and that auto_next_frame fires
// AUTO_FRAME_CYCLES clocks after DISPLAY is entered (and never without
// auto_mode).  Inputs that are timed randomly use $urandom.
//
// Own choices: the frame size, timer values and RAM-model delay are picked
// to keep the run short; the 11-clock busy time follows the burst length.
`timescale 1ns/1ps
module frame_ctrl_tb;
  import rl_pkg::frame_state_e, rl_pkg::ST_WAIT, rl_pkg::ST_CAMERA, rl_pkg::ST_FINAL,
         rl_pkg::ST_PROCESSOR, rl_pkg::ST_DISPLAY;

  localparam int HP = 8, VP = 4, DP = 100, AF = 40;
  localparam int WRAP = HP * VP / 2;

  logic clk = 0, rst = 1;
  logic next_frame = 0, auto_mode = 0, vref = 1, powering_up = 0;
  logic processing_complete = 0, ram_ready, proc_valid = 0;
  logic blob_read = 0, blob_next_frame = 0, vga_fifo_full = 0, vga_flush = 0;
  frame_state_e state;
  logic [22:0] addr;
  logic capture_en, cam_read_en, proc_out_ready, ram_write, ram_read;
  logic display, processor_active, auto_next_frame, fifo_reset;

  int checks = 0, failures = 0;
  int busy = 0, ops = 0, writes = 0, reads = 0, bad_gate = 0, bad_addr = 0;
  logic [22:0] exp_addr = 0;

  always #6.25 clk = ~clk;

  frame_ctrl #(.HPIXELS(HP), .VPIXELS(VP), .DISPLAY_PERIOD(DP),
               .AUTO_FRAME_CYCLES(AF)) dut (.*);

  assign ram_ready = (busy == 0) && !rst;

  // RAM model: busy for 11 clocks after every accepted operation
  always_ff @(posedge clk) begin
    if (rst) busy <= 0;
    else if (busy > 0) busy <= busy - 1;
    else if (ram_write || ram_read) begin
      busy <= 11;
      ops  <= ops + 1;
      if (ram_write) writes <= writes + 1;
      if (ram_read)  reads  <= reads + 1;
      if (ram_write && !(state == ST_CAMERA || state == ST_FINAL)) bad_gate <= bad_gate + 1;
      if (ram_read && !(state == ST_PROCESSOR || state == ST_DISPLAY)) bad_gate <= bad_gate + 1;
      if (ram_read && state == ST_DISPLAY && (vga_fifo_full || vga_flush)) bad_gate <= bad_gate + 1;
      if (addr != exp_addr) bad_addr <= bad_addr + 1;
    end
  end

  // reference address: +4 per accepted op (wrapping), cleared at the same
  // points as the controller clears it
  logic [22:0] exp_next;
  logic clear_cond;
  always_comb begin
    exp_next = exp_addr + 23'd4;
    if (exp_next >= 23'(WRAP)) exp_next = '0;
    clear_cond = rst || state == ST_WAIT ||
                 (state == ST_FINAL && dut.next_state == ST_PROCESSOR) ||
                 (state == ST_PROCESSOR && dut.next_state == ST_DISPLAY) ||
                 (state == ST_DISPLAY && vga_flush);
  end
  always_ff @(posedge clk) begin
    if (clear_cond) exp_addr <= '0;
    else if (busy == 0 && (ram_write || ram_read)) exp_addr <= exp_next;
  end

  // clocks spent in DISPLAY when auto_next_frame fired
  int disp_cnt = 0, fire_at = -1;
  always_ff @(posedge clk) begin
    disp_cnt <= (state == ST_DISPLAY) ? disp_cnt + 1 : 0;
    if (auto_next_frame) fire_at <= disp_cnt;
    if (auto_next_frame && !fifo_reset) failures <= failures + 1;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (state %0d addr %0d t=%0t)", msg, state, addr, $time);
    end
  endtask

  task automatic wait_state(input frame_state_e s, input int limit, input string msg);
    int n = 0;
    while (state != s && n < limit) begin @(posedge clk); n++; end
    check(state == s, msg);
  endtask

  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
  endtask

  // watchdog
  initial begin
    #2ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // one acquisition: VREF falls, the pipeline offers n_words words, VREF rises
  task automatic acquire(input int n_words);
    int w0;
    vref = 0;
    wait_state(ST_CAMERA, 10, "VREF fall enters CAMERA");
    check(capture_en && cam_read_en, "capture enabled in CAMERA");
    w0 = writes;
    for (int i = 0; i < n_words; i++) begin
      repeat ($urandom_range(1, 20)) @(negedge clk);
      proc_valid = 1;
      #1;
      // after a falling edge proc_out_ready shows what the next rising edge takes
      while (!proc_out_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      proc_valid = 0;
      if (i == n_words - 2) begin vref = 1; processing_complete = 0; end
    end
    wait_state(ST_FINAL, 10, "VREF rise enters FINAL");
    check(state == ST_FINAL, "FINAL reached");
    clocks(30);
    check(state == ST_FINAL, "FINAL waits for processing_complete");
    processing_complete = 1;
    wait_state(ST_PROCESSOR, 20, "FINAL -> PROCESSOR");
    processing_complete = 0;
    check(writes - w0 == n_words, $sformatf("%0d writes for %0d words", writes - w0, n_words));
    @(posedge clk);
    check(addr == 0, "address cleared entering PROCESSOR");
    check(processor_active && !capture_en, "processor owns the RAM");
  endtask

  initial begin
    int r0, nread, t0, t1;
    clocks(5);
    rst = 0;
    clocks(5);

    // ---- WAIT drains the pipeline, no writes ----
    check(state == ST_WAIT, "reset state WAIT");
    proc_valid = 1;
    @(posedge clk);
    check(proc_out_ready && !ram_write, "WAIT drains without writing");
    proc_valid = 0;

    // ---- powering_up blocks leaving WAIT ----
    powering_up = 1;
    vref = 0;
    clocks(10);
    check(state == ST_WAIT, "stays in WAIT while RAM powers up");
    vref = 1;
    clocks(5);
    powering_up = 0;
    clocks(5);

    // ---- acquisition over more than one address wrap ----
    acquire(6);

    // ---- processor reads: one per blob_read rising edge ----
    r0 = reads;
    nread = 0;
    for (int i = 0; i < 6; i++) begin
      blob_read = 1;
      clocks($urandom_range(20, 40));
      blob_read = 0;
      clocks($urandom_range(15, 30));
      nread++;
    end
    check(reads - r0 == nread, $sformatf("%0d reads for %0d blob_read pulses", reads - r0, nread));
    check(addr == 23'((6 * 4) % WRAP), "address advanced and wrapped during reads");

    // ---- PROCESSOR -> DISPLAY ----
    blob_next_frame = 1;
    wait_state(ST_DISPLAY, 10, "blob_next_frame enters DISPLAY");
    t0 = $time;
    blob_next_frame = 0;
    @(posedge clk);
    check(display && !processor_active, "display flag in DISPLAY");

    // display reads follow the VGA FIFO
    clocks(100);
    check(reads - r0 > nread + 3, "display reads run while FIFO has room");
    vga_fifo_full = 1;
    clocks(14);
    r0 = reads;
    clocks(60);
    check(reads == r0, "no display reads while FIFO full");
    vga_fifo_full = 0;
    vga_flush = 1;
    clocks(14);
    check(addr == 0, "flush clears address");
    r0 = reads;
    clocks(40);
    check(reads == r0, "no display reads while flushing");
    vga_flush = 0;
    clocks(40);
    check(reads > r0, "display reads resume after flush");

    // manual next_frame leaves DISPLAY
    next_frame = 1;
    @(posedge clk);
    #1 check(fifo_reset, "next_frame resets FIFOs");
    @(negedge clk);
    next_frame = 0;
    check(state == ST_WAIT, "next_frame returns to WAIT");
    check(addr == 0, "WAIT clears address");

    // ---- auto mode: second frame, auto restart timing ----
    auto_mode = 1;
    acquire(3);
    blob_next_frame = 1;
    wait_state(ST_DISPLAY, 10, "second DISPLAY");
    blob_next_frame = 0;
    fire_at = -1;
    t0 = 0;
    while (fire_at < 0 && t0 < 3 * DP) begin @(negedge clk); t0++; end
    check(fire_at == AF, $sformatf("auto restart after %0d clocks in DISPLAY (expected %0d)",
                                   fire_at, AF));
    check(state == ST_WAIT, "auto restart returns to WAIT");

    // without auto mode the display stays up past the period
    auto_mode = 0;
    acquire(2);
    blob_next_frame = 1;
    wait_state(ST_DISPLAY, 10, "third DISPLAY");
    blob_next_frame = 0;
    t1 = 0;
    repeat (2 * DP) begin @(posedge clk); #1; if (auto_next_frame) t1++; end
    check(t1 == 0 && state == ST_DISPLAY, "no restart without auto mode");

    // powering_up aborts any state
    powering_up = 1;
    clocks(3);
    check(state == ST_WAIT, "powering_up aborts DISPLAY");
    powering_up = 0;

    check(bad_gate == 0, $sformatf("%0d RAM operations in a wrong state", bad_gate));
    check(bad_addr == 0, $sformatf("%0d RAM operations at a wrong address", bad_addr));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
