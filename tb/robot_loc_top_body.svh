// Shared body of the end-to-end testbenches for robot_loc_top.
//
// Included inside a testbench module after it has declared the localparams
//   HP, VP            camera/frame size (must match the DUT's HPIXELS/VPIXELS)
//   H_BLANK, V_BLANK  camera blanking (pixels per line, lines per frame)
//   MEM_AW            address bits of the RAM model
//   AF                the DUT's AUTO_FRAME_CYCLES
//   FULL              1 for the full-size run (one frame, fewer scenarios)
// and instantiated robot_loc_top as "dut" with its ports connected to the
// signals declared here.
//
// How it works: a camera model streams UYVY frames; a cellular-RAM model
// answers the DUT's burst bus; a task plays the soft processor through the
// general-purpose ports (gpo1 bit 30 = read one 64-bit word, bit 31 = next
// frame; gpi1/gpi2 = data, gpi3 bit 31 = data ready, bit 30 = processor
// mode).  Every stored frame is read back word by word and compared with the
// filter output expected for the colour blocks the camera sent.  The VGA
// output of one whole displayed frame is compared pixel by pixel with the
// same image (the display wraps the frame store, so screen pixel n shows
// stored pixel n mod HP*VP).
//
// Scenarios (small run): the RAM powers up while the camera is already
// running; frame 1 with the colour filter on is stored, read and displayed;
// next_frame returns to waiting; frame 2 is taken with the filter off (plain
// 8-bit colour); auto mode restarts after the display timer; a next_frame
// press in the middle of a capture aborts it and the next frame is taken
// cleanly; the LED beacon is stepped through its patterns by button presses.
// Each mechanism is counted and the run fails if any count stays zero.
// The full-size run does the first frame (store, read, display) only.

  logic clk_80m = 0, clk_25m = 0, rst = 1;
  logic beacon_clk = 0, beacon_rst = 1, beacon_btn_n = 1;
  logic next_frame = 0, filter_en = 1, auto_mode = 0;
  logic [2:0] sw = 3'b101;
  logic dclk, href, vref;
  logic [7:0] din;
  logic [31:0] gpo1 = 0, gpi1, gpi2, gpi3;
  logic [7:0] led;
  logic clk_ram, adv_l, ce_l, oe_l, we_l, lb_l, ub_l, cre, flash_ce_l;
  logic [22:0] addr;
  logic [15:0] dq_o, dq_i, dq_m;
  logic dq_oe, dq_drive;
  logic hs, vs;
  logic [7:0] vga_color;
  rl_pkg::frame_state_e state;
  logic cam_overflow, vga_underflow;
  logic [3:0] beacon_pattern;
  logic [1:0] beacon_row_n, beacon_red, beacon_green, beacon_blue;

  localparam int NUM = HP * VP;
  localparam int NWORDS = NUM / 8;

  always #6.25 clk_80m = ~clk_80m;   // 80 MHz
  always #20   clk_25m = ~clk_25m;   // 25 MHz
  always #500  beacon_clk = ~beacon_clk;  // 1 MHz

  logic cam_run = 0;
  int cam_frame_no, cam_frames_done;
  camera_model #(.HPIX(HP), .VPIX(VP), .H_BLANK_PIX(H_BLANK), .V_BLANK_LINES(V_BLANK)) cam (
    .run(cam_run), .dclk, .href, .vref, .din, .frame_no(cam_frame_no),
    .frames_done(cam_frames_done));

  logic [22:0] bcr;
  int bcr_writes, bursts, ram_errors;
  cellular_ram_model #(.MEM_AW(MEM_AW)) ram (
    .clk(clk_ram), .adv_l, .ce_l, .oe_l, .we_l, .cre, .addr,
    .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_m), .dq_drive,
    .bcr, .bcr_writes, .bursts, .errors(ram_errors));
  assign dq_i = dq_drive ? dq_m : 16'h0000;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // ---------------------------------------------------------------------
  // expected image
  logic [7:0] exp_img[];
  int cap_frame = -1;
  int pass_px = 0, reject_px = 0;

  function automatic logic [7:0] expected_pixel(input int frame, input int x, input int y,
                                                input bit filt);
    int c[3];
    bit any_on, any_mid;
    logic [2:0] t[3];
    for (int ch = 0; ch < 3; ch++) c[ch] = cam.chan_class(frame, x, y, ch);
    if (!filt) begin
      for (int ch = 0; ch < 3; ch++)
        t[ch] = (c[ch] == 1) ? 3'b110 : (c[ch] == 0) ? 3'b001 : 3'b100;
      return {t[0], t[1], t[2][2:1]};
    end
    any_on = 0; any_mid = 0;
    for (int ch = 0; ch < 3; ch++) begin
      if (c[ch] == 1) any_on = 1;
      if (c[ch] == 2) any_mid = 1;
    end
    if (!any_on || any_mid) return 8'h00;
    return {{3{c[0] == 1}}, {3{c[1] == 1}}, {2{c[2] == 1}}};
  endfunction

  task automatic build_expected(input int frame, input bit filt);
    exp_img = new[NUM];
    for (int y = 0; y < VP; y++)
      for (int x = 0; x < HP; x++)
        exp_img[y * HP + x] = expected_pixel(frame, x, y, filt);
  endtask

  // ---------------------------------------------------------------------
  // mechanism counters
  int st_visits[5];
  int powerup_holds = 0, vga_full_cycles = 0, vga_flushes = 0, display_wraps = 0;
  int auto_restarts = 0, capture_aborts = 0, filter_off_frames = 0, proc_wraps = 0;
  int ram_write_waits = 0, beacon_steps = 0;
  logic [2:0] st_q = 3'd0;
  logic vref_q = 1, flush_q = 0;

  always @(posedge clk_80m) begin
    if (!rst) begin
      st_q <= state;
      vref_q <= vref;
      flush_q <= dut.vga_flush;
      if (state != st_q) st_visits[int'(state)]++;
      if (state == rl_pkg::ST_CAMERA && st_q != rl_pkg::ST_CAMERA) cap_frame <= cam_frame_no;
      if (vref_q && !vref && dut.powering_up) powerup_holds++;
      if (state == rl_pkg::ST_DISPLAY && dut.vga_fifo_full) vga_full_cycles++;
      if (state == rl_pkg::ST_DISPLAY && dut.vga_flush && !flush_q) vga_flushes++;
      if (state == rl_pkg::ST_DISPLAY && dut.ram_read && dut.ram_ready && dut.addr_in == 0)
        display_wraps++;
      if (dut.u_ctrl.auto_next_frame) auto_restarts++;
      if (next_frame && state == rl_pkg::ST_CAMERA) capture_aborts++;
      if (dut.ram_write && !dut.ram_ready) ram_write_waits++;
    end
  end

  // ---------------------------------------------------------------------
  // soft-processor emulation
  task automatic wait_state(input rl_pkg::frame_state_e s, input int max_cycles, input string msg);
    int n = 0;
    while (state != s && n < max_cycles) begin @(posedge clk_80m); n++; end
    check(state == s, msg);
  endtask

  // read nw words from the start of the frame store and compare
  task automatic processor_read(input int nw, input string tag);
    int bad = 0;
    logic [63:0] w, want;
    check(gpi3[30] == 1'b1, {tag, ": processor mode flag"});
    for (int k = 0; k < nw; k++) begin
      int n = 0;
      @(negedge clk_80m) gpo1[30] = 1'b1;
      while (gpi3[31] && n < 100) begin @(negedge clk_80m); n++; end
      while (!gpi3[31] && n < 100) begin @(negedge clk_80m); n++; end
      w = {gpi1, gpi2};
      @(negedge clk_80m) gpo1[30] = 1'b0;
      repeat (4) @(negedge clk_80m);
      for (int j = 0; j < 8; j++) want[63 - 8*j -: 8] = exp_img[((k % NWORDS) * 8 + j)];
      if (k >= NWORDS) proc_wraps++;
      if (n >= 100 || w !== want) begin
        bad++;
        if (bad < 6) $display("  %s word %0d got %h want %h (n=%0d)", tag, k, w, want, n);
      end
    end
    check(bad == 0, $sformatf("%s: %0d of %0d words read back wrong", tag, bad, nw));
    for (int i = 0; i < NUM; i++) begin
      if (exp_img[i] == 8'h00) reject_px++; else pass_px++;
    end
  endtask

  task automatic processor_done();
    @(negedge clk_80m) gpo1[31] = 1'b1;
    wait_state(rl_pkg::ST_DISPLAY, 50, "processor hands over to the display");
    @(negedge clk_80m) gpo1[31] = 1'b0;
  endtask

  task automatic press_next_frame();
    @(negedge clk_80m) next_frame = 1'b1;
    @(negedge clk_80m) next_frame = 1'b0;
  endtask

  // ---------------------------------------------------------------------
  // VGA checker: compares one whole frame when vga_check is set
  localparam int HA = 640, HF = 16, HSW = 96, HB = 48;
  localparam int VA = 480, VF = 10, VSW = 2, VB = 33;
  localparam int HT = HA + HF + HSW + HB, VT = VA + VF + VSW + VB;
  logic vga_check = 0;
  int vga_frames = 0, vga_pix = 0, vga_bad = 0;
  int hpos = -1, hfalls = -1;
  logic hs_q = 1, vs_q = 1;

  always @(posedge clk_25m) begin
    if (!rst) begin
      hs_q <= hs; vs_q <= vs;
      if (hs_q && !hs) begin
        hpos <= 0;
        hfalls <= (hfalls >= 0) ? hfalls + 1 : hfalls;
      end else if (hpos >= 0) hpos <= hpos + 1;
      if (vs_q && !vs) begin
        hfalls <= 0;
        if (vga_check) vga_frames <= vga_frames + 1;
      end
      if (vga_check && vga_frames == 1 && hfalls >= 0 && hpos >= 0 && !(hs_q && !hs)) begin
        int y, x;
        y = (VA + VF + hfalls) % VT;
        x = hpos + 1 - (HSW + HB);
        if (y < VA && x >= 0 && x < HA) begin
          vga_pix++;
          if (vga_color !== exp_img[(y * HA + x) % NUM]) begin
            vga_bad++;
            if (vga_bad < 6)
              $display("  VGA pixel (%0d,%0d) got %h want %h", x, y, vga_color,
                       exp_img[(y * HA + x) % NUM]);
          end
        end
      end
    end
  end

  task automatic check_vga_frame(input string tag);
    vga_frames = 0; vga_pix = 0; vga_bad = 0;
    vga_check = 1;
    wait (vga_frames == 2);
    vga_check = 0;
    check(vga_pix == HA * VA, $sformatf("%s: %0d VGA pixels checked", tag, vga_pix));
    check(vga_bad == 0, $sformatf("%s: %0d VGA pixels wrong", tag, vga_bad));
  endtask

  // ---------------------------------------------------------------------
  // LED beacon: press the button and follow the pattern number
  int beacon_bad = 0;
  task automatic beacon_press(input int hold_cycles);
    logic [3:0] prev_pat;
    prev_pat = beacon_pattern;
    @(negedge beacon_clk) beacon_btn_n = 1'b0;
    repeat (hold_cycles) @(negedge beacon_clk);
    beacon_btn_n = 1'b1;
    repeat (hold_cycles) @(negedge beacon_clk);
    if (beacon_pattern != ((prev_pat == 4'd12) ? 4'd0 : prev_pat + 4'd1)) beacon_bad++;
    else beacon_steps++;
  endtask

  // ---------------------------------------------------------------------
  // one stored frame: wait for the capture, read it back, hand over
  task automatic take_frame(input bit filt, input string tag);
    wait_state(rl_pkg::ST_PROCESSOR, 40_000_000, {tag, ": frame stored"});
    build_expected(cap_frame, filt);
    processor_read(NWORDS + (FULL ? 0 : 2), tag);
  endtask
