// Beacon localisation vision subsystem (one camera station) and LED beacon.
//
// Each camera station turns the camera's video into a filtered frame in RAM
// that a soft processor searches for beacons.  Camera bytes (UYVY, 54 MHz
// pixel clock) are packed into macropixels and moved into the 80 MHz system
// domain (camera_in), split into pixels, converted to RGB, reduced by the
// six-threshold colour filter to 8-bit normalised colours and packed eight to a
// 64-bit word (processing), and written to the cellular RAM in 4-word bursts
// (ram_interface).  frame_ctrl sequences capture, hand-over to the processor
// and display, and generates the RAM address.  When the processor releases the
// frame, vga_display shows it on a 640x480 monitor.  The LED beacon controller
// that each robot carries (beacon_ctrl) stands beside it with its own clock and
// pins.
//
// Parts outside this module: the clock generator (80 MHz, 25 MHz inputs), the
// camera, the RAM chip (its DQ bus is split into dq_o/dq_i/dq_oe for the pad),
// and the soft processor with its UART, whose general-purpose ports connect
// here:
//   gpi1/gpi2  RAM read data [63:32] / [31:0]
//   gpi3       {read data valid, processor owns RAM, RAM ready, sw[2:0], 26'b0}
//   gpo1[31]   frame processed (blob_next_frame), gpo1[30] read request
//              (rising edge starts one 64-bit burst read), gpo1[29:23] LEDs
// The read-data-valid bit stays set from the end of a read until the next
// read request, so a polling program cannot miss it.
//
// Clock domains: dclk (camera), clk_80m (system, RAM), clk_25m (VGA),
// beacon_clk (beacon).  rst is active high; the camera FIFO and the
// beacon filter are also reset when a new frame is requested (next_frame or
// the automatic restart, which frame_ctrl folds into fifo_reset).  The
// lint tool notes that rst and that frame reset are used both as
// asynchronous resets (the dual-clock camera FIFO, whose write side has no
// 80 MHz clock to time a synchronous reset) and as synchronous ones (the
// 80 MHz logic); both uses are intended.  gpo1[22:0] are not used and
// gpi3[25:0] are tied to zero: the processor port is 32 bits wide and only
// the listed bits carry anything.
//
// The block split, the clock frequencies, the state sequence, the 64-bit
// processor read path and the LED and switch mapping follow the original
// system; the exact bit positions on the processor ports, the sticky
// read-valid flag and gating the display FIFO writes with the display state
// are this design's choices.
module robot_loc_top
  import rl_pkg::frame_state_e, rl_pkg::ST_DISPLAY;
#(
  parameter int unsigned HPIXELS = 640,
  parameter int unsigned VPIXELS = 480,
  parameter int unsigned POWERUP_CYCLES    = 12000,
  parameter int unsigned DISPLAY_PERIOD    = 80_000_000,
  parameter int unsigned AUTO_FRAME_CYCLES = 16_000_000,
  parameter int unsigned BEACON_MUX_DIV    = 125,
  parameter int unsigned BEACON_BTN_DIV    = 96_008
) (
  input  logic        clk_80m,
  input  logic        clk_25m,
  input  logic        rst,
  input  logic        next_frame,
  input  logic        filter_en,
  input  logic        auto_mode,
  input  logic [2:0]  sw,
  // camera
  input  logic        dclk,
  input  logic        href,
  input  logic        vref,
  input  logic [7:0]  din,
  // soft processor ports
  input  logic [31:0] gpo1,
  output logic [31:0] gpi1,
  output logic [31:0] gpi2,
  output logic [31:0] gpi3,
  output logic [7:0]  led,
  // cellular RAM
  output logic        clk_ram,
  output logic        adv_l,
  output logic        ce_l,
  output logic        oe_l,
  output logic        we_l,
  output logic        lb_l,
  output logic        ub_l,
  output logic        cre,
  output logic        flash_ce_l,
  output logic [22:0] addr,
  output logic [15:0] dq_o,
  output logic        dq_oe,
  input  logic [15:0] dq_i,
  // VGA
  output logic        hs,
  output logic        vs,
  output logic [7:0]  vga_color,
  // status
  output frame_state_e state,
  output logic        cam_overflow,
  output logic        vga_underflow,
  // LED beacon
  input  logic        beacon_clk,
  input  logic        beacon_rst,
  input  logic        beacon_btn_n,
  output logic [3:0]  beacon_pattern,
  output logic [1:0]  beacon_row_n,
  output logic [1:0]  beacon_red,
  output logic [1:0]  beacon_green,
  output logic [1:0]  beacon_blue
);
  logic        cam_valid, cam_read_en, proc_in_ready, capture_en;
  logic [31:0] cam_data;
  logic        proc_valid, proc_out_ready, processing_complete;
  logic [63:0] proc_data;
  logic        ram_ready, ram_write, ram_read, data_valid, powering_up;
  logic [63:0] ram_dout;
  logic [22:0] addr_in;
  logic        vga_fifo_full, vga_flush, display, processor_active;
  logic        fifo_reset;
  logic        frame_rst;
  logic        rd_done;

  // registered reset of the camera FIFO and the beacon filter
  always_ff @(posedge clk_80m or posedge rst) begin
    if (rst) frame_rst <= 1'b1;
    else     frame_rst <= fifo_reset;
  end

  camera_in #(.HPIXELS(HPIXELS)) u_camera_in (
    .dclk      (dclk),
    .clk       (clk_80m),
    .rst       (frame_rst),
    .href      (href),
    .din       (din),
    .capture_en(capture_en),
    .out_ready (cam_read_en && proc_in_ready),
    .out_valid (cam_valid),
    .out_data  (cam_data),
    .overflow  (cam_overflow)
  );

  processing u_processing (
    .clk                (clk_80m),
    .rst                (frame_rst),
    .filter_en          (filter_en),
    .in_valid           (cam_valid && cam_read_en),
    .in_data            (cam_data),
    .in_ready           (proc_in_ready),
    .out_valid          (proc_valid),
    .out_data           (proc_data),
    .out_ready          (proc_out_ready),
    .processing_complete(processing_complete)
  );

  ram_interface #(.POWERUP_CYCLES(POWERUP_CYCLES)) u_ram (
    .clk        (clk_80m),
    .rst        (rst),
    .write      (ram_write),
    .read       (ram_read),
    .addr_in    (addr_in),
    .din        (proc_data),
    .ready      (ram_ready),
    .dout_valid (data_valid),
    .dout       (ram_dout),
    .powering_up(powering_up),
    .clk_out    (clk_ram),
    .adv_l      (adv_l),
    .ce_l       (ce_l),
    .oe_l       (oe_l),
    .we_l       (we_l),
    .lb_l       (lb_l),
    .ub_l       (ub_l),
    .cre        (cre),
    .flash_ce_l (flash_ce_l),
    .addr_out   (addr),
    .dq_o       (dq_o),
    .dq_oe      (dq_oe),
    .dq_i       (dq_i)
  );

  frame_ctrl #(
    .HPIXELS(HPIXELS), .VPIXELS(VPIXELS),
    .DISPLAY_PERIOD(DISPLAY_PERIOD), .AUTO_FRAME_CYCLES(AUTO_FRAME_CYCLES)
  ) u_ctrl (
    .clk                (clk_80m),
    .rst                (rst),
    .next_frame         (next_frame),
    .auto_mode          (auto_mode),
    .vref               (vref),
    .powering_up        (powering_up),
    .processing_complete(processing_complete),
    .ram_ready          (ram_ready),
    .proc_valid         (proc_valid),
    .blob_read          (gpo1[30]),
    .blob_next_frame    (gpo1[31]),
    .vga_fifo_full      (vga_fifo_full),
    .vga_flush          (vga_flush),
    .state              (state),
    .addr               (addr_in),
    .capture_en         (capture_en),
    .cam_read_en        (cam_read_en),
    .proc_out_ready     (proc_out_ready),
    .ram_write          (ram_write),
    .ram_read           (ram_read),
    .display            (display),
    .processor_active   (processor_active),
    .auto_next_frame    (),
    .fifo_reset         (fifo_reset)
  );

  vga_display u_vga (
    .clk_80m    (clk_80m),
    .clk_25m    (clk_25m),
    .rst        (rst),
    .display    (display),
    .data_valid (data_valid && state == ST_DISPLAY),
    .data       (ram_dout),
    .fifo_full  (vga_fifo_full),
    .frame_flush(vga_flush),
    .hs         (hs),
    .vs         (vs),
    .vga_color  (vga_color),
    .underflow  (vga_underflow)
  );

  // processor read-data-valid flag
  always_ff @(posedge clk_80m) begin
    if (rst || !processor_active || ram_read) rd_done <= 1'b0;
    else if (data_valid)                      rd_done <= 1'b1;
  end

  assign gpi1 = ram_dout[63:32];
  assign gpi2 = ram_dout[31:0];
  assign gpi3 = {rd_done, processor_active, ram_ready && !powering_up, sw, 26'b0};
  assign led  = {processor_active, gpo1[29:23]};

  beacon_ctrl #(.MUX_DIV(BEACON_MUX_DIV), .BTN_DIV(BEACON_BTN_DIV)) u_beacon (
    .clk    (beacon_clk),
    .rst    (beacon_rst),
    .btn_n  (beacon_btn_n),
    .pattern(beacon_pattern),
    .row_n  (beacon_row_n),
    .red    (beacon_red),
    .green  (beacon_green),
    .blue   (beacon_blue)
  );

endmodule
