// VGA display of the frame store.
//
// Two parts.  A timing generator clocked at 25 MHz runs a horizontal and a
// vertical counter and produces 640x480 at 60 Hz (800 clocks per line, 525
// lines per frame, negative sync pulses).  A dual-clock FIFO receives 64-bit
// words read from the RAM in the 80 MHz domain and the display takes one
// 8-bit RGB 3-3-2 pixel per 25 MHz clock during the visible area, the byte in
// bits 63:56 first.
//
// The RAM reader asks for words while fifo_full (an almost-full flag with room
// for the one burst that may still be in flight) is low.  While the display is
// disabled, and during every vertical sync pulse, both sides of the FIFO are
// held in reset and frame_flush (80 MHz domain) is high; the reader uses it to
// restart at address 0, so each frame starts from the first pixel of the
// store.  After the display is enabled the first frame shown is the one that
// follows the next vertical sync.  A pixel needed while the FIFO is empty is shown black and counted
// in underflow (sticky).
//
// Outputs hs, vs and vga_color are registered together, one 25 MHz clock
// after the counters.  The counters, the 640x480 mode, the 25 MHz clock and
// the 64-in / 8-out FIFO follow the document; the sync porch values (the
// common 640x480 industry timing), the per-frame flush and the underflow flag
// are this design's choices.
module vga_display #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FRONT  = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BACK   = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FRONT  = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 33,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk_80m,
  input  logic        clk_25m,
  input  logic        rst,
  input  logic        display,      // clk_80m domain
  input  logic        data_valid,   // clk_80m domain
  input  logic [63:0] data,
  output logic        fifo_full,
  output logic        frame_flush,
  output logic        hs,
  output logic        vs,
  output logic [7:0]  vga_color,
  output logic        underflow
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FRONT + V_SYNC + V_BACK;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- 25 MHz timing ----------------
  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;
  logic disp_s1, disp_s2;
  logic active, hsync_n, vsync_n;
  logic rflush;

  always_ff @(posedge clk_25m or posedge rst) begin
    if (rst) begin
      hcnt    <= '0;
      vcnt    <= '0;
      disp_s1 <= 1'b0;
      disp_s2 <= 1'b0;
    end else begin
      disp_s1 <= display;
      disp_s2 <= disp_s1;
      if (hcnt == HW'(H_TOTAL - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == VW'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
    end
  end

  assign active  = (hcnt < HW'(H_ACTIVE)) && (vcnt < VW'(V_ACTIVE));
  assign hsync_n = !((hcnt >= HW'(H_ACTIVE + H_FRONT)) &&
                     (hcnt <  HW'(H_ACTIVE + H_FRONT + H_SYNC)));
  assign vsync_n = !((vcnt >= VW'(V_ACTIVE + V_FRONT)) &&
                     (vcnt <  VW'(V_ACTIVE + V_FRONT + V_SYNC)));

  // read-side flush: from display off until the end of the next vertical
  // sync, and during every vertical sync
  logic hold;
  always_ff @(posedge clk_25m or posedge rst) begin
    if (rst) begin
      hold   <= 1'b1;
      rflush <= 1'b1;
    end else begin
      if (!disp_s2)      hold <= 1'b1;
      else if (!vsync_n) hold <= 1'b0;
      rflush <= !disp_s2 || hold || !vsync_n;
    end
  end

  // ---------------- 80 MHz side ----------------
  logic fl_s1, fl_s2;
  always_ff @(posedge clk_80m or posedge rst) begin
    if (rst) begin
      fl_s1 <= 1'b1;
      fl_s2 <= 1'b1;
    end else begin
      fl_s1 <= rflush;
      fl_s2 <= fl_s1;
    end
  end
  assign frame_flush = fl_s2 || !display;

  logic [CW-1:0] wcount;
  logic          wfull;
  logic [63:0]   rword;
  logic          rvalid;
  logic          ren;
  logic [2:0]    byte_idx;

  async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk  (clk_80m),
    .wrst  (rst || frame_flush),
    .wen   (data_valid),
    .wdata (data),
    .wfull (wfull),
    .wcount(wcount),
    .rclk  (clk_25m),
    .rrst  (rst || rflush),
    .ren   (ren),
    .rdata (rword),
    .rvalid(rvalid)
  );

  assign fifo_full = wfull || (wcount >= CW'(FIFO_DEPTH - 2));

  // ---------------- pixel output ----------------
  logic [7:0] pixel;
  assign ren = active && (byte_idx == 3'd7);

  always_comb begin
    unique case (byte_idx)
      3'd0: pixel = rword[63:56];
      3'd1: pixel = rword[55:48];
      3'd2: pixel = rword[47:40];
      3'd3: pixel = rword[39:32];
      3'd4: pixel = rword[31:24];
      3'd5: pixel = rword[23:16];
      3'd6: pixel = rword[15:8];
      default: pixel = rword[7:0];
    endcase
  end

  always_ff @(posedge clk_25m or posedge rst) begin
    if (rst) begin
      byte_idx  <= '0;
      hs        <= 1'b1;
      vs        <= 1'b1;
      vga_color <= '0;
      underflow <= 1'b0;
    end else begin
      hs <= hsync_n;
      vs <= vsync_n;
      if (rflush) byte_idx <= '0;
      else if (active) byte_idx <= byte_idx + 1'b1;
      if (active && rvalid && !rflush) vga_color <= pixel;
      else vga_color <= '0;
      if (active && !rvalid && !rflush) underflow <= 1'b1;
    end
  end

endmodule
