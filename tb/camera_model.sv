// Behavioural model of the digital camera output (not synthesisable).
//
// What it does: produces the camera's pixel clock dclk (54 MHz), the line
// strobe href, the frame strobe vref and the 8-bit data bus din in UYVY
// (YUV 4:2:2) order: U, Y0, V, Y1 for each pair of pixels.
//
// Timing: every line is H_BLANK_PIX blank pixels (href low) followed by
// HPIX active pixels (href high, two bytes per pixel, one byte per dclk).
// A frame is V_BLANK_LINES lines with vref high (vertical blanking)
// followed by VPIX active lines with vref low.  The default numbers are the
// camera's 640x480, 60 Hz mode: 194 blank pixels per line and 59 blank lines,
// giving 539 lines of 1668 clocks (16.65 ms per frame).
//
// Image: frames are numbered from 0 by frame_no, which increments when vref
// falls.  Each pixel pair (the two pixels of one UYVY group, which share U
// and V) gets one of 27 colours: each channel is "on" (200), "off" (40) or
// "mid" (144), chosen by a hash of frame number, pair position and line.
// chan_class() lets a testbench compute the expected filter output for any
// frame and pixel.  The RGB values are turned into YUV with the BT.601
// equations in floating point.
//
// Own choices: the test image and the level values, which stay clear of the
// filter thresholds and of the 3-bit/2-bit boundaries used when the filter
// is off.
`timescale 1ns/1ps
module camera_model #(
  parameter int  HPIX          = 640,
  parameter int  VPIX          = 480,
  parameter int  H_BLANK_PIX   = 194,
  parameter int  V_BLANK_LINES = 59,
  parameter real DCLK_PERIOD   = 18.518  // 54 MHz
) (
  input  logic       run,
  output logic       dclk,
  output logic       href,
  output logic       vref,
  output logic [7:0] din,
  output int         frame_no,
  output int         frames_done
);
  localparam int LEVEL_ON = 200, LEVEL_OFF = 40, LEVEL_MID = 144;

  initial begin
    dclk = 1'b0;
    forever #(DCLK_PERIOD / 2.0) dclk = ~dclk;
  end

  // channel class for channel ch (0 = R, 1 = G, 2 = B): 0 off, 1 on, 2 mid
  function automatic int chan_class(input int frame, input int x, input int y, input int ch);
    int unsigned h;
    h = 32'(frame) * 32'h9E3779B1 ^ 32'(x / 2) * 32'h85EBCA77 ^ 32'(y) * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    // most blocks are clean on/off colours; about one channel in eight is mid
    h = h >> (ch * 5);
    if ((h & 32'h7) == 0) return 2;
    return int'((h >> 3) & 32'h1);
  endfunction

  function automatic int level(input int cls);
    if (cls == 1) return LEVEL_ON;
    if (cls == 0) return LEVEL_OFF;
    return LEVEL_MID;
  endfunction

  function automatic int clip(input real x);
    int r;
    r = $rtoi(x + 0.5 + 1000.0) - 1000;
    if (r < 0) return 0;
    if (r > 255) return 255;
    return r;
  endfunction

  // the four bytes (U, Y0, V, Y1) of the pair holding pixel x of line y
  function automatic logic [31:0] macropixel(input int frame, input int x, input int y);
    real r, g, b, yy, u, v;
    r = real'(level(chan_class(frame, x, y, 0)));
    g = real'(level(chan_class(frame, x, y, 1)));
    b = real'(level(chan_class(frame, x, y, 2)));
    yy = 0.299 * r + 0.587 * g + 0.114 * b;
    u  = (b - yy) * 0.492111 + 128.0;
    v  = (r - yy) * 0.877283 + 128.0;
    return {8'(clip(u)), 8'(clip(yy)), 8'(clip(v)), 8'(clip(yy))};
  endfunction

  initial begin
    logic [31:0] mp;
    href = 1'b0; vref = 1'b1; din = 8'h00;
    frame_no = -1; frames_done = 0;
    wait (run);
    forever begin
      // vertical blanking
      vref = 1'b1;
      repeat (V_BLANK_LINES * (H_BLANK_PIX + HPIX) * 2) @(posedge dclk);
      @(negedge dclk);
      vref = 1'b0;
      frame_no++;
      for (int y = 0; y < VPIX; y++) begin
        repeat (H_BLANK_PIX * 2) @(negedge dclk);
        href = 1'b1;
        for (int x = 0; x < HPIX; x += 2) begin
          mp = macropixel(frame_no, x, y);
          for (int k = 0; k < 4; k++) begin
            din = mp[31 - 8*k -: 8];
            @(negedge dclk);
          end
        end
        href = 1'b0;
        din = 8'h00;
      end
      frames_done++;
    end
  end
endmodule
