// Self-checking test of the VGA display at a reduced mode (32x8 visible).
// The testbench plays the RAM reader: while display is on and the FIFO is not
// almost full it returns one 64-bit word of a known image 12 clocks after the
// request, restarting at word 0 while frame_flush is high.  It then measures,
// from the sync outputs alone, the sync pulse widths and line/frame periods,
// and checks every visible pixel of two whole frames against the image (first
// pixel of a word in its top byte).  The FIFO must never underflow.
//
// The 64-bit-in / 8-bit-out FIFO and the counter-based timing follow the
// original display; the reduced mode and the 12-clock reader model are this
// testbench's choices.  A watchdog ends a hung run.
module vga_display_tb;
  localparam int HA = 32, HF = 4, HS_W = 8, HB = 4;
  localparam int VA = 8, VF = 2, VS_W = 2, VB = 3;
  localparam int HT = HA + HF + HS_W + HB, VT = VA + VF + VS_W + VB;
  localparam int NW = HA * VA / 8;

  logic clk_80m = 0, clk_25m = 0, rst = 1;
  always #6.25 clk_80m = ~clk_80m;
  always #20   clk_25m = ~clk_25m;

  logic display, data_valid, fifo_full, frame_flush, hs, vs, underflow;
  logic [63:0] data;
  logic [7:0] vga_color;

  vga_display #(.H_ACTIVE(HA), .H_FRONT(HF), .H_SYNC(HS_W), .H_BACK(HB),
                .V_ACTIVE(VA), .V_FRONT(VF), .V_SYNC(VS_W), .V_BACK(VB)) dut (
    .clk_80m, .clk_25m, .rst, .display, .data_valid, .data, .fifo_full,
    .frame_flush, .hs, .vs, .vga_color, .underflow);

  function automatic logic [7:0] img(input int i);
    return 8'((i * 37 + (i >> 3) * 11 + 5) & 8'hFF);
  endfunction

  // ---- RAM reader model (80 MHz) ----
  int rd_addr = 0, busy = 0, rd_word = 0, reads = 0;
  always @(posedge clk_80m) begin
    data_valid <= 1'b0;
    if (busy > 0) begin
      busy <= busy - 1;
      if (busy == 1) begin
        data_valid <= 1'b1;
        for (int k = 0; k < 8; k++) data[63 - 8*k -: 8] <= img(rd_word * 8 + k);
      end
    end else if (display && !fifo_full && !frame_flush) begin
      busy <= 12; rd_word <= rd_addr; reads <= reads + 1;
      rd_addr <= (rd_addr + 1) % NW;
    end
    if (frame_flush) rd_addr <= 0;
  end

  // ---- checker (25 MHz) ----
  int checks = 0, failures = 0;
  int hpos = -1, hfalls = -1, frames = 0, hs_low = 0, vs_low = 0;
  logic hs_q = 1, vs_q = 1;
  int pix_checked = 0;

  always @(posedge clk_25m) begin
    if (!rst) begin
      hs_q <= hs; vs_q <= vs;
      hs_low <= hs ? 0 : hs_low + 1;
      vs_low <= vs ? 0 : vs_low + 1;
      if (hs_q && !hs) begin
        if (hpos >= 0) begin
          checks++;
          if (hpos + 1 != HT) begin failures++; $display("FAIL line period %0d", hpos + 1); end
        end
        hpos <= 0;
        hfalls <= (hfalls >= 0) ? hfalls + 1 : hfalls;
      end else if (hpos >= 0) hpos <= hpos + 1;
      if (!hs_q && hs) begin
        checks++;
        if (hs_low != HS_W) begin failures++; $display("FAIL hsync width %0d", hs_low); end
      end
      if (!vs_q && vs) begin
        checks++;
        if (vs_low != VS_W * HT) begin failures++; $display("FAIL vsync width %0d", vs_low); end
      end
      if (vs_q && !vs) begin
        frames <= frames + 1;
        hfalls <= 0;
      end
      // visible pixels of frames 2 and 3
      if (frames >= 2 && frames <= 3 && hfalls >= 0 && hpos >= 0) begin
        int y, x;
        // pixels after the j-th hsync fall (j from 0) belong to line VA+VF+j+1
        y = (VA + VF + hfalls) % VT;   // hfalls = j+1 after the j-th fall
        x = hpos + 1 - (HS_W + HB);
        if (hs_q && !hs) x = -1000;
        if (y < VA && x >= 0 && x < HA) begin
          checks++; pix_checked++;
          if (vga_color !== img(y * HA + x)) begin
            failures++;
            if (failures < 10) $display("FAIL pixel (%0d,%0d) got %h want %h", x, y, vga_color, img(y * HA + x));
          end
        end
      end
    end
  end

  initial begin
    display = 0; data = 0; data_valid = 0;
    repeat (4) @(posedge clk_80m);
    rst = 0;
    repeat (10) @(posedge clk_80m);
    @(negedge clk_80m) display = 1;
    wait (frames == 4);
    repeat (5) @(posedge clk_25m);
    checks++;
    if (pix_checked != 2 * HA * VA) begin
      failures++; $display("FAIL checked %0d pixels, want %0d", pix_checked, 2 * HA * VA);
    end
    checks++;
    if (underflow) begin failures++; $display("FAIL FIFO underflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_25m);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
