// Beacon colour filter and pixel compressor.
//
// Each RGB pixel is compared against six thresholds: a channel is "on" when it
// is above its minimum (R_MIN, G_MIN, B_MIN) and "off" when it is below its
// maximum (R_MAX, G_MAX, B_MAX).  A pixel passes only if every channel is
// clearly on or clearly off and at least one is on, i.e. it is a is_pure
// saturated mix of the primaries as LED beacons and calibration markers are
// (red, green, blue, yellow, purple, cyan, and white for bright lights, which
// this filter cannot tell apart from a beacon).  A passing pixel is normalised:
// each "on" channel is driven to full scale and each "off" channel to zero.
// Every other pixel becomes 0 (background).
//
// The output is 8 bits per pixel in RGB 3-3-2 form (red in bits 7:5, green in
// 4:2, blue in 1:0), the format kept in the frame store and sent to the VGA
// DAC.  With filter_en low the block is a plain compressor that keeps the top
// bits of each channel.
//
// Timing: one register; out_valid/out_pix follow in_valid/in_rgb by one clock.
// The six-threshold rule comes from the document; the threshold values and the
// 3-3-2 format are this design's choices.
module color_filter
  import rl_pkg::rgb_t, rl_pkg::COL_BLACK;
#(
  parameter logic [7:0] R_MIN = 8'd160,
  parameter logic [7:0] G_MIN = 8'd160,
  parameter logic [7:0] B_MIN = 8'd160,
  parameter logic [7:0] R_MAX = 8'd96,
  parameter logic [7:0] G_MAX = 8'd96,
  parameter logic [7:0] B_MAX = 8'd96
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       filter_en,
  input  logic       in_valid,
  input  rgb_t       in_rgb,
  output logic       out_valid,
  output logic [7:0] out_pix
);
  logic r_on, g_on, b_on, r_off, g_off, b_off;
  logic is_pure, pass;
  logic [7:0] pix_next;

  always_comb begin
    r_on  = in_rgb.r > R_MIN;
    g_on  = in_rgb.g > G_MIN;
    b_on  = in_rgb.b > B_MIN;
    r_off = in_rgb.r < R_MAX;
    g_off = in_rgb.g < G_MAX;
    b_off = in_rgb.b < B_MAX;
    is_pure  = (r_on || r_off) && (g_on || g_off) && (b_on || b_off);
    pass  = is_pure && (r_on || g_on || b_on);
    if (!filter_en)
      pix_next = {in_rgb.r[7:5], in_rgb.g[7:5], in_rgb.b[7:6]};
    else if (pass)
      pix_next = {{3{r_on}}, {3{g_on}}, {2{b_on}}};
    else
      pix_next = COL_BLACK;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= pix_next;
    end
  end

endmodule
