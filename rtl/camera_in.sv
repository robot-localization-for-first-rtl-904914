// Camera input: byte packer and clock-domain crossing.
//
// The camera delivers one 8-bit sample per rising edge of its own 54 MHz pixel
// clock (dclk), in UYVY order, while HREF is high.  This block counts the bytes
// of each line and keeps at most 2*HPIXELS of them (two bytes per pixel), so a
// line is never longer than the configured resolution.  Four consecutive bytes
// U Y0 V Y1 form one 32-bit macropixel (first byte in bits 31:24), which is
// written into a dual-clock FIFO and read out in the 80 MHz system domain.
// Bytes are only taken while capture_en (system domain, brought over through
// two flip-flops) is high; the byte position restarts at every line.
//
// Output: show-ahead; out_data holds a macropixel while out_valid is high and
// out_ready in the same cycle consumes it.  Latency from the fourth byte to
// out_valid is about three system clocks (pointer synchroniser).  rst is an
// asynchronous active-high reset of both clock domains.
//
// The FIFO packing and the line-length limit follow the document; the FIFO
// depth and the capture_en synchroniser are this design's choice.
module camera_in #(
  parameter int unsigned HPIXELS    = 640,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        dclk,
  input  logic        clk,
  input  logic        rst,
  input  logic        href,
  input  logic [7:0]  din,
  input  logic        capture_en,
  input  logic        out_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  output logic        overflow
);
  localparam int unsigned LINE_BYTES = 2 * HPIXELS;
  localparam int unsigned CW = $clog2(LINE_BYTES + 1);

  logic        cap_s1, cap_s2;
  logic [CW-1:0] byte_cnt;
  logic [1:0]  byte_pos;
  logic [23:0] shift;
  logic        push;
  logic [31:0] push_word;
  logic        full;
  logic        take;

  assign take = href && cap_s2 && (byte_cnt < CW'(LINE_BYTES));

  always_ff @(posedge dclk or posedge rst) begin
    if (rst) begin
      cap_s1   <= 1'b0;
      cap_s2   <= 1'b0;
      byte_cnt <= '0;
      byte_pos <= '0;
      shift    <= '0;
      push     <= 1'b0;
      push_word <= '0;
      overflow <= 1'b0;
    end else begin
      cap_s1 <= capture_en;
      cap_s2 <= cap_s1;
      push   <= 1'b0;
      if (!href) begin
        byte_cnt <= '0;
        byte_pos <= '0;
      end else if (take) begin
        byte_cnt <= byte_cnt + 1'b1;
        byte_pos <= byte_pos + 1'b1;
        if (byte_pos == 2'd3) begin
          push      <= 1'b1;
          push_word <= {shift, din};
        end else begin
          shift <= {shift[15:0], din};
        end
      end
      if (push && full) overflow <= 1'b1;
    end
  end

  logic [$clog2(FIFO_DEPTH):0] unused_count;

  async_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk  (dclk),
    .wrst  (rst),
    .wen   (push),
    .wdata (push_word),
    .wfull (full),
    .wcount(unused_count),
    .rclk  (clk),
    .rrst  (rst),
    .ren   (out_ready),
    .rdata (out_data),
    .rvalid(out_valid)
  );

endmodule
