// Beacon filter: macropixel split, colour conversion, colour filter, packing.
//
// A 32-bit macropixel U Y0 V Y1 (U in bits 31:24) from the camera input is
// taken when in_valid and in_ready are both high.  In that cycle the first
// pixel (Y0,U,V) enters the YUV-to-RGB converter and in the next cycle the
// second (Y1,U,V), so one macropixel is accepted every two clocks at most.
// Converted pixels pass the colour filter (or the plain compressor when
// filter_en is low) and become 8-bit pixels; eight of them are packed into a
// 64-bit word, first pixel in bits 63:56, which is pushed into an output FIFO
// for the RAM interface.  out_data/out_valid are the head of that FIFO
// (show-ahead) and out_ready consumes it.
//
// Flow control: in_ready is low while the second pixel of a macropixel is sent
// and whenever the output FIFO has fewer than four free words, which covers
// every pixel that can still be in the pipeline.  processing_complete is high
// when no macropixel is offered, nothing is in flight, the packer is empty and
// the output FIFO is empty.
//
// The split order, 7-clock converter, filter, compression to 8 bits and the
// 64-bit packing FIFO follow the document; FIFO depth and the flow-control
// margin are this design's choices.
module processing
  import rl_pkg::yuv_t, rl_pkg::rgb_t;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter logic [7:0]  R_MIN = 8'd160,
  parameter logic [7:0]  G_MIN = 8'd160,
  parameter logic [7:0]  B_MIN = 8'd160,
  parameter logic [7:0]  R_MAX = 8'd96,
  parameter logic [7:0]  G_MAX = 8'd96,
  parameter logic [7:0]  B_MAX = 8'd96
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        filter_en,
  input  logic        in_valid,
  input  logic [31:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [63:0] out_data,
  input  logic        out_ready,
  output logic        processing_complete
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // ---------------- macropixel split ----------------
  logic        second;        // second pixel of the held macropixel is due
  yuv_t        held;          // Y1, U and V of the accepted macropixel
  logic        accept;
  logic        pix_valid;
  yuv_t        pix_yuv;
  logic [CW-1:0] fifo_count;

  assign in_ready = !second && (fifo_count <= CW'(FIFO_DEPTH - 4));
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      second <= 1'b0;
      held   <= '0;
    end else begin
      if (accept) begin
        second <= 1'b1;
        held   <= '{y: in_data[7:0], u: in_data[31:24], v: in_data[15:8]};
      end else begin
        second <= 1'b0;
      end
    end
  end

  always_comb begin
    pix_valid = accept || second;
    if (second) pix_yuv = held;
    else        pix_yuv = '{y: in_data[23:16], u: in_data[31:24], v: in_data[15:8]};
  end

  // ---------------- conversion and filter ----------------
  logic rgb_valid;
  rgb_t rgb;
  logic f_valid;
  logic [7:0] f_pix;

  yuv2rgb u_conv (
    .clk      (clk),
    .rst      (rst),
    .in_valid (pix_valid),
    .in_yuv   (pix_yuv),
    .out_valid(rgb_valid),
    .out_rgb  (rgb)
  );

  color_filter #(
    .R_MIN(R_MIN), .G_MIN(G_MIN), .B_MIN(B_MIN),
    .R_MAX(R_MAX), .G_MAX(G_MAX), .B_MAX(B_MAX)
  ) u_filter (
    .clk      (clk),
    .rst      (rst),
    .filter_en(filter_en),
    .in_valid (rgb_valid),
    .in_rgb   (rgb),
    .out_valid(f_valid),
    .out_pix  (f_pix)
  );

  // ---------------- packer ----------------
  logic [2:0]  pk_cnt;
  logic [55:0] pk_data;
  logic        push;
  logic [63:0] push_word;
  logic [4:0]  inflight;    // pixels between the split and the packer

  always_ff @(posedge clk) begin
    if (rst) begin
      pk_cnt    <= '0;
      pk_data   <= '0;
      push      <= 1'b0;
      push_word <= '0;
      inflight  <= '0;
    end else begin
      push <= 1'b0;
      if (f_valid) begin
        pk_cnt <= pk_cnt + 1'b1;
        if (pk_cnt == 3'd7) begin
          push      <= 1'b1;
          push_word <= {pk_data, f_pix};
        end else begin
          pk_data <= {pk_data[47:0], f_pix};
        end
      end
      inflight <= inflight + 5'(pix_valid) - 5'(f_valid);
    end
  end


  sync_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .rst   (rst),
    .wen   (push),
    .wdata (push_word),
    .ren   (out_ready),
    .rdata (out_data),
    .rvalid(out_valid),
    .full  (),
    .count (fifo_count)
  );

  assign processing_complete = !in_valid && !second && (inflight == '0) &&
                               !push && (pk_cnt == '0) && !out_valid;

endmodule
