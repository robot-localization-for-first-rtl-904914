// YUV to RGB colour-space converter, 7-stage pipeline.
//
// Inverts the full-range relations Y = 0.299R + 0.587G + 0.114B,
// V = 0.877283(R - Y) and U = 0.492111(B - Y), with U and V in offset binary
// (128 = zero) as the camera delivers them:
//     R = Y + 1.13988 V
//     G = Y - 0.39464 U - 0.58060 V
//     B = Y + 2.03206 U
// Coefficients are 10-bit fixed point (scaled by 1024) with rounding, and each
// result is clamped to 0..255.
//
// Timing: a pixel presented with in_valid in cycle n appears on out_rgb with
// out_valid in cycle n+7, one pixel per clock, no stalls.  The valid bit travels
// down the pipeline beside the data.  Stages: 1 input register / offset
// removal, 2 products, 3 chroma sums, 4 add luma, 5 round and scale,
// 6 clamp, 7 output register.
//
// The 7-clock latency and the valid bit that accompanies the data follow the
// document; the fixed-point format is this design's choice.  The original
// equations name the red difference U and the blue difference V; here the
// usual BT.601 naming is kept (V = red difference), which is also how the
// camera's UYVY stream orders them.
module yuv2rgb
  import rl_pkg::yuv_t, rl_pkg::rgb_t;
#(
  parameter int unsigned LATENCY = 7   // fixed by the stage structure below
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  yuv_t in_yuv,
  output logic out_valid,
  output rgb_t out_rgb
);
  localparam int signed K_RV = 1167;  // 1.13988 * 1024
  localparam int signed K_GU = 404;   // 0.39464 * 1024
  localparam int signed K_GV = 595;   // 0.58060 * 1024
  localparam int signed K_BU = 2081;  // 2.03206 * 1024

  logic [LATENCY-1:0] vld;

  // stage 1
  logic signed [9:0]  s1_y, s1_u, s1_v;
  // stage 2
  logic signed [9:0]  s2_y;
  logic signed [20:0] s2_rv, s2_gu, s2_gv, s2_bu;
  // stage 3
  logic signed [9:0]  s3_y;
  logic signed [21:0] s3_r, s3_g, s3_b;
  // stage 4
  logic signed [22:0] s4_r, s4_g, s4_b;
  // stage 5
  logic signed [12:0] s5_r, s5_g, s5_b;
  // stage 6
  logic [7:0]         s6_r, s6_g, s6_b;

  function automatic logic [7:0] clamp8(input logic signed [12:0] x);
    if (x < 0)        return 8'd0;
    else if (x > 255) return 8'd255;
    else              return x[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    // 1: remove chroma offset
    s1_y <= $signed({2'b00, in_yuv.y});
    s1_u <= $signed({2'b00, in_yuv.u}) - 10'sd128;
    s1_v <= $signed({2'b00, in_yuv.v}) - 10'sd128;
    // 2: products
    s2_y  <= s1_y;
    s2_rv <= 21'(K_RV * s1_v);
    s2_gu <= 21'(K_GU * s1_u);
    s2_gv <= 21'(K_GV * s1_v);
    s2_bu <= 21'(K_BU * s1_u);
    // 3: chroma sums
    s3_y <= s2_y;
    s3_r <= 22'(s2_rv);
    s3_g <= -22'(s2_gu) - 22'(s2_gv);
    s3_b <= 22'(s2_bu);
    // 4: add luma (scaled) and rounding constant
    s4_r <= 23'(s3_r) + (23'(s3_y) <<< 10) + 23'sd512;
    s4_g <= 23'(s3_g) + (23'(s3_y) <<< 10) + 23'sd512;
    s4_b <= 23'(s3_b) + (23'(s3_y) <<< 10) + 23'sd512;
    // 5: scale back
    s5_r <= 13'(s4_r >>> 10);
    s5_g <= 13'(s4_g >>> 10);
    s5_b <= 13'(s4_b >>> 10);
    // 6: clamp
    s6_r <= clamp8(s5_r);
    s6_g <= clamp8(s5_g);
    s6_b <= clamp8(s5_b);
    // 7: output register
    out_rgb <= '{r: s6_r, g: s6_g, b: s6_b};
  end

  assign out_valid = vld[LATENCY-1];

  initial assert (LATENCY == 7) else $error("yuv2rgb: the pipeline has exactly 7 stages");

endmodule
