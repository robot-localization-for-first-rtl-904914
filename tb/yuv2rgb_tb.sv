// Self-checking test of the YUV to RGB converter: random pixels with random
// gaps, reference computed in floating point from the colour-space relations,
// a tolerance of one code for fixed-point rounding, and exactly 7 clocks of
// latency for every pixel.
//
// The 7-clock latency checked here is the pipeline depth of the original
// converter; the one-code tolerance and the random stimulus are this
// testbench's choices.  A watchdog ends a hung run.
module yuv2rgb_tb;
  import rl_pkg::yuv_t, rl_pkg::rgb_t;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  yuv_t in_yuv;
  rgb_t out_rgb;

  yuv2rgb dut (.clk, .rst, .in_valid, .in_yuv, .out_valid, .out_rgb);

  int checks = 0, failures = 0, cyc = 0;
  typedef struct { yuv_t p; int t; } item_t;
  item_t q[$];

  function automatic int clip(input real x);
    int r;
    r = $rtoi(x + 0.5 + 1000.0) - 1000;   // round half up, also for negatives
    if (r < 0) return 0;
    if (r > 255) return 255;
    return r;
  endfunction

  function automatic int absd(input int a, input int b);
    return a > b ? a - b : b - a;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && in_valid) q.push_back('{in_yuv, cyc});
    if (!rst && out_valid) begin
      item_t it;
      real y, u, v;
      int r, g, b;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL output without input");
      end else begin
        it = q.pop_front();
        y = it.p.y; u = real'(it.p.u) - 128.0; v = real'(it.p.v) - 128.0;
        r = clip(y + v / 0.877283);
        b = clip(y + u / 0.492111);
        g = clip((y - 0.299 * (y + v / 0.877283) - 0.114 * (y + u / 0.492111)) / 0.587);
        if (cyc - it.t != 7) begin
          failures++; $display("FAIL latency %0d", cyc - it.t);
        end
        if (absd(r, out_rgb.r) > 1 || absd(g, out_rgb.g) > 1 || absd(b, out_rgb.b) > 1) begin
          failures++;
          $display("FAIL yuv %0d %0d %0d -> got %0d %0d %0d want %0d %0d %0d",
                   it.p.y, it.p.u, it.p.v, out_rgb.r, out_rgb.g, out_rgb.b, r, g, b);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_yuv = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // corner values first, then random
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = (i < 8) || ($urandom_range(0, 3) != 0);
      case (i)
        0: in_yuv = '{8'd0,   8'd128, 8'd128};
        1: in_yuv = '{8'd255, 8'd128, 8'd128};
        2: in_yuv = '{8'd128, 8'd0,   8'd255};
        3: in_yuv = '{8'd128, 8'd255, 8'd0};
        4: in_yuv = '{8'd76,  8'd91,  8'd255};
        default: in_yuv = '{8'($urandom), 8'($urandom), 8'($urandom)};
      endcase
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d pixels lost", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
