// Self-checking test of the colour filter: random RGB pixels, the
// six-threshold pass rule and the normalised 3-3-2 output are recomputed here
// channel by channel; with the filter off the pixel must be the plain 3-3-2
// compression.  Output follows input by one clock.
//
// The six-threshold rule follows the filter description; the threshold values
// (160/96) are this design's defaults, and the random pixel mix (one third
// fully random, two thirds clean on/off channels) is this testbench's choice.  A watchdog ends a hung
// run.
module color_filter_tb;
  import rl_pkg::rgb_t;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic filter_en, in_valid, out_valid;
  rgb_t in_rgb;
  logic [7:0] out_pix;

  color_filter dut (.clk, .rst, .filter_en, .in_valid, .in_rgb, .out_valid, .out_pix);

  int checks = 0, failures = 0;
  int passed = 0, rejected = 0;

  // expected value, written from the rule: each channel above 160 or below 96,
  // at least one above 160
  function automatic logic [7:0] expect_pix(input rgb_t p, input logic en);
    int v[3];
    int on[3];
    bit ok;
    bit any;
    logic [7:0] o;
    if (!en) return {p.r[7:5], p.g[7:5], p.b[7:6]};
    v[0] = p.r; v[1] = p.g; v[2] = p.b;
    ok = 1; any = 0;
    for (int i = 0; i < 3; i++) begin
      on[i] = (v[i] > 160);
      if (!(v[i] > 160) && !(v[i] < 96)) ok = 0;
      if (on[i] != 0) any = 1;
    end
    if (!(ok && any)) return 8'h00;
    o = 8'h00;
    if (on[0] != 0) o = o | 8'hE0;
    if (on[1] != 0) o = o | 8'h1C;
    if (on[2] != 0) o = o | 8'h03;
    return o;
  endfunction

  initial begin
    rgb_t p;
    logic en;
    logic [7:0] want;
    in_valid = 0; in_rgb = '0; filter_en = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      // mostly saturated-ish values so that many pixels pass
      if (i % 3 == 0) p = '{8'($urandom), 8'($urandom), 8'($urandom)};
      else p = '{($urandom_range(0,1) ? 8'($urandom_range(161,255)) : 8'($urandom_range(0,95))),
                 ($urandom_range(0,1) ? 8'($urandom_range(161,255)) : 8'($urandom_range(0,95))),
                 ($urandom_range(0,1) ? 8'($urandom_range(161,255)) : 8'($urandom_range(0,95)))};
      if (i == 0) p = '{8'd161, 8'd95, 8'd95};      // just red
      if (i == 1) p = '{8'd160, 8'd0, 8'd0};        // red at the minimum: rejected
      if (i == 2) p = '{8'd200, 8'd200, 8'd96};     // blue at the maximum: rejected
      if (i == 3) p = '{8'd200, 8'd30, 8'd220};     // purple
      en = (i % 10) != 9;
      want = expect_pix(p, en);
      @(negedge clk); in_valid = 1; in_rgb = p; filter_en = en;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_pix !== want) begin
        failures++;
        $display("FAIL rgb %0d %0d %0d en=%0d got %h want %h", p.r, p.g, p.b, en, out_pix, want);
      end
      if (en && want != 0) passed++;
      if (en && want == 0) rejected++;
    end
    @(negedge clk) in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid stuck"); end
    checks++;
    if (passed < 100 || rejected < 100) begin
      failures++; $display("FAIL poor coverage %0d %0d", passed, rejected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
