// Self-checking test of the beacon filter chain (split, convert, filter,
// pack, FIFO).  Macropixels are made from known colour classes: every
// channel either clearly on, clearly off or mid-grey, converted to YUV here in
// floating point.  The expected 8-bit pixel follows from the classes alone;
// eight of them form each expected 64-bit word, first pixel in the top byte.
// Input offers and output acceptance are random, with long output stalls, so
// the flow control (in_ready) is exercised; processing_complete must rise
// once everything has drained.
//
// The split/convert/filter/pack order follows the original data path; the
// colour classes, stall pattern and 1600-macropixel length are this
// testbench's choices.  A watchdog ends a hung run.
module processing_tb;
  logic clk = 0, rst = 1;
  always #6.25 clk = ~clk;

  logic filter_en, in_valid, in_ready, out_valid, out_ready, processing_complete;
  logic [31:0] in_data;
  logic [63:0] out_data;

  processing dut (.clk, .rst, .filter_en, .in_valid, .in_data, .in_ready,
                  .out_valid, .out_data, .out_ready, .processing_complete);

  int checks = 0, failures = 0;
  logic [7:0] exp_pix[$];
  int stalls = 0, throttled = 0;

  function automatic int clip(input real x);
    int r;
    r = $rtoi(x + 0.5 + 1000.0) - 1000;
    if (r < 0) return 0;
    if (r > 255) return 255;
    return r;
  endfunction

  // class 0 off, 1 on, 2 mid
  function automatic int level(input int cls);
    if (cls == 1) return $urandom_range(170, 220);
    if (cls == 0) return $urandom_range(30, 70);
    return $urandom_range(115, 140);
  endfunction

  task automatic make_macropixel(output logic [31:0] mp, output logic [7:0] pix);
    int c[3];
    int r, g, b;
    real y, u, v;
    bit any_on, any_mid;
    // mostly pure colours, some grey or mixed
    for (int i = 0; i < 3; i++) c[i] = $urandom_range(0, 1);
    if ($urandom_range(0, 4) == 0) c[$urandom_range(0, 2)] = 2;
    r = level(c[0]); g = level(c[1]); b = level(c[2]);
    y = 0.299 * r + 0.587 * g + 0.114 * b;
    u = (b - y) * 0.492111 + 128.0;
    v = (r - y) * 0.877283 + 128.0;
    mp = {8'(clip(u)), 8'(clip(y)), 8'(clip(v)), 8'(clip(y))};
    any_on = 0; any_mid = 0;
    for (int i = 0; i < 3; i++) begin
      if (c[i] == 1) any_on = 1;
      if (c[i] == 2) any_mid = 1;
    end
    if (!any_on || any_mid) pix = 8'h00;
    else pix = {{3{c[0] == 1}}, {3{c[1] == 1}}, {2{c[2] == 1}}};
  endtask

  // output side: random ready with long stalls, compare words
  int words = 0;
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      logic [63:0] want;
      checks++;
      if (exp_pix.size() < 8) begin
        failures++; $display("FAIL unexpected word %h", out_data);
      end else begin
        for (int i = 0; i < 8; i++) want = {want[55:0], exp_pix.pop_front()};
        if (out_data !== want) begin
          failures++; $display("FAIL word %0d got %h want %h", words, out_data, want);
        end
      end
      words++;
    end
    if (!rst && in_valid && !in_ready) throttled++;
  end

  initial begin
    forever begin
      @(negedge clk);
      if ($urandom_range(0, 99) < 3) begin
        out_ready = 0; stalls++;
        repeat ($urandom_range(20, 80)) @(negedge clk);
      end
      out_ready = $urandom_range(0, 3) != 0;
    end
  end

  initial begin
    logic [31:0] mp;
    logic [7:0] px;
    in_valid = 0; in_data = 0; filter_en = 1; out_ready = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 1600; n++) begin
      make_macropixel(mp, px);
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_data = mp;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      exp_pix.push_back(px); exp_pix.push_back(px);
    end
    @(negedge clk) in_valid = 0;
    fork
      begin wait (processing_complete && exp_pix.size() == 0); end
      begin repeat (3000) @(posedge clk); end
    join_any
    disable fork;
    checks++;
    if (!(processing_complete && exp_pix.size() == 0)) begin
      failures++; $display("FAIL did not drain: %0d pixels left", exp_pix.size());
    end
    checks++;
    if (words != 400) begin failures++; $display("FAIL %0d words, want 400", words); end
    checks++;
    if (stalls == 0 || throttled == 0) begin
      failures++; $display("FAIL flow control not exercised %0d %0d", stalls, throttled);
    end
    $display("stalls=%0d throttled=%0d", stalls, throttled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
