// Self-checking test of the camera input: lines of random bytes arrive on a
// 54 MHz clock, some longer than the configured width; the 80 MHz side
// reads with random gaps.  Expected macropixels are the first 2*HPIXELS bytes
// of each captured line, four at a time, first byte in bits 31:24.  Lines
// sent while capture is disabled must produce nothing.
//
// Runs at HPIXELS=16 with random line lengths and read gaps chosen here; the
// 54/80 MHz clocks and the UYVY byte packing follow the original system.  A
// watchdog ends a hung run.
module camera_in_tb;
  localparam int HP = 16;
  logic dclk = 0, clk = 0, rst = 1;
  always #9.259 dclk = ~dclk;   // 54 MHz
  always #6.25  clk  = ~clk;    // 80 MHz

  logic href, capture_en, out_ready, out_valid, overflow;
  logic [7:0] din;
  logic [31:0] out_data;

  camera_in #(.HPIXELS(HP)) dut (.dclk, .clk, .rst, .href, .din, .capture_en,
                                 .out_ready, .out_valid, .out_data, .overflow);

  int checks = 0, failures = 0;
  logic [31:0] expq[$];
  int got = 0;

  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL unexpected %h", out_data);
      end else begin
        logic [31:0] w;
        w = expq.pop_front();
        if (out_data !== w) begin failures++; $display("FAIL got %h want %h", out_data, w); end
      end
      got++;
    end
  end

  always @(negedge clk) out_ready <= $urandom_range(0, 2) != 0;

  task automatic send_line(input int nbytes, input bit captured);
    logic [31:0] acc;
    for (int i = 0; i < nbytes; i++) begin
      @(negedge dclk);
      href = 1; din = 8'($urandom);
      acc = {acc[23:0], din};
      if (captured && i < 2 * HP && (i % 4) == 3) expq.push_back(acc);
    end
    @(negedge dclk); href = 0; din = 0;
    repeat (20) @(negedge dclk);
  endtask

  initial begin
    href = 0; din = 0; capture_en = 0; out_ready = 0;
    repeat (4) @(posedge dclk);
    rst = 0;
    repeat (4) @(posedge dclk);
    send_line(2 * HP, 0);               // not captured
    @(negedge clk) capture_en = 1;
    repeat (6) @(negedge dclk);
    for (int l = 0; l < 30; l++)
      send_line(2 * HP + ((l % 3) == 0 ? 10 : 0), 1);   // some lines too long
    @(negedge clk) capture_en = 0;
    repeat (6) @(negedge dclk);
    send_line(2 * HP, 0);
    repeat (50) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words missing", expq.size()); end
    checks++;
    if (got != 30 * HP / 2) begin failures++; $display("FAIL %0d words, want %0d", got, 30 * HP / 2); end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
