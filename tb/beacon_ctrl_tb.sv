// Self-checking test of the LED beacon controller with short dividers.  The
// button is pressed thirteen times; after each press the selected pattern is
// checked and the row/column lines are watched for whole multiplex periods:
// 10 of 33 steps lit, top and bottom row groups alternating, the top groups
// and the bottom-left group showing the main colour and the bottom-right
// group the second colour of the identification table.  The thirteenth press
// returns to "off".
//
// The pattern table and the row/column grouping come from the beacon's
// description; the reduced dividers (4 and 16 clocks) are this testbench's
// choice to keep the run short.  A watchdog ends a hung run.
module beacon_ctrl_tb;
  localparam int MD = 4, BD = 16;
  logic clk = 0, rst = 1, btn_n = 1;
  always #5 clk = ~clk;

  logic [3:0] pattern;
  logic [1:0] row_n, red, green, blue;

  beacon_ctrl #(.MUX_DIV(MD), .BTN_DIV(BD)) dut (.clk, .rst, .btn_n, .pattern, .row_n,
                                                 .red, .green, .blue);

  int checks = 0, failures = 0;
  // identification table: quadrants TL TR BL BR
  string table_s[13] = '{"----", "RRRY", "RRRG", "RRRP", "YYYR", "YYYG", "YYYP",
                          "GGGR", "GGGY", "GGGP", "PPPR", "PPPY", "PPPG"};

  // {blue, green, red} columns lit for a colour letter
  function automatic logic [2:0] cols(input byte c);
    case (c)
      "R": return 3'b001;
      "Y": return 3'b011;
      "G": return 3'b010;
      "P": return 3'b101;
      default: return 3'b000;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic press();
    @(negedge clk) btn_n = 0;
    repeat (3 * BD) @(posedge clk);
    @(negedge clk) btn_n = 1;
    repeat (3 * BD) @(posedge clk);
  endtask

  task automatic observe(input int id);
    int lit = 0, top = 0, bot = 0, bad = 0;
    string s;
    logic [2:0] l, r;
    s = table_s[id];
    for (int i = 0; i < 2 * 33 * MD; i++) begin
      @(posedge clk); #1;
      l = {blue[0], green[0], red[0]};
      r = {blue[1], green[1], red[1]};
      if (row_n == 2'b10) begin
        lit++; top++;
        if (l != cols(s[0]) || r != cols(s[1])) bad++;
      end else if (row_n == 2'b01) begin
        lit++; bot++;
        if (l != cols(s[2]) || r != cols(s[3])) bad++;
      end else if (row_n == 2'b11) begin
        if (l != 0 || r != 0) bad++;
      end else bad++;
    end
    check(bad == 0, $sformatf("pattern %0d (%s): %0d wrong samples", id, s, bad));
    if (id == 0) check(lit == 0, "pattern 0 is dark");
    else begin
      check(lit == 2 * 10 * MD, $sformatf("pattern %0d duty %0d of %0d clocks", id, lit, 2 * 33 * MD));
      check(top > 0 && bot > 0, $sformatf("pattern %0d both row groups lit", id));
      check(top >= 9 * MD && top <= 11 * MD && bot >= 9 * MD && bot <= 11 * MD,
            $sformatf("pattern %0d row groups alternate: top %0d bottom %0d", id, top, bot));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (10) @(posedge clk);
    check(pattern == 0, "starts off");
    observe(0);
    for (int n = 1; n <= 13; n++) begin
      press();
      check(pattern == 4'(n % 13), $sformatf("pattern after %0d presses: %0d", n, pattern));
      observe(n % 13);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
