// Self-checking test of the cellular RAM interface against a behavioural
// RAM model: configuration register value, burst timing (11 bus cycles, 12
// clocks request to request, read data valid 12 clocks after the request),
// word order within a 64-bit transfer and write/read round trips.
//
// The latency, burst length, BCR value and write-over-read priority checked
// here follow the RAM configuration of the original system; the reduced
// power-up time and the random addresses and data are this testbench's
// choices.  A watchdog ends a hung run.
module ram_interface_tb;
  logic clk = 0, rst = 1;
  always #6.25 clk = ~clk;   // 80 MHz

  logic write, read, ready, dout_valid, powering_up;
  logic [22:0] addr_in, addr_out;
  logic [63:0] din, dout;
  logic clk_out, adv_l, ce_l, oe_l, we_l, lb_l, ub_l, cre, flash_ce_l, dq_oe;
  logic [15:0] dq_o, dq_i, dq_m;
  logic dq_drive;
  logic [22:0] bcr;
  int bcr_writes, bursts, merrors;

  ram_interface #(.POWERUP_CYCLES(20)) dut (
    .clk, .rst, .write, .read, .addr_in, .din, .ready, .dout_valid, .dout,
    .powering_up, .clk_out, .adv_l, .ce_l, .oe_l, .we_l, .lb_l, .ub_l, .cre,
    .flash_ce_l, .addr_out, .dq_o, .dq_oe, .dq_i);

  cellular_ram_model #(.MEM_AW(12)) ram (
    .clk(clk_out), .adv_l, .ce_l, .oe_l, .we_l, .cre, .addr(addr_out),
    .dq_in(dq_o), .dq_in_en(dq_oe), .dq_out(dq_m), .dq_drive,
    .bcr, .bcr_writes, .bursts, .errors(merrors));

  assign dq_i = dq_m;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // count clocks with CE# low per burst
  int ce_low = 0;
  always @(posedge clk) if (!ce_l && !cre) ce_low <= ce_low + 1;

  logic [63:0] shadow [int];

  task automatic do_write(input logic [22:0] a, input logic [63:0] d);
    int t0, ce0;
    while (!ready) @(posedge clk);
    @(negedge clk); write = 1; addr_in = a; din = d;
    @(posedge clk); t0 = cyc; ce0 = ce_low;
    @(negedge clk); write = 0; din = '0;
    while (!ready) @(posedge clk);
    check(cyc - t0 == 12, $sformatf("write request-to-ready %0d clocks", cyc - t0));
    @(posedge clk);
    check(ce_low - ce0 == 11, $sformatf("write burst held CE# low %0d clocks", ce_low - ce0));
    shadow[a] = d;
  endtask

  task automatic do_read(input logic [22:0] a, output logic [63:0] d);
    int t0;
    while (!ready) @(posedge clk);
    @(negedge clk); read = 1; addr_in = a;
    @(posedge clk); t0 = cyc;
    @(negedge clk); read = 0;
    while (!dout_valid) @(posedge clk);
    check(cyc - t0 == 12, $sformatf("read data valid after %0d clocks", cyc - t0));
    d = dout;
  endtask

  initial begin
    logic [63:0] d, rd;
    logic [22:0] a;
    write = 0; read = 0; addr_in = 0; din = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(posedge clk);
    check(powering_up && !ready, "powering up after reset");
    while (powering_up) @(posedge clk);
    // BCR per table: [19:18]=10, [14]=1, [13:11]=110, [5:4]=01, [3]=1, [2:0]=001
    check(bcr == 23'h087019, $sformatf("BCR value %h", bcr));
    check(bcr_writes > 0, "BCR written");
    check(lb_l == 0 && ub_l == 0 && flash_ce_l == 1, "byte lanes enabled, flash deselected");

    // the example of the write/read test: 64, 8, 192, 8 at address 0
    d = {16'd64, 16'd8, 16'd192, 16'd8};
    do_write(23'd0, d);
    check(ram.mem[0] == 16'd64 && ram.mem[1] == 16'd8 && ram.mem[2] == 16'd192 &&
          ram.mem[3] == 16'd8, "word order in memory: top 16 bits at the first address");
    do_read(23'd0, rd);
    check(rd == d, $sformatf("read back %h", rd));

    // random round trips
    for (int i = 0; i < 40; i++) begin
      a = 23'($urandom_range(0, 1023) * 4);
      d = {$urandom, $urandom};
      do_write(a, d);
    end
    foreach (shadow[k]) begin
      do_read(23'(k), rd);
      check(rd == shadow[k], $sformatf("round trip at %0d: %h vs %h", k, rd, shadow[k]));
    end

    // write has priority when both are requested
    while (!ready) @(posedge clk);
    @(negedge clk); write = 1; read = 1; addr_in = 23'd40; din = 64'h1111_2222_3333_4444;
    @(posedge clk); @(negedge clk); write = 0; read = 0;
    while (!ready) @(posedge clk);
    check(ram.mem[40] == 16'h1111 && ram.mem[43] == 16'h4444, "write wins over read");

    check(merrors == 0, $sformatf("RAM model protocol errors %0d", merrors));
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
