// Dual-clock FIFO with Gray-coded pointers.
//
// Words written in the wclk domain are read in the rclk domain.  Each side
// keeps a binary and a Gray pointer; the Gray pointer of the other side is
// brought over through two flip-flops, so "full" and "empty" are conservative
// (they clear a few clocks late, never early).  The read port is show-ahead:
// rdata holds the oldest word whenever rvalid is high, and a read with rvalid
// high consumes it.  wcount is the (conservative) fill level seen from the
// write side, used for almost-full flags.  Each side has its own active-high
// asynchronous reset; both must be asserted together to empty the FIFO.
// DEPTH must be a power of two.
//
// Interface: wclk/wrst/wen/wdata/wfull/wcount on the write side,
// rclk/rrst/ren/rdata/rvalid on the read side.  A word written appears at the
// read port three to four read clocks later.  The original system used a
// vendor FIFO core; this Gray-pointer FIFO is this design's own replacement.
module async_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       wclk,
  input  logic                       wrst,
  input  logic                       wen,
  input  logic [WIDTH-1:0]           wdata,
  output logic                       wfull,
  output logic [$clog2(DEPTH):0]     wcount,
  input  logic                       rclk,
  input  logic                       rrst,
  input  logic                       ren,
  output logic [WIDTH-1:0]           rdata,
  output logic                       rvalid
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + 1'b1;
  assign wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wcount = wbin - gray2bin(rgray_w2);

  always_ff @(posedge wclk or posedge wrst) begin
    if (wrst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wen && !wfull) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read side ----------------
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + 1'b1;
  assign rvalid = (rgray != wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (ren && rvalid) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end

endmodule
