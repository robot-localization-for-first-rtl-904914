// Single-clock show-ahead FIFO.
//
// rdata holds the oldest word while rvalid is high; ren with rvalid high
// consumes it.  A write while full is dropped (the owner keeps it from
// happening; an assertion reports it).  count is the exact fill level.
// DEPTH must be a power of two.
//
// Interface: clk, rst, wen/wdata, ren/rdata/rvalid, full, count.  A written
// word is readable in the next clock.  The original system used a vendor FIFO
// core; this small FIFO is this design's own replacement.
module sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   wen,
  input  logic [WIDTH-1:0]       wdata,
  input  logic                   ren,
  output logic [WIDTH-1:0]       rdata,
  output logic                   rvalid,
  output logic                   full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic do_w, do_r;

  assign count  = wptr - rptr;
  assign full   = (count == (AW+1)'(DEPTH));
  assign rvalid = (count != '0);
  assign rdata  = mem[rptr[AW-1:0]];
  assign do_w   = wen && !full;
  assign do_r   = ren && rvalid;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_w) wptr <= wptr + 1'b1;
      if (do_r) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_w) mem[wptr[AW-1:0]] <= wdata;
  end

  no_overflow: assert property (@(posedge clk) disable iff (rst) !(wen && full))
    else $error("sync_fifo: write while full");

endmodule
