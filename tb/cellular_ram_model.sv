// Behavioural model of a 16-bit cellular RAM (pseudo-SRAM) in synchronous
// burst mode, for simulation only.
//
// A configuration write (CRE high, CE# low, WE# low) loads the bus
// configuration register from the address lines.  A burst starts on a clock
// edge with CE# and ADV# low and CRE low; WE# low at that edge makes it a
// write.  With L = BCR[13:11] + 1 clocks of latency and N words (BCR[2:0] = 1:
// 4, 2: 8, 3: 16, otherwise 32), word k is written from DQ at the edge that
// ends cycle L+k after the address cycle, or driven onto DQ during that cycle
// for a read (only while OE# is low).  Until the BCR is written the model uses
// the device default, latency code 3, so a controller that skips the
// configuration sees the wrong timing.  Only the low MEM_AW address bits are
// stored.  errors counts bus contention and accesses during a burst that
// break the protocol.
//
// Ports: clk, adv_l, ce_l, oe_l, we_l, cre, addr, dq_in/dq_in_en (from the
// controller), dq_out/dq_drive (to it), and bcr, bcr_writes, bursts, errors
// for the testbench.  The burst protocol follows the RAM's burst description;
// the default latency before configuration and the error counting are this
// model's choices.
module cellular_ram_model #(
  parameter int unsigned MEM_AW = 16
) (
  input  logic        clk,
  input  logic        adv_l,
  input  logic        ce_l,
  input  logic        oe_l,
  input  logic        we_l,
  input  logic        cre,
  input  logic [22:0] addr,
  input  logic [15:0] dq_in,
  input  logic        dq_in_en,
  output logic [15:0] dq_out,
  output logic        dq_drive,
  output logic [22:0] bcr,
  output int          bcr_writes,
  output int          bursts,
  output int          errors
);
  logic [15:0] mem [1 << MEM_AW];
  logic        active, is_write;
  logic [22:0] base;
  int          m;
  int          lat, len;

  initial begin
    for (int i = 0; i < (1 << MEM_AW); i++) mem[i] = 16'h0000;
    bcr        = 23'h009D1F & ~23'h003800 | (23'd3 << 11);
    bcr_writes = 0;
    bursts     = 0;
    errors     = 0;
    active     = 1'b0;
    is_write   = 1'b0;
    base       = '0;
    m          = 0;
  end

  always_comb begin
    lat = int'(bcr[13:11]) + 1;
    unique case (bcr[2:0])
      3'd1: len = 4;
      3'd2: len = 8;
      3'd3: len = 16;
      default: len = 32;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!ce_l && cre && !we_l) begin
      bcr <= addr;
      bcr_writes <= bcr_writes + 1;
    end else if (!ce_l && !adv_l && !cre) begin
      if (active) errors <= errors + 1;
      active   <= 1'b1;
      is_write <= !we_l;
      base     <= addr;
      m        <= 1;
      bursts   <= bursts + 1;
    end else if (active) begin
      if (ce_l) begin
        active <= 1'b0;
        if (m < lat + len && m != 0) errors <= errors + 1;
      end else begin
        if (is_write && m >= lat && m < lat + len) begin
          if (!dq_in_en) errors <= errors + 1;
          mem[MEM_AW'(base + 23'(m - lat))] <= dq_in;
        end
        m <= m + 1;
        if (m == lat + len - 1) begin
          active <= 1'b0;
          m <= 0;
        end
      end
    end
  end

  always_comb begin
    dq_drive = active && !is_write && !oe_l && (m >= lat) && (m < lat + len);
    dq_out   = dq_drive ? mem[MEM_AW'(base + 23'(m - lat))] : 16'h0000;
  end

  always_ff @(posedge clk) if (dq_drive && dq_in_en) errors <= errors + 1;

endmodule
