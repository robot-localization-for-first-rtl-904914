// Cellular RAM interface: configuration and 4-word synchronous bursts.
//
// Drives a 16-bit pseudo-SRAM (cellular RAM, 8M x 16) with a 23-bit address
// bus.  After reset the block waits POWERUP_CYCLES clocks for the device to
// start, then writes the bus configuration register (BCR): CRE high, ADV# and
// CE# low with WE# high in the first cycle, then WE# low, with the BCR value on
// the address lines.  That selects synchronous burst mode, a fixed latency of
// 7 clocks and 4-word bursts.  powering_up is high until this is done.
//
// System side: while ready is high, a pulse on write or read (write wins if
// both are high) starts a burst at addr_in.  A write sends din as four 16-bit
// words, din[63:48] to addr_in, din[47:32] to addr_in+1 and so on.  A read
// assembles four words the same way into dout and pulses dout_valid.
//
// Bus timing, cycle 0 being the first cycle after the request was taken:
//   cycle 0      ADV# low, CE# low, address valid; WE# low for a write, high
//                for a read
//   cycles 1-6   latency (OE# low for a read)
//   cycles 7-10  one data word per clock: driven on DQ for a write, sampled
//                from DQ at the end of the cycle for a read
//   cycle 11     CE# high, ready high again (dout_valid for a read)
// so one 64-bit transfer takes 12 clocks at most (4 words in 11 bus cycles).
// LB#/UB# are held low (both bytes used) and the flash that shares the bus is
// kept deselected.  DQ is split into dq_o / dq_i / dq_oe for the pad.
//
// The BCR settings, burst length, latency and the request/ready handshake
// follow the document; the power-up wait, the length of the BCR write pulse
// and the idle cycle between bursts are this design's choices.
module ram_interface
  import rl_pkg::BCR_VALUE, rl_pkg::BURST_WORDS, rl_pkg::RAM_LATENCY;
#(
  parameter int unsigned POWERUP_CYCLES = 12000,  // 150 us at 80 MHz
  parameter int unsigned BCR_CYCLES     = 8,
  parameter int unsigned LATENCY        = RAM_LATENCY
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        write,
  input  logic        read,
  input  logic [22:0] addr_in,
  input  logic [63:0] din,
  output logic        ready,
  output logic        dout_valid,
  output logic [63:0] dout,
  output logic        powering_up,
  // RAM pins
  output logic        clk_out,
  output logic        adv_l,
  output logic        ce_l,
  output logic        oe_l,
  output logic        we_l,
  output logic        lb_l,
  output logic        ub_l,
  output logic        cre,
  output logic        flash_ce_l,
  output logic [22:0] addr_out,
  output logic [15:0] dq_o,
  output logic        dq_oe,
  input  logic [15:0] dq_i
);
  typedef enum logic [2:0] {
    S_POWERUP, S_BCR, S_IDLE, S_WRITE, S_READ
  } ram_state_e;

  localparam int unsigned LAST = LATENCY + BURST_WORDS - 1;   // 10
  localparam int unsigned PW = $clog2(POWERUP_CYCLES + 1);

  ram_state_e    state;
  logic [PW-1:0] pu_cnt;
  logic [3:0]    cnt;
  logic [22:0]   addr_q;
  logic [63:0]   wdata_q;
  logic          in_data_phase;
  logic [1:0]    word_idx;

  assign ready         = (state == S_IDLE);
  assign powering_up   = (state == S_POWERUP) || (state == S_BCR);
  assign in_data_phase = (cnt >= 4'(LATENCY)) && (cnt <= 4'(LAST));
  assign word_idx      = 2'(cnt - 4'(LATENCY));

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_POWERUP;
      pu_cnt     <= '0;
      cnt        <= '0;
      addr_q     <= '0;
      wdata_q    <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      unique case (state)
        S_POWERUP: begin
          if (pu_cnt == PW'(POWERUP_CYCLES)) begin
            state <= S_BCR;
            cnt   <= '0;
          end else begin
            pu_cnt <= pu_cnt + 1'b1;
          end
        end
        S_BCR: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'(BCR_CYCLES - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          cnt <= '0;
          if (write) begin
            state   <= S_WRITE;
            addr_q  <= addr_in;
            wdata_q <= din;
          end else if (read) begin
            state  <= S_READ;
            addr_q <= addr_in;
          end
        end
        S_WRITE: begin
          cnt <= cnt + 1'b1;
          if (cnt == 4'(LAST)) state <= S_IDLE;
        end
        S_READ: begin
          cnt <= cnt + 1'b1;
          if (in_data_phase) dout <= {dout[47:0], dq_i};
          if (cnt == 4'(LAST)) begin
            state      <= S_IDLE;
            dout_valid <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Pin decode from the registered state
  always_comb begin
    adv_l    = 1'b1;
    ce_l     = 1'b1;
    oe_l     = 1'b1;
    we_l     = 1'b1;
    cre      = 1'b0;
    dq_oe    = 1'b0;
    dq_o     = '0;
    addr_out = addr_q;
    unique case (state)
      S_BCR: begin
        cre      = 1'b1;
        ce_l     = 1'b0;
        adv_l    = (cnt != '0);
        we_l     = (cnt == '0);
        addr_out = BCR_VALUE;
      end
      S_WRITE: begin
        ce_l  = 1'b0;
        adv_l = (cnt != '0);
        we_l  = (cnt != '0);
        dq_oe = in_data_phase;
        unique case (word_idx)
          2'd0: dq_o = wdata_q[63:48];
          2'd1: dq_o = wdata_q[47:32];
          2'd2: dq_o = wdata_q[31:16];
          default: dq_o = wdata_q[15:0];
        endcase
      end
      S_READ: begin
        ce_l  = 1'b0;
        adv_l = (cnt != '0);
        oe_l  = (cnt == '0);
      end
      default: ;
    endcase
  end

  assign clk_out    = clk;
  assign lb_l       = 1'b0;
  assign ub_l       = 1'b0;
  assign flash_ce_l = 1'b1;

  // A request may only arrive when it can be taken or is allowed to wait
  burst_len: assert property (@(posedge clk) disable iff (rst)
      (state == S_IDLE && (write || read)) |=> (!ready)[*LAST+1] ##1 ready)
    else $error("ram_interface: burst did not last %0d cycles", LAST + 1);

endmodule
