// LED matrix beacon controller.
//
// An 8x8 RGB LED matrix is split into four 4x4 quadrants.  The rows are tied
// in two groups (rows 1-4, rows 5-8) and the red, green and blue columns each in
// two groups (columns 1-4, columns 5-8), so eight lines, each through a half-H
// driver, light any colour in any quadrant.  A pattern shows one colour in the
// top-left, top-right and bottom-left quadrants and a second colour in the
// bottom-right one.  Twelve patterns (IDs 1..12) are the 4 x 3 ordered pairs of
// red, yellow (red+green), green and purple (red+blue):
//   1 RRRY  2 RRRG  3 RRRP  4 YYYR  5 YYYG  6 YYYP
//   7 GGGR  8 GGGY  9 GGGP 10 PPPR 11 PPPY 12 PPPG
// Pattern 0 is "off".
//
// Multiplexing: every MUX_DIV clocks a step counter advances (0..MUX_STEPS-1)
// and the lit row group alternates between top and bottom.  Steps at or above
// ON_STEPS are blank, which sets the brightness (duty ON_STEPS/MUX_STEPS).
// Row lines are active low (row_n[0] = rows 1-4, row_n[1] = rows 5-8), column
// lines active high (bit 0 = columns 1-4, bit 1 = columns 5-8).  When nothing is
// lit both rows are deselected and all columns are low.
//
// Pattern selection: the push button (btn_n, low when pressed) is sampled every
// BTN_DIV clocks; each new press advances the pattern 0,1,..,12,0,...
//
// Outputs are registered and change only on a multiplex step.  The dividers
// default to the values of the beacon's original microcontroller firmware at a
// 1 MHz clock (125 clocks per step, 33 steps with 10 lit, button sampled every
// 96,008 clocks).  The quadrant layout, the patterns and the row/column
// grouping follow the document; the idle state of the row lines is this
// design's choice.
module beacon_ctrl
  import rl_pkg::beacon_color_e, rl_pkg::BC_RED, rl_pkg::BC_YELLOW, rl_pkg::BC_GREEN;
#(
  parameter int unsigned MUX_DIV   = 125,
  parameter int unsigned MUX_STEPS = 33,
  parameter int unsigned ON_STEPS  = 10,
  parameter int unsigned BTN_DIV   = 96_008,
  parameter int unsigned NUM_PATTERNS = 12
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       btn_n,
  output logic [3:0] pattern,
  output logic [1:0] row_n,
  output logic [1:0] red,
  output logic [1:0] green,
  output logic [1:0] blue
);
  localparam int unsigned MW = $clog2(MUX_DIV);
  localparam int unsigned SW = $clog2(MUX_STEPS);
  localparam int unsigned BW = $clog2(BTN_DIV);

  logic [MW-1:0] mux_div;
  logic [SW-1:0] step;
  logic [BW-1:0] btn_div;
  logic          bottom;        // row group lit on the current step
  logic          btn_last;
  logic          btn_s1, btn_s2;
  logic          mux_tick, btn_tick;

  assign mux_tick = (mux_div == MW'(MUX_DIV - 1));
  assign btn_tick = (btn_div == BW'(BTN_DIV - 1));

  // colour of one quadrant -> {blue, green, red}
  function automatic logic [2:0] lamp(input beacon_color_e c);
    unique case (c)
      BC_RED:    return 3'b001;
      BC_YELLOW: return 3'b011;
      BC_GREEN:  return 3'b010;
      default:   return 3'b101;   // purple
    endcase
  endfunction

  beacon_color_e main_c, odd_c;
  logic [2:0] lamp_l, lamp_r;
  logic [3:0] pidx;

  always_comb begin
    pidx   = pattern - 4'd1;
    main_c = beacon_color_e'(pidx / 4'd3);
    // the three other colours in red, yellow, green, purple order
    odd_c  = beacon_color_e'((pidx % 4'd3) >= 4'(main_c) ? (pidx % 4'd3) + 4'd1
                                                        : (pidx % 4'd3));
    lamp_l = lamp(main_c);
    lamp_r = bottom ? lamp(odd_c) : lamp(main_c);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mux_div  <= '0;
      btn_div  <= '0;
      step     <= '0;
      bottom   <= 1'b1;
      btn_last <= 1'b0;
      btn_s1   <= 1'b0;
      btn_s2   <= 1'b0;
      pattern  <= '0;
      row_n    <= 2'b11;
      red      <= '0;
      green    <= '0;
      blue     <= '0;
    end else begin
      btn_s1  <= !btn_n;
      btn_s2  <= btn_s1;
      mux_div <= mux_tick ? '0 : mux_div + 1'b1;
      btn_div <= btn_tick ? '0 : btn_div + 1'b1;

      if (btn_tick) begin
        btn_last <= btn_s2;
        if (btn_s2 && !btn_last)
          pattern <= (pattern == 4'(NUM_PATTERNS)) ? '0 : pattern + 1'b1;
      end

      if (mux_tick) begin
        step   <= (step == SW'(MUX_STEPS - 1)) ? '0 : step + 1'b1;
        bottom <= !bottom;
        if (pattern == '0 || step >= SW'(ON_STEPS)) begin
          row_n <= 2'b11;
          red   <= '0;
          green <= '0;
          blue  <= '0;
        end else begin
          row_n <= bottom ? 2'b01 : 2'b10;
          red   <= {lamp_r[0], lamp_l[0]};
          green <= {lamp_r[1], lamp_l[1]};
          blue  <= {lamp_r[2], lamp_l[2]};
        end
      end
    end
  end

endmodule
