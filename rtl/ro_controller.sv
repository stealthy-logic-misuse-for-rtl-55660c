// ro_controller: drives the ring-oscillator groups with the periodic on/off
// pattern that produces repeated voltage drops.
//
// While run is high the controller waits START_DELAY clock cycles and then
// repeats a pattern of PERIOD cycles: at the start of each period one more
// group is switched on per cycle until all GROUPS are on (gradual enable),
// and at cycle ON_CYCLES of the period all groups are switched off together
// (sudden disable). With a 100 MHz clock the default PERIOD of 25 cycles
// gives the 4 MHz on/off frequency of the published experiment, and
// START_DELAY of 13 cycles (130 ns, about 20 samples at 150 MS/s) places the
// first enable where the published traces show it. The duty cycle, the
// number of groups and the start delay are this design's choices.
// When run falls all groups switch off in the next cycle.
//
// Interface: clk, rst_n, run (level); grp_en is a registered thermometer
// code (bit 0 first), active_cnt the number of groups now on.
module ro_controller #(
  parameter int unsigned GROUPS      = 8,
  parameter int unsigned PERIOD      = 25,
  parameter int unsigned ON_CYCLES   = 13,
  parameter int unsigned START_DELAY = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  output logic [GROUPS-1:0] grp_en,
  output logic [$clog2(GROUPS+1)-1:0] active_cnt
);

  localparam int unsigned CW = $clog2(PERIOD > START_DELAY ? PERIOD + 1 : START_DELAY + 1);

  logic [CW-1:0] cnt_q;
  logic          started_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q      <= '0;
      started_q  <= 1'b0;
      grp_en     <= '0;
      active_cnt <= '0;
    end else if (!run) begin
      cnt_q      <= '0;
      started_q  <= 1'b0;
      grp_en     <= '0;
      active_cnt <= '0;
    end else if (!started_q) begin
      if (cnt_q == CW'(START_DELAY - 1) || START_DELAY == 0) begin
        cnt_q     <= '0;
        started_q <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end else begin
      // cnt_q is the position within the period of the cycle being set up.
      if (cnt_q < CW'(ON_CYCLES)) begin
        if (int'(active_cnt) < GROUPS) begin
          grp_en     <= {grp_en[GROUPS-2:0], 1'b1};
          active_cnt <= active_cnt + 1'b1;
        end
      end else begin
        grp_en     <= '0;
        active_cnt <= '0;
      end
      cnt_q <= (cnt_q == CW'(PERIOD - 1)) ? '0 : cnt_q + 1'b1;
    end
  end

endmodule
