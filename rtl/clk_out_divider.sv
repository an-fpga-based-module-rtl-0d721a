// clk_out_divider: the TTL clock output, the 50 MHz master clock divided down
// to 10 MHz, 1 MHz, ... 1 Hz (one decade per step of sel).
//
// Because the output is derived from the master clock, it can be fed back
// into an input to self-test the counters (exactly 10^7 counts per second at
// 10 MHz) or used to phase-lock external equipment to the module. The decade
// rates and the 50 MHz source are the published design's; the divider
// structure is this design's own choice:
//   - a divide-by-5 prescaler gives a 10 MHz tick; its output is high for 2
//     of every 5 master cycles (40 % duty, 20 ns high / 30 ns low);
//   - seven cascaded divide-by-10 counters, each advanced by the previous
//     stage's tick, give the lower decades with 50 % duty.
// All stages run on the master clock with enables (no derived clocks); the
// selected output is registered, so clk_out is glitch-free and lags its
// internal stage by one cycle. Changing sel switches at once to the new
// stage's phase (a shortened cycle may occur).
//
// Ports: clk (50 MHz), rst_n (async, active low), sel (decades below
// 10 MHz, ccm_pkg::clkout_sel_e), clk_out.
`timescale 1ns / 1ps
module clk_out_divider #(
  parameter int unsigned PRESCALE = 5,   // master cycles per 10 MHz period
  parameter int unsigned DECADES  = 7    // 1 MHz down to 1 Hz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sel,
  output logic       clk_out
);
  localparam int unsigned PW = $clog2(PRESCALE);

  logic [PW-1:0]       pre_cnt;
  logic [DECADES-1:0][3:0] dec_cnt;
  logic [DECADES:0]    tick;      // tick[k]: last master cycle of a stage-k period
  logic [DECADES:0]    level;     // square wave of each stage
  logic                sel_level;

  assign tick[0]  = (pre_cnt == PW'(PRESCALE - 1));
  assign level[0] = (pre_cnt < PW'(PRESCALE / 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pre_cnt <= '0;
    else if (tick[0]) pre_cnt <= '0;
    else pre_cnt <= pre_cnt + 1'b1;
  end

  for (genvar k = 0; k < DECADES; k++) begin : g_decade
    assign tick[k+1]  = tick[k] && (dec_cnt[k] == 4'd9);
    assign level[k+1] = (dec_cnt[k] < 4'd5);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dec_cnt[k] <= '0;
      else if (tick[k]) dec_cnt[k] <= (dec_cnt[k] == 4'd9) ? 4'd0 : dec_cnt[k] + 4'd1;
    end
  end

  always_comb begin
    sel_level = 1'b0;
    for (int k = 0; k <= DECADES; k++) begin
      if (32'(sel) == k) sel_level = level[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else clk_out <= sel_level;
  end

  // tick[DECADES] (end of a 1 Hz period) drives nothing further.
  logic unused_tick;
  assign unused_tick = tick[DECADES];
endmodule
