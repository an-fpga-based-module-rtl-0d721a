// interval_timer: times the counting interval and produces the blind cycle.
//
// Every period_cycles master-clock cycles (50e6 / R for acquisition rate R)
// it raises `blind` for exactly one cycle. During that cycle the counting
// registers ignore their inputs; at the clock edge that ends it the counts are
// copied into the storage registers and the counting registers restart from
// zero (see count_channel). One blind cycle per interval is the published behaviour; it
// gives the active fraction T_active = T * (1 - R / 50 MHz).
//
// The interval length is sampled continuously: lowering it mid-interval ends
// the current interval as soon as the count reaches the new length. Values
// outside [MIN_PERIOD, MAX_PERIOD] are clamped; the defaults are the
// published range of counting times, 20 us (R = 50 kHz) to 1 s (R = 1 Hz).
//
// Timing: after reset the first blind cycle is the period_cycles-th cycle;
// blind is high in the cycle after the counter reaches period_cycles - 1;
// `stored_valid` is high in the cycle after blind (storage registers loaded).
`timescale 1ns / 1ps
module interval_timer #(
  parameter int unsigned PERIOD_W   = ccm_pkg::PERIOD_W,
  parameter int unsigned MIN_PERIOD = ccm_pkg::MIN_PERIOD,
  parameter int unsigned MAX_PERIOD = ccm_pkg::MAX_PERIOD
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PERIOD_W-1:0] period_cycles,
  output logic                blind,
  output logic                stored_valid
);
  logic [PERIOD_W-1:0] cnt;
  logic [PERIOD_W-1:0] period;

  always_comb begin
    if (period_cycles < PERIOD_W'(MIN_PERIOD))      period = PERIOD_W'(MIN_PERIOD);
    else if (period_cycles > PERIOD_W'(MAX_PERIOD)) period = PERIOD_W'(MAX_PERIOD);
    else                                            period = period_cycles;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      blind        <= 1'b0;
      stored_valid <= 1'b0;
    end else begin
      stored_valid <= blind;
      if (cnt >= period - 1'b1) begin
        cnt   <= '0;
        blind <= 1'b1;
      end else begin
        cnt   <= cnt + 1'b1;
        blind <= 1'b0;
      end
    end
  end

  // The blind cycle is a single master-clock cycle.
  a_blind_single: assert property (@(posedge clk) disable iff (!rst_n)
                                   blind |=> !blind);
endmodule
