// ccm_fpga: the logic inside the module's FPGA.
//
// NUM_CH counting registers, each clocked by one coincidence channel, count
// leading edges during a counting interval set by period_cycles (master-clock
// cycles, 50e6 / R). At the end of each interval one blind cycle freezes them,
// their values are copied to the storage registers and they restart from
// zero; while they count the next interval, fifo_writer sends the stored
// values to the USB FIFO chip. The same master clock drives the TTL clock
// output divider. This is the published organisation (eight 16-bit
// registers, or six 20-bit ones, a 50 MHz master clock, one blind cycle per
// interval); the hand-over scheme and the FIFO byte protocol are this
// design's own (see count_channel and fifo_writer).
//
// Ports
//   clk, rst_n          50 MHz master clock, async active-low reset
//   coinc[NUM_CH]       coincidence pulses from the gates (asynchronous)
//   period_cycles       counting interval in master cycles (1000 .. 5e7)
//   clkout_sel          TTL clock output rate, decades below 10 MHz
//   ft_txe_n, ft_data, ft_wr   write port of the USB FIFO chip
//   counts, counts_valid       storage registers; valid for one cycle when loaded
//   blind               high during the blind cycle
//   overrun             a set was dropped because the previous one was still
//                       being sent (sticky)
//   clk_out             TTL clock output
`timescale 1ns / 1ps
module ccm_fpga #(
  parameter int unsigned NUM_CH     = ccm_pkg::NUM_CH,
  parameter int unsigned CNT_W      = ccm_pkg::CNT_W,
  parameter int unsigned PERIOD_W   = ccm_pkg::PERIOD_W,
  parameter int unsigned MIN_PERIOD = ccm_pkg::MIN_PERIOD,
  parameter int unsigned MAX_PERIOD = ccm_pkg::MAX_PERIOD
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NUM_CH-1:0]            coinc,
  input  logic [PERIOD_W-1:0]          period_cycles,
  input  logic [2:0]                   clkout_sel,
  input  logic                         ft_txe_n,
  output logic [7:0]                   ft_data,
  output logic                         ft_wr,
  output logic [NUM_CH-1:0][CNT_W-1:0] counts,
  output logic                         counts_valid,
  output logic                         blind,
  output logic                         overrun,
  output logic                         clk_out
);
  logic fifo_busy;

  interval_timer #(
    .PERIOD_W  (PERIOD_W),
    .MIN_PERIOD(MIN_PERIOD),
    .MAX_PERIOD(MAX_PERIOD)
  ) u_timer (
    .clk          (clk),
    .rst_n        (rst_n),
    .period_cycles(period_cycles),
    .blind        (blind),
    .stored_valid (counts_valid)
  );

  for (genvar ch = 0; ch < NUM_CH; ch++) begin : g_ch
    count_channel #(.CNT_W(CNT_W)) u_cnt (
      .clk   (clk),
      .rst_n (rst_n),
      .pulse (coinc[ch]),
      .blind (blind),
      .stored(counts[ch])
    );
  end

  fifo_writer #(
    .NUM_CH(NUM_CH),
    .CNT_W (CNT_W)
  ) u_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (counts_valid),
    .values (counts),
    .txe_n  (ft_txe_n),
    .data   (ft_data),
    .wr     (ft_wr),
    .busy   (fifo_busy),
    .overrun(overrun)
  );

  clk_out_divider u_clkdiv (
    .clk    (clk),
    .rst_n  (rst_n),
    .sel    (clkout_sel),
    .clk_out(clk_out)
  );

  logic unused_busy;
  assign unused_busy = fifo_busy;
endmodule
