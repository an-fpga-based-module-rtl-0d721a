// ccm_top: the complete four-input, eight-channel coincidence-counting module.
//
// Detector pulses (TTL, inputs A..D) are shortened by one pulse shaper per
// input, all set by the same two toggle switches (shape_sel), and fanned out
// to eight coincidence gates. Each gate ANDs the inputs that its column of
// pushbuttons includes (exclude bit 0 = button pressed = input included), so
// each channel counts any chosen 2-, 3- or 4-fold coincidence or a single
// input. The gate outputs leave the module as TTL outputs (ttl_out), which
// can feed further modules to build higher-order coincidences, and are
// counted in the FPGA (ccm_fpga) over intervals of period_cycles master
// cycles; each interval's counts are written to the USB FIFO chip. The FPGA
// also provides a TTL clock output divided from its 50 MHz master clock.
// This is the published block structure.
//
// The shapers and gates are discrete logic in the real module; here the
// shapers are a behavioural model with the measured pulse widths, so this top
// is for simulation and the FPGA part (ccm_fpga) is the synthesizable one.
// Input impedance selection, line drivers, pushbuttons, their LEDs, the USB
// FIFO chip and the host software are outside this RTL: their signals are
// ports.
//
// Ports
//   clk, rst_n     50 MHz master oscillator, async active-low reset
//   det_in[4]      detector pulses, bit 0 = input A
//   shape_sel      pulse-shaper switches A (bit 1) and B (bit 0)
//   exclude[8][4]  pushbutton grid: exclude[ch][in] = 1 removes input `in`
//                  from channel `ch` (button released)
//   ttl_out[8]     coincidence outputs to the line drivers / BNC outputs
//   period_cycles, clkout_sel, ft_*, counts, counts_valid, blind, overrun,
//   clk_out        as in ccm_fpga
`timescale 1ns / 1ps
module ccm_top #(
  parameter int unsigned NUM_IN     = ccm_pkg::NUM_IN,
  parameter int unsigned NUM_CH     = ccm_pkg::NUM_CH,
  parameter int unsigned CNT_W      = ccm_pkg::CNT_W,
  parameter int unsigned PERIOD_W   = ccm_pkg::PERIOD_W,
  parameter int unsigned MIN_PERIOD = ccm_pkg::MIN_PERIOD,
  parameter int unsigned MAX_PERIOD = ccm_pkg::MAX_PERIOD
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NUM_IN-1:0]             det_in,
  input  logic [1:0]                    shape_sel,
  input  logic [NUM_CH-1:0][NUM_IN-1:0] exclude,
  output logic [NUM_CH-1:0]             ttl_out,
  input  logic [PERIOD_W-1:0]           period_cycles,
  input  logic [2:0]                    clkout_sel,
  input  logic                          ft_txe_n,
  output logic [7:0]                    ft_data,
  output logic                          ft_wr,
  output logic [NUM_CH-1:0][CNT_W-1:0]  counts,
  output logic                          counts_valid,
  output logic                          blind,
  output logic                          overrun,
  output logic                          clk_out
);
  logic [NUM_IN-1:0] shaped;

  for (genvar i = 0; i < NUM_IN; i++) begin : g_shaper
    pulse_shaper u_shaper (
      .din (det_in[i]),
      .sel (shape_sel),
      .dout(shaped[i])
    );
  end

  coinc_logic #(
    .NUM_IN(NUM_IN),
    .NUM_CH(NUM_CH)
  ) u_coinc (
    .det_in (shaped),
    .exclude(exclude),
    .coinc  (ttl_out)
  );

  ccm_fpga #(
    .NUM_CH    (NUM_CH),
    .CNT_W     (CNT_W),
    .PERIOD_W  (PERIOD_W),
    .MIN_PERIOD(MIN_PERIOD),
    .MAX_PERIOD(MAX_PERIOD)
  ) u_fpga (
    .clk          (clk),
    .rst_n        (rst_n),
    .coinc        (ttl_out),
    .period_cycles(period_cycles),
    .clkout_sel   (clkout_sel),
    .ft_txe_n     (ft_txe_n),
    .ft_data      (ft_data),
    .ft_wr        (ft_wr),
    .counts       (counts),
    .counts_valid (counts_valid),
    .blind        (blind),
    .overrun      (overrun),
    .clk_out      (clk_out)
  );
endmodule
