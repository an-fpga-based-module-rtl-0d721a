// coinc_logic: the coincidence gates of the module, one per output channel.
//
// Each channel ORs every detector input with that channel's exclude bit and
// ANDs the four results. A channel is therefore true exactly while all of its
// included inputs are high at once; an excluded input (exclude bit = 1, the
// pushbutton released) is forced true and drops out of the AND. Including one
// input gives its single-channel rate, two to four give 2-, 3- or 4-fold
// coincidences. This is the published gate structure. In the module it is
// built from discrete TTL gates in front of the FPGA; here it is plain
// combinational logic with no clock and zero delay.
//
// Ports
//   det_in [NUM_IN]        shaped detector pulses, bit 0 = input A
//   exclude[NUM_CH][NUM_IN] 1 removes the input from that channel's AND
//   coinc  [NUM_CH]        channel outputs, to the TTL drivers and counters
// If every input of a channel is excluded, its output is constantly high and
// the channel counts nothing (the counters count rising edges).
`timescale 1ns / 1ps
module coinc_logic #(
  parameter int unsigned NUM_IN = ccm_pkg::NUM_IN,
  parameter int unsigned NUM_CH = ccm_pkg::NUM_CH
) (
  input  logic [NUM_IN-1:0]             det_in,
  input  logic [NUM_CH-1:0][NUM_IN-1:0] exclude,
  output logic [NUM_CH-1:0]             coinc
);
  always_comb begin
    for (int ch = 0; ch < NUM_CH; ch++) begin
      coinc[ch] = &(det_in | exclude[ch]);
    end
  end
endmodule
