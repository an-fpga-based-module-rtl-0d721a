// pulse_shaper: behavioural model (not synthesizable) of the gate-delay pulse
// shortener placed in front of the coincidence gates, one per detector input.
//
// The real circuit is built from discrete TTL gates. It ANDs the input with a
// delayed, inverted copy of itself, so that a rising edge produces a pulse as
// long as the delay; the delay comes from passing the signal through extra
// gates. Two toggle switches choose one of three delay taps through a
// multiplexer, or bypass the shortening. The model reproduces this with
// transport delays (every edge is kept, however short the pulse). When a
// pulse follows the previous one by less than the selected delay, the
// delayed copy of the previous pulse masks the start of the new one, just as
// in the gate circuit: the shaped pulse then starts late and is as long as
// the gap between the input pulses.
//
// Output pulse widths are the measured ones of the published module:
// 7.5 ns, 9.0 ns and 11.5 ns for settings 00, 01 and 10. In setting 11 the
// pulse goes around the shortener and was measured about 10 ns longer than
// the input; the model holds the output high for BYPASS_EXTRA after every
// falling edge of the input. An input pulse shorter than the selected width is
// passed with its own width. The gate propagation delay common to all paths
// is left out (zero latency from input edge to output edge).
//
// Ports: din (TTL pulse from a detector), sel (switch A = sel[1],
// switch B = sel[0]; see ccm_pkg::shape_sel_e), dout (shaped pulse).
`timescale 1ns / 1ps
module pulse_shaper #(
  parameter realtime W_SHORT      = 7.5,   // setting 00, ns
  parameter realtime W_MEDIUM     = 9.0,   // setting 01, ns
  parameter realtime W_LONG       = 11.5,  // setting 10, ns
  parameter realtime BYPASS_EXTRA = 10.0   // setting 11, ns added to the pulse
) (
  input  logic       din,
  input  logic [1:0] sel,
  output logic       dout
);
  import ccm_pkg::*;

  // Delayed copies of the input, one per delay tap.
  logic tap_short, tap_medium, tap_long;
  int   tails;   // bypass: pulses still high or ended less than BYPASS_EXTRA ago

  initial begin
    tap_short  = 1'b0;
    tap_medium = 1'b0;
    tap_long   = 1'b0;
    tails      = 0;
  end

  // Each input edge reaches each tap after that tap's delay; a forked
  // process per edge keeps every edge, however close they follow.
  always @(posedge din) begin
    fork
      #(W_SHORT)  tap_short  = 1'b1;
      #(W_MEDIUM) tap_medium = 1'b1;
      #(W_LONG)   tap_long   = 1'b1;
    join_none
  end

  always @(negedge din) begin
    fork
      #(W_SHORT)  tap_short  = 1'b0;
      #(W_MEDIUM) tap_medium = 1'b0;
      #(W_LONG)   tap_long   = 1'b0;
    join_none
  end

  always @(posedge din) tails++;

  // A falling edge with no rising edge before it (power-up) is ignored.
  always @(negedge din) begin
    if (tails > 0) begin
      fork
        begin
          #(BYPASS_EXTRA);
          tails--;
        end
      join_none
    end
  end

  always_comb begin
    unique case (shape_sel_e'(sel))
      SHAPE_SHORT:  dout = din & ~tap_short;
      SHAPE_MEDIUM: dout = din & ~tap_medium;
      SHAPE_LONG:   dout = din & ~tap_long;
      default:      dout = (tails != 0);
    endcase
  end
endmodule
