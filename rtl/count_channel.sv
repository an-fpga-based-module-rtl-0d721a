// count_channel: one counting register and its storage register.
//
// The counting register is clocked by the coincidence pulse itself, so it
// advances on every leading edge, at rates above the 50 MHz master clock.
// While `blind` is high (one master cycle per counting interval) it ignores
// pulses. At the master-clock edge that ends the blind cycle the storage
// register takes the count, and the counting register is reset to zero for
// the next interval. Counting on the pulse's leading edge, the copy to a
// storage register, the reset and the single blind cycle are the published
// behaviour.
//
// How the reset crosses into the pulse-clocked register is this design's own
// choice. The master-clock side keeps an epoch bit; the counting register
// remembers the epoch of its last pulse, and the first pulse of a new epoch
// loads 1 instead of incrementing. At a transfer, if the two bits are equal
// (pulses arrived), the count is stored and the epoch bit toggles, which
// marks the count as stale; if they differ, the interval was silent, 0 is
// stored and the epoch is left alone, so a stale count can never look current
// again however many silent intervals follow. Both registers are stable during the blind cycle,
// so the transfer never samples a changing count. A count that exceeds
// 2^CNT_W - 1 in one interval wraps around.
//
// Ports: clk (50 MHz), rst_n (async, active low, resets both domains),
// pulse (coincidence channel), blind (from interval_timer),
// stored (storage register, updated at the end of each blind cycle).
`timescale 1ns / 1ps
module count_channel #(
  parameter int unsigned CNT_W = ccm_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pulse,
  input  logic             blind,
  output logic [CNT_W-1:0] stored
);
  logic [CNT_W-1:0] cnt;
  logic             cnt_epoch;
  logic             epoch;
  logic             active;   // a pulse arrived in the current interval

  assign active = (cnt_epoch == epoch);

  // Counting register, clocked by the input pulse.
  always_ff @(posedge pulse or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      cnt_epoch <= 1'b0;
    end else if (!blind) begin
      if (cnt_epoch != epoch) begin
        cnt       <= CNT_W'(1);
        cnt_epoch <= epoch;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // Storage register and epoch, updated at the end of the blind cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stored <= '0;
      epoch  <= 1'b0;
    end else if (blind) begin
      stored <= active ? cnt : '0;
      if (active) epoch <= ~epoch;
    end
  end
endmodule
