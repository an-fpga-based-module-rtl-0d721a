// fifo_writer: moves each interval's storage-register values into the USB
// FIFO chip, one byte at a time.
//
// The module's FPGA hands its counts to a USB FIFO buffer chip, which the
// host reads in blocks; that the storage values are written into this FIFO
// while counting continues is the published behaviour. The byte protocol is
// this design's own choice, written for an FT245-style asynchronous write
// port: the chip pulls txe_n low while it has room, and latches `data` on the
// falling edge of the active-high `wr` strobe.
//
// On `load` (one cycle, the cycle after a transfer) the NUM_CH values are
// copied into a send buffer and sent channel 0 first, each value least
// significant byte first in ceil(CNT_W/8) bytes (upper bits zero): 16 bytes
// per interval for 8 channels of 16 bits. For every byte the writer waits
// until the synchronised txe_n is low, drives the byte, raises wr for
// WR_CYCLES cycles, holds the data one more cycle after wr falls, then waits
// GAP cycles so that the chip's txe_n response to this write has passed the
// two-flop synchroniser before it is looked at again. At the defaults a byte
// takes 1 + 3 + 1 + 4 = 9 cycles (180 ns) when the chip has room, so 16 bytes
// take 2.9 us, well inside the shortest counting interval (20 us).
//
// If `load` arrives while a set is still being sent, the new set is dropped
// and the sticky `overrun` flag is set (cleared only by reset); `busy` is high
// while a set is being sent.
`timescale 1ns / 1ps
module fifo_writer #(
  parameter int unsigned NUM_CH    = ccm_pkg::NUM_CH,
  parameter int unsigned CNT_W     = ccm_pkg::CNT_W,
  parameter int unsigned WR_CYCLES = 3,   // wr high time, cycles (>= 50 ns)
  parameter int unsigned GAP       = 4    // cycles after a write before txe_n is read
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         load,
  input  logic [NUM_CH-1:0][CNT_W-1:0] values,
  input  logic                         txe_n,
  output logic [7:0]                   data,
  output logic                         wr,
  output logic                         busy,
  output logic                         overrun
);
  localparam int unsigned BPC    = (CNT_W + 7) / 8;       // bytes per channel
  localparam int unsigned NBYTES = NUM_CH * BPC;
  localparam int unsigned IW     = $clog2(NBYTES + 1);
  localparam int unsigned TW     = $clog2(WR_CYCLES + GAP + 2);

  typedef enum logic [1:0] {
    S_IDLE,    // nothing to send
    S_WAIT,    // byte ready, waiting for room in the FIFO chip
    S_STROBE,  // wr high
    S_HOLD     // wr low, data held, then the txe_n guard gap
  } state_e;

  state_e                 state;
  logic [NBYTES-1:0][7:0] sbuf;
  logic [IW-1:0]          idx;
  logic [TW-1:0]          tmr;
  logic [1:0]             txe_sync;
  logic [NBYTES*8-1:0]    packed_vals;

  // Each channel zero-extended to whole bytes, channel 0 in the low bytes.
  always_comb begin
    packed_vals = '0;
    for (int ch = 0; ch < NUM_CH; ch++) begin
      packed_vals[ch*BPC*8 +: BPC*8] = (BPC*8)'(values[ch]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) txe_sync <= 2'b11;
    else        txe_sync <= {txe_sync[0], txe_n};
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sbuf    <= '0;
      idx     <= '0;
      tmr     <= '0;
      data    <= '0;
      wr      <= 1'b0;
      overrun <= 1'b0;
    end else begin
      if (load && busy) overrun <= 1'b1;
      unique case (state)
        S_IDLE: if (load) begin
          sbuf  <= packed_vals;
          idx   <= '0;
          state <= S_WAIT;
        end
        S_WAIT: if (!txe_sync[1]) begin
          data  <= sbuf[idx[IW-1:0]];
          wr    <= 1'b1;
          tmr   <= TW'(WR_CYCLES - 1);
          state <= S_STROBE;
        end
        S_STROBE: begin
          if (tmr == '0) begin
            wr    <= 1'b0;
            tmr   <= TW'(GAP);
            state <= S_HOLD;
          end else begin
            tmr <= tmr - 1'b1;
          end
        end
        S_HOLD: begin
          if (tmr == '0) begin
            if (idx == IW'(NBYTES - 1)) begin
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_WAIT;
            end
          end else begin
            tmr <= tmr - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // wr only rises while the chip reports room.
  a_wr_needs_room: assert property (@(posedge clk) disable iff (!rst_n)
                                    $rose(wr) |-> $past(!txe_sync[1]));
endmodule
