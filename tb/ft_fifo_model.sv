// ft_fifo_model: behavioural model (testbench only) of the write side of an
// FT245-style USB FIFO chip.
// txe_n is low while the chip accepts a byte. A byte is taken on the falling
// edge of wr; txe_n then goes high for a random recovery time between
// RECOV_MIN and RECOV_MAX ns, and stays high after it as long as `stall` is
// set (the host not reading, so the chip is full after this byte). Received bytes are kept in mem[0 .. nbytes-1]; a write
// made while txe_n was high, or a wr pulse shorter than 50 ns, counts as a
// protocol error and loses the byte.
`timescale 1ns / 1ps
module ft_fifo_model #(
  parameter int RECOV_MIN = 25,
  parameter int RECOV_MAX = 200,
  parameter int DEPTH     = 8192
) (
  input  logic       stall,
  input  logic       wr,
  input  logic [7:0] data,
  output logic       txe_n
);
  logic [7:0] mem [DEPTH];
  int         nbytes     = 0;
  int         proto_errs = 0;
  int         stalled_writes_seen = 0;  // writes that had to wait for the host
  logic       recovering = 1'b0;
  realtime    t_wr_rise  = -1.0;  // no wr pulse seen yet

  assign txe_n = recovering;

  always @(posedge wr) t_wr_rise = $realtime;

  always @(negedge wr) begin
    if (t_wr_rise < 0.0) begin
      // wr falling from its power-up level: not a write
    end else if (txe_n || ($realtime - t_wr_rise) < 50.0) begin
      proto_errs++;
      $display("ft_fifo_model: protocol error at %0t (txe_n=%b, wr high %0.1f ns)", $realtime, txe_n, $realtime - t_wr_rise);
    end else begin
      if (nbytes < DEPTH) mem[nbytes] = data;
      nbytes++;
      recovering = 1'b1;
      #($urandom_range(RECOV_MIN, RECOV_MAX));
      if (stall) stalled_writes_seen++;
      wait (!stall);
      recovering = 1'b0;
    end
  end
endmodule
