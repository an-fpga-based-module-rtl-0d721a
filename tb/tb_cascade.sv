// tb_cascade: eight-fold coincidences counted with three modules.
// A 30 MHz pulse train is fanned out to the four inputs of module 1 and of
// module 2; the 4-fold (ABCD) TTL output of each feeds inputs A and B of
// module 3, whose channel 0 counts their coincidence: an 8-fold coincidence
// of the original inputs. Every module counts its edges outside its own
// blind cycle, and the TTL outputs are not affected by blind cycles, so
// module 3 must count every pulse except those in its own blind cycles.
// In a second phase one input of module 2 is skewed by 10 ns, beyond the
// 7.5 ns window: module 2's 4-fold output, and so the 8-fold count, must
// stay at zero while module 3's single-input channel keeps counting.
`timescale 1ns / 1ps
module tb_cascade;
  import ccm_pkg::*;
  localparam int NI = 4;
  localparam int NC = 8;
  localparam int P  = 1000;
  localparam realtime TCLK = 20.0;
  localparam realtime PER  = 33.3;   // 30 MHz

  logic clk = 1'b0;
  logic rst_n;
  logic train, train_skew, skew_on;
  logic [NC-1:0][NI-1:0] excl12, excl3;
  logic [2:0][NC-1:0]    ttl;
  logic [2:0]            txe_n, wr, cv, bl, ovr, co;
  logic [2:0][7:0]       fdata;
  logic [2:0][NC-1:0][15:0] counts;
  logic [NI-1:0]         in1, in2, in3;
  int checks = 0, failures = 0;

  assign in1 = {4{train}};
  assign in2 = {skew_on ? train_skew : train, {3{train}}};
  assign in3 = {2'b00, ttl[1][6], ttl[0][6]};
  assign #10 train_skew = train;

  ccm_top u1 (.clk(clk), .rst_n(rst_n), .det_in(in1), .shape_sel(2'(SHAPE_SHORT)), .exclude(excl12),
              .ttl_out(ttl[0]), .period_cycles(26'(P)), .clkout_sel(3'd0), .ft_txe_n(txe_n[0]),
              .ft_data(fdata[0]), .ft_wr(wr[0]), .counts(counts[0]), .counts_valid(cv[0]),
              .blind(bl[0]), .overrun(ovr[0]), .clk_out(co[0]));
  ccm_top u2 (.clk(clk), .rst_n(rst_n), .det_in(in2), .shape_sel(2'(SHAPE_SHORT)), .exclude(excl12),
              .ttl_out(ttl[1]), .period_cycles(26'(P)), .clkout_sel(3'd0), .ft_txe_n(txe_n[1]),
              .ft_data(fdata[1]), .ft_wr(wr[1]), .counts(counts[1]), .counts_valid(cv[1]),
              .blind(bl[1]), .overrun(ovr[1]), .clk_out(co[1]));
  ccm_top u3 (.clk(clk), .rst_n(rst_n), .det_in(in3), .shape_sel(2'(SHAPE_SHORT)), .exclude(excl3),
              .ttl_out(ttl[2]), .period_cycles(26'(P)), .clkout_sel(3'd0), .ft_txe_n(txe_n[2]),
              .ft_data(fdata[2]), .ft_wr(wr[2]), .counts(counts[2]), .counts_valid(cv[2]),
              .blind(bl[2]), .overrun(ovr[2]), .clk_out(co[2]));
  for (genvar m = 0; m < 3; m++) begin : g_ft
    ft_fifo_model u_ft (.stall(1'b0), .wr(wr[m]), .data(fdata[m]), .txe_n(txe_n[m]));
  end

  always #(TCLK / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: train edges per interval, outside the blind cycle.
  realtime edges[$];
  realtime tv_prev = -1.0;
  bit      checking = 1'b0;
  int      intervals = 0, eightfold = 0, vetoed = 0;
  always @(posedge train) edges.push_back($realtime);

  always @(posedge cv[2]) begin
    realtime tv;
    int expected;
    tv = $realtime;
    expected = 0;
    while (edges.size() > 0 && edges[0] < tv) begin
      realtime e;
      e = edges.pop_front();
      if (e < tv - TCLK && e >= tv_prev) expected++;
    end
    if (checking) begin
      intervals++;
      check(counts[0][6] == 16'(expected), $sformatf("module 1 4-fold: %0d expected %0d", counts[0][6], expected));
      check(counts[2][1] == 16'(expected), $sformatf("module 3 input A: %0d expected %0d", counts[2][1], expected));
      if (!skew_on) begin
        check(counts[1][6] == 16'(expected), $sformatf("module 2 4-fold: %0d expected %0d", counts[1][6], expected));
        check(counts[2][0] == 16'(expected), $sformatf("8-fold: %0d expected %0d", counts[2][0], expected));
        eightfold += counts[2][0];
      end else begin
        check(counts[1][6] == 0, $sformatf("module 2 4-fold with skew: %0d expected 0", counts[1][6]));
        check(counts[2][0] == 0, $sformatf("8-fold with skew: %0d expected 0", counts[2][0]));
        vetoed += expected;
      end
    end
    tv_prev = tv;
  end

  initial begin
    bit stop;
    train = 1'b0;
    skew_on = 1'b0;
    excl12 = '1;
    excl12[6] = 4'b0000;   // ABCD
    excl3 = '1;
    excl3[0] = 4'b1100;    // A and B: the 8-fold coincidence
    excl3[1] = 4'b1110;    // A: module 1's 4-fold output
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    #25 rst_n = 1'b1;
    @(posedge cv[2]);
    #3.123;
    stop = 1'b0;
    fork
      while (!stop) begin
        train = 1'b1;
        #10.0;
        train = 1'b0;
        #(PER - 10.0);
      end
      begin
        @(posedge cv[2]);
        checking = 1'b1;
        wait (intervals == 5);
        checking = 1'b0;
        skew_on = 1'b1;
        @(posedge cv[2]);
        checking = 1'b1;
        wait (intervals == 10);
        stop = 1'b1;
      end
    join
    check(eightfold > 0 && vetoed > 0, "8-fold coincidences counted and vetoed");
    $display("8-fold coincidences counted: %0d; pulses with a skewed input (no 8-fold): %0d", eightfold, vetoed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
