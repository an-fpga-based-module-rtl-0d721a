// tb_periodic_rates: periodic pulse trains at fixed rates, as in a test with
// a pulse generator, through the whole module at its default sizes
// (counting interval 20 us, R = 50 kHz, shaper setting 00).
//
// Inputs A and B get the same train, so channel 0 (A alone) and channel 1
// (A and B in coincidence) must count the same. Free-running trains at 10,
// 37, 50, 74 and 84 MHz: every interval must hold exactly the leading edges
// that did not fall in the 20 ns blind cycle, and the number lost per
// interval (0, 1 or 2) is reported. Trains locked to the master clock with
// a phase that keeps their edges out of the blind cycle (10, 25 and 40 MHz)
// must give exactly rate x 20 us counts in every interval.
`timescale 1ns / 1ps
module tb_periodic_rates;
  import ccm_pkg::*;
  localparam int NI = 4;
  localparam int NC = 8;
  localparam int P  = 1000;
  localparam realtime TCLK = 20.0;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  train;
  logic [NC-1:0][NI-1:0] exclude;
  logic [NC-1:0]         ttl_out;
  logic                  ft_txe_n, ft_wr;
  logic [7:0]            ft_data;
  logic [NC-1:0][15:0]   counts;
  logic                  counts_valid, blind, overrun, clk_out;
  int checks = 0, failures = 0;

  ccm_top dut (
    .clk(clk), .rst_n(rst_n), .det_in({2'b00, train, train}), .shape_sel(2'(SHAPE_SHORT)),
    .exclude(exclude), .ttl_out(ttl_out), .period_cycles(26'(P)), .clkout_sel(3'(CLKOUT_10MHZ)),
    .ft_txe_n(ft_txe_n), .ft_data(ft_data), .ft_wr(ft_wr), .counts(counts),
    .counts_valid(counts_valid), .blind(blind), .overrun(overrun), .clk_out(clk_out));
  ft_fifo_model u_ft (.stall(1'b0), .wr(ft_wr), .data(ft_data), .txe_n(ft_txe_n));

  always #(TCLK / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Leading-edge times of the train, kept until their interval is checked.
  realtime edges[$];
  realtime tv_prev = -1.0;
  bit      checking = 1'b0;
  int      lost_now, lost_total = 0, intervals = 0;
  int      exp_fixed = -1;   // locked trains: counts expected every interval

  always @(posedge counts_valid) begin
    realtime tv;
    int      expected;
    tv       = $realtime;
    expected = 0;
    lost_now = 0;
    while (edges.size() > 0 && edges[0] < tv) begin
      realtime e;
      e = edges.pop_front();
      if (e >= tv - TCLK) lost_now++;         // in the blind cycle
      else if (e >= tv_prev) expected++;
    end
    if (checking) begin
      intervals++;
      lost_total += lost_now;
      check(counts[0] == 16'(expected), $sformatf("singles %0d expected %0d", counts[0], expected));
      check(counts[1] == counts[0], $sformatf("AB coincidences %0d, singles %0d", counts[1], counts[0]));
      if (exp_fixed >= 0)
        check(counts[0] == 16'(exp_fixed), $sformatf("locked train: %0d expected %0d", counts[0], exp_fixed));
    end
    tv_prev = tv;
  end

  always @(posedge train) edges.push_back($realtime);

  // A train with period `per` and high time `hi`, first edge at t_first,
  // running for `n_iv` checked intervals.
  task automatic run_train(input realtime per, input realtime hi, input realtime t_first, input int n_iv);
    int start_iv;
    bit stop;
    stop = 1'b0;
    #(t_first - $realtime);
    fork
      while (!stop) begin
        train = 1'b1;
        #(hi);
        train = 1'b0;
        #(per - hi);
      end
      begin
        @(posedge counts_valid);   // first interval is partial: not checked
        checking = 1'b1;
        start_iv = intervals;
        lost_total = 0;
        wait (intervals == start_iv + n_iv);
        checking = 1'b0;
        stop = 1'b1;
      end
    join
  endtask

  initial begin
    realtime rates_mhz[5] = '{10.0, 37.0, 50.0, 74.0, 84.0};
    realtime tv;
    train = 1'b0;
    exclude = '1;
    exclude[0] = 4'b1110;   // A
    exclude[1] = 4'b1100;   // A and B
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    #25 rst_n = 1'b1;
    @(posedge counts_valid);
    // free-running trains; periods rounded to 0.1 ns, start off the clock grid
    foreach (rates_mhz[i]) begin
      realtime per;
      per = real'(int'(10000.0 / rates_mhz[i])) / 10.0;
      run_train(per, per / 2.0 > 6.0 ? 6.0 : per / 2.0, $realtime + 3.123, 6);
      $display("%0.1f MHz (period %0.1f ns): %0d intervals, %0d edges lost in blind cycles (%0.2f per interval)",
               rates_mhz[i], per, 6, lost_total, lost_total / 6.0);
      if (rates_mhz[i] >= 50.0) check(lost_total > 0, "edges lost above 50 MHz");
      @(posedge counts_valid);
    end
    // locked trains: first edge 10.5 ns (2.5 ns at 40 MHz) after a transfer;
    // the interval is a whole number of periods, so no edge ever falls in
    // the blind cycle, the last 20 ns before a transfer
    exp_fixed = 200;
    @(posedge counts_valid);
    tv = $realtime;
    run_train(100.0, 20.0, tv + 10.5, 4);
    check(lost_total == 0, "locked 10 MHz: nothing lost");
    exp_fixed = 500;
    @(posedge counts_valid);
    tv = $realtime;
    run_train(40.0, 10.0, tv + 10.5, 4);
    check(lost_total == 0, "locked 25 MHz: nothing lost");
    exp_fixed = 800;
    @(posedge counts_valid);
    tv = $realtime;
    run_train(25.0, 6.0, tv + 2.5, 4);
    check(lost_total == 0, "locked 40 MHz: nothing lost");
    $display("locked trains at 10, 25 and 40 MHz counted without loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
