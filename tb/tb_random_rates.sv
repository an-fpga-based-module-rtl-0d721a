// tb_random_rates: accidental coincidences of two independent random pulse
// streams, the measurement that gives the module's coincidence time.
// Inputs A and B get independent random trains (exponential gaps with a
// 10 ns dead time after each 25 ns pulse, about 6 to 8 MHz mean rate).
// Channel 0 counts A, channel 1 counts B, channel 2 counts A-B coincidences.
// For random arrivals R_AB = tau_c * R_A * R_B; with the shaped width w the
// pulses overlap when their leading edges are less than w apart, so tau_c is
// 2w: 15, 18 and 23 ns for settings 00, 01 and 10. Checked: the singles
// channels count every leading edge outside the blind cycles exactly, and the
// tau_c computed from the module's own counts is within 20 % of 2w.
`timescale 1ns / 1ps
module tb_random_rates;
  import ccm_pkg::*;
  localparam int NI = 4;
  localparam int NC = 8;
  localparam int P  = 1000;
  localparam int NIV = 20;            // intervals per setting
  localparam realtime TCLK = 20.0;

  logic                  clk = 1'b0;
  logic                  rst_n;
  logic                  a, b;
  logic [1:0]            shape_sel;
  logic [NC-1:0][NI-1:0] exclude;
  logic [NC-1:0]         ttl_out;
  logic                  ft_txe_n, ft_wr;
  logic [7:0]            ft_data;
  logic [NC-1:0][15:0]   counts;
  logic                  counts_valid, blind, overrun, clk_out;
  int checks = 0, failures = 0;

  ccm_top dut (
    .clk(clk), .rst_n(rst_n), .det_in({2'b00, b, a}), .shape_sel(shape_sel),
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

  // Singles reference, as in the other end-to-end tests.
  realtime ea[$], eb[$];
  realtime tv_prev = -1.0;
  bit      checking = 1'b0;
  int      intervals = 0;
  longint  sum_a = 0, sum_b = 0, sum_ab = 0;
  always @(posedge a) ea.push_back($realtime);
  always @(posedge b) eb.push_back($realtime);

  function automatic int take(ref realtime q[$], input realtime tv, input realtime tp);
    int n;
    n = 0;
    while (q.size() > 0 && q[0] < tv) begin
      realtime e;
      e = q.pop_front();
      if (e < tv - TCLK && e >= tp) n++;
    end
    return n;
  endfunction

  always @(posedge counts_valid) begin
    realtime tv;
    int xa, xb;
    tv = $realtime;
    xa = take(ea, tv, tv_prev);
    xb = take(eb, tv, tv_prev);
    if (checking) begin
      intervals++;
      check(counts[0] == 16'(xa), $sformatf("A singles %0d expected %0d", counts[0], xa));
      check(counts[1] == 16'(xb), $sformatf("B singles %0d expected %0d", counts[1], xb));
      sum_a  += counts[0];
      sum_b  += counts[1];
      sum_ab += counts[2];
    end
    tv_prev = tv;
  end

  bit stop = 1'b0;
  task automatic random_train(ref logic s, input realtime mean_gap);
    while (!stop) begin
      realtime u;
      u = (real'($urandom) + 1.0) / 4294967297.0;
      #(10.0 - mean_gap * $ln(u));
      s = 1'b1;
      #25.0;
      s = 1'b0;
    end
  endtask

  initial begin
    realtime w[3] = '{7.5, 9.0, 11.5};
    realtime paper_tau[3] = '{12.03, 14.56, 20.38};
    a = 1'b0;
    b = 1'b0;
    shape_sel = 2'b00;
    exclude = '1;
    exclude[0] = 4'b1110;   // A
    exclude[1] = 4'b1101;   // B
    exclude[2] = 4'b1100;   // A and B
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    #25 rst_n = 1'b1;
    fork
      random_train(a, 110.0);
      random_train(b, 140.0);
    join_none
    for (int s = 0; s < 3; s++) begin
      realtime t_s, ra, rb, rab, tau;
      @(posedge counts_valid);
      #50;
      shape_sel = 2'(s);
      @(posedge counts_valid);   // the interval with the switch is not used
      sum_a = 0; sum_b = 0; sum_ab = 0;
      checking = 1'b1;
      wait (intervals == (s + 1) * NIV);
      checking = 1'b0;
      t_s = NIV * (P - 1) * TCLK * 1.0e-9;   // active time, seconds
      ra  = sum_a / t_s;
      rb  = sum_b / t_s;
      rab = sum_ab / t_s;
      tau = rab / (ra * rb) * 1.0e9;
      $display("setting %0d: R_A %0.2f MHz, R_B %0.2f MHz, R_AB %0.3f MHz (%0d), tau_c %0.1f ns (2w = %0.1f ns; published measurement %0.2f ns)",
               s, ra / 1.0e6, rb / 1.0e6, rab / 1.0e6, sum_ab, tau, 2.0 * w[s], paper_tau[s]);
      check(tau > 0.8 * 2.0 * w[s] && tau < 1.2 * 2.0 * w[s], $sformatf("tau_c %0.1f ns for setting %0d", tau, s));
    end
    stop = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
