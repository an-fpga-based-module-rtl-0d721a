// tb_ccm_fpga: the FPGA logic on its own, fed with eight random pulse trains.
// Channel c gets pulses with gaps of 4..(10 + 40c) ns (up to about 100 MHz);
// channel 7 instead counts the module's own 10 MHz clock output, looped back
// through 3 ns of cable, as in the self-test. The reference counts leading
// edges outside the blind cycle for each interval; the storage registers
// and the bytes the FIFO model receives must both match it. The host stops
// reading for a while, so that one set is dropped (overrun). Checked: blind
// spacing (1000 cycles at R = 50 kHz), pulses lost in blind cycles, exactly
// 200 clock-output edges per interval when none falls in a blind cycle.
`timescale 1ns / 1ps
module tb_ccm_fpga;
  import ccm_pkg::*;
  localparam int NC = 8;
  localparam int P  = 1000;
  logic                 clk = 1'b0;
  logic                 rst_n;
  logic [NC-1:0]        coinc;
  logic [NC-2:0]        gen;
  logic                 clk_out, clk_loop;
  logic [7:0]           ft_data;
  logic                 ft_wr, ft_txe_n, stall;
  logic [NC-1:0][15:0]  counts;
  logic                 counts_valid, blind, overrun;
  int checks = 0, failures = 0;

  ccm_fpga dut (
    .clk(clk), .rst_n(rst_n), .coinc(coinc), .period_cycles(26'(P)),
    .clkout_sel(3'(CLKOUT_10MHZ)), .ft_txe_n(ft_txe_n), .ft_data(ft_data), .ft_wr(ft_wr),
    .counts(counts), .counts_valid(counts_valid), .blind(blind), .overrun(overrun),
    .clk_out(clk_out));
  ft_fifo_model u_ft (.stall(stall), .wr(ft_wr), .data(ft_data), .txe_n(ft_txe_n));

  always #10 clk = ~clk;
  assign #3 clk_loop = clk_out;
  assign coinc = {clk_loop, gen};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference counters.
  int ref_cnt[NC];
  int lost_in_blind = 0;
  logic [NC-1:0] coinc_prev = '0;
  bit            ref_on = 1'b0;   // set once reset has been released
  always @(coinc) begin
    for (int c = 0; c < NC; c++) begin
      if (ref_on && coinc[c] && !coinc_prev[c]) begin
        if (blind) lost_in_blind++;
        else ref_cnt[c]++;
      end
    end
    coinc_prev = coinc;
  end

  // Expected byte stream, built at every transfer unless the set is dropped.
  logic [7:0] exp_bytes[$];
  typedef logic [NC-1:0][31:0] set_t;
  set_t exp_sets[$];
  int nsets = 0, dropped = 0, clk_full = 0, last_blind_cyc = -1, cyc = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (blind) begin
        set_t snap;
        if (last_blind_cyc >= 0) check(cyc - last_blind_cyc == P, "blind spacing");
        last_blind_cyc = cyc;
        for (int c = 0; c < NC; c++) begin
          snap[c]    = 32'(ref_cnt[c]);
          ref_cnt[c] = 0;
        end
        exp_sets.push_back(snap);
      end
      if (counts_valid) begin
        set_t snap;
        snap = exp_sets.pop_front();
        nsets++;
        for (int c = 0; c < NC; c++)
          check(counts[c] == 16'(snap[c]), $sformatf("set %0d ch %0d: %0d expected %0d", nsets, c, counts[c], snap[c]));
        if (snap[NC-1] == 200) clk_full++;
        if (dut.u_fifo.busy) dropped++;
        else for (int c = 0; c < NC; c++) begin
          exp_bytes.push_back(8'(snap[c]));
          exp_bytes.push_back(8'(snap[c] >> 8));
        end
      end
    end
  end

  task automatic pulse_train(input int c, input realtime t_end);
    while ($realtime < t_end) begin
      int t;
      #($urandom_range(4000, 10000 + 40000 * c) / 1000.0);
      t = int'($realtime * 1000.0) % 10000;
      if (t < 500 || t > 9500) #1;
      gen[c] = 1'b1;
      #($urandom_range(2500, 4000) / 1000.0);
      gen[c] = 1'b0;
    end
  endtask

  initial begin
    gen = '0; stall = 1'b0;
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    #25 rst_n = 1'b1;
    ref_on = 1'b1;
    for (int c = 0; c < NC - 1; c++) begin
      automatic int cc = c;
      fork pulse_train(cc, 200us); join_none
    end
    #80us;
    stall = 1'b1;     // host stops reading for 30 us
    #30us;
    stall = 1'b0;
    wait (nsets >= 12);
    repeat (3 * P) @(posedge clk);
    check(u_ft.proto_errs == 0, "FIFO protocol");
    check(u_ft.nbytes == exp_bytes.size(), $sformatf("bytes: %0d expected %0d", u_ft.nbytes, exp_bytes.size()));
    for (int i = 0; i < exp_bytes.size() && i < u_ft.nbytes; i++)
      check(u_ft.mem[i] == exp_bytes[i], $sformatf("byte %0d", i));
    check(lost_in_blind > 0, "some pulses fell in a blind cycle");
    check(dropped > 0 && overrun, "a set was dropped while the host stalled");
    check(clk_full > 0, "10 MHz self-test gave 200 counts in an interval");
    $display("sets %0d, dropped %0d, pulses lost in blind cycles %0d, full 10 MHz intervals %0d",
             nsets, dropped, lost_in_blind, clk_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
