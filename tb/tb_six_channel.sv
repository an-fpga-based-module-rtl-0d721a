// tb_six_channel: the six-channel, 20-bit build of the FPGA logic, next to
// the default eight-channel, 16-bit build, over a 1 ms counting interval
// (R = 1 kHz). Channel 0 of both gets an 80 MHz train (about 80,000 pulses
// per interval, more than 16 bits hold), channel 1 a 5 MHz train. The 20-bit
// build must report the exact counts, sent as 3 bytes per channel
// (18 bytes per set); the 16-bit build must report them modulo 2^16.
`timescale 1ns / 1ps
module tb_six_channel;
  localparam int P = 50_000;   // 1 ms
  localparam realtime TCLK = 20.0;

  logic clk = 1'b0;
  logic rst_n;
  logic fast, slow;
  logic [5:0]            c6;
  logic [7:0]            c8;
  logic                  txe6, txe8, wr6, wr8, cv6, cv8, bl6, bl8, ov6, ov8, co6, co8;
  logic [7:0]            d6, d8;
  logic [5:0][19:0]      cnt6;
  logic [7:0][15:0]      cnt8;
  int checks = 0, failures = 0;

  assign c6 = {4'b0000, slow, fast};
  assign c8 = {6'b000000, slow, fast};

  ccm_fpga #(.NUM_CH(6), .CNT_W(20)) dut6 (
    .clk(clk), .rst_n(rst_n), .coinc(c6), .period_cycles(26'(P)), .clkout_sel(3'd0),
    .ft_txe_n(txe6), .ft_data(d6), .ft_wr(wr6), .counts(cnt6), .counts_valid(cv6),
    .blind(bl6), .overrun(ov6), .clk_out(co6));
  ccm_fpga dut8 (
    .clk(clk), .rst_n(rst_n), .coinc(c8), .period_cycles(26'(P)), .clkout_sel(3'd0),
    .ft_txe_n(txe8), .ft_data(d8), .ft_wr(wr8), .counts(cnt8), .counts_valid(cv8),
    .blind(bl8), .overrun(ov8), .clk_out(co8));
  ft_fifo_model u_ft6 (.stall(1'b0), .wr(wr6), .data(d6), .txe_n(txe6));
  ft_fifo_model u_ft8 (.stall(1'b0), .wr(wr8), .data(d8), .txe_n(txe8));

  always #(TCLK / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #6ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: edges per interval outside the blind cycle.
  realtime ef[$], es[$];
  realtime tv_prev = -1.0;
  int      nset = 0, wrapped = 0;
  logic [7:0] exp6[$], exp8[$];
  always @(posedge fast) ef.push_back($realtime);
  always @(posedge slow) es.push_back($realtime);

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

  always @(posedge cv6) begin
    realtime tv;
    int nf, ns;
    tv = $realtime;
    nf = take(ef, tv, tv_prev);
    ns = take(es, tv, tv_prev);
    nset++;
    check(cv8 == 1'b1, "both builds transfer together");
    check(cnt6[0] == 20'(nf), $sformatf("20-bit ch0 %0d expected %0d", cnt6[0], nf));
    check(cnt6[1] == 20'(ns), $sformatf("20-bit ch1 %0d expected %0d", cnt6[1], ns));
    check(cnt8[0] == 16'(nf), $sformatf("16-bit ch0 %0d expected %0d", cnt8[0], 16'(nf)));
    check(cnt8[1] == 16'(ns), $sformatf("16-bit ch1 %0d expected %0d", cnt8[1], ns));
    if (nf > 65535) wrapped++;
    for (int c = 0; c < 6; c++) begin
      int v;
      v = (c == 0) ? nf : (c == 1) ? ns : 0;
      exp6.push_back(8'(v));
      exp6.push_back(8'(v >> 8));
      exp6.push_back(8'(v >> 16));
    end
    for (int c = 0; c < 8; c++) begin
      int v;
      v = (c == 0) ? nf : (c == 1) ? ns : 0;
      exp8.push_back(8'(v));
      exp8.push_back(8'(v >> 8));
    end
    tv_prev = tv;
  end

  bit stop = 1'b0;
  initial begin
    fast = 1'b0;
    slow = 1'b0;
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    #25 rst_n = 1'b1;
    @(posedge cv6);
    #3.123;
    fork
      while (!stop) begin
        fast = 1'b1;
        #5.0;
        fast = 1'b0;
        #7.5;
      end
      while (!stop) begin
        slow = 1'b1;
        #20.0;
        slow = 1'b0;
        #180.0;
      end
      begin
        wait (nset == 4);
        stop = 1'b1;
      end
    join
    @(posedge cv6);   // the set of the interval the trains stopped in
    repeat (400) @(posedge clk);   // last set fully sent
    check(wrapped > 0, "the 16-bit build wrapped at least once");
    check(u_ft6.nbytes == exp6.size() && u_ft8.nbytes == exp8.size(),
          $sformatf("bytes %0d / %0d expected %0d / %0d", u_ft6.nbytes, u_ft8.nbytes, exp6.size(), exp8.size()));
    for (int i = 0; i < exp6.size() && i < u_ft6.nbytes; i++)
      check(u_ft6.mem[i] == exp6[i], $sformatf("20-bit build byte %0d", i));
    for (int i = 0; i < exp8.size() && i < u_ft8.nbytes; i++)
      check(u_ft8.mem[i] == exp8[i], $sformatf("16-bit build byte %0d", i));
    $display("sets %0d, 18 bytes per set in the 6 x 20-bit build, %0d sets wrapped in the 8 x 16-bit build", nset, wrapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
