// tb_clk_out_divider: counts output periods for all eight settings.
// For each setting the rising edges in a window of 20 output periods (1 for
// 100 Hz .. 1 Hz) must number exactly that many, every period must last
// 5 * 10^sel master cycles, and
// the high time must be 2 cycles at 10 MHz and half the period below.
`timescale 1ns / 1ps
module tb_clk_out_divider;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] sel;
  logic       clk_out;
  int checks = 0, failures = 0;

  clk_out_divider dut (.clk(clk), .rst_n(rst_n), .sel(sel), .clk_out(clk_out));

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    #3s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int s, input int nper);
    int period, exp_high, rises, high_cycles, since_rise, bad_period;
    logic prev;
    period   = 5;
    for (int k = 0; k < s; k++) period *= 10;
    exp_high = (s == 0) ? 2 : period / 2;
    sel = 3'(s);
    // settle: wait for a rising edge of the new setting
    repeat (3) @(posedge clk);
    @(posedge clk_out);
    rises = 0; high_cycles = 0; since_rise = 0; bad_period = 0;
    prev = 1'b1;
    for (int c = 0; c < nper * period; c++) begin
      @(posedge clk);
      #1;
      since_rise++;
      if (clk_out) high_cycles++;
      if (clk_out && !prev) begin
        rises++;
        if (since_rise != period) bad_period++;
        since_rise = 0;
      end
      prev = clk_out;
    end
    checks++;
    if (rises != nper || bad_period != 0) begin
      failures++;
      $display("FAIL sel=%0d: %0d rises (exp %0d), %0d bad periods", s, rises, nper, bad_period);
    end
    checks++;
    if (high_cycles != nper * exp_high) begin
      failures++;
      $display("FAIL sel=%0d: high for %0d cycles, expected %0d", s, high_cycles, nper * exp_high);
    end
  endtask

  initial begin
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    sel   = 3'd0;
    #35 rst_n = 1'b1;
    for (int s = 0; s <= 4; s++) measure(s, 20);
    for (int s = 5; s <= 7; s++) measure(s, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
