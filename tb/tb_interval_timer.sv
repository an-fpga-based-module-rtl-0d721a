// tb_interval_timer: checks the spacing and length of the blind cycle.
// With period_cycles = 1000, 1500 and 3 (clamped up to the 1000-cycle
// minimum, a 50 kHz rate) the blind cycles must be exactly that many cycles
// apart, last one cycle, and be followed by one
// stored_valid cycle. The first blind cycle after reset is the
// period_cycles-th cycle.
`timescale 1ns / 1ps
module tb_interval_timer;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [25:0] period_cycles;
  logic        blind, stored_valid;
  int checks = 0, failures = 0;

  interval_timer dut (.clk(clk), .rst_n(rst_n), .period_cycles(period_cycles),
                      .blind(blind), .stored_valid(stored_valid));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle-by-cycle monitor.
  int   cyc = 0, last_blind = -1, exp_period = 1000;
  logic prev_blind = 1'b0;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      cyc++;
      if (blind) begin
        if (last_blind < 0) check(cyc == exp_period, "first blind cycle position");
        else check(cyc - last_blind == exp_period, "blind spacing");
        last_blind = cyc;
      end
      check(!(blind && prev_blind), "blind lasts one cycle");
      check(stored_valid == prev_blind, "stored_valid follows blind");
      prev_blind = blind;
    end
  end

  int nblind = 0;
  always @(posedge clk) if (rst_n && blind) nblind++;

  initial begin
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    period_cycles = 26'd1000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (nblind == 4);
    // change the period right after a blind cycle
    @(negedge clk);
    period_cycles = 26'd1500;
    exp_period    = 1500;
    wait (nblind == 8);
    @(negedge clk);
    period_cycles = 26'd3;
    exp_period    = 1000;
    wait (nblind == 12);
    check(nblind == 12, "blind count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
