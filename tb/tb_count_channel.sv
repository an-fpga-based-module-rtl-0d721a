// tb_count_channel: pulse counting, blind cycle and restart of one channel.
// The testbench plays the interval timer (a one-cycle blind every P master
// cycles) and sends random pulse trains of up to
// about 100 MHz, some intervals silent, some pulses inside the blind cycle.
// The reference is the number of leading edges that arrive while blind is
// low; the storage register must equal it after every interval, for a
// 16-bit channel and, modulo 16, for a 4-bit channel that wraps.
`timescale 1ns / 1ps
module tb_count_channel;
  localparam int P = 60;   // master cycles per interval
  logic        clk = 1'b0;
  logic        rst_n;
  logic        pulse;
  logic        blind;
  logic [15:0] stored;
  logic [3:0]  stored4;
  int checks = 0, failures = 0;
  int ref_cnt = 0, lost_in_blind = 0, silent_intervals = 0;

  count_channel dut (.clk(clk), .rst_n(rst_n), .pulse(pulse), .blind(blind),
                     .stored(stored));
  count_channel #(.CNT_W(4)) dut4 (.clk(clk), .rst_n(rst_n), .pulse(pulse),
                                   .blind(blind), .stored(stored4));

  always #10 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Interval timer stand-in.
  int cyc = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blind <= 1'b0;
      cyc   <= 0;
    end else begin
      cyc   <= (cyc == P - 1) ? 0 : cyc + 1;
      blind <= (cyc == P - 1);
    end
  end

  // Reference: leading edges outside the blind cycle.
  always @(posedge pulse) begin
    if (rst_n) begin
      if (blind) lost_in_blind++;
      else ref_cnt++;
    end
  end

  // After each transfer compare and restart the reference.
  always @(posedge clk) begin
    if (rst_n && blind) begin
      int expected;
      expected = ref_cnt;
      ref_cnt  = 0;
      @(negedge clk);
      checks += 2;
      if (stored !== 16'(expected)) begin
        failures++;
        $display("FAIL stored=%0d expected %0d at %0t", stored, expected, $time);
      end
      if (stored4 !== 4'(expected)) begin
        failures++;
        $display("FAIL 4-bit stored=%0d expected %0d at %0t", stored4, 4'(expected), $time);
      end
      if (expected == 0) silent_intervals++;
    end
  end

  // Pulse generator: edges kept 0.5 ns away from master clock edges.
  task automatic send_pulse(input int width_ps, input int gap_ps);
    int t;
    t = int'($realtime * 1000.0) % 10000;
    if (t < 500) #((500 - t) / 1000.0);
    else if (t > 9500) #((10500 - t) / 1000.0);
    pulse = 1'b1;
    #(width_ps / 1000.0);
    pulse = 1'b0;
    #(gap_ps / 1000.0);
  endtask

  initial begin
    pulse = 1'b0;
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    #25 rst_n = 1'b1;
    for (int iv = 0; iv < 30; iv++) begin
      if (iv % 7 == 3 || iv % 7 == 4 || iv == 20) begin
        #(P * 20);   // a silent interval
      end else begin
        int n;
        n = 20 + $urandom_range(0, 80);
        for (int k = 0; k < n; k++) send_pulse($urandom_range(3000, 8000), $urandom_range(3000, 40000));
      end
    end
    #(3 * P * 20);
    checks++;
    if (lost_in_blind == 0 || silent_intervals == 0) begin
      failures++;
      $display("FAIL coverage: %0d pulses in blind, %0d silent intervals", lost_in_blind, silent_intervals);
    end
    $display("pulses lost in blind cycles: %0d, silent intervals: %0d", lost_in_blind, silent_intervals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
