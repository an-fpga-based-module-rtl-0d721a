// tb_pulse_shaper: measures the shaped pulse width for each switch setting.
// A 30 ns input pulse must come out 7.5, 9.0 and 11.5 ns wide for settings
// 00, 01, 10 and 40 ns wide (stretched by 10 ns) in bypass; a 5 ns input
// pulse is shorter than every tap and passes unchanged; the leading edge is
// not delayed. Two pulses closer than the delay both come out, the second
// shortened to the gap. Edges are timed with $realtime against a 0.1 ns
// tolerance.
`timescale 1ns / 1ps
module tb_pulse_shaper;
  logic       din;
  logic [1:0] sel;
  logic       dout;
  int checks = 0, failures = 0;
  realtime t_in, t_rise, t_fall;

  pulse_shaper dut (.din(din), .sel(sel), .dout(dout));

  int n_rise = 0;
  always @(posedge dout) begin
    t_rise = $realtime;
    n_rise++;
  end
  always @(negedge dout) t_fall = $realtime;

  task automatic check_pulse(input logic [1:0] s, input realtime w_in, input realtime w_exp);
    sel    = s;
    t_rise = -1.0;
    t_fall = -1.0;
    #50;
    t_in = $realtime;
    din  = 1'b1;
    #(w_in);
    din  = 1'b0;
    #60;
    checks++;
    if (t_rise < 0.0 || t_fall < 0.0 || (t_rise - t_in) > 0.1 || (t_rise - t_in) < -0.1 ||
        ((t_fall - t_rise) - w_exp) > 0.1 || ((t_fall - t_rise) - w_exp) < -0.1) begin
      failures++;
      $display("FAIL sel=%b in %0.2f ns: rise at +%0.2f, width %0.2f, expected %0.2f",
               s, w_in, t_rise - t_in, t_fall - t_rise, w_exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b0;
    sel = 2'b00;
    check_pulse(2'b00, 30.0, 7.5);
    check_pulse(2'b01, 30.0, 9.0);
    check_pulse(2'b10, 30.0, 11.5);
    check_pulse(2'b11, 30.0, 40.0);
    check_pulse(2'b00, 5.0, 5.0);
    check_pulse(2'b10, 20.0, 11.5);
    check_pulse(2'b11, 6.0, 16.0);
    // two 25 ns pulses 10 ns apart with the 11.5 ns tap: two output pulses,
    // the second starting 1.5 ns late and 10 ns long
    sel = 2'b10;
    #50;
    n_rise = 0;
    din = 1'b1;
    #25 din = 1'b0;
    #10 t_in = $realtime;
    din = 1'b1;
    #25 din = 1'b0;
    #60;
    checks++;
    if (n_rise != 2 || (t_rise - t_in - 1.5) > 0.1 || (t_rise - t_in - 1.5) < -0.1 ||
        (t_fall - t_rise - 10.0) > 0.1 || (t_fall - t_rise - 10.0) < -0.1) begin
      failures++;
      $display("FAIL close pulses: %0d rises, second at +%0.2f, width %0.2f", n_rise, t_rise - t_in, t_fall - t_rise);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
