// tb_ccm_top: end-to-end test of the whole module at its default sizes
// (8 channels of 16 bits, counting interval 1000 cycles = 20 us, R = 50 kHz).
//
// Each interval the testbench fires about 50 detector events: a random subset
// of inputs A..D with random 20-50 ns pulse widths, some with one input
// delayed just inside or just outside the coincidence window of the current
// shaper setting. Its own reference computes, from the shaped widths of the
// module (7.5 / 9 / 11.5 ns, or input + 10 ns in bypass), whether the
// included inputs of each channel overlap, and so the count each channel
// must report. Checked: the storage registers after every interval, the bytes
// the USB FIFO model receives, and the clock output rate.
// Mechanisms that must each occur: all four shaper settings, window hits and
// misses in each, two pushbutton configurations, a coincidence lost in a blind
// cycle, a set dropped while the host is not reading, two clock-output rates.
`timescale 1ns / 1ps
module tb_ccm_top;
  import ccm_pkg::*;
  localparam int NI = 4;
  localparam int NC = 8;
  localparam int P  = 1000;
  localparam realtime TCLK = 20.0;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic [NI-1:0]        det_in;
  logic [1:0]           shape_sel;
  logic [NC-1:0][NI-1:0] exclude;
  logic [NC-1:0]        ttl_out;
  logic [2:0]           clkout_sel;
  logic                 ft_txe_n, ft_wr, stall;
  logic [7:0]           ft_data;
  logic [NC-1:0][15:0]  counts;
  logic                 counts_valid, blind, overrun, clk_out;
  int checks = 0, failures = 0;

  ccm_top dut (
    .clk(clk), .rst_n(rst_n), .det_in(det_in), .shape_sel(shape_sel), .exclude(exclude),
    .ttl_out(ttl_out), .period_cycles(26'(P)), .clkout_sel(clkout_sel),
    .ft_txe_n(ft_txe_n), .ft_data(ft_data), .ft_wr(ft_wr), .counts(counts),
    .counts_valid(counts_valid), .blind(blind), .overrun(overrun), .clk_out(clk_out));
  ft_fifo_model u_ft (.stall(stall), .wr(ft_wr), .data(ft_data), .txe_n(ft_txe_n));

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

  // Two pushbutton configurations (bit set = input excluded).
  // Config 0: A, B, C, D singles, AB, ABC, ABCD, CD.
  // Config 1: AB, AC, AD, BC, BD, ABD, BCD, ACD.
  function automatic logic [NC-1:0][NI-1:0] include_cfg(input int cfg);
    logic [NC-1:0][NI-1:0] inc;
    if (cfg == 0) inc = {4'b1100, 4'b1111, 4'b0111, 4'b0011, 4'b1000, 4'b0100, 4'b0010, 4'b0001};
    else          inc = {4'b1101, 4'b1110, 4'b1011, 4'b1010, 4'b0110, 4'b1001, 4'b0101, 4'b0011};
    return inc;
  endfunction

  // Shaped width for the current setting, from the module's measured values.
  function automatic realtime shaped_width(input logic [1:0] s, input realtime w_in);
    realtime w;
    case (s)
      2'b00:   w = 7.5;
      2'b01:   w = 9.0;
      2'b10:   w = 11.5;
      default: return w_in + 10.0;
    endcase
    return (w_in < w) ? w_in : w;
  endfunction

  // ---- expected sets and checking -------------------------------------
  typedef logic [NC-1:0][15:0] set_t;
  set_t       exp_sets[$];
  logic [7:0] exp_bytes[$];
  int nsets = 0, dropped = 0;
  bit done = 1'b0;

  always @(posedge clk) begin
    if (rst_n && counts_valid && !done) begin
      set_t e;
      nsets++;
      if (exp_sets.size() == 0) begin
        check(1'b0, "a set arrived with no expectation");
      end else begin
        e = exp_sets.pop_front();
        for (int c = 0; c < NC; c++)
          check(counts[c] == e[c], $sformatf("set %0d ch %0d: %0d expected %0d", nsets, c, counts[c], e[c]));
      end
    end
    // every set the writer accepts must reach the FIFO chip
    if (rst_n && counts_valid) begin
      if (dut.u_fpga.u_fifo.busy) dropped++;
      else for (int c = 0; c < NC; c++) begin
        exp_bytes.push_back(counts[c][7:0]);
        exp_bytes.push_back(counts[c][15:8]);
      end
    end
  end

  // ---- event generation ----------------------------------------------
  int      cfg = 0;
  set_t    cur;
  int      win_hit[4], win_miss[4], blind_lost = 0, cfg_switches = 0;

  // Fire one event: inputs in `fire`, input i rising at t0 + dly[i], width w[i].
  // Adds the reference coincidences to `cur`; returns when all inputs are low.
  task automatic fire_event(input logic [NI-1:0] fire, input realtime dly[NI],
                            input realtime w[NI], input bit in_blind);
    // in_blind: the event is placed in the blind cycle, the reference counts
    // it as lost, and the task returns at once.
    logic [NC-1:0][NI-1:0] inc;
    realtime t0, t_end;
    inc = include_cfg(cfg);
    // reference
    for (int c = 0; c < NC; c++) begin
      if ((inc[c] & ~fire) == '0) begin
        realtime s_max, e_min;
        s_max = 0.0;
        e_min = 1.0e9;
        for (int i = 0; i < NI; i++) if (inc[c][i]) begin
          if (dly[i] > s_max) s_max = dly[i];
          if (dly[i] + shaped_width(shape_sel, w[i]) < e_min) e_min = dly[i] + shaped_width(shape_sel, w[i]);
        end
        if (s_max < e_min) begin
          if (in_blind) blind_lost++;
          else cur[c] = cur[c] + 1'b1;
        end
      end
    end
    // stimulus
    t0    = $realtime;
    t_end = 0.0;
    for (int i = 0; i < NI; i++) if (fire[i] && dly[i] + w[i] > t_end) t_end = dly[i] + w[i];
    for (int i = 0; i < NI; i++) begin
      automatic int ii = i;
      automatic realtime d = dly[i], ww = w[i];
      if (fire[ii]) fork
        begin
          #(d);
          det_in[ii] = 1'b1;
          #(ww);
          det_in[ii] = 1'b0;
        end
      join_none
    end
    if (!in_blind) #(t_end + 0.5);
  endtask

  // One counting interval, starting right after counts_valid rose (at tv).
  // The next blind cycle starts at tv + (P - 1) * TCLK.
  // Switch settings change 50 ns in, when the last event's pulses are over.
  task automatic run_interval(input realtime tv, input bit with_blind_event,
                              input logic [1:0] new_shape, input int new_cfg);
    realtime dly[NI], w[NI];
    cur = '0;
    #(50.25);
    shape_sel = new_shape;
    if (new_cfg != cfg) begin
      cfg     = new_cfg;
      exclude = ~include_cfg(new_cfg);
      cfg_switches++;
    end
    while ($realtime - tv < (P - 1) * TCLK - 1000.0) begin
      logic [NI-1:0] fire;
      for (int i = 0; i < NI; i++) begin
        dly[i] = 0.0;
        w[i]   = real'($urandom_range(20, 50));
      end
      if ($urandom_range(0, 3) == 0) begin
        // window test on a pair: second input just inside or outside
        int a, b;
        realtime wsh;
        a = $urandom_range(0, NI - 1);
        b = (a + 1 + $urandom_range(0, NI - 2)) % NI;
        fire = NI'(0);
        fire[a] = 1'b1;
        fire[b] = 1'b1;
        w[a] = 30.0;
        w[b] = 30.0;
        wsh  = shaped_width(shape_sel, 30.0);
        if ($urandom_range(0, 1) == 0) begin
          dly[b] = wsh - 1.0;
          win_hit[shape_sel]++;
        end else begin
          dly[b] = wsh + 1.0;
          win_miss[shape_sel]++;
        end
      end else begin
        fire = NI'($urandom_range(1, 15));
        for (int i = 0; i < NI; i++) if ($urandom_range(0, 4) == 0) dly[i] = 0.5 * $urandom_range(0, 8);
      end
      fire_event(fire, dly, w, 1'b0);
      #(real'($urandom_range(100, 400)));
    end
    if (with_blind_event) begin
      // all four inputs together, leading edge 5 ns into the blind cycle
      #((tv + (P - 1) * TCLK + 5.25) - $realtime);
      for (int i = 0; i < NI; i++) begin
        dly[i] = 0.0;
        w[i]   = 30.0;
      end
      fire_event(4'b1111, dly, w, 1'b1);
    end
    exp_sets.push_back(cur);
  endtask

  int clk_rises = 0;
  always @(posedge clk_out) clk_rises++;

  initial begin
    realtime tv;
    int clk_rises_10m, clk_rises_1m;
    det_in = '0; stall = 1'b0; shape_sel = 2'b00; clkout_sel = 3'(CLKOUT_10MHZ);
    exclude = ~include_cfg(0);
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0;
    #25 rst_n = 1'b1;
    // first interval: nothing happens, all counts zero
    exp_sets.push_back('0);
    @(posedge counts_valid);
    for (int iv = 0; iv < 16; iv++) begin
      tv = $realtime;
      if (iv == 11) stall = 1'b1;   // host stops reading
      if (iv == 12) stall = 1'b0;
      if (iv == 3) clk_rises = 0;
      if (iv == 4) clk_rises_10m = clk_rises;
      if (iv == 5) begin
        clkout_sel = 3'(CLKOUT_1MHZ);
      end
      if (iv == 6) clk_rises = 0;
      if (iv == 7) clk_rises_1m = clk_rises;
      run_interval(tv, iv % 3 == 1, 2'((iv / 2) % 4), (iv >= 8) ? 1 : 0);
      @(posedge counts_valid);
    end
    done = 1'b1;   // the interval now running is not checked
    repeat (3 * P) @(posedge clk);
    check(clk_rises_10m == 200, $sformatf("10 MHz output: %0d rises per 20 us", clk_rises_10m));
    check(clk_rises_1m == 20, $sformatf("1 MHz output: %0d rises per 20 us", clk_rises_1m));
    check(u_ft.proto_errs == 0, "FIFO protocol");
    check(u_ft.nbytes == exp_bytes.size(), $sformatf("bytes: %0d expected %0d", u_ft.nbytes, exp_bytes.size()));
    for (int i = 0; i < exp_bytes.size() && i < u_ft.nbytes; i++)
      check(u_ft.mem[i] == exp_bytes[i], $sformatf("byte %0d", i));
    for (int s = 0; s < 4; s++) begin
      check(win_hit[s] > 0 && win_miss[s] > 0, $sformatf("window hits and misses for setting %0d", s));
      $display("shaper setting %0d: %0d window hits, %0d window misses", s, win_hit[s], win_miss[s]);
    end
    check(blind_lost > 0, "coincidences lost in a blind cycle");
    check(dropped > 0 && overrun, "a set dropped while the host stalled");
    check(cfg_switches > 0, "pushbutton configuration changed");
    $display("sets %0d, dropped %0d, coincidences lost in blind cycles %0d, FIFO bytes %0d",
             nsets, dropped, blind_lost, u_ft.nbytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
