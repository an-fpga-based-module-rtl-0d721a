// tb_fifo_writer: byte stream, handshake and overrun of the FIFO writer.
// Sets of eight random 16-bit values are loaded; the FIFO model accepts
// bytes with random recovery times and is sometimes held full. Every byte
// received must match channel order / little-endian order of the values,
// with no protocol error. A set sent while the chip never waits must take
// 9 cycles per byte; a load during sending must set `overrun` and be dropped.
`timescale 1ns / 1ps
module tb_fifo_writer;
  localparam int NC = 8;
  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 load;
  logic [NC-1:0][15:0]  values;
  logic                 txe_n, wr, busy, overrun, stall;
  logic [7:0]           data;
  int checks = 0, failures = 0;
  logic [7:0]           expect_q[$];

  fifo_writer dut (.clk(clk), .rst_n(rst_n), .load(load), .values(values),
                   .txe_n(txe_n), .data(data), .wr(wr), .busy(busy), .overrun(overrun));
  ft_fifo_model #(.RECOV_MIN(5), .RECOV_MAX(100)) u_ft (.stall(stall), .wr(wr), .data(data), .txe_n(txe_n));

  always #10 clk = ~clk;

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

  task automatic load_set();
    @(negedge clk);
    for (int c = 0; c < NC; c++) begin
      values[c] = 16'($urandom);
      expect_q.push_back(values[c][7:0]);
      expect_q.push_back(values[c][15:8]);
    end
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    values = '0;   // the writer must have copied them
  endtask

  initial begin
    int t0, t1;
    rst_n = 1'b1;  // a falling edge, so the asynchronous resets fire
    #1 rst_n = 1'b0; load = 1'b0; stall = 1'b0; values = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    // 1: chip always ready after its recovery; timed
    load_set();
    t0 = int'($time);
    wait (!busy);
    t1 = int'($time);
    $display("set of 16 bytes took %0d cycles", (t1 - t0) / 20);
    // recovery up to 100 ns can add waiting: at least 9 cycles per byte
    check((t1 - t0) / 20 >= 16 * 9 - 1, "byte rate not above one per 9 cycles");
    // 2: host stalls in the middle of a set
    load_set();
    repeat (40) @(negedge clk);
    stall = 1'b1;
    repeat (300) @(negedge clk);
    check(busy, "writer waits while the chip is full");
    stall = 1'b0;
    wait (!busy);
    // 3: overrun, a load while busy is dropped
    check(!overrun, "no overrun yet");
    load_set();
    repeat (10) @(negedge clk);
    @(negedge clk);
    values = '1;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    wait (!busy);
    check(overrun, "overrun flagged");
    // 4: several more sets back to back, after each finishes
    for (int s = 0; s < 5; s++) begin
      load_set();
      wait (!busy);
    end
    repeat (20) @(negedge clk);
    check(u_ft.proto_errs == 0, "no write while txe_n high or short wr pulse");
    check(u_ft.nbytes == expect_q.size(), "byte count");
    for (int i = 0; i < expect_q.size() && i < u_ft.nbytes; i++)
      check(u_ft.mem[i] == expect_q[i], $sformatf("byte %0d: got %02x expected %02x", i, u_ft.mem[i], expect_q[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
