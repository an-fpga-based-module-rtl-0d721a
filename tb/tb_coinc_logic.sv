// tb_coinc_logic: exhaustive check of the coincidence gates.
// For every exclude mask of channel 0 and every input pattern, and for random
// masks on the other channels, each output is compared with a reference that
// says "all included inputs are high".
`timescale 1ns / 1ps
module tb_coinc_logic;
  localparam int NI = 4;
  localparam int NC = 8;
  logic [NI-1:0]         det_in;
  logic [NC-1:0][NI-1:0] exclude;
  logic [NC-1:0]         coinc;
  int checks = 0, failures = 0;

  coinc_logic dut (.det_in(det_in), .exclude(exclude), .coinc(coinc));

  function automatic logic ref_gate(logic [NI-1:0] d, logic [NI-1:0] ex);
    for (int i = 0; i < NI; i++) if (!ex[i] && !d[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++) begin
      for (int d = 0; d < 16; d++) begin
        exclude[0] = NI'(m);
        for (int c = 1; c < NC; c++) exclude[c] = NI'($urandom);
        det_in = NI'(d);
        #1;
        for (int c = 0; c < NC; c++) begin
          checks++;
          if (coinc[c] !== ref_gate(det_in, exclude[c])) begin
            failures++;
            $display("FAIL ch%0d in=%b ex=%b got %b", c, det_in, exclude[c], coinc[c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
