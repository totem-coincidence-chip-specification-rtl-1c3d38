// tb_cc_counter: checks the rate counter. Random activity is put on all
// 16 outputs; the testbench counts 0-to-1 transitions of the selected
// output at each clock edge and expects the result registers to take that
// count exactly at the end of every period of 256 (CT = 00) or 65536
// (CT = 01) cycles, and to hold it in between. The selected output (CO) is
// changed between periods.
module tb_cc_counter;
  import cc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] outs;
  logic [3:0] co;
  ct_e ct;
  logic [23:0] result;
  logic period_end;
  int checks = 0, failures = 0;
  int edges, pulses, period, periods_seen;
  logic prev_sel;
  logic [23:0] exp_result;

  cc_counter dut (.clk, .rst_n, .outs, .co, .ct, .result, .period_end);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    outs = '0; co = 4'd3; ct = CT_2P8;
    edges = 0; pulses = 0; prev_sel = 1'b0; exp_result = '0; periods_seen = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      ct = (run != 0) ? CT_2P16 : CT_2P8;
      period = (run != 0) ? 65536 : 256;
      for (int pr = 0; pr < ((run != 0) ? 2 : 6); pr++) begin
        co = 4'($urandom_range(0, 15));
        for (int n = 0; n < period; n++) begin
          @(negedge clk);
          outs = 16'($urandom) & 16'($urandom);
          @(posedge clk);
          edges++;
          if (outs[co] && !prev_sel) pulses++;
          prev_sel = outs[co];
          if (n == period - 1) begin
            exp_result = 24'(pulses);
            pulses = 0;
            periods_seen++;
          end
          #1;
          checks++;
          if (result !== exp_result) begin
            failures++;
            if (failures < 10) $display("edge %0d: result=%0d exp=%0d", edges, result, exp_result);
          end
        end
      end
    end
    if (periods_seen != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
