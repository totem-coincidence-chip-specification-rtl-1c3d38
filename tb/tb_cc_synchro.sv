// tb_cc_synchro: self-checking test of the synchronisation stage.
//
// All 80 channels get random inputs and random masks, while the polarity
// bit, the path mode ({Sync2, Sync}) and the stretch count S are swept.
// Inputs change between clock edges. The expected output is computed from
// the history of input samples taken at each rising edge:
//   bypass (10, 11): out = conditioned input now
//   stretch only (00): out = input now, or a sample in the last S edges
//   monostable (01): out = 1 if a 0-to-1 step between consecutive samples
//                    happened at one of the last S+1 edges
module tb_cc_synchro;
  localparam int N = 80;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in, mask, out;
  logic li, sync, sync2;
  logic [0:0] stretch;
  int checks = 0, failures = 0;
  int mono_pulses = 0;
  logic [N-1:0] hist [0:3];   // hist[0] = most recent sample

  cc_synchro dut (.clk, .rst_n, .in, .mask, .li, .sync, .sync2, .stretch, .out);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] cond(logic [N-1:0] i, logic [N-1:0] m, logic p);
    return (p ? ~i : i) & ~m;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) for (int k = 0; k < 4; k++) hist[k] <= '0;
    else begin
      hist[0] <= cond(in, mask, li);
      for (int k = 1; k < 4; k++) hist[k] <= hist[k-1];
    end
  end

  task automatic check_now();
    logic [N-1:0] exp, x;
    x = cond(in, mask, li);
    if (sync2) exp = x;
    else if (!sync) begin
      exp = x;
      for (int j = 0; j < int'(stretch); j++) exp |= hist[j];
    end else begin
      exp = '0;
      for (int j = 0; j <= int'(stretch); j++) exp |= hist[j] & ~hist[j+1];
    end
    checks++;
    if (sync && !sync2 && exp != '0) mono_pulses++;
    if (out !== exp) begin
      failures++;
      if (failures < 10) $display("mismatch mode=%b%b s=%0d out=%h exp=%h", sync2, sync, stretch, out, exp);
    end
  endtask

  initial begin
    in = '0; mask = '0; li = 1'b0; sync = 1'b1; sync2 = 1'b0; stretch = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 4; mode++) begin
      for (int s = 0; s < 2; s++) begin
        for (int p = 0; p < 2; p++) begin
          {sync2, sync} = 2'(mode);
          stretch = 1'(s);
          li = 1'(p);
          mask = 80'({$urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom});
          // let the history settle after a configuration change
          repeat (4) @(negedge clk);
          for (int n = 0; n < 60; n++) begin
            @(negedge clk);
            // slow random inputs, so that pulses of various lengths occur
            for (int k = 0; k < N; k++) if ($urandom_range(0, 2) == 0) in[k] = ~in[k];
            #1 check_now();
          end
        end
      end
    end
    if (mono_pulses == 0) begin
      failures++;
      $display("monostable path never produced a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
