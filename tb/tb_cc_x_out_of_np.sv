// tb_cc_x_out_of_np: checks the X-out-of-NP majority for every threshold
// 0..15 with random plane hits: a coordinate fires when at least thr
// planes are on, so thresholds above 10 never fire.
module tb_cc_x_out_of_np;
  logic [15:0][9:0] hits;
  logic [3:0] thr;
  logic [15:0] coinc;
  int checks = 0, failures = 0;

  cc_x_out_of_np dut (.hits, .thr, .coinc);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      thr = 4'(t);
      repeat (40) begin
        for (int c = 0; c < 16; c++) hits[c] = 10'($urandom) & 10'($urandom | (($urandom_range(0,1) != 0) ? 32'h3ff : 0));
        #1;
        for (int c = 0; c < 16; c++) begin
          int n;
          n = 0;
          for (int p = 0; p < 10; p++) if (hits[c][p]) n++;
          checks++;
          if (coinc[c] !== (n >= t)) begin
            failures++;
            $display("thr=%0d c=%0d n=%0d got=%0d", t, c, n, coinc[c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
