// tb_cc_or2: checks the OR 2 grouping for O2 = 0..4: the first output of
// each group of 2^O2 carries the OR of the group and is enabled, all other
// outputs are low and disabled (powered down).
module tb_cc_or2;
  logic [15:0] in, out, out_en;
  logic [2:0] o2;
  int checks = 0, failures = 0;

  cc_or2 dut (.in, .o2, .out, .out_en);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g <= 4; g++) begin
      o2 = 3'(g);
      repeat (40) begin
        int size;
        in = 16'($urandom) & 16'($urandom) & 16'($urandom);
        #1;
        size = 1 << g;
        for (int k = 0; k < 16; k++) begin
          logic e, en;
          en = (k / size) * size == k;
          e = 1'b0;
          if (en) for (int j = k; j < k + size; j++) e |= in[j];
          checks++;
          if (out[k] !== e || out_en[k] !== en) begin
            failures++;
            $display("o2=%0d k=%0d in=%h out=%b en=%b", g, k, in, out[k], out_en[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
