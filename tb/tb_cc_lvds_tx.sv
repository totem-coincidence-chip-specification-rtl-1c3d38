// tb_cc_lvds_tx: checks the output driver model: complementary lines when
// enabled, both lines low when powered down.
module tb_cc_lvds_tx;
  logic d, en, out_p, out_n;
  int checks = 0, failures = 0;

  cc_lvds_tx dut (.d, .en, .out_p, .out_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 4; s++) begin
      {en, d} = 2'(s);
      #1;
      checks++;
      if (en ? (out_p !== d || out_n !== ~d) : (out_p !== 1'b0 || out_n !== 1'b0)) begin
        failures++;
        $display("en=%0d d=%0d -> p=%0d n=%0d", en, d, out_p, out_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
