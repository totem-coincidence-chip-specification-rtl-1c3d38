// tb_cc_lvds_rx: checks the receiver model's digital output for the four
// line states and its nominal termination for every B setting against
// the chip's resistor table. It also checks that the table agrees, within
// 1.5 ohm, with the resistor network it describes: R1 in parallel with B
// equal resistors, with R1 = 126 ohm and R = 1255 ohm.
module tb_cc_lvds_rx;
  logic in_p, in_n, out;
  logic [2:0] b;
  int checks = 0, failures = 0;
  int table_ohm [8] = '{126, 115, 105, 97, 90, 84, 79, 74};

  cc_lvds_rx dut (.in_p, .in_n, .b, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = 3'd0;
    for (int s = 0; s < 4; s++) begin
      {in_p, in_n} = 2'(s);
      #1;
      checks++;
      if (out !== (in_p && !in_n)) failures++;
    end
    for (int k = 0; k < 8; k++) begin
      real r;
      b = 3'(k);
      #1;
      checks++;
      if (int'(dut.r_term_ohm) != table_ohm[k]) begin
        failures++;
        $display("B=%0d: %0d ohm expected %0d", k, dut.r_term_ohm, table_ohm[k]);
      end
      r = 1.0 / (1.0 / 126.0 + real'(k) / 1255.0);
      checks++;
      if (r - real'(table_ohm[k]) > 1.5 || real'(table_ohm[k]) - r > 1.5) begin
        failures++;
        $display("B=%0d: network gives %f ohm", k, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
