// tb_cc_input_group: checks the mapping of inputs to planes and
// coordinates against the input numbering used in the chip's tables
// (input n, 1-based): with NP = 1, input n is plane (n-1)/16, coordinate
// (n-1)%16; with NP = 0, input n is plane (n-1)/8, coordinate (n-1)%8, and
// coordinates 9..16 repeat 1..8. Walking-one and random patterns are used.
module tb_cc_input_group;
  logic [79:0] in;
  logic np;
  logic [15:0][9:0] hits;
  int checks = 0, failures = 0;

  cc_input_group dut (.in, .np, .hits);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [15:0][9:0] exp;
    exp = '0;
    for (int n = 1; n <= 80; n++) begin
      if (np) exp[(n-1)%16][(n-1)/16] = in[n-1];
      else begin
        exp[(n-1)%8][(n-1)/8]     = in[n-1];
        exp[(n-1)%8 + 8][(n-1)/8] = in[n-1];
      end
    end
    checks++;
    if (hits !== exp) begin
      failures++;
      $display("np=%0d in=%h hits=%h exp=%h", np, in, hits, exp);
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      np = 1'(m);
      for (int n = 0; n < 80; n++) begin
        in = '0; in[n] = 1'b1;
        #1 check();
      end
      repeat (50) begin
        in = 80'({$urandom, $urandom, $urandom});
        #1 check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
