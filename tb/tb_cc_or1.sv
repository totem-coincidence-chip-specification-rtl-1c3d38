// tb_cc_or1: checks the OR 1 neighbour widening. For every plane and
// coordinate the expected value is the OR of the hits within OV
// coordinates on the same plane, clipped at the edges of the 16 (NP = 1)
// or 8 (NP = 0) coordinates. Includes the single-hit case: with OV = 1 a
// lone hit on coordinate c lights c-1, c and c+1.
module tb_cc_or1;
  logic [15:0][9:0] hits, ored;
  logic np;
  logic [2:0] ov;
  int checks = 0, failures = 0;

  cc_or1 dut (.hits, .np, .ov, .ored);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [15:0][9:0] exp;
    int nc, cc;
    nc = np ? 16 : 8;
    for (int c = 0; c < 16; c++)
      for (int p = 0; p < 10; p++) begin
        cc = c % nc;
        exp[c][p] = 1'b0;
        for (int k = cc - int'(ov); k <= cc + int'(ov); k++)
          if (k >= 0 && k < nc) exp[c][p] |= hits[k][p];
      end
    checks++;
    if (ored !== exp) begin
      failures++;
      $display("np=%0d ov=%0d hits=%h ored=%h exp=%h", np, ov, hits, ored, exp);
    end
  endtask

  initial begin
    // single hit, OV = 1, 16 coordinates, plane 2, coordinate 5
    np = 1'b1; ov = 3'd1; hits = '0; hits[5][2] = 1'b1;
    #1 checks++;
    if (ored[4][2] !== 1'b1 || ored[5][2] !== 1'b1 || ored[6][2] !== 1'b1 ||
        ored[3][2] !== 1'b0 || ored[7][2] !== 1'b0 || ored[5][1] !== 1'b0) failures++;
    for (int m = 0; m < 2; m++)
      for (int o = 0; o < 8; o++) begin
        np = 1'(m); ov = 3'(o);
        repeat (30) begin
          for (int c = 0; c < 16; c++)
            for (int p = 0; p < 10; p++) hits[c][p] = ($urandom_range(0, 5) == 0);
          if (!np) for (int c = 8; c < 16; c++) hits[c] = hits[c-8];
          #1 check();
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
