// tb_cc_clock_path: checks that the received clock (from either input) is
// propagated unchanged and that the evaluation clock is inverted when
// CL = 1, by counting the evaluation clock's rising edges that coincide
// with rising and with falling edges of the input clock.
module tb_cc_clock_path;
  logic clk_cmos_in, clk_lvds_in, cl, clk_out, clk_eval;
  int checks = 0, failures = 0;
  int eval_on_rise, eval_on_fall;

  cc_clock_path dut (.clk_cmos_in, .clk_lvds_in, .cl, .clk_out, .clk_eval);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic use_lvds, input logic c);
    cl = c;
    clk_cmos_in = 1'b0; clk_lvds_in = 1'b0;
    eval_on_rise = 0; eval_on_fall = 0;
    #10;
    for (int n = 0; n < 20; n++) begin
      logic e0;
      e0 = clk_eval;
      if (use_lvds) clk_lvds_in = 1'b1; else clk_cmos_in = 1'b1;
      #1;
      if (!e0 && clk_eval) eval_on_rise++;
      checks++;
      if (clk_out !== 1'b1) failures++;
      #4;
      e0 = clk_eval;
      if (use_lvds) clk_lvds_in = 1'b0; else clk_cmos_in = 1'b0;
      #1;
      if (!e0 && clk_eval) eval_on_fall++;
      checks++;
      if (clk_out !== 1'b0) failures++;
      #4;
    end
    checks++;
    if (c ? (eval_on_fall != 20 || eval_on_rise != 0) : (eval_on_rise != 20 || eval_on_fall != 0)) begin
      failures++;
      $display("cl=%0d lvds=%0d: eval edges on rise %0d, on fall %0d", c, use_lvds, eval_on_rise, eval_on_fall);
    end
  endtask

  initial begin
    run(1'b0, 1'b0);
    run(1'b0, 1'b1);
    run(1'b1, 1'b0);
    run(1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
