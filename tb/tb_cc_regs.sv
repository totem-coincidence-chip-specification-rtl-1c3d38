// tb_cc_regs: checks the control register bank: reset values, read-back
// of every writable register, the read-only counter registers, the
// indirect registers behind the pointer (register 14) and data window
// (register 15), and the placement of every field in the decoded
// configuration, including all 80 mask bits.
module tb_cc_regs;
  import cc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en;
  logic [3:0] addr;
  logic [7:0] wdata, rdata;
  logic [23:0] counter;
  cc_cfg_t cfg;
  int checks = 0, failures = 0;

  cc_regs dut (.clk, .rst_n, .wr_en, .addr, .wdata, .rdata, .counter, .cfg);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [3:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; wr_en = 1'b1;
    @(negedge clk); wr_en = 1'b0;
  endtask

  task automatic expect_rd(input logic [3:0] a, input logic [7:0] e, input string what);
    addr = a; #1;
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("%s: reg %0d read %h expected %h", what, a, rdata, e);
    end
  endtask

  task automatic expect_eq(input logic [127:0] got, input logic [127:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("%s: got %h expected %h", what, got, e);
    end
  endtask

  logic [7:0] shadow [16];
  logic [7:0] ishadow [8];

  initial begin
    wr_en = 1'b0; addr = '0; wdata = '0; counter = 24'hA5_5A_C3;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // reset values
    for (int a = 0; a < 16; a++) begin
      logic [7:0] e;
      e = (a == 2) ? 8'hF0 : (a >= 10 && a <= 13) ? 8'hFF : 8'h00;
      if (a == 7) e = 8'hC3;
      if (a == 8) e = 8'h5A;
      if (a == 9) e = 8'hA5;
      if (a == 15) e = 8'hFF;   // pointer 0 -> Mask(39:32)
      expect_rd(4'(a), e, "reset");
    end
    expect_eq(128'(cfg.mask), {48'h0, 80'hFFFF_FFFF_FFFF_FFFF_FFFF}, "reset mask");
    expect_eq(128'(cfg.z), 128'hF, "reset Z");
    // direct registers
    for (int a = 0; a < 15; a++) begin
      shadow[a] = 8'($urandom);
      if (a == 14) shadow[a] = 8'h00;
      if (a < 7 || a > 9) wr(4'(a), shadow[a]);
    end
    for (int a = 0; a < 15; a++)
      if (a < 7 || a > 9) expect_rd(4'(a), shadow[a], "direct");
    // counter registers are read only
    wr(4'd7, 8'h00);
    expect_rd(4'd7, 8'hC3, "read-only");
    // indirect registers
    for (int i = 0; i < 8; i++) begin
      ishadow[i] = 8'($urandom);
      wr(4'd14, 8'(i));
      wr(4'd15, ishadow[i]);
    end
    for (int i = 0; i < 8; i++) begin
      wr(4'd14, 8'(i));
      expect_rd(4'd15, ishadow[i], "indirect");
    end
    shadow[14] = 8'd7;
    // field placement
    expect_eq(128'(cfg.ct),    128'(shadow[0][5:4]), "CT");
    expect_eq(128'(cfg.sync2), 128'(shadow[0][2]),   "Sync2");
    expect_eq(128'(cfg.sync),  128'(shadow[0][1]),   "Sync");
    expect_eq(128'(cfg.s),     128'(shadow[0][0]),   "S");
    expect_eq(128'(cfg.ov),    128'(shadow[1][7:5]), "OV");
    expect_eq(128'(cfg.np),    128'(shadow[1][4]),   "NP");
    expect_eq(128'(cfg.v),     128'(shadow[1][3:0]), "V");
    expect_eq(128'(cfg.z),     128'(shadow[2][7:4]), "Z");
    expect_eq(128'(cfg.w),     128'(shadow[2][3:0]), "W");
    expect_eq(128'(cfg.ao),    128'(shadow[3][7:6]), "AO");
    expect_eq(128'(cfg.lo),    128'(shadow[3][5:4]), "LO");
    expect_eq(128'(cfg.li),    128'(shadow[3][3]),   "LI");
    expect_eq(128'(cfg.o2),    128'(shadow[3][2:0]), "O2");
    expect_eq(128'(cfg.cl),    128'(shadow[4][7]),   "CL");
    expect_eq(128'(cfg.co),    128'(shadow[4][3:0]), "CO");
    expect_eq(128'(cfg.chip_id), 128'({shadow[6], shadow[5]}), "Chip ID");
    expect_eq(128'(cfg.b),     128'(ishadow[6][2:0]), "B");
    for (int n = 0; n < 80; n++) begin
      logic e;
      e = (n < 32) ? shadow[10 + n / 8][n % 8] : ishadow[(n - 32) / 8][n % 8];
      expect_eq(128'(cfg.mask[n]), 128'(e), "mask bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
