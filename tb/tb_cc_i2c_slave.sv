// tb_cc_i2c_slave: drives the I2C slave with a bit-level master model on
// an open-drain bus and checks, through the register bank behind it:
// acknowledged writes that reach the right register, read-back of the
// written values, a read of two bytes with a master ACK in between, and a
// transfer to another chip address that must be ignored (no ACK, no write).
// SCL runs 20 times slower than the chip clock.
module tb_cc_i2c_slave;
  import cc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] chip_add = 3'b101;
  logic scl, sda_m, sda_oe, sda;
  logic reg_wr;
  logic [3:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;
  cc_cfg_t cfg;
  int checks = 0, failures = 0;
  localparam int Q = 50;   // quarter SCL period, in time units

  assign sda = sda_m & ~sda_oe;

  cc_i2c_slave dut (.clk, .rst_n, .chip_add, .scl, .sda, .sda_oe,
                    .reg_wr, .reg_addr, .reg_wdata, .reg_rdata);
  cc_regs u_regs (.clk, .rst_n, .wr_en (reg_wr), .addr (reg_addr), .wdata (reg_wdata),
                  .rdata (reg_rdata), .counter (24'h123456), .cfg);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start();
    sda_m = 1'b1; scl = 1'b1; #(Q);
    sda_m = 1'b0; #(Q);
    scl = 1'b0; #(Q);
  endtask

  task automatic stop();
    sda_m = 1'b0; #(Q);
    scl = 1'b1; #(Q);
    sda_m = 1'b1; #(2*Q);
  endtask

  task automatic send_bit(input logic b);
    sda_m = b; #(Q);
    scl = 1'b1; #(2*Q);
    scl = 1'b0; #(Q);
  endtask

  task automatic recv_bit(output logic b);
    sda_m = 1'b1; #(Q);
    scl = 1'b1; #(Q);
    b = sda; #(Q);
    scl = 1'b0; #(Q);
  endtask

  task automatic send_byte(input logic [7:0] d, output logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) send_bit(d[i]);
    recv_bit(b);
    ack = ~b;
  endtask

  task automatic recv_byte(output logic [7:0] d, input logic ack);
    for (int i = 7; i >= 0; i--) recv_bit(d[i]);
    send_bit(~ack);
  endtask

  task automatic write_reg(input logic [2:0] ca, input logic [3:0] r, input logic [7:0] d,
                           input logic expect_ack);
    logic a1, a2;
    start();
    send_byte({ca, r, 1'b0}, a1);
    if (a1) send_byte(d, a2);
    stop();
    checks++;
    if (a1 !== expect_ack) begin
      failures++;
      $display("write reg %0d: address ack %0d expected %0d", r, a1, expect_ack);
    end
    if (a1) begin
      checks++;
      if (!a2) begin failures++; $display("write reg %0d: data not acknowledged", r); end
    end
  endtask

  task automatic read_reg(input logic [3:0] r, input int n, output logic [7:0] d [2]);
    logic a;
    start();
    send_byte({chip_add, r, 1'b1}, a);
    checks++;
    if (!a) begin failures++; $display("read reg %0d: address not acknowledged", r); end
    for (int i = 0; i < n; i++) recv_byte(d[i], i < n - 1);
    stop();
  endtask

  initial begin
    logic [7:0] vals [16];
    logic [7:0] d [2];
    scl = 1'b1; sda_m = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #(4*Q);
    for (int r = 0; r < 7; r++) begin
      vals[r] = 8'($urandom);
      write_reg(chip_add, 4'(r), vals[r], 1'b1);
    end
    for (int r = 0; r < 7; r++) begin
      read_reg(4'(r), 1, d);
      checks++;
      if (d[0] !== vals[r]) begin
        failures++;
        $display("read reg %0d: %h expected %h", r, d[0], vals[r]);
      end
    end
    // direct check that the write landed in the register bank
    checks++;
    if (cfg.chip_id !== {vals[6], vals[5]}) begin
      failures++;
      $display("chip id %h expected %h", cfg.chip_id, {vals[6], vals[5]});
    end
    // two-byte read of a counter register
    read_reg(4'd8, 2, d);
    checks++;
    if (d[0] !== 8'h34 || d[1] !== 8'h34) begin
      failures++;
      $display("double read %h %h", d[0], d[1]);
    end
    // another chip: no acknowledge, no write
    write_reg(3'b010, 4'd1, ~vals[1], 1'b0);
    read_reg(4'd1, 1, d);
    checks++;
    if (d[0] !== vals[1]) begin
      failures++;
      $display("foreign write changed reg 1: %h", d[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
