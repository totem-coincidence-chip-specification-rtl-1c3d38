// tb_cc_top: end-to-end test of the whole coincidence chip at its default
// size (80 inputs, 16 outputs), programmed only through its I2C pins.
//
// Part 1 replays the chip's published test vectors that come with a full
// register setting (the W out of NP, And/Or, stretcher, NP, falling-edge,
// Z out of 16 and mask tests). The inputs are switched on between clock
// edges; the outputs must not move at the non-evaluation edge, must show
// the listed values right after the next evaluation edge, must hold them
// for 1 + S cycles in monostable mode and then fall back.
// Part 2 programs random settings (bypass synchronisation, random NP, OV,
// V, W, Z, AO, LO, LI, O2 and masks) and compares every output pin with a
// reference model of the coincidence chain written from the register
// descriptions, for random input patterns.
// Part 3 measures a known pulse rate with the counter and reads the
// result back over I2C, and checks the clock outputs and the LVDS clock
// input.
// Each mechanism is counted; one that never occurred counts as a failure.
module tb_cc_top;
  logic [79:0] in_bits;
  logic [79:0] in_p, in_n;
  logic clk = 1'b0;
  logic clk_lvds_in_p = 1'b0, clk_lvds_in_n = 1'b1;
  logic clk_cmos_out, clk_lvds_out_p, clk_lvds_out_n;
  logic rst_n = 1'b0;
  logic [2:0] chip_add = 3'b011;
  logic scl = 1'b1, sda_m = 1'b1, sda, sda_oe;
  logic [15:0] out_p, out_n;
  logic use_lvds_clk = 1'b0;
  int checks = 0, failures = 0;
  localparam int HALF = 5;     // chip clock half period
  localparam int Q = 60;       // quarter SCL period

  // mechanism counters
  typedef enum int {
    M_BYPASS, M_MONO, M_STRETCH_ONLY, M_STRETCH, M_NP5, M_NP10, M_OR1, M_V, M_W,
    M_AO_AND, M_AO_OR, M_AO_V, M_AO_W, M_ZVETO, M_ZREQ, M_LO_INV, M_O2_GROUP,
    M_POWER_DOWN, M_MASK, M_LI, M_CL_FALL, M_COUNTER, M_I2C_READ, M_LVDS_CLK, M_NUM
  } mech_e;
  int mech [M_NUM];

  assign in_p = in_bits;
  assign in_n = ~in_bits;
  assign sda = sda_m & ~sda_oe;

  cc_top dut (
    .in_p, .in_n,
    .clk_cmos_in   (use_lvds_clk ? 1'b0 : clk),
    .clk_lvds_in_p (use_lvds_clk ? clk : 1'b0),
    .clk_lvds_in_n (use_lvds_clk ? ~clk : 1'b1),
    .clk_cmos_out, .clk_lvds_out_p, .clk_lvds_out_n,
    .rst_n, .chip_add, .scl, .sda_in (sda), .sda_oe, .out_p, .out_n
  );

  always #(HALF) clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- register image ----------------
  logic [7:0] r [16];
  logic [79:0] mask;
  logic [2:0] bterm;

  // ---------------- I2C master ----------------
  task automatic i2c_start();
    sda_m = 1'b1; scl = 1'b1; #(Q); sda_m = 1'b0; #(Q); scl = 1'b0; #(Q);
  endtask
  task automatic i2c_stop();
    sda_m = 1'b0; #(Q); scl = 1'b1; #(Q); sda_m = 1'b1; #(2*Q);
  endtask
  task automatic i2c_bit_out(input logic b);
    sda_m = b; #(Q); scl = 1'b1; #(2*Q); scl = 1'b0; #(Q);
  endtask
  task automatic i2c_bit_in(output logic b);
    sda_m = 1'b1; #(Q); scl = 1'b1; #(Q); b = sda; #(Q); scl = 1'b0; #(Q);
  endtask
  task automatic i2c_write(input logic [3:0] a, input logic [7:0] d);
    logic nack1, nack2;
    i2c_start();
    for (int i = 7; i >= 1; i--) i2c_bit_out(i >= 5 ? chip_add[i-5] : a[i-1]);
    i2c_bit_out(1'b0);
    i2c_bit_in(nack1);
    for (int i = 7; i >= 0; i--) i2c_bit_out(d[i]);
    i2c_bit_in(nack2);
    i2c_stop();
    checks++;
    if (nack1 || nack2) begin failures++; $display("I2C write %0d not acknowledged", a); end
  endtask
  task automatic i2c_read(input logic [3:0] a, output logic [7:0] d);
    logic nack;
    i2c_start();
    for (int i = 7; i >= 1; i--) i2c_bit_out(i >= 5 ? chip_add[i-5] : a[i-1]);
    i2c_bit_out(1'b1);
    i2c_bit_in(nack);
    for (int i = 7; i >= 0; i--) i2c_bit_in(d[i]);
    i2c_bit_out(1'b1);
    i2c_stop();
    checks++;
    if (nack) begin failures++; $display("I2C read %0d not acknowledged", a); end
    mech[M_I2C_READ]++;
  endtask

  task automatic program_all();
    for (int a = 0; a < 5; a++) i2c_write(4'(a), r[a]);
    for (int a = 0; a < 4; a++) i2c_write(4'(10 + a), mask[8*a +: 8]);
    for (int i = 0; i < 6; i++) begin
      i2c_write(4'd14, 8'(i));
      i2c_write(4'd15, mask[32 + 8*i +: 8]);
    end
    i2c_write(4'd14, 8'd6);
    i2c_write(4'd15, {5'b0, bterm});
  endtask

  // ---------------- reference model ----------------
  // Output pins for a vector of conditioned (synchronised) inputs s,
  // using the register image r. Input n (0-based) is plane n / ncoord,
  // coordinate n % ncoord.
  task automatic model(input logic [79:0] s, output logic [15:0] o, output logic [15:0] en,
                       input bit count_mech);
    int ncoord, nplane, ov, v, w, z, active, g, o2;
    logic [1:0] ao, lo;
    logic [15:0] a, l, vc, wc;
    logic zf;
    ov = int'(r[1][7:5]); v = int'(r[1][3:0]); w = int'(r[2][3:0]); z = int'(r[2][7:4]);
    ao = r[3][7:6]; lo = r[3][5:4]; o2 = int'(r[3][2:0]);
    ncoord = r[1][4] ? 16 : 8;
    nplane = r[1][4] ? 5 : 10;
    for (int c = 0; c < ncoord; c++) begin
      int vn, wn;
      vn = 0; wn = 0;
      for (int p = 0; p < nplane; p++) begin
        bit any;
        vn += s[p*ncoord + c];
        any = 0;
        for (int k = 0; k < ncoord; k++)
          if (k >= c - ov && k <= c + ov && s[p*ncoord + k]) any = 1;
        wn += any;
      end
      vc[c] = vn >= v;
      wc[c] = wn >= w;
      case (ao)
        2'b00: a[c] = vc[c] & wc[c];
        2'b01: a[c] = vc[c] | wc[c];
        2'b10: a[c] = vc[c];
        default: a[c] = wc[c];
      endcase
      if (count_mech && wc[c] && vn < w && ov > 0) mech[M_OR1]++;
    end
    if (ncoord == 8) for (int c = 8; c < 16; c++) begin a[c] = a[c-8]; vc[c] = vc[c-8]; wc[c] = wc[c-8]; end
    active = 0;
    for (int c = 0; c < ncoord; c++) active += a[c];
    zf = active > z;
    for (int c = 0; c < 16; c++)
      case (lo)
        2'b00: l[c] = a[c] & ~zf;
        2'b01: l[c] = a[c] & zf;
        2'b10: l[c] = ~(a[c] & ~zf);
        default: l[c] = ~(a[c] & zf);
      endcase
    g = (o2 > 4) ? 16 : (1 << o2);
    for (int c = 0; c < 16; c++) begin
      en[c] = (c % g) == 0;
      o[c] = 1'b0;
      if (en[c]) for (int k = c; k < c + g; k++) o[c] |= l[k];
    end
    if (count_mech) begin
      if (vc != wc && a != 0) begin
        if (ao == 2'b10 && vc != 0) mech[M_V]++;
        if (ao == 2'b11 && wc != 0) mech[M_W]++;
      end
      if (a != 0 && zf && lo == 2'b00) mech[M_ZVETO]++;
      if (a != 0 && zf && lo == 2'b01) mech[M_ZREQ]++;
      if (lo[1]) mech[M_LO_INV]++;
      if (g > 1 && o != 0) mech[M_O2_GROUP]++;
      if (en != '1) mech[M_POWER_DOWN]++;
      if (vc != wc) case (ao)
        2'b00: mech[M_AO_AND]++;
        2'b01: mech[M_AO_OR]++;
        2'b10: mech[M_AO_V]++;
        default: mech[M_AO_W]++;
      endcase
      if (ncoord == 16) mech[M_NP5]++; else mech[M_NP10]++;
    end
  endtask

  function automatic logic [79:0] condition(logic [79:0] i);
    return (r[3][3] ? ~i : i) & ~mask;
  endfunction

  task automatic check_pins(input logic [15:0] eo, input logic [15:0] een, input string what);
    logic [15:0] got_en;
    got_en = out_p | out_n;
    checks++;
    if (out_p !== (eo & een) || got_en !== een || (out_n & out_p) !== '0) begin
      failures++;
      if (failures < 20)
        $display("%s: out_p=%h out_n=%h expected out=%h enabled=%h", what, out_p, out_n, eo, een);
    end
  endtask

  // evaluation edge helpers
  task automatic wait_eval();
    if (r[4][7]) @(negedge clk); else @(posedge clk);
  endtask
  task automatic wait_other();
    if (r[4][7]) @(posedge clk); else @(negedge clk);
  endtask

  // ---------------- published vectors ----------------
  task automatic vector(input string name, input logic [7:0] r0, r1, r2, r3, r4,
                        input logic [79:0] msk, input logic [79:0] vin, input logic [15:0] exp);
    logic [15:0] idle_o, idle_en, o, en;
    int s_len;
    r[0] = r0; r[1] = r1; r[2] = r2; r[3] = r3; r[4] = r4; mask = msk;
    in_bits = '0;
    program_all();
    repeat (4) @(posedge clk);
    model(condition('0) & '0, idle_o, idle_en, 0);
    // apply inputs right after an evaluation edge
    wait_eval(); #1 in_bits = vin;
    wait_other(); #1 check_pins(idle_o, idle_en, {name, " before evaluation edge"});
    wait_eval(); #1;
    model(condition(vin), o, en, 1);
    check_pins(o, en, {name, " after evaluation edge"});
    checks++;
    if (o !== exp) begin
      failures++;
      $display("%s: model %h differs from published %h", name, o, exp);
    end
    if (r[4][7]) mech[M_CL_FALL]++;
    if ((vin & msk) != 0) mech[M_MASK]++;
    if (r0[2:1] == 2'b01) begin
      // monostable: pulse of 1 + S cycles
      s_len = 1 + r0[0];
      for (int k = 1; k < s_len; k++) begin
        wait_eval(); #1 check_pins(o, en, {name, " stretched pulse"});
        mech[M_STRETCH]++;
      end
      wait_eval(); #1 check_pins(idle_o, idle_en, {name, " end of pulse"});
      if (o != idle_o) mech[M_MONO]++;
    end
    in_bits = '0;
  endtask

  // stretcher without monostable: a synchronous one-cycle input pulse
  // becomes 1 + S cycles long
  task automatic stretch_only_test();
    logic [15:0] o1, en1, o0, en0;
    r[0] = 8'h01;               // Sync2 = 0, Sync = 0, S = 1
    r[1] = 8'h11;               // NP = 1 (16 coordinates), V = 1
    r[2] = 8'hF0;               // Z = 15, W = 0
    r[3] = 8'h80;               // V only
    r[4] = 8'h00;
    mask = '0;
    in_bits = '0;
    program_all();
    repeat (3) @(posedge clk);
    model('0, o0, en0, 0);
    model(80'h1, o1, en1, 0);
    @(negedge clk) in_bits = 80'h1;
    #1 check_pins(o1, en1, "stretch only, input high");
    @(negedge clk) in_bits = '0;
    #1 check_pins(o1, en1, "stretch only, held");
    @(negedge clk);
    #1 check_pins(o0, en0, "stretch only, released");
    mech[M_STRETCH_ONLY]++;
  endtask

  // ---------------- random settings in bypass mode ----------------
  task automatic random_test(input int nconf, input int nvec);
    logic [15:0] o, en;
    for (int k = 0; k < nconf; k++) begin
      r[0] = 8'h04 | 8'($urandom_range(0, 1));       // bypass
      r[1] = 8'($urandom);
      r[1][3:0] = 4'($urandom_range(0, 6));
      r[2] = {4'($urandom_range(0, 15)), 4'($urandom_range(0, 6))};
      r[3] = 8'($urandom);
      r[3][2:0] = 3'($urandom_range(0, 4));
      r[4] = 8'h00;
      mask = '0;
      if ($urandom_range(0, 2) == 0)
        for (int n = 0; n < 80; n++) mask[n] = ($urandom_range(0, 9) == 0);
      bterm = 3'($urandom);
      program_all();
      for (int t = 0; t < nvec; t++) begin
        @(negedge clk);
        for (int n = 0; n < 80; n++) in_bits[n] = ($urandom_range(0, 99) < 15 + 5 * (t % 8));
        #1;
        model(condition(in_bits), o, en, 1);
        check_pins(o, en, "random");
        mech[M_BYPASS]++;
        if (r[3][3]) mech[M_LI]++;
        if ((in_bits & mask) != 0) mech[M_MASK]++;
      end
    end
  endtask

  // ---------------- counter ----------------
  task automatic counter_test();
    logic [7:0] b0, b1, b2;
    r[0] = 8'h04;               // bypass, CT = 00 (256 cycles)
    r[1] = 8'h11;               // NP = 1, V = 1
    r[2] = 8'hF0;
    r[3] = 8'h80;               // V only, no grouping
    r[4] = 8'h05;               // count output 6 (CO = 5)
    mask = '0;
    in_bits = '0;
    program_all();
    // 8 pulses per 256 cycles on input 6 (coordinate 5 of plane 1)
    fork
      begin : gen
        forever begin
          @(negedge clk) in_bits[5] = 1'b1;
          @(negedge clk) in_bits[5] = 1'b0;
          repeat (30) @(negedge clk);
        end
      end
      begin
        repeat (600) @(posedge clk);
        i2c_read(4'd7, b0);
        i2c_read(4'd8, b1);
        i2c_read(4'd9, b2);
        disable gen;
      end
    join
    checks++;
    if ({b2, b1, b0} !== 24'd8) begin
      failures++;
      $display("counter read %0d, expected 8", {b2, b1, b0});
    end else mech[M_COUNTER]++;
    in_bits = '0;
  endtask

  // ---------------- clock outputs ----------------
  task automatic clock_test();
    for (int k = 0; k < 8; k++) begin
      #(HALF / 2 + 1);
      checks++;
      if (clk_cmos_out !== clk || clk_lvds_out_p !== clk || clk_lvds_out_n !== ~clk) begin
        failures++;
        $display("clock outputs do not follow the clock input (lvds=%0d)", use_lvds_clk);
      end
      @(clk);
    end
  endtask

  initial begin
    logic [15:0] o, en;
    logic [7:0] d;
    for (int m = 0; m < M_NUM; m++) mech[m] = 0;
    in_bits = '0;
    bterm = 3'd0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // reset state: all inputs masked, outputs low
    r[0] = 0; r[1] = 0; r[2] = 8'hF0; r[3] = 0; r[4] = 0; mask = '1;
    repeat (3) @(posedge clk);
    model('0, o, en, 0);
    check_pins(o, en, "after reset");
    i2c_read(4'd2, d);
    checks++;
    if (d !== 8'hF0) begin failures++; $display("register 2 resets to %h", d); end

    // Part 1: published vectors
    vector("W out of NP, And/Or, stretcher", 8'h03, 8'h33, 8'hF3, 8'hC0, 8'h10, '0,
           {5{16'h88C8}}, 16'hDDFC);
    vector("W out of NP, NP",               8'h03, 8'h23, 8'hF6, 8'hC0, 8'h10, '0,
           {5{16'h88C8}}, 16'hDCDC);
    vector("And/Or, falling edge",          8'h03, 8'h53, 8'hF3, 8'h00, 8'hB0, '0,
           {20{4'hC}}, 16'hCCCC);
    vector("Z out of 16",                   8'h03, 8'h03, 8'h23, 8'h80, 8'h30, '0,
           {20{4'hC}}, 16'h0000);
    vector("mask",                          8'h03, 8'h03, 8'hF3, 8'h80, 8'h30, '1,
           {20{4'hC}}, 16'h0000);
    stretch_only_test();

    // Part 2: random settings
    random_test(60, 40);

    // Part 3: counter and clock
    counter_test();
    clock_test();
    use_lvds_clk = 1'b1;
    mech[M_LVDS_CLK]++;
    clock_test();
    // the chip still works from the LVDS clock
    counter_test();
    use_lvds_clk = 1'b0;

    for (int m = 0; m < M_NUM; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-15s happened %0d times", me.name(), mech[m]);
      if (mech[m] == 0) begin
        failures++;
        $display("mechanism %s never happened", me.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
