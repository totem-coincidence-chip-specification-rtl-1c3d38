// tb_cc_cascade: two layers of chips reduce 400 trigger bits to 4.
//
// A large tracker is read by several chips whose outputs feed another chip.
// Here five first-layer chips (I2C addresses 0..4) each see 5 planes x 16
// sectors of one detector region (16-coordinate mode) and report, per
// sector, a track seen by at least 3 of the 5 planes (V = 3, And/Or = V
// only, no multiplicity cut). The second-layer chip (address 5) takes chip
// k's 16 outputs as its plane k, so with V = 1 it ORs the five regions
// sector by sector. It vetoes events with more than two active sectors
// (Z = 2, LO = "and not Z") and groups its outputs by four (O2 = 010), so
// only outputs 1, 5, 9 and 13 are active and the other twelve pairs are
// powered down.
//
// Timing: the second layer is clocked from the first chip's clock output
// and evaluates on the falling edge (CL = 1). A first-layer result that
// appears after a rising edge is thus taken half a cycle later, and the
// whole cascade answers within one and a half cycles of the hits being
// sampled. The bench checks the first layer right after the rising edge,
// that the second layer has not moved yet, and the second layer right after
// the following falling edge.
//
// Events are random: one or two tracks (any region, any sector), three or
// more tracks (vetoed), and noise of one or two planes in a sector (never
// a track). The expected outputs are derived from the event description
// alone. All settings are loaded over one shared I2C bus.
module tb_cc_cascade;
  localparam int NCHIP = 5;
  localparam int Q = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic scl = 1'b1, sda_m = 1'b1, sda;
  logic [NCHIP:0] oe;
  logic [79:0] hits [NCHIP];
  logic [15:0] l1_out [NCHIP];
  logic [15:0] l1_outn [NCHIP];
  logic [79:0] l2_in;
  logic [15:0] l2_out, l2_outn;
  logic [NCHIP-1:0] cko, ckp, ckn;
  logic l2_cko, l2_ckp, l2_ckn;
  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_veto = 0, n_noise = 0, n_same_group = 0;

  assign sda = sda_m & ~(|oe);

  for (genvar k = 0; k < NCHIP; k++) begin : g_l1
    cc_top u_l1 (
      .in_p (hits[k]), .in_n (~hits[k]),
      .clk_cmos_in (clk), .clk_lvds_in_p (1'b0), .clk_lvds_in_n (1'b1),
      .clk_cmos_out (cko[k]), .clk_lvds_out_p (ckp[k]), .clk_lvds_out_n (ckn[k]),
      .rst_n, .chip_add (3'(k)), .scl, .sda_in (sda), .sda_oe (oe[k]),
      .out_p (l1_out[k]), .out_n (l1_outn[k])
    );
    assign l2_in[16*k +: 16] = l1_out[k];
  end

  cc_top u_l2 (
    .in_p (l2_in), .in_n (~l2_in),
    .clk_cmos_in (cko[0]), .clk_lvds_in_p (1'b0), .clk_lvds_in_n (1'b1),
    .clk_cmos_out (l2_cko), .clk_lvds_out_p (l2_ckp), .clk_lvds_out_n (l2_ckn),
    .rst_n, .chip_add (3'(NCHIP)), .scl, .sda_in (sda), .sda_oe (oe[NCHIP]),
    .out_p (l2_out), .out_n (l2_outn)
  );

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bit_out(input logic b);
    sda_m = b; #(Q); scl = 1'b1; #(2*Q); scl = 1'b0; #(Q);
  endtask
  task automatic bit_in(output logic b);
    sda_m = 1'b1; #(Q); scl = 1'b1; #(Q); b = sda; #(Q); scl = 1'b0; #(Q);
  endtask
  task automatic write(input logic [2:0] ca, input logic [3:0] a, input logic [7:0] d);
    logic n1, n2;
    sda_m = 1'b1; scl = 1'b1; #(Q); sda_m = 1'b0; #(Q); scl = 1'b0; #(Q);
    for (int i = 6; i >= 0; i--) bit_out(i >= 4 ? ca[i-4] : a[i]);
    bit_out(1'b0);
    bit_in(n1);
    for (int i = 7; i >= 0; i--) bit_out(d[i]);
    bit_in(n2);
    sda_m = 1'b0; #(Q); scl = 1'b1; #(Q); sda_m = 1'b1; #(2*Q);
    checks++;
    if (n1 || n2) begin failures++; $display("chip %0d register %0d: no ACK", ca, a); end
  endtask

  task automatic unmask(input logic [2:0] ca);
    for (int a = 10; a <= 13; a++) write(ca, 4'(a), 8'h00);
    for (int i = 0; i < 6; i++) begin
      write(ca, 4'd14, 8'(i));
      write(ca, 4'd15, 8'h00);
    end
  endtask

  // one random event: hits per region, expected first-layer sectors per
  // region, expected second-layer pins
  task automatic make_event(input int kind, output logic [15:0] l1e [NCHIP],
                            output logic [15:0] l2e);
    logic [15:0] sect;
    int ntr;
    for (int k = 0; k < NCHIP; k++) begin hits[k] = '0; l1e[k] = '0; end
    ntr = (kind == 0) ? 1 : (kind == 1) ? 2 : (kind == 2) ? $urandom_range(3, 6) : 0;
    for (int t = 0; t < ntr; t++) begin
      int k, c, np;
      k = $urandom_range(0, NCHIP - 1);
      c = $urandom_range(0, 15);
      // each track takes a new sector so that the sector count is known
      while ((((l1e[0] | l1e[1] | l1e[2] | l1e[3] | l1e[4]) >> c) & 16'd1) != 0) c = (c + 1) % 16;
      np = $urandom_range(3, 5);
      for (int p = 0, put = 0; p < 5; p++)
        if (put < np && (($urandom_range(0, 1) != 0) || 5 - p <= np - put)) begin
          hits[k][16*p + c] = 1'b1; put++;
        end
      l1e[k][c] = 1'b1;
    end
    // noise: at most two planes in one sector of each region, away from tracks
    for (int k = 0; k < NCHIP; k++)
      if (kind == 3 || $urandom_range(0, 3) == 0) begin
        int c;
        c = $urandom_range(0, 15);
        if (!l1e[k][c]) begin
          hits[k][16*$urandom_range(0, 1) + c] = 1'b1;
          hits[k][16*$urandom_range(2, 4) + c] = $urandom_range(0, 1) != 0;
          n_noise++;
        end
      end
    sect = l1e[0] | l1e[1] | l1e[2] | l1e[3] | l1e[4];
    l2e = '0;
    if ($countones(sect) <= 2)
      for (int g = 0; g < 4; g++) l2e[4*g] = |sect[4*g +: 4];
    if ($countones(sect) == 2 && $countones(l2e) == 1) n_same_group++;
  endtask

  initial begin
    logic [15:0] l1e [NCHIP];
    logic [15:0] l2e;
    for (int k = 0; k < NCHIP; k++) hits[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NCHIP; k++) begin
      write(3'(k), 4'd0, 8'h02);                    // monostable, S = 0
      write(3'(k), 4'd1, 8'h13);                    // OV = 0, NP = 1, V = 3
      write(3'(k), 4'd2, 8'hF3);                    // Z = 15, W = 3
      write(3'(k), 4'd3, 8'h80);                    // V only, LO = 00, O2 = 0
      unmask(3'(k));
    end
    write(3'(NCHIP), 4'd0, 8'h02);                  // monostable, S = 0
    write(3'(NCHIP), 4'd1, 8'h11);                  // NP = 1, V = 1
    write(3'(NCHIP), 4'd2, 8'h21);                  // Z = 2, W = 1
    write(3'(NCHIP), 4'd3, 8'h82);                  // V only, LO = 00, O2 = groups of 4
    write(3'(NCHIP), 4'd4, 8'h80);                  // CL = 1: falling edge
    unmask(3'(NCHIP));

    for (int n = 0; n < 200; n++) begin
      int kind;
      kind = n % 4;
      @(negedge clk);
      make_event(kind, l1e, l2e);
      case (kind)
        0: n_single++;
        1: n_double++;
        2: n_veto++;
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      for (int k = 0; k < NCHIP; k++)
        if (l1_out[k] !== l1e[k]) begin
          failures++;
          if (failures < 10) $display("event %0d: region %0d gives %h, expected %h", n, k, l1_out[k], l1e[k]);
        end
      checks++;
      if (l2_out !== '0) begin
        failures++;
        $display("event %0d: second layer moved before its falling edge", n);
      end
      @(negedge clk); #1;
      checks++;
      if (l2_out !== l2e) begin
        failures++;
        if (failures < 10) $display("event %0d kind %0d: second layer %h, expected %h", n, kind, l2_out, l2e);
      end
      checks++;
      if ((l2_outn & ~16'h1111) !== '0 || (l2_outn & 16'h1111) !== (~l2e & 16'h1111)) begin
        failures++;
        $display("event %0d: powered-down pairs not held low", n);
      end
      // hits stay three cycles, then a gap so that every monostable re-arms
      repeat (2) @(negedge clk);
      for (int k = 0; k < NCHIP; k++) hits[k] = '0;
      repeat (3) @(negedge clk);
      #1;
      checks++;
      if (l2_out !== '0) begin
        failures++;
        $display("event %0d: second layer did not return to 0", n);
      end
    end
    $display("cascade: %0d inputs -> %0d chips -> 4 outputs; %0d single, %0d double (%0d in one group), %0d vetoed, %0d noise clusters",
             80 * NCHIP, NCHIP + 1, n_single, n_double, n_same_group, n_veto, n_noise);
    if (n_single == 0 || n_double == 0 || n_veto == 0 || n_noise == 0 || n_same_group == 0) begin
      failures++;
      $display("an event class never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
