// tb_cc_roman_pot: the Roman Pot use of the chip. One pot has 10 detector
// planes of 16 trigger sectors each, 5 planes per strip orientation (u and
// v). Two chips serve one pot, one per orientation, each in the
// 5-plane x 16-coordinate mode, so the pot's 160 trigger bits become 32.
// Both chips share one I2C bus and differ only in their address pins.
//
// Setting of both chips: monostable path with S = 0, V = 3 of 5 planes,
// OR 1 with OV = 1 and W = 3, And/Or = V and W, Z = 4 with LO = 00 (events
// with more than four active sectors are vetoed), no output grouping.
// Random events are generated: single tracks seen by 3 to 5 planes plus
// isolated noise hits, events with no track, and showers that light many
// sectors. The expected 32 output bits are worked out from the event
// description (the track sector alone, or nothing for a shower), not from
// a model of the logic. The outputs are checked right after the first
// clock edge following the hits, i.e. with one clock cycle of latency.
module tb_cc_roman_pot;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scl = 1'b1, sda_m = 1'b1, sda;
  logic oe_u, oe_v;
  logic [79:0] hit_u, hit_v;
  logic [15:0] out_u, out_v, outn_u, outn_v;
  logic unused_u0, unused_u1, unused_u2, unused_v0, unused_v1, unused_v2;
  int checks = 0, failures = 0;
  int n_track = 0, n_empty = 0, n_shower = 0, n_noise = 0;
  localparam int Q = 60;
  localparam logic [2:0] ADD_U = 3'd1, ADD_V = 3'd2;

  assign sda = sda_m & ~oe_u & ~oe_v;

  cc_top u_chip (
    .in_p (hit_u), .in_n (~hit_u),
    .clk_cmos_in (clk), .clk_lvds_in_p (1'b0), .clk_lvds_in_n (1'b1),
    .clk_cmos_out (unused_u0), .clk_lvds_out_p (unused_u1), .clk_lvds_out_n (unused_u2),
    .rst_n, .chip_add (ADD_U), .scl, .sda_in (sda), .sda_oe (oe_u),
    .out_p (out_u), .out_n (outn_u)
  );
  cc_top v_chip (
    .in_p (hit_v), .in_n (~hit_v),
    .clk_cmos_in (clk), .clk_lvds_in_p (1'b0), .clk_lvds_in_n (1'b1),
    .clk_cmos_out (unused_v0), .clk_lvds_out_p (unused_v1), .clk_lvds_out_n (unused_v2),
    .rst_n, .chip_add (ADD_V), .scl, .sda_in (sda), .sda_oe (oe_v),
    .out_p (out_v), .out_n (outn_v)
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

  task automatic setup(input logic [2:0] ca);
    write(ca, 4'd0, 8'h02);                         // monostable, S = 0
    write(ca, 4'd1, 8'h33);                         // OV = 1, NP = 1, V = 3
    write(ca, 4'd2, 8'h43);                         // Z = 4, W = 3
    write(ca, 4'd3, 8'h00);                         // V and W, LO = 00, O2 = 0
    write(ca, 4'd4, 8'h00);
    for (int a = 10; a <= 13; a++) write(ca, 4'(a), 8'h00);
    for (int i = 0; i < 6; i++) begin
      write(ca, 4'd14, 8'(i));
      write(ca, 4'd15, 8'h00);
    end
  endtask

  // one orientation of one event: hits and the expected chip output
  task automatic make_event(input int kind, output logic [79:0] h, output logic [15:0] e);
    int c, nplanes;
    h = '0; e = '0;
    if (kind == 0) begin
      // track on sector c, seen by 3..5 planes, plus noise away from it
      c = $urandom_range(0, 15);
      nplanes = $urandom_range(3, 5);
      for (int p = 0, put = 0; p < 5; p++)
        if (put < nplanes && (($urandom_range(0, 1) != 0) || 5 - p <= nplanes - put)) begin
          h[16*p + c] = 1'b1; put++;
        end
      // at most two isolated noise hits, in distinct sectors at least 3 away
      for (int k = 0; k < 2; k++) begin
        int s;
        s = $urandom_range(0, 15);
        if ((s > c + 2 || s < c - 2) && ($urandom_range(0, 1) != 0)) begin
          h[16*$urandom_range(0, 4) + s] = 1'b1;
          n_noise++;
          break;
        end
      end
      e[c] = 1'b1;
    end else if (kind == 1) begin
      // noise only: one hit in each of a few sectors, on any plane
      for (int s = 0; s < 16; s += 4) h[16*$urandom_range(0, 4) + s] = 1'b1;
    end else begin
      // shower: six or more sectors with full tracks
      for (int s = 0; s < 16; s++) if (s % 2 == 0 || ($urandom_range(0, 1) != 0))
        for (int p = 0; p < 5; p++) h[16*p + s] = 1'b1;
    end
  endtask

  initial begin
    logic [15:0] eu, ev;
    logic [79:0] hu, hv;
    hit_u = '0; hit_v = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    setup(ADD_U);
    setup(ADD_V);
    for (int n = 0; n < 300; n++) begin
      int kind;
      kind = (n % 10 == 9) ? 2 : (n % 10 == 8) ? 1 : 0;
      make_event(kind, hu, eu);
      make_event(kind, hv, ev);
      case (kind)
        0: n_track++;
        1: n_empty++;
        default: n_shower++;
      endcase
      // hits arrive between edges; results must be there after the next edge
      @(negedge clk);
      hit_u = hu; hit_v = hv;
      @(posedge clk); #1;
      checks++;
      if (out_u !== eu || out_v !== ev) begin
        failures++;
        if (failures < 10) $display("event %0d kind %0d: u %h (exp %h) v %h (exp %h)", n, kind, out_u, eu, out_v, ev);
      end
      // hits last three cycles, then a gap so that the monostables re-arm
      repeat (2) @(negedge clk);
      hit_u = '0; hit_v = '0;
      repeat (3) @(negedge clk);
      checks++;
      if (out_u !== '0 || out_v !== '0) begin
        failures++;
        $display("event %0d: outputs did not return to 0", n);
      end
    end
    $display("pot: %0d trigger inputs -> %0d outputs; events: %0d tracks, %0d noise hits added, %0d noise only, %0d showers",
             160, 32, n_track, n_noise, n_empty, n_shower);
    if (n_track == 0 || n_empty == 0 || n_shower == 0 || n_noise == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
