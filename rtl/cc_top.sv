// cc_top: the TOTEM coincidence chip (CC).
//
// 80 LVDS trigger inputs from the detector front ends are reduced to 16
// LVDS trigger outputs by a programmable coincidence. Data path, in order:
//   LVDS receivers -> Synchro (mask, polarity, monostable, stretcher)
//   -> input grouping into planes and coordinates (NP)
//   -> V out of NP on the hits, and OR 1 (OV neighbours) then W out of NP
//   -> And/Or (AO) -> Z out of 8 or 16 (Z) and And/Or 2 (LO)
//   -> Or 2 (O2) -> LVDS output drivers.
// A counter measures the pulse rate of one output (CO, CT). All settings
// are control registers written over I2C (pads SCL/SDA, address pads
// ChipAdd<6:4>). The clock is received, propagated to the clock outputs,
// and the logic evaluates on its rising or falling edge (CL).
//
// Timing: everything after the synchronisation stage is combinational, so
// the outputs settle a few gate delays after the evaluation edge that
// registered the input (monostable mode), or follow the inputs directly in
// the bypass modes. The I2C slave and the register bank run on the rising
// edge of the received clock. rst_n (pad REhB, active low) loads the
// registers' reset values, which leave every input masked.
//
// The T field and the Chip ID are kept in the registers for read-back
// only; the logic does not use them. The counter's end-of-period marker
// is not needed at chip level and its pin is left open.
//
// The block structure and all register functions follow the chip's
// specification; see the module headers for the choices made where it is
// silent.
module cc_top
  import cc_pkg::*;
(
  input  logic [N_IN-1:0]    in_p,
  input  logic [N_IN-1:0]    in_n,
  input  logic               clk_cmos_in,
  input  logic               clk_lvds_in_p,
  input  logic               clk_lvds_in_n,
  output logic               clk_cmos_out,
  output logic               clk_lvds_out_p,
  output logic               clk_lvds_out_n,
  input  logic               rst_n,
  input  logic [2:0]         chip_add,
  input  logic               scl,
  input  logic               sda_in,
  output logic               sda_oe,
  output logic [N_COORD-1:0] out_p,
  output logic [N_COORD-1:0] out_n
);

  cc_cfg_t cfg;

  logic clk_lvds_rx, clk_prop, clk_eval;

  logic [N_IN-1:0]                 in_cmos;
  logic [N_IN-1:0]                 synced;
  logic [N_COORD-1:0][N_PLANE-1:0] hits, ored;
  logic [N_COORD-1:0]              v_coinc, w_coinc, ao_out, ao2_out;
  logic [N_COORD-1:0]              trig, trig_en;
  logic                            zflag;
  logic [CNT_W-1:0]                count_result;

  logic       reg_wr;
  logic [3:0] reg_addr;
  logic [7:0] reg_wdata, reg_rdata;

  // ---------------- clock ----------------
  cc_lvds_rx u_clk_rx (
    .in_p (clk_lvds_in_p), .in_n (clk_lvds_in_n), .b (cfg.b), .out (clk_lvds_rx)
  );

  cc_clock_path u_clk (
    .clk_cmos_in (clk_cmos_in),
    .clk_lvds_in (clk_lvds_rx),
    .cl          (cfg.cl),
    .clk_out     (clk_prop),
    .clk_eval    (clk_eval)
  );

  assign clk_cmos_out = clk_prop;

  cc_lvds_tx u_clk_tx (
    .d (clk_prop), .en (1'b1), .out_p (clk_lvds_out_p), .out_n (clk_lvds_out_n)
  );

  // ---------------- control ----------------
  cc_i2c_slave u_i2c (
    .clk       (clk_prop),
    .rst_n     (rst_n),
    .chip_add  (chip_add),
    .scl       (scl),
    .sda       (sda_in),
    .sda_oe    (sda_oe),
    .reg_wr    (reg_wr),
    .reg_addr  (reg_addr),
    .reg_wdata (reg_wdata),
    .reg_rdata (reg_rdata)
  );

  cc_regs u_regs (
    .clk     (clk_prop),
    .rst_n   (rst_n),
    .wr_en   (reg_wr),
    .addr    (reg_addr),
    .wdata   (reg_wdata),
    .rdata   (reg_rdata),
    .counter (count_result),
    .cfg     (cfg)
  );

  // ---------------- inputs ----------------
  for (genvar i = 0; i < N_IN; i++) begin : g_rx
    cc_lvds_rx u_rx (
      .in_p (in_p[i]), .in_n (in_n[i]), .b (cfg.b), .out (in_cmos[i])
    );
  end

  cc_synchro u_sync (
    .clk     (clk_eval),
    .rst_n   (rst_n),
    .in      (in_cmos),
    .mask    (cfg.mask),
    .li      (cfg.li),
    .sync    (cfg.sync),
    .sync2   (cfg.sync2),
    .stretch (cfg.s),
    .out     (synced)
  );

  // ---------------- coincidence ----------------
  cc_input_group u_group (.in (synced), .np (cfg.np), .hits (hits));

  cc_x_out_of_np u_v (.hits (hits), .thr (cfg.v), .coinc (v_coinc));

  cc_or1 u_or1 (.hits (hits), .np (cfg.np), .ov (cfg.ov), .ored (ored));

  cc_x_out_of_np u_w (.hits (ored), .thr (cfg.w), .coinc (w_coinc));

  cc_and_or u_ao (.v_coinc (v_coinc), .w_coinc (w_coinc), .ao (cfg.ao), .out (ao_out));

  cc_z_out_of u_z (.in (ao_out), .np (cfg.np), .z (cfg.z), .zflag (zflag));

  cc_and_or2 u_ao2 (.in (ao_out), .zflag (zflag), .lo (cfg.lo), .out (ao2_out));

  cc_or2 u_or2 (.in (ao2_out), .o2 (cfg.o2), .out (trig), .out_en (trig_en));

  // ---------------- outputs ----------------
  for (genvar k = 0; k < N_COORD; k++) begin : g_tx
    cc_lvds_tx u_tx (
      .d (trig[k]), .en (trig_en[k]), .out_p (out_p[k]), .out_n (out_n[k])
    );
  end

  cc_counter u_cnt (
    .clk        (clk_eval),
    .rst_n      (rst_n),
    .outs       (trig),
    .co         (cfg.co),
    .ct         (cfg.ct),
    .result     (count_result),
    .period_end ()
  );

endmodule
