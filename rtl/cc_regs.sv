// cc_regs: the control register bank programmed over I2C.
//
// Sixteen 8-bit registers are addressed directly (address 0..15):
//   0  CT(1:0) in bits 5:4, Sync2 bit 2, Sync bit 1, S bit 0
//   1  OV(2:0) bits 7:5, NP bit 4, V(3:0) bits 3:0
//   2  Z(3:0) bits 7:4, W(3:0) bits 3:0          (reset value F0h)
//   3  AO(1:0) bits 7:6, LO(1:0) bits 5:4, LI bit 3, O2(2:0) bits 2:0
//   4  CL bit 7, T(2:0) bits 6:4, CO(3:0) bits 3:0
//   5,6  Chip ID low and high byte
//   7,8,9  counter result, bits 7:0, 15:8, 23:16 (read only)
//   10..13 Mask(7:0) .. Mask(31:24)              (reset value FFh)
//   14 pointer to the indirect registers (Extreg low byte)
//   15 data window on the indirect register selected by register 14
// Eight indirect registers hold Mask(39:32) .. Mask(79:72) (indirect 0..5,
// reset FFh), B(2:0) (indirect 6) and nothing (indirect 7). The layout and
// reset values are the chip's register map; reaching the indirect registers
// through a pointer in register 14 and a data window in register 15 is this
// design's choice. Writes take effect on the clock edge of wr_en; reads are
// combinational. rst_n restores the reset values.
module cc_regs
  import cc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [3:0]       addr,
  input  logic [7:0]       wdata,
  output logic [7:0]       rdata,
  input  logic [CNT_W-1:0] counter,
  output cc_cfg_t          cfg
);

  logic [7:0] dreg [N_DIRECT];
  logic [7:0] ireg [N_INDIR];
  logic [2:0] ptr;

  function automatic logic [7:0] dreset(int a);
    case (a)
      2:              return 8'hF0;
      10, 11, 12, 13: return 8'hFF;
      default:        return 8'h00;
    endcase
  endfunction

  function automatic logic [7:0] ireset(int a);
    return (a < 6) ? 8'hFF : 8'h00;
  endfunction

  assign ptr = dreg[14][2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < N_DIRECT; a++) dreg[a] <= dreset(a);
      for (int a = 0; a < N_INDIR;  a++) ireg[a] <= ireset(a);
    end else if (wr_en) begin
      if (addr == 4'd15)                     ireg[ptr] <= wdata;
      else if (addr < 4'd7 || addr > 4'd9)   dreg[addr] <= wdata;
    end
  end

  always_comb begin
    unique case (addr)
      4'd7:    rdata = counter[7:0];
      4'd8:    rdata = counter[15:8];
      4'd9:    rdata = counter[23:16];
      4'd15:   rdata = ireg[ptr];
      default: rdata = dreg[addr];
    endcase
  end

  always_comb begin
    cfg.ct      = ct_e'(dreg[0][5:4]);
    cfg.sync2   = dreg[0][2];
    cfg.sync    = dreg[0][1];
    cfg.s       = dreg[0][0];
    cfg.ov      = dreg[1][7:5];
    cfg.np      = dreg[1][4];
    cfg.v       = dreg[1][3:0];
    cfg.z       = dreg[2][7:4];
    cfg.w       = dreg[2][3:0];
    cfg.ao      = ao_e'(dreg[3][7:6]);
    cfg.lo      = lo_e'(dreg[3][5:4]);
    cfg.li      = dreg[3][3];
    cfg.o2      = dreg[3][2:0];
    cfg.cl      = dreg[4][7];
    cfg.t       = dreg[4][6:4];
    cfg.co      = dreg[4][3:0];
    cfg.chip_id = {dreg[6], dreg[5]};
    cfg.mask    = {ireg[5], ireg[4], ireg[3], ireg[2], ireg[1], ireg[0],
                   dreg[13], dreg[12], dreg[11], dreg[10]};
    cfg.b       = ireg[6][2:0];
  end

endmodule
