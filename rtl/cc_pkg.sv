// cc_pkg: types and constants shared by the coincidence chip (CC) modules.
//
// The chip takes 80 detector inputs and produces 16 trigger outputs. The
// inputs are seen either as 5 planes of 16 coordinates or as 10 planes of
// 8 coordinates, selected by the NP control bit. All programmable
// settings live in 8-bit control registers; cc_cfg_t is the decoded view
// of those registers that the logic blocks consume. Field names follow the
// register names of the chip's register map (CT, Sync, Sync2, S, OV, NP, V,
// Z, W, AO, LO, LI, O2, CL, T, CO, Chip ID, Mask, B). Some sizes below are
// not read by every module that imports the package; they document the
// chip and are used by the testbenches.
package cc_pkg;

  localparam int unsigned N_IN      = 80;  // detector inputs
  localparam int unsigned N_COORD   = 16;  // coordinates / trigger outputs
  localparam int unsigned N_PLANE   = 10;  // maximum number of planes
  localparam int unsigned CNT_W     = 24;  // counter result width (3 registers)
  localparam int unsigned N_DIRECT  = 16;  // directly addressed registers
  localparam int unsigned N_INDIR   = 8;   // registers behind the pointer

  // And/Or block function (register AO)
  typedef enum logic [1:0] {
    AO_V_AND_W = 2'b00,
    AO_V_OR_W  = 2'b01,
    AO_V_ONLY  = 2'b10,
    AO_W_ONLY  = 2'b11
  } ao_e;

  // And/Or 2 block function (register LO)
  typedef enum logic [1:0] {
    LO_AND_NOT_Z     = 2'b00,
    LO_AND_Z         = 2'b01,
    LO_NOT_AND_NOT_Z = 2'b10,
    LO_NOT_AND_Z     = 2'b11
  } lo_e;

  // Counting period (register CT): 2^8, 2^16, 2^24 or 2^32 clock cycles
  typedef enum logic [1:0] {
    CT_2P8  = 2'b00,
    CT_2P16 = 2'b01,
    CT_2P24 = 2'b10,
    CT_2P32 = 2'b11
  } ct_e;

  // Decoded control registers
  typedef struct packed {
    ct_e          ct;       // counting period
    logic         sync2;    // 1: bypass monostable and stretcher
    logic         sync;     // 1: monostable in the path
    logic         s;        // stretch: pulse lasts 1 + s cycles
    logic [2:0]   ov;       // OR 1 neighbour distance
    logic         np;       // 1: 5 planes x 16 coord., 0: 10 planes x 8 coord.
    logic [3:0]   v;        // V of V out of NP
    logic [3:0]   z;        // Z of Z out of 8 or 16
    logic [3:0]   w;        // W of W out of NP
    ao_e          ao;       // And/Or function
    lo_e          lo;       // And/Or 2 function
    logic         li;       // invert inputs
    logic [2:0]   o2;       // Or 2 grouping
    logic         cl;       // 1: evaluate on falling clock edge
    logic [2:0]   t;        // stored, not used by the logic
    logic [3:0]   co;       // output being counted
    logic [15:0]  chip_id;  // chip identification
    logic [N_IN-1:0] mask;  // 1: input masked
    logic [2:0]   b;        // LVDS termination setting
  } cc_cfg_t;

endpackage
