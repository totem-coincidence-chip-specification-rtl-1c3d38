// cc_synchro: the synchronisation stage of all detector inputs.
//
// One cc_sync_channel per input. The mask is per channel; polarity (LI),
// the path selection ({Sync2, Sync}) and the stretch count (S) are shared
// by all channels, as in the chip's register map. The stage adds no
// latency in the bypass modes and aligns pulses to the evaluation clock in
// the monostable mode (see cc_sync_channel).
module cc_synchro #(
  parameter int unsigned N_IN      = cc_pkg::N_IN,
  parameter int unsigned STRETCH_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_IN-1:0]      in,
  input  logic [N_IN-1:0]      mask,
  input  logic                 li,
  input  logic                 sync,
  input  logic                 sync2,
  input  logic [STRETCH_W-1:0] stretch,
  output logic [N_IN-1:0]      out
);

  for (genvar i = 0; i < N_IN; i++) begin : g_ch
    cc_sync_channel #(.STRETCH_W(STRETCH_W)) u_ch (
      .clk     (clk),
      .rst_n   (rst_n),
      .in      (in[i]),
      .mask    (mask[i]),
      .li      (li),
      .sync    (sync),
      .sync2   (sync2),
      .stretch (stretch),
      .out     (out[i])
    );
  end

endmodule
