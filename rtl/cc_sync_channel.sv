// cc_sync_channel: input conditioning of one detector channel.
//
// The channel first applies the mask (1 = forced to 0) and the chip-wide
// polarity bit LI (1 = inverted). The conditioned signal x then feeds:
//   * a monostable that turns a pulse of any length into a single-cycle
//     pulse aligned to the evaluation clock (x is sampled on each edge and
//     the pulse is "sampled now and not sampled on the previous edge");
//   * a stretcher that holds its input for STRETCH extra cycles, where
//     STRETCH is the S field, so a single-cycle pulse lasts 1 + S cycles.
// Two multiplexers select among the three paths of the {Sync2, Sync} field:
//   00 stretcher fed directly by x (input should be synchronous)
//   01 monostable then stretcher
//   10 mask and polarity only (combinational, input should be synchronous)
//   11 unused code, treated here like 10.
// Masking, polarity, the three paths and the mux arrangement follow the
// chip's specification. The register-based edge detector used as the
// monostable, the stretcher counter, treating S as the stretch count and
// treating code 11 like 10 are this design's choices.
//
// Timing: in mode 01 the output rises right after the first evaluation
// edge at which the input is seen high and lasts 1 + S cycles. All state is
// reset asynchronously by rst_n (active low).
module cc_sync_channel #(
  parameter int unsigned STRETCH_W = 1   // width of the stretch field S
) (
  input  logic                 clk,      // evaluation clock
  input  logic                 rst_n,
  input  logic                 in,       // CMOS level input from the receiver
  input  logic                 mask,     // 1: channel masked
  input  logic                 li,       // 1: invert
  input  logic                 sync,     // 1: monostable in path
  input  logic                 sync2,    // 1: bypass all synchronisation
  input  logic [STRETCH_W-1:0] stretch,  // extra cycles of the stretcher
  output logic                 out
);

  logic                 x;
  logic                 s1, s2;
  logic                 mono;
  logic                 mux1;
  logic [STRETCH_W-1:0] cnt;
  logic                 stretched;

  assign x = (in ^ li) & ~mask;

  // monostable
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= x;
      s2 <= s1;
    end
  end
  assign mono = s1 & ~s2;

  assign mux1 = sync ? mono : x;

  // stretcher: reload while the input is high, then count down
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (mux1)       cnt <= stretch;
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end
  assign stretched = mux1 | (cnt != '0);

  assign out = sync2 ? x : stretched;

endmodule
