// cc_clock_path: clock propagation and choice of the evaluation edge.
//
// The clock arrives either as a CMOS signal or through an LVDS receiver
// (the unused one must be held low); the received clock is passed on to
// the clock outputs, so that a chain of chips sees the clock delayed like
// the trigger signals. The evaluation clock of the logic is the received
// clock, inverted when CL = 1 so that the inputs are evaluated on the
// falling edge. Propagating the clock and the CL choice are the chip's;
// ORing the two clock inputs is this design's choice. The inversion is a
// clock mux: in a real implementation it is a dedicated clock cell.
module cc_clock_path (
  input  logic clk_cmos_in,
  input  logic clk_lvds_in,   // from the clock LVDS receiver
  input  logic cl,            // 1: evaluate on the falling edge
  output logic clk_out,       // propagated clock, to CMOS and LVDS outputs
  output logic clk_eval       // evaluation clock of the logic
);

  logic clk_rx;

  assign clk_rx   = clk_cmos_in | clk_lvds_in;
  assign clk_out  = clk_rx;
  assign clk_eval = clk_rx ^ cl;

endmodule
