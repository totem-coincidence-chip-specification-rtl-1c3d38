// cc_lvds_rx: behavioural model of an LVDS input receiver with its
// programmable termination resistor. Not synthesizable logic: the real
// part is an analog cell.
//
// The receiver output is 1 when the plus line is high and the minus line
// low, and 0 otherwise (so an undriven pair, held low by the chip's
// high-value resistors, reads 0). The termination consists of a fixed
// resistor R1 in parallel with 0 to 7 equal resistors R switched in by
// B(2:0) (B2 switches four, B1 two, B0 one). The internal r_term_ohm gives
// the nominal termination for the current B, taken from the chip's resistor table
// (126 ohm for B = 0 down to 74 ohm for B = 7). A change of the
// termination has no effect on the digital output in this model, and
// nothing reads r_term_ohm: it is there to be inspected in simulation.
module cc_lvds_rx (
  input  logic       in_p,
  input  logic       in_n,
  input  logic [2:0] b,
  output logic       out
);

  logic [6:0] r_term_ohm;  // nominal termination in ohm

  assign out = in_p & ~in_n;

  always_comb begin
    unique case (b)
      3'd0: r_term_ohm = 7'd126;
      3'd1: r_term_ohm = 7'd115;
      3'd2: r_term_ohm = 7'd105;
      3'd3: r_term_ohm = 7'd97;
      3'd4: r_term_ohm = 7'd90;
      3'd5: r_term_ohm = 7'd84;
      3'd6: r_term_ohm = 7'd79;
      default: r_term_ohm = 7'd74;
    endcase
  end

endmodule
