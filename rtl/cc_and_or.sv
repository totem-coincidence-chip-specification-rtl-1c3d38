// cc_and_or: the And/Or block, which combines the V out of NP and the
// W out of NP coincidences of each coordinate according to AO:
//   00 V and W (reset value), 01 V or W, 10 V only, 11 W only.
// The function table is the chip's. Purely combinational.
module cc_and_or #(
  parameter int unsigned N_COORD = cc_pkg::N_COORD
) (
  input  logic [N_COORD-1:0] v_coinc,
  input  logic [N_COORD-1:0] w_coinc,
  input  cc_pkg::ao_e        ao,
  output logic [N_COORD-1:0] out
);

  always_comb begin
    unique case (ao)
      cc_pkg::AO_V_AND_W: out = v_coinc & w_coinc;
      cc_pkg::AO_V_OR_W:  out = v_coinc | w_coinc;
      cc_pkg::AO_V_ONLY:  out = v_coinc;
      cc_pkg::AO_W_ONLY:  out = w_coinc;
      default:            out = v_coinc & w_coinc;
    endcase
  end

endmodule
