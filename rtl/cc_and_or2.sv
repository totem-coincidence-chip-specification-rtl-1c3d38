// cc_and_or2: the And/Or 2 block, which applies the multiplicity flag
// from Z out of 8 or 16 to every coordinate and optionally inverts the
// result, according to LO:
//   00 out and not Z (reset value)      01 out and Z
//   10 not(out and not Z)               11 not(out and Z)
// The function table is the chip's. Purely combinational.
module cc_and_or2 #(
  parameter int unsigned N_COORD = cc_pkg::N_COORD
) (
  input  logic [N_COORD-1:0] in,
  input  logic               zflag,
  input  cc_pkg::lo_e        lo,
  output logic [N_COORD-1:0] out
);

  always_comb begin
    unique case (lo)
      cc_pkg::LO_AND_NOT_Z:     out =  (in & {N_COORD{~zflag}});
      cc_pkg::LO_AND_Z:         out =  (in & {N_COORD{ zflag}});
      cc_pkg::LO_NOT_AND_NOT_Z: out = ~(in & {N_COORD{~zflag}});
      cc_pkg::LO_NOT_AND_Z:     out = ~(in & {N_COORD{ zflag}});
      default:                  out =  (in & {N_COORD{~zflag}});
    endcase
  end

endmodule
