// cc_z_out_of: the Z out of 8 or 16 multiplicity block.
//
// Counts the active coordinates at the output of the And/Or block, over
// all 16 coordinates with NP = 1 or over the first 8 with NP = 0, and
// raises zflag when the count is strictly greater than Z. The And/Or 2
// block then uses zflag as a veto or as a further condition. The "more
// than Z" rule and the 8/16 choice follow the chip's specification.
// Purely combinational.
module cc_z_out_of #(
  parameter int unsigned N_COORD = cc_pkg::N_COORD,
  parameter int unsigned Z_W     = 4
) (
  input  logic [N_COORD-1:0] in,
  input  logic               np,
  input  logic [Z_W-1:0]     z,
  output logic               zflag
);

  localparam int unsigned CW = $clog2(N_COORD + 1);
  localparam int unsigned MW = (Z_W > CW) ? Z_W : CW;

  always_comb begin
    logic [CW-1:0] count;
    count = '0;
    for (int c = 0; c < N_COORD; c++)
      if (np || c < N_COORD / 2) count = count + CW'(in[c]);
    zflag = MW'(count) > MW'(z);
  end

endmodule
