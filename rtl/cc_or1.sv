// cc_or1: the OR 1 block, which widens every hit to its neighbours.
//
// For each plane, coordinate c is ORed with the same plane's coordinates
// c-OV .. c+OV. At the edges only the coordinates that exist are used. The
// number of coordinates is 16 with NP = 1 and 8 with NP = 0; in the latter
// case coordinates 9..16 repeat 1..8 (see cc_input_group). This lets the
// W out of NP coincidence tolerate tracks at an angle and misaligned
// planes. The neighbour rule follows the chip's specification. The OV field
// is 3 bits wide, so OV ranges over 0..7. Purely combinational.
module cc_or1 #(
  parameter int unsigned N_COORD = cc_pkg::N_COORD,
  parameter int unsigned N_PLANE = cc_pkg::N_PLANE,
  parameter int unsigned OV_W    = 3
) (
  input  logic [N_COORD-1:0][N_PLANE-1:0]  hits,
  input  logic                             np,
  input  logic [OV_W-1:0]                  ov,
  output logic [N_COORD-1:0][N_PLANE-1:0]  ored
);

  always_comb begin
    int base, ncoord, gap;
    ncoord = np ? N_COORD : N_COORD / 2;
    for (int c = 0; c < N_COORD; c++) begin
      base = np ? c : c % (N_COORD / 2);
      for (int p = 0; p < N_PLANE; p++) begin
        ored[c][p] = 1'b0;
        for (int j = 0; j < N_COORD; j++) begin
          gap = (j > base) ? j - base : base - j;
          if (j < ncoord && gap <= int'(ov))
            ored[c][p] = ored[c][p] | hits[j][p];
        end
      end
    end
  end

endmodule
