// cc_input_group: maps the 80 conditioned inputs onto planes and
// coordinates.
//
// Each run of consecutive inputs belongs to one detector plane:
//   NP = 1: 5 planes of 16 inputs (inputs 1-16 plane 1, 17-32 plane 2, ...)
//           giving 16 coordinates; planes 6..10 of the output array are 0.
//   NP = 0: 10 planes of 8 inputs (inputs 1-8 plane 1, 9-16 plane 2, ...)
//           giving 8 coordinates; coordinates 9..16 repeat coordinates 1..8,
//           so trigger outputs 9..16 carry the same values as outputs 1..8.
// The plane-per-group arrangement follows the chip's input grouping; which
// NP value selects which grouping, and the repetition of coordinates in the
// 8-coordinate mode, were read from the chip's test vectors.
// hits[c][p] is the hit of coordinate c on plane p. Purely combinational.
module cc_input_group #(
  parameter int unsigned N_IN    = cc_pkg::N_IN,
  parameter int unsigned N_COORD = cc_pkg::N_COORD,
  parameter int unsigned N_PLANE = cc_pkg::N_PLANE
) (
  input  logic [N_IN-1:0]                  in,
  input  logic                             np,   // 1: N_COORD coordinates
  output logic [N_COORD-1:0][N_PLANE-1:0]  hits
);

  localparam int unsigned HALF = N_COORD / 2;

  always_comb begin
    for (int c = 0; c < N_COORD; c++) begin
      for (int p = 0; p < N_PLANE; p++) begin
        if (np) begin
          if (p * N_COORD + c < N_IN) hits[c][p] = in[p * N_COORD + c];
          else                        hits[c][p] = 1'b0;
        end else begin
          if (p * HALF + (c % HALF) < N_IN) hits[c][p] = in[p * HALF + (c % HALF)];
          else                              hits[c][p] = 1'b0;
        end
      end
    end
  end

endmodule
