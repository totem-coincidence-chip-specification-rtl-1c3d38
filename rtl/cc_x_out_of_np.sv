// cc_x_out_of_np: majority coincidence per coordinate, used twice in the
// chip: as V out of NP on the plane hits and as W out of NP on the OR 1
// result.
//
// For each coordinate the number of planes that are on is counted and
// compared with the threshold: coinc[c] = (count >= thr). A threshold
// larger than the number of planes in use therefore never fires, and a
// threshold of 0 always fires. The function follows the chip's
// specification; the adder-and-compare structure is this design's choice.
// Purely combinational.
module cc_x_out_of_np #(
  parameter int unsigned N_COORD = cc_pkg::N_COORD,
  parameter int unsigned N_PLANE = cc_pkg::N_PLANE,
  parameter int unsigned THR_W   = 4
) (
  input  logic [N_COORD-1:0][N_PLANE-1:0]  hits,
  input  logic [THR_W-1:0]                 thr,
  output logic [N_COORD-1:0]               coinc
);

  localparam int unsigned CW = $clog2(N_PLANE + 1);
  localparam int unsigned MW = (THR_W > CW) ? THR_W : CW;

  always_comb begin
    logic [CW-1:0] count;
    for (int c = 0; c < N_COORD; c++) begin
      count = '0;
      for (int p = 0; p < N_PLANE; p++) count = count + CW'(hits[c][p]);
      coinc[c] = MW'(count) >= MW'(thr);
    end
  end

endmodule
