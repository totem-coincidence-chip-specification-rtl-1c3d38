// cc_or2: the OR 2 block, which reduces the number of active outputs.
//
// The outputs are ORed in groups of 2^O2 (O2 = 0: no grouping, 1: pairs,
// 2: fours, 3: eights, 4: all sixteen). The OR of a group appears on the
// group's first output; the other outputs of the group are driven low and
// their enable is cleared so that their LVDS drivers can be powered down.
// The grouping table is the chip's; O2 codes 5..7, which the chip leaves
// undefined, are treated here like 4. Purely combinational.
module cc_or2 #(
  parameter int unsigned N_COORD = cc_pkg::N_COORD
) (
  input  logic [N_COORD-1:0] in,
  input  logic [2:0]         o2,
  output logic [N_COORD-1:0] out,
  output logic [N_COORD-1:0] out_en   // 0: output driver powered down
);

  always_comb begin
    int g;
    g = (o2 > 3'd4) ? 16 : (1 << o2);
    if (g > int'(N_COORD)) g = N_COORD;
    for (int k = 0; k < N_COORD; k++) begin
      out[k]    = 1'b0;
      out_en[k] = (k % g) == 0;
      if (out_en[k])
        for (int j = 0; j < N_COORD; j++)
          if (j >= k && j < k + g) out[k] = out[k] | in[j];
    end
  end

endmodule
