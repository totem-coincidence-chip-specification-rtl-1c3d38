// cc_counter: rate counter on one trigger output.
//
// The output selected by CO is sampled on every evaluation edge and each
// 0-to-1 transition counts as one pulse. Counting runs continuously in
// periods of 2^8, 2^16, 2^24 or 2^32 clock cycles (CT). On the last cycle
// of a period the pulse count, including a pulse seen on that cycle, is
// copied to `result` (read through three read-only registers) and the
// count restarts from zero. The count saturates at 2^24-1, which can only
// be reached with the 2^24 and 2^32 periods. Selection by CO, the periods
// and the copy-and-restart behaviour follow the chip's specification;
// counting rising edges and saturation are this design's choices.
// `period_end` is high during the cycle whose closing edge ends a period.
module cc_counter #(
  parameter int unsigned N_COORD = cc_pkg::N_COORD,
  parameter int unsigned CNT_W   = cc_pkg::CNT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_COORD-1:0] outs,
  input  logic [3:0]         co,
  input  cc_pkg::ct_e        ct,
  output logic [CNT_W-1:0]   result,
  output logic               period_end
);

  logic [31:0]      cycles;
  logic [31:0]      last;
  logic [CNT_W-1:0] count;
  logic             sel, prev, pulse;
  logic [CNT_W-1:0] count_next;

  always_comb begin
    unique case (ct)
      cc_pkg::CT_2P8:  last = 32'h0000_00FF;
      cc_pkg::CT_2P16: last = 32'h0000_FFFF;
      cc_pkg::CT_2P24: last = 32'h00FF_FFFF;
      default:         last = 32'hFFFF_FFFF;
    endcase
  end

  assign sel        = outs[co];
  assign pulse      = sel & ~prev;
  assign period_end = (cycles >= last);
  assign count_next = (pulse && count != '1) ? count + 1'b1 : count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles <= '0;
      count  <= '0;
      prev   <= 1'b0;
      result <= '0;
    end else begin
      prev <= sel;
      if (period_end) begin
        cycles <= '0;
        count  <= '0;
        result <= count_next;
      end else begin
        cycles <= cycles + 1'b1;
        count  <= count_next;
      end
    end
  end

endmodule
