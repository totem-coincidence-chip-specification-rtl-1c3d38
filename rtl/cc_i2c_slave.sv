// cc_i2c_slave: I2C slave giving access to the control registers.
//
// SCL and SDA are sampled with the chip clock (which must run at least
// about 8 times faster than SCL) through two-flop synchronisers; START,
// STOP and the SCL edges are detected from the samples. The 7-bit slave
// address is {chip_add[2:0], reg[3:0]}: the upper three bits come from the
// chip address pads, the lower four select one of the 16 direct registers,
// so a transfer needs no separate register-address byte.
//   Write: START, address+W, ACK, data, ACK, [data, ACK ...], STOP.
//          Every data byte is written to the addressed register.
//   Read:  START, address+R, ACK, data from the slave, master ACK (another
//          copy of the register follows) or NACK, STOP.
// sda_oe = 1 pulls SDA low (open drain). reg_wr is a one-cycle pulse with
// reg_addr/reg_wdata valid; reg_rdata is read when a data byte starts.
// That the chip is programmed over I2C and has address pads ChipAdd<6:4>
// is the chip's; the addressing scheme and the sampled implementation are
// this design's choices.
module cc_i2c_slave (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] chip_add,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_oe,
  output logic       reg_wr,
  output logic [3:0] reg_addr,
  output logic [7:0] reg_wdata,
  input  logic [7:0] reg_rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_ADDR_ACK, S_WDATA, S_WDATA_ACK, S_RDATA, S_RDATA_ACK
  } state_e;

  state_e     state;
  logic [2:0] scl_q, sda_q;
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic [7:0] sh;
  logic [3:0] bitcnt;
  logic       rw;
  logic       mack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_q <= 3'b111;
      sda_q <= 3'b111;
    end else begin
      scl_q <= {scl_q[1:0], scl};
      sda_q <= {sda_q[1:0], sda};
    end
  end

  assign scl_rise = scl_q[1] & ~scl_q[2];
  assign scl_fall = ~scl_q[1] & scl_q[2];
  assign start_c  = scl_q[1] & scl_q[2] & ~sda_q[1] & sda_q[2];
  assign stop_c   = scl_q[1] & scl_q[2] & sda_q[1] & ~sda_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sh        <= '0;
      bitcnt    <= '0;
      rw        <= 1'b0;
      mack      <= 1'b0;
      sda_oe    <= 1'b0;
      reg_wr    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
    end else begin
      reg_wr <= 1'b0;
      if (start_c) begin
        state  <= S_ADDR;
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ADDR, S_WDATA: begin
            if (scl_rise) begin
              sh     <= {sh[6:0], sda_q[1]};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              if (state == S_ADDR) begin
                if (sh[7:5] == chip_add) begin
                  reg_addr <= sh[4:1];
                  rw       <= sh[0];
                  sda_oe   <= 1'b1;
                  state    <= S_ADDR_ACK;
                end else begin
                  state <= S_IDLE;
                end
              end else begin
                reg_wdata <= sh;
                reg_wr    <= 1'b1;
                sda_oe    <= 1'b1;
                state     <= S_WDATA_ACK;
              end
            end
          end
          S_ADDR_ACK, S_WDATA_ACK: begin
            if (scl_fall) begin
              bitcnt <= '0;
              if (state == S_ADDR_ACK && rw) begin
                sh     <= reg_rdata;
                sda_oe <= ~reg_rdata[7];
                state  <= S_RDATA;
              end else begin
                sda_oe <= 1'b0;
                state  <= S_WDATA;
              end
            end
          end
          S_RDATA: begin
            if (scl_fall) begin
              if (bitcnt == 4'd7) begin
                sda_oe <= 1'b0;
                state  <= S_RDATA_ACK;
              end else begin
                bitcnt <= bitcnt + 1'b1;
                sh     <= {sh[6:0], 1'b0};
                sda_oe <= ~sh[6];
              end
            end
          end
          S_RDATA_ACK: begin
            if (scl_rise) mack <= ~sda_q[1];
            else if (scl_fall) begin
              if (mack) begin
                bitcnt <= '0;
                sh     <= reg_rdata;
                sda_oe <= ~reg_rdata[7];
                state  <= S_RDATA;
              end else begin
                state <= S_IDLE;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
