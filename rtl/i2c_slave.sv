// I2C slave front of the FE_PGA and TRIG_PGA ECS interface.
//
// Each FPGA has its own I2C bus and answers to four consecutive 7-bit
// addresses BASE+0..3; the two low address bits select the internal
// channel. The bus is oversampled by the 40 MHz clock, so SCL high and low
// phases must each last at least four clock periods. The block turns the
// bus traffic into the byte-level strobes of the ECS register bank:
//  - address byte acknowledged    -> start (with channel)
//  - written byte acknowledged    -> wr, wdata
//  - each byte to be sent         -> rd (data taken from rdata next clock);
//    the first during the address acknowledge clock, the next ones on
//    each master acknowledge, none after the final not-acknowledge
//  - STOP condition               -> stop
// A repeated START opens a new frame. Addresses outside BASE+0..3 are not
// acknowledged and the block stays silent until the next START.
// SDA is open-drain: `sda` is the bus level, `sda_oe` pulls the line low.
module i2c_slave #(
  parameter logic [6:0] BASE = 7'h0C
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda,
  output logic       sda_oe,
  // byte-level side
  output logic       start,
  output logic [1:0] ch,
  output logic       wr,
  output logic [7:0] wdata,
  output logic       rd,
  input  logic [7:0] rdata,
  output logic       stop
);

  typedef enum logic [2:0] {S_IDLE, S_RX, S_RXACK, S_TX, S_TXACK} state_t;

  logic [1:0] scl_m, sda_m;
  logic       scl_q, sda_q;
  logic       scl_rise, scl_fall, start_c, stop_c;
  state_t     st;
  logic [3:0] cnt;
  logic [7:0] sh, txb;
  logic       is_addr, rnw, open_f, ack_ok, rd_q;

  // two-stage synchronisers, then one more stage for edge detection
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      scl_m <= 2'b11; sda_m <= 2'b11; scl_q <= 1'b1; sda_q <= 1'b1;
    end else begin
      scl_m <= {scl_m[0], scl};
      sda_m <= {sda_m[0], sda};
      scl_q <= scl_m[1];
      sda_q <= sda_m[1];
    end

  assign scl_rise = scl_m[1] & ~scl_q;
  assign scl_fall = ~scl_m[1] & scl_q;
  assign start_c  = scl_m[1] & scl_q & sda_q & ~sda_m[1];
  assign stop_c   = scl_m[1] & scl_q & ~sda_q & sda_m[1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; sh <= '0; txb <= '0;
      is_addr <= 1'b0; rnw <= 1'b0; open_f <= 1'b0; ack_ok <= 1'b0;
      rd_q <= 1'b0; sda_oe <= 1'b0;
      start <= 1'b0; ch <= '0; wr <= 1'b0; wdata <= '0; rd <= 1'b0; stop <= 1'b0;
    end else begin
      start <= 1'b0; wr <= 1'b0; rd <= 1'b0; stop <= 1'b0;
      rd_q <= rd;
      if (rd_q) txb <= rdata;
      if (start_c) begin
        st <= S_RX; cnt <= '0; is_addr <= 1'b1; sda_oe <= 1'b0;
      end else if (stop_c) begin
        st <= S_IDLE; sda_oe <= 1'b0;
        if (open_f) begin stop <= 1'b1; open_f <= 1'b0; end
      end else begin
        unique case (st)
          S_IDLE: sda_oe <= 1'b0;
          S_RX: begin
            if (scl_rise && cnt < 4'd8) begin
              sh  <= {sh[6:0], sda_m[1]};
              cnt <= cnt + 4'd1;
            end
            if (scl_fall && cnt == 4'd8) begin
              if (is_addr) begin
                if (sh[7:3] == BASE[6:2]) begin
                  start <= 1'b1; ch <= sh[2:1]; rnw <= sh[0]; open_f <= 1'b1;
                  sda_oe <= 1'b1; st <= S_RXACK;
                end else begin
                  st <= S_IDLE;
                end
              end else begin
                wr <= 1'b1; wdata <= sh;
                sda_oe <= 1'b1; st <= S_RXACK;
              end
            end
          end
          S_RXACK: begin
            if (scl_rise) rd <= rnw;
            if (scl_fall) begin
              is_addr <= 1'b0;
              if (rnw) begin
                sda_oe <= ~txb[7]; cnt <= 4'd1; st <= S_TX;
              end else begin
                sda_oe <= 1'b0; cnt <= '0; st <= S_RX;
              end
            end
          end
          S_TX:
            if (scl_fall) begin
              if (cnt == 4'd8) begin
                sda_oe <= 1'b0; ack_ok <= 1'b0; st <= S_TXACK;
              end else begin
                sda_oe <= ~txb[3'(7 - cnt)];
                cnt <= cnt + 4'd1;
              end
            end
          S_TXACK: begin
            if (scl_rise) begin
              ack_ok <= ~sda_m[1];
              rd     <= ~sda_m[1];
            end
            if (scl_fall) begin
              if (ack_ok) begin
                sda_oe <= ~txb[7]; cnt <= 4'd1; st <= S_TX;
              end else begin
                st <= S_IDLE;
              end
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end

endmodule
