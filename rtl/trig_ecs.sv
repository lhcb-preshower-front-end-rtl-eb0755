// ECS register bank of the TRIG_PGA.
//
// Same byte-level frame port as the FE_PGA bank (start/ch, wr/wdata,
// rd/rdata one clock later, stop). Channels:
//  ch 0 write: CMD, CTRL, ECALPIPE, TALAT, BXOFFSET, ACQCTRL, INJCTRL,
//              INJDEPTH (byte 0 is bits 7:0 of the write frame). Writing CMD
//              rewinds the acquisition counter when its bit 0 is 1 and the
//              injection counter when it is 0, as the register table gives
//              it; both also rewind the ECS RAM address.
//  ch 0 read : CTRL, ECALPIPE, TALAT, BXOFFSET, FLAGS, ACQCTRL, INJCTRL,
//              INJDEPTH, DELTABX2, DELTABX1 (byte 0 = bits 7:0).
//  ch 1      : injection RAM, 7 bytes (52 bits, LSB first) per address;
//              the address advances after the 7th byte (read or write).
//  ch 3 read : acquisition RAM, 10 bytes (80 bits) per address.
// Control registers and the frame byte counter are triple-redundant; FLAGS
// (cleared when read) holds voting errors: bit 0 ECALPIPE, bit 1 INJDEPTH,
// bit 2 byte counter of the I2C frames, bit 5 CTRL, bit 6 ACQCTRL or INJCTRL
// or TALAT. `upset` flips one copy of CTRL and `upset_cnt` bit 0 of one copy
// of the byte counter, for fault-injection tests.
module trig_ecs (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  ch,
  input  logic        wr,
  input  logic [7:0]  wdata,
  input  logic        rd,
  output logic [7:0]  rdata,
  input  logic        stop,
  input  logic [7:0]  upset,
  input  logic        upset_cnt,
  output logic [7:0]  ctrl, ecalpipe, talat, bxoffset, acqctrl, injctrl, injdepth,
  output logic        acq_cnt_rst,
  output logic        inj_cnt_rst,
  input  logic [7:0]  deltabx1,
  input  logic [7:0]  deltabx2,
  output logic [7:0]  ram_addr,
  output logic        inj_we,
  output logic [51:0] inj_wdata,
  input  logic [51:0] inj_rdata,
  input  logic [79:0] acq_rdata
);
  logic [1:0]  cur_ch;
  logic [3:0]  idx_c [3];           // triple copies of the frame byte counter
  logic [3:0]  idx;
  logic        idx_err;
  logic        open_f;
  logic [55:0] ibuf;
  logic [7:0]  flags;
  logic [6:0]  we_r;
  logic [7:0]  rq [7];
  logic        rerr [7];

  for (genvar g = 0; g < 7; g++) begin : g_reg
    tmr_reg #(.W(8)) u_r (
      .clk, .rst_n, .we(we_r[g]), .d(wdata), .upset(g == 0 ? upset : 8'h00),
      .q(rq[g]), .err(rerr[g])
    );
  end
  assign idx     = (idx_c[0] & idx_c[1]) | (idx_c[1] & idx_c[2]) | (idx_c[0] & idx_c[2]);
  assign idx_err = (idx_c[0] != idx_c[1]) || (idx_c[1] != idx_c[2]);

  assign {injdepth, injctrl, acqctrl, bxoffset, talat, ecalpipe, ctrl} =
         {rq[6], rq[5], rq[4], rq[3], rq[2], rq[1], rq[0]};

  always_comb begin
    we_r = '0;
    if (open_f && wr && cur_ch == 2'd0 && idx >= 4'd1 && idx <= 4'd7)
      we_r[3'(idx - 4'd1)] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur_ch      <= '0;
      idx_c[0]    <= '0;
      idx_c[1]    <= '0;
      idx_c[2]    <= '0;
      open_f      <= 1'b0;
      ibuf        <= '0;
      flags       <= '0;
      rdata       <= '0;
      ram_addr    <= '0;
      acq_cnt_rst <= 1'b0;
      inj_cnt_rst <= 1'b0;
      inj_we      <= 1'b0;
      inj_wdata   <= '0;
    end else begin
      acq_cnt_rst <= 1'b0;
      inj_cnt_rst <= 1'b0;
      inj_we      <= 1'b0;
      // byte counter: copies rewritten with the voted value (scrubbing)
      idx_c[0] <= idx ^ {3'b000, upset_cnt};
      idx_c[1] <= idx;
      idx_c[2] <= idx;
      if (idx_err) flags[2] <= 1'b1;
      // the address advances once the RAM write has been done
      if (inj_we) ram_addr <= ram_addr + 1'b1;
      if (rerr[1]) flags[0] <= 1'b1;
      if (rerr[6]) flags[1] <= 1'b1;
      if (rerr[0]) flags[5] <= 1'b1;
      if (rerr[4] || rerr[5] || rerr[2]) flags[6] <= 1'b1;
      if (start) begin
        cur_ch <= ch;
        for (int k = 0; k < 3; k++) idx_c[k] <= '0;
        open_f <= 1'b1;
      end else if (stop) begin
        open_f <= 1'b0;
      end else if (open_f && wr) begin
        for (int k = 0; k < 3; k++) idx_c[k] <= idx + 4'd1;
        if (cur_ch == 2'd0 && idx == 4'd0) begin
          acq_cnt_rst <= wdata[0];
          inj_cnt_rst <= ~wdata[0];
          ram_addr    <= '0;
        end
        if (cur_ch == 2'd1) begin
          if (idx == 4'd6) begin
            inj_we    <= 1'b1;
            inj_wdata <= {wdata[3:0], ibuf[47:0]};
            for (int k = 0; k < 3; k++) idx_c[k] <= '0;
          end else begin
            ibuf[8*idx +: 8] <= wdata;
          end
        end
      end else if (open_f && rd) begin
        for (int k = 0; k < 3; k++) idx_c[k] <= idx + 4'd1;
        unique case (cur_ch)
          2'd0:
            unique case (idx)
              4'd0: rdata <= ctrl;
              4'd1: rdata <= ecalpipe;
              4'd2: rdata <= talat;
              4'd3: rdata <= bxoffset;
              4'd4: begin
                      rdata <= flags;
                      flags <= '0;
                    end
              4'd5: rdata <= acqctrl;
              4'd6: rdata <= injctrl;
              4'd7: rdata <= injdepth;
              4'd8: rdata <= deltabx2;
              4'd9: rdata <= deltabx1;
              default: rdata <= 8'h00;
            endcase
          2'd1: begin
            rdata <= (idx == 4'd6) ? {4'h0, inj_rdata[51:48]} : inj_rdata[8*idx +: 8];
            if (idx == 4'd6) begin
              for (int k = 0; k < 3; k++) idx_c[k] <= '0;
              ram_addr <= ram_addr + 1'b1;
            end
          end
          2'd3: begin
            rdata <= acq_rdata[8*idx +: 8];
            if (idx == 4'd9) begin
              for (int k = 0; k < 3; k++) idx_c[k] <= '0;
              ram_addr <= ram_addr + 1'b1;
            end
          end
          default: rdata <= 8'h00;
        endcase
      end
    end
endmodule
