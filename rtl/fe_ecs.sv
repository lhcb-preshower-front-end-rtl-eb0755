// ECS register bank of the FE_PGA.
//
// ECS reaches each FE_PGA over its own I2C bus on four sub-addresses
// (channels). This block sits behind the I2C byte layer: a frame is opened
// by `start` with its channel, then bytes are written (`wr`, `wdata`) or
// read (`rd`, answer on `rdata` the next clock) in order, and closed by
// `stop`. Frames may be short: bytes not sent leave their registers alone.
//  ch 0 write: CTRL, CMD, L0LAT, PSPIPE, SPDPIPE, MASK, ACQCTRL, INJDEPTH,
//              TRIGDEL (CMD bit 0 / bit 1 rewind the ACQ / INJ RAM counters
//              and the ECS RAM address; CMD is not stored)
//  ch 0 read : CTRL, L0LAT, PSPIPE, SPDPIPE, MASK, ACQCTRL, INJDEPTH, FLAGS,
//              STATUSCLK, ACQRAMCNT, INJRAMCNT, PSRAMCNT, TRIGDEL
//  ch 1 / 2  : 33 bytes = 12 SEC-DED code words of 22 bits (LSB first) for
//              channels 0-3 / 4-7; each word is written as soon as its last
//              byte has arrived
//  ch 3 read : 24 bytes per RAM address: ACQ PS[8], ACQ trig, ACQ SPD,
//              ACQ counter, INJ PS (10 bytes), INJ SPD, INJ counter, 0xA5;
//              the address advances after the 24th byte
//  ch 3 write: 11 bytes per INJ RAM address: PS (10 bytes), SPD; the
//              address advances after the write
// The stored registers are triple-redundant (tmr_reg). FLAGS keeps the
// error events and is cleared when read: bit 7/6 SEC-DED errors of the
// parameter groups 1/2, bit 5 ADC power-switch fault, bit 3 voting error on
// the channel-0 registers, bit 0 voting error on the triple frame byte
// counter; bits 4, 2 and 1 are not used by this design. The
// byte order in channels 1-3 and the 0xA5 debug byte are own choices.
module fe_ecs
  import ps_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [1:0]  ch,
  input  logic        wr,
  input  logic [7:0]  wdata,
  input  logic        rd,
  output logic [7:0]  rdata,
  input  logic        stop,
  input  logic        upset_cnt,    // flips bit 0 of one counter copy (tie low)
  // configuration
  output logic [7:0]  ctrl, l0lat, pspipe, spdpipe, mask, acqctrl, injdepth, trigdel,
  output logic        acq_cnt_rst,
  output logic        inj_cnt_rst,
  // parameter banks
  output logic        par_busy,
  output logic        par_we [2],
  output logic [3:0]  par_waddr,
  output hcode_t      par_wdata,
  input  hcode_t      par_words [2][NPARAMW],
  input  logic        ham_err1 [2],
  input  logic        ham_err2 [2],
  output logic        ham_clr,
  // RAMs
  output logic [7:0]  ram_addr,
  output logic        inj_we,
  output logic [87:0] inj_wdata,
  input  logic [87:0] inj_rdata,
  input  logic [79:0] acq_rdata,
  input  logic [7:0]  acq_cnt,
  input  logic [7:0]  inj_cnt,
  input  logic [7:0]  ps_cnt,
  // status
  input  logic [7:0]  statusclk,
  input  logic        adc_fault
);
  logic [1:0]   cur_ch;
  logic [5:0]   idx_c [3];          // triple copies of the frame byte counter
  logic [5:0]   idx;
  logic         idx_err;
  logic         open_f;
  logic [263:0] pbuf;
  logic [3:0]   pword;
  logic [87:0]  ibuf;
  logic [7:0]   flags;
  logic [7:0]   we_r;
  logic [7:0]   terr;

  // ---- triple-redundant control registers -------------------------------
  logic [7:0] rq [8];
  logic       rerr [8];
  for (genvar g = 0; g < 8; g++) begin : g_reg
    tmr_reg #(.W(8)) u_r (
      .clk, .rst_n, .we(we_r[g]), .d(wdata), .upset(8'h00), .q(rq[g]), .err(rerr[g])
    );
    assign terr[g] = rerr[g];
  end
  assign {trigdel, injdepth, acqctrl, mask, spdpipe, pspipe, l0lat, ctrl} =
         {rq[7], rq[6], rq[5], rq[4], rq[3], rq[2], rq[1], rq[0]};

  assign idx     = (idx_c[0] & idx_c[1]) | (idx_c[1] & idx_c[2]) | (idx_c[0] & idx_c[2]);
  assign idx_err = (idx_c[0] != idx_c[1]) || (idx_c[1] != idx_c[2]);

  // write strobes for channel 0: byte index -> register (byte 1 is CMD)
  always_comb begin
    we_r = '0;
    if (open_f && wr && cur_ch == 2'd0)
      unique case (idx)
        6'd0: we_r[0] = 1'b1;
        6'd2: we_r[1] = 1'b1;
        6'd3: we_r[2] = 1'b1;
        6'd4: we_r[3] = 1'b1;
        6'd5: we_r[4] = 1'b1;
        6'd6: we_r[5] = 1'b1;
        6'd7: we_r[6] = 1'b1;
        6'd8: we_r[7] = 1'b1;
        default: ;
      endcase
  end

  // ---- parameter words: word k complete once 8*(bytes) >= 22*(k+1) --------
  logic [263:0] pbuf_n;
  logic [8:0]   nbits;
  always_comb begin
    pbuf_n = pbuf;
    pbuf_n[8*idx +: 8] = wdata;
    nbits  = 9'(8 * (int'(idx) + 1));
  end

  // ---- frame sequencing ---------------------------------------------------
  logic [263:0] pstore [2];
  always_comb
    for (int g = 0; g < 2; g++)
      for (int k = 0; k < int'(NPARAMW); k++)
        pstore[g][22*k +: 22] = par_words[g][k];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur_ch      <= '0;
      idx_c[0]    <= '0;
      idx_c[1]    <= '0;
      idx_c[2]    <= '0;
      open_f      <= 1'b0;
      pbuf        <= '0;
      pword       <= '0;
      ibuf        <= '0;
      flags       <= '0;
      rdata       <= '0;
      ram_addr    <= '0;
      acq_cnt_rst <= 1'b0;
      inj_cnt_rst <= 1'b0;
      par_we      <= '{1'b0, 1'b0};
      par_waddr   <= '0;
      par_wdata   <= '0;
      inj_we      <= 1'b0;
      inj_wdata   <= '0;
      ham_clr     <= 1'b0;
    end else begin
      acq_cnt_rst <= 1'b0;
      inj_cnt_rst <= 1'b0;
      par_we      <= '{1'b0, 1'b0};
      inj_we      <= 1'b0;
      ham_clr     <= 1'b0;
      // the address advances once the RAM write has been done
      if (inj_we) ram_addr <= ram_addr + 1'b1;
      // sticky error flags
      if (ham_err1[0] || ham_err2[0]) flags[7] <= 1'b1;
      if (ham_err1[1] || ham_err2[1]) flags[6] <= 1'b1;
      if (adc_fault)                      flags[5] <= 1'b1;
      if (terr != 8'h00)                  flags[3] <= 1'b1;
      if (idx_err)                        flags[0] <= 1'b1;
      // byte counter: copies rewritten with the voted value (scrubbing)
      idx_c[0] <= idx ^ {5'b00000, upset_cnt};
      idx_c[1] <= idx;
      idx_c[2] <= idx;
      if (start) begin
        cur_ch <= ch;
        for (int k = 0; k < 3; k++) idx_c[k] <= '0;
        open_f <= 1'b1;
        pword  <= '0;
      end else if (stop) begin
        open_f <= 1'b0;
      end else if (open_f && wr) begin
        for (int k = 0; k < 3; k++) idx_c[k] <= idx + 6'd1;
        unique case (cur_ch)
          2'd0: if (idx == 6'd1) begin
                  acq_cnt_rst <= wdata[0];
                  inj_cnt_rst <= wdata[1];
                  if (wdata[0] || wdata[1]) ram_addr <= '0;
                end
          2'd1, 2'd2: if (idx < 6'd33) begin
                  pbuf <= pbuf_n;
                  if (nbits >= 9'(22 * (int'(pword) + 1))) begin
                    par_we[cur_ch[1]] <= 1'b1;
                    par_waddr <= pword;
                    par_wdata <= pbuf_n[22*pword +: 22];
                    pword     <= pword + 1'b1;
                  end
                end
          2'd3: begin
                  if (idx == 6'd10) begin
                    inj_we    <= 1'b1;
                    inj_wdata <= {wdata, ibuf[79:0]};
                    for (int k = 0; k < 3; k++) idx_c[k] <= '0;
                  end else begin
                    ibuf[8*idx +: 8] <= wdata;
                  end
                end
        endcase
      end else if (open_f && rd) begin
        for (int k = 0; k < 3; k++) idx_c[k] <= idx + 6'd1;
        unique case (cur_ch)
          2'd0: begin
            unique case (idx)
              6'd0:  rdata <= ctrl;
              6'd1:  rdata <= l0lat;
              6'd2:  rdata <= pspipe;
              6'd3:  rdata <= spdpipe;
              6'd4:  rdata <= mask;
              6'd5:  rdata <= acqctrl;
              6'd6:  rdata <= injdepth;
              6'd7:  begin
                       rdata   <= flags;
                       flags   <= '0;
                       ham_clr <= 1'b1;
                     end
              6'd8:  rdata <= statusclk;
              6'd9:  rdata <= acq_cnt;
              6'd10: rdata <= inj_cnt;
              6'd11: rdata <= ps_cnt;
              6'd12: rdata <= trigdel;
              default: rdata <= 8'h00;
            endcase
          end
          2'd1, 2'd2: rdata <= (idx < 6'd33) ? pstore[cur_ch[1]][8*idx +: 8] : 8'h00;
          2'd3: begin
            if (idx < 6'd10)       rdata <= acq_rdata[8*idx +: 8];
            else if (idx == 6'd10) rdata <= acq_cnt;
            else if (idx < 6'd21)  rdata <= inj_rdata[8*(idx-6'd11) +: 8];
            else if (idx == 6'd21) rdata <= inj_rdata[87:80];
            else if (idx == 6'd22) rdata <= inj_cnt;
            else                   rdata <= 8'hA5;
            if (idx == 6'd23) begin
              for (int k = 0; k < 3; k++) idx_c[k] <= '0;
              ram_addr <= ram_addr + 1'b1;
            end
          end
        endcase
      end
    end

  assign par_busy = open_f && (cur_ch == 2'd1 || cur_ch == 2'd2);
endmodule
