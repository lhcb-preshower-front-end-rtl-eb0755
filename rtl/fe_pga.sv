// FE_PGA: processing of 8 PS channels and 8 SPD bits of the front-end board.
//
// Data path, per clock (40 MHz):
//  1. ADC words and SPD bits are sampled twice: first on their own phase
//     clocks (clk_adc, clk_spd, from delay chips), then on the board clock.
//  2. When CTRL bit 1 selects it, the injection RAM replaces ADC and SPD data.
//  3. Each PS channel is corrected (pedestal, gain, pile-up), gets its
//     trigger bit and is transcoded to 8 bits (fe_chan_proc, 4 clocks). The
//     two VFE integrators alternate every clock; `sub` follows them and is
//     cleared by the VFE reset.
//  4. The channels are re-ordered to the top or bottom mapping (CTRL bit 7).
//  5. PS {trig, data} and SPD bits pass through separate 128-deep pipelines of
//     programmable depth (PSPIPE, SPDPIPE, 0 = bypass) that align them.
//  6. MASK clears the PS trigger and SPD bits of masked channels (bit = 1).
//  7. The record {SPD, trig, PS[7:0]} x 8 goes to the L0SEQ block (L0
//     pipeline, derandomiser, serialiser to the sequencer FPGA) and to the
//     spy RAM; PS trigger and SPD bits go to the TRIG_PGA through the trigger
//     pipeline (TRIGDEL).
// The VFE reset is the OR of the TTC bunch-counter and event-counter resets.
// Control comes from the ECS register bank (fe_ecs); the processing
// parameters are held SEC-DED protected in two banks of four channels.
// Signals between the byte-level ECS port and the I2C pins are outside this
// module. Latency ADC pin -> TRIG_PGA output with all pipelines bypassed:
// 2 (sampling) + 4 (processing) + 1 (output register) = 7 clocks.
module fe_pga
  import ps_pkg::*;
(
  input  logic        clk,
  input  logic        clk_adc,
  input  logic        clk_spd,
  input  logic        rst_n,
  input  logic [9:0]  adc [8],
  input  logic [7:0]  spd_in,
  input  logic        spd_clk_in,    // deserializer output clock
  input  logic        bxid_rst,
  input  logic        l0id_rst,
  input  logic        l0,
  input  logic        testseq,
  input  logic        adc_fault,     // power-switch FAULT of the ADC group
  output logic        vfe_rst,
  // to TRIG_PGA
  output logic [7:0]  ps_trig,
  output logic [7:0]  spd_out,
  // to SEQ_PGA
  input  logic        rd_req,
  output logic [19:0] sdata,
  output logic        svalid,
  output logic        sfirst,
  output logic        derand_empty,
  output logic        derand_ovf,
  // ECS byte port
  input  logic        ecs_start,
  input  logic [1:0]  ecs_ch,
  input  logic        ecs_wr,
  input  logic [7:0]  ecs_wdata,
  input  logic        ecs_rd,
  output logic [7:0]  ecs_rdata,
  input  logic        ecs_stop,
  // fault injection into the parameter banks (tie low in normal use)
  input  logic        upset_en,
  input  logic        upset_bank,
  input  logic [3:0]  upset_word,
  input  logic [4:0]  upset_bit
);
  // ---- configuration ----------------------------------------------------
  logic [7:0] ctrl, l0lat, pspipe, spdpipe, mask, acqctrl, injdepth, trigdel;
  logic       acq_cnt_rst, inj_cnt_rst, par_busy, ham_clr;
  logic       par_we [2];
  logic [3:0] par_waddr;
  hcode_t     par_wdata;
  hcode_t     par_words [2][NPARAMW];
  logic       ham_err1 [2], ham_err2 [2];
  logic [7:0] ram_addr, acq_cnt, inj_cnt, ps_cnt, statusclk;
  logic       inj_we;
  logic [87:0] inj_wdata, inj_rdata, inj_data;
  logic [79:0] acq_rdata, acq_din, rec;
  logic        inj_valid, acq_full;
  chan_par_t   par [8];
  chan_par_t   par_g [2][4];

  fe_ecs u_ecs (
    .clk, .rst_n, .start(ecs_start), .ch(ecs_ch), .wr(ecs_wr), .wdata(ecs_wdata),
    .rd(ecs_rd), .rdata(ecs_rdata), .stop(ecs_stop), .upset_cnt(1'b0),
    .ctrl, .l0lat, .pspipe, .spdpipe, .mask, .acqctrl, .injdepth, .trigdel,
    .acq_cnt_rst, .inj_cnt_rst, .par_busy, .par_we, .par_waddr, .par_wdata,
    .par_words, .ham_err1, .ham_err2, .ham_clr,
    .ram_addr, .inj_we, .inj_wdata, .inj_rdata, .acq_rdata, .acq_cnt, .inj_cnt,
    .ps_cnt, .statusclk, .adc_fault
  );

  for (genvar g = 0; g < 2; g++) begin : g_bank
    fe_param_bank u_bank (
      .clk, .rst_n, .ecs_busy(par_busy), .we(par_we[g]), .waddr(par_waddr),
      .wdata(par_wdata), .words(par_words[g]),
      .upset_en(upset_en && (upset_bank == 1'(g))), .upset_word, .upset_bit,
      .clr_flags(ham_clr), .par(par_g[g]), .err1(ham_err1[g]), .err2(ham_err2[g])
    );
    for (genvar c = 0; c < 4; c++) begin : g_c
      assign par[4*g+c] = par_g[g][c];
    end
  end

  // ---- input sampling: phase clock, then board clock ---------------------
  logic [9:0] adc_p [8], adc_s [8];
  logic [7:0] spd_p, spd_s;
  logic       spdclk_p, spdclk_s, spdclk_q, spd_stable, feadc_s;

  always_ff @(posedge clk_adc) adc_p <= adc;
  always_ff @(posedge clk_spd) begin
    spd_p    <= spd_in;
    spdclk_p <= spd_clk_in;
  end
  always_ff @(posedge clk) begin
    adc_s    <= adc_p;
    spd_s    <= spd_p;
    spdclk_s <= spdclk_p;
    spdclk_q <= spdclk_s;
    feadc_s  <= clk_adc;
  end

  // deserializer clock seen by the SPD phase: constant when the phase is good
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  spd_stable <= 1'b1;
    else if (spdclk_s != spdclk_q) spd_stable <= 1'b0;
    else if (ham_clr)            spd_stable <= 1'b1;

  assign statusclk = {spd_stable, spdclk_s, spdclk_s, spdclk_s, spdclk_q,
                      1'b1, feadc_s, 1'b1};

  // ---- injection RAM -----------------------------------------------------
  inj_cfg_t inj_cfg;
  assign inj_cfg = '{no_loop: ctrl[0], use_l0: ctrl[5], nosync: ctrl[6],
                     per_trig: ctrl[4], trig_reset: 1'b0};

  inj_ram #(.W(88), .DEPTH(256)) u_inj (
    .clk, .rst_n, .en(ctrl[1]), .cfg(inj_cfg), .depth(injdepth), .l0, .testseq,
    .cnt_rst(inj_cnt_rst), .we(inj_we), .waddr(ram_addr), .wdata(inj_wdata),
    .raddr(ram_addr), .rdata(inj_rdata), .dout(inj_data), .valid(inj_valid),
    .cnt_out(inj_cnt)
  );

  logic [9:0] raw [8];
  logic [7:0] spd_raw;
  always_comb begin
    for (int c = 0; c < 8; c++) raw[c] = ctrl[1] ? inj_data[10*c +: 10] : adc_s[c];
    spd_raw = ctrl[1] ? inj_data[87:80] : spd_s;
  end

  // ---- VFE reset and integrator tracking ----------------------------------
  logic sub;
  assign vfe_rst = bxid_rst | l0id_rst;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       sub <= 1'b0;
    else if (vfe_rst) sub <= 1'b0;
    else              sub <= ~sub;

  // ---- channel processing ---------------------------------------------------
  logic [7:0] ps8 [8];
  logic       trg [8];
  for (genvar c = 0; c < 8; c++) begin : g_ch
    fe_chan_proc u_proc (
      .clk, .rst_n, .din(raw[c]), .sub, .par(par[c]), .bypass(ctrl[3:2]),
      .dout(ps8[c]), .trig(trg[c])
    );
  end

  // ---- channel mapping ----------------------------------------------------
  logic [9:0] ps_in_m [8], ps_m [8], spd_in_m [8], spd_m [8];
  always_comb
    for (int c = 0; c < 8; c++) begin
      ps_in_m[c]  = {1'b0, trg[c], ps8[c]};
      spd_in_m[c] = {9'd0, spd_raw[c]};
    end
  fe_chan_map #(.W(10)) u_map_ps  (.top(ctrl[7]), .din(ps_in_m),  .dout(ps_m));
  fe_chan_map #(.W(10)) u_map_spd (.top(ctrl[7]), .din(spd_in_m), .dout(spd_m));

  // ---- PS and SPD synchronisation pipelines --------------------------------
  logic [71:0] ps_pipe_in, ps_pipe_out;
  logic [7:0]  spd_pipe_in, spd_pipe_out;
  logic [7:0]  unused_wp;
  always_comb
    for (int c = 0; c < 8; c++) begin
      ps_pipe_in[9*c +: 9] = ps_m[c][8:0];
      spd_pipe_in[c]       = spd_m[c][0];
    end

  prog_delay #(.W(72), .DEPTH(128)) u_ps_pipe (
    .clk, .rst_n, .depth(pspipe), .din(ps_pipe_in), .dout(ps_pipe_out), .wp_out(unused_wp)
  );
  prog_delay #(.W(8), .DEPTH(128)) u_spd_pipe (
    .clk, .rst_n, .depth(spdpipe), .din(spd_pipe_in), .dout(spd_pipe_out), .wp_out()
  );

  // ---- masking and the 80-bit record ------------------------------------
  logic [7:0] trig_m, spd_mk;
  always_comb
    for (int c = 0; c < 8; c++) begin
      trig_m[c]         = ps_pipe_out[9*c+8] & ~mask[c];
      spd_mk[c]         = spd_pipe_out[c]    & ~mask[c];
      rec[10*c +: 10]   = {spd_mk[c], trig_m[c], ps_pipe_out[9*c +: 8]};
      acq_din[8*c +: 8] = ps_pipe_out[9*c +: 8];
    end
  assign acq_din[79:64] = {spd_mk, trig_m};

  // ---- trigger path to TRIG_PGA -------------------------------------------
  logic [15:0] trig_out;
  prog_delay #(.W(16), .DEPTH(256)) u_trig_pipe (
    .clk, .rst_n, .depth(trigdel), .din({spd_mk, trig_m}), .dout(trig_out), .wp_out()
  );
  always_ff @(posedge clk) {spd_out, ps_trig} <= trig_out;

  // ---- DAQ path: L0 pipeline, derandomiser, serialiser ----------------------
  fe_l0seq u_l0seq (
    .clk, .rst_n, .l0lat, .din(rec), .l0, .rd_req, .sdata, .svalid, .sfirst,
    .empty(derand_empty), .ovf(derand_ovf), .wp_out(ps_cnt)
  );

  // ---- spy RAM ------------------------------------------------------------
  acq_cfg_t acq_cfg;
  assign acq_cfg = '{mode: acq_mode_e'(acqctrl[1:0]), use_ts: acqctrl[4], wide: acqctrl[7]};

  acq_ram #(.W(80), .DEPTH(256)) u_acq (
    .clk, .rst_n, .cfg(acq_cfg), .l0, .testseq, .cnt_rst(acq_cnt_rst), .din(acq_din),
    .raddr(ram_addr), .rdata(acq_rdata), .cnt_out(acq_cnt), .full(acq_full)
  );
endmodule
