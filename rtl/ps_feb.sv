// Digital part of the LHCb preshower / SPD front-end board (64 channels).
//
// Eight FE_PGAs each process eight PS channels (10-bit ADC samples) and the
// eight matching SPD hit bits; one TRIG_PGA builds the level-0 trigger
// information from the PS trigger bits and SPD bits of all 64 channels.
//  - FE_PGA k receives ADC channels 8k..8k+7 and SPD bits 8k..8k+7, sends
//    its PS trigger and SPD bits to the TRIG_PGA (bits 8k..8k+7) and its
//    L0-accepted events, as four 20-bit words, to the sequencer FPGA.
//  - FE_PGA 0 drives the VFE reset (OR of the TTC bunch and event counter
//    resets).
//  - The TRIG_PGA exchanges border bits with the neighbouring boards and
//    answers the two ECAL candidate addresses with the 2x2 ROI bits, plus
//    the SPD multiplicity.
// The sequencer FPGA (event building for the DAQ), the ECS FPGA (SPECS to
// I2C), ADCs, delay chips and power switches are not part of this module:
// their signals are ports. Each of the nine FPGAs has its own I2C bus
// (open-drain SDA: `i2c_sda` is the bus level, `i2c_sda_oe` pulls it low);
// the TRIG_PGA answers at 0x0C..0x0F, the FE_PGAs at FE_I2C_BASE+0..3.
// All logic runs on `clk` (40 MHz LHC clock); clk_adc, clk_spd, clk_ecal1,
// clk_ecal2 and clk_top are the phase-shifted copies used only to sample
// the corresponding inputs.
module ps_feb #(
  parameter logic [6:0] FE_I2C_BASE   = 7'h08,
  parameter logic [6:0] TRIG_I2C_BASE = 7'h0C
) (
  input  logic        clk,
  input  logic        clk_adc,
  input  logic        clk_spd,
  input  logic        clk_ecal1,
  input  logic        clk_ecal2,
  input  logic        clk_top,
  input  logic        rst_n,
  // detector data
  input  logic [9:0]  adc [64],
  input  logic [63:0] spd_in,
  input  logic        spd_clk_in,
  input  logic [7:0]  adc_fault,
  // timing and fast control
  input  logic        bxid_rst,
  input  logic        l0id_rst,
  input  logic        l0,
  input  logic        testseq,
  output logic        vfe_rst,
  // DAQ path to the sequencer FPGA
  input  logic [7:0]  rd_req,
  output logic [19:0] sdata [8],
  output logic [7:0]  svalid,
  output logic [7:0]  sfirst,
  output logic [7:0]  derand_empty,
  output logic [7:0]  derand_ovf,
  // trigger path
  input  logic [4:0]  ecal1_addr,
  input  logic [6:0]  ecal1_bcid,
  input  logic [4:0]  ecal2_addr,
  input  logic [6:0]  ecal2_bcid,
  input  logic [15:0] top_in,
  input  logic [17:0] right_in,
  output logic [7:0]  val1,
  output logic [4:0]  addr1,
  output logic [7:0]  val2,
  output logic [4:0]  addr2,
  output logic [6:0]  spd_mult,
  output logic [15:0] top_out,
  output logic [17:0] right_out,
  // ECS I2C buses: index 0..7 FE_PGAs, 8 TRIG_PGA
  input  logic [8:0]  i2c_scl,
  input  logic [8:0]  i2c_sda,
  output logic [8:0]  i2c_sda_oe,
  // fault injection (tie low in normal use)
  input  logic [7:0]  upset_en,
  input  logic        upset_bank,
  input  logic [3:0]  upset_word,
  input  logic [4:0]  upset_bit,
  input  logic [7:0]  upset_trig
);
  logic [7:0] ps_trig [8], spd_b [8];
  logic [7:0] vfe_rst_k;
  logic [63:0] ps_all, spd_all;
  logic [8:0]  ecs_start, ecs_wr, ecs_rd, ecs_stop;
  logic [1:0]  ecs_ch [9];
  logic [7:0]  ecs_wdata [9], ecs_rdata [9];

  for (genvar p = 0; p < 9; p++) begin : g_i2c
    i2c_slave #(.BASE(p == 8 ? TRIG_I2C_BASE : FE_I2C_BASE)) u_i2c (
      .clk, .rst_n, .scl(i2c_scl[p]), .sda(i2c_sda[p]), .sda_oe(i2c_sda_oe[p]),
      .start(ecs_start[p]), .ch(ecs_ch[p]), .wr(ecs_wr[p]), .wdata(ecs_wdata[p]),
      .rd(ecs_rd[p]), .rdata(ecs_rdata[p]), .stop(ecs_stop[p])
    );
  end

  for (genvar k = 0; k < 8; k++) begin : g_fe
    logic [9:0] adc_k [8];
    for (genvar c = 0; c < 8; c++) begin : g_a
      assign adc_k[c] = adc[8*k + c];
    end
    fe_pga u_fe (
      .clk, .clk_adc, .clk_spd, .rst_n, .adc(adc_k), .spd_in(spd_in[8*k +: 8]),
      .spd_clk_in, .bxid_rst, .l0id_rst, .l0, .testseq, .adc_fault(adc_fault[k]),
      .vfe_rst(vfe_rst_k[k]), .ps_trig(ps_trig[k]), .spd_out(spd_b[k]),
      .rd_req(rd_req[k]), .sdata(sdata[k]), .svalid(svalid[k]), .sfirst(sfirst[k]),
      .derand_empty(derand_empty[k]), .derand_ovf(derand_ovf[k]),
      .ecs_start(ecs_start[k]), .ecs_ch(ecs_ch[k]), .ecs_wr(ecs_wr[k]),
      .ecs_wdata(ecs_wdata[k]), .ecs_rd(ecs_rd[k]), .ecs_rdata(ecs_rdata[k]),
      .ecs_stop(ecs_stop[k]), .upset_en(upset_en[k]), .upset_bank, .upset_word,
      .upset_bit
    );
    assign ps_all[8*k +: 8]  = ps_trig[k];
    assign spd_all[8*k +: 8] = spd_b[k];
  end

  // the VFE reset is driven by FE_PGA 0
  assign vfe_rst = vfe_rst_k[0];

  trig_pga u_trig (
    .clk, .clk_ecal1, .clk_ecal2, .clk_top, .rst_n, .ps_in(ps_all), .spd_in(spd_all),
    .ecal1_addr, .ecal1_bcid, .ecal2_addr, .ecal2_bcid, .top_in, .right_in,
    .bcid_rst(bxid_rst), .l0, .testseq, .val1, .addr1, .val2, .addr2,
    .mult(spd_mult), .top_out, .right_out,
    .ecs_start(ecs_start[8]), .ecs_ch(ecs_ch[8]), .ecs_wr(ecs_wr[8]),
    .ecs_wdata(ecs_wdata[8]), .ecs_rd(ecs_rd[8]), .ecs_rdata(ecs_rdata[8]),
    .ecs_stop(ecs_stop[8]), .upset(upset_trig)
  );
endmodule
