// TRIG_PGA: level-0 trigger processing of the front-end board.
//
// Inputs every 25 ns: 64 PS trigger bits and 64 SPD bits from the eight
// FE_PGAs (FE_PGA k channel j is bit 8k + j), one 5-bit candidate address
// and BCID from each of the two ECAL boards that face this board's halves,
// and the border bits of the neighbouring boards: Top (one PS and one SPD
// bit per column) and Right (one per row, plus the corner cell above-right).
// Outputs: for each ECAL address the 8-bit 2x2 ROI answer and the address
// itself (to the ECAL validation board), the 7-bit SPD multiplicity, and
// this board's own border bits for the boards below (`top_out`, its bottom
// row) and to the left (`right_out`, its left column plus the corner bit it
// received from above).
// Processing: each input has a pipeline of programmable depth (TALAT bits
// 2:0 for PS/SPD, 4:3 for Top, 7:5 for Right; ECALPIPE for both ECAL
// inputs; 0 = bypass) between an input register and the algorithm, so the
// latency from an input register to the outputs is 3 clocks plus the
// programmed depth. ECAL and Top data are first sampled on their own phase
// clocks. FE order is turned into detector geometry by the Top or Bottom
// mapping (CTRL bit 0): Top maps FE k channel j to row k, column j; Bottom
// is the same grid turned by 180 degrees (own reading of the two mapping
// figures, which number the cells in opposite order). CTRL bit 1 selects a
// half-instrumented board (FE_PGAs 0-3 only; the Bottom mapping then turns
// that 8 x 4 half by 180 degrees), bits 2 and 3 disable the Right / Top
// neighbours.
// An injection RAM (52 bits x 256) can replace the ECAL part (INJCTRL bit 6)
// and/or the neighbour part (bit 7) of the inputs, and its bit 17 forces all
// PS and SPD bits to 1. An acquisition RAM (80 bits x 256) records either
// the algorithm results or, in bypass mode, the mapped inputs. A local
// 8-bit BCID counter is loaded with BXOFFSET at each BCID reset; DELTABX1/2
// give the difference between each ECAL BCID (7 bits, own choice) and it.
module trig_pga
  import ps_pkg::*;
(
  input  logic        clk,
  input  logic        clk_ecal1,
  input  logic        clk_ecal2,
  input  logic        clk_top,
  input  logic        rst_n,
  input  logic [63:0] ps_in,
  input  logic [63:0] spd_in,
  input  logic [4:0]  ecal1_addr,
  input  logic [6:0]  ecal1_bcid,
  input  logic [4:0]  ecal2_addr,
  input  logic [6:0]  ecal2_bcid,
  input  logic [15:0] top_in,      // {SPD[7:0], PS[7:0]} by column
  input  logic [17:0] right_in,    // {corner SPD, corner PS, SPD[7:0], PS[7:0]} by row
  input  logic        bcid_rst,
  input  logic        l0,
  input  logic        testseq,
  output logic [7:0]  val1,
  output logic [4:0]  addr1,
  output logic [7:0]  val2,
  output logic [4:0]  addr2,
  output logic [6:0]  mult,
  output logic [15:0] top_out,
  output logic [17:0] right_out,
  // ECS byte port
  input  logic        ecs_start,
  input  logic [1:0]  ecs_ch,
  input  logic        ecs_wr,
  input  logic [7:0]  ecs_wdata,
  input  logic        ecs_rd,
  output logic [7:0]  ecs_rdata,
  input  logic        ecs_stop,
  input  logic [7:0]  upset       // fault injection into CTRL (tie low)
);
  logic [7:0]  ctrl, ecalpipe, talat, bxoffset, acqctrl, injctrl, injdepth;
  logic        acq_cnt_rst, inj_cnt_rst, inj_we, inj_valid;
  logic [7:0]  ram_addr, deltabx1, deltabx2, bcid, inj_cnt, acq_cnt;
  logic [51:0] inj_wdata, inj_rdata, inj_data;
  logic [79:0] acq_rdata, acq_din;
  logic        acq_full;

  trig_ecs u_ecs (
    .clk, .rst_n, .start(ecs_start), .ch(ecs_ch), .wr(ecs_wr), .wdata(ecs_wdata),
    .rd(ecs_rd), .rdata(ecs_rdata), .stop(ecs_stop), .upset, .upset_cnt(1'b0),
    .ctrl, .ecalpipe, .talat, .bxoffset, .acqctrl, .injctrl, .injdepth,
    .acq_cnt_rst, .inj_cnt_rst, .deltabx1, .deltabx2, .ram_addr, .inj_we,
    .inj_wdata, .inj_rdata, .acq_rdata
  );

  // ---- input sampling -----------------------------------------------------
  logic [11:0] e1_p, e2_p, e1_s, e2_s;
  logic [15:0] top_p, top_s;
  logic [17:0] right_s;
  logic [63:0] ps_s, spd_s;
  always_ff @(posedge clk_ecal1) e1_p  <= {ecal1_bcid, ecal1_addr};
  always_ff @(posedge clk_ecal2) e2_p  <= {ecal2_bcid, ecal2_addr};
  always_ff @(posedge clk_top)   top_p <= top_in;
  always_ff @(posedge clk) begin
    e1_s    <= e1_p;
    e2_s    <= e2_p;
    top_s   <= top_p;
    right_s <= right_in;
    ps_s    <= ps_in;
    spd_s   <= spd_in;
  end

  // ---- injection RAM --------------------------------------------------------
  inj_cfg_t inj_cfg;
  logic     inj_ecal, inj_nb, to_one;
  assign inj_ecal = injctrl[6];
  assign inj_nb   = injctrl[7];
  assign inj_cfg  = '{no_loop: injctrl[0], use_l0: injctrl[1],
                      nosync: injctrl[3:2] != 2'b00, per_trig: injctrl[3:2] == 2'b01,
                      trig_reset: injctrl[3:2] == 2'b11};

  inj_ram #(.W(52), .DEPTH(256)) u_inj (
    .clk, .rst_n, .en(inj_ecal || inj_nb), .cfg(inj_cfg), .depth(injdepth), .l0, .testseq,
    .cnt_rst(inj_cnt_rst), .we(inj_we), .waddr(ram_addr), .wdata(inj_wdata),
    .raddr(ram_addr), .rdata(inj_rdata), .dout(inj_data), .valid(inj_valid),
    .cnt_out(inj_cnt)
  );

  logic [11:0] e1_i, e2_i;
  logic [15:0] top_i;
  logic [17:0] right_i;
  logic [63:0] ps_i, spd_i;
  always_comb begin
    // ECAL injection carries one BCID for both ECAL inputs
    e1_i    = inj_ecal ? {inj_data[16:10], inj_data[4:0]} : e1_s;
    e2_i    = inj_ecal ? {inj_data[16:10], inj_data[9:5]} : e2_s;
    top_i   = inj_nb ? inj_data[33:18] : top_s;
    right_i = inj_nb ? inj_data[51:34] : right_s;
    to_one  = inj_ecal && inj_data[17];
    ps_i    = to_one ? '1 : ps_s;
    spd_i   = to_one ? '1 : spd_s;
  end

  // ---- programmable input pipelines ------------------------------------------
  logic [127:0] pss_d;
  logic [23:0]  ecal_d;
  logic [15:0]  top_d;
  logic [17:0]  right_d;
  prog_delay #(.W(128), .DEPTH(8), .DW(3)) u_pss_pipe (
    .clk, .rst_n, .depth(talat[2:0]), .din({spd_i, ps_i}), .dout(pss_d), .wp_out()
  );
  prog_delay #(.W(16), .DEPTH(4), .DW(2)) u_top_pipe (
    .clk, .rst_n, .depth(talat[4:3]), .din(top_i), .dout(top_d), .wp_out()
  );
  prog_delay #(.W(18), .DEPTH(8), .DW(3)) u_right_pipe (
    .clk, .rst_n, .depth(talat[7:5]), .din(right_i), .dout(right_d), .wp_out()
  );
  prog_delay #(.W(24), .DEPTH(256)) u_ecal_pipe (
    .clk, .rst_n, .depth(ecalpipe), .din({e2_i, e1_i}), .dout(ecal_d), .wp_out()
  );

  // ---- FE order -> detector grid ---------------------------------------------
  logic [63:0] ps_g, spd_g;
  logic        top_map, half_board;
  assign top_map    = ctrl[0];
  assign half_board = ctrl[1];
  // a half board has only FE_PGAs 0-3 (bits 0-31); the Bottom mapping then
  // turns its 8 x 4 half by 180 degrees, and rows 4-7 stay empty
  always_comb begin
    ps_g  = '0;
    spd_g = '0;
    for (int i = 0; i < 64; i++)
      if (!half_board) begin
        ps_g[top_map ? i : 63 - i]  = pss_d[i];
        spd_g[top_map ? i : 63 - i] = pss_d[64 + i];
      end else if (i < 32) begin
        ps_g[top_map ? i : 31 - i]  = pss_d[i];
        spd_g[top_map ? i : 31 - i] = pss_d[64 + i];
      end
  end

  // ---- algorithms -----------------------------------------------------------------
  logic [7:0] v1, v2;
  logic [4:0] a1, a2;
  logic [6:0] m;
  roi_search u_roi1 (
    .clk, .half(1'b0), .addr(ecal_d[4:0]), .ps(ps_g), .spd(spd_g),
    .top_ps(top_d[7:0]), .top_spd(top_d[15:8]), .right_ps(right_d[7:0]),
    .right_spd(right_d[15:8]), .corner_ps(right_d[16]), .corner_spd(right_d[17]),
    .half_board, .dis_right(ctrl[2]), .dis_top(ctrl[3]), .val(v1), .addr_out(a1)
  );
  roi_search u_roi2 (
    .clk, .half(1'b1), .addr(ecal_d[16:12]), .ps(ps_g), .spd(spd_g),
    .top_ps(top_d[7:0]), .top_spd(top_d[15:8]), .right_ps(right_d[7:0]),
    .right_spd(right_d[15:8]), .corner_ps(right_d[16]), .corner_spd(right_d[17]),
    .half_board, .dis_right(ctrl[2]), .dis_top(ctrl[3]), .val(v2), .addr_out(a2)
  );
  spd_mult u_mult (.clk, .spd(spd_g), .mult(m));

  // border bits for the neighbour boards, one stage to match the ROI
  logic [15:0] top_o;
  logic [17:0] right_o;
  always_ff @(posedge clk) begin
    top_o <= {spd_g[7:0], ps_g[7:0]};
    for (int r = 0; r < 8; r++) begin
      right_o[r]     <= ps_g[8*r];
      right_o[8 + r] <= spd_g[8*r];
    end
    right_o[16] <= ctrl[3] ? 1'b0 : top_d[0];
    right_o[17] <= ctrl[3] ? 1'b0 : top_d[8];
  end

  // ---- local BCID and ECAL time alignment ---------------------------------
  logic [6:0] d1, d2;
  assign d1 = ecal_d[11:5] - bcid[6:0];
  assign d2 = ecal_d[23:17] - bcid[6:0];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bcid     <= '0;
      deltabx1 <= '0;
      deltabx2 <= '0;
    end else begin
      bcid     <= bcid_rst ? bxoffset : bcid + 1'b1;
      deltabx1 <= {d1[6], d1};
      deltabx2 <= {d2[6], d2};
    end

  // ---- outputs ----------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      val1 <= '0; addr1 <= '0; val2 <= '0; addr2 <= '0; mult <= '0;
      top_out <= '0; right_out <= '0;
    end else begin
      val1 <= v1; addr1 <= a1; val2 <= v2; addr2 <= a2; mult <= m;
      top_out <= top_o; right_out <= right_o;
    end

  // ---- acquisition RAM ---------------------------------------------------------
  acq_cfg_t acq_cfg;
  assign acq_cfg = '{mode: acq_mode_e'(acqctrl[1:0]), use_ts: acqctrl[5], wide: acqctrl[6]};
  always_comb
    if (!acqctrl[7])
      acq_din = {5'd0, right_o, top_o, m, a2, v2, a1, v1, bcid};
    else if (!acqctrl[3])
      acq_din = {top_d, ps_g};
    else
      acq_din = {right_d[15:0], spd_g};

  acq_ram #(.W(80), .DEPTH(256)) u_acq (
    .clk, .rst_n, .cfg(acq_cfg), .l0, .testseq, .cnt_rst(acq_cnt_rst), .din(acq_din),
    .raddr(ram_addr), .rdata(acq_rdata), .cnt_out(acq_cnt), .full(acq_full)
  );
endmodule
