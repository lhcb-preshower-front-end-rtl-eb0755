// End-to-end test of the complete board (ps_feb) at its default sizes.
//
// All nine FPGAs are configured through their ECS byte ports: SEC-DED coded
// processing parameters for the 64 PS channels, then the control registers.
// Random ADC samples, SPD hits, neighbour-board border bits and ECAL
// candidate addresses are applied every clock. A model in the testbench
// (pedestal and gain correction, threshold, transcoding, FE channel mapping,
// Top/Bottom grid mapping, 2x2 ROI with border neighbours, SPD count) predicts
// the TRIG_PGA outputs clock by clock and the events read out after L0.
// Mechanisms exercised and counted (each must occur at least once):
//  processing + L0 readout, trigger bits, SPD multiplicity, border
//  neighbours, Top and Bottom mappings, programmable pipeline delays,
//  derandomiser overflow, bypass (raw ADC) read-out, injection RAM, spy RAM,
//  SEC-DED correction of an upset parameter bit, TMR voting error, VFE reset.
module tb_ps_feb;
  import ps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0]  adc [64];
  logic [63:0] spd_in;
  logic [7:0]  adc_fault, rd_req, svalid, sfirst, derand_empty, derand_ovf;
  logic        spd_clk_in = 0, bxid_rst, l0id_rst, l0, testseq, vfe_rst;
  logic [19:0] sdata [8];
  logic [4:0]  ecal1_addr, ecal2_addr, addr1, addr2;
  logic [6:0]  ecal1_bcid, ecal2_bcid, spd_mult;
  logic [15:0] top_in, top_out;
  logic [17:0] right_in, right_out;
  logic [7:0]  val1, val2;
  logic [8:0]  i2c_scl, i2c_msda, i2c_sda, i2c_sda_oe;
  int          i2c_nack;               // missing acknowledges seen by the master
  logic [7:0]  upset_en, upset_trig;
  logic        upset_bank;
  logic [3:0]  upset_word;
  logic [4:0]  upset_bit;

  ps_feb dut (.clk, .clk_adc(clk), .clk_spd(clk), .clk_ecal1(clk), .clk_ecal2(clk),
              .clk_top(clk), .*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n = 0;
  // mechanism counters
  int n_proc = 0, n_trig = 0, n_mult = 0, n_border = 0, n_top = 0, n_bot = 0;
  int n_pipe = 0, n_ovf = 0, n_bypass = 0, n_inj = 0, n_spy = 0, n_secded = 0;
  int n_tmr = 0, n_vfe = 0;

  localparam int LAT = 20;          // L0LAT
  localparam int OFF = 12, GAIN = 64, THR = 100;
  int map_top [8] = '{1, 5, 7, 3, 0, 4, 6, 2};
  int map_bot [8] = '{6, 2, 0, 4, 7, 3, 1, 5};

  // configuration seen by the model
  logic fe_top, tr_top, bypass;
  int   fe_lat, tlat;

  // histories, indexed by the clock at which a value is at the TRIG_PGA input
  logic [63:0]  h_ps [int], h_spd [int];
  logic [15:0]  h_top [int];
  logic [17:0]  h_right [int];
  logic [4:0]   h_a1 [int], h_a2 [int];
  logic [639:0] exp_rec [int];      // expected records of the 8 FE_PGAs, per sample

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- ECS
  // I2C master: one bit = 4 quarter periods of 4 clocks; SDA is wired-AND
  assign i2c_sda = i2c_msda & ~i2c_sda_oe;
  localparam int Q = 4;

  task automatic q_wait();
    repeat (Q) @(negedge clk);
  endtask

  task automatic i2c_start(logic [8:0] sel);
    i2c_msda |= sel; q_wait(); i2c_scl |= sel; q_wait();
    i2c_msda &= ~sel; q_wait(); i2c_scl &= ~sel; q_wait();
  endtask

  task automatic i2c_stop(logic [8:0] sel);
    i2c_msda &= ~sel; q_wait(); i2c_scl |= sel; q_wait();
    i2c_msda |= sel; q_wait(); q_wait();
  endtask

  // one byte per port, then the slave acknowledge
  task automatic i2c_send(logic [8:0] sel, logic [7:0] v [9]);
    for (int i = 7; i >= 0; i--) begin
      for (int p = 0; p < 9; p++) if (sel[p]) i2c_msda[p] = v[p][i];
      q_wait(); i2c_scl |= sel; q_wait(); q_wait(); i2c_scl &= ~sel; q_wait();
    end
    i2c_msda |= sel; q_wait(); i2c_scl |= sel; q_wait();
    for (int p = 0; p < 9; p++) if (sel[p] && i2c_sda[p]) i2c_nack++;
    q_wait(); i2c_scl &= ~sel; q_wait();
  endtask

  // one byte from port p, then acknowledge (more bytes) or not (last byte)
  task automatic i2c_recv(int p, logic last, output logic [7:0] v);
    i2c_msda[p] = 1'b1;
    for (int i = 7; i >= 0; i--) begin
      q_wait(); i2c_scl[p] = 1'b1; q_wait(); v[i] = i2c_sda[p];
      q_wait(); i2c_scl[p] = 1'b0; q_wait();
    end
    i2c_msda[p] = last; q_wait(); i2c_scl[p] = 1'b1; q_wait(); q_wait();
    i2c_scl[p] = 1'b0; q_wait(); i2c_msda[p] = 1'b1;
  endtask

  function automatic logic [7:0] i2c_addr(int p, int c, logic rnw);
    return {(p == 8 ? 7'h0C : 7'h08) + 7'(c), rnw};
  endfunction

  // the same frame on every port selected in `sel`
  task automatic frame_w(logic [8:0] sel, int c, logic [7:0] b []);
    logic [7:0] v [9];
    i2c_start(sel);
    for (int p = 0; p < 9; p++) v[p] = i2c_addr(p, c, 1'b0);
    i2c_send(sel, v);
    foreach (b[i]) begin
      for (int p = 0; p < 9; p++) v[p] = b[i];
      i2c_send(sel, v);
    end
    i2c_stop(sel);
  endtask

  // read nb bytes from channel c of port p
  task automatic frame_r(int p, int c, int nb, output logic [7:0] v [32]);
    logic [7:0] a [9];
    logic [8:0] sel;
    sel = 9'(1) << p;
    i2c_start(sel);
    for (int q = 0; q < 9; q++) a[q] = i2c_addr(p, c, 1'b1);
    i2c_send(sel, a);
    for (int i = 0; i < nb; i++) i2c_recv(p, i == nb - 1, v[i]);
    i2c_stop(sel);
  endtask

  // FE control frame: CTRL, CMD, L0LAT, PSPIPE, SPDPIPE, MASK, ACQCTRL, INJDEPTH, TRIGDEL
  task automatic fe_cfg(logic [8:0] sel, logic [7:0] ctrl, logic [7:0] cmd,
                        logic [7:0] acqctrl, logic [7:0] injdepth, logic [7:0] trigdel);
    logic [7:0] b [];
    b = '{ctrl, cmd, 8'(LAT), 8'd0, 8'd4, 8'h00, acqctrl, injdepth, trigdel};
    frame_w(sel, 0, b);
  endtask

  // TRIG control frame: CMD, CTRL, ECALPIPE, TALAT, BXOFFSET, ACQCTRL, INJCTRL, INJDEPTH
  task automatic tr_cfg(logic [7:0] ctrl, logic [7:0] ecalpipe, logic [7:0] talat);
    logic [7:0] b [];
    b = '{8'h01, ctrl, ecalpipe, talat, 8'd0, 8'h00, 8'h00, 8'd0};
    frame_w(9'h100, 0, b);
  endtask

  // ---------------------------------------------------------------- model
  function automatic int tc(int v);
    if (v < 128) return v;
    if (v < 256) return 128 + (v - 128) / 2;
    if (v < 512) return 192 + (v - 256) / 8;
    return 224 + (v - 512) / 16;
  endfunction

  // corrected amplitude (alpha = 0, same parameters for both integrators)
  function automatic int corr(int x);
    int o, g;
    o = x - OFF;
    if (o < 0) o = 0;
    g = o + (GAIN * (o / 2)) / 128;
    return (g > 1023) ? 1023 : g;
  endfunction

  function automatic int fe_pos(int c);
    return fe_top ? map_top[c] : map_bot[c];
  endfunction

  function automatic logic [63:0] grid(logic [63:0] v);
    logic [63:0] g;
    for (int i = 0; i < 64; i++) g[tr_top ? i : 63 - i] = v[i];
    return g;
  endfunction

  // cell (r, c) of the grid extended by the Top row (r = 8) and Right column (c = 8)
  function automatic logic gcell(logic [63:0] g, logic [15:0] tp, logic [17:0] rt,
                                 int layer, int r, int c);
    if (r < 8 && c < 8) return g[8*r + c];
    if (r == 8 && c < 8) return tp[8*layer + c];
    if (r < 8 && c == 8) return rt[8*layer + r];
    return rt[16 + layer];
  endfunction

  function automatic logic [7:0] roi(int h, logic [4:0] a, logic [63:0] p, logic [63:0] s,
                                     logic [15:0] tp, logic [17:0] rt);
    int r = 4 * h + int'(a[4:3]), c = int'(a[2:0]);
    logic [63:0] gp = grid(p), gs = grid(s);
    return {gcell(gs, tp, rt, 1, r + 1, c), gcell(gs, tp, rt, 1, r + 1, c + 1),
            gcell(gs, tp, rt, 1, r, c + 1), gcell(gs, tp, rt, 1, r, c),
            gcell(gp, tp, rt, 0, r + 1, c), gcell(gp, tp, rt, 0, r + 1, c + 1),
            gcell(gp, tp, rt, 0, r, c + 1), gcell(gp, tp, rt, 0, r, c)};
  endfunction

  // ---------------------------------------------------------------- traffic
  // ncyc clocks of random data; L0 every `l0_every` clocks (0 = none) with
  // the accepted sample numbers queued in `acc`.
  task automatic traffic(int ncyc, int l0_every, ref int acc [$]);
    for (int i = 0; i < ncyc; i++) begin
      logic [63:0] ps_b, spd_b;
      logic [639:0] r;
      @(negedge clk);
      n++;
      for (int k = 0; k < 8; k++)
        for (int c = 0; c < 8; c++) begin
          int ch, a, m;
          ch = 8 * k + c;
          adc[ch] = ($urandom_range(0, 5) == 0) ? 10'($urandom) : 10'($urandom_range(0, 110));
          spd_in[ch] = ($urandom_range(0, 3) == 0);
          a = corr(int'(adc[ch]));
          m = 8 * k + fe_pos(c);
          ps_b[m] = (a > THR);
          spd_b[m] = spd_in[ch];
          r[10*m +: 10] = {spd_b[m], ps_b[m], bypass ? adc[ch][7:0] : 8'(tc(a))};
        end
      exp_rec[n] = r;
      h_ps[n + fe_lat] = ps_b; h_spd[n + fe_lat] = spd_b;
      right_in = 18'($urandom); h_right[n] = right_in;
      top_in = 16'($urandom); ecal1_addr = 5'($urandom); ecal2_addr = 5'($urandom);
      h_top[n + 1] = top_in; h_a1[n + 1] = ecal1_addr; h_a2[n + 1] = ecal2_addr;
      l0 = (l0_every != 0 && i > 60 && i % l0_every == 0 && i < ncyc - 40);
      if (l0) acc.push_back(n - LAT - 6);
      if (i > fe_lat + tlat + 4) begin
        int k, cnt;
        logic [7:0] e1, e2;
        logic [63:0] gp, gs;
        k = n - tlat;
        cnt = 0;
        e1 = roi(0, h_a1[k], h_ps[k], h_spd[k], h_top[k], h_right[k]);
        e2 = roi(1, h_a2[k], h_ps[k], h_spd[k], h_top[k], h_right[k]);
        gp = grid(h_ps[k]); gs = grid(h_spd[k]);
        for (int b = 0; b < 64; b++) cnt += int'(gs[b]);
        checks++;
        if (val1 != e1 || val2 != e2 || addr1 != h_a1[k] || addr2 != h_a2[k]) begin
          failures++;
          if (failures < 10) $display("n=%0d val %h %h exp %h %h", n, val1, val2, e1, e2);
        end
        checks++; if (int'(spd_mult) != cnt) failures++;
        checks++;
        if (top_out != {gs[7:0], gp[7:0]}) failures++;
        for (int rr = 0; rr < 8; rr++)
          if (right_out[rr] != gp[8*rr] || right_out[8 + rr] != gs[8*rr]) failures++;
        if (right_out[17:16] != {h_top[k][8], h_top[k][0]}) failures++;
        if (val1 != 0 || val2 != 0) n_trig++;
        if (spd_mult != 0) n_mult++;
        if ((h_a1[k][2:0] == 3'd7 && (val1[5] | val1[1])) ||
            (h_a2[k][4:3] == 2'd3 && (val2[7] | val2[3]))) n_border++;
        if (tr_top) n_top++; else n_bot++;
        if (fe_lat > 7 || tlat > 3) n_pipe++;
      end
    end
    l0 = 0;
  endtask

  // read one event from every FE_PGA and compare it with sample s
  task automatic read_event(int s, logic chk);
    logic [639:0] ev;
    @(negedge clk); rd_req = 8'hFF;
    @(negedge clk); rd_req = 8'h00;
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++) ev[80*k + 20*w +: 20] = sdata[k];
      checks++; if (svalid != 8'hFF || sfirst != ((w == 0) ? 8'hFF : 8'h00)) failures++;
    end
    if (chk) begin
      checks++;
      if (ev != exp_rec[s]) begin
        failures++;
        if (failures < 10) $display("event %0d:\n %h\n exp %h", s, ev, exp_rec[s]);
      end else if (bypass) n_bypass++;
      else n_proc++;
    end
  endtask

  task automatic quiet(int ncyc);
    for (int i = 0; i < ncyc; i++) begin
      @(negedge clk);
      n++;
      for (int ch = 0; ch < 64; ch++) adc[ch] = 0;
      spd_in = 0; right_in = 0; top_in = 0; ecal1_addr = 0; ecal2_addr = 0;
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  initial begin
    logic [7:0] b [];
    logic [7:0] v [32];
    logic [263:0] stream;
    logic [87:0] inj_word;
    logic [79:0] acq_exp, acq_got;
    int acc [$];
    for (int ch = 0; ch < 64; ch++) adc[ch] = 0;
    spd_in = 0; adc_fault = 0; rd_req = 0; bxid_rst = 0; l0id_rst = 0; l0 = 0; testseq = 0;
    ecal1_addr = 0; ecal2_addr = 0; ecal1_bcid = 0; ecal2_bcid = 0; top_in = 0; right_in = 0;
    i2c_scl = '1; i2c_msda = '1; i2c_nack = 0;
    upset_en = 0; upset_trig = 0; upset_bank = 0; upset_word = 0; upset_bit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // processing parameters of all 64 channels (both groups of every FE_PGA)
    for (int c = 0; c < 4; c++) begin
      stream[22*(3*c)   +: 22] = ham_encode({8'(OFF), 8'(OFF)});
      stream[22*(3*c+1) +: 22] = ham_encode({8'(GAIN), 8'(GAIN)});
      stream[22*(3*c+2) +: 22] = ham_encode({8'(THR), 8'd0});
    end
    b = new[33];
    foreach (b[i]) b[i] = stream[8*i +: 8];
    frame_w(9'h0FF, 1, b);
    frame_w(9'h0FF, 2, b);

    // VFE reset from the TTC resets
    @(negedge clk); bxid_rst = 1; #1;
    checks++; if (vfe_rst) n_vfe++; else failures++;
    @(negedge clk); bxid_rst = 0; l0id_rst = 1; #1;
    checks++; if (vfe_rst) n_vfe++; else failures++;
    @(negedge clk); l0id_rst = 0; #1;
    checks++; if (vfe_rst) failures++;

    // ---- A: Top mapping, pipelines bypassed, L0 accepts read out --------
    fe_top = 1; tr_top = 1; bypass = 0; fe_lat = 7; tlat = 3;
    fe_cfg(9'h0FF, 8'h80, 8'h00, 8'h00, 8'd0, 8'd0);
    tr_cfg(8'h01, 8'd0, 8'd0);
    frame_r(3, 0, 8, v);              // clear FLAGS of FE 3
    frame_r(8, 0, 5, v);              // clear FLAGS of the TRIG_PGA
    acc.delete();
    fork
      traffic(500, 31, acc);
      begin
        // upset one parameter bit of FE 3 and one TMR copy in the TRIG_PGA
        // while data flows: the outputs must stay correct
        repeat (200) @(negedge clk);
        upset_en = 8'h08; upset_bank = 0; upset_word = 4'd1; upset_bit = 5'd4;
        upset_trig = 8'h01;
        @(negedge clk); upset_en = 0; upset_trig = 0;
      end
    join
    while (acc.size() > 0) begin
      int s;
      s = acc.pop_front();
      read_event(s, 1'b1);
    end
    frame_r(3, 0, 8, v);
    checks++; if (v[7][7]) n_secded++; else begin failures++; $display("FE flags %b", v[7]); end
    frame_r(8, 0, 5, v);
    checks++; if (v[4][5]) n_tmr++; else begin failures++; $display("TRIG flags %b", v[4]); end

    // ---- derandomiser overflow: 20 accepts, no read-out -------------------
    repeat (20) begin
      @(negedge clk); l0 = 1;
      #1; if (derand_ovf == 8'hFF) n_ovf++;
      @(negedge clk); l0 = 0;
      #1; if (derand_ovf == 8'hFF) n_ovf++;
    end
    checks++; if (n_ovf != 4) begin failures++; $display("overflow pulses %0d", n_ovf); end
    repeat (16) read_event(0, 1'b0);
    checks++; if (derand_empty != 8'hFF) failures++;

    // ---- B: Bottom mapping, trigger pipelines in use ----------------------
    fe_top = 0; tr_top = 0; fe_lat = 7 + 3; tlat = 5;
    fe_cfg(9'h0FF, 8'h00, 8'h00, 8'h00, 8'd0, 8'd3);
    tr_cfg(8'h00, 8'd2, {3'd2, 2'd2, 3'd2});
    acc.delete();
    traffic(400, 0, acc);

    // ---- C: raw ADC read-out (bypass), Top mapping ------------------------
    fe_top = 1; tr_top = 1; bypass = 1; fe_lat = 7; tlat = 3;
    fe_cfg(9'h0FF, 8'h88, 8'h00, 8'h00, 8'd0, 8'd0);
    tr_cfg(8'h01, 8'd0, 8'd0);
    acc.delete();
    traffic(300, 29, acc);
    while (acc.size() > 0) begin
      int s;
      s = acc.pop_front();
      read_event(s, 1'b1);
    end
    bypass = 0;

    // ---- D: injection into FE 0 and spy RAM -------------------------------
    fe_cfg(9'h0FF, 8'h80, 8'h03, 8'h00, 8'd0, 8'd0);  // rewind RAM address
    for (int c = 0; c < 8; c++) inj_word[10*c +: 10] = 10'(500 + 40 * c);
    inj_word[87:80] = 8'hA5;
    b = new[11];
    foreach (b[i]) b[i] = inj_word[8*i +: 8];
    frame_w(9'h001, 3, b);
    // FE 0: injection free running over one word, spy RAM on the test sequence
    fe_cfg(9'h001, 8'hC2, 8'h03, 8'h10, 8'd1, 8'd0);
    quiet(30);
    // expected TRIG_PGA answer: FE 0 is row 0, all PS bits set
    begin
      logic [63:0] ps_b, spd_b;
      logic [7:0] e1;
      ps_b = '0; spd_b = '0;
      for (int c = 0; c < 8; c++) begin
        ps_b[map_top[c]]  = 1'b1;
        spd_b[map_top[c]] = inj_word[80 + c];
        acq_exp[8*map_top[c] +: 8] = 8'(tc(corr(500 + 40 * c)));
        acq_exp[64 + map_top[c]] = 1'b1;
        acq_exp[72 + map_top[c]] = inj_word[80 + c];
      end
      e1 = roi(0, 5'd0, ps_b, spd_b, 16'd0, 18'd0);
      checks++;
      if (val1 == e1 && spd_mult == 7'd4) n_inj++;
      else begin failures++; $display("inj val1 %h exp %h mult %0d", val1, e1, spd_mult); end
    end
    @(negedge clk); testseq = 1;
    repeat (4) @(negedge clk);
    testseq = 0;
    repeat (4) @(negedge clk);
    frame_r(0, 3, 24, v);
    for (int i = 0; i < 10; i++) acq_got[8*i +: 8] = v[i];
    checks++;
    if (acq_got == acq_exp && v[10] != 8'd0) n_spy++;
    else begin failures++; $display("spy %h exp %h cnt %0d", acq_got, acq_exp, v[10]); end
    checks++;
    for (int i = 0; i < 11; i++) if (v[11 + i] != inj_word[8*i +: 8]) failures++;

    // ---- I2C: every byte so far acknowledged; a foreign address is not -----
    checks++; if (i2c_nack != 0) begin failures++; $display("i2c nack %0d", i2c_nack); end
    begin
      logic [7:0] a [9];
      foreach (a[q]) a[q] = 8'hA0;
      i2c_start(9'h001); i2c_send(9'h001, a); i2c_stop(9'h001);
    end
    checks++; if (i2c_nack != 1) failures++;

    // ---- every mechanism must have happened -------------------------------
    $display("proc %0d trig %0d mult %0d border %0d top %0d bottom %0d pipe %0d",
             n_proc, n_trig, n_mult, n_border, n_top, n_bot, n_pipe);
    $display("overflow %0d bypass %0d injection %0d spy %0d secded %0d tmr %0d vfe %0d",
             n_ovf, n_bypass, n_inj, n_spy, n_secded, n_tmr, n_vfe);
    begin
      int cnt [14];
      cnt = '{n_proc, n_trig, n_mult, n_border, n_top, n_bot, n_pipe, n_ovf,
              n_bypass, n_inj, n_spy, n_secded, n_tmr, n_vfe};
      foreach (cnt[i]) begin
        checks++; if (cnt[i] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
