// End-to-end test of one FE_PGA. ECS frames load the SEC-DED coded
// parameters (different pedestals and gains per integrator) and the control
// registers (top mapping, SPD pipeline aligned to the PS path, L0 latency,
// one masked channel). Random ADC and SPD data are then processed; a model
// in the testbench (corrections, threshold, transcoding, mapping, mask)
// predicts the trigger bits sent to the TRIG_PGA 7 clocks after the ADC
// sample, and the events read out after L0 accepts (4 x 20-bit words).
// Finally a parameter bit is upset and FLAGS must report the SEC-DED
// correction.
module tb_fe_pga;
  import ps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] adc [8];
  logic [7:0] spd_in, ps_trig, spd_out, ecs_wdata, ecs_rdata;
  logic spd_clk_in = 0, bxid_rst, l0id_rst, l0, testseq, adc_fault, vfe_rst;
  logic rd_req, svalid, sfirst, derand_empty, derand_ovf;
  logic [19:0] sdata;
  logic ecs_start, ecs_wr, ecs_rd, ecs_stop, upset_en, upset_bank;
  logic [1:0] ecs_ch;
  logic [3:0] upset_word;
  logic [4:0] upset_bit;
  int checks = 0, failures = 0, ntrig = 0, nev = 0;

  localparam int LAT = 10;
  localparam logic [7:0] MASK = 8'h20;
  int tmap [8] = '{1, 5, 7, 3, 0, 4, 6, 2};
  chan_par_t par [8];

  // expected record per sample index: {spd, trig, ps8} x 8 in output order
  logic [79:0] exp_rec [int];
  logic [7:0]  exp_trig [int], exp_spd [int];
  int n = 0;
  logic sub_m;
  int prev_g [8];

  fe_pga dut (.clk, .clk_adc(clk), .clk_spd(clk), .*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tc(int v);
    if (v < 128) return v;
    if (v < 256) return 128 + (v - 128) / 2;
    if (v < 512) return 192 + (v - 256) / 8;
    return 224 + (v - 512) / 16;
  endfunction

  task automatic frame_w(int c, logic [7:0] b []);
    @(negedge clk); ecs_start = 1; ecs_ch = 2'(c);
    @(negedge clk); ecs_start = 0;
    foreach (b[i]) begin
      ecs_wr = 1; ecs_wdata = b[i]; @(negedge clk); ecs_wr = 0;
    end
    ecs_stop = 1; @(negedge clk); ecs_stop = 0;
  endtask

  task automatic read_flags(output logic [7:0] f);
    @(negedge clk); ecs_start = 1; ecs_ch = 2'd0;
    @(negedge clk); ecs_start = 0;
    for (int i = 0; i < 8; i++) begin
      ecs_rd = 1; @(negedge clk); ecs_rd = 0; f = ecs_rdata;
    end
    ecs_stop = 1; @(negedge clk); ecs_stop = 0;
  endtask

  // model of the integrator tracking: cleared by the VFE reset, toggles
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sub_m <= 0; else sub_m <= (bxid_rst | l0id_rst) ? 1'b0 : ~sub_m;

  // drive one sample per clock and build its expectation
  task automatic drive_sample();
    logic [79:0] r;
    logic [7:0] t8, s8;
    logic s;
    // this sample reaches the corrections two clocks later
    s = sub_m;  // value after this clock edge ...
    for (int c = 0; c < 8; c++)
      adc[c] = ($urandom_range(0, 3) == 0) ? 10'($urandom) : 10'($urandom_range(20, 120));
    spd_in = 8'($urandom);
    // sub seen by the offset stage = sub_m after two more edges
    s = ~s;  // sub_m alternates: two edges later it is back to itself...
    s = ~s;
    for (int c = 0; c < 8; c++) begin
      int o, g, a;
      logic [7:0] dq;
      logic tq;
      o = int'(adc[c]) - int'(s ? par[c].off1 : par[c].off0);
      if (o < 0) o = 0;
      g = o + (int'(s ? par[c].gain1 : par[c].gain0) * (o / 2)) / 128;
      if (g > 1023) g = 1023;
      a = g - (int'(par[c].alpha) * prev_g[c]) / 512;
      if (a < 0) a = 0;
      prev_g[c] = g;
      dq = 8'(tc(a));
      tq = a > int'(par[c].thr);
      t8[tmap[c]] = tq & ~MASK[tmap[c]];
      s8[tmap[c]] = spd_in[c] & ~MASK[tmap[c]];
      r[10*tmap[c] +: 10] = {s8[tmap[c]], t8[tmap[c]], dq};
    end
    exp_rec[n] = r; exp_trig[n] = t8; exp_spd[n] = s8;
  endtask

  initial begin
    logic [7:0] b [];
    logic [263:0] stream;
    logic [7:0] f;
    logic [79:0] ev;
    int l0_at [$];
    ecs_start = 0; ecs_wr = 0; ecs_rd = 0; ecs_stop = 0; ecs_ch = 0; ecs_wdata = 0;
    upset_en = 0; upset_bank = 0; upset_word = 0; upset_bit = 0;
    bxid_rst = 0; l0id_rst = 0; l0 = 0; testseq = 0; adc_fault = 0; rd_req = 0;
    for (int c = 0; c < 8; c++) begin adc[c] = 0; prev_g[c] = 0; end
    spd_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // parameters, two groups of four channels
    for (int c = 0; c < 8; c++)
      par[c] = '{thr: 8'($urandom_range(40, 90)), alpha: 8'($urandom_range(0, 255)),
                 gain1: 8'($urandom), gain0: 8'($urandom),
                 off1: 8'($urandom_range(40, 60)), off0: 8'($urandom_range(20, 40))};
    for (int g = 0; g < 2; g++) begin
      for (int c = 0; c < 4; c++) begin
        stream[22*(3*c)   +: 22] = ham_encode({par[4*g+c].off1,  par[4*g+c].off0});
        stream[22*(3*c+1) +: 22] = ham_encode({par[4*g+c].gain1, par[4*g+c].gain0});
        stream[22*(3*c+2) +: 22] = ham_encode({par[4*g+c].thr,   par[4*g+c].alpha});
      end
      b = new[33];
      foreach (b[i]) b[i] = stream[8*i +: 8];
      frame_w(g + 1, b);
    end
    // CTRL top mapping, CMD 0, L0LAT, PSPIPE 0, SPDPIPE 4, MASK, ACQ, INJDEPTH, TRIGDEL 0
    b = '{8'h80, 8'h00, 8'(LAT), 8'd0, 8'd4, MASK, 8'h00, 8'd0, 8'd0};
    frame_w(0, b);
    read_flags(f);  // clear
    // VFE reset, then the sample stream
    @(negedge clk); bxid_rst = 1; #1;
    checks++; if (!vfe_rst) failures++;
    @(negedge clk); bxid_rst = 0; #1;
    checks++; if (vfe_rst) failures++;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      n++;
      drive_sample();
      l0 = (i > 100 && i % 37 == 0 && i < 500);
      if (l0) l0_at.push_back(n - LAT - 6);
      if (exp_trig.exists(n - 7) && n > 40) begin
        checks++;
        if (ps_trig != exp_trig[n - 7] || spd_out != exp_spd[n - 7]) begin
          failures++;
          if (failures < 10) $display("n=%0d trig %b/%b exp %b/%b", n, ps_trig, spd_out,
                                      exp_trig[n - 7], exp_spd[n - 7]);
        end
        if (ps_trig != 0) ntrig++;
      end
    end
    @(negedge clk); l0 = 0;
    // read out the accepted events
    while (l0_at.size() > 0) begin
      int k;
      k = l0_at.pop_front();
      @(negedge clk); rd_req = 1;
      @(negedge clk); rd_req = 0;
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        ev[20*w +: 20] = sdata;
        checks++; if (!svalid) failures++;
      end
      checks++;
      if (ev != exp_rec[k]) begin
        failures++;
        if (failures < 10) $display("event %h exp %h", ev, exp_rec[k]);
      end
      nev++;
    end
    checks++; if (!derand_empty) failures++;
    // SEC-DED: upset one parameter bit, expect FLAGS bit 7 and unchanged data
    @(negedge clk); upset_en = 1; upset_bank = 0; upset_word = 4'd4; upset_bit = 5'd3;
    @(negedge clk); upset_en = 0;
    repeat (20) @(negedge clk);
    read_flags(f);
    checks++; if (f[7] != 1'b1 || f[6] != 1'b0) begin failures++; $display("flags %b", f); end
    checks++; if (ntrig == 0 || nev < 8) begin failures++; $display("ntrig %0d nev %0d", ntrig, nev); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
