// End-to-end test of the TRIG_PGA. Random PS/SPD trigger bits, neighbour
// bits and ECAL addresses are applied every clock; a model in the testbench
// (FE order -> grid mapping, 2x2 ROI with board-border neighbours, SPD
// count, border outputs) predicts the outputs. ECAL and Top inputs pass an
// extra phase-clock register, so they are applied one clock earlier.
// Phases: Top mapping with all pipelines bypassed (latency 3), Bottom
// mapping with neighbours disabled and all pipelines set to 2 (latency 5),
// half-board mode with both mappings, the BCID difference read through ECS, and injection of
// ECAL addresses with the "all PS/SPD bits to one" flag.
module tb_trig_pga;
  logic clk = 0, rst_n = 0;
  logic [63:0] ps_in, spd_in;
  logic [4:0] ecal1_addr, ecal2_addr, addr1, addr2;
  logic [6:0] ecal1_bcid, ecal2_bcid, mult;
  logic [15:0] top_in, top_out;
  logic [17:0] right_in, right_out;
  logic bcid_rst, l0, testseq;
  logic [7:0] val1, val2, ecs_wdata, ecs_rdata, upset;
  logic ecs_start, ecs_wr, ecs_rd, ecs_stop;
  logic [1:0] ecs_ch;
  int checks = 0, failures = 0, n = 0, nborder = 0;
  logic [63:0] h_ps [int], h_spd [int];
  logic [15:0] h_top [int];
  logic [17:0] h_right [int];
  logic [4:0] h_a1 [int], h_a2 [int];
  logic top_map, dis_r, dis_t, half_b;

  // model of the local BCID; the ECAL BCIDs are kept 3 ahead / 5 behind it,
  // taking into account that they are compared three clocks after entry
  logic [7:0] bm;
  logic track = 0;
  always_ff @(posedge clk) bm <= bcid_rst ? 8'd12 : bm + 1'b1;
  always @(negedge clk) if (track) begin
    ecal1_bcid = 7'(bm + 8'd2 + 8'd3);
    ecal2_bcid = 7'(bm + 8'd2 - 8'd5);
  end

  trig_pga dut (.clk, .clk_ecal1(clk), .clk_ecal2(clk), .clk_top(clk), .*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame_w(int c, logic [7:0] b []);
    @(negedge clk); ecs_start = 1; ecs_ch = 2'(c);
    @(negedge clk); ecs_start = 0;
    foreach (b[i]) begin
      ecs_wr = 1; ecs_wdata = b[i]; @(negedge clk); ecs_wr = 0;
    end
    ecs_stop = 1; @(negedge clk); ecs_stop = 0;
  endtask

  task automatic read_reg(int idx, output logic [7:0] v);
    @(negedge clk); ecs_start = 1; ecs_ch = 2'd0;
    @(negedge clk); ecs_start = 0;
    for (int i = 0; i <= idx; i++) begin
      ecs_rd = 1; @(negedge clk); ecs_rd = 0; v = ecs_rdata;
    end
    ecs_stop = 1; @(negedge clk); ecs_stop = 0;
  endtask

  function automatic logic [63:0] grid(logic [63:0] v);
    logic [63:0] g;
    g = '0;
    for (int i = 0; i < 64; i++)
      if (!half_b) g[top_map ? i : 63 - i] = v[i];
      else if (i < 32) g[top_map ? i : 31 - i] = v[i];
    return g;
  endfunction

  // cell of the extended grid (rows 0..8, cols 0..8); layer 0 = PS, 1 = SPD
  function automatic logic gcell(logic [63:0] g, logic [15:0] tp, logic [17:0] rt,
                                int layer, int r, int c);
    int rtop = half_b ? 4 : 8;
    if (r < rtop && c < 8) return g[8*r + c];
    if (r == rtop && c < 8) return dis_t ? 1'b0 : tp[8*layer + c];
    if (r < rtop && c == 8) return (dis_r || (half_b && r >= 4)) ? 1'b0 : rt[8*layer + r];
    return (dis_r || dis_t) ? 1'b0 : rt[16 + layer];
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

  // run ncyc clocks of random traffic; lat = latency of PS/SPD/Right inputs
  task automatic traffic(int ncyc, int lat);
    for (int i = 0; i < ncyc; i++) begin
      @(negedge clk);
      n++;
      ps_in = {$urandom, $urandom}; spd_in = {$urandom, $urandom};
      right_in = 18'($urandom);
      top_in = 16'($urandom);
      ecal1_addr = 5'($urandom); ecal2_addr = 5'($urandom);
      h_ps[n] = ps_in; h_spd[n] = spd_in; h_right[n] = right_in;
      // ECAL and Top are one clock earlier through their phase register
      h_top[n + 1] = top_in; h_a1[n + 1] = ecal1_addr; h_a2[n + 1] = ecal2_addr;
      if (i > lat + 2) begin
        int k = n - lat;
        logic [7:0] e1, e2;
        logic [63:0] gp, gs;
        int cnt = 0;
        e1 = roi(0, h_a1[k], h_ps[k], h_spd[k], h_top[k], h_right[k]);
        e2 = half_b ? 8'h00 : roi(1, h_a2[k], h_ps[k], h_spd[k], h_top[k], h_right[k]);
        gp = grid(h_ps[k]); gs = grid(h_spd[k]);
        for (int b = 0; b < 64; b++) cnt += int'(gs[b]);
        checks++;
        if (val1 != e1 || addr1 != h_a1[k] || (!half_b && (val2 != e2 || addr2 != h_a2[k]))) begin
          failures++;
          if (failures < 10) $display("n=%0d val %h %h exp %h %h", n, val1, val2, e1, e2);
        end
        checks++; if (int'(mult) != cnt) failures++;
        checks++;
        if (top_out != {gs[7:0], gp[7:0]}) failures++;
        for (int r = 0; r < 8; r++) begin
          if (right_out[r] != gp[8*r] || right_out[8 + r] != gs[8*r]) failures++;
        end
        if (right_out[17:16] != (dis_t ? 2'b00 : {h_top[k][8], h_top[k][0]})) failures++;
        if (h_a1[k][2:0] == 3'd7 || h_a1[k][4:3] == 2'd3) nborder++;
      end
    end
  endtask

  initial begin
    logic [7:0] b [];
    logic [7:0] v;
    ps_in = 0; spd_in = 0; ecal1_addr = 0; ecal2_addr = 0; ecal1_bcid = 0; ecal2_bcid = 0;
    top_in = 0; right_in = 0; bcid_rst = 0; l0 = 0; testseq = 0; upset = 0;
    ecs_start = 0; ecs_wr = 0; ecs_rd = 0; ecs_stop = 0; ecs_ch = 0; ecs_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1. Top mapping, pipelines bypassed
    top_map = 1; dis_r = 0; dis_t = 0; half_b = 0;
    b = '{8'h01, 8'h01, 8'd0, 8'd0, 8'd0, 8'h00, 8'h00, 8'd0};
    frame_w(0, b);
    traffic(400, 3);
    // 2. Bottom mapping, neighbours disabled, all pipelines at 2
    top_map = 0; dis_r = 1; dis_t = 1;
    b = '{8'h01, 8'h0C, 8'd2, {3'd2, 2'd2, 3'd2}, 8'd0, 8'h00, 8'h00, 8'd0};
    frame_w(0, b);
    traffic(300, 5);
    // 3. half board, Top mapping, Right only
    top_map = 1; dis_r = 0; dis_t = 0; half_b = 1;
    b = '{8'h01, 8'h03, 8'd0, 8'd0, 8'd0, 8'h00, 8'h00, 8'd0};
    frame_w(0, b);
    traffic(300, 3);
    // 3b. half board, Bottom mapping
    top_map = 0;
    b = '{8'h01, 8'h02, 8'd0, 8'd0, 8'd0, 8'h00, 8'h00, 8'd0};
    frame_w(0, b);
    traffic(300, 3);
    checks++; if (nborder == 0) failures++;
    // 4. BCID difference: offset 12, ECAL BCID ahead by 3
    b = '{8'h01, 8'h01, 8'd0, 8'd0, 8'd12, 8'h00, 8'h00, 8'd0};
    frame_w(0, b);
    track = 1;
    @(negedge clk); bcid_rst = 1;
    @(negedge clk); bcid_rst = 0;
    repeat (10) @(negedge clk);
    read_reg(9, v);   // DELTABX1
    checks++; if (v != 8'd3) begin failures++; $display("deltabx1 %0d", $signed(v)); end
    read_reg(8, v);   // DELTABX2
    checks++; if (v != 8'hFB) begin failures++; $display("deltabx2 %0d", $signed(v)); end
    // 5. injection: ECAL part from the RAM, PS/SPD forced to one
    b = '{8'h05, 8'h00, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00};  // addr1 5, bit 17 set
    frame_w(1, b);
    b = '{8'h00, 8'h01, 8'd0, 8'd0, 8'd0, 8'h00, 8'h48, 8'd1};  // INJCTRL: ECAL, free running
    frame_w(0, b);
    repeat (10) @(negedge clk);
    checks++;
    if (val1 != 8'hFF || addr1 != 5'd5 || mult != 7'd64) begin
      failures++; $display("inj val1 %h addr1 %0d mult %0d", val1, addr1, mult);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
