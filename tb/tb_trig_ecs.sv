// Test of trig_ecs: 8-byte control write frame and 10-byte read frame,
// CMD counter resets, voting errors on CTRL and on the frame byte counter
// reported in FLAGS (and FLAGS cleared by reading), injection RAM write/read frames of 7 bytes and an
// acquisition RAM read frame of 10 bytes with address auto-increment.
module tb_trig_ecs;
  logic clk = 0, rst_n = 0;
  logic start, wr, rd, stop, acq_cnt_rst, inj_cnt_rst, inj_we, upset_cnt;
  logic [1:0] ch;
  logic [7:0] wdata, rdata, upset, ctrl, ecalpipe, talat, bxoffset, acqctrl, injctrl, injdepth;
  logic [7:0] deltabx1, deltabx2, ram_addr;
  logic [51:0] inj_wdata, inj_rdata;
  logic [79:0] acq_rdata;
  int checks = 0, failures = 0, nacq = 0, ninj = 0;
  logic [7:0] rb [16];

  trig_ecs dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && acq_cnt_rst) nacq++;
    if (rst_n && inj_cnt_rst) ninj++;
  end

  task automatic frame_w(int c, int n, logic [7:0] b []);
    @(negedge clk); start = 1; ch = 2'(c);
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      wr = 1; wdata = b[i]; @(negedge clk); wr = 0;
    end
    stop = 1; @(negedge clk); stop = 0;
  endtask

  task automatic frame_r(int c, int n);
    @(negedge clk); start = 1; ch = 2'(c);
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      rd = 1; @(negedge clk); rd = 0; rb[i] = rdata;
    end
    stop = 1; @(negedge clk); stop = 0;
  endtask

  initial begin
    logic [7:0] b [];
    start = 0; wr = 0; rd = 0; stop = 0; ch = 0; wdata = 0; upset = 0; upset_cnt = 0;
    deltabx1 = 8'hF3; deltabx2 = 8'h04;
    inj_rdata = 52'hA_BCDE_F012_3456;
    acq_rdata = 80'h0102030405060708090A;
    repeat (2) @(negedge clk);
    rst_n = 1;
    b = '{8'h01, 8'h05, 8'd17, 8'hA9, 8'd12, 8'h83, 8'hC4, 8'd64};
    frame_w(0, 8, b);
    checks++;
    if (ctrl != 8'h05 || ecalpipe != 17 || talat != 8'hA9 || bxoffset != 12 ||
        acqctrl != 8'h83 || injctrl != 8'hC4 || injdepth != 64) failures++;
    checks++; if (nacq != 1 || ninj != 0) failures++;
    b = '{8'h00};
    frame_w(0, 1, b);
    checks++; if (ninj != 1 || ctrl != 8'h05) failures++;
    // upset of one CTRL copy
    @(negedge clk); upset = 8'h10; @(negedge clk); upset = 0;
    checks++; if (ctrl != 8'h05) failures++;
    frame_r(0, 10);
    checks++;
    if (rb[0] != 8'h05 || rb[1] != 17 || rb[2] != 8'hA9 || rb[3] != 12 || rb[4] != 8'h20 ||
        rb[5] != 8'h83 || rb[6] != 8'hC4 || rb[7] != 64 || rb[8] != 8'h04 || rb[9] != 8'hF3) begin
      failures++;
      $display("rb %p", rb);
    end
    frame_r(0, 5);
    checks++; if (rb[4] != 8'h00) failures++;
    // upset of one copy of the frame byte counter: voted away, FLAGS bit 2
    @(negedge clk); upset_cnt = 1; @(negedge clk); upset_cnt = 0;
    frame_r(0, 10);
    checks++;
    if (rb[0] != 8'h05 || rb[3] != 12 || rb[4] != 8'h04 || rb[9] != 8'hF3) begin
      failures++;
      $display("counter upset: rb %p", rb);
    end
    frame_r(0, 5);
    checks++; if (rb[4] != 8'h00) failures++;
    // injection RAM write: 7 bytes
    b = '{8'h56, 8'h34, 8'h12, 8'hF0, 8'hDE, 8'hBC, 8'h0A};
    @(negedge clk); start = 1; ch = 2'd1;
    @(negedge clk); start = 0;
    for (int i = 0; i < 7; i++) begin
      wr = 1; wdata = b[i]; @(negedge clk); wr = 0;
      if (i == 6) begin
        checks++;
        if (!inj_we || inj_wdata != 52'hA_BCDE_F012_3456 || ram_addr != 0) failures++;
      end
    end
    stop = 1; @(negedge clk); stop = 0;
    checks++; if (ram_addr != 1) failures++;
    frame_r(1, 7);
    for (int i = 0; i < 7; i++) begin
      checks++; if (rb[i] != b[i]) failures++;
    end
    frame_r(3, 10);
    for (int i = 0; i < 10; i++) begin
      checks++; if (rb[i] != 8'(10 - i)) failures++;
    end
    checks++; if (ram_addr != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
