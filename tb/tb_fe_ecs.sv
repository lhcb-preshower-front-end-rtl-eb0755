// Test of fe_ecs: control frame write and read-back (including a short
// frame that leaves the last registers alone), CMD pulses, clear-on-read
// FLAGS (including an upset of the triple frame byte counter), a 33-byte parameter frame split into twelve 22-bit code words,
// parameter read-back, an injection RAM write frame and a 24-byte RAM read
// frame with address auto-increment.
module tb_fe_ecs;
  import ps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, wr, rd, stop, acq_cnt_rst, inj_cnt_rst, par_busy, ham_clr, inj_we, adc_fault;
  logic upset_cnt;
  logic [1:0] ch;
  logic [7:0] wdata, rdata, ctrl, l0lat, pspipe, spdpipe, mask, acqctrl, injdepth, trigdel;
  logic par_we [2];
  logic [3:0] par_waddr;
  hcode_t par_wdata, par_words [2][NPARAMW];
  logic ham_err1 [2], ham_err2 [2];
  logic [7:0] ram_addr, acq_cnt, inj_cnt, ps_cnt, statusclk;
  logic [87:0] inj_wdata, inj_rdata;
  logic [79:0] acq_rdata;
  int checks = 0, failures = 0, ncmd = 0;
  logic [7:0] rb [32];

  fe_ecs dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the parameter store lives in the testbench here
  always @(posedge clk) begin
    if (rst_n) begin
      for (int g = 0; g < 2; g++) if (par_we[g]) par_words[g][par_waddr] <= par_wdata;
      if (acq_cnt_rst || inj_cnt_rst) ncmd++;
    end
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
    hcode_t cw [12];
    logic [263:0] stream;
    start = 0; wr = 0; rd = 0; stop = 0; ch = 0; wdata = 0; adc_fault = 0; upset_cnt = 0;
    ham_err1 = '{0, 0}; ham_err2 = '{0, 0};
    acq_cnt = 8'h11; inj_cnt = 8'h22; ps_cnt = 8'h33; statusclk = 8'hF7;
    inj_rdata = {8'hCD, 80'h0123456789ABCDEF0011};
    acq_rdata = 80'hFEDCBA98765432100123;
    for (int g = 0; g < 2; g++) for (int k = 0; k < 12; k++) par_words[g][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // control frame
    b = '{8'h81, 8'h03, 8'd40, 8'd5, 8'd6, 8'h0F, 8'h93, 8'd20, 8'd3};
    frame_w(0, 9, b);
    checks++;
    if (ctrl != 8'h81 || l0lat != 40 || pspipe != 5 || spdpipe != 6 || mask != 8'h0F ||
        acqctrl != 8'h93 || injdepth != 20 || trigdel != 3) failures++;
    checks++; if (ncmd != 1) failures++;
    // short frame: only CTRL and CMD
    b = '{8'h02, 8'h00};
    frame_w(0, 2, b);
    checks++; if (ctrl != 8'h02 || l0lat != 40 || trigdel != 3) failures++;
    // read back, FLAGS cleared by reading
    ham_err1[1] = 1; adc_fault = 1; @(negedge clk); ham_err1[1] = 0; adc_fault = 0;
    frame_r(0, 13);
    checks++;
    if (rb[0] != 8'h02 || rb[1] != 40 || rb[2] != 5 || rb[3] != 6 || rb[4] != 8'h0F ||
        rb[5] != 8'h93 || rb[6] != 20 || rb[7] != 8'h60 || rb[8] != 8'hF7 ||
        rb[9] != 8'h11 || rb[10] != 8'h22 || rb[11] != 8'h33 || rb[12] != 3) begin
      failures++;
      $display("readback %p", rb);
    end
    frame_r(0, 8);
    checks++; if (rb[7] != 8'h00) failures++;
    // upset of one copy of the frame byte counter: voted away, FLAGS bit 0
    @(negedge clk); upset_cnt = 1; @(negedge clk); upset_cnt = 0;
    frame_r(0, 13);
    checks++;
    if (rb[0] != 8'h02 || rb[7] != 8'h01 || rb[12] != 3) begin
      failures++;
      $display("counter upset: rb %p", rb);
    end
    frame_r(0, 8);
    checks++; if (rb[7] != 8'h00) failures++;
    // parameter frame on channel 2 (second group)
    for (int k = 0; k < 12; k++) begin
      cw[k] = ham_encode(16'($urandom));
      stream[22*k +: 22] = cw[k];
    end
    b = new[33];
    for (int i = 0; i < 33; i++) b[i] = stream[8*i +: 8];
    frame_w(2, 33, b);
    for (int k = 0; k < 12; k++) begin
      checks++;
      if (par_words[1][k] != cw[k] || par_words[0][k] != '0) failures++;
    end
    frame_r(2, 32);
    for (int i = 0; i < 32; i++) begin
      checks++; if (rb[i] != b[i]) failures++;
    end
    // injection RAM write frame
    b = '{8'h10, 8'h11, 8'h12, 8'h13, 8'h14, 8'h15, 8'h16, 8'h17, 8'h18, 8'h19, 8'hA1};
    @(negedge clk); start = 1; ch = 2'd3;
    @(negedge clk); start = 0;
    for (int i = 0; i < 11; i++) begin
      wr = 1; wdata = b[i]; @(negedge clk); wr = 0;
      if (i == 10) begin
        checks++;
        if (!inj_we || inj_wdata != 88'hA1_19181716151413121110 || ram_addr != 0) failures++;
      end
    end
    stop = 1; @(negedge clk); stop = 0;
    checks++; if (ram_addr != 8'd1) failures++;
    // RAM read frame
    frame_r(3, 24);
    checks++;
    if (rb[0] != 8'h23 || rb[9] != 8'hFE || rb[10] != 8'h11 || rb[11] != 8'h11 ||
        rb[20] != 8'h01 || rb[21] != 8'hCD || rb[22] != 8'h22 || rb[23] != 8'hA5) failures++;
    checks++; if (ram_addr != 8'd2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
