// Test of inj_ram: load a pattern table, then run the four modes:
// synchronised burst (started by L0, runs once to depth), synchronised
// trigger-paced (one pattern per test-sequence pulse), non-synchronised
// looping burst, and non-synchronised without loop; plus the trigger
// rewind mode. Each injected pattern is checked against the table.
module tb_inj_ram;
  import ps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en, l0, testseq, cnt_rst, we, valid;
  inj_cfg_t cfg;
  logic [7:0] depth, waddr, raddr, cnt_out;
  logic [15:0] wdata, rdata, dout;
  logic [15:0] tab [256];
  int checks = 0, failures = 0, nv, expect_i;

  inj_ram #(.W(16), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count valid outputs and check they follow the table in order
  task automatic watch(int ncyc, int dep, bit wrap);
    nv = 0;
    for (int n = 0; n < ncyc; n++) begin
      @(negedge clk);
      l0 = 0; testseq = 0;
      if (valid) begin
        checks++;
        if (dout != tab[nv % dep] || (!wrap && nv >= dep)) failures++;
        nv++;
      end else begin
        checks++;
        if (dout != 0) failures++;
      end
    end
  endtask

  initial begin
    en = 0; l0 = 0; testseq = 0; cnt_rst = 0; we = 0; waddr = 0; wdata = 0; raddr = 0;
    cfg = '0; depth = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      tab[i] = 16'($urandom);
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = tab[i];
    end
    @(negedge clk); we = 0;
    raddr = 8'd77; @(negedge clk); @(negedge clk);
    checks++; if (rdata != tab[77]) failures++;
    // 1. synchronised burst started by L0, depth 20
    cfg = '{no_loop: 0, use_l0: 1, nosync: 0, per_trig: 0, trig_reset: 0};
    depth = 8'd20; en = 1;
    repeat (5) @(negedge clk);
    checks++; if (valid) failures++;        // nothing before the trigger
    l0 = 1;
    watch(60, 20, 0);
    checks++; if (nv != 20) failures++;
    // 2. synchronised, one pattern per test-sequence pulse
    en = 0; @(negedge clk);
    cfg = '{no_loop: 0, use_l0: 0, nosync: 0, per_trig: 1, trig_reset: 0};
    depth = 8'd5; en = 1;
    for (int p = 0; p < 8; p++) begin
      @(negedge clk); testseq = 1;
      @(negedge clk); testseq = 0;
      checks++;
      if (valid != (p < 5) || (p < 5 && dout != tab[p])) failures++;
      @(negedge clk);
      checks++;
      if (valid) failures++;
    end
    // 3. non-synchronised burst, looping, depth 0 = full RAM
    en = 0; @(negedge clk);
    cfg = '{no_loop: 0, use_l0: 1, nosync: 1, per_trig: 0, trig_reset: 0};
    depth = 8'd0; en = 1;
    watch(600, 256, 1);
    checks++; if (nv < 590) failures++;
    // 4. non-synchronised, no loop
    en = 0; @(negedge clk);
    cfg = '{no_loop: 1, use_l0: 1, nosync: 1, per_trig: 0, trig_reset: 0};
    depth = 8'd10; en = 1;
    watch(40, 10, 0);
    checks++; if (nv != 10) failures++;
    // 5. rewind by trigger
    en = 0; @(negedge clk);
    cfg = '{no_loop: 0, use_l0: 1, nosync: 1, per_trig: 0, trig_reset: 1};
    depth = 8'd0; en = 1;
    repeat (30) @(negedge clk);
    l0 = 1; @(negedge clk); l0 = 0;
    checks++; if (cnt_out != 0) failures++;
    @(negedge clk);
    checks++; if (dout != tab[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
