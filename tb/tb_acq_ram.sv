// Test of acq_ram: the input is a free-running counter, so each stored
// sample tells when it was taken. Checks the four modes: raw trigger
// (every clock the trigger is high), burst (successive clocks until full),
// leading edge (one per edge) and shaped gate (8 or 16 clocks per edge),
// with L0 and test-sequence triggers, and the stop when the RAM is full.
module tb_acq_ram;
  import ps_pkg::*;
  logic clk = 0, rst_n = 0;
  acq_cfg_t cfg;
  logic l0, testseq, cnt_rst, full;
  logic [15:0] din, rdata;
  logic [7:0] raddr, cnt_out;
  int checks = 0, failures = 0;

  acq_ram #(.W(16), .DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) din <= '0; else din <= din + 1'b1;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int a, output logic [15:0] v);
    @(negedge clk); raddr = 8'(a);
    @(negedge clk); v = rdata;
  endtask

  task automatic rearm();
    @(negedge clk); cnt_rst = 1;
    @(negedge clk); cnt_rst = 0;
  endtask

  initial begin
    logic [15:0] v, v0, t0;
    int pulses;
    cfg = '{mode: ACQ_RAW, use_ts: 0, wide: 0};
    l0 = 0; testseq = 0; cnt_rst = 0; raddr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // raw trigger: L0 high for 3 clocks, twice
    rearm();
    @(negedge clk); l0 = 1; t0 = din;
    repeat (3) @(negedge clk);
    l0 = 0;
    repeat (5) @(negedge clk);
    l0 = 1; repeat (3) @(negedge clk); l0 = 0;
    checks++; if (cnt_out != 6) failures++;
    rd(0, v0); rd(1, v); checks++; if (v != v0 + 1 || v0 != t0) failures++;
    rd(3, v);  checks++; if (v != v0 + 8) failures++;
    // test-sequence replaces L0
    cfg.use_ts = 1; rearm();
    l0 = 1; repeat (4) @(negedge clk); l0 = 0;
    checks++; if (cnt_out != 0) failures++;
    testseq = 1; @(negedge clk); testseq = 0;
    checks++; if (cnt_out != 1) failures++;
    // leading edge: a long pulse gives one sample
    cfg = '{mode: ACQ_EDGE, use_ts: 0, wide: 0}; rearm();
    for (pulses = 0; pulses < 4; pulses++) begin
      l0 = 1; repeat (6) @(negedge clk); l0 = 0; repeat (3) @(negedge clk);
    end
    checks++; if (cnt_out != 4) failures++;
    rd(0, v0); rd(1, v); checks++; if (v != v0 + 9) failures++;
    // shaped gate 8 and 16
    cfg = '{mode: ACQ_SHAPE, use_ts: 0, wide: 0}; rearm();
    l0 = 1; @(negedge clk); l0 = 0; repeat (20) @(negedge clk);
    checks++; if (cnt_out != 8) failures++;
    cfg.wide = 1; rearm();
    l0 = 1; @(negedge clk); l0 = 0; repeat (30) @(negedge clk);
    checks++; if (cnt_out != 16) failures++;
    rd(15, v); rd(0, v0); checks++; if (v != v0 + 15) failures++;
    // burst: fills the RAM and stops
    cfg = '{mode: ACQ_BURST, use_ts: 0, wide: 0}; rearm();
    repeat (300) @(negedge clk);
    checks++; if (!full) failures++;
    rd(0, v0); rd(255, v); checks++; if (v != v0 + 255) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
