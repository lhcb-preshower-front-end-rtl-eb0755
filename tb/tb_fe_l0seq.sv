// Test of fe_l0seq at full pipeline depth: every clock the 80-bit record
// carries a time stamp; L0 accepts are issued at random times with L0LAT
// latencies 0, 1, 100 and 255. Each event read back must be the record of
// the accepted crossing (time of L0 minus L0LAT), sent as four 20-bit words
// in order, the first two clocks after the read request. Also fills the
// 16-event derandomiser and checks that the next accept is dropped (ovf).
module tb_fe_l0seq;
  logic clk = 0, rst_n = 0;
  logic [7:0] l0lat, wp_out;
  logic [79:0] din;
  logic l0, rd_req, svalid, sfirst, empty, ovf;
  logic [19:0] sdata;
  int checks = 0, failures = 0, novf = 0;
  int t = 0;
  int acc [$];
  int lats [4] = '{0, 1, 100, 255};

  fe_l0seq dut (.*);
  always #5 clk = ~clk;

  function automatic logic [79:0] rec(int tt);
    return {16'hA5C3 ^ 16'(tt), 32'(tt * 7), 32'(tt)};
  endfunction

  always @(posedge clk) t <= t + 1;
  assign din = rec(t);

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_event(int tt);
    logic [79:0] ev;
    @(negedge clk); rd_req = 1;
    @(negedge clk); rd_req = 0;
    checks++; if (svalid) failures++;
    for (int w = 0; w < 4; w++) begin
      @(negedge clk);
      checks++;
      if (!svalid || sfirst != (w == 0)) failures++;
      ev[20*w +: 20] = sdata;
    end
    checks++;
    if (ev != rec(tt)) begin
      failures++;
      if (failures < 10) $display("event %h exp %h (t=%0d)", ev, rec(tt), tt);
    end
  endtask

  always @(negedge clk) if (ovf) novf++;

  initial begin
    l0lat = 0; l0 = 0; rd_req = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (300) @(negedge clk);
    foreach (lats[k]) begin
      l0lat = 8'(lats[k]);
      repeat (300) @(negedge clk);
      for (int e = 0; e < 5; e++) begin
        repeat ($urandom_range(1, 20)) @(negedge clk);
        l0 = 1; acc.push_back(t - lats[k]);
        @(negedge clk); l0 = 0;
      end
      while (acc.size() > 0) read_event(acc.pop_front());
      checks++; if (!empty) failures++;
    end
    // overflow: 17 accepts with no read
    for (int e = 0; e < 17; e++) begin
      @(negedge clk); l0 = 1; if (e < 16) acc.push_back(t - 255);
      @(negedge clk); l0 = 0;
    end
    @(negedge clk);
    checks++; if (novf != 1) failures++;
    while (acc.size() > 0) read_event(acc.pop_front());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
