// Self-checking test of fe_chan_proc (one PS channel). A reference model in
// the testbench applies pedestal, gain, pile-up, threshold and transcoding
// to a random stream with alternating integrators; outputs are checked
// 4 clocks after each input. Bypass modes 10 and 11 are checked as well
// (the clocks right after a mode change are not compared).
module tb_fe_chan_proc;
  import ps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [9:0] din;
  logic sub;
  chan_par_t par;
  logic [1:0] bypass;
  logic [7:0] dout;
  logic trig;
  int checks = 0, failures = 0, ntrig = 0, nbyp = 0;
  int ein [$], eout [$], etrg [$];
  int prev_g;

  fe_chan_proc dut (.*);
  always #5 clk = ~clk;

  function automatic int tc(int v);
    if (v < 128) return v;
    if (v < 256) return 128 + (v - 128) / 2;
    if (v < 512) return 192 + (v - 256) / 8;
    return 224 + (v - 512) / 16;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int o, g, a, e;
    par = '{thr: 8'd60, alpha: 8'd97, gain1: 8'd40, gain0: 8'd10, off1: 8'd54, off0: 8'd33};
    din = 0; sub = 0; bypass = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_g = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n == 2000) bypass = 2'b10;
      if (n == 2500) bypass = 2'b11;
      din = (n % 3 == 0) ? 10'($urandom) : 10'($urandom_range(0, 200));
      sub = 1'(n);
      // reference
      o = int'(din) - int'(sub ? par.off1 : par.off0);
      if (o < 0) o = 0;
      g = o + (int'(sub ? par.gain1 : par.gain0) * (o / 2)) / 128;
      if (g > 1023) g = 1023;
      a = g - (int'(par.alpha) * prev_g) / 512;
      if (a < 0) a = 0;
      prev_g = g;
      e = (bypass == 2'b10) ? int'(din) % 256 : (bypass == 2'b11) ? int'(din) / 4 : tc(a);
      eout.push_back(e);
      etrg.push_back(a > int'(par.thr));
      if (n >= 4 && !(n >= 2000 && n < 2005) && !(n >= 2500 && n < 2505)) begin
        checks++;
        if (int'(dout) != eout[0] || int'(trig) != etrg[0]) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d/%0d exp %0d/%0d", n, dout, trig, eout[0], etrg[0]);
        end
        if (trig) ntrig++;
        if (bypass != 0) nbyp++;
      end
      if (n >= 4) begin
        void'(eout.pop_front());
        void'(etrg.pop_front());
      end
    end
    if (ntrig == 0 || nbyp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
