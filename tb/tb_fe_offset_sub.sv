// Self-checking test of fe_offset_sub: random samples, both integrators,
// offsets up to 255; expected value max(Dr - offset, 0) one clock later.
module tb_fe_offset_sub;
  logic clk = 0;
  logic [9:0] din, dout;
  logic sub;
  logic [7:0] off0, off1;
  int checks = 0, failures = 0;
  int exp_v;

  fe_offset_sub dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      din  = 10'($urandom);
      if (n % 7 == 0) din = 10'($urandom_range(0, 300));
      sub  = 1'($urandom);
      off0 = 8'($urandom);
      off1 = 8'($urandom);
      exp_v = int'(din) - int'(sub ? off1 : off0);
      if (exp_v < 0) exp_v = 0;
      @(negedge clk);
      checks++;
      if (int'(dout) != exp_v) begin
        failures++;
        if (failures < 10) $display("mismatch din=%0d sub=%0d got %0d exp %0d", din, sub, dout, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
