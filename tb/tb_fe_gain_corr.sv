// Self-checking test of fe_gain_corr: random samples and eps values for both
// integrators. Checks the result against the ideal Dr*(1 + eps/256) within
// the 1 LSB error of the truncated 8 x 9 product, and saturation at 1023.
module tb_fe_gain_corr;
  logic clk = 0;
  logic [9:0] din, dout;
  logic sub;
  logic [7:0] eps0, eps1;
  int checks = 0, failures = 0, sat = 0;
  real ideal;

  fe_gain_corr dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      din  = 10'($urandom);
      sub  = 1'($urandom);
      eps0 = 8'($urandom);
      eps1 = 8'($urandom);
      ideal = real'(din) * (1.0 + real'(sub ? eps1 : eps0) / 256.0);
      @(negedge clk);
      checks++;
      if (ideal >= 1024.0) begin
        sat++;
        if (dout != 10'd1023) failures++;
      end else if (real'(dout) > ideal + 0.001 || real'(dout) < ideal - 2.0) begin
        failures++;
        if (failures < 10) $display("din=%0d eps=%0d got %0d ideal %f", din, sub ? eps1 : eps0, dout, ideal);
      end
      // gain is never below one
      if (dout < din) failures++;
    end
    if (sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
