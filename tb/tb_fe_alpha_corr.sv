// Self-checking test of fe_alpha_corr: a random sample stream with random
// alpha; expected D(n) - floor(alpha*D(n-1)/512), clamped at 0. Also checks
// the underflow case (large previous sample, small current one).
module tb_fe_alpha_corr;
  logic clk = 0, rst_n = 0;
  logic [9:0] din, dout;
  logic [7:0] alpha;
  int checks = 0, failures = 0, uflow = 0;
  int prev, exp_v;

  fe_alpha_corr dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; alpha = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      din   = (n % 5 == 0) ? 10'($urandom_range(0, 40)) : 10'($urandom);
      alpha = 8'($urandom);
      exp_v = int'(din) - (int'(alpha) * prev) / 512;
      if (exp_v < 0) begin
        exp_v = 0;
        uflow++;
      end
      @(posedge clk);
      prev = din;
      #1;
      checks++;
      if (int'(dout) != exp_v) begin
        failures++;
        if (failures < 10) $display("din=%0d a=%0d got %0d exp %0d", din, alpha, dout, exp_v);
      end
    end
    if (uflow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
