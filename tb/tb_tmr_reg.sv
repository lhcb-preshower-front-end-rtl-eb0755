// Test of tmr_reg: writes must appear on q; an upset of one copy must not
// change q, must raise err, and must be healed the next clock.
module tb_tmr_reg;
  logic clk = 0, rst_n = 0, we, err;
  logic [7:0] d, upset, q, val;
  int checks = 0, failures = 0, nerr = 0;

  tmr_reg #(.W(8), .RESET_VAL(8'h5A)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; d = 0; upset = 0;
    repeat (2) @(negedge clk);
    checks++; if (q != 8'h5A) failures++;
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      val = 8'($urandom);
      we = 1; d = val;
      @(negedge clk);
      we = 0;
      checks++; if (q != val || err) failures++;
      // flip random bits of one copy
      upset = 8'($urandom) | 8'h01;
      @(negedge clk);
      upset = 0;
      checks++;
      if (q != val) failures++;
      if (err) nerr++; else failures++;
      @(negedge clk);
      checks++; if (q != val || err) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
