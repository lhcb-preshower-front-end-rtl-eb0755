// Exhaustive test of fe_transcode: every 10-bit input against the four
// ranges of the transcoding table, plus monotonicity of the code.
module tb_fe_transcode;
  logic [9:0] d10;
  logic [7:0] d8;
  int checks = 0, failures = 0, exp_v, last;

  fe_transcode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    last = 0;
    for (int v = 0; v < 1024; v++) begin
      d10 = 10'(v);
      #1;
      if (v < 128)      exp_v = v;
      else if (v < 256) exp_v = 128 + (v - 128) / 2;
      else if (v < 512) exp_v = 192 + (v - 256) / 8;
      else              exp_v = 224 + (v - 512) / 16;
      checks++;
      if (int'(d8) != exp_v || int'(d8) < last) begin
        failures++;
        if (failures < 10) $display("d10=%0d got %0d exp %0d", v, d8, exp_v);
      end
      last = int'(d8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
