// Test of spd_mult: random 64-bit SPD words of varied density, plus all-0
// and all-1; the count must equal the population count one clock later.
module tb_spd_mult;
  logic clk = 0;
  logic [63:0] spd;
  logic [6:0] mult;
  int checks = 0, failures = 0, e;

  spd_mult dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      case (n % 4)
        0: spd = {$urandom, $urandom};
        1: spd = {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
        2: spd = {$urandom, $urandom} | {$urandom, $urandom};
        default: spd = (n == 3) ? '1 : (n == 7) ? '0 : 64'(1) << (n % 64);
      endcase
      e = 0;
      for (int i = 0; i < 64; i++) e += int'(spd[i]);
      @(negedge clk);
      checks++;
      if (int'(mult) != e) begin
        failures++;
        if (failures < 10) $display("spd=%h got %0d exp %0d", spd, mult, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
