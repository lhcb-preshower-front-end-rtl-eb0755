// Test of prog_delay at its full depth: random data, random depths
// including 0 (bypass), 1 and the maximum 128 and a value above it (clamped).
// The output at each clock must equal the input `depth` clocks earlier.
module tb_prog_delay;
  logic clk = 0, rst_n = 0;
  logic [7:0] depth, wp_out;
  logic [15:0] din, dout;
  logic [15:0] hist [$];
  int checks = 0, failures = 0, d, dl [6] = '{0, 1, 2, 37, 128, 200};

  prog_delay #(.W(16), .DEPTH(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; depth = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (dl[k]) begin
      depth = 8'(dl[k]);
      d = (dl[k] > 128) ? 128 : dl[k];
      hist.delete();
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        din = 16'($urandom);
        hist.push_front(din);
        #1;
        if (n > d + 1) begin
          checks++;
          if (dout != hist[d]) begin
            failures++;
            if (failures < 10) $display("depth %0d n %0d got %h exp %h", d, n, dout, hist[d]);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
