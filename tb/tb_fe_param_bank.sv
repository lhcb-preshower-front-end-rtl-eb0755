// Test of fe_param_bank: load 12 encoded words, check the parameter fields
// (word layout {off1,off0}, {gain1,gain0}, {thr,alpha} per channel), then
// flip single bits and check that the cyclic scrubber restores the word and
// flags err1; flip two bits of a word and check err2; clear the flags.
module tb_fe_param_bank;
  import ps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ecs_busy, we, upset_en, clr_flags, err1, err2;
  logic [3:0] waddr, upset_word;
  logic [4:0] upset_bit;
  hcode_t wdata, words [NPARAMW];
  chan_par_t par [4];
  logic [15:0] val [NPARAMW];
  int checks = 0, failures = 0;

  fe_param_bank dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic flip(int w, int b);
    @(negedge clk);
    upset_en = 1; upset_word = 4'(w); upset_bit = 5'(b);
    @(negedge clk);
    upset_en = 0;
  endtask

  initial begin
    ecs_busy = 0; we = 0; upset_en = 0; clr_flags = 0; waddr = 0; wdata = 0;
    upset_word = 0; upset_bit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ecs_busy = 1;
    for (int w = 0; w < 12; w++) begin
      val[w] = 16'($urandom);
      @(negedge clk);
      we = 1; waddr = 4'(w); wdata = ham_encode(val[w]);
    end
    @(negedge clk);
    we = 0; ecs_busy = 0;
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (par[c].off0 != val[3*c][7:0] || par[c].off1 != val[3*c][15:8] ||
          par[c].gain0 != val[3*c+1][7:0] || par[c].gain1 != val[3*c+1][15:8] ||
          par[c].alpha != val[3*c+2][7:0] || par[c].thr != val[3*c+2][15:8]) failures++;
    end
    repeat (20) @(negedge clk);
    checks++; if (err1 || err2) failures++;
    // single upsets are scrubbed
    for (int n = 0; n < 30; n++) begin
      int w = $urandom_range(0, 11);
      flip(w, $urandom_range(0, 21));
      repeat (14) @(negedge clk);
      checks++;
      if (words[w] != ham_encode(val[w]) || !err1) failures++;
      clr_flags = 1; @(negedge clk); clr_flags = 0;
    end
    // scrubbing pauses during ECS access
    ecs_busy = 1;
    flip(5, 3);
    repeat (14) @(negedge clk);
    checks++; if (words[5] == ham_encode(val[5])) failures++;
    ecs_busy = 0;
    repeat (14) @(negedge clk);
    checks++; if (words[5] != ham_encode(val[5])) failures++;
    clr_flags = 1; @(negedge clk); clr_flags = 0;
    // double upset detected
    flip(7, 2); flip(7, 9);
    repeat (14) @(negedge clk);
    checks++; if (!err2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
