// Test of fe_chan_map: each input channel carries its own index; the output
// must follow the top and bottom tables, and both must be permutations.
module tb_fe_chan_map;
  logic top;
  logic [9:0] din [8], dout [8];
  int checks = 0, failures = 0;
  int tmap [8] = '{1, 5, 7, 3, 0, 4, 6, 2};
  int bmap [8] = '{6, 2, 0, 4, 7, 3, 1, 5};

  fe_chan_map #(.W(10)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int t = 0; t < 2; t++) begin
        top = 1'(t);
        for (int i = 0; i < 8; i++) din[i] = 10'($urandom);
        #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (dout[t ? tmap[i] : bmap[i]] != din[i]) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
