// Test of hamming_secded: random words, encoded here with a table of data
// bit positions built independently, with 0, 1 or 2 flipped bits. One flip
// must be corrected and flagged, two must be flagged as uncorrectable.
module tb_hamming_secded;
  import ps_pkg::*;
  hcode_t cw, corr, good;
  logic err1, err2;
  int checks = 0, failures = 0;
  int pos [16] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17, 18, 19, 20, 21};

  hamming_secded dut (.*);

  function automatic hcode_t enc(logic [15:0] d);
    logic [4:0] c = '0;
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 5; k++)
        if ((pos[i] >> k) & 1) c[k] ^= d[i];
    return {^{c, d}, c, d};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int a, b;
      good = enc(16'($urandom));
      // package encoder must agree
      checks++; if (ham_encode(good[15:0]) != good) failures++;
      cw = good; #1;
      checks++; if (err1 || err2 || corr != good) failures++;
      a = $urandom_range(0, 21);
      cw = good; cw[a] = ~cw[a]; #1;
      checks++; if (!err1 || err2 || corr != good) failures++;
      b = (a + $urandom_range(1, 21)) % 22;
      cw[b] = ~cw[b]; #1;
      checks++; if (!err2 || err1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
