// SEC-DED decoder for one 22-bit code word (16 data + 5 Hamming + 1 parity).
//
// Corrects any single flipped bit and detects any two flipped bits of a
// 16-bit register, as used for the FE_PGA processing parameters. The code
// word layout is {overall parity, check[4:0], data[15:0]}; check bit k covers
// the data bits whose Hamming(21,16) position has bit k set (ps_pkg::ham_pos).
// The syndrome is the XOR of the stored and the recomputed check bits: with
// an overall-parity error it is the position of the single flipped bit (0 for
// the parity bit itself); without one, a non-zero syndrome means two errors.
// Purely combinational.
module hamming_secded
  import ps_pkg::*;
(
  input  hcode_t      cw,
  output hcode_t      corr,     // corrected code word
  output logic        err1,   // one error found and corrected
  output logic        err2    // two errors detected (not corrected)
);
  logic [4:0] syn;
  logic       par_err;

  always_comb begin
    syn     = ham_check(cw[15:0]) ^ cw[20:16];
    par_err = ^cw;
    corr    = cw;
    err1  = 1'b0;
    err2  = 1'b0;
    if (par_err) begin
      err1 = 1'b1;
      if (syn == 5'd0) corr[21] = ~cw[21];
      else if ((syn & (syn - 5'd1)) == 5'd0) begin
        // a check bit: positions 1,2,4,8,16 are check[0..4]
        for (int k = 0; k < 5; k++)
          if (syn == 5'(1 << k)) corr[16+k] = ~cw[16+k];
      end else begin
        for (int i = 0; i < 16; i++)
          if (5'(ham_pos(i)) == syn) corr[i] = ~cw[i];
      end
    end else if (syn != 5'd0) begin
      err2 = 1'b1;
    end
  end
endmodule
