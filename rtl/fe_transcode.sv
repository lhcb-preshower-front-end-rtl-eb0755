// 10-bit to 8-bit transcoding of corrected PS data for the DAQ path.
//
// A piecewise-linear code with a step that doubles or more in each range
// keeps the relative precision roughly constant:
//   d < 128        : d8 = d
//   128 <= d < 256 : d8 = 128 + (d - 128)/2
//   256 <= d < 512 : d8 = 192 + (d - 256)/8
//   512 <= d       : d8 = 224 + (d - 512)/16
// Purely combinational; the caller registers the result.
module fe_transcode (
  input  logic [9:0] d10,
  output logic [7:0] d8
);
  always_comb begin
    if (d10 < 10'd128)      d8 = d10[7:0];
    else if (d10 < 10'd256) d8 = 8'd128 + 8'((d10 - 10'd128) >> 1);
    else if (d10 < 10'd512) d8 = 8'd192 + 8'((d10 - 10'd256) >> 3);
    else                    d8 = 8'd224 + 8'((d10 - 10'd512) >> 4);
  end
endmodule
