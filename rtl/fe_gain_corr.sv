// Gain correction for one PS channel.
//
// The gain is G = 1 + eps with eps an unsigned 8-bit fraction (eps/256), so
// D = Dr + eps*Dr. As in the document, only the 9 most significant bits of Dr
// enter the 8 x 9 multiplier (at most 1 LSB error); the product is scaled
// back by 2^7. Results above 1023 are saturated to 1023. Two eps values exist
// per channel, one per VFE integrator, selected by `sub`.
// Timing: one register stage.
module fe_gain_corr (
  input  logic       clk,
  input  logic [9:0] din,
  input  logic       sub,
  input  logic [7:0] eps0,
  input  logic [7:0] eps1,
  output logic [9:0] dout
);
  logic [7:0]  eps;
  logic [16:0] prod;
  logic [10:0] sum;

  always_comb begin
    eps  = sub ? eps1 : eps0;
    prod = eps * din[9:1];              // 8 x 9 multiplier
    sum  = {1'b0, din} + {1'b0, prod[16:7]};
  end

  always_ff @(posedge clk) dout <= sum[10] ? 10'd1023 : sum[9:0];
endmodule
