// Pedestal (offset) subtraction for one PS channel.
//
// The VFE shapes each channel with two interleaved integrators, so every
// channel has two pedestals; `sub` selects the one of the integrator that
// produced the current sample. D = Dr - offset, with an 8-bit offset (up to
// 255 LSB) taken from a 10-bit sample. The result is clamped at 0 when the
// offset exceeds the sample (the document only says underflows are meant to
// be avoided by the choice of offsets, "underflow being 0").
// Timing: one register stage, result valid one clock after the input.
module fe_offset_sub (
  input  logic       clk,
  input  logic [9:0] din,
  input  logic       sub,     // integrator of this sample
  input  logic [7:0] off0,
  input  logic [7:0] off1,
  output logic [9:0] dout
);
  logic [7:0]  off;
  logic [10:0] diff;

  always_comb begin
    off  = sub ? off1 : off0;
    diff = {1'b0, din} - {3'b000, off};
  end

  always_ff @(posedge clk) dout <= diff[10] ? '0 : diff[9:0];
endmodule
