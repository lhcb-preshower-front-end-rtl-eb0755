// Complete processing of one PS channel inside an FE_PGA.
//
// Stages: pedestal subtraction (fe_offset_sub), gain correction
// (fe_gain_corr), pile-up correction (fe_alpha_corr), then in the last stage
// the trigger bit (corrected 10-bit value compared with the 8-bit threshold,
// before transcoding as the document requires) and the 10-to-8 bit
// transcoding (fe_transcode). The order offset -> gain -> alpha follows the
// order in which the corrections are listed for the board; the integrator
// select `sub` is delayed along with the data so each stage uses the
// parameter of the integrator that produced the sample.
// Bypass (CTRL bits 3:2): 2'b10 sends the 8 LSBs and 2'b11 the 8 MSBs of the
// raw sample instead of the transcoded value; the trigger bit is still
// computed from the corrected data (own choice).
// Trigger rule: trig = corrected > threshold (strict comparison, own choice).
// Timing: 4 clocks from din to dout/trig.
module fe_chan_proc
  import ps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] din,
  input  logic       sub,
  input  chan_par_t  par,
  input  logic [1:0] bypass,
  output logic [7:0] dout,
  output logic       trig
);
  logic [9:0] d_off, d_gain, d_alpha;
  logic [7:0] d8;
  logic [1:0] sub_q;
  logic [9:0] raw_q [3];

  always_ff @(posedge clk) begin
    sub_q    <= {sub_q[0], sub};
    raw_q[0] <= din;
    raw_q[1] <= raw_q[0];
    raw_q[2] <= raw_q[1];
  end

  fe_offset_sub u_off (
    .clk, .din, .sub, .off0(par.off0), .off1(par.off1), .dout(d_off)
  );
  fe_gain_corr u_gain (
    .clk, .din(d_off), .sub(sub_q[0]), .eps0(par.gain0), .eps1(par.gain1),
    .dout(d_gain)
  );
  fe_alpha_corr u_alpha (
    .clk, .rst_n, .din(d_gain), .alpha(par.alpha), .dout(d_alpha)
  );
  fe_transcode u_tc (.d10(d_alpha), .d8);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dout <= '0;
      trig <= 1'b0;
    end else begin
      unique case (bypass)
        2'b10:   dout <= raw_q[2][7:0];
        2'b11:   dout <= raw_q[2][9:2];
        default: dout <= d8;
      endcase
      trig <= d_alpha > {2'b00, par.thr};
    end
endmodule
