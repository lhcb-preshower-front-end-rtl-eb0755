// Pile-up ("alpha") correction for one PS channel.
//
// About a fifth of the charge of a bunch crossing spills into the next 25 ns
// sample, so D = D(n) - alpha * D(n-1), where alpha is an unsigned 8-bit
// fraction in units of 1/512 (0 <= alpha < 0.5). D(n-1) is the previous
// sample of the same channel as seen at this stage's input. When the
// subtraction would go negative the result is set to 0.
// Timing: one register stage; the previous sample is held in a register.
module fe_alpha_corr (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] din,
  input  logic [7:0] alpha,
  output logic [9:0] dout
);
  logic [9:0]  prev;
  logic [17:0] prod;
  logic [10:0] diff;

  always_comb begin
    prod = alpha * prev;
    diff = {1'b0, din} - {2'b00, prod[17:9]};
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      prev <= '0;
      dout <= '0;
    end else begin
      prev <= din;
      dout <= diff[10] ? '0 : diff[9:0];
    end
endmodule
