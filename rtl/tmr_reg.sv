// Triple-redundant register with majority voting.
//
// Configuration and state registers of the board are protected against
// single-event upsets by triple modular redundancy. Three copies are written
// together; the output is the bitwise majority of the three, and every clock
// the voted value is written back so that a single upset copy heals itself.
// `err` pulses for one clock when the copies disagree (an upset was seen).
// `upset_*` are test inputs that flip one copy (tie to 0 in normal use).
// Timing: write takes effect on the next clock edge.
module tmr_reg #(
  parameter int unsigned W         = 8,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  input  logic [W-1:0] upset,   // bits to flip in copy 0 (fault injection)
  output logic [W-1:0] q,
  output logic         err
);
  logic [W-1:0] c0, c1, c2;

  assign q   = (c0 & c1) | (c1 & c2) | (c0 & c2);
  assign err = (c0 != c1) || (c1 != c2);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      c0 <= RESET_VAL;
      c1 <= RESET_VAL;
      c2 <= RESET_VAL;
    end else if (we) begin
      c0 <= d;
      c1 <= d;
      c2 <= d;
    end else begin
      c0 <= q ^ upset;
      c1 <= q;
      c2 <= q;
    end
endmodule
