// Pipeline with a programmable ("virtual") depth.
//
// The output is the input delayed by `depth` clocks, 1 <= depth <= DEPTH;
// depth = 0 bypasses the pipeline (output = input, combinationally), as the
// document specifies for its PS, SPD, trigger and TRIG_PGA input pipelines.
// Depths above DEPTH are clamped to DEPTH. The storage is a circular buffer
// written every clock at `wp`; for depth >= 2 the registered read address
// is wp - (depth - 1), for depth = 1 a plain register is used.
// The write pointer is exported (used as the PS RAM counter in FE_PGA).
module prog_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 128,
  parameter int unsigned DW    = 8     // width of the depth control
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] depth,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout,
  output logic [7:0]    wp_out
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, ra;
  logic [W-1:0]  q;
  logic [DW:0]   d_eff;

  always_comb begin
    d_eff = ({1'b0, depth} > (DW+1)'(DEPTH)) ? (DW+1)'(DEPTH) : {1'b0, depth};
    ra    = wp - AW'(d_eff - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) wp <= '0;
    else        wp <= wp + 1'b1;

  always_ff @(posedge clk) begin
    mem[wp] <= din;
    if (d_eff == 1) q <= din;
    else            q <= mem[ra];
  end

  assign dout   = (d_eff == 0) ? din : q;
  assign wp_out = 8'(wp);
endmodule
