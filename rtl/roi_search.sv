// Search of the 2x2 region of interest (ROI) around one ECAL candidate.
//
// The board's 64 cells form an 8 x 8 grid, row r (0 = bottom) and column c
// (0 = left); cell (r, c) is bit 8r + c of `ps` and `spd`. Each half board
// is 4 rows of 8 cells (rows 0-3, rows 4-7), one row per FE_PGA, matching
// one 32-channel ECAL board. The 5-bit ECAL address selects row addr[4:3]
// and column addr[2:0] of half `half`. The ROI is the addressed cell and its
// Right (c+1), Top (r+1) and Corner (r+1, c+1) neighbours. Neighbours beyond
// the board come from the Right board (`right_ps/spd`, one bit per row, plus
// the corner bits taken from the board at the upper right) and from the Top
// board (`top_ps/spd`, one bit per column).
// Result: val = {SPD top, corner, right, cell, PS top, corner, right, cell}.
// Options: `dis_right` / `dis_top` zero the neighbours from the other
// boards; `half_board` marks rows 4-7 as not instrumented (read as 0) and
// takes the Top neighbours of row 3 from the Top board. The grid
// orientation and the half-board convention are this design's own reading.
// Timing: one register stage (val and addr_out one clock after addr).
module roi_search (
  input  logic        clk,
  input  logic        half,
  input  logic [4:0]  addr,
  input  logic [63:0] ps,
  input  logic [63:0] spd,
  input  logic [7:0]  top_ps,
  input  logic [7:0]  top_spd,
  input  logic [7:0]  right_ps,
  input  logic [7:0]  right_spd,
  input  logic        corner_ps,
  input  logic        corner_spd,
  input  logic        half_board,
  input  logic        dis_right,
  input  logic        dis_top,
  output logic [7:0]  val,
  output logic [4:0]  addr_out
);
  typedef struct packed {
    logic top, corner, right, own;
  } roi_t;

  // one ROI over one layer (PS or SPD)
  function automatic roi_t roi(input logic [63:0] g, input logic [7:0] tp,
                               input logic [7:0] rt, input logic cn,
                               input int r, input int c, input int rmax);
    roi_t o;
    o.own    = g[8*r + c];
    o.right  = (c < 7) ? g[8*r + c + 1] : rt[r];
    o.top    = (r < rmax) ? g[8*(r+1) + c] : tp[c];
    if (r < rmax && c < 7)  o.corner = g[8*(r+1) + c + 1];
    else if (r < rmax)      o.corner = rt[r+1];
    else if (c < 7)         o.corner = tp[c+1];
    else                    o.corner = cn;
    return o;
  endfunction

  logic [63:0] ps_g, spd_g;
  logic [7:0]  tp_ps, tp_spd, rt_ps, rt_spd;
  logic        cn_ps, cn_spd;
  roi_t        r_ps, r_spd;
  int          row, col, rmax;

  always_comb begin
    ps_g  = half_board ? {32'd0, ps[31:0]}  : ps;
    spd_g = half_board ? {32'd0, spd[31:0]} : spd;
    rmax  = half_board ? 3 : 7;
    tp_ps  = dis_top   ? '0 : top_ps;
    tp_spd = dis_top   ? '0 : top_spd;
    rt_ps  = dis_right ? '0 : right_ps;
    rt_spd = dis_right ? '0 : right_spd;
    if (half_board) begin
      rt_ps[7:4]  = '0;
      rt_spd[7:4] = '0;
    end
    cn_ps  = (dis_top || dis_right) ? 1'b0 : corner_ps;
    cn_spd = (dis_top || dis_right) ? 1'b0 : corner_spd;
    row   = 4 * int'(half) + int'(addr[4:3]);
    col   = int'(addr[2:0]);
    r_ps  = roi(ps_g,  tp_ps,  rt_ps,  cn_ps,  row, col, rmax);
    r_spd = roi(spd_g, tp_spd, rt_spd, cn_spd, row, col, rmax);
  end

  always_ff @(posedge clk) begin
    val      <= {r_spd, r_ps};
    addr_out <= addr;
  end
endmodule
