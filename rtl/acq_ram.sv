// Acquisition ("spy") RAM with its trigger modes (FE_PGA and TRIG_PGA).
//
// Records W-bit samples of the data path for read-out through ECS. The
// trigger is L0, or the test-sequence signal when `use_ts` is set. Modes
// (ps_pkg::acq_mode_e):
//   ACQ_RAW   : record every clock in which the trigger is high;
//   ACQ_BURST : record successive clocks from the moment it is armed;
//   ACQ_EDGE  : record one sample on each leading edge of the trigger;
//   ACQ_SHAPE : each leading edge opens a gate of 8 (wide = 0) or 16 BX
//               during which every clock is recorded.
// Recording stops when the RAM is full (DEPTH samples) so that ECS can read
// a stable picture; `cnt_rst` (ECS CMD) rewinds the counter and re-arms.
// Timing: the sample present at the input in the recording clock is stored.
module acq_ram
  import ps_pkg::*;
#(
  parameter int unsigned W     = 80,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  acq_cfg_t                 cfg,
  input  logic                     l0,
  input  logic                     testseq,
  input  logic                     cnt_rst,
  input  logic [W-1:0]             din,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata,
  output logic [7:0]               cnt_out,
  output logic                     full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] cnt;
  logic          trig, trig_q, rise, rec;
  logic [4:0]    gate;

  assign trig = cfg.use_ts ? testseq : l0;
  assign rise = trig && !trig_q;

  always_comb begin
    unique case (cfg.mode)
      ACQ_RAW:   rec = trig;
      ACQ_BURST: rec = 1'b1;
      ACQ_EDGE:  rec = rise;
      ACQ_SHAPE: rec = rise || (gate != 0);
    endcase
    rec = rec && !full;
  end

  always_ff @(posedge clk) begin
    if (rec) mem[cnt] <= din;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      full   <= 1'b0;
      trig_q <= 1'b0;
      gate   <= '0;
    end else begin
      trig_q <= trig;
      if (rise)          gate <= cfg.wide ? 5'd15 : 5'd7;
      else if (gate != 0) gate <= gate - 1'b1;
      if (cnt_rst) begin
        cnt  <= '0;
        full <= 1'b0;
      end else if (rec) begin
        cnt <= cnt + 1'b1;
        if (cnt == AW'(DEPTH - 1)) full <= 1'b1;
      end
    end

  assign cnt_out = 8'(cnt);
endmodule
