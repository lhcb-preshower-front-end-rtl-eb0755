// Injection RAM with its pattern sequencer (FE_PGA and TRIG_PGA).
//
// Holds up to DEPTH patterns of W bits written by ECS. When enabled, the
// patterns 0 .. depth-1 (depth register; 0 means the full RAM) replace the
// real inputs. Modes (ps_pkg::inj_cfg_t):
//  - synchronised (nosync = 0): injection starts at the trigger (L0 or
//    test-sequence, `use_l0`) and runs once up to the last pattern;
//  - non-synchronised (nosync = 1): injection runs as soon as enabled and
//    loops over the RAM unless `no_loop` is set;
//  - burst (per_trig = 0): one pattern per 40 MHz clock;
//    trigger-driven (per_trig = 1): one pattern per trigger pulse;
//  - trig_reset: the trigger rewinds the counter (TRIG_PGA mode 11).
// Between injected patterns, and when idle, `dout` is zero and `valid` low.
// `cnt_rst` (ECS CMD) rewinds the counter and re-arms a synchronised
// injection. Timing: the pattern appears one clock after the clock/trigger
// that selects it (registered read).
module inj_ram
  import ps_pkg::*;
#(
  parameter int unsigned W     = 88,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,        // injection selected
  input  inj_cfg_t                 cfg,
  input  logic [7:0]               depth,
  input  logic                     l0,
  input  logic                     testseq,
  input  logic                     cnt_rst,
  // ECS port
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata,
  // injected data
  output logic [W-1:0]             dout,
  output logic                     valid,
  output logic [7:0]               cnt_out
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] cnt, last;
  logic          run, done, trig, step;

  assign trig = cfg.use_l0 ? l0 : testseq;
  assign last = (depth == 8'd0) ? AW'(DEPTH - 1) : AW'(depth - 8'd1);
  // a pattern is emitted when the sequencer is started (or being started by
  // this trigger, or free running) and the pacing allows it
  assign step = en && !done && (run || cfg.nosync || trig) && (!cfg.per_trig || trig);

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt   <= '0;
      run   <= 1'b0;
      done  <= 1'b0;
      dout  <= '0;
      valid <= 1'b0;
    end else begin
      dout  <= step ? mem[cnt] : '0;
      valid <= step;
      if (cnt_rst || !en) begin
        cnt  <= '0;
        run  <= 1'b0;
        done <= 1'b0;
      end else if (cfg.trig_reset && trig) begin
        cnt  <= '0;
        done <= 1'b0;
      end else begin
        if (step) begin
          run <= 1'b1;
          if (cnt >= last) begin
            cnt <= '0;
            if (!cfg.nosync || cfg.no_loop) begin
              run  <= 1'b0;
              done <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      end
    end

  assign cnt_out = 8'(cnt);
endmodule
