// Shared types, constants and the SEC-DED helper functions of the
// preshower front-end board.
//
// Widths follow the board description: 10-bit ADC data, 8-bit transcoded
// data, 8 channels per FE_PGA, 64 channels per board, 8-bit ECS registers.
// The SEC-DED code protects a 16-bit word with 5 Hamming check bits plus one
// overall parity bit (22 bits in all). The bit order of the stored code word,
// {overall parity, check[4:0], data[15:0]}, is this design's own choice.
package ps_pkg;

  localparam int unsigned NCH      = 8;    // channels per FE_PGA
  localparam int unsigned NFE      = 8;    // FE_PGAs per board
  localparam int unsigned NBOARD   = 64;   // channels per board
  localparam int unsigned ADC_W    = 10;   // ADC resolution
  localparam int unsigned DAQ_W    = 8;    // transcoded data width
  localparam int unsigned HAM_W    = 22;   // code word width (16 + 6)
  localparam int unsigned NPARAMW  = 12;   // 16-bit parameter words per 4 channels

  typedef logic [ADC_W-1:0] adc_t;
  typedef logic [DAQ_W-1:0] daq_t;
  typedef logic [HAM_W-1:0] hcode_t;

  // Per-channel processing parameters (two sub-channels for the two
  // interleaved VFE integrators).
  typedef struct packed {
    logic [7:0] thr;       // trigger threshold, ADC counts
    logic [7:0] alpha;     // pile-up fraction, alpha/512
    logic [7:0] gain1;     // gain epsilon, integrator 1, eps/256
    logic [7:0] gain0;     // gain epsilon, integrator 0
    logic [7:0] off1;      // pedestal, integrator 1
    logic [7:0] off0;      // pedestal, integrator 0
  } chan_par_t;

  // Injection sequencer configuration, common to FE_PGA and TRIG_PGA.
  typedef struct packed {
    logic no_loop;    // 1: stop after the last pattern; 0: loop forever
    logic use_l0;     // 1: trigger is L0; 0: trigger is test-sequence
    logic nosync;     // 1: free running; 0: started by the trigger
    logic per_trig;   // 1: one pattern per trigger; 0: one per clock (burst)
    logic trig_reset; // 1: the trigger rewinds the pattern counter
  } inj_cfg_t;

  // Acquisition (spy) RAM modes.
  typedef enum logic [1:0] {
    ACQ_RAW   = 2'b00,  // record every clock the trigger is high
    ACQ_BURST = 2'b01,  // record successive clocks until the RAM is full
    ACQ_EDGE  = 2'b10,  // record one sample per trigger leading edge
    ACQ_SHAPE = 2'b11   // record 8 or 16 clocks after each leading edge
  } acq_mode_e;

  typedef struct packed {
    acq_mode_e mode;
    logic      use_ts;   // 1: test-sequence replaces L0
    logic      wide;     // shaped gate: 0 = 8 BX, 1 = 16 BX
  } acq_cfg_t;

  // Position (1..21) of data bit i in the Hamming(21,16) code.
  function automatic int unsigned ham_pos(input int unsigned i);
    int unsigned p, n;
    n = 0;
    ham_pos = 0;
    for (p = 1; p <= 21; p++) begin
      if ((p & (p - 1)) != 0) begin
        if (n == i) ham_pos = p;
        n++;
      end
    end
  endfunction

  // Check bits of a 16-bit word: check[k] is the parity of the data bits
  // whose code position has bit k set.
  function automatic logic [4:0] ham_check(input logic [15:0] d);
    logic [4:0] c;
    c = '0;
    for (int unsigned i = 0; i < 16; i++)
      for (int unsigned k = 0; k < 5; k++)
        if (((ham_pos(i) >> k) & 1) != 0) c[k] = c[k] ^ d[i];
    return c;
  endfunction

  function automatic hcode_t ham_encode(input logic [15:0] d);
    logic [4:0] c;
    c = ham_check(d);
    return {^{c, d}, c, d};
  endfunction

endpackage
