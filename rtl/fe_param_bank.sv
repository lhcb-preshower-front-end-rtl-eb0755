// Hamming-protected processing parameters of one group of four channels.
//
// Holds NW = 12 code words of 22 bits (three 16-bit words per channel),
// loaded through ECS already encoded. The data bits of all words feed the datapath directly (the code is
// systematic). One shared SEC-DED decoder visits the words in turn, one per
// clock, and writes a corrected word back; it pauses while ECS writes, since
// ECS loads the words in 8-bit slices that are not complete code words.
// `err1`/`err2` flag a corrected / an uncorrectable error (sticky until
// `clr_flags`).
// Word layout (own choice): for channel c (0..3) of the group,
//   word 3c   = {off1,  off0}
//   word 3c+1 = {gain1, gain0}
//   word 3c+2 = {thr,   alpha}
// `upset_*` flips a bit of a stored word (fault injection for tests).
module fe_param_bank
  import ps_pkg::*;
#(
  parameter int unsigned NW = NPARAMW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ecs_busy,    // ECS frame in progress
  input  logic                   we,
  input  logic [3:0]             waddr,
  input  hcode_t                 wdata,
  output hcode_t                 words [NW],  // ECS read-back
  input  logic                   upset_en,
  input  logic [3:0]             upset_word,
  input  logic [4:0]             upset_bit,
  input  logic                   clr_flags,
  output chan_par_t              par [4],
  output logic                   err1,
  output logic                   err2
);
  hcode_t     mem [NW];
  logic [3:0] scan;
  hcode_t     corr;
  logic       s_err, d_err;

  hamming_secded u_dec (.cw(mem[scan]), .corr, .err1(s_err), .err2(d_err));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < int'(NW); i++) mem[i] <= '0;
      scan   <= '0;
      err1 <= 1'b0;
      err2 <= 1'b0;
    end else begin
      if (clr_flags) begin
        err1 <= 1'b0;
        err2 <= 1'b0;
      end
      if (we) begin
        mem[waddr] <= wdata;
      end else if (upset_en) begin
        mem[upset_word][upset_bit] <= ~mem[upset_word][upset_bit];
      end else if (!ecs_busy) begin
        if (s_err) begin
          mem[scan] <= corr;
          err1    <= 1'b1;
        end
        if (d_err) err2 <= 1'b1;
        scan <= (scan == 4'(NW - 1)) ? '0 : scan + 1'b1;
      end
    end

  assign words = mem;

  always_comb
    for (int c = 0; c < 4; c++) begin
      par[c].off0  = mem[3*c][7:0];
      par[c].off1  = mem[3*c][15:8];
      par[c].gain0 = mem[3*c+1][7:0];
      par[c].gain1 = mem[3*c+1][15:8];
      par[c].alpha = mem[3*c+2][7:0];
      par[c].thr   = mem[3*c+2][15:8];
    end
endmodule
