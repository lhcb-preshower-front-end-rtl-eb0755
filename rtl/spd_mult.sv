// SPD multiplicity: number of SPD hits (0..64) among the 64 channels of a
// board, sent as a 7-bit word to the SPD multiplicity board.
//
// As in the document, the 64 bits are first cut into sixteen groups of four,
// each turned into a 3-bit count by a small look-up function, and the
// sixteen counts are summed by an adder tree. The whole computation is done
// in one registered clock: the result appears one clock after the input.
module spd_mult (
  input  logic        clk,
  input  logic [63:0] spd,
  output logic [6:0]  mult
);
  function automatic logic [2:0] cnt4(input logic [3:0] b);
    unique case (b)
      4'h0:                         return 3'd0;
      4'h1, 4'h2, 4'h4, 4'h8:       return 3'd1;
      4'h7, 4'hB, 4'hD, 4'hE:       return 3'd3;
      4'hF:                         return 3'd4;
      default:                      return 3'd2;
    endcase
  endfunction

  logic [2:0] c4 [16];
  logic [3:0] s8 [8];
  logic [4:0] s16 [4];
  logic [5:0] s32 [2];
  logic [6:0] sum;

  always_comb begin
    for (int i = 0; i < 16; i++) c4[i]  = cnt4(spd[4*i +: 4]);
    for (int i = 0; i < 8; i++)  s8[i]  = {1'b0, c4[2*i]} + {1'b0, c4[2*i+1]};
    for (int i = 0; i < 4; i++)  s16[i] = {1'b0, s8[2*i]} + {1'b0, s8[2*i+1]};
    for (int i = 0; i < 2; i++)  s32[i] = {1'b0, s16[2*i]} + {1'b0, s16[2*i+1]};
    sum = {1'b0, s32[0]} + {1'b0, s32[1]};
  end

  always_ff @(posedge clk) mult <= sum;
endmodule
