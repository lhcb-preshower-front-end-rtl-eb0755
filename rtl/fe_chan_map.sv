// VFE-to-FE channel mapping of one FE_PGA (top / bottom configurations).
//
// Input channel i (the VFE channel) is sent to output channel MAP[i], where
// MAP is the table given for the top or the bottom half of the detector:
//   top    : 0->1 1->5 2->7 3->3 4->0 5->4 6->6 7->2
//   bottom : 0->6 1->2 2->0 3->4 4->7 5->3 6->1 7->5
// `top` selects the table (CTRL bit 7: 1 = top). Each channel carries a
// W-bit record. Purely combinational.
module fe_chan_map #(
  parameter int unsigned W = 10
) (
  input  logic         top,
  input  logic [W-1:0] din  [8],
  output logic [W-1:0] dout [8]
);
  localparam logic [2:0] MAP_TOP [8] = '{3'd1, 3'd5, 3'd7, 3'd3, 3'd0, 3'd4, 3'd6, 3'd2};
  localparam logic [2:0] MAP_BOT [8] = '{3'd6, 3'd2, 3'd0, 3'd4, 3'd7, 3'd3, 3'd1, 3'd5};

  always_comb begin
    for (int i = 0; i < 8; i++) dout[i] = '0;
    for (int i = 0; i < 8; i++)
      dout[top ? MAP_TOP[i] : MAP_BOT[i]] = din[i];
  end
endmodule
