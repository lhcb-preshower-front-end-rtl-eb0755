// L0SEQ block of the FE_PGA: L0 pipeline, derandomiser and serialiser.
//
// Every clock the 80-bit record of the FE_PGA (8 channels x {SPD bit, PS
// trigger bit, 8-bit PS data}) enters a 256-deep L0 pipeline whose virtual
// depth is the L0LAT register. On an L0 accept the record that entered L0LAT
// clocks earlier is pushed into a derandomiser FIFO (FDEPTH events). When the
// sequencer FPGA asks for an event (`rd_req`), the oldest event is sent as
// four 20-bit words on four consecutive clocks, word k holding channels 2k
// (bits 9:0) and 2k+1 (bits 19:10), each channel as {SPD, trig, PS[7:0]}.
// The derandomiser depth, the read request handshake and the order of the
// channels inside a word are this design's own choices; the pipeline depth
// and the 4 x 20-bit format follow the document. An L0 accept arriving with a
// full FIFO is dropped and counted in `ovf`.
// Timing: first word on `sdata` two clocks after `rd_req`.
module fe_l0seq #(
  parameter int unsigned L0DEPTH = 256,
  parameter int unsigned FDEPTH  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  l0lat,
  input  logic [79:0] din,
  input  logic        l0,
  input  logic        rd_req,
  output logic [19:0] sdata,
  output logic        svalid,
  output logic        sfirst,
  output logic        empty,
  output logic        ovf,
  output logic [7:0]  wp_out
);
  localparam int unsigned FAW = $clog2(FDEPTH);

  logic [79:0]  dly;
  logic [79:0]  fifo [FDEPTH];
  logic [FAW:0] wr, rd;
  logic         full, busy;
  logic [1:0]   word;
  logic [79:0]  ev;

  prog_delay #(.W(80), .DEPTH(L0DEPTH)) u_pipe (
    .clk, .rst_n, .depth(l0lat), .din, .dout(dly), .wp_out
  );

  assign empty = (wr == rd);
  assign full  = (wr[FAW-1:0] == rd[FAW-1:0]) && (wr[FAW] != rd[FAW]);

  always_ff @(posedge clk)
    if (l0 && !full) fifo[wr[FAW-1:0]] <= dly;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr     <= '0;
      rd     <= '0;
      busy   <= 1'b0;
      word   <= '0;
      ev     <= '0;
      sdata  <= '0;
      svalid <= 1'b0;
      sfirst <= 1'b0;
      ovf    <= 1'b0;
    end else begin
      ovf <= l0 && full;
      if (l0 && !full) wr <= wr + 1'b1;
      svalid <= 1'b0;
      sfirst <= 1'b0;
      if (!busy && rd_req && !empty) begin
        ev   <= fifo[rd[FAW-1:0]];
        rd   <= rd + 1'b1;
        busy <= 1'b1;
        word <= '0;
      end else if (busy) begin
        sdata  <= ev[20*word +: 20];
        svalid <= 1'b1;
        sfirst <= (word == 2'd0);
        word   <= word + 1'b1;
        if (word == 2'd3) busy <= 1'b0;
      end
    end
endmodule
