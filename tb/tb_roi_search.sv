// Test of roi_search: random grids and neighbour bits, every address of
// both halves, with and without the Right/Top disable and half-board
// options. The expected ROI is computed from an extended 9 x 9 grid built
// here (board cells plus the Top row, Right column and corner).
module tb_roi_search;
  logic clk = 0;
  logic half, half_board, dis_right, dis_top, corner_ps, corner_spd;
  logic [4:0] addr, addr_out;
  logic [63:0] ps, spd;
  logic [7:0] top_ps, top_spd, right_ps, right_spd, val, e;
  int checks = 0, failures = 0, border = 0;

  roi_search dut (.*);
  always #5 clk = ~clk;

  // extended grid value at (r, c), r and c in 0..8
  function automatic logic ext(logic [63:0] g, logic [7:0] tp, logic [7:0] rt, logic cn,
                               int r, int c);
    int rtop = half_board ? 4 : 8;
    if (half_board && r >= 4 && r < rtop) return 1'b0;
    if (r < rtop && c < 8) return (half_board && r >= 4) ? 1'b0 : g[8*r + c];
    if (r == rtop && c < 8) return dis_top ? 1'b0 : tp[c];
    if (r < rtop && c == 8) return (dis_right || (half_board && r >= 4)) ? 1'b0 : rt[r];
    return (dis_right || dis_top) ? 1'b0 : cn;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      ps = {$urandom, $urandom}; spd = {$urandom, $urandom};
      top_ps = 8'($urandom); top_spd = 8'($urandom);
      right_ps = 8'($urandom); right_spd = 8'($urandom);
      corner_ps = 1'($urandom); corner_spd = 1'($urandom);
      dis_right = (n % 5 == 1); dis_top = (n % 5 == 2); half_board = (n % 5 == 3);
      for (int h = 0; h < 2; h++)
        for (int a = 0; a < 32; a++) begin
          int r, c;
          if (half_board && h == 1) continue;
          @(negedge clk);
          half = 1'(h); addr = 5'(a);
          r = 4 * h + a / 8; c = a % 8;
          e = {ext(spd, top_spd, right_spd, corner_spd, r + 1, c),
               ext(spd, top_spd, right_spd, corner_spd, r + 1, c + 1),
               ext(spd, top_spd, right_spd, corner_spd, r, c + 1),
               ext(spd, top_spd, right_spd, corner_spd, r, c),
               ext(ps, top_ps, right_ps, corner_ps, r + 1, c),
               ext(ps, top_ps, right_ps, corner_ps, r + 1, c + 1),
               ext(ps, top_ps, right_ps, corner_ps, r, c + 1),
               ext(ps, top_ps, right_ps, corner_ps, r, c)};
          if (c == 7 || r == 7 || (half_board && r == 3)) border++;
          @(negedge clk);
          checks++;
          if (val != e || addr_out != addr) begin
            failures++;
            if (failures < 10) $display("h=%0d a=%0d hb=%0d got %b exp %b", h, a, half_board, val, e);
          end
        end
    end
    if (border == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
