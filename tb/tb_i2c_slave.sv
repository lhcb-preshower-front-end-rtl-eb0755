// Testbench of the I2C slave: write and read frames on all four channels,
// short frames, a repeated START, a foreign address and random bit timing
// within the allowed range. A model of the register bank answers each rd
// with a running byte count, so the byte order on the bus is checked too.
module tb_i2c_slave;
  logic clk = 0, rst_n = 0;
  logic scl, msda, sda, sda_oe;
  logic start, wr, rd, stop;
  logic [1:0] ch;
  logic [7:0] wdata, rdata;

  i2c_slave #(.BASE(7'h24)) dut (.*);
  assign sda = msda & ~sda_oe;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int nstart = 0, nstop = 0, nrd = 0, q = 4;
  logic [1:0] last_ch;
  logic [7:0] wq [$];

  initial begin
    #4000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register bank model: rdata is a running count of rd strobes
  always_ff @(posedge clk) if (rst_n) begin
    if (start) begin nstart++; last_ch <= ch; end
    if (stop) nstop++;
    if (wr) wq.push_back(wdata);
    if (rd) begin rdata <= 8'(90 + nrd); nrd++; end
  end

  task automatic qw();
    repeat (q) @(negedge clk);
  endtask

  task automatic i2c_start();
    msda = 1; qw(); scl = 1; qw(); msda = 0; qw(); scl = 0; qw();
  endtask

  task automatic i2c_stop();
    msda = 0; qw(); scl = 1; qw(); msda = 1; qw(); qw();
  endtask

  task automatic send(logic [7:0] v, output logic ack);
    for (int i = 7; i >= 0; i--) begin
      msda = v[i]; qw(); scl = 1; qw(); qw(); scl = 0; qw();
    end
    msda = 1; qw(); scl = 1; qw(); ack = ~sda; qw(); scl = 0; qw();
  endtask

  task automatic recv(logic last, output logic [7:0] v);
    msda = 1;
    for (int i = 7; i >= 0; i--) begin
      qw(); scl = 1; qw(); v[i] = sda; qw(); scl = 0; qw();
    end
    msda = last; qw(); scl = 1; qw(); qw(); scl = 0; qw(); msda = 1;
  endtask

  task automatic wframe(int c, int nb, logic rep);
    logic ack;
    logic [7:0] b [];
    int s0, p0;
    b = new[nb];
    foreach (b[i]) b[i] = 8'($urandom);
    s0 = nstart; p0 = nstop; wq.delete();
    if (!rep) i2c_start();
    send({7'h24 + 7'(c), 1'b0}, ack);
    checks++; if (!ack) begin failures++; $display("no addr ack"); end
    foreach (b[i]) begin
      send(b[i], ack);
      checks++; if (!ack) failures++;
    end
    if (!rep) i2c_stop();
    else begin msda = 1; qw(); scl = 1; qw(); msda = 0; qw(); scl = 0; qw(); end
    repeat (4) @(negedge clk);
    checks++; if (nstart != s0 + 1 || last_ch != 2'(c)) begin failures++; $display("start"); end
    checks++; if (nstop != p0 + (rep ? 0 : 1)) begin failures++; $display("stop"); end
    checks++;
    if (wq.size() != nb) begin failures++; $display("wr count %0d/%0d", wq.size(), nb); end
    else foreach (b[i]) if (wq[i] != b[i]) begin failures++; $display("wr byte %0d", i); break; end
  endtask

  task automatic rframe(int c, int nb);
    logic ack;
    logic [7:0] v;
    int r0;
    r0 = nrd;
    i2c_start();
    send({7'h24 + 7'(c), 1'b1}, ack);
    checks++; if (!ack) failures++;
    for (int i = 0; i < nb; i++) begin
      recv(i == nb - 1, v);
      checks++;
      if (v != 8'(90 + r0 + i)) begin failures++; $display("rd byte %0d %h", i, v); end
    end
    i2c_stop();
    repeat (4) @(negedge clk);
    checks++; if (nrd != r0 + nb || last_ch != 2'(c)) begin failures++; $display("rd count"); end
  endtask

  initial begin
    logic ack;
    int s0;
    scl = 1; msda = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int it = 0; it < 40; it++) begin
      q = 4 + $urandom_range(0, 3);
      wframe(it % 4, $urandom_range(0, 33), 1'b0);
      rframe(3 - it % 4, $urandom_range(1, 24));
    end
    // frame closed by a repeated START, then a full frame
    q = 4;
    i2c_start();
    wframe(2, 3, 1'b1);
    wframe(1, 2, 1'b1);
    i2c_stop();
    // foreign address: no acknowledge, no strobes
    s0 = nstart;
    i2c_start(); send({7'h28, 1'b0}, ack); send(8'h11, ack); i2c_stop();
    repeat (4) @(negedge clk);
    checks++; if (ack || nstart != s0) begin failures++; $display("foreign"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
