// tb_bram: self-checking test of the 32 Kbit true dual-port BRAM.
//
// A flat 32768-bit model stands for the memory: in geometry g (port width
// w = 64 >> g) address a covers model bits [a*w +: w]. The bench fills the
// RAM through both ports in the 512 x 64 geometry and reads it back
// crosswise, then for every narrower geometry down to 32768 x 1 writes random
// slices through alternating ports and reads random addresses through both,
// checking the data and that the unused upper read bits are zero. It also
// checks the one-cycle read latency, read-first behaviour, the held read
// register of a disabled port, two ports writing different slices of one
// word in the same cycle (both land) and the same slice (port 1 wins).
module tb_bram;
  localparam int W  = 64;
  localparam int D  = 512;
  localparam int AW = 15;

  logic          clk = 1'b0;
  logic [2:0]    geom;
  logic          en1, we1, en2, we2;
  logic [AW-1:0] addr1, addr2;
  logic [W-1:0]  wdata1, wdata2, rdata1, rdata2;
  logic [32767:0] model;

  int checks = 0, failures = 0;

  bram #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [W-1:0] expect_word(int a, int g);
    int w = W >> g;
    logic [W-1:0] v = '0;
    for (int b = 0; b < w; b++) v[b] = model[a * w + b];
    return v;
  endfunction

  task automatic model_write(int a, int g, logic [W-1:0] d);
    int w = W >> g;
    for (int b = 0; b < w; b++) model[a * w + b] = d[b];
  endtask

  initial begin
    geom = '0;
    en1 = 0; we1 = 0; en2 = 0; we2 = 0; addr1 = '0; addr2 = '0; wdata1 = '0; wdata2 = '0;
    @(posedge clk); #1;
    // 512 x 64: even addresses through port 1, odd through port 2
    for (int a = 0; a < D; a += 2) begin
      en1 = 1; we1 = 1; addr1 = AW'(a);     wdata1 = {$urandom, $urandom}; model_write(a, 0, wdata1);
      en2 = 1; we2 = 1; addr2 = AW'(a + 1); wdata2 = {$urandom, $urandom}; model_write(a + 1, 0, wdata2);
      @(posedge clk); #1;
    end
    we1 = 0; we2 = 0;
    for (int a = 0; a < D; a++) begin
      addr1 = AW'(a); addr2 = AW'(D - 1 - a);
      @(posedge clk); #1;
      check(rdata1 == expect_word(a, 0), "port 1 read, 512 x 64");
      check(rdata2 == expect_word(D - 1 - a, 0), "port 2 read, 512 x 64");
    end
    // narrower geometries
    for (int g = 1; g <= 6; g++) begin
      int depth = D << g;
      geom = 3'(g);
      for (int n = 0; n < 300; n++) begin
        int a = $urandom_range(depth - 1);
        logic [W-1:0] d = {$urandom, $urandom};
        if (n % 2 == 0) begin en1 = 1; we1 = 1; addr1 = AW'(a); wdata1 = d; en2 = 0; we2 = 0; end
        else            begin en2 = 1; we2 = 1; addr2 = AW'(a); wdata2 = d; en1 = 0; we1 = 0; end
        model_write(a, g, d);
        @(posedge clk); #1;
      end
      en1 = 1; en2 = 1; we1 = 0; we2 = 0;
      for (int n = 0; n < 300; n++) begin
        int a1 = $urandom_range(depth - 1);
        int a2 = $urandom_range(depth - 1);
        addr1 = AW'(a1); addr2 = AW'(a2);
        @(posedge clk); #1;
        check(rdata1 == expect_word(a1, g), $sformatf("port 1 read, geometry %0d", g));
        check(rdata2 == expect_word(a2, g), $sformatf("port 2 read, geometry %0d", g));
      end
    end
    // 16-bit geometry: two ports write two slices of the same word together
    geom = 3'd2;
    en1 = 1; we1 = 1; addr1 = AW'(40); wdata1 = 64'hBEEF;
    en2 = 1; we2 = 1; addr2 = AW'(41); wdata2 = 64'hCAFE;
    model_write(40, 2, wdata1); model_write(41, 2, wdata2);
    @(posedge clk); #1;
    we1 = 0; we2 = 0; geom = 3'd0; addr1 = AW'(10);
    @(posedge clk); #1;
    check(rdata1 == expect_word(10, 0), "two slices of one word written in one cycle");
    // read-first in the widest geometry
    addr1 = AW'(5); we1 = 1; wdata1 = 64'h0123_4567_89ab_cdef;
    @(posedge clk); #1;
    check(rdata1 == expect_word(5, 0), "read-first returns the old word");
    model_write(5, 0, wdata1); we1 = 0;
    @(posedge clk); #1;
    check(rdata1 == expect_word(5, 0), "new word after the write");
    // a disabled port holds its output
    en1 = 0; addr1 = AW'(6);
    @(posedge clk); #1;
    check(rdata1 == expect_word(5, 0), "read register held while disabled");
    // both ports write address 7: port 1 wins
    en1 = 1; we1 = 1; addr1 = AW'(7); wdata1 = 64'h1111;
    en2 = 1; we2 = 1; addr2 = AW'(7); wdata2 = 64'h2222;
    @(posedge clk); #1;
    we1 = 0; we2 = 0;
    @(posedge clk); #1;
    check(rdata1 == 64'h1111 && rdata2 == 64'h1111, "port 1 wins a write collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
