// tb_mm_ctrl: self-checking test of the operand address generator.
//
// Starts the controller with several K values and base addresses and checks,
// cycle by cycle, the read enables, the addresses (base + k in cycle
// start+1+k), the tags one cycle behind the addresses, that a start while
// busy is ignored, that reads are suppressed for inputs in neighbour mode,
// and that 'done' follows 'drain_done' by one cycle.
module tb_mm_ctrl;
  import mm_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            start;
  logic [ADDR_W:0] k_len;
  addr_t           a_base, b_base;
  logic            a_mem, b_mem;
  logic            drain_done;
  logic            a_re, b_re;
  addr_t           a_addr, b_addr;
  logic            tag_vld, tag_first, tag_last;
  logic            busy, done;

  int checks = 0, failures = 0;

  mm_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(int k, int ab, int bb, bit am, bit bm);
    k_len  = (ADDR_W+1)'(k);
    a_base = addr_t'(ab);
    b_base = addr_t'(bb);
    a_mem  = am;
    b_mem  = bm;
    start  = 1'b1;
    @(posedge clk); #1;
    start  = 1'b0;
    for (int n = 0; n <= k; n++) begin
      // cycle start+1+n: address n (n < k), tag n-1 (n > 0)
      check(busy, "busy while feeding");
      check(a_re == (am && n < k), "a_re");
      check(b_re == (bm && n < k), "b_re");
      if (n < k) begin
        check(a_addr == addr_t'(ab + n), "a_addr");
        check(b_addr == addr_t'(bb + n), "b_addr");
      end
      check(tag_vld   == (n > 0), "tag_vld");
      check(tag_first == (n == 1), "tag_first");
      check(tag_last  == (n == k), "tag_last");
      if (n == 2) start = 1'b1;      // must be ignored while busy
      @(posedge clk); #1;
      start = 1'b0;
    end
    check(!a_re && !b_re && !tag_vld, "quiet while waiting");
    repeat (4) begin
      check(busy && !done, "waiting for drain");
      @(posedge clk); #1;
    end
    drain_done = 1'b1;
    @(posedge clk); #1;
    drain_done = 1'b0;
    check(done && busy == 1'b0, "done one cycle after drain_done");
    @(posedge clk); #1;
    check(!done, "done is a pulse");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; k_len = '0; a_base = '0; b_base = '0;
    a_mem = 1'b1; b_mem = 1'b1; drain_done = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!busy && !a_re && !tag_vld, "idle after reset");
    run(4, 0, 100, 1, 1);
    run(9, 510, 7, 1, 0);            // address wraps at the BRAM depth
    run(1, 33, 44, 0, 1);
    run(512, 0, 0, 1, 1);            // the whole BRAM
    // k_len = 0 is ignored
    k_len = '0; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check(!busy, "k_len = 0 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
