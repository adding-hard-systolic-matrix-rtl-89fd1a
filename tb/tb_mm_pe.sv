// tb_mm_pe: self-checking test of one processing element.
//
// Streams two dot products back to back through the PE (the second one
// starts in the cycle after the first one's 'last' operand) and checks the
// registered pass-through of A and B, the accumulated result against a sum
// computed here, and that result_vld pulses exactly one cycle after 'last'.
module tb_mm_pe;
  import mm_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  a_flit_t a_in, a_out;
  b_flit_t b_in, b_out;
  acc_t    result;
  logic    result_vld;

  int checks = 0, failures = 0;

  mm_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  // Run one dot product of length k; returns nothing, checks inside.
  task automatic dot(int k, int lo, int hi);
    longint  ref_sum = 0;
    a_flit_t prev_a;
    b_flit_t prev_b;
    for (int n = 0; n < k; n++) begin
      data_t x = data_t'($urandom_range(hi - lo) + lo);
      data_t y = data_t'($urandom_range(hi - lo) + lo);
      a_in = '{vld: 1'b1, first: (n == 0), last: (n == k - 1), data: x};
      b_in = '{vld: 1'b1, data: y};
      ref_sum += longint'(x) * longint'(y);
      prev_a = a_in;
      prev_b = b_in;
      @(posedge clk); #1;
      check(a_out == prev_a, "A pass-through");
      check(b_out == prev_b, "B pass-through");
      check(result_vld == (n == k - 1), "result_vld timing");
    end
    check(result == acc_t'(ref_sum), "dot product value");
  endtask

  initial begin
    rst_n = 1'b0;
    a_in  = '0;
    b_in  = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(result_vld == 1'b0, "no result after reset");
    dot(5, -300, 300);
    dot(7, -32768, 32767);     // full-range operands, back to back
    a_in = '0; b_in = '0;
    @(posedge clk); #1;
    check(result_vld == 1'b0, "result_vld is a single pulse");
    dot(1, -1000, 1000);       // K = 1: first and last on the same operand
    a_in = '0; b_in = '0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
