// tb_mm_out_if: self-checking test of the output data interface.
//
// Loads the result inputs with random accumulators (some far outside the
// 16-bit range), pulses 'trigger', and checks that rows 0..3 are written in
// the 2nd..5th cycle after the trigger at c_base + r, that each element is
// the accumulator shifted right by the fractional bits and clamped, computed
// here independently, and that drain_done comes with the last row.
module tb_mm_out_if;
  import mm_pkg::*;
  localparam int N = 4;

  logic                clk = 1'b0;
  logic                rst_n;
  acc_t                result [N][N];
  logic                trigger;
  addr_t               c_base;
  logic                c_we;
  addr_t               c_addr;
  logic [N*DATA_W-1:0] c_data;
  logic                drain_done;

  int checks = 0, failures = 0;
  int n_sat = 0;

  mm_out_if #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
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

  function automatic int expect_elem(longint acc);
    longint q = acc >>> 8;
    if (q > 32767)  begin n_sat++; return 32767;  end
    if (q < -32768) begin n_sat++; return -32768; end
    return int'(q);
  endfunction

  task automatic drain(int base, bit big);
    longint v [N][N];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        v[i][j] = big ? (longint'($urandom) << 4) - (longint'(1) << 35)
                      : longint'($urandom_range(4000000)) - 2000000;
        result[i][j] = acc_t'(v[i][j]);
      end
    c_base  = addr_t'(base);
    trigger = 1'b1;
    @(posedge clk); #1;
    trigger = 1'b0;
    check(!c_we, "no write in the cycle after trigger");
    for (int r = 0; r < N; r++) begin
      @(posedge clk); #1;
      check(c_we, "row write enable");
      check(c_addr == addr_t'(base + r), "row address");
      for (int j = 0; j < N; j++)
        check($signed(c_data[j*DATA_W +: DATA_W]) == expect_elem(v[r][j]),
              $sformatf("C(%0d,%0d)", r, j));
      check(drain_done == (r == N - 1), "drain_done with the last row");
    end
    @(posedge clk); #1;
    check(!c_we && !drain_done, "quiet after the tile");
  endtask

  initial begin
    rst_n = 1'b0; trigger = 1'b0; c_base = '0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) result[i][j] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!c_we, "no write after reset");
    drain(12, 0);
    drain(510, 1);     // large values saturate; addresses wrap
    drain(0, 1);
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
