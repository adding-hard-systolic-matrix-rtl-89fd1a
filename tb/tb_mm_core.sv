// tb_mm_core: self-checking test of the core matmul (PE array + output
// interface).
//
// Feeds random 4 x K and K x 4 matrices as skewed, tagged lanes and checks
// the C rows written out: scaled and clamped values computed here, addresses
// c_base + r, and the cycle of each row (row r in cycle t0+K+2N+r, t0 being
// the cycle operand 0 enters PE(0,0)).
module tb_mm_core;
  import mm_pkg::*;
  localparam int N    = 4;
  localparam int KMAX = 20;

  logic                clk = 1'b0;
  logic                rst_n;
  a_flit_t             a_west  [N];
  b_flit_t             b_north [N];
  a_flit_t             a_east  [N];
  b_flit_t             b_south [N];
  addr_t               c_base;
  logic                c_we;
  addr_t               c_addr;
  logic [N*DATA_W-1:0] c_data;
  logic                drain_done;

  int checks = 0, failures = 0;
  int cyc = 0;

  mm_core #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic int scale(longint acc);
    longint q = acc >>> 8;
    return (q > 32767) ? 32767 : (q < -32768) ? -32768 : int'(q);
  endfunction

  data_t A [N][KMAX];
  data_t B [KMAX][N];

  task automatic product(int k, int base, int range);
    int t0, rows_seen;
    longint acc;
    for (int i = 0; i < N; i++)
      for (int n = 0; n < k; n++) begin
        A[i][n] = data_t'($urandom_range(2 * range) - range);
        B[n][i] = data_t'($urandom_range(2 * range) - range);
      end
    c_base = addr_t'(base);
    t0 = cyc;
    rows_seen = 0;
    for (int t = 0; t < k + 2 * N + N + 4; t++) begin
      for (int i = 0; i < N; i++) begin
        int n = t - i;
        if (n >= 0 && n < k) begin
          a_west[i]  = '{vld: 1'b1, first: (n == 0), last: (n == k - 1), data: A[i][n]};
          b_north[i] = '{vld: 1'b1, data: B[n][i]};
        end else begin
          a_west[i]  = '0;
          b_north[i] = '0;
        end
      end
      if (c_we) begin
        int r = rows_seen;
        check(cyc - t0 == k + 2 * N + r, $sformatf("row %0d cycle %0d", r, cyc - t0));
        check(c_addr == addr_t'(base + r), "row address");
        for (int j = 0; j < N; j++) begin
          acc = 0;
          for (int n = 0; n < k; n++) acc += longint'(A[r][n]) * longint'(B[n][j]);
          check($signed(c_data[j*DATA_W +: DATA_W]) == scale(acc), $sformatf("C(%0d,%0d)", r, j));
        end
        check(drain_done == (r == N - 1), "drain_done");
        rows_seen++;
      end
      @(posedge clk); #1;
    end
    check(rows_seen == N, "all rows written");
  endtask

  initial begin
    rst_n = 1'b0; c_base = '0;
    for (int i = 0; i < N; i++) begin a_west[i] = '0; b_north[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    product(4, 0, 512);
    product(13, 100, 512);
    product(20, 300, 20000);   // large operands: saturation
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
