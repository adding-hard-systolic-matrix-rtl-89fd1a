// tb_mm_pe_array: self-checking test of the 4 x 4 PE grid.
//
// Feeds random A (4 x K) and B (K x 4) matrices as skewed, tagged lanes
// (lane i delayed by i cycles) and checks every accumulated C(i,j) against a
// product computed here, that PE(3,3) finishes K+2N-2 cycles after operand 0
// entered PE(0,0), and that the edge outputs carry the operands on, N cycles
// late. Two products with different K run back to back.
module tb_mm_pe_array;
  import mm_pkg::*;
  localparam int N    = 4;
  localparam int KMAX = 16;

  logic    clk = 1'b0;
  logic    rst_n;
  a_flit_t a_west  [N];
  b_flit_t b_north [N];
  a_flit_t a_east  [N];
  b_flit_t b_south [N];
  acc_t    result  [N][N];
  logic    result_vld [N][N];

  int checks = 0, failures = 0;
  int cyc = 0;

  mm_pe_array #(.N(N)) dut (.*);

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

  data_t  A [N][KMAX];
  data_t  B [KMAX][N];
  a_flit_t a_hist [$];
  int      t_done;

  task automatic product(int k);
    longint ref_c;
    int     t0;
    for (int i = 0; i < N; i++)
      for (int n = 0; n < k; n++) begin
        A[i][n] = data_t'($urandom_range(4000) - 2000);
        B[n][i] = data_t'($urandom_range(4000) - 2000);
      end
    t0 = cyc;
    t_done = -1;
    // drive k + N - 1 cycles of skewed operands
    for (int t = 0; t < k + N - 1; t++) begin
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
      if (t == 0) a_hist.push_back(a_west[0]);
      @(posedge clk); #1;
      if (t == N - 1) check(a_east[0] == a_hist.pop_front(), "A leaves the east edge N cycles late");
      if (t == N - 1) check(b_south[0].vld && b_south[0].data == B[0][0], "B leaves the south edge N cycles late");
      if (result_vld[N-1][N-1] && t_done < 0) t_done = cyc - t0;
    end
    for (int i = 0; i < N; i++) begin a_west[i] = '0; b_north[i] = '0; end
    for (int w = 0; w < 2 * N && t_done < 0; w++) begin
      @(posedge clk); #1;
      if (result_vld[N-1][N-1]) t_done = cyc - t0;
    end
    // result_vld is seen one cycle after the last operand entered PE(3,3)
    check(t_done == k + 2 * N - 2, $sformatf("latency %0d", t_done));
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ref_c = 0;
        for (int n = 0; n < k; n++) ref_c += longint'(A[i][n]) * longint'(B[n][j]);
        check(result[i][j] == acc_t'(ref_c), $sformatf("C(%0d,%0d)", i, j));
      end
  endtask

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < N; i++) begin a_west[i] = '0; b_north[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    product(4);
    product(11);
    product(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
