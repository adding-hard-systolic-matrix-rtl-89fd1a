// tb_gemm_runner: drives one mm_fabric_top through a whole M x K x P matrix
// product, for the workload bench.
//
// The product is cut into output tiles of (ROWS*N) x (COLS*N); each tile is
// one composed pass of the grid: the A rows of the tile are written into the
// A BRAMs of the left column, the B columns into the B BRAMs of the top row
// (all BRAMs in parallel, one word per cycle), the grid is started, and the
// C rows are read back from the C BRAMs of the right column and compared with
// a product computed here. Rows and columns beyond M or P are padded with
// zeros (the under-utilised blocks of a fragmented mapping). The runner
// reports its checks and failures and the cycles the grid spent computing.
module tb_gemm_runner
  import mm_pkg::*;
#(
  parameter int N     = 4,      // block size (N x N x N matmul)
  parameter int ROWS  = 2,
  parameter int COLS  = 2,
  parameter int M     = 8,
  parameter int K     = 8,
  parameter int P     = 8,
  parameter int RANGE = 256     // operands drawn from [-RANGE, RANGE]
) (
  input  logic clk,
  output bit   finished,
  output int   checks,
  output int   failures,
  output int   compute_cycles,
  output int   passes
);
  localparam int W  = N * DATA_W;
  localparam int TM = ROWS * N;
  localparam int TP = COLS * N;

  logic            rst_n;
  logic            start;
  logic [ADDR_W:0] k_len;
  blk_cfg_t        cfg [ROWS][COLS];
  logic            busy, done;
  logic            a_fab_en [ROWS][COLS], a_fab_we [ROWS][COLS];
  addr_t           a_fab_addr [ROWS][COLS];
  logic [W-1:0]    a_fab_wdata [ROWS][COLS], a_fab_rdata [ROWS][COLS];
  logic            b_fab_en [ROWS][COLS], b_fab_we [ROWS][COLS];
  addr_t           b_fab_addr [ROWS][COLS];
  logic [W-1:0]    b_fab_wdata [ROWS][COLS], b_fab_rdata [ROWS][COLS];
  logic            c_fab_en [ROWS][COLS], c_fab_we [ROWS][COLS];
  addr_t           c_fab_addr [ROWS][COLS];
  logic [W-1:0]    c_fab_wdata [ROWS][COLS], c_fab_rdata [ROWS][COLS];

  mm_fabric_top #(.N(N), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  data_t A [M][K];
  data_t B [K][P];

  function automatic data_t a_at(int i, int k);
    return (i < M) ? A[i][k] : data_t'(0);
  endfunction
  function automatic data_t b_at(int k, int j);
    return (j < P) ? B[k][j] : data_t'(0);
  endfunction
  function automatic int scale(longint acc);
    longint q = acc >>> 8;
    return (q > 32767) ? 32767 : (q < -32768) ? -32768 : int'(q);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %0dx%0dx%0d on %0dx%0d grid: %s", M, K, P, ROWS, COLS, what);
    end
  endtask

  task automatic pass(int ti, int tj);
    int s;
    // load
    for (int k = 0; k < K; k++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          a_fab_en[r][c] = (c == 0); a_fab_we[r][c] = (c == 0); a_fab_addr[r][c] = addr_t'(k);
          b_fab_en[r][c] = (r == 0); b_fab_we[r][c] = (r == 0); b_fab_addr[r][c] = addr_t'(k);
          for (int i = 0; i < N; i++) begin
            a_fab_wdata[r][c][i*DATA_W +: DATA_W] = a_at(ti * TM + r * N + i, k);
            b_fab_wdata[r][c][i*DATA_W +: DATA_W] = b_at(k, tj * TP + c * N + i);
          end
        end
      @(posedge clk); #1;
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        a_fab_en[r][c] = 0; a_fab_we[r][c] = 0; b_fab_en[r][c] = 0; b_fab_we[r][c] = 0;
      end
    // compute
    s = 0;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    s = 1;
    while (!done) begin @(posedge clk); #1; s++; end
    compute_cycles += s;
    check(s == K + (ROWS + COLS + 1) * N + 3, $sformatf("latency %0d", s));
    // read back: word c*N + i of C BRAM (r, COLS-1) is row r*N+i of tile column c
    for (int w = 0; w < TP; w++) begin
      int c = w / N;
      int i = w % N;
      for (int r = 0; r < ROWS; r++) begin
        c_fab_en[r][COLS-1]   = 1'b1;
        c_fab_addr[r][COLS-1] = addr_t'(w);
      end
      @(posedge clk); #1;
      for (int r = 0; r < ROWS; r++)
        for (int j = 0; j < N; j++) begin
          int gi = ti * TM + r * N + i;
          int gj = tj * TP + c * N + j;
          if (gi < M && gj < P) begin
            longint acc = 0;
            for (int k = 0; k < K; k++) acc += longint'(A[gi][k]) * longint'(B[k][gj]);
            check($signed(c_fab_rdata[r][COLS-1][j*DATA_W +: DATA_W]) == scale(acc),
                  $sformatf("C(%0d,%0d) N=%0d", gi, gj, N));
          end
        end
    end
    for (int r = 0; r < ROWS; r++) c_fab_en[r][COLS-1] = 0;
    passes++;
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; compute_cycles = 0; passes = 0;
    rst_n = 1'b0; start = 1'b0; k_len = (ADDR_W+1)'(K);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        a_fab_en[r][c] = 0; a_fab_we[r][c] = 0; a_fab_addr[r][c] = '0; a_fab_wdata[r][c] = '0;
        b_fab_en[r][c] = 0; b_fab_we[r][c] = 0; b_fab_addr[r][c] = '0; b_fab_wdata[r][c] = '0;
        c_fab_en[r][c] = 0; c_fab_we[r][c] = 0; c_fab_addr[r][c] = '0; c_fab_wdata[r][c] = '0;
        cfg[r][c].a_sel  = (c == 0) ? SRC_MEMORY : SRC_NEIGHBOR;
        cfg[r][c].b_sel  = (r == 0) ? SRC_MEMORY : SRC_NEIGHBOR;
        cfg[r][c].c_sel  = (c == 0) ? SRC_MEMORY : SRC_NEIGHBOR;
        cfg[r][c].a_base = '0;
        cfg[r][c].b_base = '0;
        cfg[r][c].c_base = addr_t'(c * N);
      end
    for (int i = 0; i < M; i++) for (int k = 0; k < K; k++) A[i][k] = data_t'($urandom_range(2 * RANGE) - RANGE);
    for (int k = 0; k < K; k++) for (int j = 0; j < P; j++) B[k][j] = data_t'($urandom_range(2 * RANGE) - RANGE);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int ti = 0; ti < (M + TM - 1) / TM; ti++)
      for (int tj = 0; tj < (P + TP - 1) / TP; tj++)
        pass(ti, tj);
    $display("workload %0dx%0dx%0d on a %0dx%0d grid of %0dx%0dx%0d blocks: %0d pass(es), %0d compute cycles, %0d checks, %0d failures",
             M, K, P, ROWS, COLS, N, N, N, passes, compute_cycles, checks, failures);
    finished = 1;
  end
endmodule
