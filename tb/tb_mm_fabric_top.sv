// tb_mm_fabric_top: end-to-end test of the 2 x 2 grid of 4x4x4 matmuls at its
// default size.
//
// The bench loads the A and B BRAMs through their fabric ports, configures
// the blocks, pulses 'start', waits for 'done', and reads the C BRAMs back
// through their fabric ports, comparing every element with a product computed
// here (16-bit fixed point with 8 fractional bits, clamped). Runs:
//   - composed 8 x K x 8 products (A enters the left column, B the top row,
//     C leaves through the right column), K = 4, 8 and 13;
//   - the same with large operands, so that results saturate;
//   - a second composed product started in the cycle after 'done';
//   - four independent 4 x K x 4 products, every block in memory mode;
//   - in every run, a second start pulse while busy, which must be ignored.
// It counts each mechanism (BRAM reads in memory mode, A and B taken from a
// neighbour, C rows forwarded by a neighbour, saturation, K > N, independent
// and composed runs, back-to-back start) and fails if one never happened. The
// latency from 'start' to 'done' is checked against K + (ROWS+COLS+1)*N + 3.
module tb_mm_fabric_top;
  import mm_pkg::*;
  localparam int N    = 4;
  localparam int ROWS = 2;
  localparam int COLS = 2;
  localparam int W    = N * DATA_W;
  localparam int KMAX = 16;
  localparam int M    = ROWS * N;    // rows of the composed A
  localparam int P    = COLS * N;    // columns of the composed B

  logic            clk = 1'b0;
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

  mm_fabric_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
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

  // ------------------------------------------------------------------
  // mechanism counters
  int n_mem_read = 0, n_nbr_a = 0, n_nbr_b = 0, n_c_fwd = 0;
  int n_ignored = 0, n_sat = 0, n_k_gt_n = 0, n_indep = 0, n_composed = 0, n_back2back = 0;

  for (genvar r = 0; r < ROWS; r++) begin : g_mon_r
    for (genvar c = 0; c < COLS; c++) begin : g_mon_c
      always @(posedge clk) begin
        if (dut.g_row[r].g_col[c].a_re || dut.g_row[r].g_col[c].b_re) n_mem_read++;
        if (cfg[r][c].a_sel == SRC_NEIGHBOR && dut.g_row[r].g_col[c].a_in[0].vld) n_nbr_a++;
        if (cfg[r][c].b_sel == SRC_NEIGHBOR && dut.g_row[r].g_col[c].b_in[0].vld) n_nbr_b++;
        if (dut.g_row[r].g_col[c].u_blk.fwd && dut.g_row[r].g_col[c].c_in_we) n_c_fwd++;
      end
    end
  end

  // ------------------------------------------------------------------
  function automatic int scale(longint acc);
    longint q = acc >>> 8;
    if (q > 32767)  begin n_sat++; return 32767;  end
    if (q < -32768) begin n_sat++; return -32768; end
    return int'(q);
  endfunction

  task automatic idle_ports();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        a_fab_en[r][c] = 0; a_fab_we[r][c] = 0; a_fab_addr[r][c] = '0; a_fab_wdata[r][c] = '0;
        b_fab_en[r][c] = 0; b_fab_we[r][c] = 0; b_fab_addr[r][c] = '0; b_fab_wdata[r][c] = '0;
        c_fab_en[r][c] = 0; c_fab_we[r][c] = 0; c_fab_addr[r][c] = '0; c_fab_wdata[r][c] = '0;
      end
  endtask

  data_t A [M][KMAX];
  data_t B [KMAX][P];

  task automatic random_mats(int k, int range);
    for (int i = 0; i < M; i++)
      for (int n = 0; n < k; n++) A[i][n] = data_t'($urandom_range(2 * range) - range);
    for (int n = 0; n < k; n++)
      for (int j = 0; j < P; j++) B[n][j] = data_t'($urandom_range(2 * range) - range);
  endtask

  // Write the part of A for grid row r into block (r,c)'s A BRAM and the part
  // of B for grid column c into block (r,c)'s B BRAM (one word per cycle).
  task automatic load(int r, int c, int k, int ab, int bb);
    for (int n = 0; n < k; n++) begin
      a_fab_en[r][c] = 1; a_fab_we[r][c] = 1; a_fab_addr[r][c] = addr_t'(ab + n);
      b_fab_en[r][c] = 1; b_fab_we[r][c] = 1; b_fab_addr[r][c] = addr_t'(bb + n);
      for (int i = 0; i < N; i++) begin
        a_fab_wdata[r][c][i*DATA_W +: DATA_W] = A[r*N + i][n];
        b_fab_wdata[r][c][i*DATA_W +: DATA_W] = B[n][c*N + i];
      end
      @(posedge clk); #1;
    end
    a_fab_en[r][c] = 0; a_fab_we[r][c] = 0;
    b_fab_en[r][c] = 0; b_fab_we[r][c] = 0;
  endtask

  // Pulse start, wait for done, check the latency.
  task automatic run(int k, bit back2back);
    int s = cyc;
    int lat;
    k_len = (ADDR_W+1)'(k);
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    check(busy, "busy after start");
    while (!done && cyc - s < 500) begin
      // a second start while busy must be ignored (latency check below)
      start = (cyc - s == 3);
      if (start) n_ignored++;
      @(posedge clk); #1;
      start = 1'b0;
    end
    lat = cyc - s;
    check(lat == k + (ROWS + COLS + 1) * N + 3, $sformatf("latency %0d for K=%0d", lat, k));
    if (k > N) n_k_gt_n++;
    if (back2back) n_back2back++;
  endtask

  // Read word 'addr' of block (r,c)'s C BRAM.
  task automatic read_c(int r, int c, int addr, output logic [W-1:0] word);
    c_fab_en[r][c] = 1; c_fab_addr[r][c] = addr_t'(addr);
    @(posedge clk); #1;
    c_fab_en[r][c] = 0;
    word = c_fab_rdata[r][c];
  endtask

  task automatic check_tile(int r, int c, int k, int rr, int cc, int base);
    // tile (rr,cc) of the product, stored in C BRAM (r,c) at base + i
    logic [W-1:0] word;
    longint acc;
    for (int i = 0; i < N; i++) begin
      read_c(r, c, base + i, word);
      for (int j = 0; j < N; j++) begin
        acc = 0;
        for (int n = 0; n < k; n++) acc += longint'(A[rr*N + i][n]) * longint'(B[n][cc*N + j]);
        check($signed(word[j*DATA_W +: DATA_W]) == scale(acc),
              $sformatf("C(%0d,%0d) K=%0d", rr*N + i, cc*N + j, k));
      end
    end
  endtask

  // ------------------------------------------------------------------
  task automatic configure_composed(int ab, int bb, int cb);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        cfg[r][c].a_sel  = (c == 0) ? SRC_MEMORY : SRC_NEIGHBOR;
        cfg[r][c].b_sel  = (r == 0) ? SRC_MEMORY : SRC_NEIGHBOR;
        cfg[r][c].c_sel  = (c == 0) ? SRC_MEMORY : SRC_NEIGHBOR;
        cfg[r][c].a_base = addr_t'(ab);
        cfg[r][c].b_base = addr_t'(bb);
        cfg[r][c].c_base = addr_t'(cb + c * N);   // tiles of a row side by side
      end
  endtask

  task automatic composed(int k, int range, bit back2back);
    int ab = $urandom_range(300), bb = $urandom_range(300), cb = $urandom_range(300);
    random_mats(k, range);
    for (int r = 0; r < ROWS; r++) load(r, 0, k, ab, bb);   // A: left column
    for (int c = 1; c < COLS; c++) load(0, c, k, ab, bb);   // B: top row
    configure_composed(ab, bb, cb);
    if (back2back) begin
      // the previous product is still running: wait for its done, then start
      while (!done) begin @(posedge clk); #1; end
    end
    run(k, back2back);
    n_composed++;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check_tile(r, COLS - 1, k, r, c, cb + c * N);
  endtask

  task automatic independent(int k, int range);
    random_mats(k, range);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        // block (r,c) computes tile (r,c) from its own BRAMs
        load(r, c, k, 10 * r + c, 20 + c);
        cfg[r][c].a_sel  = SRC_MEMORY;
        cfg[r][c].b_sel  = SRC_MEMORY;
        cfg[r][c].c_sel  = SRC_MEMORY;
        cfg[r][c].a_base = addr_t'(10 * r + c);
        cfg[r][c].b_base = addr_t'(20 + c);
        cfg[r][c].c_base = addr_t'(200 + 8 * r);
      end
    run(k, 0);
    n_indep++;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check_tile(r, c, k, r, c, 200 + 8 * r);
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; k_len = '0;
    idle_ports();
    configure_composed(0, 0, 0);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(!busy && !done, "idle after reset");

    composed(N, 512, 0);       // 8x4x8
    composed(8, 512, 0);       // 8x8x8, the composition of the 2 x 2 grid
    composed(13, 400, 0);      // longer inner dimension
    composed(8, 20000, 0);     // large operands: saturation

    // back to back: load the next operands while a product runs, then start
    // again in the cycle after 'done'
    fork
      begin
        k_len = (ADDR_W+1)'(8);
        start = 1'b1;
        @(posedge clk); #1;
        start = 1'b0;
      end
    join
    composed(8, 512, 1);

    independent(8, 512);
    independent(5, 512);

    check(n_mem_read  > 0, "memory-mode reads happened");
    check(n_nbr_a     > 0, "A taken from a neighbour");
    check(n_nbr_b     > 0, "B taken from a neighbour");
    check(n_c_fwd     > 0, "C rows forwarded by a neighbour");
    check(n_sat       > 0, "saturation happened");
    check(n_k_gt_n    > 0, "K larger than the block edge");
    check(n_indep     > 0, "independent mode ran");
    check(n_composed  > 0, "composed mode ran");
    check(n_back2back > 0, "back-to-back start");
    check(n_ignored   > 0, "start while busy ignored");
    $display("mechanisms: ignored_start=%0d mem_read=%0d nbr_a=%0d nbr_b=%0d c_fwd=%0d sat=%0d k_gt_n=%0d indep=%0d composed=%0d back2back=%0d",
             n_ignored, n_mem_read, n_nbr_a, n_nbr_b, n_c_fwd, n_sat, n_k_gt_n, n_indep, n_composed, n_back2back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
