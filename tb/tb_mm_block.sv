// tb_mm_block: self-checking test of one building-block matmul.
//
// The A and B BRAMs are modelled here as arrays with one cycle read latency.
// Three products are run:
//   1. memory mode for A, B and C, K = 8;
//   2. A in neighbour mode (this bench drives the skewed, tagged A lanes as a
//      left neighbour would), B from memory, C in neighbour mode with rows of
//      a fictitious left neighbour injected before this block's own rows;
//   3. B in neighbour mode, A from memory, K = 5.
// Every C row is compared with a product computed here, and the cycle of the
// first row (start + K + 2N + 2) and of 'done' (one cycle after the last row)
// are checked, as are the edge outputs and the suppressed BRAM reads.
module tb_mm_block;
  import mm_pkg::*;
  localparam int N = 4;
  localparam int W = N * DATA_W;
  localparam int KMAX = 16;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            start;
  logic [ADDR_W:0] k_len;
  addr_t           a_base, b_base, c_base;
  src_sel_e        a_sel, b_sel, c_sel;
  logic            busy, done;
  logic            a_re, b_re;
  addr_t           a_addr, b_addr;
  logic [W-1:0]    a_rdata, b_rdata;
  a_flit_t         a_west [N], a_east [N];
  b_flit_t         b_north [N], b_south [N];
  logic            c_in_we, c_we;
  addr_t           c_in_addr, c_addr;
  logic [W-1:0]    c_in_data, c_data;

  mm_block #(.N(N)) dut (.*);

  // behavioural A and B BRAMs
  logic [W-1:0] amem [512];
  logic [W-1:0] bmem [512];
  always_ff @(posedge clk) begin
    if (a_re) a_rdata <= amem[a_addr];
    if (b_re) b_rdata <= bmem[b_addr];
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

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
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic int scale(longint acc);
    longint q = acc >>> 8;
    return (q > 32767) ? 32767 : (q < -32768) ? -32768 : int'(q);
  endfunction

  data_t A [N][KMAX];
  data_t B [KMAX][N];

  task automatic product(int k, src_sel_e as, src_sel_e bs, src_sel_e cs);
    int s, rows, fwd_rows, t_done, ab, bb, cb;
    longint acc;
    ab = $urandom_range(400); bb = $urandom_range(400); cb = $urandom_range(400);
    for (int i = 0; i < N; i++)
      for (int n = 0; n < k; n++) begin
        A[i][n] = data_t'($urandom_range(1024) - 512);
        B[n][i] = data_t'($urandom_range(1024) - 512);
      end
    for (int n = 0; n < k; n++)
      for (int i = 0; i < N; i++) begin
        amem[ab + n][i*DATA_W +: DATA_W] = A[i][n];
        bmem[bb + n][i*DATA_W +: DATA_W] = B[n][i];
      end
    a_sel = as; b_sel = bs; c_sel = cs;
    a_base = addr_t'(ab); b_base = addr_t'(bb); c_base = addr_t'(cb);
    k_len = (ADDR_W+1)'(k);
    start = 1'b1;
    s = cyc;
    rows = 0; fwd_rows = 0; t_done = -1;
    for (int t = 0; t < k + 4 * N + 8; t++) begin
      // neighbour lanes: element n of lane i in cycle s+2+n+i
      for (int i = 0; i < N; i++) begin
        int n = (cyc - s) - 2 - i;
        a_west[i]  = '0;
        b_north[i] = '0;
        if (n >= 0 && n < k) begin
          a_west[i]  = '{vld: (as == SRC_NEIGHBOR), first: (n == 0), last: (n == k - 1), data: A[i][n]};
          b_north[i] = '{vld: (bs == SRC_NEIGHBOR), data: B[n][i]};
        end
      end
      // rows of a fictitious left neighbour, ahead of this block's rows
      c_in_we   = (cyc - s >= 3) && (cyc - s < 3 + N);
      c_in_addr = addr_t'(cyc - s + 450);
      c_in_data = {W/32{32'hA5A5_5A5A}} ^ W'(cyc);
      #1;
      if (as == SRC_NEIGHBOR) check(!a_re, "no A BRAM read in neighbour mode");
      if (bs == SRC_NEIGHBOR) check(!b_re, "no B BRAM read in neighbour mode");
      if (cyc - s == 2 + N) begin
        check(a_east[0].vld && a_east[0].first && a_east[0].data == A[0][0], "A leaves the east edge");
        check(b_south[0].vld && b_south[0].data == B[0][0], "B leaves the south edge");
      end
      if (c_we && c_in_we && cs == SRC_NEIGHBOR) begin
        check(c_addr == c_in_addr && c_data == c_in_data, "neighbour row forwarded");
        fwd_rows++;
      end else if (c_we) begin
        int r = rows;
        check(cyc - s == k + 2 * N + 2 + r, $sformatf("row %0d at cycle %0d", r, cyc - s));
        check(c_addr == addr_t'(cb + r), "row address");
        for (int j = 0; j < N; j++) begin
          acc = 0;
          for (int n = 0; n < k; n++) acc += longint'(A[r][n]) * longint'(B[n][j]);
          check($signed(c_data[j*DATA_W +: DATA_W]) == scale(acc), $sformatf("C(%0d,%0d)", r, j));
        end
        rows++;
      end
      if (done) t_done = cyc - s;
      @(posedge clk); #1;
      start = 1'b0;
    end
    check(rows == N, "all own rows written");
    check(fwd_rows == ((cs == SRC_NEIGHBOR) ? N : 0), "neighbour rows forwarded only in neighbour mode");
    check(t_done == k + 3 * N + 2, $sformatf("done at cycle %0d", t_done));
    check(!busy, "idle after done");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; k_len = '0;
    a_base = '0; b_base = '0; c_base = '0;
    a_sel = SRC_MEMORY; b_sel = SRC_MEMORY; c_sel = SRC_MEMORY;
    c_in_we = 1'b0; c_in_addr = '0; c_in_data = '0;
    a_rdata = '0; b_rdata = '0;
    for (int i = 0; i < N; i++) begin a_west[i] = '0; b_north[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    product(8,  SRC_MEMORY,   SRC_MEMORY,   SRC_MEMORY);
    product(11, SRC_NEIGHBOR, SRC_MEMORY,   SRC_NEIGHBOR);
    product(5,  SRC_MEMORY,   SRC_NEIGHBOR, SRC_MEMORY);
    product(16, SRC_NEIGHBOR, SRC_NEIGHBOR, SRC_NEIGHBOR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
