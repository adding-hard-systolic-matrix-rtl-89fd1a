// mm_fabric_top: a ROWS x COLS grid of hard matmul blocks with their BRAMs.
//
// This is the region of an FPGA where hard 4x4x4 systolic matrix multipliers
// replace the DSP slices. Every block has an A BRAM, a B BRAM and a C BRAM
// next to it (port 1 faces the block, port 2 the rest of the fabric, brought
// out here as the *_fab_* ports). The BRAMs are used in their widest
// geometry, one word of N 16-bit elements per address. Neighbouring
// blocks are joined by direct links: A flows from each block to the block on
// its right, B to the block below, and the C stream to the block on the
// right. With the per-block
// configuration (cfg) the grid can run as ROWS*COLS independent N x N x K
// products (every input in memory mode) or, composed systolically, as one
// (ROWS*N) x K by K x (COLS*N) product: the left column reads A from its A
// BRAMs, the top row reads B from its B BRAMs, every other input takes the
// neighbour's stream, and the C rows of a grid row leave through the C BRAM
// of its rightmost block. Any rectangular sub-grid can be composed the same
// way. A block whose C port feeds a right neighbour in C-neighbour mode does
// not write its own C BRAM.
//
// Operation: a 'start' pulse (with k_len) starts block (r,c) (r+c)*N cycles
// later, which lines up its BRAM operands with the operands arriving from
// its neighbours. 'done' pulses once every block has finished writing its C
// tile; 'busy' is high in between. With 'start' high in cycle s, 'done' is
// high in cycle s + K + (ROWS+COLS+1)*N + 3 for a product of inner dimension
// K (this holds for the composed and the independent configuration, since the
// last block to start is always block (ROWS-1, COLS-1)). A new start is
// accepted from the cycle after 'done'; a start
// while busy is ignored.
//
// Synchronous, active-low reset. The 4x4x4 block size is the one the
// architecture study recommends; the default grid of 2 x 2 blocks is its
// 8x8x8 example of systolic composition. Giving every block its own three
// BRAMs, the start stagger and the completion logic are this design's
// choices. The A and B streams leaving the east and south edges of the grid
// are left unconnected (a larger grid would continue them).
module mm_fabric_top
  import mm_pkg::*;
#(
  parameter int unsigned N    = 4,   // edge length of one hard matmul
  parameter int unsigned ROWS = 2,   // grid rows
  parameter int unsigned COLS = 2    // grid columns
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [ADDR_W:0]     k_len,
  input  blk_cfg_t            cfg       [ROWS][COLS],
  output logic                busy,
  output logic                done,
  // fabric side (port 2) of the A, B and C BRAMs of each block
  input  logic                a_fab_en    [ROWS][COLS],
  input  logic                a_fab_we    [ROWS][COLS],
  input  addr_t               a_fab_addr  [ROWS][COLS],
  input  logic [N*DATA_W-1:0] a_fab_wdata [ROWS][COLS],
  output logic [N*DATA_W-1:0] a_fab_rdata [ROWS][COLS],
  input  logic                b_fab_en    [ROWS][COLS],
  input  logic                b_fab_we    [ROWS][COLS],
  input  addr_t               b_fab_addr  [ROWS][COLS],
  input  logic [N*DATA_W-1:0] b_fab_wdata [ROWS][COLS],
  output logic [N*DATA_W-1:0] b_fab_rdata [ROWS][COLS],
  input  logic                c_fab_en    [ROWS][COLS],
  input  logic                c_fab_we    [ROWS][COLS],
  input  addr_t               c_fab_addr  [ROWS][COLS],
  input  logic [N*DATA_W-1:0] c_fab_wdata [ROWS][COLS],
  output logic [N*DATA_W-1:0] c_fab_rdata [ROWS][COLS]
);

  localparam int unsigned W        = N * DATA_W;
  localparam int unsigned MAX_DLY  = (ROWS + COLS - 2) * N;
  localparam int unsigned BRAM_AW  = $clog2(32768 / W) + $clog2(W);  // 32 Kbit deepest geometry

  // ---------------------------------------------------------------------
  // Staggered start: start_dly[d] is 'start' delayed by d cycles.
  // A start while a product is running is ignored.
  logic run;
  logic start_dly [MAX_DLY+1];
  assign start_dly[0] = start && !run;
  for (genvar d = 1; d <= MAX_DLY; d++) begin : g_dly
    always_ff @(posedge clk) begin
      if (!rst_n) start_dly[d] <= 1'b0;
      else        start_dly[d] <= start_dly[d-1];
    end
  end

  // ---------------------------------------------------------------------
  // Grid of blocks and their BRAMs.
  logic blk_busy [ROWS][COLS];
  logic blk_done [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // Links entering this block from the left and from above, and the
      // streams it passes on (read by the neighbours' generate blocks).
      a_flit_t      a_in  [N];
      a_flit_t      a_out [N];
      b_flit_t      b_in  [N];
      b_flit_t      b_out [N];
      logic         c_in_we,  c_out_we;
      addr_t        c_in_addr, c_out_addr;
      logic [W-1:0] c_in_data, c_out_data;

      logic         a_re, b_re;
      addr_t        a_addr, b_addr;
      logic [W-1:0] a_rdata, b_rdata;
      logic         c_bram_we;

      if (c == 0) begin : g_west_edge
        for (genvar i = 0; i < N; i++) begin : g_lane
          assign a_in[i] = '0;
        end
        assign c_in_we   = 1'b0;
        assign c_in_addr = '0;
        assign c_in_data = '0;
      end else begin : g_west_link
        assign a_in      = g_row[r].g_col[c-1].a_out;
        assign c_in_we   = g_row[r].g_col[c-1].c_out_we;
        assign c_in_addr = g_row[r].g_col[c-1].c_out_addr;
        assign c_in_data = g_row[r].g_col[c-1].c_out_data;
      end

      if (r == 0) begin : g_north_edge
        for (genvar i = 0; i < N; i++) begin : g_lane
          assign b_in[i] = '0;
        end
      end else begin : g_north_link
        assign b_in = g_row[r-1].g_col[c].b_out;
      end

      mm_block #(.N(N)) u_blk (
        .clk       (clk),
        .rst_n     (rst_n),
        .start     (start_dly[(r + c) * N]),
        .k_len     (k_len),
        .a_base    (cfg[r][c].a_base),
        .b_base    (cfg[r][c].b_base),
        .c_base    (cfg[r][c].c_base),
        .a_sel     (cfg[r][c].a_sel),
        .b_sel     (cfg[r][c].b_sel),
        .c_sel     (cfg[r][c].c_sel),
        .busy      (blk_busy[r][c]),
        .done      (blk_done[r][c]),
        .a_re      (a_re),
        .a_addr    (a_addr),
        .a_rdata   (a_rdata),
        .b_re      (b_re),
        .b_addr    (b_addr),
        .b_rdata   (b_rdata),
        .a_west    (a_in),
        .a_east    (a_out),
        .b_north   (b_in),
        .b_south   (b_out),
        .c_in_we   (c_in_we),
        .c_in_addr (c_in_addr),
        .c_in_data (c_in_data),
        .c_we      (c_out_we),
        .c_addr    (c_out_addr),
        .c_data    (c_out_data)
      );

      // The C port feeds either this block's C BRAM or the right neighbour.
      if (c + 1 < COLS) begin : g_c_to_bram
        assign c_bram_we = c_out_we && (cfg[r][c+1].c_sel != SRC_NEIGHBOR);
      end else begin : g_c_edge
        assign c_bram_we = c_out_we;
      end

      bram #(.WIDTH(W)) u_bram_a (
        .clk (clk), .geom ('0),
        .en1 (a_re), .we1 (1'b0), .addr1 (BRAM_AW'(a_addr)), .wdata1 ('0), .rdata1 (a_rdata),
        .en2 (a_fab_en[r][c]), .we2 (a_fab_we[r][c]), .addr2 (BRAM_AW'(a_fab_addr[r][c])),
        .wdata2 (a_fab_wdata[r][c]), .rdata2 (a_fab_rdata[r][c])
      );

      bram #(.WIDTH(W)) u_bram_b (
        .clk (clk), .geom ('0),
        .en1 (b_re), .we1 (1'b0), .addr1 (BRAM_AW'(b_addr)), .wdata1 ('0), .rdata1 (b_rdata),
        .en2 (b_fab_en[r][c]), .we2 (b_fab_we[r][c]), .addr2 (BRAM_AW'(b_fab_addr[r][c])),
        .wdata2 (b_fab_wdata[r][c]), .rdata2 (b_fab_rdata[r][c])
      );

      logic [W-1:0] c_rdata_unused;
      bram #(.WIDTH(W)) u_bram_c (
        .clk (clk), .geom ('0),
        .en1 (c_bram_we), .we1 (c_bram_we), .addr1 (BRAM_AW'(c_out_addr)),
        .wdata1 (c_out_data), .rdata1 (c_rdata_unused),
        .en2 (c_fab_en[r][c]), .we2 (c_fab_we[r][c]), .addr2 (BRAM_AW'(c_fab_addr[r][c])),
        .wdata2 (c_fab_wdata[r][c]), .rdata2 (c_fab_rdata[r][c])
      );
    end
  end

  // ---------------------------------------------------------------------
  // Completion: every block has pulsed 'done' since the last start.
  logic [ROWS*COLS-1:0] seen;
  logic [ROWS*COLS-1:0] seen_next;
  logic                 any_blk_busy;

  always_comb begin
    any_blk_busy = 1'b0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        any_blk_busy |= blk_busy[r][c];
  end
  assign busy = run || any_blk_busy;

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        seen_next[r*COLS + c] = seen[r*COLS + c] | blk_done[r][c];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      seen <= '0;
    end else begin
      done <= 1'b0;
      if (start_dly[0]) begin
        run  <= 1'b1;
        seen <= '0;
      end else if (run) begin
        seen <= seen_next;
        if (&seen_next) begin
          run  <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
