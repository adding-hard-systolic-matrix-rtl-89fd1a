// mm_block: hard building-block matrix multiplier with its mode multiplexers.
//
// One block multiplies an N x K matrix A by a K x N matrix B (N = 4 in the
// recommended configuration, K up to the BRAM depth). The A BRAM holds column
// k of A at a_base + k, the B BRAM row k of B at b_base + k, each word packing
// N 16-bit elements (element i in bits [16i+15:16i]). The controller reads
// one word of each per cycle, the setup circuits skew the lanes, and the
// output-stationary PE array accumulates C = A x B, which the output
// interface writes to the C BRAM one row per cycle at c_base + r.
//
// Three multiplexers let blocks be composed systolically into larger
// multipliers:
//   a_sel  MEMORY: A comes from this block's BRAM; NEIGHBOR: A comes from the
//          east edge of the block on the left (already skewed, tags included)
//   b_sel  the same for B and the block above
//   c_sel  MEMORY: the C port carries only this block's rows; NEIGHBOR: the
//          C port also forwards the rows arriving from the block on the left
//          in the cycles where this block writes nothing.
// The operands leaving the east and south edges (a_east, b_south) always feed
// the neighbours. The A/B multiplexers sit between the setup circuits and the
// PE array, so that neighbour data, which is skewed already, is not skewed a
// second time.
//
// Timing: 'start' at cycle s issues read k in cycle s+1+k; the first C row of
// a block in memory mode is written in cycle s+K+2N+2 and 'done' pulses one
// cycle after the last row. In a composed grid, the block in grid row r and
// column c must be started (r+c)*N cycles after block (0,0) so that its own
// BRAM operands meet the operands arriving from its neighbours; the C rows of
// neighbouring blocks then arrive in disjoint cycles and the C multiplexer
// never has to choose between two writes.
module mm_block
  import mm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // operation
  input  logic                start,
  input  logic [ADDR_W:0]     k_len,
  input  addr_t               a_base,
  input  addr_t               b_base,
  input  addr_t               c_base,
  input  src_sel_e            a_sel,
  input  src_sel_e            b_sel,
  input  src_sel_e            c_sel,
  output logic                busy,
  output logic                done,
  // A and B BRAM ports (memory mode)
  output logic                a_re,
  output addr_t               a_addr,
  input  logic [N*DATA_W-1:0] a_rdata,
  output logic                b_re,
  output addr_t               b_addr,
  input  logic [N*DATA_W-1:0] b_rdata,
  // systolic links to the neighbours (neighbor mode)
  input  a_flit_t             a_west  [N],
  output a_flit_t             a_east  [N],
  input  b_flit_t             b_north [N],
  output b_flit_t             b_south [N],
  // C stream from the left neighbour and to the C BRAM or right neighbour
  input  logic                c_in_we,
  input  addr_t               c_in_addr,
  input  logic [N*DATA_W-1:0] c_in_data,
  output logic                c_we,
  output addr_t               c_addr,
  output logic [N*DATA_W-1:0] c_data
);

  logic tag_vld, tag_first, tag_last;
  logic drain_done;

  mm_ctrl u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .k_len      (k_len),
    .a_base     (a_base),
    .b_base     (b_base),
    .a_mem      (a_sel == SRC_MEMORY),
    .b_mem      (b_sel == SRC_MEMORY),
    .drain_done (drain_done),
    .a_re       (a_re),
    .a_addr     (a_addr),
    .b_re       (b_re),
    .b_addr     (b_addr),
    .tag_vld    (tag_vld),
    .tag_first  (tag_first),
    .tag_last   (tag_last),
    .busy       (busy),
    .done       (done)
  );

  // Operands read from memory, still aligned, then skewed.
  a_flit_t a_mem_flit [N];
  b_flit_t b_mem_flit [N];
  a_flit_t a_mem_skew [N];
  b_flit_t b_mem_skew [N];

  for (genvar i = 0; i < N; i++) begin : g_lane
    always_comb begin
      a_mem_flit[i].vld   = tag_vld && (a_sel == SRC_MEMORY);
      a_mem_flit[i].first = tag_first;
      a_mem_flit[i].last  = tag_last;
      a_mem_flit[i].data  = a_rdata[i*DATA_W +: DATA_W];
      b_mem_flit[i].vld   = tag_vld && (b_sel == SRC_MEMORY);
      b_mem_flit[i].data  = b_rdata[i*DATA_W +: DATA_W];
    end
  end

  mm_setup #(.N(N), .T(a_flit_t)) u_setup_a (
    .clk (clk), .rst_n (rst_n), .din (a_mem_flit), .dout (a_mem_skew)
  );

  mm_setup #(.N(N), .T(b_flit_t)) u_setup_b (
    .clk (clk), .rst_n (rst_n), .din (b_mem_flit), .dout (b_mem_skew)
  );

  // Input multiplexers: memory mode or neighbour mode.
  a_flit_t a_core [N];
  b_flit_t b_core [N];

  for (genvar i = 0; i < N; i++) begin : g_mux
    assign a_core[i] = (a_sel == SRC_NEIGHBOR) ? a_west[i]  : a_mem_skew[i];
    assign b_core[i] = (b_sel == SRC_NEIGHBOR) ? b_north[i] : b_mem_skew[i];
  end

  logic                own_we;
  addr_t               own_addr;
  logic [N*DATA_W-1:0] own_data;

  mm_core #(.N(N)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .a_west     (a_core),
    .b_north    (b_core),
    .a_east     (a_east),
    .b_south    (b_south),
    .c_base     (c_base),
    .c_we       (own_we),
    .c_addr     (own_addr),
    .c_data     (own_data),
    .drain_done (drain_done)
  );

  // Output multiplexer: own rows, or the rows passed on from the left.
  logic fwd;
  assign fwd    = (c_sel == SRC_NEIGHBOR) && !own_we;
  assign c_we   = fwd ? c_in_we   : own_we;
  assign c_addr = fwd ? c_in_addr : own_addr;
  assign c_data = fwd ? c_in_data : own_data;

  assert property (@(posedge clk) disable iff (!rst_n)
                   (c_sel == SRC_NEIGHBOR) |-> !(own_we && c_in_we))
    else $error("mm_block: C rows from this block and its neighbour collide");

endmodule
