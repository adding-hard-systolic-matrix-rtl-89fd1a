// mm_core: core of a hard matmul block (the 'core matmul' of a building block).
//
// It joins the N x N output-stationary PE array with the output data
// interface. Skewed operand lanes enter at the west and north edges and leave
// at the east and south edges, from where a neighbouring block can pick them
// up; the finished C tile is written out through the c_* port one row per
// cycle.
//
// Timing: with operand k entering PE(0,0) in cycle t0+k (lane i skewed by i
// cycles), PE(N-1,N-1) pulses result_vld in cycle T = t0+K+2N-2 and row r of C
// is written in cycle T+2+r. The next product may enter as soon as the last
// row of the previous one has been written.
module mm_core
  import mm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  a_flit_t             a_west  [N],
  input  b_flit_t             b_north [N],
  output a_flit_t             a_east  [N],
  output b_flit_t             b_south [N],
  input  addr_t               c_base,
  output logic                c_we,
  output addr_t               c_addr,
  output logic [N*DATA_W-1:0] c_data,
  output logic                drain_done
);

  acc_t result     [N][N];
  logic result_vld [N][N];

  mm_pe_array #(.N(N)) u_array (
    .clk        (clk),
    .rst_n      (rst_n),
    .a_west     (a_west),
    .b_north    (b_north),
    .a_east     (a_east),
    .b_south    (b_south),
    .result     (result),
    .result_vld (result_vld)
  );

  mm_out_if #(.N(N)) u_out (
    .clk        (clk),
    .rst_n      (rst_n),
    .result     (result),
    .trigger    (result_vld[N-1][N-1]),
    .c_base     (c_base),
    .c_we       (c_we),
    .c_addr     (c_addr),
    .c_data     (c_data),
    .drain_done (drain_done)
  );

endmodule
