// mm_pe_array: N x N grid of processing elements with hardened
// near-neighbour links.
//
// Row i of the grid receives the A lane a_west[i] at its left edge and passes
// it, one register per PE, to the right; column j receives b_north[j] at the
// top and passes it downwards. The operands leaving the right and bottom
// edges are brought out (a_east, b_south) so that a neighbouring matmul can
// continue the same systolic stream. Each PE exposes its finished result.
//
// Timing: an operand entering PE(0,0) in cycle t reaches PE(i,j) in cycle
// t+i+j, and leaves the array N cycles after it entered its row or column.
module mm_pe_array
  import mm_pkg::*;
#(
  parameter int unsigned N = 4   // matmul edge length
) (
  input  logic    clk,
  input  logic    rst_n,
  input  a_flit_t a_west  [N],      // A lanes, one per row
  input  b_flit_t b_north [N],      // B lanes, one per column
  output a_flit_t a_east  [N],      // A leaving the right edge
  output b_flit_t b_south [N],      // B leaving the bottom edge
  output acc_t    result  [N][N],   // result[i][j] = C(i,j)
  output logic    result_vld [N][N]
);

  // a_link[i][j] enters PE(i,j) from the left; b_link[i][j] from above.
  a_flit_t a_link [N][N+1];
  b_flit_t b_link [N+1][N];

  for (genvar i = 0; i < N; i++) begin : g_edge
    assign a_link[i][0] = a_west[i];
    assign a_east[i]    = a_link[i][N];
    assign b_link[0][i] = b_north[i];
    assign b_south[i]   = b_link[N][i];
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      mm_pe u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .a_in       (a_link[i][j]),
        .b_in       (b_link[i][j]),
        .a_out      (a_link[i][j+1]),
        .b_out      (b_link[i+1][j]),
        .result     (result[i][j]),
        .result_vld (result_vld[i][j])
      );
    end
  end

endmodule
