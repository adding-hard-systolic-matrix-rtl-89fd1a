// mm_out_if: output data interface of a matmul block.
//
// The PEs keep the finished C tile in their result registers. The element in
// the bottom-right corner, PE(N-1,N-1), is the last one to finish, so its
// result_vld pulse starts the read-out. The interface then writes the tile to
// the output BRAM one row per cycle: row r goes to address c_base + r, with
// element C(r,j) in bits [16j+15:16j] of the word. Each accumulator is shifted
// down by the fractional-bit count and saturated to the 16-bit operand format.
//
// Timing: if PE(N-1,N-1) pulses result_vld in cycle T, rows 0..N-1 are
// written in cycles T+2 .. T+N+1 (registered outputs), and drain_done pulses
// together with the last row. Row-per-cycle write-back and the scaling rule
// are this design's choices; the block itself is named in the architecture.
module mm_out_if
  import mm_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  acc_t                  result [N][N],
  input  logic                  trigger,     // result_vld of PE(N-1,N-1)
  input  addr_t                 c_base,
  output logic                  c_we,
  output addr_t                 c_addr,
  output logic [N*DATA_W-1:0]   c_data,
  output logic                  drain_done
);

  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1;

  logic          draining;
  logic [RW-1:0] row;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      draining   <= 1'b0;
      row        <= '0;
      c_we       <= 1'b0;
      c_addr     <= '0;
      c_data     <= '0;
      drain_done <= 1'b0;
    end else begin
      c_we       <= draining;
      drain_done <= draining && (row == RW'(N-1));
      if (draining) begin
        c_addr <= c_base + addr_t'(row);
        for (int j = 0; j < N; j++)
          c_data[j*DATA_W +: DATA_W] <= sat_scale(result[row][j]);
        row <= row + 1'b1;
        if (row == RW'(N-1)) begin
          draining <= 1'b0;
          row      <= '0;
        end
      end
      if (trigger) begin
        draining <= 1'b1;
        row      <= '0;
      end
    end
  end

endmodule
