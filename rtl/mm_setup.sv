// mm_setup: systolic data setup circuit.
//
// A BRAM word holds one column of A (or one row of B): N operands that are
// read in the same cycle. A systolic array needs them staggered in time, so
// lane i passes through i registers before it reaches the edge of the PE
// array; lane 0 is passed straight through. The element type is a parameter,
// so the same circuit skews the tagged A operands and the B operands.
//
// Timing: lane i is delayed by exactly i clock cycles. The delay-line form of
// the circuit is this design's choice; the block's purpose is named in the
// architecture description.
module mm_setup #(
  parameter int unsigned N = 4,          // lanes (matmul edge length)
  parameter type         T = logic [7:0] // element type of a lane
) (
  input  logic clk,
  input  logic rst_n,
  input  T     din  [N],   // all lanes aligned
  output T     dout [N]    // lane i delayed by i cycles
);

  for (genvar i = 0; i < N; i++) begin : g_lane
    if (i == 0) begin : g_direct
      assign dout[0] = din[0];
    end else begin : g_delay
      T pipe [i];
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          for (int s = 0; s < i; s++) pipe[s] <= '0;
        end else begin
          pipe[0] <= din[i];
          for (int s = 1; s < i; s++) pipe[s] <= pipe[s-1];
        end
      end
      assign dout[i] = pipe[i-1];
    end
  end

endmodule
