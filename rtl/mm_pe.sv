// mm_pe: one processing element of the systolic matrix multiplier.
//
// The array is output-stationary (Kung's design R1): operands of A move left
// to right, operands of B move top to bottom, and each PE keeps its own
// element of C. Every cycle in which an A operand is valid the PE multiplies it
// with the B operand arriving at the same time and adds the product to its
// accumulator. The 'first' tag travelling with A restarts the sum, the 'last'
// tag copies the finished sum into the result register, so a new product can
// begin accumulating while the previous result is still being read out.
//
// Timing: the operands are passed on registered (one cycle per PE hop); the
// result register and its one-cycle result_vld pulse appear one cycle after
// the operand tagged 'last' entered. The tag scheme and the result register
// are this design's choices; the dataflow follows design R1.
module mm_pe
  import mm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  a_flit_t a_in,        // from the left neighbour (or the A input lane)
  input  b_flit_t b_in,        // from the upper neighbour (or the B input lane)
  output a_flit_t a_out,       // to the right neighbour
  output b_flit_t b_out,       // to the lower neighbour
  output acc_t    result,      // finished dot product
  output logic    result_vld   // one-cycle pulse when 'result' is updated
);

  acc_t acc;
  acc_t prod;
  acc_t sum;

  always_comb begin
    prod = acc_t'(a_in.data) * acc_t'(b_in.data);
    sum  = a_in.first ? prod : acc + prod;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_out      <= '0;
      b_out      <= '0;
      acc        <= '0;
      result     <= '0;
      result_vld <= 1'b0;
    end else begin
      a_out      <= a_in;
      b_out      <= b_in;
      result_vld <= a_in.vld && a_in.last;
      if (a_in.vld) begin
        acc <= sum;
        if (a_in.last) result <= sum;
      end
    end
  end

  // A and B operands of one product must meet in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) a_in.vld |-> b_in.vld)
    else $error("mm_pe: A operand arrived without a B operand");

endmodule
