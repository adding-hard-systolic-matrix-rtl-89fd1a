// mm_pkg: types and constants shared by the hard matrix-multiplier blocks.
//
// Operands are 16-bit signed fixed-point numbers. An A operand travels through
// the PE grid together with three tag bits (valid, first, last) that tell each
// PE when to clear its accumulator and when its result is complete; a B operand
// carries only a valid bit. The fractional-bit count of the fixed-point format
// and the accumulator width are this design's choice; the 16-bit precision
// follows the experiments the architecture was evaluated with.
package mm_pkg;

  localparam int unsigned DATA_W = 16;   // operand precision (16-bit fixed point)
  localparam int unsigned FRAC_W = 8;    // fractional bits of operands and results
  localparam int unsigned ACC_W  = 40;   // accumulator: 32-bit product + 8 guard bits
  localparam int unsigned ADDR_W = 9;    // 512-word deep BRAM in its 512 x 64 geometry

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [ADDR_W-1:0]        addr_t;

  // Operand of matrix A plus the tags that steer the accumulators.
  typedef struct packed {
    logic  vld;    // this flit carries an element
    logic  first;  // element k = 0: start a new dot product
    logic  last;   // element k = K-1: the dot product is complete
    data_t data;
  } a_flit_t;

  // Operand of matrix B.
  typedef struct packed {
    logic  vld;
    data_t data;
  } b_flit_t;

  // Input multiplexer setting of a building block ('memory mode' and
  // 'neighbor mode').
  typedef enum logic {
    SRC_MEMORY   = 1'b0,  // operands come from the block's own BRAM port
    SRC_NEIGHBOR = 1'b1   // operands come from the adjacent matmul
  } src_sel_e;

  // Run-time configuration of one building block in a grid.
  typedef struct packed {
    src_sel_e a_sel;   // A from own BRAM or from the block on the left
    src_sel_e b_sel;   // B from own BRAM or from the block above
    src_sel_e c_sel;   // C port also forwards the rows of the block on the left
    addr_t    a_base;  // first A word in the block's A BRAM
    addr_t    b_base;  // first B word in the block's B BRAM
    addr_t    c_base;  // address of row 0 of this block's C tile
  } blk_cfg_t;

  // Scale an accumulator down to the operand format, saturating.
  function automatic data_t sat_scale(acc_t acc);
    acc_t shifted;
    shifted = acc >>> FRAC_W;
    if (shifted > acc_t'(data_t'(2**(DATA_W-1) - 1)))
      return data_t'(2**(DATA_W-1) - 1);
    else if (shifted < -acc_t'(2**(DATA_W-1)))
      return data_t'(-(2**(DATA_W-1)));
    else
      return data_t'(shifted);
  endfunction

endpackage
