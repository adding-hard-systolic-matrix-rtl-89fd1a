// mm_ctrl: operand address generator and sequencer of one matmul block.
//
// On 'start' (accepted only while idle, with k_len > 0) the controller reads
// k_len consecutive words from the A BRAM (column k of A at a_base + k) and the
// B BRAM (row k of B at b_base + k), one word per cycle. Reads are issued only
// for the inputs that are in memory mode. Because the BRAM answers one cycle
// later, the operand tags (valid, first for k = 0, last for k = k_len - 1) are
// produced one cycle after the address so that they line up with the read
// data. After the last read the controller waits for the output interface to
// report that the C tile has been written ('drain_done'), then pulses 'done'.
//
// Timing: address k leaves in cycle start+1+k; tag k in cycle start+2+k.
// The matmul driving the BRAM address ports follows the architecture
// description; the word layout and the handshake are this design's choices.
module mm_ctrl
  import mm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,      // begin one matrix product
  input  logic [ADDR_W:0] k_len,      // inner dimension K (1 .. 2**ADDR_W)
  input  addr_t           a_base,     // address of column 0 of A
  input  addr_t           b_base,     // address of row 0 of B
  input  logic            a_mem,      // A input is in memory mode
  input  logic            b_mem,      // B input is in memory mode
  input  logic            drain_done, // output interface finished the C tile
  output logic            a_re,       // A BRAM read enable
  output addr_t           a_addr,
  output logic            b_re,       // B BRAM read enable
  output addr_t           b_addr,
  output logic            tag_vld,    // tags aligned with BRAM read data
  output logic            tag_first,
  output logic            tag_last,
  output logic            busy,
  output logic            done        // one-cycle pulse at the end
);

  typedef enum logic [1:0] {S_IDLE, S_FEED, S_WAIT} state_e;

  state_e          state;
  logic [ADDR_W:0] k;
  logic [ADDR_W:0] k_last;
  logic            feeding;

  assign feeding = (state == S_FEED);
  assign a_re    = feeding && a_mem;
  assign b_re    = feeding && b_mem;
  assign a_addr  = a_base + addr_t'(k);
  assign b_addr  = b_base + addr_t'(k);
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      k_last    <= '0;
      tag_vld   <= 1'b0;
      tag_first <= 1'b0;
      tag_last  <= 1'b0;
      done      <= 1'b0;
    end else begin
      tag_vld   <= feeding;
      tag_first <= feeding && (k == '0);
      tag_last  <= feeding && (k == k_last);
      done      <= 1'b0;
      unique case (state)
        S_IDLE: if (start && k_len != '0) begin
          state  <= S_FEED;
          k      <= '0;
          k_last <= k_len - 1'b1;
        end
        S_FEED: begin
          k <= k + 1'b1;
          if (k == k_last) state <= S_WAIT;
        end
        S_WAIT: if (drain_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
