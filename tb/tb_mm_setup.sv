// tb_mm_setup: self-checking test of the systolic data setup circuit.
//
// Drives a new random word into all four lanes every cycle and checks that
// lane i shows, in every cycle, the value that entered it i cycles earlier.
module tb_mm_setup;
  localparam int N = 4;
  typedef logic [11:0] elem_t;

  logic  clk = 1'b0;
  logic  rst_n;
  elem_t din  [N];
  elem_t dout [N];

  int checks = 0, failures = 0;

  mm_setup #(.N(N), .T(elem_t)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  elem_t sent [200][N];

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < N; i++) din[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) begin
        din[i]     = elem_t'($urandom);
        sent[t][i] = din[i];
      end
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (t >= i) begin
          if (dout[i] !== sent[t-i][i]) begin
            failures++;
            $display("FAIL lane %0d cycle %0d: got %h expected %h", i, t, dout[i], sent[t-i][i]);
          end
        end else if (dout[i] !== '0) begin
          failures++;
          $display("FAIL lane %0d cycle %0d: not reset", i, t);
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
