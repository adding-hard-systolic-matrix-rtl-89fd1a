// tb_mm_workloads: the matrix-multiplication sizes of the architecture study,
// run on small grids of 4x4x4 blocks (and, for comparison, coarser blocks).
//
//   4x4x4       on a 1 x 1 grid (a single block), one pass
//   16x16x16    on a 4 x 4 grid, one composed pass
//   32x32x32    on a 4 x 4 grid, four passes of 16 x 32 x 16
//   64x64x64    on the default 2 x 2 grid, 64 passes of 8 x 64 x 8
//   70x70x70    on the default 2 x 2 grid, 81 passes; 70 is not a multiple
//               of 8, so the passes of the last tile row and column leave
//               blocks partly or wholly idle (fragmentation)
// and, to compare block granularity on the same 32x32x32 product, the same
// product on 256 multipliers arranged as coarser blocks:
//   32x32x32    on a 2 x 2 grid of 8x8x8 blocks, four passes
//   32x32x32    on a single 16x16x16 block, four passes
// Larger grids run the same way (a 16 x 16 grid holds 64x64x64 in one pass),
// but their build time grows steeply: a bench with a 16 x 16 and an 18 x 18
// grid took over 13 minutes to compile, so they are left out here.
// Each runner checks every element of C and the start-to-done latency of
// each pass; this bench adds up the counts.
module tb_mm_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 7;
  bit fin [NR];
  int chk [NR], fl [NR], cyc [NR], pas [NR];

  tb_gemm_runner #(.ROWS(1), .COLS(1), .M(4),  .K(4),  .P(4))  u_w4  (.clk, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]), .compute_cycles(cyc[0]), .passes(pas[0]));
  tb_gemm_runner #(.ROWS(4), .COLS(4), .M(16), .K(16), .P(16)) u_w16 (.clk, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]), .compute_cycles(cyc[1]), .passes(pas[1]));
  tb_gemm_runner #(.ROWS(4), .COLS(4), .M(32), .K(32), .P(32)) u_w32 (.clk, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]), .compute_cycles(cyc[2]), .passes(pas[2]));
  tb_gemm_runner #(.ROWS(2), .COLS(2), .M(64), .K(64), .P(64)) u_w64 (.clk, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]), .compute_cycles(cyc[3]), .passes(pas[3]));
  tb_gemm_runner #(.ROWS(2), .COLS(2), .M(70), .K(70), .P(70)) u_w70 (.clk, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]), .compute_cycles(cyc[4]), .passes(pas[4]));
  tb_gemm_runner #(.N(8),  .ROWS(2), .COLS(2), .M(32), .K(32), .P(32)) u_g8  (.clk, .finished(fin[5]), .checks(chk[5]), .failures(fl[5]), .compute_cycles(cyc[5]), .passes(pas[5]));
  tb_gemm_runner #(.N(16), .ROWS(1), .COLS(1), .M(32), .K(32), .P(32)) u_g16 (.clk, .finished(fin[6]), .checks(chk[6]), .failures(fl[6]), .compute_cycles(cyc[6]), .passes(pas[6]));
  int checks, failures;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int w = 0; w < NR; w++) begin checks += chk[w]; failures += fl[w]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int w = 0; w < NR; w++) all &= fin[w];
    end while (!all);
    checks = 0; failures = 0;
    for (int w = 0; w < NR; w++) begin
      checks += chk[w];
      failures += fl[w];
      if (chk[w] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
