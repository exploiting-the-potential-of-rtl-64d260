// tb_xpu_configs: the unit at other array sizes and register lengths of its design space
// (2x2 with MVL = 2048 bits, 8x8 with MVL = 16384 bits, 8x4 with MVL = 4096 bits), each
// running a GEMM through the on-chip generator with depth split into several vsa
// instructions, and checked element by element (see tb_xpu_cfg_run).
module tb_xpu_configs;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic go = 1'b0;
  logic f0, f1, f2;
  int   c0, c1, c2, e0, e1, e2, y0, y1, y2;

  // 2x2, MVL 2048: 16 words per lane, deepest vsa 32 rows of B
  tb_xpu_cfg_run #(.LANES_P(2), .SC_P(2), .MVL_P(2048), .M(4), .N(6), .K(70)) u_2x2 (
    .clk, .rst_n, .go, .fin(f0), .n_checks(c0), .n_fail(e0), .n_cycles(y0));
  // 8x8, MVL 16384: 8 words per lane, deepest vsa 64 rows of B
  tb_xpu_cfg_run #(.LANES_P(8), .SC_P(8), .MVL_P(16384), .M(16), .N(16), .K(100)) u_8x8 (
    .clk, .rst_n, .go, .fin(f1), .n_checks(c1), .n_fail(e1), .n_cycles(y1));
  // 8 lanes x 4 subwords, MVL 4096: 4 words per lane, deepest vsa 16 rows of B
  tb_xpu_cfg_run #(.LANES_P(8), .SC_P(4), .MVL_P(4096), .M(8), .N(8), .K(40)) u_8x4 (
    .clk, .rst_n, .go, .fin(f2), .n_checks(c2), .n_fail(e2), .n_cycles(y2));

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    go = 1'b1;
    while (!(f0 && f1 && f2)) @(negedge clk);
    checks   = c0 + c1 + c2 + 3;
    failures = e0 + e1 + e2;
    // every run must have taken some cycles (the generator did run)
    if (y0 == 0) failures++;
    if (y1 == 0) failures++;
    if (y2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
