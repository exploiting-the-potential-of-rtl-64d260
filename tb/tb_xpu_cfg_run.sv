// tb_xpu_cfg_run: test harness for one configuration of the unit (used by
// tb_xpu_configs, not a testbench of its own).
//
// Instantiates xpu_top with the given array size and register length next to a
// behavioural memory, and on `go` runs C += A*B for an M x N x K problem through the
// on-chip GEMM generator: it fills A, B and C with random words, computes the expected
// C here, starts the generator, waits for `gemm_done` and compares every element of C.
// `fin` rises when the run is over; `n_checks` and `n_fail` hold the outcome and
// `n_cycles` the cycles from start to done.
module tb_xpu_cfg_run #(
  parameter int unsigned LANES_P = 4,
  parameter int unsigned SC_P    = 4,
  parameter int unsigned MVL_P   = 16384,
  parameter int unsigned M       = 8,
  parameter int unsigned N       = 8,
  parameter int unsigned K       = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic fin,
  output int   n_checks,
  output int   n_fail,
  output int   n_cycles
);
  localparam int unsigned WB = SC_P * 32;
  localparam int unsigned LB = $clog2(WB / 8);
  localparam int unsigned MA = 'h0000, MB = 'h10000, MC = 'h20000;

  logic              insn_ready, illegal, busy, sa_mode, sew_wide, ev_src_switch, ev_mem_beat;
  logic [15:0]       vl;
  logic [LANES_P-1:0] ev_mac;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [31:0]       mem_req_addr;
  logic [WB-1:0]     mem_req_wdata, mem_rsp_rdata;
  logic [WB/8-1:0]   mem_req_wstrb;
  logic              gemm_start = 1'b0, gemm_busy, gemm_done;

  xpu_top #(.LANES_P(LANES_P), .SC_P(SC_P), .MVL_P(MVL_P)) dut (
    .clk, .rst_n, .insn_valid(1'b0), .insn_ready, .insn('0), .rs1_val('0), .rs2_val('0),
    .illegal, .busy, .vl, .sa_mode, .sew_wide, .ev_src_switch, .ev_mac, .ev_mem_beat,
    .gemm_start, .gemm_m(16'(M)), .gemm_n(16'(N)), .gemm_k(16'(K)), .gemm_a(MA),
    .gemm_b(MB), .gemm_c(MC), .gemm_busy, .gemm_done,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_wstrb, .mem_rsp_valid, .mem_rsp_rdata
  );

  tb_xpu_mem #(.WB(WB), .LINES(32768)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_we(mem_req_we), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .req_wstrb(mem_req_wstrb), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata)
  );

  function automatic void poke32(input int unsigned a, input logic [31:0] v);
    u_mem.lines[a >> LB][((a >> 2) % (WB / 32)) * 32 +: 32] = v;
  endfunction
  function automatic logic [31:0] peek32(input int unsigned a);
    return u_mem.lines[a >> LB][((a >> 2) % (WB / 32)) * 32 +: 32];
  endfunction

  logic [31:0] expc [M * N];

  initial begin
    fin = 1'b0; n_checks = 0; n_fail = 0; n_cycles = 0;
    while (!go) @(negedge clk);
    for (int i = 0; i < int'(M * K); i++) poke32(MA + 4 * i, $urandom());
    for (int i = 0; i < int'(K * N); i++) poke32(MB + 4 * i, $urandom());
    for (int i = 0; i < int'(M * N); i++) poke32(MC + 4 * i, $urandom());
    for (int i = 0; i < int'(M); i++)
      for (int j = 0; j < int'(N); j++) begin
        logic [31:0] acc;
        acc = peek32(MC + 4 * (i * N + j));
        for (int k = 0; k < int'(K); k++)
          acc += peek32(MA + 4 * (i * K + k)) * peek32(MB + 4 * (k * N + j));
        expc[i * N + j] = acc;
      end
    @(negedge clk);
    gemm_start = 1'b1;
    @(negedge clk);
    gemm_start = 1'b0;
    while (gemm_busy) begin
      @(negedge clk);
      n_cycles++;
    end
    for (int i = 0; i < int'(M * N); i++) begin
      n_checks++;
      if (peek32(MC + 4 * i) !== expc[i]) begin
        if (n_fail < 4) $display("FAIL %0dx%0d array, MVL %0d: C element %0d got %h expected %h",
                                 LANES_P, SC_P, MVL_P, i, peek32(MC + 4 * i), expc[i]);
        n_fail++;
      end
    end
    $display("%0dx%0d array, MVL %0d: GEMM %0dx%0dx%0d in %0d cycles, %0d of %0d wrong",
             LANES_P, SC_P, MVL_P, M, N, K, n_cycles, n_fail, M * N);
    fin = 1'b1;
  end
endmodule
