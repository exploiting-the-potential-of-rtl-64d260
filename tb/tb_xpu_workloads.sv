// tb_xpu_workloads: GEMM shapes taken from the evaluated application classes, run on the
// default-size unit in both modes and checked against products computed here.
//   systolic mode : the on-chip generator issues the lane-load GEMM (vsa per 4x4 tile,
//                   depth split into chunks of at most 128 rows of B);
//   vector mode   : the testbench issues one vmacc.vx per (row of C, element of A).
// Shapes: Low Order FES 8x32x16 (whole GEMM); slices of a Linpack call (K = 129, two
// depth chunks), of the first ResNet18 layer (K = 147) and of a DeepBench call (K = 256).
// The cycle count of each mode is printed; the results of both must match the product.
module tb_xpu_workloads;
  import xpu_pkg::*;

  localparam int unsigned WB  = W;
  localparam int unsigned WPL = MVL / (LANES * W);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              insn_valid = 1'b0;
  logic              insn_ready;
  logic [31:0]       insn = '0, rs1_val = '0, rs2_val = '0;
  logic              illegal, busy, sa_mode, sew_wide, ev_src_switch, ev_mem_beat;
  logic [15:0]       vl;
  logic [LANES-1:0]  ev_mac;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [31:0]       mem_req_addr;
  logic [WB-1:0]     mem_req_wdata, mem_rsp_rdata;
  logic [WB/8-1:0]   mem_req_wstrb;
  logic              gemm_start = 1'b0, gemm_busy, gemm_done;
  logic [15:0]       gemm_m = '0, gemm_n = '0, gemm_k = '0;
  logic [31:0]       gemm_a = '0, gemm_b = '0, gemm_c = '0;

  xpu_top dut (
    .clk, .rst_n, .insn_valid, .insn_ready, .insn, .rs1_val, .rs2_val, .illegal, .busy,
    .vl, .sa_mode, .sew_wide, .ev_src_switch, .ev_mac, .ev_mem_beat,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_wstrb, .mem_rsp_valid, .mem_rsp_rdata,
    .gemm_start, .gemm_m, .gemm_n, .gemm_k, .gemm_a, .gemm_b, .gemm_c, .gemm_busy, .gemm_done
  );

  tb_xpu_mem #(.WB(WB), .LINES(65536)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_we(mem_req_we), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .req_wstrb(mem_req_wstrb), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always_ff @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ memory backdoor
  function automatic void poke32(input int unsigned a, input logic [31:0] v);
    u_mem.lines[a >> 4][((a >> 2) & 3) * 32 +: 32] = v;
  endfunction
  function automatic logic [31:0] peek32(input int unsigned a);
    return u_mem.lines[a >> 4][((a >> 2) & 3) * 32 +: 32];
  endfunction

  // ------------------------------------------------------------ encodings
  localparam logic [4:0] VA = 5'd1, VB = 5'd2, VC = 5'd3, VIA = 5'd4, VIB = 5'd5, VIC = 5'd6;

  function automatic logic [31:0] e_vsetvli(input bit avl_max, input logic [2:0] vsew);
    return {1'b0, 5'b0, vsew, 3'b000, (avl_max ? 5'd0 : 5'd1), 3'b111, 5'd1, OPC_OP_V};
  endfunction
  function automatic logic [31:0] e_mem(input logic [6:0] opc, input logic [2:0] nf,
      input bit wide, input logic [1:0] mop, input logic [4:0] vs2, input logic [4:0] vd);
    return {nf, wide, mop, 1'b1, vs2, 5'd2, (wide ? 3'b000 : 3'b110), vd, opc};
  endfunction
  function automatic logic [31:0] e_arith(input logic [5:0] f6, input logic [2:0] f3,
      input logic [4:0] vs2, input logic [4:0] vs1, input logic [4:0] vd);
    return {f6, 1'b1, vs2, vs1, f3, vd, OPC_OP_V};
  endfunction
  function automatic logic [31:0] e_vsa(input logic [4:0] vc, input logic [4:0] va,
      input logic [4:0] vb);
    return {6'd0, 1'b1, va, vb, 3'b010, vc, OPC_VSA};
  endfunction

  // issue one instruction and wait until the unit is idle again
  task automatic issue(input logic [31:0] i, input logic [31:0] r1 = 0,
                       input logic [31:0] r2 = 0);
    @(negedge clk);
    insn = i; rs1_val = r1; rs2_val = r2; insn_valid = 1'b1;
    while (!insn_ready) @(negedge clk);
    @(negedge clk);
    insn_valid = 1'b0;
    while (!insn_ready || busy) @(negedge clk);
  endtask

  task automatic setvl(input int unsigned avl, input bit wide);
    issue(e_vsetvli(1'b0, wide ? VSEW_W : VSEW_D), avl);
  endtask

  // ------------------------------------------------------------ matrices
  // A[M][K], B[K][N], C[M][N], row-major 32-bit words at byte bases
  function automatic void fill(input int unsigned base, input int unsigned n);
    for (int unsigned i = 0; i < n; i++) poke32(base + 4 * i, $urandom());
  endfunction

  // expected C + A*B into a scratch area, computed from the memory contents
  function automatic void golden(input int M, input int N, input int K,
      input int unsigned A, input int unsigned B, input int unsigned C,
      input int unsigned G);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        logic [31:0] acc;
        acc = peek32(C + 4 * (i * N + j));
        for (int k = 0; k < K; k++)
          acc += peek32(A + 4 * (i * K + k)) * peek32(B + 4 * (k * N + j));
        poke32(G + 4 * (i * N + j), acc);
      end
  endfunction

  task automatic compare(input string what, input int M, input int N,
                         input int unsigned C, input int unsigned G);
    int bad = 0;
    for (int i = 0; i < M * N; i++) begin
      checks++;
      if (peek32(C + 4 * i) !== peek32(G + 4 * i)) begin
        failures++;
        if (bad++ < 5) $display("FAIL %s: element %0d got %h expected %h", what, i,
                                peek32(C + 4 * i), peek32(G + 4 * i));
      end
    end
    $display("%s: %0d elements compared, %0d wrong", what, M * N, bad);
  endtask

  // GEMM in vector mode: one row of C at a time, vmacc.vx with A[i][k] as the scalar
  task automatic gemm_vpu(input int M, input int N, input int K, input int unsigned A,
                          input int unsigned B, input int unsigned C);
    setvl(N, 1'b0);
    for (int i = 0; i < M; i++) begin
      issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, VC), C + 4 * (i * N));
      for (int k = 0; k < K; k++) begin
        issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, VB), B + 4 * (k * N));
        issue(e_arith(F6_VMACC, F3_OPMVX, VB, 5'd1, VC), peek32(A + 4 * (i * K + k)));
      end
      issue(e_mem(OPC_STORE_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, VC), C + 4 * (i * N));
    end
  endtask

  // ------------------------------------------------------------ workloads
  localparam int unsigned MA = 'h00000, MB = 'h20000, MC = 'h40000, MC2 = 'h50000, MG = 'h60000;

  task automatic run(input string name, input int M, input int N, input int K);
    longint t0, t_sa, t_vpu;
    fill(MA, M * K); fill(MB, K * N); fill(MC, M * N);
    for (int i = 0; i < M * N; i++) poke32(MC2 + 4 * i, peek32(MC + 4 * i));
    golden(M, N, K, MA, MB, MC, MG);
    // systolic mode through the generator
    @(negedge clk);
    gemm_m = 16'(M); gemm_n = 16'(N); gemm_k = 16'(K); gemm_a = MA; gemm_b = MB; gemm_c = MC;
    gemm_start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    gemm_start = 1'b0;
    while (gemm_busy) @(negedge clk);
    t_sa = cycle - t0;
    compare({name, " SA mode"}, M, N, MC, MG);
    // vector mode from the host
    t0 = cycle;
    gemm_vpu(M, N, K, MA, MB, MC2);
    t_vpu = cycle - t0;
    compare({name, " VPU mode"}, M, N, MC2, MG);
    $display("%s %0dx%0dx%0d: SA mode %0d cycles, VPU mode %0d cycles", name, M, N, K,
             t_sa, t_vpu);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run("Low Order FES", 8, 32, 16);
    run("Linpack slice", 8, 8, 129);
    run("ResNet18 slice", 8, 16, 147);
    run("DeepBench slice", 4, 8, 256);
    run("AlexNet slice", 4, 4, 363);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
