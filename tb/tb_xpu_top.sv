// tb_xpu_top: end-to-end test of the vector-systolic unit at its default size
// (4 lanes x 4 subwords of 32 bits, MVL = 16384 bits, 32 vector registers).
//
// The testbench plays the host: it writes matrices into a behavioural memory, issues
// instruction sequences through the issue port and compares what the unit stores back
// with products computed here. It runs
//   1. GEMM in systolic mode with lane loads (vsa, lane-by-lane loads of A and of the
//      columns of B, strided packed loads/stores of the C tile), 8x8x128 and 4x4x40;
//   2. a 4x4x32 GEMM with lane loads and again with indexed loads/stores, checking
//      the result and that the lane-load version needs fewer cycles;
//   3. GEMM in vector mode (vmacc.vx with the scalar held for the whole instruction);
//   4. element-wise vadd/vsub/vmul with a vl that leaves a partial word (tail), an
//      unaligned unit-stride access, a lane store and an illegal encoding;
//   5. an 8x8x200 GEMM run by the on-chip instruction generator (depth in two chunks).
// It counts how often each mechanism occurred and fails if one never did.
module tb_xpu_top;
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("WATCHDOG: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_vop = 0, n_vx = 0, n_vsa = 0, n_switch = 0, n_wrap = 0, n_mac = 0;
  int n_lane_ld = 0, n_lane_st = 0, n_stride = 0, n_idx = 0, n_grp = 0, n_single = 0;
  int n_illegal = 0, n_stall = 0, n_tail = 0, n_gen = 0;
  always_ff @(posedge clk) begin
    if (dut.u_ctrl.vop_valid) n_vop <= n_vop + 1;
    if (dut.u_ctrl.vop_valid && dut.g_lane[LANES-1].u_lane.vop_be != '1) n_tail <= n_tail + 1;
    if (ev_src_switch) n_switch <= n_switch + 1;
    if (dut.ri_valid[0]) n_wrap <= n_wrap + 1;
    n_mac <= n_mac + $countones(ev_mac);
    if (illegal) n_illegal <= n_illegal + 1;
    if (mem_req_valid && !mem_req_ready) n_stall <= n_stall + 1;
    if (ev_mem_beat && dut.u_vlsu.grp && dut.u_vlsu.cnt > 1) n_grp <= n_grp + 1;
    if (ev_mem_beat && !dut.u_vlsu.grp) n_single <= n_single + 1;
    if (gemm_done) n_gen <= n_gen + 1;
    if (dut.issue_valid && dut.issue_ready) begin
      if (dut.dec.kind == INSN_ARITH && dut.dec.scalar) n_vx <= n_vx + 1;
      if (dut.dec.kind == INSN_VSA) n_vsa <= n_vsa + 1;
      if (dut.dec.kind == INSN_MEM && dut.dec.lane_mode && !dut.dec.is_store) n_lane_ld <= n_lane_ld + 1;
      if (dut.dec.kind == INSN_MEM && dut.dec.lane_mode && dut.dec.is_store) n_lane_st <= n_lane_st + 1;
      if (dut.dec.kind == INSN_MEM && dut.dec.mop == MOP_STRIDE) n_stride <= n_stride + 1;
      if (dut.dec.kind == INSN_MEM && (dut.dec.mop == MOP_IDX_UNO || dut.dec.mop == MOP_IDX_ORD)) n_idx <= n_idx + 1;
    end
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

  // GEMM in systolic mode with lane loads (one pass over the tiles)
  task automatic gemm_lane(input int M, input int N, input int K, input int unsigned A,
                           input int unsigned B, input int unsigned C);
    for (int it = 0; it < M / LANES; it++) begin
      setvl(K, 1'b0);
      for (int r = 0; r < LANES; r++)
        issue(e_mem(OPC_LANE_LD, 3'(r), 1'b0, MOP_UNIT, 5'd0, VA), A + 4 * ((it * LANES + r) * K));
      for (int jt = 0; jt < N / SC; jt++) begin
        for (int r = 0; r < LANES; r++) begin
          int rows;
          rows = K - r * WPL;
          if (rows > int'(WPL)) rows = WPL;
          if (rows > 0) begin
            setvl(rows, 1'b1);
            issue(e_mem(OPC_LANE_LD, 3'(r), 1'b1, MOP_STRIDE, 5'd0, VB),
                  B + 4 * (r * WPL * N + jt * SC), 4 * N);
          end
        end
        setvl(LANES, 1'b1);
        issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b1, MOP_STRIDE, 5'd0, VC),
              C + 4 * (it * LANES * N + jt * SC), 4 * N);
        setvl(K * LANES, 1'b0);
        issue(e_vsa(VC, VA, VB));
        setvl(LANES, 1'b1);
        issue(e_mem(OPC_STORE_FP, 3'd0, 1'b1, MOP_STRIDE, 5'd0, VC),
              C + 4 * (it * LANES * N + jt * SC), 4 * N);
      end
    end
  endtask

  // GEMM in systolic mode with indexed accesses; index vectors at IX (A), IX+0x800 (B),
  // IX+0x1000 (C), built once for the matrix shape. Requires K <= WPL.
  task automatic gemm_idx(input int M, input int N, input int K, input int unsigned A,
                          input int unsigned B, input int unsigned C, input int unsigned IX);
    int na, nb;
    // A: lane i, word w, subword s holds A[i][4w+s]: element e = w*SC*LANES + i*SC + s
    na = ((K + SC - 1) / SC) * SC * LANES;
    for (int e = 0; e < na; e++) begin
      int i, k;
      i = (e / SC) % LANES;
      k = (e / (SC * LANES)) * SC + e % SC;
      poke32(IX + 4 * e, (k < K) ? 4 * (i * K + k) : 0);
    end
    // B: row k sits in lane k/WPL, word k%WPL
    nb = ((K < int'(WPL)) ? K : int'(WPL)) * SC * LANES;
    for (int e = 0; e < nb; e++) begin
      int l, w, s, k;
      l = (e / SC) % LANES; w = e / (SC * LANES); s = e % SC;
      k = l * WPL + w;
      poke32(IX + 'h800 + 4 * e, (k < K) ? 4 * (k * N + s) : 0);
    end
    // C: lane i word 0 holds row i of the tile
    for (int e = 0; e < int'(SC * LANES); e++)
      poke32(IX + 'h1000 + 4 * e, 4 * ((e / SC) * N + e % SC));
    setvl(na, 1'b0);
    issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, VIA), IX);
    setvl(nb, 1'b0);
    issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, VIB), IX + 'h800);
    setvl(SC * LANES, 1'b0);
    issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, VIC), IX + 'h1000);
    for (int it = 0; it < M / LANES; it++) begin
      setvl(na, 1'b0);
      issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_IDX_UNO, VIA, VA), A + 4 * (it * LANES * K));
      for (int jt = 0; jt < N / SC; jt++) begin
        setvl(nb, 1'b0);
        issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_IDX_UNO, VIB, VB), B + 4 * (jt * SC));
        setvl(SC * LANES, 1'b0);
        issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_IDX_ORD, VIC, VC),
              C + 4 * (it * LANES * N + jt * SC));
        setvl(K * LANES, 1'b0);
        issue(e_vsa(VC, VA, VB));
        setvl(SC * LANES, 1'b0);
        issue(e_mem(OPC_STORE_FP, 3'd0, 1'b0, MOP_IDX_ORD, VIC, VC),
              C + 4 * (it * LANES * N + jt * SC));
      end
    end
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

  task automatic mech(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end else $display("mechanism %-28s %0d", name, n);
  endtask

  // ------------------------------------------------------------ test sequence
  localparam int unsigned MA = 'h00000, MB = 'h08000, MC = 'h10000, MG = 'h18000;
  localparam int unsigned MIX = 'h20000, MV = 'h30000;

  initial begin
    longint t0, t_lane, t_idx;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. systolic GEMM with lane loads, 8x8x128 (full pipeline depth, 2x2 tiles)
    fill(MA, 8 * 128); fill(MB, 128 * 8); fill(MC, 8 * 8);
    golden(8, 8, 128, MA, MB, MC, MG);
    gemm_lane(8, 8, 128, MA, MB, MC);
    compare("vsa GEMM 8x8x128 lane loads", 8, 8, MC, MG);

    // 1b. shallower pipeline, B spread over two lanes only: 4x4x40
    fill(MA, 4 * 40); fill(MB, 40 * 4); fill(MC, 4 * 4);
    golden(4, 4, 40, MA, MB, MC, MG);
    gemm_lane(4, 4, 40, MA, MB, MC);
    compare("vsa GEMM 4x4x40 lane loads", 4, 4, MC, MG);

    // 2. same 4x4x32 problem with lane loads and with indexed loads
    fill(MA, 4 * 32); fill(MB, 32 * 4); fill(MC, 4 * 4);
    golden(4, 4, 32, MA, MB, MC, MG);
    t0 = cycle;
    gemm_lane(4, 4, 32, MA, MB, MC);
    t_lane = cycle - t0;
    compare("vsa GEMM 4x4x32 lane loads", 4, 4, MC, MG);
    fill(MC, 4 * 4);
    golden(4, 4, 32, MA, MB, MC, MG);
    t0 = cycle;
    gemm_idx(4, 4, 32, MA, MB, MC, MIX);
    t_idx = cycle - t0;
    compare("vsa GEMM 4x4x32 indexed loads", 4, 4, MC, MG);
    $display("cycles: lane loads %0d, indexed loads %0d (index setup included)", t_lane, t_idx);
    checks++;
    if (!(t_lane < t_idx)) begin
      failures++;
      $display("FAIL lane-load GEMM not faster than indexed GEMM");
    end

    // 3. vector-mode GEMM 2x64x8
    fill(MA, 2 * 8); fill(MB, 8 * 64); fill(MC, 2 * 64);
    golden(2, 64, 8, MA, MB, MC, MG);
    gemm_vpu(2, 64, 8, MA, MB, MC);
    compare("vmacc.vx GEMM 2x64x8", 2, 64, MC, MG);

    // 4. element-wise ops, vl = 37 (partial last word), unaligned unit-stride base
    begin
      int unsigned x0, x1, xs;
      x0 = MV; x1 = MV + 'h400; xs = 32'h1234_5678;
      fill(x0, 40); fill(x1 + 4, 40);
      for (int i = 0; i < 40; i++) poke32(MV + 'h800 + 4 * i, 32'hdead_0000 + i);
      for (int i = 0; i < 40; i++) poke32(MV + 'hc00 + 4 * i, 32'hbeef_0000 + i);
      for (int i = 0; i < 40; i++) poke32(MV + 'h1000 + 4 * i, 32'hcafe_0000 + i);
      setvl(37, 1'b0);
      issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, 5'd10), x0);
      issue(e_mem(OPC_LOAD_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, 5'd11), x1 + 4); // unaligned
      issue(e_arith(F6_VADD, F3_OPIVV, 5'd10, 5'd11, 5'd12));
      issue(e_arith(F6_VSUB, F3_OPIVX, 5'd10, 5'd1, 5'd13), xs);
      issue(e_arith(F6_VMUL, F3_OPMVV, 5'd10, 5'd11, 5'd14));
      issue(e_mem(OPC_STORE_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, 5'd12), MV + 'h800);
      issue(e_mem(OPC_STORE_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, 5'd13), MV + 'hc00);
      issue(e_mem(OPC_STORE_FP, 3'd0, 1'b0, MOP_UNIT, 5'd0, 5'd14), MV + 'h1000);
      for (int i = 0; i < 40; i++) begin
        logic [31:0] a, b, e_add, e_sub, e_mul;
        a = peek32(x0 + 4 * i); b = peek32(x1 + 4 + 4 * i);
        e_add = (i < 37) ? a + b  : 32'hdead_0000 + i;
        e_sub = (i < 37) ? a - xs : 32'hbeef_0000 + i;
        e_mul = (i < 37) ? a * b  : 32'hcafe_0000 + i;
        checks += 3;
        if (peek32(MV + 'h800 + 4 * i) !== e_add) begin failures++; $display("FAIL vadd %0d", i); end
        if (peek32(MV + 'hc00 + 4 * i) !== e_sub) begin failures++; $display("FAIL vsub %0d", i); end
        if (peek32(MV + 'h1000 + 4 * i) !== e_mul) begin failures++; $display("FAIL vmul %0d", i); end
      end
      // lane store: row 2 of the last A tile kept in lane 2 of VA goes back to memory
      setvl(32, 1'b0);
      issue(e_mem(OPC_LANE_ST, 3'd2, 1'b0, MOP_UNIT, 5'd0, VA), MV + 'h2000);
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (peek32(MV + 'h2000 + 4 * k) !== peek32(MA + 4 * (2 * 32 + k))) begin
          failures++; $display("FAIL lane store element %0d", k);
        end
      end
      // an encoding the unit does not implement (masked vadd) is dropped
      issue(32'h0000_0057 | (32'(F6_VADD) << 26));
    end

    // 5. the on-chip generator: 8x8x200 (depth split into 128 + 72)
    fill(MA, 8 * 200); fill(MB, 200 * 8); fill(MC, 8 * 8);
    golden(8, 8, 200, MA, MB, MC, MG);
    @(negedge clk);
    gemm_m = 8; gemm_n = 8; gemm_k = 200; gemm_a = MA; gemm_b = MB; gemm_c = MC;
    gemm_start = 1'b1;
    @(negedge clk);
    gemm_start = 1'b0;
    checks++;
    if (!gemm_busy || insn_ready) begin
      failures++; $display("FAIL generator did not start or left the host port open");
    end
    while (gemm_busy) @(negedge clk);
    compare("generated GEMM 8x8x200", 8, 8, MC, MG);

    mech("vector word uops", n_vop);
    mech("vector-scalar (.vx) instructions", n_vx);
    mech("partial (tail) vector words", n_tail);
    mech("vsa instructions", n_vsa);
    mech("systolic accumulations", n_mac);
    mech("source lane switches", n_switch);
    mech("ring wrap to lane 0", n_wrap);
    mech("lane loads", n_lane_ld);
    mech("lane stores", n_lane_st);
    mech("strided accesses", n_stride);
    mech("indexed accesses", n_idx);
    mech("grouped unit-stride beats", n_grp);
    mech("single-element beats", n_single);
    mech("memory stalls", n_stall);
    mech("illegal instructions", n_illegal);
    mech("generator GEMM runs", n_gen);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
