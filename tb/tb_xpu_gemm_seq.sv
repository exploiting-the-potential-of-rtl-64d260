// tb_xpu_gemm_seq: the GEMM instruction generator against an instruction list built
// here from the lane-load GEMM loop nest. A stand-in for the unit accepts instructions
// with random ready delays and reports busy for a few cycles after each one. Every
// emitted instruction word and its scalar operands are compared in order, for sizes
// that need one and several depth chunks, and `done` must follow the last store.
module tb_xpu_gemm_seq;
  import xpu_pkg::*;
  localparam int unsigned WPL = MVL / (LANES * W);
  localparam int unsigned PMAX = 128;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, busy, done, insn_valid, insn_ready, unit_busy;
  logic [15:0] m_size = 0, n_size = 0, k_size = 0;
  logic [31:0] a_base = 0, b_base = 0, c_base = 0, insn, rs1_val, rs2_val;

  xpu_gemm_seq dut (.*);

  // unit stand-in: ready when idle, busy for a random time after each instruction
  int bcnt = 0;
  logic rdy_rand = 1;
  assign unit_busy  = (bcnt != 0);
  assign insn_ready = !unit_busy && rdy_rand;
  always_ff @(posedge clk) begin
    rdy_rand <= ($urandom_range(0, 3) != 0);
    if (insn_valid && insn_ready) bcnt <= $urandom_range(0, 4);
    else if (bcnt != 0) bcnt <= bcnt - 1;
  end

  typedef struct { logic [31:0] insn, r1, r2; } item_t;
  item_t exp_q [$];
  int checks = 0, failures = 0, got = 0, n_done = 0;

  always @(posedge clk) begin
    if (done) n_done <= n_done + 1;
    if (insn_valid && insn_ready) begin
      got <= got + 1;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL extra instruction %h", insn);
      end else begin
        item_t e;
        e = exp_q.pop_front();
        // rs2 only matters for strided accesses
        if (insn !== e.insn || rs1_val !== e.r1 ||
            (insn[27:26] == 2'b10 && insn[6:0] != OPC_OP_V && rs2_val !== e.r2)) begin
          failures++;
          if (failures < 8) $display("FAIL instruction %0d: %h/%h/%h expected %h/%h/%h", got,
                                     insn, rs1_val, rs2_val, e.insn, e.r1, e.r2);
        end
      end
    end
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] vset(input bit wide);
    return {1'b0, 5'b0, wide ? 3'b100 : 3'b010, 3'b000, 5'd1, 3'b111, 5'd1, 7'b1010111};
  endfunction
  function automatic logic [31:0] mem(input logic [6:0] opc, input int nf, input bit wide,
                                      input logic [1:0] mop, input logic [4:0] vd);
    return {3'(nf), wide, mop, 1'b1, 5'd0, 5'd2, wide ? 3'b000 : 3'b110, vd, opc};
  endfunction
  function automatic void push(input logic [31:0] i, input logic [31:0] r1, input logic [31:0] r2);
    item_t e;
    e.insn = i; e.r1 = r1; e.r2 = r2;
    exp_q.push_back(e);
  endfunction

  function automatic void build(input int M, input int N, input int K, input int A,
                                input int B, input int C);
    for (int i = 0; i < M / LANES; i++)
      for (int kc = 0; kc < K; kc += PMAX) begin
        int kk;
        kk = (K - kc > PMAX) ? PMAX : K - kc;
        push(vset(0), kk, 0);
        for (int r = 0; r < LANES; r++)
          push(mem(7'b0001011, r, 0, 2'b00, 5'd1), A + 4 * ((i * LANES + r) * K + kc), 0);
        for (int j = 0; j < N / SC; j++) begin
          for (int r = 0; r < LANES && r * WPL < kk; r++) begin
            push(vset(1), (kk - r * WPL > WPL) ? WPL : kk - r * WPL, 0);
            push(mem(7'b0001011, r, 1, 2'b10, 5'd2), B + 4 * ((kc + r * WPL) * N + j * SC), 4 * N);
          end
          push(vset(1), LANES, 0);
          push(mem(7'b0000111, 0, 1, 2'b10, 5'd3), C + 4 * (i * LANES * N + j * SC), 4 * N);
          push(vset(0), kk * LANES, 0);
          push({6'd0, 1'b1, 5'd1, 5'd2, 3'b010, 5'd3, 7'b1011011}, 0, 0);
          push(vset(1), LANES, 0);
          push(mem(7'b0100111, 0, 1, 2'b10, 5'd3), C + 4 * (i * LANES * N + j * SC), 4 * N);
        end
      end
  endfunction

  initial begin
    automatic int sizes [4][3] = '{'{4, 4, 16}, '{8, 32, 16}, '{8, 8, 200}, '{4, 8, 300}};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      int d0;
      build(sizes[t][0], sizes[t][1], sizes[t][2], 'h1000 * (t + 1), 'h40000, 'h80000);
      d0 = n_done;
      @(negedge clk);
      m_size = 16'(sizes[t][0]); n_size = 16'(sizes[t][1]); k_size = 16'(sizes[t][2]);
      a_base = 'h1000 * (t + 1); b_base = 'h40000; c_base = 'h80000;
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy) @(negedge clk);
      repeat (3) @(negedge clk);
      checks += 2;
      if (exp_q.size() != 0) begin
        failures++; $display("FAIL %0d instructions missing in run %0d", exp_q.size(), t);
        exp_q.delete();
      end
      if (n_done != d0 + 1) begin failures++; $display("FAIL done pulses in run %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
