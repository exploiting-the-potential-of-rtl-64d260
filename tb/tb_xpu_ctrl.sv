// tb_xpu_ctrl: the control at its default size, driven with decoded instructions.
// Checks vsetvli (vl clamping to VLMAX for 32-bit and W-bit elements), the word uops of
// a vector instruction (one per cycle, words 0..ceil(vl/16)-1, register addresses,
// held scalar, total cycles), the systolic schedule of vsa (accumulator load, every row
// of B read once in order by its source lane k/WPL at address k%WPL, one idle cycle at
// each change of source lane, the write-back late enough for the farthest lane), the
// hand-off of a memory instruction and the illegal-instruction pulse.
module tb_xpu_ctrl;
  import xpu_pkg::*;
  localparam int unsigned WPL = MVL / (LANES * W), AW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              insn_valid = 0, insn_ready, illegal, sew_wide, busy, sa_mode, sa_src_switch;
  dec_t              dec;
  logic [31:0]       rs1_val = 0, rs2_val = 0;
  logic [15:0]       vl, vop_word, src_k;
  logic              vop_valid, vop_scalar, acc_init, acc_store;
  alu_op_e           vop_op;
  logic [D-1:0]      vop_sval;
  logic [AW-1:0]     vop_vs2_addr, vop_vs1_addr, vop_vd_addr, acc_addr, sa_a_base, src_addr;
  logic [LANES-1:0]  src_rd;
  logic              mem_start, mem_is_store, mem_lane_mode, mem_wide, mem_done = 0;
  logic [2:0]        mem_lane_sel;
  mop_e              mem_mop;
  logic [4:0]        mem_vreg, mem_vidx;
  logic [31:0]       mem_base, mem_stride;

  xpu_ctrl dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // present an instruction until accepted; returns the acceptance cycle
  task automatic give(input dec_t d, input logic [31:0] r1, output longint t_acc);
    @(negedge clk);
    dec = d; rs1_val = r1; rs2_val = 32'h40; insn_valid = 1;
    while (!insn_ready) @(negedge clk);
    t_acc = cyc;
    @(negedge clk);
    insn_valid = 0;
  endtask

  function automatic dec_t mk(input insn_kind_e k);
    dec_t d;
    d = '0; d.kind = k; d.op = ALU_ADD; d.mop = MOP_UNIT;
    return d;
  endfunction

  initial begin
    dec_t d;
    longint ta;
    dec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- vsetvli
    d = mk(INSN_VSETVLI); d.vsew = VSEW_D;
    give(d, 100, ta);  chk(vl == 100 && !sew_wide, "vsetvli 100");
    give(d, 9999, ta); chk(vl == MVL / D, "vsetvli clamps to VLMAX (32-bit)");
    d.vsew = VSEW_W;
    give(d, 9999, ta); chk(vl == MVL / W && sew_wide, "vsetvli clamps to VLMAX (W-bit)");
    d.avl_max = 1;
    give(d, 3, ta);    chk(vl == MVL / W, "vsetvli rs1=x0 gives VLMAX");
    d = mk(INSN_VSETVLI); d.vsew = VSEW_D;
    give(d, 100, ta);

    // ---------------- vector instruction, vl = 100 -> 7 words
    d = mk(INSN_ARITH); d.op = ALU_MACC; d.scalar = 1; d.vs2 = 5'd4; d.vs1 = 5'd1; d.vd = 5'd9;
    fork
      give(d, 32'h1234_5678, ta);
      begin
        int w;
        longint first, last;
        w = 0; first = -1; last = -1;
        while (!(insn_ready && !insn_valid && w > 0)) begin
          @(posedge clk); #1;
          if (vop_valid) begin
            if (first < 0) first = cyc;
            last = cyc;
            chk(vop_word == 16'(w) && vop_vs2_addr == AW'(4 * WPL + w) &&
                vop_vd_addr == AW'(9 * WPL + w) && vop_scalar && vop_sval == 32'h1234_5678 &&
                vop_op == ALU_MACC, $sformatf("word uop %0d", w));
            w++;
          end
        end
        chk(w == 7, $sformatf("7 word uops, got %0d", w));
        chk(last - first == 6, "word uops back to back");
      end
    join

    // ---------------- vsa: depth vl/LANES
    for (int t = 0; t < 2; t++) begin
      int P, k, idle_between, n_init, n_store;
      longint t_last, t_store;
      int prev_lane;
      P = (t == 0) ? 128 : 40;
      d = mk(INSN_VSETVLI); d.vsew = VSEW_D;
      give(d, P * LANES, ta);
      d = mk(INSN_VSA); d.vs2 = 5'd1; d.vs1 = 5'd2; d.vd = 5'd3;
      k = 0; prev_lane = 0; idle_between = 0; n_init = 0; n_store = 0; t_last = 0; t_store = 0;
      fork
        give(d, 0, ta);
        begin
          @(posedge clk);
          while (n_store == 0) begin
            @(posedge clk); #1;
            if (acc_init) begin
              n_init++;
              chk(acc_addr == AW'(3 * WPL) && sa_a_base == AW'(1 * WPL) && k == 0, "acc init");
            end
            if (src_rd != 0) begin
              int lane;
              lane = $clog2(src_rd);
              chk($onehot(src_rd) && src_k == 16'(k) && lane == k / WPL &&
                  src_addr == AW'(2 * WPL + k % WPL), $sformatf("row %0d source", k));
              if (lane != prev_lane) chk(idle_between == 1, "one idle cycle at source change");
              else if (k > 0) chk(idle_between == 0, "rows back to back");
              prev_lane = lane; idle_between = 0; t_last = cyc; k++;
            end else if (k > 0) idle_between++;
            if (acc_store) begin
              n_store++; t_store = cyc;
              chk(acc_addr == AW'(3 * WPL), "acc store address");
            end
          end
        end
      join
      chk(k == P, $sformatf("depth %0d rows, got %0d", P, k));
      chk(n_init == 1, "one accumulator load");
      chk(t_store - t_last >= LANES + 2 && t_store - t_last <= LANES + 3,
          $sformatf("write-back %0d cycles after last row", t_store - t_last));
    end

    // ---------------- memory instruction hand-off
    d = mk(INSN_MEM); d.is_store = 1; d.lane_mode = 1; d.lane_sel = 3'd2; d.mop = MOP_STRIDE;
    d.wide = 1; d.vd = 5'd7; d.vs2 = 5'd5;
    @(negedge clk);
    dec = d; rs1_val = 32'h8000; rs2_val = 32'h40; insn_valid = 1;
    while (!insn_ready) @(negedge clk);
    chk(mem_start && mem_is_store && mem_lane_mode && mem_lane_sel == 2 && mem_mop == MOP_STRIDE &&
        mem_wide && mem_vreg == 7 && mem_vidx == 5 && mem_base == 32'h8000 && mem_stride == 32'h40,
        "memory command");
    @(negedge clk);
    insn_valid = 0;
    repeat (5) begin
      @(negedge clk);
      chk(!insn_ready && busy, "waits for the memory unit");
    end
    mem_done = 1;
    @(negedge clk);
    mem_done = 0;
    chk(insn_ready, "accepts again after the memory unit is done");

    // ---------------- illegal
    @(negedge clk);
    dec = mk(INSN_ILLEGAL); insn_valid = 1;
    #1;
    chk(illegal, "illegal pulse");
    @(negedge clk);
    insn_valid = 0;
    chk(insn_ready, "illegal instruction dropped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
