// tb_xpu_lane: one lane (lane 1 of 4) at its default size.
// Vector mode: fills three registers through the memory-unit write port, runs word
// uops of every ALU operation (vector-vector and vector-scalar) with a vl that cuts the
// last word, and reads the destination back through the memory-unit read port.
// Systolic mode: loads the accumulator from a C row, feeds rows of B both from the
// lane's own slice (as the source lane) and from the ring, checks that each arriving
// row is forwarded on the ring in the same cycle and accumulated one cycle later, and
// compares the stored C row with C + sum A[k]*B[k].
module tb_xpu_lane;
  import xpu_pkg::*;
  localparam int unsigned ID = 1, NS = SC, ND = D, WPL = MVL / (LANES * W), AW = 10;
  localparam int unsigned WB = NS * ND;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0]   vl;
  logic          vop_valid, vop_scalar;
  alu_op_e       vop_op;
  logic [ND-1:0] vop_sval;
  logic [AW-1:0] vop_vs2_addr, vop_vs1_addr, vop_vd_addr;
  logic [15:0]   vop_word;
  logic          acc_init, acc_store, src_rd;
  logic [AW-1:0] acc_addr, sa_a_base, src_addr;
  logic [15:0]   src_k;
  logic          ring_in_valid, ring_out_valid, mac_fire;
  logic [15:0]   ring_in_k, ring_out_k;
  logic [3:0]    ring_in_hops, ring_out_hops;
  logic [WB-1:0] ring_in_data, ring_out_data;
  logic          m_rd1_en, m_rd2_en, m_wr_en;
  logic [AW-1:0] m_rd1_addr, m_rd2_addr, m_wr_addr;
  logic [WB-1:0] rd1_data, rd2_data, m_wr_data;
  logic [NS-1:0] m_wr_be;

  xpu_lane #(.LANE_ID(ID)) dut (.*);

  logic [WB-1:0] shadow [32 * WPL];
  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WB-1:0] rnd_word();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  task automatic idle();
    vop_valid = 0; acc_init = 0; acc_store = 0; src_rd = 0; ring_in_valid = 0;
    m_rd1_en = 0; m_rd2_en = 0; m_wr_en = 0;
  endtask

  task automatic wr(input int a, input logic [WB-1:0] v);
    @(negedge clk); idle();
    m_wr_en = 1; m_wr_addr = AW'(a); m_wr_be = '1; m_wr_data = v; shadow[a] = v;
    @(negedge clk); idle();
  endtask

  task automatic rd_check(input int a, input logic [WB-1:0] ex, input string what);
    @(negedge clk); idle();
    m_rd2_en = 1; m_rd2_addr = AW'(a);
    @(negedge clk); idle();
    checks++;
    if (rd2_data !== ex) begin
      failures++;
      $display("FAIL %s addr %0d: %h expected %h", what, a, rd2_data, ex);
    end
  endtask

  function automatic logic [WB-1:0] alu_ref(input alu_op_e op, input logic [WB-1:0] a,
      input logic [WB-1:0] b, input logic [WB-1:0] c, input logic [WB-1:0] old,
      input logic [NS-1:0] be);
    logic [WB-1:0] y;
    for (int s = 0; s < NS; s++) begin
      logic [31:0] ea, eb, ec;
      ea = a[s*ND +: ND]; eb = b[s*ND +: ND]; ec = c[s*ND +: ND];
      case (op)
        ALU_ADD: y[s*ND +: ND] = ea + eb;
        ALU_SUB: y[s*ND +: ND] = ea - eb;
        ALU_MUL: y[s*ND +: ND] = ea * eb;
        default: y[s*ND +: ND] = ea * eb + ec;
      endcase
      if (!be[s]) y[s*ND +: ND] = old[s*ND +: ND];
    end
    return y;
  endfunction

  initial begin
    idle();
    vl = 0; vop_op = ALU_ADD; vop_scalar = 0; vop_sval = 0; vop_word = 0;
    vop_vs2_addr = 0; vop_vs1_addr = 0; vop_vd_addr = 0; acc_addr = 0; sa_a_base = 0;
    src_addr = 0; src_k = 0; ring_in_k = 0; ring_in_hops = 0; ring_in_data = 0;
    m_rd1_addr = 0; m_rd2_addr = 0; m_wr_addr = 0; m_wr_be = 0; m_wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---------------- vector mode: v3 = op(v1, v2 / scalar, v3), vl = 100
    for (int t = 0; t < 8; t++) begin
      alu_op_e op;
      logic [31:0] sc;
      op = alu_op_e'(t % 4);
      sc = $urandom();
      for (int w = 0; w < 8; w++) begin
        wr(1 * WPL + w, rnd_word());
        wr(2 * WPL + w, rnd_word());
        wr(3 * WPL + w, rnd_word());
      end
      vl = 16'd100;
      for (int w = 0; w < 8; w++) begin
        @(negedge clk); idle();
        vop_valid = 1; vop_op = op; vop_scalar = (t >= 4); vop_sval = sc;
        vop_word = 16'(w);
        vop_vs2_addr = AW'(1 * WPL + w); vop_vs1_addr = AW'(2 * WPL + w);
        vop_vd_addr = AW'(3 * WPL + w);
      end
      @(negedge clk); idle();
      @(negedge clk);
      for (int w = 0; w < 8; w++) begin
        logic [NS-1:0] be;
        logic [WB-1:0] b;
        for (int s = 0; s < NS; s++) be[s] = (w * 16 + ID * 4 + s) < 100;
        b = (t >= 4) ? {NS{sc}} : shadow[2 * WPL + w];
        rd_check(3 * WPL + w, alu_ref(op, shadow[1 * WPL + w], b, shadow[3 * WPL + w],
                 shadow[3 * WPL + w], be), "vector uop");
      end
    end

    // ---------------- systolic mode: C row in v5 word 0, A row in v4, B rows in v6
    for (int t = 0; t < 4; t++) begin
      logic [WB-1:0] accx, brow [64];
      logic [31:0]   arow [64];
      int nk;
      nk = 12 + 8 * t;
      for (int w = 0; w < 16; w++) wr(4 * WPL + w, rnd_word());
      for (int k = 0; k < 64; k++) arow[k] = shadow[4 * WPL + k / NS][(k % NS) * ND +: ND];
      wr(5 * WPL, rnd_word());
      for (int w = 0; w < WPL; w++) wr(6 * WPL + w, rnd_word());
      accx = shadow[5 * WPL];
      @(negedge clk); idle();
      acc_init = 1; acc_addr = AW'(5 * WPL); sa_a_base = AW'(4 * WPL);
      @(negedge clk); idle();
      for (int k = 0; k < nk; k++) begin
        bit own;
        own = (k % 3 == 1);
        if (own) begin
          src_rd = 1; src_addr = AW'(6 * WPL + k % WPL); src_k = 16'(k);
          brow[k] = shadow[6 * WPL + k % WPL];
          @(negedge clk); idle();
          // row arrives now: forwarded on the ring with zero hops
          checks++;
          if (!(ring_out_valid && ring_out_k == 16'(k) && ring_out_hops == 0 &&
                ring_out_data == brow[k])) begin
            failures++; $display("FAIL own row %0d not forwarded", k);
          end
        end else begin
          brow[k] = rnd_word();
          ring_in_valid = 1; ring_in_k = 16'(k); ring_in_hops = 4'd2; ring_in_data = brow[k];
          #1;
          checks++;
          if (!(ring_out_valid && ring_out_k == 16'(k) && ring_out_hops == 4'd2)) begin
            failures++; $display("FAIL ring row %0d not forwarded", k);
          end
        end
        @(posedge clk); #1;
        checks++;
        if (!mac_fire) begin failures++; $display("FAIL no accumulation one cycle after row %0d", k); end
        @(negedge clk); idle();
        for (int s = 0; s < NS; s++)
          accx[s*ND +: ND] = accx[s*ND +: ND] + arow[k] * brow[k][s*ND +: ND];
      end
      repeat (2) @(negedge clk);
      acc_store = 1; acc_addr = AW'(5 * WPL);
      @(negedge clk); idle();
      rd_check(5 * WPL, accx, "systolic C row");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
