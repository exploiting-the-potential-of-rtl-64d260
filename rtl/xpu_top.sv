// xpu_top: vector-systolic flexible processing unit (xPU).
//
// A vector processing unit of LANES lanes whose functional units can be re-used as an
// output-stationary systolic array of LANES x SC processing elements. In VPU mode it
// executes vector instructions word by word on all lanes, each lane a W-bit packed-SIMD
// datapath. The vsa instruction switches it into SA mode for one GEMM tile: lane i is
// row i of the array, the SC subwords of its datapath are the columns, the A register
// streams row i of A inside each lane, rows of B travel from lane to lane over the
// inter-lane ring, and each lane's accumulator holds its row of the C tile. Lane
// load/store instructions fill one lane at a time so that A, B and C land in the
// register layout the array needs without indexed accesses.
//
// Blocks: decoder + control (instruction sequencing, vl/SEW state), LANES lanes
// (register slice, operand muxes, ALU, accumulator), inter-lane ring, memory unit, and
// a GEMM instruction generator that can drive the issue port instead of the host.
//
// Interfaces
//   instruction issue : insn_valid/insn_ready handshake; insn is the 32-bit encoding,
//                       rs1_val/rs2_val the scalar operands (AVL, base address, stride,
//                       scalar operand of .vx forms). An instruction is accepted in a
//                       cycle with insn_valid && insn_ready; the unit then stays busy
//                       until it has finished. Illegal encodings are dropped with a
//                       one-cycle `illegal` pulse. While the GEMM generator runs
//                       (gemm_busy) insn_ready stays low.
//   GEMM command      : gemm_start (taken while the unit is idle) with sizes and byte
//                       addresses of row-major A, B, C; gemm_done pulses at the end.
//   memory            : W-bit port with valid/ready requests and in-order responses,
//                       one outstanding (see xpu_vlsu).
// Reset is asynchronous, active low. The floating-point forms and the memory hierarchy
// are outside this module.
module xpu_top
  import xpu_pkg::*;
#(
  parameter int unsigned LANES_P = xpu_pkg::LANES,
  parameter int unsigned SC_P    = xpu_pkg::SC,
  parameter int unsigned D_P     = xpu_pkg::D,
  parameter int unsigned MVL_P   = xpu_pkg::MVL,
  parameter int unsigned NVREG_P = xpu_pkg::NVREG,
  localparam int unsigned WB     = SC_P * D_P
) (
  input  logic               clk,
  input  logic               rst_n,
  // instruction issue
  input  logic               insn_valid,
  output logic               insn_ready,
  input  logic [31:0]        insn,
  input  logic [31:0]        rs1_val,
  input  logic [31:0]        rs2_val,
  output logic               illegal,
  output logic               busy,
  output logic [15:0]        vl,
  output logic               sa_mode,
  output logic               sew_wide,      // current element width is W bits
  // event pulses for performance counting
  output logic               ev_src_switch, // SA mode: the next lane became the B source
  output logic [LANES_P-1:0] ev_mac,        // SA mode: lane accumulated one row of B
  output logic               ev_mem_beat,   // one memory transfer completed
  // on-chip GEMM instruction generator (systolic mode, lane loads)
  input  logic               gemm_start,
  input  logic [15:0]        gemm_m,
  input  logic [15:0]        gemm_n,
  input  logic [15:0]        gemm_k,
  input  logic [31:0]        gemm_a,
  input  logic [31:0]        gemm_b,
  input  logic [31:0]        gemm_c,
  output logic               gemm_busy,
  output logic               gemm_done,
  // memory port
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic               mem_req_we,
  output logic [31:0]        mem_req_addr,
  output logic [WB-1:0]      mem_req_wdata,
  output logic [WB/8-1:0]    mem_req_wstrb,
  input  logic               mem_rsp_valid,
  input  logic [WB-1:0]      mem_rsp_rdata
);

  localparam int unsigned WPL = MVL_P / (LANES_P * WB);
  localparam int unsigned AW  = $clog2(NVREG_P * WPL);

  // ------------------------------------------------------------- instruction source
  // The GEMM generator owns the issue port while it runs; the external port is then
  // held off (insn_ready low).
  logic        issue_valid, issue_ready;
  logic [31:0] issue_insn, issue_rs1, issue_rs2;
  logic        seq_valid;
  logic [31:0] seq_insn, seq_rs1, seq_rs2;

  xpu_gemm_seq #(.LANES_P(LANES_P), .SC_P(SC_P), .D_P(D_P), .MVL_P(MVL_P)) u_seq (
    .clk, .rst_n, .start(gemm_start && !busy), .m_size(gemm_m), .n_size(gemm_n),
    .k_size(gemm_k), .a_base(gemm_a), .b_base(gemm_b), .c_base(gemm_c),
    .busy(gemm_busy), .done(gemm_done),
    .insn_valid(seq_valid), .insn_ready(issue_ready), .insn(seq_insn), .rs1_val(seq_rs1),
    .rs2_val(seq_rs2), .unit_busy(busy)
  );

  always_comb begin
    if (gemm_busy) begin
      issue_valid = seq_valid;  issue_insn = seq_insn;  issue_rs1 = seq_rs1;  issue_rs2 = seq_rs2;
    end else begin
      issue_valid = insn_valid; issue_insn = insn;      issue_rs1 = rs1_val;  issue_rs2 = rs2_val;
    end
  end
  assign insn_ready = issue_ready && !gemm_busy;

  // ------------------------------------------------------------- decode + control
  dec_t dec;
  xpu_decoder #(.LANES_P(LANES_P)) u_dec (.insn(issue_insn), .dec);

  logic                 ctrl_busy;
  logic                 vop_valid, vop_scalar;
  alu_op_e              vop_op;
  logic [D_P-1:0]       vop_sval;
  logic [AW-1:0]        vop_vs2_addr, vop_vs1_addr, vop_vd_addr;
  logic [15:0]          vop_word;
  logic                 acc_init, acc_store;
  logic [AW-1:0]        acc_addr, sa_a_base, src_addr;
  logic [LANES_P-1:0]   src_rd;
  logic [15:0]          src_k;
  logic                 mem_start, mem_is_store, mem_lane_mode, mem_wide, mem_done;
  logic [2:0]           mem_lane_sel;
  mop_e                 mem_mop;
  logic [4:0]           mem_vreg, mem_vidx;
  logic [31:0]          mem_base, mem_stride;

  xpu_ctrl #(.LANES_P(LANES_P), .SC_P(SC_P), .D_P(D_P), .MVL_P(MVL_P), .NVREG_P(NVREG_P))
  u_ctrl (
    .clk, .rst_n, .insn_valid(issue_valid), .insn_ready(issue_ready), .dec, .rs1_val(issue_rs1),
    .rs2_val(issue_rs2), .illegal, .vl,
    .sew_wide, .busy(ctrl_busy), .sa_mode, .sa_src_switch(ev_src_switch),
    .vop_valid, .vop_op, .vop_scalar, .vop_sval, .vop_vs2_addr, .vop_vs1_addr,
    .vop_vd_addr, .vop_word, .acc_init, .acc_store, .acc_addr, .sa_a_base, .src_rd,
    .src_addr, .src_k,
    .mem_start, .mem_is_store, .mem_lane_mode, .mem_lane_sel, .mem_mop, .mem_wide,
    .mem_vreg, .mem_vidx, .mem_base, .mem_stride, .mem_done
  );

  // ------------------------------------------------------------- memory unit
  logic [LANES_P-1:0]          m_rd1_en, m_rd2_en, m_wr_en;
  logic [AW-1:0]               m_rd1_addr, m_rd2_addr, m_wr_addr;
  logic [SC_P-1:0]             m_wr_be;
  logic [WB-1:0]               m_wr_data;
  logic [LANES_P-1:0][WB-1:0]  rd1_data, rd2_data;
  logic                        mem_busy;

  assign busy = ctrl_busy | mem_busy;

  xpu_vlsu #(.LANES_P(LANES_P), .SC_P(SC_P), .D_P(D_P), .WPL(WPL), .NVREG_P(NVREG_P))
  u_vlsu (
    .clk, .rst_n, .start(mem_start), .is_store(mem_is_store), .lane_mode(mem_lane_mode),
    .lane_sel(mem_lane_sel), .mop(mem_mop), .wide(mem_wide), .vreg(mem_vreg),
    .vidx(mem_vidx), .base(mem_base), .stride(mem_stride), .vl, .busy(mem_busy),
    .done(mem_done),
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_req_wstrb, .mem_rsp_valid, .mem_rsp_rdata,
    .m_rd1_en, .m_rd1_addr, .m_rd2_en, .m_rd2_addr, .rd1_data, .rd2_data,
    .m_wr_en, .m_wr_addr, .m_wr_be, .m_wr_data, .beat(ev_mem_beat)
  );

  // ------------------------------------------------------------- lanes + ring
  logic [LANES_P-1:0]          ro_valid, ri_valid;
  logic [LANES_P-1:0][15:0]    ro_k, ri_k;
  logic [LANES_P-1:0][3:0]     ro_hops, ri_hops;
  logic [LANES_P-1:0][WB-1:0]  ro_data, ri_data;

  xpu_interlane_net #(.LANES_P(LANES_P), .WB(WB)) u_net (
    .clk, .rst_n,
    .in_valid(ro_valid), .in_k(ro_k), .in_hops(ro_hops), .in_data(ro_data),
    .out_valid(ri_valid), .out_k(ri_k), .out_hops(ri_hops), .out_data(ri_data)
  );

  for (genvar l = 0; l < LANES_P; l++) begin : g_lane
    xpu_lane #(.LANE_ID(l), .LANES_P(LANES_P), .SC_P(SC_P), .D_P(D_P), .WPL(WPL),
               .NVREG_P(NVREG_P)) u_lane (
      .clk, .rst_n, .vl,
      .vop_valid, .vop_op, .vop_scalar, .vop_sval, .vop_vs2_addr, .vop_vs1_addr,
      .vop_vd_addr, .vop_word,
      .acc_init, .acc_store, .acc_addr, .sa_a_base,
      .src_rd(src_rd[l]), .src_addr, .src_k,
      .ring_in_valid(ri_valid[l]), .ring_in_k(ri_k[l]), .ring_in_hops(ri_hops[l]),
      .ring_in_data(ri_data[l]),
      .ring_out_valid(ro_valid[l]), .ring_out_k(ro_k[l]), .ring_out_hops(ro_hops[l]),
      .ring_out_data(ro_data[l]),
      .mac_fire(ev_mac[l]),
      .m_rd1_en(m_rd1_en[l]), .m_rd1_addr, .m_rd2_en(m_rd2_en[l]), .m_rd2_addr,
      .rd1_data(rd1_data[l]), .rd2_data(rd2_data[l]),
      .m_wr_en(m_wr_en[l]), .m_wr_addr, .m_wr_be, .m_wr_data
    );
  end

endmodule
