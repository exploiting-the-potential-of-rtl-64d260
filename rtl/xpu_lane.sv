// xpu_lane: one lane of the vector-systolic unit.
//
// A lane holds its slice of the vector register file, the operand multiplexers, the
// packed-SIMD ALU and an accumulator register of SC elements. The multiplexers and the
// accumulator are the additions that let the lane act as one row of the systolic array.
//
// Vector mode (vop_valid): every lane receives the same word uop. In the issue cycle the
// three read ports fetch word `vop_word` of vs2, vs1 and vd; one cycle later the ALU
// computes op(vs2, vs1 or the scalar, vd) and the result is written back to vd. Element
// e of a register sits in lane (e/SC)%LANES, word e/(SC*LANES), subword e%SC, so the
// lane enables only the subwords whose element index is below vl.
//
// Systolic mode (output stationary): the lane computes row LANE_ID of a tile
// C += A*B. `acc_init` reads the C row (word 0 of vd) into the accumulator. Rows of B
// reach the lane as tokens (k, packed row): either read from this lane's own slice when
// the lane is the current source (`src_rd`), or from the inter-lane ring. On the
// arrival of token k the lane reads A[LANE_ID,k] (word k/SC, subword k%SC of the A
// register), forwards the token on the ring, and one cycle later adds A*B(row k) into
// the SC accumulators. `acc_store` writes the accumulator back to word 0 of vd.
//
// Memory unit access: read ports 1 and 2 and the write port can be driven by the memory
// unit; the control never runs the memory unit and the ALU at the same time.
// Latencies: vector word uop 2 cycles (read, compute+write); token arrival to
// accumulator update 2 cycles. The structure (VRF, two muxes, ALU, ACC per lane)
// follows the lane drawing of the design; port counts and timing are this
// implementation's choice.
module xpu_lane
  import xpu_pkg::*;
#(
  parameter int unsigned LANE_ID = 0,
  parameter int unsigned LANES_P = xpu_pkg::LANES,
  parameter int unsigned SC_P    = xpu_pkg::SC,
  parameter int unsigned D_P     = xpu_pkg::D,
  parameter int unsigned WPL     = xpu_pkg::MVL / (xpu_pkg::LANES * xpu_pkg::W),
  parameter int unsigned NVREG_P = xpu_pkg::NVREG,
  localparam int unsigned WB     = SC_P * D_P,
  localparam int unsigned WORDS  = NVREG_P * WPL,
  localparam int unsigned AW     = $clog2(WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [15:0]          vl,
  // vector-mode word uop
  input  logic                 vop_valid,
  input  alu_op_e              vop_op,
  input  logic                 vop_scalar,
  input  logic [D_P-1:0]       vop_sval,
  input  logic [AW-1:0]        vop_vs2_addr,
  input  logic [AW-1:0]        vop_vs1_addr,
  input  logic [AW-1:0]        vop_vd_addr,
  input  logic [15:0]          vop_word,
  // systolic mode
  input  logic                 acc_init,
  input  logic                 acc_store,
  input  logic [AW-1:0]        acc_addr,   // word 0 of the C register
  input  logic [AW-1:0]        sa_a_base,  // word 0 of the A register
  input  logic                 src_rd,     // this lane is the source of row src_k
  input  logic [AW-1:0]        src_addr,
  input  logic [15:0]          src_k,
  input  logic                 ring_in_valid,
  input  logic [15:0]          ring_in_k,
  input  logic [3:0]           ring_in_hops,
  input  logic [WB-1:0]        ring_in_data,
  output logic                 ring_out_valid,
  output logic [15:0]          ring_out_k,
  output logic [3:0]           ring_out_hops,
  output logic [WB-1:0]        ring_out_data,
  output logic                 mac_fire,   // an accumulation happened this cycle
  // memory unit access
  input  logic                 m_rd1_en,
  input  logic [AW-1:0]        m_rd1_addr,
  input  logic                 m_rd2_en,
  input  logic [AW-1:0]        m_rd2_addr,
  output logic [WB-1:0]        rd1_data,
  output logic [WB-1:0]        rd2_data,
  input  logic                 m_wr_en,
  input  logic [AW-1:0]        m_wr_addr,
  input  logic [SC_P-1:0]      m_wr_be,
  input  logic [WB-1:0]        m_wr_data
);

  // ---------------------------------------------------------------- VRF
  logic [2:0]           rd_en;
  logic [2:0][AW-1:0]   rd_addr;
  logic [2:0][WB-1:0]   rd_data;
  logic                 wr_en;
  logic [AW-1:0]        wr_addr;
  logic [SC_P-1:0]      wr_be;
  logic [WB-1:0]        wr_data;

  xpu_vrf_slice #(.SC_P(SC_P), .D_P(D_P), .WORDS(WORDS), .NRD(3)) u_vrf (
    .clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_be, .wr_data
  );

  assign rd1_data = rd_data[1];
  assign rd2_data = rd_data[2];

  // ---------------------------------------------------------- pipeline regs
  logic                 s1_valid;
  alu_op_e              s1_op;
  logic                 s1_scalar;
  logic [D_P-1:0]       s1_sval;
  logic [AW-1:0]        s1_waddr;
  logic [SC_P-1:0]      s1_be;

  logic                 src_q;        // own B row read issued last cycle
  logic [15:0]          src_k_q;
  logic                 acc_init_q;
  logic                 m_valid;      // token accepted last cycle, A read in flight
  logic [$clog2(SC_P)-1:0] m_sub;
  logic [WB-1:0]        m_b;

  logic [WB-1:0]        acc;

  // token arriving this cycle: own row (read data now valid) or from the ring
  logic                 arr_valid;
  logic [15:0]          arr_k;
  logic [3:0]           arr_hops;
  logic [WB-1:0]        arr_data;

  always_comb begin
    if (src_q) begin
      arr_valid = 1'b1;
      arr_k     = src_k_q;
      arr_hops  = '0;
      arr_data  = rd_data[1];
    end else begin
      arr_valid = ring_in_valid;
      arr_k     = ring_in_k;
      arr_hops  = ring_in_hops;
      arr_data  = ring_in_data;
    end
  end

  assign ring_out_valid = arr_valid;
  assign ring_out_k     = arr_k;
  assign ring_out_hops  = arr_hops;
  assign ring_out_data  = arr_data;

  // subword enables of a vector word uop: element index below vl
  logic [SC_P-1:0] vop_be;
  always_comb begin
    for (int s = 0; s < SC_P; s++)
      vop_be[s] = (32'(vop_word) * (SC_P * LANES_P) + LANE_ID * SC_P + s) < 32'(vl);
  end

  // read port steering
  always_comb begin
    rd_en   = '0;
    rd_addr = '0;
    // port 0: vs2 (vector mode) or the A element (systolic mode)
    if (vop_valid) begin
      rd_en[0] = 1'b1; rd_addr[0] = vop_vs2_addr;
    end else if (arr_valid) begin
      rd_en[0] = 1'b1; rd_addr[0] = sa_a_base + AW'(arr_k / SC_P);
    end
    // port 1: vs1, own B row, or memory unit
    if (m_rd1_en) begin
      rd_en[1] = 1'b1; rd_addr[1] = m_rd1_addr;
    end else if (vop_valid) begin
      rd_en[1] = 1'b1; rd_addr[1] = vop_vs1_addr;
    end else if (src_rd) begin
      rd_en[1] = 1'b1; rd_addr[1] = src_addr;
    end
    // port 2: vd, C row, or memory unit
    if (m_rd2_en) begin
      rd_en[2] = 1'b1; rd_addr[2] = m_rd2_addr;
    end else if (vop_valid) begin
      rd_en[2] = 1'b1; rd_addr[2] = vop_vd_addr;
    end else if (acc_init) begin
      rd_en[2] = 1'b1; rd_addr[2] = acc_addr;
    end
  end

  // ---------------------------------------------------------- operand muxes + ALU
  logic [WB-1:0] a_elem_bcast;
  logic [WB-1:0] s1_sval_bcast;
  alu_op_e       alu_op;
  logic [WB-1:0] alu_a, alu_b, alu_c, alu_y;

  always_comb begin
    for (int s = 0; s < SC_P; s++) begin
      a_elem_bcast[s*D_P +: D_P]  = rd_data[0][m_sub*D_P +: D_P];
      s1_sval_bcast[s*D_P +: D_P] = s1_sval;
    end
    if (m_valid) begin
      alu_op = ALU_MACC;
      alu_a  = a_elem_bcast;
      alu_b  = m_b;
      alu_c  = acc;
    end else begin
      alu_op = s1_op;
      alu_a  = rd_data[0];
      alu_b  = s1_scalar ? s1_sval_bcast : rd_data[1];
      alu_c  = rd_data[2];
    end
  end

  xpu_simd_alu #(.SC_P(SC_P), .D_P(D_P)) u_alu (
    .op(alu_op), .a(alu_a), .b(alu_b), .c(alu_c), .y(alu_y)
  );

  assign mac_fire = m_valid;

  // write port steering
  always_comb begin
    wr_en   = 1'b0;
    wr_addr = '0;
    wr_be   = '0;
    wr_data = '0;
    if (m_wr_en) begin
      wr_en = 1'b1; wr_addr = m_wr_addr; wr_be = m_wr_be; wr_data = m_wr_data;
    end else if (s1_valid) begin
      wr_en = 1'b1; wr_addr = s1_waddr; wr_be = s1_be; wr_data = alu_y;
    end else if (acc_store) begin
      wr_en = 1'b1; wr_addr = acc_addr; wr_be = '1; wr_data = acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_op      <= ALU_ADD;
      s1_scalar  <= 1'b0;
      s1_sval    <= '0;
      s1_waddr   <= '0;
      s1_be      <= '0;
      src_q      <= 1'b0;
      src_k_q    <= '0;
      acc_init_q <= 1'b0;
      m_valid    <= 1'b0;
      m_sub      <= '0;
      m_b        <= '0;
      acc        <= '0;
    end else begin
      s1_valid   <= vop_valid;
      s1_op      <= vop_op;
      s1_scalar  <= vop_scalar;
      s1_sval    <= vop_sval;
      s1_waddr   <= vop_vd_addr;
      s1_be      <= vop_be;
      src_q      <= src_rd && !vop_valid && !m_rd1_en;
      src_k_q    <= src_k;
      acc_init_q <= acc_init && !vop_valid && !m_rd2_en;
      m_valid    <= arr_valid && !vop_valid;
      m_sub      <= arr_k[$clog2(SC_P)-1:0];
      m_b        <= arr_data;
      if (acc_init_q)   acc <= rd_data[2];
      else if (m_valid) acc <= alu_y;
    end
  end

  // a row read from this lane's own slice never meets a row arriving on the ring (the
  // control's idle cycle at each change of source lane guarantees it)
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(src_q && ring_in_valid));

endmodule
