// xpu_gemm_seq: on-chip instruction generator for a systolic-mode GEMM.
//
// Given the sizes M, N, K and the byte addresses of row-major 32-bit matrices A[M][K],
// B[K][N] and C[M][N], it issues the instruction stream that computes C += A*B on the
// unit in systolic mode with lane loads, so a host only has to start it:
//   for each row tile i (LANES rows of C)
//     for each depth chunk kc of at most PMAX rows of B
//       vsetvli 32-bit, vl = chunk depth
//       lane load A row i*LANES+r, unit stride, into lane r of VA      (r = 0..LANES-1)
//       for each column tile j (SC columns of C)
//         for each lane r holding rows of the chunk:
//           vsetvli W-bit, vl = rows in lane r
//           lane load rows of B, strided by N*4 bytes, W-bit packed, into lane r of VB
//         vsetvli W-bit, vl = LANES;  strided load of the C tile into VC
//         vsetvli 32-bit, vl = depth*LANES;  vsa VC, VA, VB
//         vsetvli W-bit, vl = LANES;  strided store of VC
// The loop body is the lane-load GEMM of the design; the loop over depth chunks (so
// that K may exceed the deepest pipeline of one vsa) and the use of a hardware
// generator for it are this implementation's reading of the design's note that the
// instruction generation was moved into the fabric. M must be a multiple of LANES and
// N a multiple of SC (software pads the matrices otherwise). Only the systolic-mode
// algorithm is generated: the vector-mode algorithm needs scalar elements of A that
// only the host can supply.
// Interface: `start` (one cycle, while !busy) latches the command; instructions leave
// on a valid/ready port with their scalar operands; `done` pulses when the last store
// has been accepted and the unit reports idle.
module xpu_gemm_seq
  import xpu_pkg::*;
#(
  parameter int unsigned LANES_P = xpu_pkg::LANES,
  parameter int unsigned SC_P    = xpu_pkg::SC,
  parameter int unsigned D_P     = xpu_pkg::D,
  parameter int unsigned MVL_P   = xpu_pkg::MVL,
  parameter logic [4:0]  VA      = 5'd1,
  parameter logic [4:0]  VB      = 5'd2,
  parameter logic [4:0]  VC      = 5'd3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] m_size,
  input  logic [15:0] n_size,
  input  logic [15:0] k_size,
  input  logic [31:0] a_base,
  input  logic [31:0] b_base,
  input  logic [31:0] c_base,
  output logic        busy,
  output logic        done,
  // instruction port towards the unit
  output logic        insn_valid,
  input  logic        insn_ready,
  output logic [31:0] insn,
  output logic [31:0] rs1_val,
  output logic [31:0] rs2_val,
  input  logic        unit_busy
);

  localparam int unsigned WB   = SC_P * D_P;
  localparam int unsigned WPL  = MVL_P / (LANES_P * WB);
  localparam int unsigned PMAX = (WPL * SC_P < WPL * LANES_P) ? WPL * SC_P : WPL * LANES_P;

  typedef enum logic [3:0] {
    G_IDLE, G_SETA, G_LDA, G_SETB, G_LDB, G_SETC, G_LDC, G_SETS, G_VSA, G_SETC2, G_STC,
    G_NEXT, G_DRAIN
  } gstate_e;
  gstate_e state;

  logic [15:0] m_q, n_q, k_q;
  logic [31:0] a_q, b_q, c_q;
  logic [15:0] i, j, kc, r;

  // depth of the current chunk and rows of it held by lane r
  logic [15:0] kk, rows_r;
  always_comb begin
    kk = k_q - kc;
    if (32'(kk) > PMAX) kk = 16'(PMAX);
    if (32'(r) * WPL >= 32'(kk))          rows_r = '0;
    else if (32'(kk) - 32'(r) * WPL > WPL) rows_r = 16'(WPL);
    else                                  rows_r = 16'(32'(kk) - 32'(r) * WPL);
  end

  // encodings
  function automatic logic [31:0] f_vsetvli(input logic wide);
    return {1'b0, 5'b0, (wide ? VSEW_W : VSEW_D), 3'b000, 5'd1, F3_CFG, 5'd1, OPC_OP_V};
  endfunction
  function automatic logic [31:0] f_mem(input logic [6:0] opc, input logic [2:0] nf,
                                        input logic wide, input mop_e mop, input logic [4:0] vd);
    return {nf, wide, mop, 1'b1, 5'd0, 5'd2, (wide ? 3'b000 : 3'b110), vd, opc};
  endfunction

  // addresses (bytes)
  logic [31:0] a_addr, b_addr, c_addr;
  always_comb begin
    a_addr = a_q + 32'd4 * ((32'(i) * LANES_P + 32'(r)) * 32'(k_q) + 32'(kc));
    b_addr = b_q + 32'd4 * ((32'(kc) + 32'(r) * WPL) * 32'(n_q) + 32'(j) * SC_P);
    c_addr = c_q + 32'd4 * (32'(i) * LANES_P * 32'(n_q) + 32'(j) * SC_P);
  end

  always_comb begin
    insn_valid = 1'b0;
    insn       = '0;
    rs1_val    = '0;
    rs2_val    = 32'd4 * 32'(n_q);
    unique case (state)
      G_SETA:  begin insn_valid = 1'b1; insn = f_vsetvli(1'b0); rs1_val = 32'(kk); end
      G_LDA:   begin insn_valid = 1'b1; insn = f_mem(OPC_LANE_LD, r[2:0], 1'b0, MOP_UNIT, VA);
                     rs1_val = a_addr; end
      G_SETB:  begin insn_valid = 1'b1; insn = f_vsetvli(1'b1); rs1_val = 32'(rows_r); end
      G_LDB:   begin insn_valid = 1'b1; insn = f_mem(OPC_LANE_LD, r[2:0], 1'b1, MOP_STRIDE, VB);
                     rs1_val = b_addr; end
      G_SETC, G_SETC2:
               begin insn_valid = 1'b1; insn = f_vsetvli(1'b1); rs1_val = 32'(LANES_P); end
      G_LDC:   begin insn_valid = 1'b1; insn = f_mem(OPC_LOAD_FP, 3'd0, 1'b1, MOP_STRIDE, VC);
                     rs1_val = c_addr; end
      G_SETS:  begin insn_valid = 1'b1; insn = f_vsetvli(1'b0); rs1_val = 32'(kk) * LANES_P; end
      G_VSA:   begin insn_valid = 1'b1; insn = {6'd0, 1'b1, VA, VB, F3_OPMVV, VC, OPC_VSA}; end
      G_STC:   begin insn_valid = 1'b1; insn = f_mem(OPC_STORE_FP, 3'd0, 1'b1, MOP_STRIDE, VC);
                     rs1_val = c_addr; end
      default: ;
    endcase
  end

  logic fire;
  assign fire = insn_valid && insn_ready;
  assign busy = (state != G_IDLE);
  assign done = (state == G_DRAIN) && !unit_busy && insn_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_IDLE;
      m_q <= '0; n_q <= '0; k_q <= '0; a_q <= '0; b_q <= '0; c_q <= '0;
      i <= '0; j <= '0; kc <= '0; r <= '0;
    end else begin
      unique case (state)
        G_IDLE: if (start) begin
          m_q <= m_size; n_q <= n_size; k_q <= k_size;
          a_q <= a_base; b_q <= b_base; c_q <= c_base;
          i <= '0; j <= '0; kc <= '0; r <= '0;
          state <= (m_size < 16'(LANES_P) || n_size < 16'(SC_P) || k_size == 0) ? G_IDLE : G_SETA;
        end
        G_SETA: if (fire) begin r <= '0; state <= G_LDA; end
        G_LDA: if (fire) begin
          if (32'(r) == LANES_P - 1) begin r <= '0; j <= '0; state <= G_SETB; end
          else r <= r + 16'd1;
        end
        G_SETB: if (fire) state <= G_LDB;
        G_LDB: if (fire) begin
          // next lane that still holds rows of this chunk
          if (32'(r) == LANES_P - 1 || 32'(r + 16'd1) * WPL >= 32'(kk)) begin
            r <= '0; state <= G_SETC;
          end else begin
            r <= r + 16'd1; state <= G_SETB;
          end
        end
        G_SETC:  if (fire) state <= G_LDC;
        G_LDC:   if (fire) state <= G_SETS;
        G_SETS:  if (fire) state <= G_VSA;
        G_VSA:   if (fire) state <= G_SETC2;
        G_SETC2: if (fire) state <= G_STC;
        G_STC:   if (fire) state <= G_NEXT;
        G_NEXT: begin
          r <= '0;
          if (32'(j + 16'd1) * SC_P < 32'(n_q)) begin
            j <= j + 16'd1; state <= G_SETB;
          end else if (kc + kk < k_q) begin
            j <= '0; kc <= kc + kk; state <= G_SETA;
          end else if (32'(i + 16'd1) * LANES_P < 32'(m_q)) begin
            j <= '0; kc <= '0; i <= i + 16'd1; state <= G_SETA;
          end else begin
            state <= G_DRAIN;
          end
        end
        G_DRAIN: if (!unit_busy && insn_ready) state <= G_IDLE;
        default: state <= G_IDLE;
      endcase
    end
  end

  // an instruction that is not taken is held unchanged
  a_insn_hold: assert property (@(posedge clk) disable iff (!rst_n)
    insn_valid && !insn_ready |=> insn_valid && $stable(insn) && $stable(rs1_val) &&
    $stable(rs2_val));

endmodule
