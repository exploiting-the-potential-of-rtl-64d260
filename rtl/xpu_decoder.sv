// xpu_decoder: combinational decoder of the 32-bit instructions the unit executes.
//
// Accepted instructions (everything else is reported as INSN_ILLEGAL):
//   vsetvli  rd, rs1, vtypei      OP-V, funct3 111, bit 31 = 0; vsew 010 (D = 32-bit
//                                 elements) or 100 (W-bit packed elements), LMUL = 1
//   vadd/vsub .vv .vx             OP-V, funct6 000000 / 000010, OPIVV / OPIVX
//   vmul/vmacc .vv .vx            OP-V, funct6 100101 / 101101, OPMVV / OPMVX
//   vsa      vd(C), vs2(A), vs1(B) integer systolic GEMM tile, custom-2 opcode, funct3 010
//   vector loads/stores           LOAD-FP / STORE-FP, mop unit/strided/indexed,
//                                 width 110 (32-bit) or mew=1,width 000 (W-bit), nf = 0
//   lane loads/stores             same fields as the standard ones under the custom-0
//                                 (load) and custom-1 (store) opcodes; nf = lane number
// Field positions follow the RISC-V vector memory format
//   nf[31:29] mew[28] mop[27:26] vm[25] lumop/rs2/vs2[24:20] rs1[19:15] width[14:12]
//   vd/vs3[11:7] opcode[6:0]
// which the lane instructions keep, changing only the opcode and using nf to name the
// lane (up to 8 lanes). Masked execution (vm = 0), segment accesses and floating-point
// forms (vfsa) are not implemented. The opcode values of the lane instructions and of
// vsa are this implementation's choice.
module xpu_decoder
  import xpu_pkg::*;
#(
  parameter int unsigned LANES_P = xpu_pkg::LANES
) (
  input  logic [31:0] insn,
  output dec_t        dec
);

  logic [6:0] opc;
  logic [2:0] f3;
  logic [5:0] f6;
  logic       vm;
  logic [2:0] nf;
  logic       mew;
  logic [1:0] mop;

  assign opc = insn[6:0];
  assign f3  = insn[14:12];
  assign f6  = insn[31:26];
  assign vm  = insn[25];
  assign nf  = insn[31:29];
  assign mew = insn[28];
  assign mop = insn[27:26];

  always_comb begin
    logic mem_width_ok;
    dec           = '0;
    dec.kind      = INSN_ILLEGAL;
    dec.op        = ALU_ADD;
    dec.mop       = mop_e'(mop);
    dec.vd        = insn[11:7];
    dec.vs1       = insn[19:15];
    dec.vs2       = insn[24:20];
    dec.lane_sel  = nf;
    dec.vsew      = insn[25:23];
    dec.avl_max   = (insn[19:15] == 5'd0);
    dec.wide      = mew;
    mem_width_ok  = (!mew && f3 == 3'b110) || (mew && f3 == 3'b000);

    unique case (opc)
      OPC_OP_V: begin
        if (f3 == F3_CFG) begin
          if (!insn[31] && (insn[25:23] == VSEW_D || insn[25:23] == VSEW_W)
              && insn[22:20] == 3'b000)
            dec.kind = INSN_VSETVLI;
        end else if (vm) begin
          dec.scalar = (f3 == F3_OPIVX) || (f3 == F3_OPMVX);
          unique case (f6)
            F6_VADD:  if (f3 == F3_OPIVV || f3 == F3_OPIVX) begin dec.kind = INSN_ARITH; dec.op = ALU_ADD;  end
            F6_VSUB:  if (f3 == F3_OPIVV || f3 == F3_OPIVX) begin dec.kind = INSN_ARITH; dec.op = ALU_SUB;  end
            F6_VMUL:  if (f3 == F3_OPMVV || f3 == F3_OPMVX) begin dec.kind = INSN_ARITH; dec.op = ALU_MUL;  end
            F6_VMACC: if (f3 == F3_OPMVV || f3 == F3_OPMVX) begin dec.kind = INSN_ARITH; dec.op = ALU_MACC; end
            default: ;
          endcase
        end
      end
      OPC_VSA: begin
        if (f3 == F3_OPMVV && vm) begin
          dec.kind = INSN_VSA;
          dec.op   = ALU_MACC;
        end
      end
      OPC_LOAD_FP, OPC_STORE_FP: begin
        if (vm && nf == 3'd0 && mem_width_ok) begin
          dec.kind     = INSN_MEM;
          dec.is_store = (opc == OPC_STORE_FP);
        end
      end
      OPC_LANE_LD, OPC_LANE_ST: begin
        if (vm && 32'(nf) < LANES_P && mem_width_ok) begin
          dec.kind      = INSN_MEM;
          dec.is_store  = (opc == OPC_LANE_ST);
          dec.lane_mode = 1'b1;
        end
      end
      default: ;
    endcase
  end

endmodule
