// tb_xpu_decoder: random 32-bit words and targeted encodings of every accepted
// instruction; the decoded kind, operation and fields are compared with a decoding
// written here from the instruction formats.
module tb_xpu_decoder;
  import xpu_pkg::*;
  logic [31:0] insn;
  dec_t        dec;
  int checks = 0, failures = 0;

  xpu_decoder dut (.insn, .dec);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input insn_kind_e k, input alu_op_e op, input bit sc,
                       input bit st, input bit ln, input bit wd);
    #1;
    checks++;
    if (dec.kind !== k || (k == INSN_ARITH && (dec.op !== op || dec.scalar !== sc)) ||
        (k == INSN_MEM && (dec.is_store !== st || dec.lane_mode !== ln || dec.wide !== wd ||
                           (ln && dec.lane_sel !== insn[31:29]) || dec.mop !== mop_e'(insn[27:26]))) ||
        (k != INSN_ILLEGAL && k != INSN_VSETVLI &&
         (dec.vd !== insn[11:7] || dec.vs1 !== insn[19:15] || dec.vs2 !== insn[24:20]))) begin
      failures++;
      if (failures < 10)
        $display("FAIL insn %h: kind %0d expected %0d (op %0d sc %0d st %0d ln %0d wd %0d)",
                 insn, dec.kind, k, dec.op, dec.scalar, dec.is_store, dec.lane_mode, dec.wide);
    end
  endtask

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [6:0] opc;
      logic [2:0] f3;
      logic [5:0] f6;
      insn_kind_e k;
      alu_op_e    op;
      bit sc, st, ln, wd, wok;
      insn = $urandom();
      // steer most words to the interesting opcodes
      case (t % 6)
        0: insn[6:0] = OPC_OP_V;
        1: insn[6:0] = OPC_LOAD_FP;
        2: insn[6:0] = OPC_STORE_FP;
        3: insn[6:0] = (t % 12 < 6) ? OPC_LANE_LD : OPC_LANE_ST;
        4: insn[6:0] = OPC_VSA;
        default: ;
      endcase
      if (t % 7 != 0) insn[25] = 1'b1;                      // vm
      if (t % 5 == 0) insn[31:29] = 3'($urandom_range(0, 3));
      if (insn[6:0] == OPC_OP_V && t % 3 == 0) begin
        insn[31:26] = ((t / 6) % 4 == 0) ? 6'b000000 : ((t / 6) % 4 == 1) ? 6'b000010 :
                      ((t / 6) % 4 == 2) ? 6'b100101 : 6'b101101;
      end
      if (insn[6:0] != OPC_OP_V && t % 2 == 0) insn[14:12] = (t % 4 == 0) ? 3'b110 : 3'b000;
      opc = insn[6:0]; f3 = insn[14:12]; f6 = insn[31:26];
      k = INSN_ILLEGAL; op = ALU_ADD; sc = 0; st = 0; ln = 0; wd = insn[28];
      wok = (!insn[28] && f3 == 3'b110) || (insn[28] && f3 == 3'b000);
      if (opc == OPC_OP_V && f3 == 3'b111) begin
        if (!insn[31] && insn[22:20] == 0 && (insn[25:23] == 3'b010 || insn[25:23] == 3'b100))
          k = INSN_VSETVLI;
      end else if (opc == OPC_OP_V && insn[25]) begin
        sc = (f3 == 3'b100 || f3 == 3'b110);
        if ((f6 == 6'b000000 || f6 == 6'b000010) && (f3 == 3'b000 || f3 == 3'b100)) begin
          k = INSN_ARITH; op = (f6 == 0) ? ALU_ADD : ALU_SUB;
        end
        if ((f6 == 6'b100101 || f6 == 6'b101101) && (f3 == 3'b010 || f3 == 3'b110)) begin
          k = INSN_ARITH; op = (f6 == 6'b100101) ? ALU_MUL : ALU_MACC;
        end
      end else if (opc == OPC_VSA) begin
        if (f3 == 3'b010 && insn[25]) k = INSN_VSA;
      end else if (opc == OPC_LOAD_FP || opc == OPC_STORE_FP) begin
        if (insn[25] && insn[31:29] == 0 && wok) begin k = INSN_MEM; st = (opc == OPC_STORE_FP); end
      end else if (opc == OPC_LANE_LD || opc == OPC_LANE_ST) begin
        if (insn[25] && insn[31:29] < LANES && wok) begin
          k = INSN_MEM; st = (opc == OPC_LANE_ST); ln = 1;
        end
      end
      check(k, op, sc, st, ln, wd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
