// xpu_pkg: sizes, encodings and shared types of the vector-systolic processing unit.
//
// The unit is a vector processor with LANES lanes. Each lane has a W-bit packed-SIMD
// datapath holding SC elements of D bits (W = SC*D). The same lanes, with an
// accumulator per subword and an inter-lane ring, form an output-stationary systolic
// array of LANES x SC processing elements when the vsa instruction runs.
//
// Defaults follow the main configuration of the design: 4 lanes x 4 subwords (a 4x4
// array), 32-bit data, a maximum vector length (MVL) of 16384 bits. The number of
// architectural vector registers (32) and every opcode/funct value below that is not
// a standard RISC-V V encoding are choices of this implementation.
package xpu_pkg;

  // ---------------------------------------------------------------- sizes
  parameter int unsigned LANES = 4;      // SR: rows of the systolic array
  parameter int unsigned SC    = 4;      // subwords per lane word: columns of the array
  parameter int unsigned D     = 32;     // element width in bits
  parameter int unsigned W     = SC * D; // lane datapath width in bits
  parameter int unsigned MVL   = 16384;  // bits in one vector register
  parameter int unsigned NVREG = 32;     // architectural vector registers

  // ------------------------------------------------------------ encodings
  // Standard RISC-V major opcodes used by the vector extension.
  parameter logic [6:0] OPC_LOAD_FP  = 7'b0000111;
  parameter logic [6:0] OPC_STORE_FP = 7'b0100111;
  parameter logic [6:0] OPC_OP_V     = 7'b1010111;
  // Opcodes of this implementation for the lane loads, lane stores and vsa.
  parameter logic [6:0] OPC_LANE_LD  = 7'b0001011; // custom-0
  parameter logic [6:0] OPC_LANE_ST  = 7'b0101011; // custom-1
  parameter logic [6:0] OPC_VSA      = 7'b1011011; // custom-2

  // OP-V funct3 categories
  parameter logic [2:0] F3_OPIVV = 3'b000;
  parameter logic [2:0] F3_OPMVV = 3'b010;
  parameter logic [2:0] F3_OPIVX = 3'b100;
  parameter logic [2:0] F3_OPMVX = 3'b110;
  parameter logic [2:0] F3_CFG   = 3'b111;

  // OP-V funct6 values (RISC-V V 1.0)
  parameter logic [5:0] F6_VADD  = 6'b000000;
  parameter logic [5:0] F6_VSUB  = 6'b000010;
  parameter logic [5:0] F6_VMUL  = 6'b100101;
  parameter logic [5:0] F6_VMACC = 6'b101101;

  // vtype.vsew values accepted: 32-bit elements and W-bit packed elements.
  parameter logic [2:0] VSEW_D = 3'b010;
  parameter logic [2:0] VSEW_W = 3'b100;

  // ---------------------------------------------------------------- types
  typedef enum logic [1:0] {
    ALU_ADD  = 2'd0,
    ALU_SUB  = 2'd1,
    ALU_MUL  = 2'd2,
    ALU_MACC = 2'd3   // a*b + c
  } alu_op_e;

  typedef enum logic [1:0] {
    MOP_UNIT    = 2'b00,
    MOP_IDX_UNO = 2'b01,
    MOP_STRIDE  = 2'b10,
    MOP_IDX_ORD = 2'b11
  } mop_e;

  typedef enum logic [2:0] {
    INSN_ILLEGAL = 3'd0,
    INSN_VSETVLI = 3'd1,
    INSN_ARITH   = 3'd2,
    INSN_VSA     = 3'd3,
    INSN_MEM     = 3'd4
  } insn_kind_e;

  // Fields of a decoded instruction.
  typedef struct packed {
    insn_kind_e  kind;
    alu_op_e     op;
    logic        scalar;    // .vx form: second operand is rs1 held for the whole instruction
    logic [4:0]  vd;        // destination (vs3 for stores)
    logic [4:0]  vs1;
    logic [4:0]  vs2;
    logic        is_store;
    logic        lane_mode; // lane load/store: one lane only
    logic [2:0]  lane_sel;  // nf field of a lane load/store
    mop_e        mop;
    logic        wide;      // memory element is W bits (else D bits)
    logic        avl_max;   // vsetvli with rs1 = x0: take VLMAX
    logic [2:0]  vsew;      // vsetvli requested element width
  } dec_t;

endpackage
