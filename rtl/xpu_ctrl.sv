// xpu_ctrl: control of the vector-systolic unit.
//
// Holds the vl and element-width state set by vsetvli and executes one instruction at a
// time (no chaining or overlap; the next instruction is accepted when the current one
// has finished):
//   vsetvli  vl = min(AVL, VLMAX), VLMAX = MVL/D for D-bit and MVL/W for W-bit elements;
//            AVL = rs1 value, or VLMAX when rs1 is x0. One cycle.
//   arith    VPU mode: word uops w = 0 .. ceil(vl/(SC*LANES))-1, one per cycle, sent to
//            all lanes at once; the .vx forms hold the scalar for the whole instruction.
//            Takes nwords + 2 cycles.
//   vsa      SA mode: depth P = vl/LANES (vl counted in D-bit elements, so a full
//            register of A gives the deepest pipeline), at most the rows of B one
//            register holds. Cycle 0 loads every lane's accumulator from its row of the
//            C tile. Then row k of B (k = 0..P-1) is read by its source lane
//            k / WPL, the lanes taking turns as the source in order, and travels round
//            the ring. When the source moves to the next lane one idle cycle is
//            inserted so that no lane receives two rows in the same cycle. After the
//            last row the control waits LANES+2 cycles for the farthest lane and
//            writes all accumulators back to the C register.
//   memory   handed to the memory unit with its base (rs1), stride (rs2) and vl.
// The sequencing is this implementation's; the rotating source lane follows the
// design's scheme for spreading matrix B over all register slices.
module xpu_ctrl
  import xpu_pkg::*;
#(
  parameter int unsigned LANES_P = xpu_pkg::LANES,
  parameter int unsigned SC_P    = xpu_pkg::SC,
  parameter int unsigned D_P     = xpu_pkg::D,
  parameter int unsigned MVL_P   = xpu_pkg::MVL,
  parameter int unsigned NVREG_P = xpu_pkg::NVREG,
  localparam int unsigned WB     = SC_P * D_P,
  localparam int unsigned WPL    = MVL_P / (LANES_P * WB),
  localparam int unsigned AW     = $clog2(NVREG_P * WPL)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // instruction issue
  input  logic                 insn_valid,
  output logic                 insn_ready,
  input  dec_t                 dec,
  input  logic [31:0]          rs1_val,
  input  logic [31:0]          rs2_val,
  output logic                 illegal,      // pulse: instruction dropped
  output logic [15:0]          vl,
  output logic                 sew_wide,
  output logic                 busy,
  output logic                 sa_mode,      // the lanes run as a systolic array
  output logic                 sa_src_switch,// pulse: next lane became the source of B
  // lane control
  output logic                 vop_valid,
  output alu_op_e              vop_op,
  output logic                 vop_scalar,
  output logic [D_P-1:0]       vop_sval,
  output logic [AW-1:0]        vop_vs2_addr,
  output logic [AW-1:0]        vop_vs1_addr,
  output logic [AW-1:0]        vop_vd_addr,
  output logic [15:0]          vop_word,
  output logic                 acc_init,
  output logic                 acc_store,
  output logic [AW-1:0]        acc_addr,
  output logic [AW-1:0]        sa_a_base,
  output logic [LANES_P-1:0]   src_rd,
  output logic [AW-1:0]        src_addr,
  output logic [15:0]          src_k,
  // memory unit command
  output logic                 mem_start,
  output logic                 mem_is_store,
  output logic                 mem_lane_mode,
  output logic [2:0]           mem_lane_sel,
  output mop_e                 mem_mop,
  output logic                 mem_wide,
  output logic [4:0]           mem_vreg,
  output logic [4:0]           mem_vidx,
  output logic [31:0]          mem_base,
  output logic [31:0]          mem_stride,
  input  logic                 mem_done
);

  localparam int unsigned VLMAX_D = MVL_P / D_P;
  localparam int unsigned VLMAX_W = MVL_P / WB;
  localparam int unsigned PMAX    = (WPL * SC_P < WPL * LANES_P) ? WPL * SC_P : WPL * LANES_P;
  localparam int unsigned EPW     = SC_P * LANES_P;   // elements per word row

  typedef enum logic [2:0] {C_IDLE, C_ARITH, C_ARITH_WB, C_SA_INIT, C_SA_STREAM,
                            C_SA_WAIT, C_SA_STORE, C_MEM} cstate_e;
  cstate_e state;

  dec_t        d;            // instruction being executed
  logic [31:0] sval;
  logic [15:0] cnt;          // word index / step index k
  logic [15:0] lim;          // number of words / depth P
  logic [7:0]  wait_cnt;
  logic        bubble;       // idle cycle before a new source lane

  assign insn_ready = (state == C_IDLE);
  assign busy       = (state != C_IDLE);
  assign sa_mode    = (state == C_SA_INIT) || (state == C_SA_STREAM) ||
                      (state == C_SA_WAIT) || (state == C_SA_STORE);

  // number of word rows holding vl elements, and the systolic depth
  logic [15:0] nwords, depth;
  always_comb begin
    nwords = 16'((32'(vl) + EPW - 1) / EPW);
    depth  = 16'(32'(vl) / LANES_P);
    if (32'(depth) > PMAX) depth = 16'(PMAX);
  end

  // source lane of step cnt and whether the step after it changes lane
  logic [15:0] src_lane_now;
  assign src_lane_now = 16'(32'(cnt) / WPL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      d        <= '0;
      sval     <= '0;
      cnt      <= '0;
      lim      <= '0;
      wait_cnt <= '0;
      bubble   <= 1'b0;
      vl       <= '0;
      sew_wide <= 1'b0;
    end else begin
      unique case (state)
        C_IDLE: if (insn_valid) begin
          d    <= dec;
          sval <= rs1_val;
          cnt  <= '0;
          unique case (dec.kind)
            INSN_VSETVLI: begin
              automatic int unsigned vmax = (dec.vsew == VSEW_W) ? VLMAX_W : VLMAX_D;
              sew_wide <= (dec.vsew == VSEW_W);
              if (dec.avl_max || rs1_val >= vmax) vl <= 16'(vmax);
              else                                vl <= rs1_val[15:0];
            end
            INSN_ARITH: begin
              lim   <= nwords;
              state <= (nwords == 0) ? C_IDLE : C_ARITH;
            end
            INSN_VSA: begin
              lim   <= depth;
              state <= C_SA_INIT;
            end
            INSN_MEM: state <= C_MEM;
            default: ;
          endcase
        end
        C_ARITH: begin
          cnt <= cnt + 16'd1;
          if (cnt + 16'd1 == lim) state <= C_ARITH_WB;
        end
        C_ARITH_WB: state <= C_IDLE;
        C_SA_INIT: begin
          bubble <= 1'b0;
          if (lim == 0) begin
            wait_cnt <= 8'(LANES_P + 2);
            state    <= C_SA_WAIT;
          end else begin
            state <= C_SA_STREAM;
          end
        end
        C_SA_STREAM: begin
          if (bubble) begin
            bubble <= 1'b0;
          end else begin
            cnt <= cnt + 16'd1;
            if (cnt + 16'd1 == lim) begin
              wait_cnt <= 8'(LANES_P + 2);
              state    <= C_SA_WAIT;
            end else if (32'(cnt + 16'd1) % WPL == 0) begin
              bubble <= 1'b1;
            end
          end
        end
        C_SA_WAIT: begin
          wait_cnt <= wait_cnt - 8'd1;
          if (wait_cnt == 8'd1) state <= C_SA_STORE;
        end
        C_SA_STORE: state <= C_IDLE;
        C_MEM: if (mem_done) state <= C_IDLE;
        default: state <= C_IDLE;
      endcase
    end
  end

  assign illegal = (state == C_IDLE) && insn_valid && (dec.kind == INSN_ILLEGAL);
  assign sa_src_switch = (state == C_SA_STREAM) && bubble;

  // lane control
  always_comb begin
    vop_valid    = (state == C_ARITH);
    vop_op       = d.op;
    vop_scalar   = d.scalar;
    vop_sval     = sval[D_P-1:0];
    vop_word     = cnt;
    vop_vs2_addr = AW'(d.vs2) * AW'(WPL) + AW'(cnt);
    vop_vs1_addr = AW'(d.vs1) * AW'(WPL) + AW'(cnt);
    vop_vd_addr  = AW'(d.vd)  * AW'(WPL) + AW'(cnt);

    acc_init  = (state == C_SA_INIT);
    acc_store = (state == C_SA_STORE);
    acc_addr  = AW'(d.vd)  * AW'(WPL);
    sa_a_base = AW'(d.vs2) * AW'(WPL);
    src_rd    = '0;
    if (state == C_SA_STREAM && !bubble) src_rd[src_lane_now[$clog2(LANES_P)-1:0]] = 1'b1;
    src_addr  = AW'(d.vs1) * AW'(WPL) + AW'(32'(cnt) % WPL);
    src_k     = cnt;
  end

  // memory unit command
  assign mem_start     = (state == C_IDLE) && insn_valid && (dec.kind == INSN_MEM);
  assign mem_is_store  = dec.is_store;
  assign mem_lane_mode = dec.lane_mode;
  assign mem_lane_sel  = dec.lane_sel;
  assign mem_mop       = dec.mop;
  assign mem_wide      = dec.wide;
  assign mem_vreg      = dec.vd;
  assign mem_vidx      = dec.vs2;
  assign mem_base      = rs1_val;
  assign mem_stride    = rs2_val;

  // at most one lane is the source of B in any cycle
  a_one_source: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(src_rd));

endmodule
