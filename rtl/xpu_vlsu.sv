// xpu_vlsu: vector memory unit.
//
// Moves a vector register between memory and the lanes' register slices. It supports
// the three access modes of RISC-V vector memory instructions, unit-stride, strided and
// indexed, and, for every one of them, the lane variant of the design: a lane load or
// lane store touches only the lane named by the instruction's nf field instead of
// spreading the elements over all lanes. Element placement in a register:
//   all lanes, D-bit elements : lane (e/SC)%LANES, word e/(SC*LANES), subword e%SC
//   all lanes, W-bit elements : lane e%LANES,      word e/LANES
//   one lane,  D-bit elements : lane nf,           word e/SC,         subword e%SC
//   one lane,  W-bit elements : lane nf,           word e
// A W-bit element is a whole packed lane word, so a strided W-bit lane load brings SC
// neighbouring columns of one matrix row per access, which is how the design fetches
// the columns of B for the systolic mode. Index vectors are always D-bit elements laid
// out over all lanes; the byte offset they hold is added to the base address.
//
// Memory port: W-bit wide, line-aligned byte address, valid/ready request, write
// strobes, and one response (read data, or a write acknowledge) per request, in order.
// The unit keeps one request outstanding. A unit-stride D-bit access whose base is
// aligned to a W-bit line moves up to SC elements per request; every other access moves
// one element per request, and an indexed access first reads its index from the
// register file. Misaligned elements are not supported. The number of elements is vl,
// limited to what one register (or one lane's slice of it) holds.
// The per-lane routing and the encodings follow the design; the port protocol, the
// single outstanding request and the line grouping are this implementation's choices.
module xpu_vlsu
  import xpu_pkg::*;
#(
  parameter int unsigned LANES_P = xpu_pkg::LANES,
  parameter int unsigned SC_P    = xpu_pkg::SC,
  parameter int unsigned D_P     = xpu_pkg::D,
  parameter int unsigned WPL     = xpu_pkg::MVL / (xpu_pkg::LANES * xpu_pkg::W),
  parameter int unsigned NVREG_P = xpu_pkg::NVREG,
  localparam int unsigned WB     = SC_P * D_P,
  localparam int unsigned AW     = $clog2(NVREG_P * WPL),
  localparam int unsigned LB     = $clog2(WB / 8)      // byte-offset bits in a line
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // command
  input  logic                          start,
  input  logic                          is_store,
  input  logic                          lane_mode,
  input  logic [2:0]                    lane_sel,
  input  mop_e                          mop,
  input  logic                          wide,
  input  logic [4:0]                    vreg,      // vd of a load, vs3 of a store
  input  logic [4:0]                    vidx,      // index register (vs2)
  input  logic [31:0]                   base,
  input  logic [31:0]                   stride,    // bytes
  input  logic [15:0]                   vl,
  output logic                          busy,
  output logic                          done,      // one-cycle pulse at the end
  // memory port
  output logic                          mem_req_valid,
  input  logic                          mem_req_ready,
  output logic                          mem_req_we,
  output logic [31:0]                   mem_req_addr,
  output logic [WB-1:0]                 mem_req_wdata,
  output logic [WB/8-1:0]               mem_req_wstrb,
  input  logic                          mem_rsp_valid,
  input  logic [WB-1:0]                 mem_rsp_rdata,
  // register file access
  output logic [LANES_P-1:0]            m_rd1_en,  // index reads
  output logic [AW-1:0]                 m_rd1_addr,
  output logic [LANES_P-1:0]            m_rd2_en,  // store data reads
  output logic [AW-1:0]                 m_rd2_addr,
  input  logic [LANES_P-1:0][WB-1:0]    rd1_data,
  input  logic [LANES_P-1:0][WB-1:0]    rd2_data,
  output logic [LANES_P-1:0]            m_wr_en,
  output logic [AW-1:0]                 m_wr_addr,
  output logic [SC_P-1:0]               m_wr_be,
  output logic [WB-1:0]                 m_wr_data,
  output logic                          beat       // one memory transfer completed
);

  typedef enum logic [2:0] {S_IDLE, S_ELEM, S_RD, S_REQ, S_RSP} state_e;
  state_e state;

  // latched command
  logic        c_store, c_lane, c_wide;
  logic [2:0]  c_sel;
  mop_e        c_mop;
  logic [4:0]  c_vreg, c_vidx;
  logic [31:0] c_base, c_stride;
  logic [15:0] c_n;        // elements to move
  logic [15:0] e;          // current element
  logic [31:0] idx_val;
  logic [WB-1:0] st_word;

  // element location in the register file
  typedef struct packed {
    logic [$clog2(LANES_P)-1:0] lane;
    logic [15:0]                word;
    logic [$clog2(SC_P)-1:0]    sub;
  } loc_t;

  function automatic loc_t locate(input logic [15:0] ei, input logic wd, input logic ln,
                                  input logic [2:0] sel);
    loc_t l;
    if (ln) begin
      l.lane = sel[$clog2(LANES_P)-1:0];
      l.word = wd ? ei : 16'(ei / SC_P);
      l.sub  = wd ? '0 : ei[$clog2(SC_P)-1:0];
    end else if (wd) begin
      l.lane = ei[$clog2(LANES_P)-1:0];
      l.word = 16'(ei / LANES_P);
      l.sub  = '0;
    end else begin
      l.lane = $clog2(LANES_P)'(ei / SC_P);
      l.word = 16'(ei / (SC_P * LANES_P));
      l.sub  = ei[$clog2(SC_P)-1:0];
    end
    return l;
  endfunction

  loc_t dloc, iloc;
  assign dloc = locate(e, c_wide, c_lane, c_sel);
  assign iloc = locate(e, 1'b0, 1'b0, 3'd0);

  logic is_idx;
  assign is_idx = (c_mop == MOP_IDX_UNO) || (c_mop == MOP_IDX_ORD);

  // a line-aligned unit-stride D-bit access moves up to SC elements at once
  logic        grp;
  logic [15:0] cnt;
  always_comb begin
    grp = (c_mop == MOP_UNIT) && !c_wide && (c_base[LB-1:0] == '0) && (e[$clog2(SC_P)-1:0] == '0);
    if (!grp)                    cnt = 16'd1;
    else if (c_n - e >= 16'(SC_P)) cnt = 16'(SC_P);
    else                         cnt = c_n - e;
  end

  // byte address of element e
  logic [31:0] addr;
  always_comb begin
    unique case (c_mop)
      MOP_UNIT:   addr = c_base + 32'(e) * (c_wide ? 32'(WB / 8) : 32'(D_P / 8));
      MOP_STRIDE: addr = c_base + 32'(e) * c_stride;
      default:    addr = c_base + idx_val;
    endcase
  end
  logic [$clog2(SC_P)-1:0] msub;   // subword of the line holding a D-bit element
  assign msub = addr[LB-1:$clog2(D_P/8)];

  // subword enables for a group of cnt elements starting at subword 0
  logic [SC_P-1:0] grp_be;
  always_comb
    for (int s = 0; s < SC_P; s++) grp_be[s] = (16'(s) < cnt);

  // capacity of the addressed register (or of one lane's slice of it)
  logic [15:0] cap;
  always_comb begin
    if (lane_mode) cap = wide ? 16'(WPL) : 16'(WPL * SC_P);
    else           cap = wide ? 16'(WPL * LANES_P) : 16'(WPL * SC_P * LANES_P);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      c_store <= 1'b0; c_lane <= 1'b0; c_wide <= 1'b0; c_sel <= '0;
      c_mop   <= MOP_UNIT; c_vreg <= '0; c_vidx <= '0;
      c_base  <= '0; c_stride <= '0; c_n <= '0; e <= '0;
      idx_val <= '0; st_word <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          c_store <= is_store; c_lane <= lane_mode; c_wide <= wide; c_sel <= lane_sel;
          c_mop <= mop; c_vreg <= vreg; c_vidx <= vidx; c_base <= base; c_stride <= stride;
          c_n <= (vl > cap) ? cap : vl;
          e <= '0;
          state <= S_ELEM;
        end
        S_ELEM: begin
          if (e >= c_n)                state <= S_IDLE;
          else if (is_idx || c_store)  state <= S_RD;
          else                         state <= S_REQ;
        end
        S_RD: begin
          idx_val <= rd1_data[iloc.lane][iloc.sub*D_P +: D_P];
          st_word <= rd2_data[dloc.lane];
          state   <= S_REQ;
        end
        S_REQ: if (mem_req_ready) state <= S_RSP;
        S_RSP: if (mem_rsp_valid) begin
          e     <= e + cnt;
          state <= S_ELEM;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_ELEM) && (e >= c_n);
  assign beat = (state == S_RSP) && mem_rsp_valid;

  // register reads for an element: index (port 1) and store data (port 2)
  always_comb begin
    m_rd1_en   = '0;
    m_rd2_en   = '0;
    m_rd1_addr = AW'(c_vidx) * AW'(WPL) + AW'(iloc.word);
    m_rd2_addr = AW'(c_vreg) * AW'(WPL) + AW'(dloc.word);
    if (state == S_ELEM && e < c_n) begin
      if (is_idx)  m_rd1_en[iloc.lane] = 1'b1;
      if (c_store) m_rd2_en[dloc.lane] = 1'b1;
    end
  end

  // memory request
  always_comb begin
    logic [D_P-1:0] st_elem;
    st_elem       = st_word[dloc.sub*D_P +: D_P];
    mem_req_valid = (state == S_REQ);
    mem_req_we    = c_store;
    mem_req_addr  = {addr[31:LB], {LB{1'b0}}};
    mem_req_wdata = st_word;
    mem_req_wstrb = '0;
    if (c_wide) begin
      mem_req_wstrb = '1;
    end else if (grp) begin
      for (int s = 0; s < SC_P; s++)
        if (grp_be[s]) mem_req_wstrb[s*(D_P/8) +: (D_P/8)] = '1;
    end else begin
      for (int s = 0; s < SC_P; s++) mem_req_wdata[s*D_P +: D_P] = st_elem;
      mem_req_wstrb[msub*(D_P/8) +: (D_P/8)] = '1;
    end
  end

  // register write of load data
  always_comb begin
    m_wr_en   = '0;
    m_wr_addr = AW'(c_vreg) * AW'(WPL) + AW'(dloc.word);
    m_wr_be   = '0;
    m_wr_data = mem_rsp_rdata;
    if (state == S_RSP && mem_rsp_valid && !c_store) begin
      m_wr_en[dloc.lane] = 1'b1;
      if (c_wide)   m_wr_be = '1;
      else if (grp) m_wr_be = grp_be;
      else begin
        for (int s = 0; s < SC_P; s++)
          m_wr_data[s*D_P +: D_P] = mem_rsp_rdata[msub*D_P +: D_P];
        m_wr_be[dloc.sub] = 1'b1;
      end
    end
  end

  // port rules: a request that is not taken is held unchanged, and a response only
  // arrives while one is outstanding
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr) &&
    $stable(mem_req_we) && $stable(mem_req_wdata) && $stable(mem_req_wstrb));
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> state == S_RSP);

endmodule
