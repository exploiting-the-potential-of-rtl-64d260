// tb_xpu_vlsu: the memory unit against a behavioural memory and a register-file model.
// Random loads and stores of every kind (unit-stride, strided, indexed; 32-bit or W-bit
// elements; across all lanes or into one lane) with random vl, base, stride and
// indices. Loads are checked element by element in the register-file model, stores in
// memory, using the element placement of the design recomputed here. The number of
// memory transfers is checked too: a line-aligned unit-stride 32-bit access needs
// ceil(vl/SC) of them, every other access one per element.
module tb_xpu_vlsu;
  import xpu_pkg::*;
  localparam int unsigned L = LANES, NS = SC, ND = D, WB = W;
  localparam int unsigned WPL = MVL / (L * W), NW = NVREG * WPL, AW = $clog2(NW);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0, is_store = 0, lane_mode = 0, wide = 0, busy, done, beat;
  logic [2:0]  lane_sel = 0;
  mop_e        mop = MOP_UNIT;
  logic [4:0]  vreg = 0, vidx = 0;
  logic [31:0] base = 0, stride = 0;
  logic [15:0] vl = 0;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [31:0]       mem_req_addr;
  logic [WB-1:0]     mem_req_wdata, mem_rsp_rdata;
  logic [WB/8-1:0]   mem_req_wstrb;
  logic [L-1:0]          m_rd1_en, m_rd2_en, m_wr_en;
  logic [AW-1:0]         m_rd1_addr, m_rd2_addr, m_wr_addr;
  logic [L-1:0][WB-1:0]  rd1_data, rd2_data;
  logic [NS-1:0]         m_wr_be;
  logic [WB-1:0]         m_wr_data;

  xpu_vlsu dut (.*);

  tb_xpu_mem #(.WB(WB), .LINES(8192)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_we(mem_req_we), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .req_wstrb(mem_req_wstrb), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata)
  );

  // register-file model: synchronous read, subword-masked write
  logic [WB-1:0] vrf [L][NW];
  always_ff @(posedge clk) begin
    for (int l = 0; l < L; l++) begin
      if (m_rd1_en[l]) rd1_data[l] <= vrf[l][m_rd1_addr];
      if (m_rd2_en[l]) rd2_data[l] <= vrf[l][m_rd2_addr];
      if (m_wr_en[l])
        for (int s = 0; s < NS; s++)
          if (m_wr_be[s]) vrf[l][m_wr_addr][s*ND +: ND] <= m_wr_data[s*ND +: ND];
    end
  end

  int checks = 0, failures = 0, beats = 0;
  always_ff @(posedge clk) if (beat) beats <= beats + 1;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // byte-level view of memory
  function automatic logic [7:0] mb(input int unsigned a);
    return u_mem.lines[(a >> 4) % 8192][(a % 16) * 8 +: 8];
  endfunction

  // placement of element e: lane, word within the register, subword
  task automatic place(input int e, input bit wd, input bit ln, input int sel,
                       output int lane, output int word, output int sub);
    if (ln) begin
      lane = sel;
      word = wd ? e : e / NS;
      sub  = wd ? 0 : e % NS;
    end else if (wd) begin
      lane = e % L; word = e / L; sub = 0;
    end else begin
      lane = (e / NS) % L; word = e / (NS * L); sub = e % NS;
    end
  endtask

  initial begin
    int n_kind [12];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8192; i++) u_mem.lines[i] = {$urandom(), $urandom(), $urandom(), $urandom()};
    for (int l = 0; l < L; l++) for (int w = 0; w < NW; w++)
      vrf[l][w] = {$urandom(), $urandom(), $urandom(), $urandom()};

    for (int t = 0; t < 240; t++) begin
      int cap, n, eb, exp_beats, b0;
      logic [WB-1:0] vrf_before [L][NW];
      logic [7:0]    mem_exp [int];
      int unsigned   idx [512];

      is_store  = (t % 2);
      wide      = ((t / 2) % 2);
      lane_mode = ((t / 4) % 2);
      mop       = (t / 8) % 3 == 0 ? MOP_UNIT : ((t / 8) % 3 == 1 ? MOP_STRIDE :
                  (t % 16 < 8 ? MOP_IDX_UNO : MOP_IDX_ORD));
      lane_sel  = 3'($urandom_range(0, L - 1));
      vreg      = 5'($urandom_range(8, 31));
      vidx      = 5'd7;
      eb        = wide ? WB / 8 : ND / 8;
      cap       = lane_mode ? (wide ? WPL : WPL * NS) : (wide ? WPL * L : WPL * NS * L);
      vl        = 16'($urandom_range(1, cap + 8));
      n         = (vl > cap) ? cap : vl;
      base      = 32'h4000 + eb * $urandom_range(0, 64);
      if (t % 3 == 0) base = base & ~32'hf;
      stride    = eb * $urandom_range(1, 6);
      // index vector in v7 (32-bit elements over all lanes)
      for (int e = 0; e < 512; e++) begin
        int l, w, s;
        idx[e] = eb * $urandom_range(0, 2000);
        place(e, 0, 0, 0, l, w, s);
        vrf[l][7 * WPL + w][s*ND +: ND] = idx[e];
      end
      vrf_before = vrf;
      @(negedge clk);
      start = 1;
      b0 = beats;
      @(negedge clk);
      start = 0;
      while (busy) @(negedge clk);
      n_kind[int'(mop) * 3 + (wide ? 1 : 0) + (lane_mode ? 0 : 0)]++;

      // expected number of transfers
      if (mop == MOP_UNIT && !wide && base[3:0] == 0) exp_beats = (n + NS - 1) / NS;
      else exp_beats = n;
      checks++;
      if (beats - b0 != exp_beats) begin
        failures++;
        $display("FAIL t %0d transfers %0d expected %0d", t, beats - b0, exp_beats);
      end

      for (int e = 0; e < n; e++) begin
        int l, w, s;
        int unsigned a;
        place(e, wide, lane_mode, lane_sel, l, w, s);
        a = (mop == MOP_UNIT) ? base + e * eb : (mop == MOP_STRIDE ? base + e * stride : base + idx[e]);
        if (is_store) begin
          for (int b = 0; b < eb; b++)
            mem_exp[a + b] = vrf_before[l][vreg * WPL + w][(s * ND) + b * 8 +: 8];
        end else begin
          logic [WB-1:0] got;
          got = vrf[l][vreg * WPL + w];
          for (int b = 0; b < eb; b++) begin
            checks++;
            if (got[(s * ND) + b * 8 +: 8] !== mb(a + b)) begin
              failures++;
              if (failures < 8) $display("FAIL t %0d load e %0d byte %0d", t, e, b);
            end
          end
        end
      end
      if (is_store)
        foreach (mem_exp[a]) begin
          checks++;
          if (mb(a) !== mem_exp[a]) begin
            failures++;
            if (failures < 8) $display("FAIL t %0d store addr %h", t, a);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
