// tb_xpu_mem: behavioural memory for the testbenches (not part of the design).
//
// Models the memory hierarchy behind the vector memory unit as a flat array of W-bit
// lines. A request is accepted when mem_req_ready is high (ready drops at random when
// STALLS = 1), and one response follows 1..MAX_LAT cycles later: read data for a read,
// an acknowledge for a write (the write is applied under its byte strobes). Testbenches
// fill and inspect `lines` directly through the hierarchy.
module tb_xpu_mem #(
  parameter int unsigned WB      = 128,
  parameter int unsigned LINES   = 65536,
  parameter int unsigned MAX_LAT = 3,
  parameter bit          STALLS  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [31:0]       req_addr,
  input  logic [WB-1:0]     req_wdata,
  input  logic [WB/8-1:0]   req_wstrb,
  output logic              rsp_valid,
  output logic [WB-1:0]     rsp_rdata
);
  localparam int unsigned LB = $clog2(WB / 8);

  logic [WB-1:0] lines [LINES];

  logic          pend;
  int unsigned   delay;
  logic [WB-1:0] pend_data;
  logic          rdy_q;

  assign req_ready = rdy_q && !pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend      <= 1'b0;
      delay     <= 0;
      pend_data <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      rdy_q     <= 1'b1;
    end else begin
      rdy_q     <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
      rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        automatic int unsigned ln = (req_addr >> LB) % LINES;
        pend      <= 1'b1;
        delay     <= $urandom_range(0, MAX_LAT - 1);
        pend_data <= lines[ln];
        if (req_we)
          for (int b = 0; b < WB / 8; b++)
            if (req_wstrb[b]) lines[ln][b*8 +: 8] <= req_wdata[b*8 +: 8];
      end else if (pend) begin
        if (delay == 0) begin
          pend      <= 1'b0;
          rsp_valid <= 1'b1;
          rsp_rdata <= pend_data;
        end else begin
          delay <= delay - 1;
        end
      end
    end
  end

endmodule
