// xpu_vrf_slice: the part of the vector register file that lives in one lane.
//
// Each of the NVREG vector registers holds MVL bits; a lane keeps MVL/LANES of them as
// WPL = MVL/(LANES*W) words of W bits. Word address = vreg*WPL + word. The slice has
// three synchronous read ports (data appears the cycle after the address) and one write
// port with a per-subword enable, so one word can be read for each of the two sources
// and the destination/accumulator of an operation while another word is written.
// Three read ports and one write port are this implementation's choice; a read of the
// address being written in the same cycle returns the old contents.
// The storage is not reset: software loads a register before reading it.
module xpu_vrf_slice #(
  parameter int unsigned SC_P   = xpu_pkg::SC,
  parameter int unsigned D_P    = xpu_pkg::D,
  parameter int unsigned WORDS  = xpu_pkg::NVREG * (xpu_pkg::MVL / (xpu_pkg::LANES * xpu_pkg::W)),
  parameter int unsigned NRD    = 3,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned WB    = SC_P * D_P
) (
  input  logic                     clk,
  input  logic [NRD-1:0]           rd_en,
  input  logic [NRD-1:0][AW-1:0]   rd_addr,
  output logic [NRD-1:0][WB-1:0]   rd_data,
  input  logic                     wr_en,
  input  logic [AW-1:0]            wr_addr,
  input  logic [SC_P-1:0]          wr_be,    // one enable per D-bit subword
  input  logic [WB-1:0]            wr_data
);

  logic [WB-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NRD; p++)
      if (rd_en[p]) rd_data[p] <= mem[rd_addr[p]];
  end

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int s = 0; s < SC_P; s++)
        if (wr_be[s]) mem[wr_addr][s*D_P +: D_P] <= wr_data[s*D_P +: D_P];
  end

endmodule
