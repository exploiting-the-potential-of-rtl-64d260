// xpu_interlane_net: inter-lane ring that carries rows of matrix B in systolic mode.
//
// Every cycle each lane presents the token it consumed (its own row of B when it is the
// source, or the token it received). The network registers the token for the next lane,
// lane (i+1) mod LANES, so a row moves one lane per cycle. The hop count tells how many
// lanes after the source have already seen the row; after LANES-1 hops every lane has
// used it and the token is dropped instead of coming back to its source. The wrap from
// the last lane to the first lets any lane act as the source, which is how the design
// spreads matrix B over the register slices of all lanes (the first lane is the source
// for the first rows, then the second, and so on, the lane before the source acting as
// the sink). One register stage per hop is this implementation's choice.
module xpu_interlane_net #(
  parameter int unsigned LANES_P = xpu_pkg::LANES,
  parameter int unsigned WB      = xpu_pkg::W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [LANES_P-1:0]            in_valid,
  input  logic [LANES_P-1:0][15:0]      in_k,
  input  logic [LANES_P-1:0][3:0]       in_hops,
  input  logic [LANES_P-1:0][WB-1:0]    in_data,
  output logic [LANES_P-1:0]            out_valid,  // out_* [i] goes to lane i
  output logic [LANES_P-1:0][15:0]      out_k,
  output logic [LANES_P-1:0][3:0]       out_hops,
  output logic [LANES_P-1:0][WB-1:0]    out_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_k     <= '0;
      out_hops  <= '0;
      out_data  <= '0;
    end else begin
      for (int i = 0; i < LANES_P; i++) begin
        automatic int unsigned nx = (i + 1) % LANES_P;
        out_valid[nx] <= in_valid[i] && (32'(in_hops[i]) < LANES_P - 1);
        out_k[nx]     <= in_k[i];
        out_hops[nx]  <= in_hops[i] + 4'd1;
        out_data[nx]  <= in_data[i];
      end
    end
  end

endmodule
