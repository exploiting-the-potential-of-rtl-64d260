// tb_xpu_interlane_net: injects tokens at random lanes with random hop counts and checks
// that each reaches the next lane (wrapping from the last to the first) one cycle later
// with its hop count raised by one, and that a token that has made LANES-1 hops is
// dropped.
module tb_xpu_interlane_net;
  localparam int unsigned L = 4, WB = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [L-1:0]           in_valid, out_valid;
  logic [L-1:0][15:0]     in_k, out_k;
  logic [L-1:0][3:0]      in_hops, out_hops;
  logic [L-1:0][WB-1:0]   in_data, out_data;
  int checks = 0, failures = 0;

  xpu_interlane_net dut (.clk, .rst_n, .in_valid, .in_k, .in_hops, .in_data,
                         .out_valid, .out_k, .out_hops, .out_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] v_q;
    logic [L-1:0][15:0] k_q;
    logic [L-1:0][3:0] h_q;
    logic [L-1:0][WB-1:0] d_q;
    in_valid = '0; in_k = '0; in_hops = '0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int i = 0; i < L; i++) begin
        in_valid[i] = $urandom_range(0, 1);
        in_k[i]     = 16'($urandom());
        in_hops[i]  = 4'($urandom_range(0, L - 1));
        in_data[i]  = {$urandom(), $urandom(), $urandom(), $urandom()};
      end
      v_q = in_valid; k_q = in_k; h_q = in_hops; d_q = in_data;
      @(posedge clk); #1;
      for (int i = 0; i < L; i++) begin
        int nx;
        bit ev;
        nx = (i + 1) % L;
        ev = v_q[i] && (h_q[i] < L - 1);
        checks++;
        if (out_valid[nx] !== ev) begin
          failures++; $display("FAIL valid lane %0d t %0d", nx, t);
        end else if (ev) begin
          checks++;
          if (out_k[nx] !== k_q[i] || out_hops[nx] !== h_q[i] + 1 || out_data[nx] !== d_q[i]) begin
            failures++; $display("FAIL token lane %0d t %0d", nx, t);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
