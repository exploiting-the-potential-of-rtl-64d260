// tb_xpu_vrf_slice: random writes with random subword enables and random reads on the
// three ports of one register-file slice, checked against a shadow copy kept here.
// Checks the one-cycle read latency, that disabled subwords keep their value and that
// a read of the address being written returns the old word.
module tb_xpu_vrf_slice;
  localparam int unsigned NS = 4, ND = 32, WORDS = 1024, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0]               rd_en;
  logic [2:0][AW-1:0]       rd_addr;
  logic [2:0][NS*ND-1:0]    rd_data;
  logic                     wr_en;
  logic [AW-1:0]            wr_addr;
  logic [NS-1:0]            wr_be;
  logic [NS*ND-1:0]         wr_data;
  logic [NS*ND-1:0]         shadow [WORDS];
  int checks = 0, failures = 0;

  xpu_vrf_slice dut (.clk, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_be, .wr_data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0][NS*ND-1:0] expect_q;
    logic [2:0]            en_q;
    rd_en = '0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_be = '0; wr_data = '0;
    // initialise every word through the write port
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wr_be = '1;
      wr_data = {$urandom(), $urandom(), $urandom(), $urandom()};
      shadow[i] = wr_data;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr_en   = $urandom_range(0, 1);
      wr_addr = AW'($urandom_range(0, 15));          // small range: frequent collisions
      wr_be   = NS'($urandom());
      wr_data = {$urandom(), $urandom(), $urandom(), $urandom()};
      for (int p = 0; p < 3; p++) begin
        rd_en[p]   = $urandom_range(0, 1);
        rd_addr[p] = AW'($urandom_range(0, 15));
        expect_q[p] = shadow[rd_addr[p]];            // value before this cycle's write
      end
      en_q = rd_en;
      if (wr_en)
        for (int s = 0; s < NS; s++)
          if (wr_be[s]) shadow[wr_addr][s*ND +: ND] = wr_data[s*ND +: ND];
      @(posedge clk); #1;
      for (int p = 0; p < 3; p++)
        if (en_q[p]) begin
          checks++;
          if (rd_data[p] !== expect_q[p]) begin
            failures++;
            if (failures < 6) $display("FAIL port %0d t %0d: %h expected %h", p, t, rd_data[p], expect_q[p]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
