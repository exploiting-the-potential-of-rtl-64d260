// tb_xpu_simd_alu: checks every operation of the packed-SIMD ALU on random words,
// element by element, against arithmetic done here on 32-bit values.
module tb_xpu_simd_alu;
  import xpu_pkg::*;
  localparam int unsigned NS = SC, ND = D;

  alu_op_e          op;
  logic [NS*ND-1:0] a, b, c, y;
  int checks = 0, failures = 0;

  xpu_simd_alu dut (.op, .a, .b, .c, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      for (int s = 0; s < NS; s++) begin
        a[s*ND +: ND] = $urandom();
        b[s*ND +: ND] = (t < 8) ? 32'hffff_ffff : $urandom();
        c[s*ND +: ND] = $urandom();
      end
      op = alu_op_e'(t % 4);
      #1;
      for (int s = 0; s < NS; s++) begin
        logic [31:0] ea, eb, ec, ex;
        ea = a[s*ND +: ND]; eb = b[s*ND +: ND]; ec = c[s*ND +: ND];
        case (op)
          ALU_ADD: ex = ea + eb;
          ALU_SUB: ex = ea - eb;
          ALU_MUL: ex = ea * eb;
          default: ex = ea * eb + ec;
        endcase
        checks++;
        if (y[s*ND +: ND] !== ex) begin
          failures++;
          if (failures < 6) $display("FAIL op %0d subword %0d: %h expected %h", op, s, y[s*ND +: ND], ex);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
