// xpu_simd_alu: packed-SIMD integer ALU of one lane.
//
// The lane word of W = SC*D bits holds SC elements; the ALU applies the same operation
// to every element position s in parallel:
//   ALU_ADD  y = a + b        ALU_SUB  y = a - b
//   ALU_MUL  y = a * b        ALU_MACC y = a * b + c
// Results keep the low D bits (wrap-around two's complement arithmetic). In vector mode
// a, b and c are words of the source and destination registers (or a scalar copied to
// every position); in systolic mode a is one element of matrix A copied to every
// position, b is a row of matrix B from the inter-lane ring and c is the accumulator,
// so the SC positions are the SC processing elements of one array row.
// Purely combinational: the lane registers its inputs and the result.
// The set of operations is this implementation's integer subset; floating point is not
// provided.
module xpu_simd_alu
  import xpu_pkg::*;
#(
  parameter int unsigned SC_P = xpu_pkg::SC,
  parameter int unsigned D_P  = xpu_pkg::D
) (
  input  alu_op_e                op,
  input  logic [SC_P*D_P-1:0]    a,
  input  logic [SC_P*D_P-1:0]    b,
  input  logic [SC_P*D_P-1:0]    c,
  output logic [SC_P*D_P-1:0]    y
);

  always_comb begin
    for (int s = 0; s < SC_P; s++) begin
      logic [D_P-1:0] ea, eb, ec;
      ea = a[s*D_P +: D_P];
      eb = b[s*D_P +: D_P];
      ec = c[s*D_P +: D_P];
      unique case (op)
        ALU_ADD:  y[s*D_P +: D_P] = ea + eb;
        ALU_SUB:  y[s*D_P +: D_P] = ea - eb;
        ALU_MUL:  y[s*D_P +: D_P] = ea * eb;
        default:  y[s*D_P +: D_P] = ea * eb + ec;
      endcase
    end
  end

endmodule
