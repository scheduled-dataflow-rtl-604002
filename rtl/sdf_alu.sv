// sdf_alu: the arithmetic unit of the Execution Pipeline.
//
// SDF uses one arithmetic unit per pipeline that performs every arithmetic
// operation (no separate multiply/divide unit), and every instruction takes one
// cycle. This unit is therefore purely combinational: add, subtract, multiply,
// divide, logic, set-less-than and shifts on 32-bit two's complement values.
// Operand a is the left register of the pair, b the right register (or the
// immediate). Division by zero returns all ones, and DIV rounds toward zero;
// both are this design's own choices, as is the set of logic and shift
// operations beyond ADD, SUB, MULT and DIV.
module sdf_alu
  import sdf_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_MUL:   y = a * b;
      ALU_DIV:   y = (b == '0) ? '1 : XLEN'($signed(a) / $signed(b));
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLT:   y = ($signed(a) < $signed(b)) ? XLEN'(1) : '0;
      ALU_SHL:   y = a << b[4:0];
      ALU_SHR:   y = a >> b[4:0];
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = '0;
    endcase
  end
endmodule
