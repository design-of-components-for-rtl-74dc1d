// alu: 16-bit arithmetic/logic unit with the barrel shifter built in.
//
// Combinational. Operand a is the destination operand (register port D),
// operand b the source operand (register port S, immediate data or memory
// data). op selects add, subtract, AND, OR, XOR, increment, decrement, move,
// clear, compare, or one of the four barrel-shifter operations on a, shifted
// or rotated by shamt positions. Outputs are the result y, the carry/borrow
// flag c of the adder, the zero flag z of the result, and wb, which is low for
// operations whose result is not written back (compare, jump).
// The document names the ALU and lists the operations its example
// instructions need, and allows the barrel shifter to be placed inside the
// ALU; the operation set, encoding and flags here are this design's choice.
// Multiplication is not done here: the core uses the separate
// shift_add_mul unit for it, and the ALU returns 0 with wb low for OP_MUL.
module alu
  import gmp_pkg::*;
(
  input  alu_op_e            op,
  input  data_t              a,
  input  data_t              b,
  input  logic [SHIFT_W-1:0] shamt,
  output data_t              y,
  output logic               c,
  output logic               z,
  output logic               wb
);

  data_t        sh_y;
  logic [DATA_W:0] sum;

  barrel_shifter u_shift (
    .d       (a),
    .l_r     (op == OP_SHR || op == OP_ROR),
    .s_r     (op == OP_ROL || op == OP_ROR),
    .n_shift (shamt),
    .y       (sh_y)
  );

  always_comb begin
    sum = '0;
    y   = '0;
    wb  = 1'b1;
    unique case (op)
      OP_MOV: y = b;
      OP_ADD: begin sum = {1'b0, a} + {1'b0, b}; y = sum[DATA_W-1:0]; end
      OP_SUB: begin sum = {1'b0, a} - {1'b0, b}; y = sum[DATA_W-1:0]; end
      OP_CMP: begin sum = {1'b0, a} - {1'b0, b}; y = sum[DATA_W-1:0]; wb = 1'b0; end
      OP_AND: y = a & b;
      OP_OR:  y = a | b;
      OP_XOR: y = a ^ b;
      OP_INC: begin sum = {1'b0, a} + 1'b1; y = sum[DATA_W-1:0]; end
      OP_DEC: begin sum = {1'b0, a} - 1'b1; y = sum[DATA_W-1:0]; end
      OP_CLR: y = '0;
      OP_SHL, OP_SHR, OP_ROL, OP_ROR: y = sh_y;
      OP_JMP: begin y = b; wb = 1'b0; end
      default: begin y = '0; wb = 1'b0; end
    endcase
    c = sum[DATA_W];
    z = (y == '0);
  end

endmodule
