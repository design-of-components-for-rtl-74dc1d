// gmp_pkg: types and constants shared by the generic microprocessor components.
//
// The data, address and instruction busses are 16 bits wide and the shift
// count is 4 bits, as in the common package of the shifter model this design
// follows. The eight addressing-mode codes are the ones of the effective
// address table (register 000 ... base indexed 111). The ALU operation codes,
// the execution-state encoding and the layout of the decoded-instruction
// struct are this design's own choices.
package gmp_pkg;

  localparam int unsigned DATA_W  = 16;
  localparam int unsigned ADDR_W  = 16;
  localparam int unsigned SHIFT_W = 4;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [3:0]        reg_addr_t;

  // Addressing modes (3-bit "mode" field of the instruction).
  typedef enum logic [2:0] {
    AM_REGISTER     = 3'b000,  // EA = Rn (operand is the register)
    AM_INDIRECT     = 3'b001,  // EA = [Rn]
    AM_IMMEDIATE    = 3'b010,  // data = D16
    AM_DIRECT       = 3'b011,  // EA = D16
    AM_INDEXED      = 3'b100,  // EA = [Rn] + D16
    AM_BASE         = 3'b101,  // EA = D16 + [Rn]
    AM_RELATIVE     = 3'b110,  // EA = PC + D16
    AM_BASE_INDEXED = 3'b111   // EA = [Rn1] + [Rn2]
  } addr_mode_e;

  // States of the effective address FSM.
  typedef enum logic [2:0] {
    ST_FETCH_INST  = 3'd0,
    ST_FETCH_EXT   = 3'd1,   // fetch address / displacement / immediate / index
    ST_SKIP        = 3'd2,
    ST_ADD         = 3'd3,
    ST_FETCH_OPND  = 3'd4,
    ST_EXECUTE     = 3'd5
  } ea_state_e;

  // ALU and shifter operations.
  typedef enum logic [3:0] {
    OP_MOV = 4'd0,   // result = src
    OP_ADD = 4'd1,   // result = dst + src
    OP_SUB = 4'd2,   // result = dst - src
    OP_AND = 4'd3,
    OP_OR  = 4'd4,
    OP_XOR = 4'd5,
    OP_INC = 4'd6,   // result = dst + 1
    OP_DEC = 4'd7,   // result = dst - 1
    OP_CLR = 4'd8,   // result = 0
    OP_CMP = 4'd9,   // flags of dst - src, no write back
    OP_SHL = 4'd10,  // barrel shifter: shift left  dst by shamt
    OP_SHR = 4'd11,  // barrel shifter: shift right dst by shamt
    OP_ROL = 4'd12,  // barrel shifter: rotate left
    OP_ROR = 4'd13,  // barrel shifter: rotate right
    OP_JMP = 4'd14,  // PC = EA (or immediate), no write back
    OP_MUL = 4'd15   // shift-and-add multiplier: result = low word of dst * src
  } alu_op_e;

  // Fields the (processor-specific) instruction decoder hands to the
  // execution control.
  typedef struct packed {
    addr_mode_e  mode;      // addressing mode
    reg_addr_t   rs;        // Rn / Rn1: source or pointer register
    reg_addr_t   rx;        // Rn2: index register of base-indexed mode
    reg_addr_t   rd;        // destination register (also read on port D)
    alu_op_e     op;        // operation
    logic [SHIFT_W-1:0] shamt;  // shift / rotate count
    logic        word;      // 1 = word mode, 0 = byte mode
    logic        repl;      // byte mode: replicate byte into the upper half
    logic        dst_mem;   // write the result to memory at EA instead of rd
  } decoded_t;

endpackage
