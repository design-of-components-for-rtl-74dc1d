// reg_file: generic byte/word register file built from four dual-port memories.
//
// The file is split into a lower memory block (register addresses with the
// top address bit 0) and an upper memory block (top bit 1). Each block holds
// an MSB memory (bits 15-8) and an LSB memory (bits 7-0), each a dual-port
// BLOCK_DEPTH x 8 array. With the default BLOCK_DEPTH = 8 that gives
// 16 word registers, 0-7 in the lower block and 8-15 in the upper block.
//
// Word mode (mode = 1): both halves of the addressed block are read or
//   written, so a register is one 16-bit word.
// Byte mode (mode = 0): only the LSB memories are used, giving 16 byte
//   registers that alias the low bytes of the word registers. The MSB memories
//   are not written. The byte read is placed in bits 7-0; bits 15-8 are zero
//   (repl = 0) or a copy of the byte (repl = 1).
//
// Ports: two read ports, S (adr_s -> data_s) and D (adr_d -> data_d), and one
// write port that writes data_in to adr_d at the rising clock edge when
// we = 1. Reads are combinational. Double and quadruple words are handled by
// issuing two or four word accesses, which is left to the sequencer.
// The block structure, the byte/word aliasing and the zero/replicate choice
// follow the document; the read timing and the repl pin are this design's.
module reg_file #(
  parameter int unsigned BLOCK_DEPTH = 8,
  localparam int unsigned RAW = $clog2(BLOCK_DEPTH) + 1
) (
  input  logic           clk,
  input  logic           mode,     // 1 = word, 0 = byte
  input  logic           repl,     // byte mode: 1 = replicate, 0 = zero-fill
  input  logic [RAW-1:0] adr_s,
  input  logic [RAW-1:0] adr_d,
  input  logic           we,
  input  logic [15:0]    data_in,
  output logic [15:0]    data_s,
  output logic [15:0]    data_d
);

  localparam int unsigned RW = RAW - 1;   // row address inside a block

  // [block][half]: block 0 = lower, 1 = upper; half 0 = LSB, 1 = MSB
  logic [7:0] ds [2][2];
  logic [7:0] dd [2][2];

  for (genvar b = 0; b < 2; b++) begin : g_block
    for (genvar h = 0; h < 2; h++) begin : g_half
      logic wr;
      // MSB memories are inactive in byte mode
      assign wr = we && (adr_d[RAW-1] == 1'(b)) && (h == 0 || mode);
      dp_ram #(.DEPTH(BLOCK_DEPTH), .WIDTH(8)) u_mem (
        .clk    (clk),
        .we     (wr),
        .addr_s (adr_s[RW-1:0]),
        .addr_d (adr_d[RW-1:0]),
        .din    (data_in[h*8 +: 8]),
        .dout_s (ds[b][h]),
        .dout_d (dd[b][h])
      );
    end
  end

  function automatic logic [15:0] form(input logic [7:0] lsb, input logic [7:0] msb,
                                       input logic m, input logic r);
    if (m)      return {msb, lsb};
    else if (r) return {lsb, lsb};
    else        return {8'h00, lsb};
  endfunction

  always_comb begin
    data_s = form(ds[adr_s[RAW-1]][0], ds[adr_s[RAW-1]][1], mode, repl);
    data_d = form(dd[adr_d[RAW-1]][0], dd[adr_d[RAW-1]][1], mode, repl);
  end

endmodule
