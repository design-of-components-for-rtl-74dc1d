// generic_cpu: the generic components wired into one microprogrammable core.
//
// Datapath: the byte/word register file feeds the ALU (with its built-in
// barrel shifter) on port S (source) and port D (destination); the result is
// written back to the register at address D or to memory. Control: the
// effective address calculator sequences every instruction through five
// stages (fetch instruction, fetch extension, add, fetch operand, execute),
// and an 8-input priority encoder picks the CPU state from the control and
// interrupt request pins.
//
// The instruction decoder and the micro-code ROM are specific to the
// processor being replaced, so they sit outside: `ir` is the instruction word
// (the memory data bus during stage 1, the instruction register afterwards)
// and `dec` must carry its decoded fields back combinationally.
//
// Memory bus: one word per access, mem_rdata valid in the cycle of mem_rd,
// writes on the rising edge with mem_wr. Addresses count words; the PC steps
// by WORD_STEP per fetched word.
//
// Requests: ctrl_req[7:0] go to the priority encoder, enabled by int_en;
// ctrl_req[7] is the reset request. The highest pending request is taken at
// the end of the execute stage: the PC is loaded from VEC_TABLE[code] and
// req_ack pulses with req_code. With RESET_ABORTS = 1 a reset request is
// taken at once, abandoning the instruction in progress without any write.
// A requester should drop its pin once acknowledged. The return address is
// not saved, as no stack is built.
//
// With LATCH_REQUESTS = 1 each rising edge on a request pin is stored in a
// pending latch, which the encoder sees instead of the pins; the latch is
// cleared when its request is acknowledged. A short pulse is then served
// once all higher-priority requests have been, and a pin held high is served
// only once. With LATCH_REQUESTS = 0 (the default) the encoder sees the pins.
//
// MUL multiplies the destination by the source with the shift-and-add
// multiplier: the execute stage is held (the instruction takes 6 + n clocks,
// n = index of the highest set multiplier bit + 1) and the low word of the
// product is written back; the high word is on prod_hi. Requests are taken
// only when the held execute stage ends, except an aborting reset request,
// which cancels the multiply. The carry flag reports a non-zero high word.
//
// The datapath arrangement, the five stages, the PC sources (next word,
// jump address, vector table, start address) and the reset behaviour come
// from the document; the bus timing, vector values, and the decoded-field
// interface are this design's choices.
module generic_cpu
  import gmp_pkg::*;
#(
  parameter addr_t RESET_ADDR = 16'h0000,
  parameter addr_t VEC_TABLE [8] = '{16'h0000, 16'h0100, 16'h0200, 16'h0300,
                                     16'h0400, 16'h0500, 16'h0600, 16'h0000},
  parameter addr_t WORD_STEP = 16'd1,
  parameter bit    RESET_ABORTS = 1'b1,
  parameter bit    LATCH_REQUESTS = 1'b0,
  parameter int unsigned RF_BLOCK_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // memory bus
  output addr_t      mem_addr,
  output logic       mem_rd,
  output logic       mem_wr,
  output data_t      mem_wdata,
  input  data_t      mem_rdata,
  // instruction decoder
  output data_t      ir,
  input  decoded_t   dec,
  // control and interrupt pins
  input  logic [7:0] ctrl_req,
  input  logic       int_en,
  output logic       req_ack,
  output logic [2:0] req_code,
  // status
  output addr_t      pc,
  output ea_state_e  state,
  output logic [2:0] stage,
  output logic       flag_c,
  output logic       flag_z,
  output logic       addr_reg_read,   // the address calculation reads a register
  output logic       addr_adding,     // the address adder is in use (stage 3)
  output data_t      prod_hi          // high word of the last product
);

  localparam int unsigned RAW = $clog2(RF_BLOCK_DEPTH) + 1;

  // ---------------- control ----------------
  logic       ea_mem_read, reg_read, reg_sel_rx, ir_load, pc_inc, addr_add, execute;
  addr_t      ea_mem_addr, ea;
  data_t      ext, operand;
  data_t      ir_q;
  logic [2:0] pe_a;
  logic       pe_eo, req, reset_req, take, abort_instr, hold;
  data_t      rf_s, rf_d;

  // Optional request latches: set on a rising pin edge, cleared on acknowledge.
  logic [7:0] req_prev, req_rise, req_pend, pe_in;

  assign req_rise = ctrl_req & ~req_prev;
  assign pe_in    = LATCH_REQUESTS ? (req_pend | req_rise) : ctrl_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_prev <= '0;
      req_pend <= '0;
    end else begin
      req_prev <= ctrl_req;
      req_pend <= (req_pend | req_rise) & ~(take ? (8'b1 << pe_a) : 8'b0);
    end
  end

  priority_encoder u_pe (
    .i  (pe_in),
    .ei (int_en),
    .a  (pe_a),
    .eo (pe_eo)
  );

  assign req       = int_en && !pe_eo;
  assign reset_req = req && (pe_a == 3'd7);
  assign abort_instr     = RESET_ABORTS && reset_req;
  assign take      = abort_instr || (req && execute && !hold);
  assign req_ack   = take;
  assign req_code  = pe_a;

  ea_calc u_ea (
    .clk        (clk),
    .rst_n      (rst_n),
    .restart    (abort_instr),
    .hold       (hold),
    .mode       (dec.mode),
    .pc         (pc),
    .mem_rdata  (mem_rdata),
    .reg_s      (rf_s),
    .state      (state),
    .stage      (stage),
    .mem_read   (ea_mem_read),
    .mem_addr   (ea_mem_addr),
    .reg_read   (reg_read),
    .reg_sel_rx (reg_sel_rx),
    .ir_load    (ir_load),
    .pc_inc     (pc_inc),
    .addr_add   (addr_add),
    .execute    (execute),
    .ext        (ext),
    .ea         (ea),
    .operand    (operand)
  );

  assign addr_reg_read = reg_read;
  assign addr_adding   = addr_add;

  assign ir = ir_load ? mem_rdata : ir_q;

  // ---------------- datapath ----------------
  logic  rf_word, rf_we;
  data_t src, alu_b, alu_y, result;
  logic  alu_c, alu_z, alu_wb, has_ea, wr_ok;

  // Addresses are always read as words; the instruction's byte/word mode
  // applies in the execute stage.
  assign rf_word = execute ? dec.word : 1'b1;

  reg_file #(.BLOCK_DEPTH(RF_BLOCK_DEPTH)) u_rf (
    .clk     (clk),
    .mode    (rf_word),
    .repl    (dec.repl),
    .adr_s   (reg_sel_rx ? dec.rx[RAW-1:0] : dec.rs[RAW-1:0]),
    .adr_d   (dec.rd[RAW-1:0]),
    .we      (rf_we),
    .data_in (result),
    .data_s  (rf_s),
    .data_d  (rf_d)
  );

  always_comb begin
    unique case (dec.mode)
      AM_REGISTER:  src = rf_s;
      AM_IMMEDIATE: src = ext;
      default:      src = operand;
    endcase
    if (dec.word)      alu_b = src;
    else if (dec.repl) alu_b = {src[7:0], src[7:0]};
    else               alu_b = {8'h00, src[7:0]};
  end

  // Multiply: the execute stage is held until the multiplier is done.
  logic        is_mul, mul_busy, mul_done;
  logic [31:0] mul_p;

  assign is_mul = (dec.op == OP_MUL);
  assign hold   = execute && is_mul && !mul_done;

  shift_add_mul u_mul (
    .clk   (clk),
    .rst_n (rst_n),
    .start (execute && is_mul && !mul_busy && !mul_done && !abort_instr),
    .cancel(abort_instr),
    .a     (rf_d),
    .b     (alu_b),
    .busy  (mul_busy),
    .done  (mul_done),
    .p     (mul_p)
  );

  assign result   = is_mul ? mul_p[15:0] : alu_y;
  assign prod_hi  = mul_p[31:16];

  alu u_alu (
    .op    (dec.op),
    .a     (rf_d),
    .b     (alu_b),
    .shamt (dec.shamt),
    .y     (alu_y),
    .c     (alu_c),
    .z     (alu_z),
    .wb    (alu_wb)
  );

  assign has_ea = (dec.mode != AM_REGISTER) && (dec.mode != AM_IMMEDIATE);
  assign wr_ok  = execute && !hold && (is_mul || alu_wb) && !abort_instr;
  assign rf_we  = wr_ok && !(dec.dst_mem && has_ea);
  assign mem_wr = wr_ok && dec.dst_mem && has_ea;
  assign mem_wdata = result;
  assign mem_rd   = ea_mem_read;
  assign mem_addr = execute ? ea : ea_mem_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= RESET_ADDR;
      ir_q   <= '0;
      flag_c <= 1'b0;
      flag_z <= 1'b0;
    end else begin
      if (ir_load) ir_q <= mem_rdata;
      if (take)
        pc <= (pe_a == 3'd7) ? RESET_ADDR : VEC_TABLE[pe_a];
      else if (execute && dec.op == OP_JMP)
        pc <= (dec.mode == AM_IMMEDIATE) ? ext : ea;
      else if (pc_inc)
        pc <= pc + WORD_STEP;
      if (execute && !hold && !abort_instr && dec.op != OP_JMP) begin
        flag_c <= is_mul ? (mul_p[31:16] != '0) : alu_c;
        flag_z <= is_mul ? (mul_p[15:0] == '0) : alu_z;
      end
    end
  end

endmodule
