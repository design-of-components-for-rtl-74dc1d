// tb_generic_cpu: end-to-end test of the generic core.
//
// The testbench supplies a word-addressed memory (read in the same cycle,
// written on the clock edge) and plays the processor-specific instruction
// decoder: the low byte of an instruction word indexes a table of decoded
// fields, built together with the program. An instruction-level reference
// model executes the same program; at every execute stage the core's register
// or memory write, its flags and the fetch addresses are compared with the
// model, and each instruction must take exactly five clocks.
//
// The program follows the event sequence "ADD CX,[BX]; ROL CX" with a reset
// request arriving during the rotate, and around it exercises all eight
// addressing modes, byte and word mode, byte replication, every ALU and
// shifter operation, a memory destination, absolute and relative jumps,
// interrupts taken at an instruction boundary, priority masking between two
// simultaneous requests, requests held off while int_en is low, multiplies
// that hold the execute stage (with the clock count checked), and the
// reset request aborting an instruction. Each of these is counted and one
// that never happens is a failure.
module tb_generic_cpu;
  import gmp_pkg::*;

  localparam addr_t VEC [8] = '{16'h0000, 16'h0100, 16'h0200, 16'h0300,
                                16'h0400, 16'h0500, 16'h0600, 16'h0000};

  logic clk = 0, rst_n = 0;
  addr_t mem_addr, pc;
  logic mem_rd, mem_wr;
  data_t mem_wdata, mem_rdata, ir;
  decoded_t dec;
  logic [7:0] ctrl_req = '0;
  logic int_en = 1, req_ack;
  logic [2:0] req_code;
  ea_state_e state;
  logic [2:0] stage;
  logic flag_c, flag_z, addr_reg_read, addr_adding;
  data_t prod_hi;

  generic_cpu dut (.*);

  always #5 clk = ~clk;

  // ---------------- memory and decoder ----------------
  data_t    mem [1024];
  decoded_t tab [256];
  int       ntab = 0;

  assign mem_rdata = mem[mem_addr[9:0]];
  always_ff @(posedge clk) if (mem_wr) mem[mem_addr[9:0]] <= mem_wdata;
  assign dec = tab[ir[7:0]];

  // ---------------- program builder ----------------
  int unsigned apc;   // assembly address

  function automatic bit has_ext(addr_mode_e m);
    return m inside {AM_IMMEDIATE, AM_DIRECT, AM_INDEXED, AM_BASE, AM_RELATIVE};
  endfunction

  function automatic void emit(addr_mode_e m, alu_op_e op, int rd, int rs = 0, data_t d16 = 0,
                               bit word = 1, bit repl = 0, int shamt = 0, int rx = 0,
                               bit dst_mem = 0);
    decoded_t d;
    d.mode = m; d.op = op; d.rd = 4'(rd); d.rs = 4'(rs); d.rx = 4'(rx);
    d.shamt = 4'(shamt); d.word = word; d.repl = repl; d.dst_mem = dst_mem;
    tab[ntab] = d;
    mem[apc] = 16'(ntab) | 16'hC300;   // opcode bits above the index are ignored
    ntab++; apc++;
    if (has_ext(m)) begin mem[apc] = d16; apc++; end
  endfunction

  // ---------------- reference model ----------------
  data_t  mregs [16];
  data_t  mmem  [1024];
  addr_t  mpc;
  logic   mc, mz;

  function automatic data_t fmt(data_t v, bit word, bit repl);
    if (word) return v;
    return repl ? {v[7:0], v[7:0]} : {8'h00, v[7:0]};
  endfunction

  // counters of mechanisms
  int n_mode [8];
  int n_op [16];
  int n_byte = 0, n_repl = 0, n_word = 0, n_memdst = 0, n_jump = 0;
  int n_hold = 0, n_mul_clk = 0;
  int n_irq = 0, n_mask = 0, n_held = 0, n_abort = 0, n_eaadd = 0;
  int checks = 0, failures = 0;

  task automatic fail(string s);
    failures++;
    $display("FAIL t=%0t pc=%h: %s", $time, mpc, s);
  endtask

  // ---------------- checker ----------------
  int     last_exec = -1, cyc = 0;
  bit     expect_fetch = 1;
  bit     abort_req = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      #1;
      if (addr_adding) n_eaadd++;
      if (state == ST_FETCH_INST && expect_fetch) begin
        checks++;
        if (mem_addr !== mpc || !mem_rd) fail($sformatf("fetch at %h, model %h", mem_addr, mpc));
        expect_fetch = 0;
      end
      if (req_ack && req_code == 3'd7) begin
        // reset request abandons the instruction in flight
        checks++;
        if (req_code != 3'd7 || mem_wr || dut.rf_we) fail("abort with a write or wrong code");
        n_abort++;
        mpc = 16'h0000;
        expect_fetch = 1;
        last_exec = -1;
      end else if (state == ST_EXECUTE && dut.hold) begin
        n_hold++;
        checks++;
        if (req_ack || dut.rf_we || mem_wr) fail("acknowledge or write while the execute stage is held");
      end else if (state == ST_EXECUTE) begin
        decoded_t d;
        addr_t  p, npc, ea;
        data_t  d16, src, a, y;
        logic   c, wb;
        int unsigned sum;
        logic [31:0] t;
        int     expc, msb;
        d = dec;
        p = mpc;
        npc = p + 1;
        d16 = mmem[10'(p + 1)];
        if (has_ext(d.mode)) npc = p + 2;
        case (d.mode)
          AM_INDIRECT:      ea = mregs[d.rs];
          AM_DIRECT:        ea = d16;
          AM_INDEXED, AM_BASE: ea = mregs[d.rs] + d16;
          AM_RELATIVE:      ea = npc + d16;
          AM_BASE_INDEXED:  ea = mregs[d.rs] + mregs[d.rx];
          default:          ea = '0;
        endcase
        case (d.mode)
          AM_REGISTER:  src = fmt(mregs[d.rs], d.word, d.repl);
          AM_IMMEDIATE: src = d16;
          default:      src = mmem[ea[9:0]];
        endcase
        src = fmt(src, d.word, d.repl);
        a = fmt(mregs[d.rd], d.word, d.repl);
        c = 0; wb = 1;
        case (d.op)
          OP_MOV: y = src;
          OP_ADD: begin sum = a + src; y = 16'(sum); c = sum[16]; end
          OP_SUB: begin y = a - src; c = a < src; end
          OP_CMP: begin y = a - src; c = a < src; wb = 0; end
          OP_AND: y = a & src;
          OP_OR:  y = a | src;
          OP_XOR: y = a ^ src;
          OP_INC: begin y = a + 1; c = (a == 16'hFFFF); end
          OP_DEC: begin y = a - 1; c = (a == 0); end
          OP_CLR: y = 0;
          OP_SHL: y = a << d.shamt;
          OP_SHR: y = a >> d.shamt;
          OP_ROL: begin t = {a, a} << d.shamt; y = t[31:16]; end
          OP_ROR: y = 16'({a, a} >> d.shamt);
          OP_JMP: begin y = src; wb = 0; end
          OP_MUL: begin t = 32'(a) * 32'(src); y = t[15:0]; c = (t[31:16] != 0); end
          default: begin y = 0; wb = 0; end
        endcase
        // the instruction must take five clocks; a multiply adds
        // max(1, highest set multiplier bit + 1) + 1 held clocks
        expc = 5;
        if (d.op == OP_MUL) begin
          msb = -1;
          for (int k = 0; k < 16; k++) if (src[k]) msb = k;
          expc = 5 + ((msb < 0) ? 1 : msb + 1) + 1;
          n_mul_clk = expc;
        end
        if (last_exec >= 0) begin
          checks++;
          if (cyc - last_exec != expc) fail($sformatf("instruction took %0d clocks, expected %0d", cyc - last_exec, expc));
        end
        last_exec = cyc;
        // write checks
        checks++;
        if (wb && d.dst_mem && !(d.mode inside {AM_REGISTER, AM_IMMEDIATE})) begin
          if (!mem_wr || mem_addr !== ea || mem_wdata !== y || dut.rf_we)
            fail($sformatf("mem write: wr=%b addr=%h data=%h, model %h <- %h", mem_wr, mem_addr, mem_wdata, ea, y));
          mmem[ea[9:0]] = y;
          n_memdst++;
        end else if (wb) begin
          if (!dut.rf_we || dut.result !== y || mem_wr)
            fail($sformatf("reg write r%0d: we=%b data=%h, model %h", d.rd, dut.rf_we, dut.result, y));
          if (d.word) mregs[d.rd] = y; else mregs[d.rd][7:0] = y[7:0];
        end else begin
          if (dut.rf_we || mem_wr) fail("write by an instruction that has none");
        end
        if (d.op == OP_MUL) begin
          checks++;
          if (prod_hi !== t[31:16]) fail($sformatf("product high word %h, model %h", prod_hi, t[31:16]));
        end
        if (d.op != OP_JMP) begin mc = c; mz = (y == 0); end
        n_mode[d.mode]++;
        n_op[d.op]++;
        if (d.word) n_word++; else n_byte++;
        if (!d.word && d.repl) n_repl++;
        if (d.op == OP_JMP) begin npc = (d.mode == AM_IMMEDIATE) ? d16 : ea; n_jump++; end
        if (req_ack) begin
          checks++;
          npc = VEC[req_code];
          n_irq++;
        end
        mpc = npc;
        expect_fetch = 1;
        @(posedge clk);
        #1;
        if (d.op != OP_JMP) begin
          checks++;
          if (flag_c !== mc || flag_z !== mz) fail($sformatf("flags c=%b z=%b, model %b %b", flag_c, flag_z, mc, mz));
        end
      end
    end
  end

  // ---------------- program ----------------
  localparam int R_CX = 1, R_DX = 2, R_BX = 3;
  int unsigned L_LOOP, L_SKIP, L_ABORT;

  task automatic build();
    apc = 0;
    emit(AM_IMMEDIATE, OP_MOV, R_BX, 0, 16'h0040);           // BX = 0040
    emit(AM_IMMEDIATE, OP_MOV, R_CX, 0, 16'h1234);           // CX = 1234
    emit(AM_IMMEDIATE, OP_MOV, 6, 0, 16'h0002);              // R6 = 2
    emit(AM_IMMEDIATE, OP_MOV, 8, 0, 16'h7788);
    emit(AM_IMMEDIATE, OP_MOV, 9, 0, 16'h5566);
    emit(AM_IMMEDIATE, OP_MOV, 10, 0, 16'hFFFF);
    emit(AM_IMMEDIATE, OP_MOV, 12, 0, 16'h0000);
    emit(AM_IMMEDIATE, OP_MOV, 13, 0, 16'h0000);
    emit(AM_IMMEDIATE, OP_MOV, 7, 0, 16'h8000);
    emit(AM_IMMEDIATE, OP_MOV, 11, 0, 16'h0000);
    emit(AM_INDIRECT,  OP_ADD, R_CX, R_BX);                  // ADD CX,[BX]
    emit(AM_REGISTER,  OP_ROL, R_CX, 0, 0, 1, 0, 1);         // ROL CX,1
    emit(AM_DIRECT,    OP_MOV, R_DX, 0, 16'h0041);           // DX = [0041]
    emit(AM_INDEXED,   OP_ADD, R_DX, R_BX, 16'h0010);        // DX += [BX+10]
    emit(AM_BASE,      OP_SUB, R_DX, R_BX, 16'h0011);        // DX -= [11+BX]
    emit(AM_RELATIVE,  OP_MOV, 4, 0, 16'h0003);              // R4 = [PC+3]
    emit(AM_BASE_INDEXED, OP_MOV, 5, R_BX, 0, 1, 0, 0, 6);   // R5 = [BX+R6]
    emit(AM_IMMEDIATE, OP_MOV, 8, 0, 16'h00AB, 0);           // byte: R8.lo = AB
    emit(AM_REGISTER,  OP_MOV, 9, 8, 0, 0, 1);               // byte, replicate
    emit(AM_IMMEDIATE, OP_ADD, 9, 0, 16'h0060, 0);           // byte add with carry
    emit(AM_REGISTER,  OP_XOR, 10, 9, 0, 0, 1);              // byte xor, replicated
    emit(AM_REGISTER,  OP_AND, R_CX, R_DX);
    emit(AM_REGISTER,  OP_OR,  R_CX, 5);
    emit(AM_REGISTER,  OP_INC, 7, 7);
    emit(AM_REGISTER,  OP_DEC, 7, 7);
    emit(AM_REGISTER,  OP_CMP, R_CX, R_DX);
    emit(AM_REGISTER,  OP_CLR, 11, 0);
    emit(AM_REGISTER,  OP_SHL, 5, 0, 0, 1, 0, 3);
    emit(AM_REGISTER,  OP_SHR, 5, 0, 0, 1, 0, 7);
    emit(AM_REGISTER,  OP_ROR, 5, 0, 0, 1, 0, 5);
    emit(AM_REGISTER,  OP_MUL, 9, R_DX);                     // multiply registers
    emit(AM_IMMEDIATE, OP_MUL, 10, 0, 16'h8001);             // longest multiply
    emit(AM_IMMEDIATE, OP_MUL, 6, 0, 16'h0000);              // shortest multiply
    emit(AM_REGISTER,  OP_MOV, 14, 5);
    emit(AM_REGISTER,  OP_MOV, 15, 14);
    emit(AM_INDIRECT,  OP_ADD, R_CX, R_BX, 0, 1, 0, 0, 0, 1); // [BX] += CX
    emit(AM_DIRECT,    OP_SUB, R_DX, 0, 16'h0060, 1, 0, 0, 0, 1); // [0060] -= DX
    emit(AM_INDIRECT,  OP_MOV, 12, R_BX);                    // R12 = [BX]
    L_SKIP = apc + 4;
    emit(AM_IMMEDIATE, OP_JMP, 0, 0, 16'(L_SKIP));           // jump over one
    emit(AM_IMMEDIATE, OP_MOV, R_CX, 0, 16'hDEAD);           // skipped
    emit(AM_RELATIVE,  OP_JMP, 0, 0, 16'h0002);              // to PC+2
    emit(AM_IMMEDIATE, OP_MOV, R_CX, 0, 16'hBEEF);           // skipped
    emit(AM_IMMEDIATE, OP_MOV, R_DX, 0, 16'h2222);           // target
    L_ABORT = apc;
    emit(AM_REGISTER,  OP_ROL, R_CX, 0, 0, 1, 0, 2);         // reset arrives here
    L_LOOP = apc;
    emit(AM_REGISTER,  OP_INC, 13, 13);
    emit(AM_IMMEDIATE, OP_MUL, 15, 0, 16'h0FFF);              // requests may arrive here
    emit(AM_IMMEDIATE, OP_JMP, 0, 0, 16'(L_LOOP));
    // interrupt handlers: count in R11 / R12 and return to the loop
    apc = VEC[2];
    emit(AM_REGISTER,  OP_INC, 11, 11);
    emit(AM_IMMEDIATE, OP_JMP, 0, 0, 16'(L_LOOP));
    apc = VEC[5];
    emit(AM_REGISTER,  OP_INC, 12, 12);
    emit(AM_IMMEDIATE, OP_JMP, 0, 0, 16'(L_LOOP));
    // data
    mem[16'h40] = 16'h0101; mem[16'h41] = 16'h1111; mem[16'h42] = 16'h5A5A;
    mem[16'h50] = 16'h0202; mem[16'h51] = 16'h0003; mem[16'h60] = 16'h9000;
  endtask

  task automatic wait_instr(int n);
    repeat (n) @(posedge clk iff state == ST_EXECUTE);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1024; k++) mem[k] = 16'(k);
    build();
    for (int k = 0; k < 1024; k++) mmem[k] = mem[k];
    for (int k = 0; k < 16; k++) mregs[k] = 16'h0000;
    mpc = 0; mc = 0; mz = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // straight-line part, reaching the loop
    @(posedge clk iff (state == ST_EXECUTE && pc == 16'(L_LOOP + 1)));
    // interrupt taken at an instruction boundary
    @(negedge clk) ctrl_req[2] = 1;
    @(posedge clk iff req_ack);
    checks++; if (req_code != 3'd2) fail("code of request 2");
    @(negedge clk) ctrl_req = '0;
    wait_instr(6);
    // two requests at once: the higher one wins
    @(negedge clk) ctrl_req = 8'b0010_0100;
    @(posedge clk iff req_ack);
    checks++; if (req_code != 3'd5) fail("priority of request 5 over 2"); else n_mask++;
    @(negedge clk) ctrl_req = '0;
    wait_instr(6);
    // requests held off while disabled
    @(negedge clk) begin int_en = 0; ctrl_req[3] = 1; end
    repeat (30) begin
      @(negedge clk); #2;
      checks++; if (req_ack) fail("request taken while disabled"); else n_held++;
    end
    @(negedge clk) begin ctrl_req = '0; int_en = 1; end
    wait_instr(3);
    // reset request: restarts the program from the start address
    @(negedge clk) ctrl_req[7] = 1;
    @(negedge clk) ctrl_req[7] = 0;
    // the program reruns; catch the ROL in its execute stage
    @(negedge clk iff (state == ST_EXECUTE && ir[7:0] == 8'(tab_index_of(L_ABORT))));
    ctrl_req[7] = 1;   // a reset request during the rotate
    @(negedge clk) ctrl_req[7] = 0;
    @(posedge clk iff (state == ST_EXECUTE && pc == 16'(L_LOOP + 1)));
    wait_instr(2);

    checks++;
    for (int m = 0; m < 8; m++) if (n_mode[m] == 0) fail($sformatf("mode %03b never used", m));
    for (int o = 0; o <= 15; o++) if (n_op[o] == 0) fail($sformatf("op %0d never used", o));
    if (n_byte == 0 || n_word == 0 || n_repl == 0) fail("byte/word/replicate not all seen");
    if (n_memdst == 0) fail("no memory destination");
    if (n_jump == 0)   fail("no jump");
    if (n_irq < 2)     fail("interrupts not taken");
    if (n_mask == 0)   fail("no priority masking");
    if (n_held == 0)   fail("no disabled request");
    if (n_abort < 2)   fail("reset request did not abort");
    if (n_eaadd == 0)  fail("address adder never used");
    if (n_hold == 0)   fail("execute stage never held by a multiply");
    $display("modes %p ops %p", n_mode, n_op);
    $display("held execute clocks=%0d", n_hold);
    $display("byte=%0d word=%0d repl=%0d memdst=%0d jump=%0d irq=%0d mask=%0d held=%0d abort=%0d",
             n_byte, n_word, n_repl, n_memdst, n_jump, n_irq, n_mask, n_held, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tab_index_of(int unsigned addr);
    return int'(mem[addr][7:0]);
  endfunction
endmodule
