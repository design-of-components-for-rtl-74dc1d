// tb_mode_examples: the addressing-mode examples of 8-bit and 16-bit
// processors (8085, 6800, Z80, 8051, 8086, Z8002, 8048, 8031, Z8000, 8748,
// 8751, 8035) run on the generic core, one instruction each, in the order of
// the document's table of addressing-mode examples.
//
// Register names are mapped onto the 16 registers as follows: A/AX -> R0,
// B/BX -> R1 (8-bit B) or R3 (BX), C/CX -> R2, X (6800 index) -> R3,
// H,L pair -> R4, R0..R15 of the Z8000 family -> R0..R15 directly, and the
// 8031 R3 -> R3. Byte instructions use the register file's byte mode. The
// testbench plays memory and decoder as in the end-to-end test, keeps an
// instruction-level reference model, and for each instruction also checks
// the state of each of the five stages against the mode (Skip where the
// table has Skip, the address add where it computes EA, the operand fetch
// where it fetches @EA).
module tb_mode_examples;
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
  data_t    mem [32768];
  decoded_t tab [256];
  int       ntab = 0;

  assign mem_rdata = mem[mem_addr[14:0]];
  always_ff @(posedge clk) if (mem_wr) mem[mem_addr[14:0]] <= mem_wdata;
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
  data_t  mmem  [32768];
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
        d16 = mmem[15'(p + 1)];
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
          default:      src = mmem[ea[14:0]];
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
          mmem[ea[14:0]] = y;
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
  // one row: the instruction and the state expected in stages 2, 3, 4
  ea_state_e exp_st [256][3];
  int nrows = 0;

  function automatic void row(addr_mode_e m, alu_op_e op, int rd, int rs = 0, data_t d16 = 0,
                              bit word = 1, int rx = 0);
    exp_st[ntab][0] = (m[2:1] == 2'b00) ? ST_SKIP : ST_FETCH_EXT;
    exp_st[ntab][1] = m[2] ? ST_ADD : ST_SKIP;
    exp_st[ntab][2] = (m inside {AM_REGISTER, AM_IMMEDIATE}) ? ST_SKIP : ST_FETCH_OPND;
    emit(m, op, rd, rs, d16, word, 0, 0, rx);
    nrows++;
  endfunction

  int unsigned L_END;

  task automatic build();
    apc = 0;
    // initial register contents
    for (int r = 0; r < 16; r++) emit(AM_IMMEDIATE, OP_MOV, r, 0, 16'h0100 + 16'(r * 16'h0111));
    row(AM_REGISTER,  OP_ADD, 0, 2, 0, 0);            // 8085  ADD C
    row(AM_REGISTER,  OP_SUB, 0, 1, 0, 0);            // 6800  SBA
    row(AM_RELATIVE,  OP_JMP, 0, 0, 16'h0014);        // Z80   JR 14H
    apc = apc + 16'h0014;
    row(AM_REGISTER,  OP_MOV, 0, 1, 0, 0);            // 8051  MOV A,B
    row(AM_INDIRECT,  OP_ADD, 2, 3);                  // 8086  ADD CX,[BX]
    row(AM_BASE,      OP_MOV, 0, 1, 16'h4A90, 0);     // Z8002 LDB R0,%4A90(R1)
    row(AM_IMMEDIATE, OP_MOV, 0, 0, 16'h004F, 0);     // 8048  MOV A,#4F
    row(AM_DIRECT,    OP_MOV, 4, 0, 16'h3910);        // 8085  LHLD 3910H
    row(AM_IMMEDIATE, OP_MOV, 1, 0, 16'h0078, 0);     // 6800  LDAB #$78
    row(AM_IMMEDIATE, OP_JMP, 0, 0, 16'h2080);        // Z80   JP 2080H
    apc = 16'h2080;
    row(AM_INDIRECT,  OP_MOV, 0, 3, 0, 0);            // 8031  MOV A,@R3
    row(AM_DIRECT,    OP_ADD, 3, 0, 16'h437A);        // 8086  ADD BX,[437AH]
    row(AM_BASE_INDEXED, OP_MOV, 0, 2, 0, 1, 5);      // Z8000 LD R0,R2(R5)
    row(AM_REGISTER,  OP_AND, 0, 2, 0, 0);            // 8748  ANL A,C
    row(AM_IMMEDIATE, OP_MOV, 0, 0, 16'h0045, 0);     // 8085  MVI A,45H
    row(AM_INDEXED,   OP_MOV, 0, 3, 16'h002A, 0);     // 6800  LDAA $2A,X
    row(AM_REGISTER,  OP_ADD, 0, 1, 0, 0);            // Z80   ADD B
    row(AM_IMMEDIATE, OP_ADD, 0, 0, 16'h0025, 0);     // 8751  ADD A,25H
    row(AM_INDIRECT,  OP_MOV, 0, 3);                  // 8086  MOV AX,[BX]
    row(AM_RELATIVE,  OP_MOV, 5, 0, 16'h002A);        // Z8000 LD R5,%2A
    row(AM_REGISTER,  OP_INC, 0, 0, 0, 0);            // 8035  INC A
    L_END = apc;
    emit(AM_IMMEDIATE, OP_JMP, 0, 0, 16'(L_END));
  endtask

  // stage-by-stage state check of each table row
  int stage_chk = 0;
  always @(negedge clk) begin
    #2;
    if (rst_n && state != ST_FETCH_INST && stage >= 3'd2 && stage <= 3'd4 && ir[7:0] >= 8'd16 && ir[7:0] < 8'(16 + nrows)) begin
      checks++;
      stage_chk++;
      if (state != exp_st[ir[7:0]][stage - 2])
        fail($sformatf("row %0d stage %0d state %s, expected %s", ir[7:0] - 15, stage, state.name(),
                       exp_st[ir[7:0]][stage - 2].name()));
    end
  end

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
    for (int k = 0; k < 32768; k++) mem[k] = 16'(k * 7 + 3);
    build();
    for (int k = 0; k < 32768; k++) mmem[k] = mem[k];
    for (int k = 0; k < 16; k++) mregs[k] = 16'h0000;
    mpc = 0; mc = 0; mz = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    @(posedge clk iff (state == ST_EXECUTE && pc == 16'(L_END + 2)));
    wait_instr(1);
    checks++;
    for (int m = 0; m < 8; m++) if (n_mode[m] == 0) fail($sformatf("mode %03b never used", m));
    if (n_jump < 3)    fail("JR, JP and the final jump not all executed");
    if (stage_chk != 3 * nrows) fail($sformatf("%0d stage checks for %0d rows", stage_chk, nrows));
    $display("modes %p ops %p", n_mode, n_op);
    $display("byte=%0d word=%0d repl=%0d memdst=%0d jump=%0d irq=%0d mask=%0d held=%0d abort=%0d",
             n_byte, n_word, n_repl, n_memdst, n_jump, n_irq, n_mask, n_held, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tab_index_of(int unsigned addr);
    return int'(mem[addr][7:0]);
  endfunction
endmodule
