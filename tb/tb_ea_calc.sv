// tb_ea_calc: self-checking test of the effective address state machine.
// The testbench plays memory (read in the same cycle), the program counter
// (stepped on pc_inc) and the register file (port S returns Rn, or Rn2 when
// reg_sel_rx is high). For each of the eight addressing modes, with random
// registers and extension words, it checks the state visited in each of the
// five stages against the mode's stage table, that each instruction takes
// exactly five clocks, that hold freezes the execute stage, the effective address, the fetched operand or
// immediate data, the PC advance, and that a restart returns to stage 1.
module tb_ea_calc;
  import gmp_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, hold = 0;
  addr_mode_e mode;
  addr_t pc;
  data_t mem_rdata, reg_s, ext, operand;
  ea_state_e state;
  logic [2:0] stage;
  logic mem_read, reg_read, reg_sel_rx, ir_load, pc_inc, addr_add, execute;
  addr_t mem_addr, ea;

  data_t mem [256];
  data_t rn, rn2;
  int checks = 0, failures = 0;

  ea_calc dut (.*);

  always #5 clk = ~clk;

  assign mem_rdata = mem[mem_addr[7:0]];
  assign reg_s = reg_sel_rx ? rn2 : rn;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pc <= 16'h0010;
    else if (pc_inc) pc <= pc + 16'd1;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s mode=%03b got=%h exp=%h", what, mode, got, exp);
    end
  endtask

  function automatic ea_state_e exp_state(addr_mode_e m, int s);
    case (s)
      1: return ST_FETCH_INST;
      2: return (m[2:1] == 2'b00) ? ST_SKIP : ST_FETCH_EXT;
      3: return (m[2] == 1'b1) ? ST_ADD : ST_SKIP;
      4: return (m inside {AM_REGISTER, AM_IMMEDIATE}) ? ST_SKIP : ST_FETCH_OPND;
      default: return ST_EXECUTE;
    endcase
  endfunction

  task automatic run_instr(addr_mode_e m);
    addr_t pc0, exp_ea;
    data_t d16;
    bit has_ext;
    mode = m;
    rn = 16'($urandom_range(0, 255)); rn2 = 16'($urandom_range(0, 255));
    pc0 = pc;
    has_ext = !(m inside {AM_REGISTER, AM_INDIRECT, AM_BASE_INDEXED});
    d16 = mem[8'(pc0 + 1)];
    case (m)
      AM_INDIRECT:     exp_ea = rn;
      AM_DIRECT:       exp_ea = d16;
      AM_INDEXED, AM_BASE: exp_ea = rn + d16;
      AM_RELATIVE:     exp_ea = pc0 + 16'd2 + d16;
      AM_BASE_INDEXED: exp_ea = rn + rn2;
      default:         exp_ea = '0;
    endcase
    #1;
    for (int s = 1; s <= 5; s++) begin
      if (s > 1) @(negedge clk);
      expect_eq("stage", int'(stage), s);
      expect_eq("state", int'(state), int'(exp_state(m, s)));
      if (state == ST_FETCH_OPND) begin
        expect_eq("opnd addr", int'(mem_addr), int'(exp_ea));
        expect_eq("opnd read", int'(mem_read), 1);
      end
      if (state == ST_EXECUTE) begin
        expect_eq("execute", int'(execute), 1);
        expect_eq("pc", int'(pc), int'(pc0 + (has_ext ? 16'd2 : 16'd1)));
        if (!(m inside {AM_REGISTER, AM_IMMEDIATE})) begin
          expect_eq("ea", int'(ea), int'(exp_ea));
          expect_eq("operand", int'(operand), int'(mem[exp_ea[7:0]]));
        end
        if (m == AM_IMMEDIATE) expect_eq("immediate", int'(ext), int'(d16));
      end
    end
    @(negedge clk);   // stage 1 of the next instruction
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) mem[k] = 16'($urandom_range(0, 255)) ^ 16'(k << 8);
    for (int k = 0; k < 256; k++) mem[k][15:8] = 8'h00;   // keep addresses in range
    mode = AM_REGISTER; rn = 0; rn2 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 40; rep++)
      for (int m = 0; m < 8; m++) begin
        if (pc > 16'h00F0) begin
          @(negedge clk) rst_n = 0;
          @(negedge clk) rst_n = 1;
        end
        run_instr(addr_mode_e'(m));
      end
    // hold in the execute stage keeps the machine there
    mode = AM_DIRECT;
    repeat (4) @(negedge clk);
    expect_eq("before hold", int'(state), int'(ST_EXECUTE));
    hold = 1;
    repeat (3) begin
      @(negedge clk);
      expect_eq("held state", int'(state), int'(ST_EXECUTE));
      expect_eq("held stage", int'(stage), 5);
    end
    hold = 0;
    @(negedge clk);
    expect_eq("after hold", int'(state), int'(ST_FETCH_INST));
    // restart in the middle of an instruction
    mode = AM_INDEXED;
    #1;
    expect_eq("stage before restart", int'(stage), 1);
    @(negedge clk);
    restart = 1;
    @(negedge clk);
    restart = 0;
    expect_eq("restart state", int'(state), int'(ST_FETCH_INST));
    expect_eq("restart stage", int'(stage), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
