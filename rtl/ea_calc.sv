// ea_calc: effective address calculator, a five-stage Mealy state machine.
//
// Every instruction takes exactly five stages, one clock each:
//   1 fetch instruction, 2 fetch extension word, 3 add, 4 fetch operand,
//   5 execute.
// A stage an addressing mode does not need is spent in the SKIP state, so the
// machine goes FETCH_INST -> SKIP (modes 00x) or FETCH_EXT (others);
// FETCH_EXT -> SKIP (01x) or ADD (1xx); SKIP stays in SKIP and leaves to
// FETCH_OPND (modes other than 0x0, at stage 4) or EXECUTE (0x0, at stage 5);
// ADD -> FETCH_OPND -> EXECUTE -> FETCH_INST.
//
// Per mode (Rn on register port S, D16 the extension word):
//   000 register       -  no address; the operand is the register
//   001 indirect       -  EA = [Rn], taken in stage 3
//   010 immediate      -  D16 fetched in stage 2 is the operand
//   011 direct         -  EA = D16, taken in stage 3
//   100 indexed, 101 base  -  EA = [Rn] + D16 in stage 3
//   110 relative       -  EA = PC + D16 in stage 3 (PC already past D16)
//   111 base indexed   -  stage 2 reads [Rn2] (reg_sel_rx = 1), stage 3 adds [Rn1]
//
// Interface: `mode` must be the mode of the instruction being fetched already
// in stage 1, so the decoder is fed from the memory data bus in that stage.
// mem_read/mem_addr request a memory word that must be on mem_rdata in the
// same cycle. pc_inc asks the owner of the PC to step it past the word just
// fetched. ext, ea and operand hold the extension word, the effective address
// and the memory operand; `execute` marks stage 5. restart returns the machine
// to stage 1 at the next edge; hold keeps the machine in its present stage
// (used to stretch the execute stage of a multi-clock operation). rst_n is an asynchronous active-low reset.
// The states, their order, the transition conditions and the per-mode stage
// table follow the document; the signal names, the one-clock-per-stage timing
// and the PC value used in relative mode are this design's choices.
module ea_calc
  import gmp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart,
  input  logic       hold,        // freeze the machine (multi-clock execute)
  input  addr_mode_e mode,
  input  addr_t      pc,
  input  data_t      mem_rdata,
  input  data_t      reg_s,       // register file port S
  output ea_state_e  state,
  output logic [2:0] stage,       // 1..5
  output logic       mem_read,
  output addr_t      mem_addr,
  output logic       reg_read,    // the address calculation reads port S
  output logic       reg_sel_rx,  // port S must address Rn2 instead of Rn
  output logic       ir_load,     // stage 1: load the instruction register
  output logic       pc_inc,
  output logic       addr_add,    // adder of the ADD stage in use
  output logic       execute,
  output data_t      ext,
  output addr_t      ea,
  output data_t      operand
);

  ea_state_e  nstate;
  logic [2:0] nstage;
  addr_t      sum;

  // Mode groups used by the transition conditions.
  logic m_00x, m_01x, m_0x0;
  assign m_00x = (mode[2:1] == 2'b00);
  assign m_01x = (mode[2:1] == 2'b01);
  assign m_0x0 = (mode[2] == 1'b0) && (mode[0] == 1'b0);

  always_comb begin
    nstate = state;
    unique case (state)
      ST_FETCH_INST: nstate = m_00x ? ST_SKIP : ST_FETCH_EXT;
      ST_FETCH_EXT:  nstate = m_01x ? ST_SKIP : ST_ADD;
      ST_SKIP: begin
        if (stage == 3'd4)                nstate = ST_EXECUTE;
        else if (stage == 3'd3 && !m_0x0) nstate = ST_FETCH_OPND;
        else                              nstate = ST_SKIP;
      end
      ST_ADD:        nstate = ST_FETCH_OPND;
      ST_FETCH_OPND: nstate = ST_EXECUTE;
      ST_EXECUTE:    nstate = ST_FETCH_INST;
      default:       nstate = ST_FETCH_INST;
    endcase
    nstage = (state == ST_EXECUTE) ? 3'd1 : stage + 3'd1;
  end

  // Mealy outputs.
  always_comb begin
    ir_load    = (state == ST_FETCH_INST);
    reg_sel_rx = (state == ST_FETCH_EXT) && (mode == AM_BASE_INDEXED);
    mem_read   = (state == ST_FETCH_INST) || (state == ST_FETCH_OPND) ||
                 ((state == ST_FETCH_EXT) && (mode != AM_BASE_INDEXED));
    pc_inc     = (state == ST_FETCH_INST) ||
                 ((state == ST_FETCH_EXT) && (mode != AM_BASE_INDEXED));
    mem_addr   = (state == ST_FETCH_OPND) ? ea : pc;
    addr_add   = (state == ST_ADD);
    execute    = (state == ST_EXECUTE);
    reg_read   = reg_sel_rx ||
                 ((state == ST_ADD) && (mode != AM_RELATIVE)) ||
                 ((state == ST_SKIP) && (stage == 3'd3) && (mode == AM_INDIRECT));
    sum        = ((mode == AM_RELATIVE) ? pc : reg_s) + ext;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_FETCH_INST;
      stage   <= 3'd1;
      ext     <= '0;
      ea      <= '0;
      operand <= '0;
    end else if (restart) begin
      state <= ST_FETCH_INST;
      stage <= 3'd1;
    end else if (!hold) begin
      state <= nstate;
      stage <= nstage;
      if (state == ST_FETCH_EXT)
        ext <= (mode == AM_BASE_INDEXED) ? reg_s : mem_rdata;
      if (state == ST_ADD)
        ea <= sum;
      if (state == ST_SKIP && stage == 3'd3) begin
        if (mode == AM_INDIRECT)    ea <= reg_s;
        else if (mode == AM_DIRECT) ea <= ext;
      end
      if (state == ST_FETCH_OPND)
        operand <= mem_rdata;
    end
  end

endmodule
