// tb_reset_request: the two ways of handling a reset request in the core.
//
// Two cores run the same program (set R1, then a loop of INC R1 / JMP).
// Core A is built with RESET_ABORTS = 1, core B with RESET_ABORTS = 0. A
// reset request (ctrl_req[7]) is raised while each is in stage 2 of an INC
// and held until acknowledged. Core A must acknowledge at once, write
// nothing, and fetch from the start address in the next clock. Core B must
// finish the INC (register write in its execute stage), acknowledge at the
// end of that stage, and then fetch from the start address. A lower request
// raised together with the reset must lose to it in both cores.
module tb_reset_request;
  import gmp_pkg::*;

  logic clk = 0, rst_n = 0;
  data_t mem [64];
  decoded_t tab [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // per-core signals
  addr_t mem_addr [2], pc [2];
  logic mem_rd [2], mem_wr [2], req_ack [2], flag_c [2], flag_z [2], arr [2], aad [2];
  data_t mem_wdata [2], ir [2];
  logic [7:0] ctrl_req [2];
  logic [2:0] req_code [2], stage [2];
  ea_state_e state [2];

  generic_cpu #(.RESET_ABORTS(1'b1)) u_a (
    .clk, .rst_n, .mem_addr(mem_addr[0]), .mem_rd(mem_rd[0]), .mem_wr(mem_wr[0]),
    .mem_wdata(mem_wdata[0]), .mem_rdata(mem[mem_addr[0][5:0]]), .ir(ir[0]), .dec(tab[ir[0][1:0]]),
    .ctrl_req(ctrl_req[0]), .int_en(1'b1), .req_ack(req_ack[0]), .req_code(req_code[0]),
    .pc(pc[0]), .state(state[0]), .stage(stage[0]), .flag_c(flag_c[0]), .flag_z(flag_z[0]),
    .addr_reg_read(arr[0]), .addr_adding(aad[0]));

  generic_cpu #(.RESET_ABORTS(1'b0)) u_b (
    .clk, .rst_n, .mem_addr(mem_addr[1]), .mem_rd(mem_rd[1]), .mem_wr(mem_wr[1]),
    .mem_wdata(mem_wdata[1]), .mem_rdata(mem[mem_addr[1][5:0]]), .ir(ir[1]), .dec(tab[ir[1][1:0]]),
    .ctrl_req(ctrl_req[1]), .int_en(1'b1), .req_ack(req_ack[1]), .req_code(req_code[1]),
    .pc(pc[1]), .state(state[1]), .stage(stage[1]), .flag_c(flag_c[1]), .flag_z(flag_z[1]),
    .addr_reg_read(arr[1]), .addr_adding(aad[1]));

  logic rf_we [2];
  assign rf_we[0] = u_a.rf_we;
  assign rf_we[1] = u_b.rf_we;

  task automatic expect1(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(int c);
    // wait for stage 2 of an INC (instruction index 1)
    @(negedge clk iff (stage[c] == 3'd2 && ir[c][1:0] == 2'd1));
    ctrl_req[c] = 8'b1000_0100;
    #1;
    if (c == 0) begin
      expect1("A: immediate acknowledge", req_ack[0] && req_code[0] == 3'd7);
      expect1("A: no write on abort", !rf_we[0] && !mem_wr[0]);
      @(negedge clk);
      ctrl_req[0] = '0;
      #1;
      expect1("A: fetch from start address", state[0] == ST_FETCH_INST && mem_addr[0] == 16'h0000 && mem_rd[0]);
    end else begin
      expect1("B: no acknowledge before execute", !req_ack[1]);
      @(negedge clk iff state[1] == ST_EXECUTE);
      #1;
      expect1("B: acknowledge at end of instruction", req_ack[1] && req_code[1] == 3'd7);
      expect1("B: instruction completes its write", rf_we[1]);
      @(negedge clk);
      ctrl_req[1] = '0;
      #1;
      expect1("B: fetch from start address", state[1] == ST_FETCH_INST && mem_addr[1] == 16'h0000 && mem_rd[1]);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    decoded_t d;
    d = '0; d.word = 1'b1;
    d.mode = AM_IMMEDIATE; d.op = OP_MOV; d.rd = 4'd1; tab[0] = d;   // MOV R1,#0005
    d.mode = AM_REGISTER;  d.op = OP_INC; d.rd = 4'd1; tab[1] = d;   // INC R1
    d.mode = AM_IMMEDIATE; d.op = OP_JMP; d.rd = 4'd0; tab[2] = d;   // JMP #2
    tab[3] = '0;
    for (int k = 0; k < 64; k++) mem[k] = 16'h0003;
    mem[0] = 16'h0000; mem[1] = 16'h0005;
    mem[2] = 16'h0001; mem[3] = 16'h0002; mem[4] = 16'h0002;
    ctrl_req[0] = '0; ctrl_req[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
