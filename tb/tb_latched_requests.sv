// tb_latched_requests: request pins with and without the pending latches.
//
// Two cores run the same program (set R1, then a loop of INC R1 / JMP).
// Core L is built with LATCH_REQUESTS = 1, core P with the default (pins
// go straight to the priority encoder). Every acknowledge is logged with
// its code and the PC it loads.
//
//  1. A one-clock pulse on ctrl_req[2] in stage 2 of an INC, sent to both
//     cores. Core L must serve it at the end of that instruction (code 2,
//     PC = vector 2). Core P must never acknowledge it, as the pin has
//     dropped by the execute stage.
//  2. Pulses on ctrl_req[5] and ctrl_req[2] in the same clock (core L only).
//     Code 5 is served first, then code 2 at the end of the next instruction.
//  3. ctrl_req[1] held high for 40 clocks: served exactly once.
//  4. After all of this no request may stay pending: no further acknowledge.
module tb_latched_requests;
  import gmp_pkg::*;

  logic clk = 0, rst_n = 0;
  data_t mem [64];
  decoded_t tab [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // per-core signals: index 0 = latched core, 1 = plain core
  addr_t mem_addr [2], pc [2];
  logic mem_rd [2], mem_wr [2], req_ack [2], flag_c [2], flag_z [2], arr [2], aad [2];
  data_t mem_wdata [2], ir [2], phi [2];
  logic [7:0] ctrl_req [2];
  logic [2:0] req_code [2], stage [2];
  ea_state_e state [2];

  generic_cpu #(.LATCH_REQUESTS(1'b1)) u_l (
    .clk, .rst_n, .mem_addr(mem_addr[0]), .mem_rd(mem_rd[0]), .mem_wr(mem_wr[0]),
    .mem_wdata(mem_wdata[0]), .mem_rdata(mem[mem_addr[0][5:0]]), .ir(ir[0]), .dec(tab[ir[0][1:0]]),
    .ctrl_req(ctrl_req[0]), .int_en(1'b1), .req_ack(req_ack[0]), .req_code(req_code[0]),
    .pc(pc[0]), .state(state[0]), .stage(stage[0]), .flag_c(flag_c[0]), .flag_z(flag_z[0]),
    .addr_reg_read(arr[0]), .addr_adding(aad[0]), .prod_hi(phi[0]));

  generic_cpu u_p (
    .clk, .rst_n, .mem_addr(mem_addr[1]), .mem_rd(mem_rd[1]), .mem_wr(mem_wr[1]),
    .mem_wdata(mem_wdata[1]), .mem_rdata(mem[mem_addr[1][5:0]]), .ir(ir[1]), .dec(tab[ir[1][1:0]]),
    .ctrl_req(ctrl_req[1]), .int_en(1'b1), .req_ack(req_ack[1]), .req_code(req_code[1]),
    .pc(pc[1]), .state(state[1]), .stage(stage[1]), .flag_c(flag_c[1]), .flag_z(flag_z[1]),
    .addr_reg_read(arr[1]), .addr_adding(aad[1]), .prod_hi(phi[1]));

  // acknowledge log of each core
  int n_ack [2];
  logic [2:0] ack_code [2][$];

  always @(posedge clk) begin
    for (int c = 0; c < 2; c++)
      if (rst_n && req_ack[c]) begin
        n_ack[c]++;
        ack_code[c].push_back(req_code[c]);
      end
  end

  localparam addr_t VEC [8] = '{16'h0000, 16'h0100, 16'h0200, 16'h0300,
                                16'h0400, 16'h0500, 16'h0600, 16'h0000};

  task automatic expect1(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // wait for the next acknowledge of core c and check its code and new PC
  task automatic expect_ack(int c, logic [2:0] code, int max_clk);
    int k;
    k = 0;
    while (!req_ack[c] && k < max_clk) begin @(negedge clk); k++; end
    expect1($sformatf("core %0d acknowledges code %0d", c, code), req_ack[c] && req_code[c] == code);
    @(negedge clk);
    expect1($sformatf("core %0d PC loaded from vector %0d", c, code), pc[c] == VEC[code]);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
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
    n_ack[0] = 0; n_ack[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 1. a short pulse, seen by both cores
    @(negedge clk iff (stage[0] == 3'd2 && ir[0][1:0] == 2'd1));
    ctrl_req[0] = 8'b0000_0100; ctrl_req[1] = 8'b0000_0100;
    @(negedge clk);
    ctrl_req[0] = '0; ctrl_req[1] = '0;
    #1;
    expect1("latched: no acknowledge before execute", n_ack[0] == 0);
    expect_ack(0, 3'd2, 10);
    repeat (20) @(negedge clk);
    expect1("plain: a dropped pulse is lost", n_ack[1] == 0);

    // 2. two pulses at once: served in priority order, one per instruction
    @(negedge clk iff (stage[0] == 3'd3));
    ctrl_req[0] = 8'b0010_0100;
    @(negedge clk);
    ctrl_req[0] = '0;
    expect_ack(0, 3'd5, 10);
    expect1("latched: lower request waits for the next instruction", state[0] == ST_FETCH_INST);
    expect_ack(0, 3'd2, 10);

    // 3. a held pin is served once
    @(negedge clk iff (stage[0] == 3'd1));
    ctrl_req[0] = 8'b0000_0010;
    expect_ack(0, 3'd1, 10);
    repeat (40) @(negedge clk);
    ctrl_req[0] = '0;

    // 4. nothing left pending
    repeat (30) @(negedge clk);
    expect1("latched: four acknowledges in all", n_ack[0] == 4);
    expect1("latched: acknowledge order 2,5,2,1",
            ack_code[0].size() == 4 && ack_code[0][0] == 3'd2 && ack_code[0][1] == 3'd5 &&
            ack_code[0][2] == 3'd2 && ack_code[0][3] == 3'd1);
    expect1("plain: never acknowledged", n_ack[1] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
