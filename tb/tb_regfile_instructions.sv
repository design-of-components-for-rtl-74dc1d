// tb_regfile_instructions: register-file traffic of common instructions of
// 8085, 6800, Z80, 8051, 8086, Z8002, 8048, 8031, Z8000, 8748, 8751 and 8035,
// one row each, in byte or word mode as the instruction requires.
//
// Each row reads source register S and destination register D, then writes
// the instruction's result to D (the write port uses the D address). The
// result is computed here from the values read on the ports (or from a
// memory word, for instructions that go through memory) and checked by
// reading the register back. Register names map onto addresses as
// A/AX -> 0, B -> 1, C/CX -> 2, BX -> 3, HL/BC -> 4 (pointer pairs), X -> 5,
// Z (6800 row) -> 6, R0..R15 -> 0..15; RH0 -> 0 in byte mode.
module tb_regfile_instructions;
  logic clk = 0;
  logic mode, repl, we;
  logic [3:0] adr_s, adr_d;
  logic [15:0] data_in, data_s, data_d;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  reg_file dut (.*);

  always #5 clk = ~clk;

  typedef enum {F_ADD, F_SUB, F_XOR, F_AND, F_MOVS, F_CLR, F_INCD, F_ROTD, F_MUL, F_MEM, F_IMM, F_NONE} fn_e;

  function automatic logic [15:0] view(int a, logic m);
    return m ? model[a] : {8'h00, model[a][7:0]};
  endfunction

  task automatic row(string name, logic m, int s, int d, fn_e f, logic [15:0] k = 0);
    logic [15:0] vs, vd, r;
    @(negedge clk);
    mode = m; repl = 0; adr_s = 4'(s); adr_d = 4'(d); we = 0;
    #1;
    checks += 2;
    if (data_s !== view(s, m) || data_d !== view(d, m)) begin
      failures++;
      $display("FAIL %s read S=%h D=%h exp %h %h", name, data_s, data_d, view(s, m), view(d, m));
    end
    vs = data_s; vd = data_d;
    case (f)
      F_ADD:  r = vd + vs;
      F_SUB:  r = vd - vs;
      F_XOR:  r = vd ^ vs;
      F_AND:  r = vd & vs;
      F_MOVS: r = vs;
      F_CLR:  r = 0;
      F_INCD: r = vd + 1;
      F_ROTD: r = m ? {vd[14:0], vd[15]} : {8'h00, vd[6:0], vd[7]};
      F_MUL:  r = vs[7:0] * vd[7:0];
      F_MEM:  r = k;           // word loaded through memory
      F_IMM:  r = k;
      default: r = vd;
    endcase
    if (f != F_NONE) begin
      we = 1; data_in = r;
      @(posedge clk);
      if (m) model[d] = r; else model[d][7:0] = r[7:0];
      @(negedge clk);
      we = 0; adr_s = 4'(d);
      #1;
      checks++;
      if (data_s !== view(d, m)) begin
        failures++;
        $display("FAIL %s result %h exp %h", name, data_s, view(d, m));
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 1; repl = 0; we = 0; adr_s = 0; adr_d = 0; data_in = 0;
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      we = 1; adr_d = 4'(r); data_in = 16'h1357 * 16'(r + 1);
      model[r] = data_in;
    end
    @(negedge clk) we = 0;
    row("8085 ADD C",        0, 2, 0, F_ADD);
    row("6800 SBA",          0, 1, 0, F_SUB);
    row("Z80 CP (HL)",       0, 4, 0, F_NONE);
    row("8051 XRL A,C",      0, 2, 0, F_XOR);
    row("8086 CMP BX,CX",    1, 2, 3, F_NONE);
    row("Z8002 LD R2,R5",    1, 5, 2, F_MOVS);
    row("8048 ANL A,C",      0, 2, 0, F_AND);
    row("8085 LDAX B",       0, 4, 0, F_MEM, 16'h00C4);
    row("6800 CLRA",         0, 0, 0, F_CLR);
    row("Z80 XOR B",         0, 1, 0, F_XOR);
    row("8031 MOV A,@R3",    0, 3, 0, F_MEM, 16'h0033);
    row("8086 INC CX",       1, 2, 2, F_INCD);
    row("Z8000 INB RH0,@R1", 0, 1, 0, F_MEM, 16'h00E1);
    row("8748 MOV A,#4F",    0, 0, 0, F_IMM, 16'h004F);
    row("8085 ANA B",        0, 1, 0, F_AND);
    row("6800 LDAA Z,X",     0, 5, 0, F_MEM, 16'h005A);
    row("Z80 RLCA",          0, 0, 0, F_ROTD);
    row("8751 MUL A,B",      0, 1, 0, F_MUL);
    row("8086 SUB CX,BX",    1, 3, 2, F_SUB);
    row("Z8000 LD R0,R2(R5)",1, 2, 0, F_MEM, 16'hBEEF);
    row("8035 INC A",        0, 0, 0, F_INCD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
