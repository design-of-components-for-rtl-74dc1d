// tb_reg_file: self-checking test of the byte/word register file.
// A reference model keeps 16 words; a byte write changes only the low byte of
// its word (the upper memories stay inactive), a byte read returns the low
// byte zero-filled or replicated. Random mixes of word and byte writes and
// reads on both ports are compared with the model, after a few of the
// register-transfer patterns of common instructions (two different source
// registers, the same register on both ports, write back to the D address).
module tb_reg_file;
  logic clk = 0;
  logic mode, repl, we;
  logic [3:0] adr_s, adr_d;
  logic [15:0] data_in, data_s, data_d;
  logic [15:0] model [16];
  int checks = 0, failures = 0;
  int n_byte = 0, n_word = 0, n_repl = 0;
  bit chk_en = 0;   // compare only once every register has been written

  reg_file dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] rd(int a, logic m, logic r);
    if (m) return model[a];
    return r ? {model[a][7:0], model[a][7:0]} : {8'h00, model[a][7:0]};
  endfunction

  task automatic cmp();
    #1;
    checks += 2;
    if (data_s !== rd(adr_s, mode, repl)) begin
      failures++;
      $display("FAIL S mode=%0d repl=%0d adr=%0d got=%h exp=%h", mode, repl, adr_s, data_s, rd(adr_s, mode, repl));
    end
    if (data_d !== rd(adr_d, mode, repl)) begin
      failures++;
      $display("FAIL D mode=%0d repl=%0d adr=%0d got=%h exp=%h", mode, repl, adr_d, data_d, rd(adr_d, mode, repl));
    end
  endtask

  task automatic op(logic m, logic r, int s, int d, logic w, logic [15:0] v);
    @(negedge clk);
    mode = m; repl = r; adr_s = 4'(s); adr_d = 4'(d); we = w; data_in = v;
    if (chk_en) cmp();
    if (m) n_word++; else n_byte++;
    if (!m && r) n_repl++;
    @(posedge clk);
    if (w) begin
      if (m) model[d] = v;
      else   model[d][7:0] = v[7:0];
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = 1; repl = 0; we = 0; adr_s = 0; adr_d = 0; data_in = 0;
    // initialise all 16 word registers
    for (int k = 0; k < 16; k++) op(1'b1, 1'b0, 0, k, 1'b1, 16'h1111 * 16'(k) ^ 16'hA5C3);
    chk_en = 1;
    // ADD C style: byte, S=C(1) D=A(7), write back A
    op(1'b0, 1'b0, 1, 7, 1'b1, 16'h00EE);
    // same register on both ports, word mode
    op(1'b1, 1'b0, 9, 9, 1'b0, 16'h0);
    // byte write to an upper-block register leaves its upper byte alone
    op(1'b0, 1'b1, 12, 12, 1'b1, 16'hBE5A);
    op(1'b1, 1'b0, 12, 12, 1'b0, 16'h0);
    // random traffic
    for (int c = 0; c < 3000; c++)
      op(1'($urandom), 1'($urandom), int'($urandom_range(0, 15)), int'($urandom_range(0, 15)),
         1'($urandom), 16'($urandom));
    checks++;
    if (n_byte == 0 || n_word == 0 || n_repl == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
