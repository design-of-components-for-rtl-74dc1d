// tb_alu: self-checking test of the ALU. Every operation is applied to random
// and corner operands and the result, carry, zero and write-back outputs are
// compared with independently computed values; shifts and rotates use a
// bit-by-bit reference.
module tb_alu;
  import gmp_pkg::*;

  alu_op_e op;
  data_t a, b, y;
  logic [3:0] shamt;
  logic c, z, wb;
  int checks = 0, failures = 0;

  alu dut (.*);

  function automatic data_t shref(data_t v, logic lr, logic sr, int k);
    data_t r = '0;
    for (int i = 0; i < 16; i++) begin
      int s = lr ? i + k : i - k;
      if (s >= 0 && s < 16) r[i] = v[s];
      else if (sr)          r[i] = v[(s + 16) % 16];
    end
    return r;
  endfunction

  task automatic check(alu_op_e o, data_t va, data_t vb, logic [3:0] k);
    int unsigned ia = va, ib = vb;
    data_t ey; logic ec = 0; logic ewb = 1;
    case (o)
      OP_MOV: ey = vb;
      OP_ADD: begin ey = 16'(ia + ib); ec = (ia + ib) > 32'hFFFF; end
      OP_SUB: begin ey = 16'(ia - ib); ec = ia < ib; end
      OP_CMP: begin ey = 16'(ia - ib); ec = ia < ib; ewb = 0; end
      OP_AND: ey = va & vb;
      OP_OR:  ey = va | vb;
      OP_XOR: ey = va ^ vb;
      OP_INC: begin ey = 16'(ia + 1); ec = ia == 32'hFFFF; end
      OP_DEC: begin ey = 16'(ia - 1); ec = ia == 0; end
      OP_CLR: ey = 0;
      OP_SHL: ey = shref(va, 0, 0, int'(k));
      OP_SHR: ey = shref(va, 1, 0, int'(k));
      OP_ROL: ey = shref(va, 0, 1, int'(k));
      OP_ROR: ey = shref(va, 1, 1, int'(k));
      OP_JMP: begin ey = vb; ewb = 0; end
      default: begin ey = 0; ewb = 0; end
    endcase
    op = o; a = va; b = vb; shamt = k;
    #1;
    checks++;
    if (y !== ey || c !== ec || z !== (ey == 0) || wb !== ewb) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h k=%0d y=%h c=%b z=%b wb=%b exp y=%h c=%b", o.name(), va, vb, k, y, c, z, wb, ey, ec);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o <= 14; o++) begin
      check(alu_op_e'(o), 16'hFFFF, 16'h0001, 4'd1);
      check(alu_op_e'(o), 16'h0000, 16'h0001, 4'd0);
      check(alu_op_e'(o), 16'h1234, 16'h1234, 4'd15);
      for (int r = 0; r < 300; r++)
        check(alu_op_e'(o), 16'($urandom), 16'($urandom), 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
