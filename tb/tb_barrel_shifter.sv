// tb_barrel_shifter: self-checking test of the 16-bit barrel shifter.
// Checks the four operations for every shift count against a bit-by-bit
// reference, on the waveform examples (3-bit left shift, 5-bit left rotate,
// 7-bit right shift, 5-bit right rotate, 0-bit right rotate) and on random
// data.
module tb_barrel_shifter;
  import gmp_pkg::*;

  data_t d, y;
  logic l_r, s_r;
  logic [3:0] n;
  int checks = 0, failures = 0;

  barrel_shifter dut (.d(d), .l_r(l_r), .s_r(s_r), .n_shift(n), .y(y));

  function automatic data_t ref_model(data_t v, logic lr, logic sr, int k);
    data_t r = '0;
    for (int b = 0; b < 16; b++) begin
      int src = lr ? b + k : b - k;
      if (src >= 0 && src < 16) r[b] = v[src];
      else if (sr)              r[b] = v[(src + 16) % 16];
    end
    return r;
  endfunction

  task automatic check(data_t v, logic lr, logic sr, int k, data_t exp);
    d = v; l_r = lr; s_r = sr; n = 4'(k);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL d=%b l_r=%0d s_r=%0d n=%0d y=%b exp=%b", v, lr, sr, k, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // waveform examples
    check(16'b1001001011010101, 1'b0, 1'b0, 3, 16'b1001011010101000);
    check(16'b1001001011010101, 1'b0, 1'b1, 5, 16'b0101101010110010);
    check(16'b1001001011010101, 1'b1, 1'b0, 7, 16'b0000000100100101);
    check(16'b1001001011010101, 1'b1, 1'b1, 5, 16'b1010110010010110);
    check(16'b1001010100101101, 1'b1, 1'b1, 0, 16'b1001010100101101);
    // all counts and operations, random data
    for (int rep = 0; rep < 50; rep++) begin
      data_t v;
      v = 16'($urandom);
      for (int k = 0; k < 16; k++)
        for (int op = 0; op < 4; op++)
          check(v, op[0], op[1], k, ref_model(v, op[0], op[1], k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
