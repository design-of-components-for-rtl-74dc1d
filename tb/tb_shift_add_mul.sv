// tb_shift_add_mul: self-checking test of the shift-and-add multiplier.
// Random and corner operands; the 32-bit product is compared with the
// built-in multiplication, and the number of clocks from start to done must
// be (index of the highest multiplier bit + 1, at least 1) + 1, so never more
// than 17 including the result clock.
module tb_shift_add_mul;
  import gmp_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, cancel = 0, busy, done;
  data_t a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  shift_add_mul dut (.*);

  always #5 clk = ~clk;

  task automatic mul(data_t x, data_t y);
    int n = 0, expn, msb;
    msb = -1;
    for (int k = 0; k < 16; k++) if (y[k]) msb = k;
    expn = ((msb < 0) ? 1 : msb + 1) + 1;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = 16'($urandom); b = 16'($urandom);   // inputs are captured at start
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks += 2;
    if (p !== 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL %h * %h = %h exp %h", x, y, p, 32'(x) * 32'(y));
    end
    if (n != expn) begin
      failures++;
      $display("FAIL %h * %h took %0d clocks, exp %0d", x, y, n, expn);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mul(16'hFFFF, 16'hFFFF);
    mul(16'h1234, 16'h0000);
    mul(16'h0000, 16'h8001);
    mul(16'h0001, 16'h0001);
    mul(16'h00FF, 16'h00FF);
    for (int k = 0; k < 16; k++) mul(16'($urandom), 16'(1 << k));
    for (int r = 0; r < 1000; r++) mul(16'($urandom), 16'($urandom) >> $urandom_range(0, 15));
    // cancel in the middle of a long multiply: no done pulse follows
    @(negedge clk);
    a = 16'h1234; b = 16'h8000; start = 1;
    @(negedge clk) start = 0;
    repeat (3) @(negedge clk);
    cancel = 1;
    @(negedge clk) cancel = 0;
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (done || busy) begin failures++; $display("FAIL activity after cancel"); end
    end
    mul(16'h0102, 16'h0304);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
