// tb_dp_ram: self-checking test of the dual-port memory. Random writes
// through the D address, with both read ports compared every cycle against a
// reference array; a location is only checked once it has been written.
module tb_dp_ram;
  logic clk = 0;
  logic we;
  logic [2:0] addr_s, addr_d;
  logic [7:0] din, dout_s, dout_d;
  logic [7:0] model [8];
  logic [7:0] valid;
  int checks = 0, failures = 0;

  dp_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = '0; we = 0; addr_s = 0; addr_d = 0; din = 0;
    // fill every location once
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      we = 1; addr_d = 3'(k); din = 8'($urandom);
      model[k] = din; valid[k] = 1'b1;
    end
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      we = 1'($urandom);
      addr_d = 3'($urandom); addr_s = 3'($urandom);
      din = 8'($urandom);
      #1;
      checks += 2;
      if (dout_s !== model[addr_s]) begin failures++; $display("FAIL S @%0d", addr_s); end
      if (dout_d !== model[addr_d]) begin failures++; $display("FAIL D @%0d", addr_d); end
      @(posedge clk);
      if (we) model[addr_d] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
