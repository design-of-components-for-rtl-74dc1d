// tb_priority_encoder: exhaustive self-checking test of the 8-input priority
// encoder. Every input pattern is applied with the enable high and low, and
// a[2:0] and eo are compared with a top-down search for the highest set
// input. The waveform examples (00110010 -> 101, 10010011 -> 111,
// 00000000 -> 000 with eo high, 01011011 disabled -> 000) are checked first.
// Finally two encoders are cascaded through eo/ei into a 16-input encoder.
module tb_priority_encoder;
  logic [7:0] i;
  logic ei, eo;
  logic [2:0] a;
  int checks = 0, failures = 0;

  priority_encoder dut (.i(i), .ei(ei), .a(a), .eo(eo));

  // Two encoders cascaded into a 16-input encoder: the upper one's eo
  // enables the lower one; bit 3 of the code is "an upper input is active".
  logic [15:0] i16;
  logic [2:0]  a_hi, a_lo;
  logic        eo_hi, eo_lo;
  logic [3:0]  a16;
  priority_encoder u_hi (.i(i16[15:8]), .ei(ei),    .a(a_hi), .eo(eo_hi));
  priority_encoder u_lo (.i(i16[7:0]),  .ei(eo_hi), .a(a_lo), .eo(eo_lo));
  assign a16 = {ei && !eo_hi, a_hi | a_lo};

  task automatic check(logic [7:0] v, logic en, logic [2:0] ea, logic eeo);
    i = v; ei = en;
    #1;
    checks++;
    if (a !== ea || eo !== eeo) begin
      failures++;
      $display("FAIL i=%b ei=%b a=%b eo=%b exp a=%b eo=%b", v, en, a, eo, ea, eeo);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(8'b00110010, 1'b1, 3'b101, 1'b0);
    check(8'b10010011, 1'b1, 3'b111, 1'b0);
    check(8'b00000000, 1'b1, 3'b000, 1'b1);
    check(8'b01011011, 1'b0, 3'b000, 1'b0);
    for (int v = 0; v < 256; v++) begin
      logic [2:0] exp_a;
      exp_a = 3'd0;
      for (int k = 7; k >= 0; k--)
        if (v[k]) begin exp_a = 3'(k); break; end
      check(8'(v), 1'b1, exp_a, v == 0);
      check(8'(v), 1'b0, 3'd0, 1'b0);
    end
    // cascade: random 16-bit request patterns
    for (int r = 0; r < 2000; r++) begin
      logic [3:0] exp16;
      exp16 = 4'd0;
      i16 = (r < 16) ? 16'(1 << r) : 16'($urandom) >> $urandom_range(0, 15);
      ei = 1'b1;
      for (int k = 15; k >= 0; k--)
        if (i16[k]) begin exp16 = 4'(k); break; end
      #1;
      checks++;
      if (a16 !== exp16 || eo_lo !== (i16 == 0)) begin
        failures++;
        $display("FAIL cascade i=%b a=%0d eo=%b exp %0d", i16, a16, eo_lo, exp16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
