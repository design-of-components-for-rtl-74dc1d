// shift_add_mul: 16 x 16 -> 32-bit unsigned multiplier by shifts and adds,
// using barrel shifters so that each partial product is formed in one clock.
//
// In step i the multiplicand shifted left by i positions is added to the
// product when bit i of the multiplier is set. The shifted multiplicand is
// 32 bits wide: its low half comes from a barrel shifter shifting left by i,
// its high half from a second one shifting right by 16 - i (zero for i = 0).
// The loop stops after the highest set multiplier bit, so a multiply takes at
// most 16 add/shift clocks instead of up to 256 single-bit shifts.
//
// Interface: a one-clock `start` (ignored while busy) captures a and b;
// `cancel` drops a multiply in progress. busy
// is high during the add/shift clocks; `done` is high for one clock with the
// result on p, which holds until the next start. Clocks from start to done:
// max(1, index of the highest set bit of b + 1) + 1.
// The use of the barrel shifter for a fast shift-and-add multiplier and the
// 16-clock bound follow the document; the sequencing, early stop and
// handshake are this design's choices.
module shift_add_mul
  import gmp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        cancel,  // abandon a multiply in progress
  input  data_t       a,       // multiplicand
  input  data_t       b,       // multiplier
  output logic        busy,
  output logic        done,
  output logic [31:0] p
);

  data_t              mcand, mplier;
  logic [SHIFT_W-1:0] i;
  data_t              pp_lo, pp_hi;
  logic [31:0]        pp;
  logic [SHIFT_W-1:0] n_back;
  data_t              rest;

  assign n_back = -i;   // 16 - i modulo 16

  barrel_shifter u_lo (.d(mcand), .l_r(1'b0), .s_r(1'b0), .n_shift(i), .y(pp_lo));
  barrel_shifter u_hi (.d(mcand), .l_r(1'b1), .s_r(1'b0), .n_shift(n_back), .y(pp_hi));

  // high half of mcand << i: mcand >> (16 - i), none for i = 0
  assign pp   = {(i == '0) ? '0 : pp_hi, pp_lo};
  // multiplier bits above the current one
  assign rest = mplier >> i >> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      p      <= '0;
      mcand  <= '0;
      mplier <= '0;
      i      <= '0;
    end else if (cancel) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          mcand  <= a;
          mplier <= b;
          i      <= '0;
          p      <= '0;
        end
      end else begin
        if (mplier[i]) p <= p + pp;
        if (rest == '0 || i == '1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end

endmodule
