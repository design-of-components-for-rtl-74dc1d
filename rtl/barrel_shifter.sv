// barrel_shifter: 16-bit single-step shifter / rotator.
//
// Shifts or rotates the input d by n_shift (0-15) positions in one
// combinational pass, instead of one bit per clock. s_r selects the
// operation (0 = shift, 1 = rotate) and l_r the direction (0 = left,
// 1 = right). Shifts fill the vacated positions with zeros (a logical
// shift). The port names, encodings and the zero fill follow the document;
// the fixed output delay of the document's simulation model is left out, as
// a synthesizable block has none.
module barrel_shifter
  import gmp_pkg::*;
(
  input  data_t              d,
  input  logic               l_r,      // 0 = left, 1 = right
  input  logic               s_r,      // 0 = shift, 1 = rotate
  input  logic [SHIFT_W-1:0] n_shift,
  output data_t              y
);

  // A rotate ORs the shifted word with the bits shifted out, brought in
  // from the other end (a shift by 16 - n, which is 16 and yields zero
  // when n = 0).
  logic [SHIFT_W:0] n_back;

  always_comb begin
    n_back = (SHIFT_W+1)'(DATA_W) - {1'b0, n_shift};
    unique case ({s_r, l_r})
      2'b00:   y = d << n_shift;
      2'b01:   y = d >> n_shift;
      2'b10:   y = (d << n_shift) | (d >> n_back);
      default: y = (d >> n_shift) | (d << n_back);
    endcase
  end

endmodule
