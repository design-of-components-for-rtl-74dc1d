// priority_encoder: 8-input priority encoder with cascade enables.
//
// Inputs i[7:0] are active high, i[7] having the highest priority. When the
// enable input ei is high, a[2:0] is the index of the highest-priority input
// that is high, and all lower inputs are masked. eo is high only when ei is
// high and no input is high, so it can enable a lower-priority encoder in a
// cascade. With ei low both a and eo are low. The block is purely
// combinational. The function and the input/output names follow the
// document's truth table; an input-to-output delay is not modelled.
module priority_encoder (
  input  logic [7:0] i,
  input  logic       ei,
  output logic [2:0] a,
  output logic       eo
);

  always_comb begin
    a  = 3'd0;
    eo = ei && (i == 8'h00);
    if (ei) begin
      for (int k = 0; k < 8; k++) begin
        if (i[k]) a = 3'(k);   // later (higher) inputs override lower ones
      end
    end
  end

endmodule
