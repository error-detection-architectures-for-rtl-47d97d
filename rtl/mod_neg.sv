// mod_neg: modular negation, y = (-x) mod q.
//
// This is the "Mod q negation" box that every recomputing construction uses,
// once to encode an operand and, in front of a multiplier, once more to decode
// the product. For x in [0, q) it returns q - x, and 0 for x = 0, so the
// result stays in [0, q). Purely combinational.
//
// Ports: x (W bits, must be < Q), y (W bits).
module mod_neg #(
  parameter int unsigned Q = ntt_ed_pkg::Q_DEF,
  parameter int unsigned W = ntt_ed_pkg::W_DEF
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  localparam logic [W-1:0] QW = W'(Q);

  always_comb begin
    if (x == '0) y = '0;
    else         y = QW - x;
  end
endmodule
