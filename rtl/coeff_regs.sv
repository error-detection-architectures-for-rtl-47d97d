// coeff_regs: the operand registers A, B, C and D of the NTT unit.
//
// Four coefficients arrive per clock in one word, packed as {4th, 3rd, 2nd,
// 1st} fields of W bits: D in the 4th (top) field, C in the 3rd, B in the 2nd,
// A in the 1st (bottom) field, as the published field labels place them.
// On load the four fields are captured; otherwise the registers hold, so the
// same operands are seen by both the Norm and the RENO cycle. The mode bit s
// (0 = polynomial multiplication, 1 = NTT) is captured with them.
// Reset clears everything. One-cycle latency from load to the outputs.
module coeff_regs #(
  parameter int unsigned W = ntt_ed_pkg::W_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [4*W-1:0] word,
  input  logic           s_in,
  output logic [W-1:0]   a,
  output logic [W-1:0]   b,
  output logic [W-1:0]   c,
  output logic [W-1:0]   d,
  output logic           s
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0; b <= '0; c <= '0; d <= '0; s <= 1'b0;
    end else if (load) begin
      a <= word[0*W +: W];
      b <= word[1*W +: W];
      c <= word[2*W +: W];
      d <= word[3*W +: W];
      s <= s_in;
    end
  end
endmodule
