// mont_mul: modular multiplier with Montgomery reduction,
// p = a * b * R^{-1} mod q with R = 2^RBITS.
//
// The product T = a*b (2W bits) is reduced with the classic Montgomery step
//   m = (T mod R) * q' mod R,  q' = -q^{-1} mod R,
//   t = (T + m*q) / R,         t in [0, 2q),
// followed by one conditional subtraction of q, so the output is fully
// reduced to [0, q). Full reduction matters for the recomputing schemes: the
// RENO pass negates the result again, and the two passes can only agree
// bit-for-bit if both results are canonical.
//
// SUBPIPE = 0: combinational (clk and rst_n unused).
// SUBPIPE = 1: one register between the multiplier and the reduction,
// splitting the long path roughly in half (the subpipelining option); the
// latency is then one cycle and a new operand pair is taken every cycle.
//
// The multiplier with Montgomery reduction follows the published scheme; R, the final
// subtraction and the register position are this design's choices.
module mont_mul #(
  parameter int unsigned Q       = ntt_ed_pkg::Q_DEF,
  parameter int unsigned W       = ntt_ed_pkg::W_DEF,
  parameter int unsigned RBITS   = W,
  parameter bit          SUBPIPE = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  localparam logic [RBITS-1:0] QINV = RBITS'(ntt_ed_pkg::mont_qneg_inv(64'(Q), RBITS));
  localparam logic [2*W:0]     QX   = (2*W+1)'(Q);

  logic [2*W-1:0] prod, prod_r;
  logic [RBITS-1:0] m;
  logic [2*W+1:0] sum;
  logic [2*W+1:0] t;

  assign prod = a * b;

  generate
    if (SUBPIPE) begin : g_pipe
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) prod_r <= '0;
        else        prod_r <= prod;
      end
    end else begin : g_comb
      assign prod_r = prod;
    end
  endgenerate

  always_comb begin
    m   = RBITS'(prod_r[RBITS-1:0] * QINV);
    sum = (2*W+2)'(prod_r) + (2*W+2)'(m) * (2*W+2)'(Q);
    t   = sum >> RBITS;
    if (t >= (2*W+2)'(QX)) t = t - (2*W+2)'(QX);
    p   = W'(t);
  end
endmodule
