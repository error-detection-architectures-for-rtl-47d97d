// reno_d: recomputing with negated operands (RENO) around the multiplier of
// line D.
//
// Norm cycle:  m2  = MontRed(D * RAM1)
// RENO cycle:  m2' = -MontRed((-D) * RAM1) mod q
// Since Montgomery reduction is linear mod q and both results are fully
// reduced, m2' = m2 when nothing is faulty. A fault in the multiplier, the
// reduction or on the multiplier's operand lines acts on D in one pass and on
// q - D in the other, so it almost always makes the two disagree. Two "Mod q
// negation" units and two 2:1 multiplexers steered by the Norm/RENO select
// are all the construction adds; reno_cmp compares the passes.
//
// Timing: op_valid/cycle/d/ram1 are one operand in one pass. The pass result
// leaves through the res register 1 + SUBPIPE cycles later (res_valid,
// res_cycle, res = m2 or m2'). One cycle after a RENO result the comparator
// gives chk_valid with m2 = the checked Norm result and err.
// The datapath is the published one; the register placement is this
// design's choice.
module reno_d #(
  parameter int unsigned Q       = ntt_ed_pkg::Q_DEF,
  parameter int unsigned W       = ntt_ed_pkg::W_DEF,
  parameter bit          SUBPIPE = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  op_valid,
  input  ntt_ed_pkg::ed_cycle_e cycle,
  input  logic [W-1:0]          d,
  input  logic [W-1:0]          ram1,
  output logic                  res_valid,
  output ntt_ed_pkg::ed_cycle_e res_cycle,
  output logic [W-1:0]          res,
  output logic                  chk_valid,
  output logic [W-1:0]          m2,
  output logic                  err
);
  import ntt_ed_pkg::*;

  logic [W-1:0] d_neg, mul_op, prod, prod_neg, dec;
  logic         p_valid;
  ed_cycle_e    p_cycle;

  // encode: Norm/RENO multiplexer in front of the multiplier
  mod_neg #(.Q(Q), .W(W)) u_neg_in (.x(d), .y(d_neg));
  assign mul_op = (cycle == CYC_RENO) ? d_neg : d;

  mont_mul #(.Q(Q), .W(W), .SUBPIPE(SUBPIPE)) u_mul (
    .clk, .rst_n, .a(mul_op), .b(ram1), .p(prod)
  );

  // pass tag follows the subpipeline register, if there is one
  generate
    if (SUBPIPE) begin : g_tag
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          p_valid <= 1'b0;
          p_cycle <= CYC_NORM;
        end else begin
          p_valid <= op_valid;
          p_cycle <= cycle;
        end
      end
    end else begin : g_notag
      assign p_valid = op_valid;
      assign p_cycle = cycle;
    end
  endgenerate

  // decode: Norm/RENO multiplexer behind the multiplier
  mod_neg #(.Q(Q), .W(W)) u_neg_out (.x(prod), .y(prod_neg));
  assign dec = (p_cycle == CYC_RENO) ? prod_neg : prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_cycle <= CYC_NORM;
      res       <= '0;
    end else begin
      res_valid <= p_valid;
      res_cycle <= p_cycle;
      if (p_valid) res <= dec;
    end
  end

  reno_cmp #(.DW(W)) u_cmp (
    .clk, .rst_n,
    .res_valid, .res_cycle, .res,
    .chk_valid, .chk_res(m2), .err
  );
endmodule
