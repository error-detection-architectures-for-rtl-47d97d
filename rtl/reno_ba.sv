// reno_ba: recomputing with negated operands on lines A and B, around the
// multiplier fed by RAM2.
//
// The mode select s picks the multiplier operand: B in polynomial
// multiplication mode (s = 0), A in NTT mode (s = 1). The chosen operand then
// goes through the same RENO path as line D (reno_d): Norm cycle
// out2 = MontRed(X * RAM2); RENO cycle out2' = -MontRed((-X) * RAM2) mod q,
// and the comparator flags any difference. So faults are caught in both modes
// and on both lines.
//
// Timing is that of reno_d: result 1 + SUBPIPE cycles after the operand, the
// check one cycle after the RENO result. s must stay constant over the Norm
// and RENO cycle of one operand set.
// The structure follows the published scheme; the timing is this design's choice.
module reno_ba #(
  parameter int unsigned Q       = ntt_ed_pkg::Q_DEF,
  parameter int unsigned W       = ntt_ed_pkg::W_DEF,
  parameter bit          SUBPIPE = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  op_valid,
  input  ntt_ed_pkg::ed_cycle_e cycle,
  input  logic                  s,
  input  logic [W-1:0]          a,
  input  logic [W-1:0]          b,
  input  logic [W-1:0]          ram2,
  output logic                  res_valid,
  output ntt_ed_pkg::ed_cycle_e res_cycle,
  output logic [W-1:0]          res,
  output logic                  chk_valid,
  output logic [W-1:0]          out2,
  output logic                  err
);
  logic [W-1:0] sel;

  // mode multiplexer: 0 = B (MUL mode), 1 = A (NTT mode)
  assign sel = s ? a : b;

  reno_d #(.Q(Q), .W(W), .SUBPIPE(SUBPIPE)) u_reno (
    .clk, .rst_n, .op_valid, .cycle,
    .d(sel), .ram1(ram2),
    .res_valid, .res_cycle, .res,
    .chk_valid, .m2(out2), .err
  );
endmodule
