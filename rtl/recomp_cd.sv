// recomp_cd: recomputing with negated and swapped operands on the
// add/subtract stage of lines C and D.
//
// Reg1 holds the value at the end of line D, Reg2 the value at the end of
// line C. In the Norm cycle the subtractor of line D gives out3 = Reg1 - Reg2
// and the adder of line C gives out4 = Reg1 + Reg2 (all mod q). In the RENO
// cycle Reg2 is replaced by (-Reg2) mod q at both arithmetic units, so the
// subtractor now produces Reg1 + Reg2 and the adder Reg1 - Reg2; the output
// multiplexers swap the two lines back, and out3'/out4' must equal out3/out4.
// No decoding stage is needed beyond the swap. A comparator checks the pair.
//
// Timing: load captures reg1_in/reg2_in into Reg1/Reg2; the Norm and the RENO
// cycle follow under op_valid/cycle. The pass result is registered
// 1 + SUBPIPE cycles after the pass (SUBPIPE puts a register after the
// adder/subtractor); the check follows one cycle after the RENO result.
// The datapath follows the published scheme; registers and handshake are this
// design's choices.
module recomp_cd #(
  parameter int unsigned Q       = ntt_ed_pkg::Q_DEF,
  parameter int unsigned W       = ntt_ed_pkg::W_DEF,
  parameter bit          SUBPIPE = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [W-1:0]          reg1_in,
  input  logic [W-1:0]          reg2_in,
  input  logic                  op_valid,
  input  ntt_ed_pkg::ed_cycle_e cycle,
  output logic                  res_valid,
  output ntt_ed_pkg::ed_cycle_e res_cycle,
  output logic [W-1:0]          res3,
  output logic [W-1:0]          res4,
  output logic                  chk_valid,
  output logic [W-1:0]          out3,
  output logic [W-1:0]          out4,
  output logic                  err
);
  import ntt_ed_pkg::*;

  logic [W-1:0] reg1, reg2, reg2_neg, op2;
  logic [W-1:0] diff, sum, diff_p, sum_p, o3, o4;
  logic         p_valid;
  ed_cycle_e    p_cycle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0;
      reg2 <= '0;
    end else if (load) begin
      reg1 <= reg1_in;
      reg2 <= reg2_in;
    end
  end

  // encode: Reg2 or its negation feeds both arithmetic units
  mod_neg #(.Q(Q), .W(W)) u_neg (.x(reg2), .y(reg2_neg));
  assign op2 = (cycle == CYC_RENO) ? reg2_neg : reg2;

  assign diff = W'(mod_sub32(32'(reg1), 32'(op2), 32'(Q)));  // line D
  assign sum  = W'(mod_add32(32'(reg1), 32'(op2), 32'(Q)));  // line C

  generate
    if (SUBPIPE) begin : g_pipe
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          diff_p  <= '0;
          sum_p   <= '0;
          p_valid <= 1'b0;
          p_cycle <= CYC_NORM;
        end else begin
          diff_p  <= diff;
          sum_p   <= sum;
          p_valid <= op_valid;
          p_cycle <= cycle;
        end
      end
    end else begin : g_comb
      assign diff_p  = diff;
      assign sum_p   = sum;
      assign p_valid = op_valid;
      assign p_cycle = cycle;
    end
  endgenerate

  // decode: swap the lines back in the RENO cycle
  assign o3 = (p_cycle == CYC_RENO) ? sum_p  : diff_p;
  assign o4 = (p_cycle == CYC_RENO) ? diff_p : sum_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_cycle <= CYC_NORM;
      res3      <= '0;
      res4      <= '0;
    end else begin
      res_valid <= p_valid;
      res_cycle <= p_cycle;
      if (p_valid) begin
        res3 <= o3;
        res4 <= o4;
      end
    end
  end

  reno_cmp #(.DW(2*W)) u_cmp (
    .clk, .rst_n,
    .res_valid, .res_cycle, .res({res3, res4}),
    .chk_valid, .chk_res({out3, out4}), .err
  );
endmodule
