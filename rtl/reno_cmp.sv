// reno_cmp: the comparator that closes every recomputing construction.
//
// A datapath that uses recomputation delivers two results for one operand
// set: first the Norm result, then the RENO (recomputed, decoded) result. This
// block keeps the Norm result in a register and, when the RENO result
// arrives, compares the two. One cycle after the RENO result it raises
// chk_valid for one cycle, with chk_res = the Norm result and err = 1 if the
// two differ. A RENO result with no Norm result before it is also flagged.
//
// Interface: res_valid/res_cycle/res is one result per cycle, tagged with the
// pass it belongs to. DW is the width of the compared word; a construction with
// two outputs concatenates them. The comparator is assumed fault-free
// (hardened), as in the error-coverage figures it is meant to reproduce.
// Storing the Norm result and the sequencing rule are this design's choices.
module reno_cmp #(
  parameter int unsigned DW = ntt_ed_pkg::W_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  res_valid,
  input  ntt_ed_pkg::ed_cycle_e res_cycle,
  input  logic [DW-1:0]         res,
  output logic                  chk_valid,
  output logic [DW-1:0]         chk_res,
  output logic                  err
);
  import ntt_ed_pkg::*;

  logic [DW-1:0] norm_q;
  logic          have_norm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      norm_q    <= '0;
      have_norm <= 1'b0;
      chk_valid <= 1'b0;
      chk_res   <= '0;
      err       <= 1'b0;
    end else begin
      chk_valid <= 1'b0;
      err       <= 1'b0;
      if (res_valid) begin
        if (res_cycle == CYC_NORM) begin
          norm_q    <= res;
          have_norm <= 1'b1;
        end else begin
          chk_valid <= 1'b1;
          chk_res   <= norm_q;
          err       <= !have_norm || (res != norm_q);
          have_norm <= 1'b0;
        end
      end
    end
  end

  // a RENO result must follow its Norm result
  a_reno_after_norm: assert property (@(posedge clk) disable iff (!rst_n)
    (res_valid && res_cycle == CYC_RENO) |-> have_norm);
endmodule
