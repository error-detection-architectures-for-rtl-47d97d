// ntt_ed_top: the operand and arithmetic segment of a hardware/software NTT
// accelerator, protected by three recomputing error-detection constructions.
//
// The software side fills RAM1 and RAM2 and streams operand words of four
// coefficients {D, C, B, A}. Each word is processed twice, a Norm cycle and a
// RENO cycle, and every arithmetic unit is checked by comparing the two passes:
//   * reno_d    line D:  m2   = MontRed(D * RAM1[raddr1])        (err_d)
//   * reno_ba   line B/A: out2 = MontRed((s ? A : B) * RAM2[raddr2]) (err_ba)
//   * recomp_cd Reg1 = m2 (end of line D), Reg2 = C (end of line C):
//               out3 = Reg1 - Reg2, out4 = Reg1 + Reg2  (mod q)  (err_cd)
// The first two run in stage 1; recomp_cd runs as stage 2 on the checked m2,
// with C delayed to meet it, while stage 1 already works on the next word.
// err_flag is the sticky OR of the three error pulses, cleared by err_clear.
// Only checked results leave the top: the per-pass result ports of the
// constructions (res, res_valid, res_cycle) are left unconnected here.
//
// Handshake and timing: in_word, s, ram1_raddr and ram2_raddr are taken
// together in a cycle with in_valid && in_ready; at most one word is taken
// every two cycles. With SUBPIPE = 0, mul_valid (with m2, out2, err_d,
// err_ba) is high in the 4th cycle after the accepting cycle and bf_valid
// (with out3, out4, err_cd) in the 8th; SUBPIPE = 1 adds one cycle to each
// stage. All result outputs are one-cycle pulses or values qualified by them.
// The RAM write ports are independent of the stream; a word's RAM entries
// are read in its accepting cycle.
//
// What follows the published scheme: the three constructions, the four operand
// registers loaded per clock, the mode select s, RAM1/RAM2, the Montgomery
// reduction, the field width log2(kq) and NewHope's n = 512, q = 12289, k = 3.
// This design's own choices: the handshake, the RAM organisation, the
// comparators' registers, Reg1 = m2 and Reg2 = C as the "last registers" of
// lines D and C, and the sticky error flag. The rest of the NTT unit the
// constructions sit in (address generation, the odd-log2(n) bypass
// multiplexers, the output SIPO unit) is not part of this RTL.
module ntt_ed_top #(
  parameter int unsigned Q       = ntt_ed_pkg::Q_DEF,
  parameter int unsigned N       = ntt_ed_pkg::N_DEF,
  parameter int unsigned K       = ntt_ed_pkg::K_DEF,
  parameter int unsigned W       = $clog2(K * Q),
  parameter int unsigned AW      = $clog2(N),
  parameter bit          SUBPIPE = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  // software side: RAM fill
  input  logic           ram1_we,
  input  logic [AW-1:0]  ram1_waddr,
  input  logic [W-1:0]   ram1_wdata,
  input  logic           ram2_we,
  input  logic [AW-1:0]  ram2_waddr,
  input  logic [W-1:0]   ram2_wdata,
  // operand stream
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [4*W-1:0] in_word,     // {D, C, B, A}
  input  logic           s,           // 0: polynomial multiplication, 1: NTT
  input  logic [AW-1:0]  ram1_raddr,
  input  logic [AW-1:0]  ram2_raddr,
  // stage 1 results
  output logic           mul_valid,
  output logic [W-1:0]   m2,
  output logic [W-1:0]   out2,
  output logic           err_d,
  output logic           err_ba,
  // stage 2 results
  output logic           bf_valid,
  output logic [W-1:0]   out3,
  output logic [W-1:0]   out4,
  output logic           err_cd,
  // error flag
  input  logic           err_clear,
  output logic           err_flag
);
  import ntt_ed_pkg::*;

  // ---------------- stage 1: operand registers, RAMs, RENO on D and B/A
  logic         load1, op_valid1;
  ed_cycle_e    cycle1;
  logic [W-1:0] a, b, c, d, ram1_q, ram2_q;
  logic         s_q;

  norm_reno_ctrl u_ctrl1 (
    .clk, .rst_n, .in_valid, .in_ready, .load(load1),
    .op_valid(op_valid1), .cycle(cycle1)
  );

  coeff_regs #(.W(W)) u_regs (
    .clk, .rst_n, .load(load1), .word(in_word), .s_in(s),
    .a, .b, .c, .d, .s(s_q)
  );

  coeff_ram #(.DEPTH(N), .W(W)) u_ram1 (
    .clk, .we(ram1_we), .waddr(ram1_waddr), .wdata(ram1_wdata),
    .re(load1), .raddr(ram1_raddr), .rdata(ram1_q)
  );

  coeff_ram #(.DEPTH(N), .W(W)) u_ram2 (
    .clk, .we(ram2_we), .waddr(ram2_waddr), .wdata(ram2_wdata),
    .re(load1), .raddr(ram2_raddr), .rdata(ram2_q)
  );

  logic         d_res_valid, ba_res_valid, ba_chk_valid;
  ed_cycle_e    d_res_cycle, ba_res_cycle;
  logic [W-1:0] d_res, ba_res;

  reno_d #(.Q(Q), .W(W), .SUBPIPE(SUBPIPE)) u_reno_d (
    .clk, .rst_n, .op_valid(op_valid1), .cycle(cycle1),
    .d, .ram1(ram1_q),
    .res_valid(d_res_valid), .res_cycle(d_res_cycle), .res(d_res),
    .chk_valid(mul_valid), .m2, .err(err_d)
  );

  reno_ba #(.Q(Q), .W(W), .SUBPIPE(SUBPIPE)) u_reno_ba (
    .clk, .rst_n, .op_valid(op_valid1), .cycle(cycle1),
    .s(s_q), .a, .b, .ram2(ram2_q),
    .res_valid(ba_res_valid), .res_cycle(ba_res_cycle), .res(ba_res),
    .chk_valid(ba_chk_valid), .out2, .err(err_ba)
  );

  // ---------------- line C delay: C of a RENO cycle meets its checked m2
  localparam int unsigned CDLY = 2 + SUBPIPE;
  logic [W-1:0] c_dly [CDLY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CDLY; i++) c_dly[i] <= '0;
    end else begin
      c_dly[0] <= c;
      for (int i = 1; i < CDLY; i++) c_dly[i] <= c_dly[i-1];
    end
  end

  // ---------------- stage 2: recomputing on C and D
  logic      ready2, load2, op_valid2;
  ed_cycle_e cycle2;
  logic      cd_res_valid;
  ed_cycle_e cd_res_cycle;
  logic [W-1:0] cd_res3, cd_res4;

  norm_reno_ctrl u_ctrl2 (
    .clk, .rst_n, .in_valid(mul_valid), .in_ready(ready2), .load(load2),
    .op_valid(op_valid2), .cycle(cycle2)
  );

  recomp_cd #(.Q(Q), .W(W), .SUBPIPE(SUBPIPE)) u_recomp_cd (
    .clk, .rst_n, .load(load2), .reg1_in(m2), .reg2_in(c_dly[CDLY-1]),
    .op_valid(op_valid2), .cycle(cycle2),
    .res_valid(cd_res_valid), .res_cycle(cd_res_cycle),
    .res3(cd_res3), .res4(cd_res4),
    .chk_valid(bf_valid), .out3, .out4, .err(err_cd)
  );

  // ---------------- sticky error flag
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         err_flag <= 1'b0;
    else if (err_clear) err_flag <= 1'b0;
    else if (err_d || err_ba || err_cd) err_flag <= 1'b1;
  end

  // stage 2 never has to refuse a checked result of stage 1
  a_stage2_ready: assert property (@(posedge clk) disable iff (!rst_n)
    mul_valid |-> ready2);
  // the two stage-1 constructions run in lock step
  a_stage1_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    mul_valid == ba_chk_valid);
endmodule
