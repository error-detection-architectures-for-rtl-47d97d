// reno_d_tb: the RENO construction on line D, combinational (SUBPIPE = 0)
// and subpipelined (SUBPIPE = 1) side by side on the same stimulus.
//
// Operand sets arrive as a Norm cycle followed by a RENO cycle, with random
// idle gaps. In about one set out of four the D operand is changed between
// the two passes, which is what a transient fault on the operand line does;
// the comparator must then flag it. Every pass result is checked against
// a * b * 2^-16 mod q (the RENO result after decoding must equal the
// plain product of its own operand), with latency 1 + SUBPIPE, and the check
// output one cycle after the RENO result.
module reno_d_tb;
  import ntt_ed_pkg::*;
  import ntt_ref_pkg::*;
  localparam int unsigned Q = 12289;
  localparam int unsigned W = 16;
  localparam int NCYC = 40000;

  int checks = 0, failures = 0;
  int n_err = 0, n_ok = 0;
  logic clk = 0, rst_n = 0;
  logic op_valid;
  ed_cycle_e cycle;
  logic [W-1:0] d, ram1;

  logic      res_valid [2];
  ed_cycle_e res_cycle [2];
  logic [W-1:0] res [2], m2 [2];
  logic      chk_valid [2], err [2];

  // per-cycle history of what was driven
  bit        h_valid [NCYC];
  ed_cycle_e h_cycle [NCYC];
  longint unsigned h_exp [NCYC];     // expected decoded pass result
  longint unsigned h_norm [NCYC];    // Norm result of the set (valid on RENO cycles)

  always #5 clk = ~clk;

  reno_d #(.Q(Q), .W(W), .SUBPIPE(1'b0)) dut0 (
    .clk, .rst_n, .op_valid, .cycle, .d, .ram1,
    .res_valid(res_valid[0]), .res_cycle(res_cycle[0]), .res(res[0]),
    .chk_valid(chk_valid[0]), .m2(m2[0]), .err(err[0]));
  reno_d #(.Q(Q), .W(W), .SUBPIPE(1'b1)) dut1 (
    .clk, .rst_n, .op_valid, .cycle, .d, .ram1,
    .res_valid(res_valid[1]), .res_cycle(res_cycle[1]), .res(res[1]),
    .chk_valid(chk_valid[1]), .m2(m2[1]), .err(err[1]));

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what, input int k);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (dut%0d) at cycle %0d", what, k, $time / 10);
    end
  endtask

  // stimulus
  initial begin
    int k;
    longint unsigned dn, dr, r;
    op_valid = 0; cycle = CYC_NORM; d = 0; ram1 = 0;
    for (int i = 0; i < NCYC; i++) begin h_valid[i] = 0; h_cycle[i] = CYC_NORM; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    k = 3;
    while (k < NCYC - 20) begin
      @(negedge clk);
      op_valid = 0;
      if ($urandom_range(2) == 0) begin k++; continue; end
      dn = $urandom_range(Q - 1);
      r  = $urandom_range(Q - 1);
      dr = dn;
      if ($urandom_range(3) == 0) begin
        dr = (dn + 1 + $urandom_range(Q - 2)) % Q;   // transient fault between passes
        if (r == 0) r = 1;
      end
      // Norm cycle
      op_valid = 1; cycle = CYC_NORM; d = W'(dn); ram1 = W'(r);
      h_valid[k] = 1; h_cycle[k] = CYC_NORM; h_exp[k] = ref_mont(dn, r, Q, W);
      k++;
      @(negedge clk);
      // RENO cycle
      op_valid = 1; cycle = CYC_RENO; d = W'(dr);
      h_valid[k] = 1; h_cycle[k] = CYC_RENO; h_exp[k] = ref_mont(dr, r, Q, W);
      h_norm[k] = h_exp[k-1];
      k++;
    end
    @(negedge clk);
    op_valid = 0;
    repeat (10) @(posedge clk);
    check(n_err > 500 && n_ok > 500, "both outcomes occurred", 0);
    $display("sets flagged=%0d clean=%0d", n_err, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: ops driven at the negedge at time 10k are captured at 10k+5
  always @(posedge clk) begin
    int c, src, chk_src;
    #1;
    c = int'($time / 10);
    if (rst_n && c > 4 && c < NCYC) begin
      for (int k = 0; k < 2; k++) begin
        src = c - k;              // pass whose result is now in res
        chk_src = c - k - 1;      // RENO pass whose check is now out
        check(res_valid[k] == h_valid[src], "res_valid timing", k);
        if (h_valid[src]) begin
          check(res_cycle[k] == h_cycle[src], "res_cycle", k);
          check(longint'(res[k]) == h_exp[src], "pass result", k);
        end
        check(chk_valid[k] == (h_valid[chk_src] && h_cycle[chk_src] == CYC_RENO),
              "chk_valid timing", k);
        if (chk_valid[k]) begin
          check(longint'(m2[k]) == h_norm[chk_src], "checked m2", k);
          check(err[k] == (h_exp[chk_src] != h_norm[chk_src]), "err flag", k);
          if (k == 0) begin
            if (err[k]) n_err++;
            else        n_ok++;
          end
        end else begin
          check(!err[k], "no err without check", k);
        end
      end
    end
  end
endmodule
