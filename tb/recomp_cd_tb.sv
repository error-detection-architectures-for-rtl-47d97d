// recomp_cd_tb: recomputing with negated and swapped operands on the
// Reg1 -/+ Reg2 stage, combinational (SUBPIPE = 0) and subpipelined
// (SUBPIPE = 1) side by side.
//
// Each set loads Reg1/Reg2, then runs a Norm and a RENO cycle; the next load
// may share the RENO cycle (back to back) or come after idle cycles. In about
// one set out of four Reg1 or Reg2 is reloaded with another value during the
// Norm cycle, so the RENO pass sees different operands, as a transient fault
// would cause; the comparator must flag it. Both pass results must be
// out3 = Reg1 - Reg2 and out4 = Reg1 + Reg2 (mod q) of the registers they
// saw; latency 1 + SUBPIPE, check one cycle after the RENO result.
module recomp_cd_tb;
  import ntt_ed_pkg::*;
  import ntt_ref_pkg::*;
  localparam int unsigned Q = 12289;
  localparam int unsigned W = 16;
  localparam int NCYC = 40000;

  int checks = 0, failures = 0;
  int n_err = 0, n_ok = 0, n_b2b = 0;
  logic clk = 0, rst_n = 0;
  logic load, op_valid;
  ed_cycle_e cycle;
  logic [W-1:0] reg1_in, reg2_in;

  logic      res_valid [2];
  ed_cycle_e res_cycle [2];
  logic [W-1:0] res3 [2], res4 [2], out3 [2], out4 [2];
  logic      chk_valid [2], err [2];

  bit        h_valid [NCYC];
  ed_cycle_e h_cycle [NCYC];
  longint unsigned h_e3 [NCYC], h_e4 [NCYC];
  longint unsigned h_n3 [NCYC], h_n4 [NCYC];  // Norm results, on RENO cycles

  longint unsigned m1, m2;  // model of Reg1, Reg2

  always #5 clk = ~clk;

  recomp_cd #(.Q(Q), .W(W), .SUBPIPE(1'b0)) dut0 (
    .clk, .rst_n, .load, .reg1_in, .reg2_in, .op_valid, .cycle,
    .res_valid(res_valid[0]), .res_cycle(res_cycle[0]), .res3(res3[0]), .res4(res4[0]),
    .chk_valid(chk_valid[0]), .out3(out3[0]), .out4(out4[0]), .err(err[0]));
  recomp_cd #(.Q(Q), .W(W), .SUBPIPE(1'b1)) dut1 (
    .clk, .rst_n, .load, .reg1_in, .reg2_in, .op_valid, .cycle,
    .res_valid(res_valid[1]), .res_cycle(res_cycle[1]), .res3(res3[1]), .res4(res4[1]),
    .chk_valid(chk_valid[1]), .out3(out3[1]), .out4(out4[1]), .err(err[1]));

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

  // record the op of cycle k with the registers it sees, then apply the load
  task automatic step(input int k, input bit v, input ed_cycle_e cy);
    h_valid[k] = v;
    h_cycle[k] = cy;
    h_e3[k] = ref_sub(m1, m2, Q);
    h_e4[k] = ref_add(m1, m2, Q);
    if (v && cy == CYC_RENO) begin
      h_n3[k] = h_e3[k-1];
      h_n4[k] = h_e4[k-1];
    end
    if (load) begin
      m1 = reg1_in;
      m2 = reg2_in;
    end
  endtask

  initial begin
    int k;
    bit preloaded;
    load = 0; op_valid = 0; cycle = CYC_NORM; reg1_in = 0; reg2_in = 0;
    m1 = 0; m2 = 0;
    for (int i = 0; i < NCYC; i++) h_valid[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    k = 3;
    preloaded = 0;
    while (k < NCYC - 20) begin
      if (!preloaded) begin
        @(negedge clk);
        repeat ($urandom_range(2)) begin
          load = 0; op_valid = 0;
          step(k, 0, CYC_NORM); k++;
          @(negedge clk);
        end
        load = 1; op_valid = 0;
        reg1_in = W'($urandom_range(Q - 1)); reg2_in = W'($urandom_range(Q - 1));
        step(k, 0, CYC_NORM); k++;
      end
      // Norm cycle, with an optional reload that corrupts the RENO pass
      @(negedge clk);
      op_valid = 1; cycle = CYC_NORM;
      load = ($urandom_range(3) == 0);
      if (load) begin
        if ($urandom_range(1) == 1)
          reg1_in = W'((m1 + 1 + $urandom_range(Q - 2)) % Q);
        else begin
          reg1_in = W'(m1);
          reg2_in = W'((m2 + 1 + $urandom_range(Q - 2)) % Q);
        end
        if ($urandom_range(1) == 1) reg2_in = W'(m2);
      end
      step(k, 1, CYC_NORM); k++;
      // RENO cycle, possibly loading the next set
      @(negedge clk);
      op_valid = 1; cycle = CYC_RENO;
      preloaded = ($urandom_range(1) == 1);
      load = preloaded;
      if (preloaded) begin
        n_b2b++;
        reg1_in = W'($urandom_range(Q - 1)); reg2_in = W'($urandom_range(Q - 1));
      end
      step(k, 1, CYC_RENO); k++;
    end
    @(negedge clk);
    op_valid = 0; load = 0;
    repeat (10) @(posedge clk);
    check(n_err > 500 && n_ok > 500 && n_b2b > 500, "all cases occurred", 0);
    $display("sets flagged=%0d clean=%0d back_to_back=%0d", n_err, n_ok, n_b2b);
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
        src = c - k;
        chk_src = c - k - 1;
        check(res_valid[k] == h_valid[src], "res_valid timing", k);
        if (h_valid[src]) begin
          check(res_cycle[k] == h_cycle[src], "res_cycle", k);
          check(longint'(res3[k]) == h_e3[src] && longint'(res4[k]) == h_e4[src],
                "pass result", k);
        end
        check(chk_valid[k] == (h_valid[chk_src] && h_cycle[chk_src] == CYC_RENO),
              "chk_valid timing", k);
        if (chk_valid[k]) begin
          check(longint'(out3[k]) == h_n3[chk_src] && longint'(out4[k]) == h_n4[chk_src],
                "checked out3/out4", k);
          check(err[k] == (h_e3[chk_src] != h_n3[chk_src] || h_e4[chk_src] != h_n4[chk_src]),
                "err flag", k);
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
