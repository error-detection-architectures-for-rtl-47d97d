// fault_coverage_tb: stuck-at fault campaign on the three constructions.
//
// 36 867 faults are injected into each construction (110 601 in all), on the
// operand line that feeds its arithmetic: the multiplier input of line D, the
// multiplier input of line B/A (behind the mode multiplexer), and the Reg2
// operand of the adder/subtractor pair. A third of the faults are single-bit,
// a third two-bit and a third multiple-bit (3 to 16 bits), each stuck-at 0 or
// stuck-at 1, and each either permanent (present in the Norm and the RENO
// pass) or transient (present in one of the two passes only). Every fault
// gets fresh random operands; one operand set is processed every two cycles.
//
// For every fault the campaign records whether it was activated (changed the
// operand line in at least one pass), whether it corrupted the Norm result,
// and whether the error output fired. It checks that no error is flagged for
// a fault that was not activated, that every transient fault that corrupts
// the result is flagged, and that at least 99 % of the activated faults are
// flagged; it prints the coverage of each construction.
module fault_coverage_tb;
  import ntt_ed_pkg::*;
  import ntt_ref_pkg::*;
  localparam int unsigned Q  = 12289;
  localparam int unsigned W  = 16;
  localparam int NFAULT = 36867;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic op_valid, load, s;
  ed_cycle_e cycle;
  logic [W-1:0] d, r1, a, b, r2, reg1_in, reg2_in;

  // fault masks per construction and pass: [0] Norm, [1] RENO
  logic [W-1:0] m0_d [2], m1_d [2], m0_ba [2], m1_ba [2], m0_cd [2], m1_cd [2];

  logic rv_d, rv_ba, rv_cd, cv_d, cv_ba, cv_cd, e_d, e_ba, e_cd;
  ed_cycle_e rc_d, rc_ba, rc_cd;
  logic [W-1:0] res_d, res_ba, res3, res4, m2, out2, out3, out4;

  reno_d u_d (.clk, .rst_n, .op_valid, .cycle, .d, .ram1(r1),
              .res_valid(rv_d), .res_cycle(rc_d), .res(res_d),
              .chk_valid(cv_d), .m2, .err(e_d));
  reno_ba u_ba (.clk, .rst_n, .op_valid, .cycle, .s, .a, .b, .ram2(r2),
                .res_valid(rv_ba), .res_cycle(rc_ba), .res(res_ba),
                .chk_valid(cv_ba), .out2, .err(e_ba));
  recomp_cd u_cd (.clk, .rst_n, .load, .reg1_in, .reg2_in, .op_valid, .cycle,
                  .res_valid(rv_cd), .res_cycle(rc_cd), .res3, .res4,
                  .chk_valid(cv_cd), .out3, .out4, .err(e_cd));

  always #5 clk = ~clk;

  // faulty operand lines: the fault-free line value with the stuck-at masks
  // of the current pass applied
  logic [W-1:0] f_d, f_ba, f_cd;
  always_comb begin
    int p;
    p = (cycle == CYC_RENO) ? 1 : 0;
    f_d  = stuck((cycle == CYC_RENO) ? u_d.d_neg : u_d.d, m0_d[p], m1_d[p]);
    f_ba = stuck((cycle == CYC_RENO) ? u_ba.u_reno.d_neg : u_ba.u_reno.d, m0_ba[p], m1_ba[p]);
    f_cd = stuck((cycle == CYC_RENO) ? u_cd.reg2_neg : u_cd.reg2, m0_cd[p], m1_cd[p]);
  end

  initial begin
    repeat (3 * NFAULT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // per-fault bookkeeping, in issue order
  typedef struct {
    bit act_d, act_ba, act_cd;        // fault changed the operand line
    bit trans;                        // transient fault
    longint unsigned g_d, g_ba, g3, g4;  // fault-free results
  } rec_t;
  rec_t recs [$];

  int inj = 0;
  int act [3] = '{0, 0, 0}, det [3] = '{0, 0, 0}, cor [3] = '{0, 0, 0}, silent [3] = '{0, 0, 0};

  // random fault mask with the given number of bits
  function automatic logic [W-1:0] rnd_mask(input int nbits);
    logic [W-1:0] m = '0;
    while ($countones(m) < nbits) m[$urandom_range(W - 1)] = 1'b1;
    return m;
  endfunction

  // stuck-at applied to a value
  function automatic logic [W-1:0] stuck(input logic [W-1:0] v, input logic [W-1:0] m0,
                                         input logic [W-1:0] m1);
    return (v & ~m0) | m1;
  endfunction

  // pick a fault of fault index i for one construction
  task automatic pick(input int i, output logic [W-1:0] m0 [2], output logic [W-1:0] m1 [2],
                      output bit trans);
    int cat, nb, kind;
    logic [W-1:0] m;
    cat = i % 3;                                  // single, two-bit, multiple-bit
    nb  = (cat == 0) ? 1 : (cat == 1) ? 2 : $urandom_range(3, W);
    m   = rnd_mask(nb);
    kind = (i / 3) % 6;                           // stuck-at value x duration
    for (int p = 0; p < 2; p++) begin m0[p] = '0; m1[p] = '0; end
    trans = (kind >= 2);
    for (int p = 0; p < 2; p++) begin
      // permanent: both passes; transient: Norm (kind 2, 3) or RENO (4, 5)
      if (kind < 2 || (kind < 4 && p == 0) || (kind >= 4 && p == 1)) begin
        if (kind[0]) m1[p] = m; else m0[p] = m;
      end
    end
  endtask

  initial begin
    rec_t rc;
    bit tr;
    logic [W-1:0] dneg, xneg, r2neg, x;
    op_valid = 0; load = 0; s = 0; cycle = CYC_NORM;
    d = 0; r1 = 1; a = 0; b = 0; r2 = 1; reg1_in = 0; reg2_in = 0;
    for (int p = 0; p < 2; p++) begin
      m0_d[p] = 0; m1_d[p] = 0; m0_ba[p] = 0; m1_ba[p] = 0; m0_cd[p] = 0; m1_cd[p] = 0;
    end
    force u_d.mul_op = f_d;
    force u_ba.u_reno.mul_op = f_ba;
    force u_cd.op2 = f_cd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // first Reg1/Reg2 load
    @(negedge clk);
    load = 1;
    reg1_in = W'($urandom_range(Q - 1)); reg2_in = W'($urandom_range(Q - 1));
    for (int i = 0; i < NFAULT; i++) begin
      // Norm cycle: new operands for the multipliers, Reg1/Reg2 already loaded
      @(negedge clk);
      load = 0;
      d  = W'($urandom_range(Q - 1)); r1 = W'($urandom_range(1, Q - 1));
      a  = W'($urandom_range(Q - 1)); b  = W'($urandom_range(Q - 1));
      r2 = W'($urandom_range(1, Q - 1)); s = 1'($urandom);
      pick(i, m0_d, m1_d, tr);
      pick(i, m0_ba, m1_ba, tr);
      pick(i, m0_cd, m1_cd, tr);
      rc.trans = tr;
      x = s ? a : b;
      dneg  = W'(ref_neg(d, Q));
      xneg  = W'(ref_neg(x, Q));
      r2neg = W'(ref_neg(reg2_in, Q));
      rc.act_d  = stuck(d, m0_d[0], m1_d[0]) != d || stuck(dneg, m0_d[1], m1_d[1]) != dneg;
      rc.act_ba = stuck(x, m0_ba[0], m1_ba[0]) != x || stuck(xneg, m0_ba[1], m1_ba[1]) != xneg;
      rc.act_cd = stuck(reg2_in, m0_cd[0], m1_cd[0]) != reg2_in ||
                  stuck(r2neg, m0_cd[1], m1_cd[1]) != r2neg;
      rc.g_d  = ref_mont(d, r1, Q, W);
      rc.g_ba = ref_mont(x, r2, Q, W);
      rc.g3   = ref_sub(reg1_in, reg2_in, Q);
      rc.g4   = ref_add(reg1_in, reg2_in, Q);
      recs.push_back(rc);
      op_valid = 1; cycle = CYC_NORM;
      inj++;
      // RENO cycle, with the next Reg1/Reg2 load
      @(negedge clk);
      cycle = CYC_RENO;
      load = 1;
      reg1_in = W'($urandom_range(Q - 1)); reg2_in = W'($urandom_range(Q - 1));
    end
    @(negedge clk);
    op_valid = 0; load = 0;
    repeat (6) @(negedge clk);
    check(recs.size() == 0, "every fault was checked");
    begin
      string nm [3] = '{"RENO on D      ", "RENO on B and A", "recomputing C/D"};
      for (int k = 0; k < 3; k++) begin
        $display("%s: injected %0d  activated %0d  detected %0d  corrupting %0d  silent %0d  coverage %0.2f%% of activated",
                 nm[k], inj, act[k], det[k], cor[k], silent[k],
                 100.0 * real'(det[k]) / real'(act[k]));
        check(det[k] * 100 >= act[k] * 99, "coverage of activated faults at least 99%");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // all three construction checks come out in the same cycle
  always @(negedge clk) begin
    rec_t rc;
    bit c_d, c_ba, c_cd;
    #2;
    if (rst_n && cv_d) begin
      check(cv_ba && cv_cd, "checks aligned");
      check(recs.size() > 0, "check with a fault outstanding");
      if (recs.size() > 0) begin
        rc = recs.pop_front();
        c_d  = longint'(m2) != rc.g_d;
        c_ba = longint'(out2) != rc.g_ba;
        c_cd = longint'(out3) != rc.g3 || longint'(out4) != rc.g4;
        if (rc.act_d)  act[0]++;
        if (rc.act_ba) act[1]++;
        if (rc.act_cd) act[2]++;
        if (e_d)  det[0]++;
        if (e_ba) det[1]++;
        if (e_cd) det[2]++;
        if (c_d)  cor[0]++;
        if (c_ba) cor[1]++;
        if (c_cd) cor[2]++;
        if (c_d && !e_d)   silent[0]++;
        if (c_ba && !e_ba) silent[1]++;
        if (c_cd && !e_cd) silent[2]++;
        check(rc.act_d  || !e_d,  "no alarm for an inactive fault (D)");
        check(rc.act_ba || !e_ba, "no alarm for an inactive fault (B/A)");
        check(rc.act_cd || !e_cd, "no alarm for an inactive fault (C/D)");
        if (rc.trans) begin
          check(!c_d  || e_d,  "transient corruption flagged (D)");
          check(!c_ba || e_ba, "transient corruption flagged (B/A)");
          check(!c_cd || e_cd, "transient corruption flagged (C/D)");
        end
      end
    end
  end
endmodule
