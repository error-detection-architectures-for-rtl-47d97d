// ntt_ed_top_tb: end-to-end run of the protected NTT-unit segment at its
// default size (n = 512, q = 12289, 16-bit fields).
//
// 1. The software side fills RAM1 and RAM2 (512 words each, values in
//    [1, q-1]) through the write ports.
// 2. One polynomial-multiplication pass (s = 0) and one NTT pass (s = 1) of
//    n/4 = 128 operand words each stream through; the first half of each pass
//    is offered back to back, the second half with random gaps.
// 3. Three single-word runs with a stuck-at-1 fault forced on bit 0 of the
//    operand line of each construction in turn (multiplier input of line D,
//    multiplier input of line B/A, Reg2 operand of the adder/subtractor).
//    The operands are chosen so that the fault changes exactly one of the
//    two passes; the matching error output must fire, and only that one. The
//    sticky err_flag is checked and cleared after each.
// All outputs are compared with a reference model computed here, and the
// latencies (result 4 cycles and checked add/subtract 8 cycles after the
// accepting cycle, plus one per stage with SUBPIPE) and the rate of one word
// per two cycles in a back-to-back stream (2n cycles for n operands instead
// of n) are checked. The run
// counts each mechanism (both modes, Norm and RENO cycles, back-to-back
// acceptance, stalls, both stages busy, each error output, flag clear) and
// fails if one of them never happened.
module ntt_ed_top_tb;
  import ntt_ed_pkg::*;
  import ntt_ref_pkg::*;
  localparam int unsigned Q  = 12289;
  localparam int unsigned N  = 512;
  localparam int unsigned W  = 16;
  localparam int unsigned AW = 9;
  localparam int SP   = 0;            // SUBPIPE of the instance below
  localparam int LAT1 = 4 + SP;       // accept -> mul_valid
  localparam int LAT2 = 8 + 2 * SP;   // accept -> bf_valid

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic           ram1_we, ram2_we;
  logic [AW-1:0]  ram1_waddr, ram2_waddr, ram1_raddr, ram2_raddr;
  logic [W-1:0]   ram1_wdata, ram2_wdata;
  logic           in_valid, in_ready, s;
  logic [4*W-1:0] in_word;
  logic           mul_valid, bf_valid, err_d, err_ba, err_cd, err_clear, err_flag;
  logic [W-1:0]   m2, out2, out3, out4;

  ntt_ed_top dut (
    .clk, .rst_n,
    .ram1_we, .ram1_waddr, .ram1_wdata, .ram2_we, .ram2_waddr, .ram2_wdata,
    .in_valid, .in_ready, .in_word, .s, .ram1_raddr, .ram2_raddr,
    .mul_valid, .m2, .out2, .err_d, .err_ba,
    .bf_valid, .out3, .out4, .err_cd,
    .err_clear, .err_flag
  );

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint unsigned ram1_m [N], ram2_m [N];

  typedef struct {
    int              t_acc;
    int              fault;   // 0 none, 1 line D, 2 line B/A, 3 Reg2
    longint unsigned m2, out2, out3, out4;
  } exp_t;
  exp_t q1 [$], q2 [$];

  // mechanism counters
  int n_mul = 0, n_ntt = 0, n_norm = 0, n_reno = 0, n_b2b = 0, n_stall = 0;
  int n_overlap = 0, n_err_d = 0, n_err_ba = 0, n_err_cd = 0, n_clear = 0;
  int last_acc = -10;
  int t_first = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // offer one word; returns after it was accepted
  task automatic send(input logic [W-1:0] a, b, c, d, input bit mode,
                      input logic [AW-1:0] ra1, ra2, input int fault);
    exp_t e;
    longint unsigned mm;
    in_valid = 1;
    in_word = {d, c, b, a};
    s = mode;
    ram1_raddr = ra1;
    ram2_raddr = ra2;
    forever begin
      #1;
      if (in_ready) break;
      n_stall++;
      @(negedge clk);
    end
    if (cyc == last_acc + 2) n_b2b++;
    last_acc = cyc;
    if (mode) n_ntt++; else n_mul++;
    mm = ref_mont(d, ram1_m[ra1], Q, W);
    e.t_acc = cyc;
    e.fault = fault;
    e.m2    = mm;
    e.out2  = ref_mont(mode ? a : b, ram2_m[ra2], Q, W);
    e.out3  = ref_sub(mm, c, Q);
    e.out4  = ref_add(mm, c, Q);
    q1.push_back(e);
    q2.push_back(e);
    @(negedge clk);
    in_valid = 0;
  endtask

  function automatic logic [W-1:0] rnd_coef();
    return W'($urandom_range(Q - 1));
  endfunction

  function automatic logic [W-1:0] rnd_even();
    return W'(2 * $urandom_range(1, (Q - 1) / 2));
  endfunction

  // ---------------- monitor, mid-cycle
  always @(negedge clk) begin
    exp_t e;
    #2;
    if (rst_n) begin
      if (dut.op_valid1 && dut.cycle1 == CYC_NORM) n_norm++;
      if (dut.op_valid1 && dut.cycle1 == CYC_RENO) n_reno++;
      if (dut.op_valid1 && dut.op_valid2) n_overlap++;
      if (err_d)  n_err_d++;
      if (err_ba) n_err_ba++;
      if (err_cd) n_err_cd++;
      if (mul_valid) begin
        check(q1.size() > 0, "mul_valid with no word outstanding");
        if (q1.size() > 0) begin
          e = q1.pop_front();
          check(cyc - e.t_acc == LAT1, "stage 1 latency");
          if (e.fault != 1) check(longint'(m2) == e.m2, "m2");
          if (e.fault != 2) check(longint'(out2) == e.out2, "out2");
          check(err_d == (e.fault == 1), "err_d");
          check(err_ba == (e.fault == 2), "err_ba");
        end
      end else begin
        check(!err_d && !err_ba, "no stage 1 error without a check");
      end
      if (bf_valid) begin
        check(q2.size() > 0, "bf_valid with no word outstanding");
        if (q2.size() > 0) begin
          e = q2.pop_front();
          check(cyc - e.t_acc == LAT2, "stage 2 latency");
          if (e.fault != 1 && e.fault != 3) begin
            check(longint'(out3) == e.out3, "out3");
            check(longint'(out4) == e.out4, "out4");
          end
          check(err_cd == (e.fault == 3), "err_cd");
        end
      end else begin
        check(!err_cd, "no stage 2 error without a check");
      end
    end
  end

  task automatic drain();
    while (q2.size() > 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic stream(input bit mode);
    for (int i = 0; i < int'(N / 4); i++) begin
      if (i >= int'(N / 8)) repeat ($urandom_range(2)) @(negedge clk);
      send(rnd_coef(), rnd_coef(), rnd_coef(), rnd_coef(), mode,
           mode ? AW'($urandom) : AW'(4 * i), mode ? AW'($urandom) : AW'(4 * i + 1), 0);
      // rate: a back-to-back stream is taken at one word every two cycles
      if (i == 0) t_first = last_acc;
      if (i == int'(N / 8) - 1)
        check(last_acc - t_first == 2 * (int'(N / 8) - 1), "back-to-back rate of one word per two cycles");
    end
    drain();
  endtask

  task automatic flag_check(input string what);
    #2;
    check(err_flag, {"err_flag set after ", what});
    err_clear = 1;
    @(negedge clk);
    err_clear = 0;
    #2;
    check(!err_flag, {"err_flag cleared after ", what});
    if (!err_flag) n_clear++;
  endtask

  initial begin
    ram1_we = 0; ram2_we = 0; ram1_waddr = 0; ram2_waddr = 0;
    ram1_wdata = 0; ram2_wdata = 0; ram1_raddr = 0; ram2_raddr = 0;
    in_valid = 0; in_word = 0; s = 0; err_clear = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. software fills both RAMs
    for (int i = 0; i < int'(N); i++) begin
      @(negedge clk);
      ram1_we = 1; ram1_waddr = AW'(i); ram1_wdata = W'($urandom_range(1, Q - 1));
      ram2_we = 1; ram2_waddr = AW'(i); ram2_wdata = W'($urandom_range(1, Q - 1));
      ram1_m[i] = ram1_wdata;
      ram2_m[i] = ram2_wdata;
    end
    @(negedge clk);
    ram1_we = 0; ram2_we = 0;
    check(!err_flag, "no error after reset");
    // 2. one multiplication pass and one NTT pass
    stream(1'b0);
    stream(1'b1);
    check(!err_flag, "no error in fault-free passes");
    // 3. forced stuck-at-1 faults, one construction at a time
    for (int j = 0; j < 4; j++) begin
      force dut.u_reno_d.mul_op =
        (dut.u_reno_d.cycle == CYC_RENO ? dut.u_reno_d.d_neg : dut.u_reno_d.d) | W'(1);
      send(rnd_coef(), rnd_coef(), rnd_coef(), rnd_even(), 1'(j), AW'($urandom), AW'($urandom), 1);
      drain();
      release dut.u_reno_d.mul_op;
      flag_check("line D fault");
    end
    for (int j = 0; j < 4; j++) begin
      force dut.u_reno_ba.u_reno.mul_op =
        (dut.u_reno_ba.u_reno.cycle == CYC_RENO ? dut.u_reno_ba.u_reno.d_neg
                                                : dut.u_reno_ba.u_reno.d) | W'(1);
      send(rnd_even(), rnd_even(), rnd_coef(), rnd_coef(), 1'(j), AW'($urandom), AW'($urandom), 2);
      drain();
      release dut.u_reno_ba.u_reno.mul_op;
      flag_check("line B/A fault");
    end
    for (int j = 0; j < 4; j++) begin
      force dut.u_recomp_cd.op2 =
        (dut.u_recomp_cd.cycle == CYC_RENO ? dut.u_recomp_cd.reg2_neg : dut.u_recomp_cd.reg2) | W'(1);
      send(rnd_coef(), rnd_coef(), rnd_even(), rnd_coef(), 1'(j), AW'($urandom), AW'($urandom), 3);
      drain();
      release dut.u_recomp_cd.op2;
      flag_check("Reg2 fault");
    end
    // 4. fault-free again after release
    for (int i = 0; i < 8; i++)
      send(rnd_coef(), rnd_coef(), rnd_coef(), rnd_coef(), 1'(i), AW'($urandom), AW'($urandom), 0);
    drain();
    check(!err_flag, "no error after faults are released");

    $display("words: mul=%0d ntt=%0d  cycles: norm=%0d reno=%0d  back_to_back=%0d stalls=%0d",
             n_mul, n_ntt, n_norm, n_reno, n_b2b, n_stall);
    $display("both stages busy=%0d  errors: d=%0d ba=%0d cd=%0d  flag clears=%0d",
             n_overlap, n_err_d, n_err_ba, n_err_cd, n_clear);
    check(n_mul > 0,  "multiplication mode used");
    check(n_ntt > 0,  "NTT mode used");
    check(n_norm > 0 && n_norm == n_reno, "every Norm cycle had its RENO cycle");
    check(n_b2b > 0,  "back-to-back acceptance happened");
    check(n_stall > 0, "in_ready stall happened");
    check(n_overlap > 0, "both stages busy at once");
    check(n_err_d == 4 && n_err_ba == 4 && n_err_cd == 4, "each error output fired for each fault");
    check(n_clear == 12, "err_flag cleared");
    check(q1.size() == 0 && q2.size() == 0, "all words came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
