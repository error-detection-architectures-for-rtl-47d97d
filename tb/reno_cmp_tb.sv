// reno_cmp_tb: pairs of Norm/RENO results, equal or different, with and
// without idle cycles between them. After each RENO result, chk_valid must
// pulse exactly one cycle later, carrying the Norm result, with err = 1 only
// when the pair differed.
module reno_cmp_tb;
  import ntt_ed_pkg::*;
  localparam int unsigned DW = 16;

  int checks = 0, failures = 0;
  int n_err = 0;
  logic clk = 0, rst_n = 0;
  logic res_valid;
  ed_cycle_e res_cycle;
  logic [DW-1:0] res, chk_res;
  logic chk_valid, err;

  always #5 clk = ~clk;

  reno_cmp #(.DW(DW)) dut (.clk, .rst_n, .res_valid, .res_cycle, .res,
                           .chk_valid, .chk_res, .err);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [DW-1:0] nv, rv;
    bit differ;
    res_valid = 0; res_cycle = CYC_NORM; res = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      nv = DW'($urandom);
      differ = ($urandom_range(3) == 0);
      rv = differ ? nv ^ DW'(1 << $urandom_range(DW - 1)) : nv;
      // Norm result
      @(negedge clk);
      res_valid = 1; res_cycle = CYC_NORM; res = nv;
      @(posedge clk); #1;
      check(!chk_valid, "no check after a Norm result");
      // optional idle cycles
      @(negedge clk);
      res_valid = 0; res = DW'($urandom);
      repeat ($urandom_range(2)) begin
        @(posedge clk); #1;
        check(!chk_valid, "no check while idle");
        @(negedge clk);
      end
      // RENO result
      res_valid = 1; res_cycle = CYC_RENO; res = rv;
      @(posedge clk); #1;
      check(chk_valid, "chk_valid one cycle after RENO");
      check(chk_res == nv, "chk_res is the Norm result");
      check(err == differ, "err matches the comparison");
      if (err) n_err++;
      @(negedge clk);
      res_valid = 0;
      @(posedge clk); #1;
      check(!chk_valid && !err, "pulses last one cycle");
    end
    check(n_err > 100, "errors were flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
