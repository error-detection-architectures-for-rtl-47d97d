// norm_reno_ctrl_tb: random in_valid patterns against a cycle model of the
// Norm/RENO sequence: every accepted set gives one Norm cycle and then one
// RENO cycle; back-to-back sets go at one per two cycles.
module norm_reno_ctrl_tb;
  import ntt_ed_pkg::*;

  int checks = 0, failures = 0;
  int n_loads = 0, n_b2b = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, load, op_valid;
  ed_cycle_e cycle;
  int model;   // 0 idle, 1 Norm, 2 RENO

  always #5 clk = ~clk;

  norm_reno_ctrl dut (.clk, .rst_n, .in_valid, .in_ready, .load, .op_valid, .cycle);

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
      if (failures < 10) $display("FAIL %s at %0t (model %0d)", what, $time, model);
    end
  endtask

  initial begin
    bit exp_load;
    in_valid = 0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      in_valid = (i < 3000) ? ($urandom_range(3) != 0) : ($urandom_range(3) == 0);
      #1;
      exp_load = in_valid && (model != 1);
      check(in_ready == (model != 1), "in_ready");
      check(load == exp_load, "load");
      check(op_valid == (model != 0), "op_valid");
      if (model != 0) check(cycle == ((model == 2) ? CYC_RENO : CYC_NORM), "cycle");
      if (exp_load) n_loads++;
      if (exp_load && model == 2) n_b2b++;
      @(posedge clk);
      case (model)
        0: model = exp_load ? 1 : 0;
        1: model = 2;
        default: model = exp_load ? 1 : 0;
      endcase
    end
    check(n_loads > 1000 && n_b2b > 500, "loads and back-to-back loads happened");
    $display("loads=%0d back_to_back=%0d", n_loads, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
