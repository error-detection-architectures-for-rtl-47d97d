// coeff_ram_tb: fills the 512-word RAM with random data, reads it back in
// random order and checks the registered read (one-cycle latency) and that
// rdata holds while re is low.
module coeff_ram_tb;
  localparam int unsigned DEPTH = 512;
  localparam int unsigned W     = 16;
  localparam int unsigned AW    = 9;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0] wdata, rdata, held;
  logic [W-1:0] model [DEPTH];

  always #5 clk = ~clk;

  coeff_ram #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = W'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // occasional overwrite of a random word
      we = ($urandom_range(7) == 0);
      waddr = AW'($urandom); wdata = W'($urandom);
      re = ($urandom_range(3) != 0);
      raddr = AW'($urandom);
      held = rdata;
      @(posedge clk); #1;
      checks++;
      if (re ? (rdata != model[raddr]) : (rdata != held)) begin
        failures++;
        if (failures < 10) $display("FAIL re=%b addr=%0d got %h", re, raddr, rdata);
      end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
