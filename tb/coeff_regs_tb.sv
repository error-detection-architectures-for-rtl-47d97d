// coeff_regs_tb: random words loaded on random cycles; A..D must take the
// 1st..4th fields one cycle after a load and hold otherwise.
module coeff_regs_tb;
  localparam int unsigned W = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load, s_in, s;
  logic [4*W-1:0] word;
  logic [W-1:0] a, b, c, d;
  logic [W-1:0] ea, eb, ec, ed;
  logic es;

  always #5 clk = ~clk;

  coeff_regs #(.W(W)) dut (.clk, .rst_n, .load, .word, .s_in, .a, .b, .c, .d, .s);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; word = '0; s_in = 0;
    ea = 0; eb = 0; ec = 0; ed = 0; es = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      load = ($urandom_range(1) == 1);
      word = {$urandom, $urandom};
      s_in = 1'($urandom);
      if (load) begin
        ea = word[W-1:0]; eb = word[2*W-1:W]; ec = word[3*W-1:2*W]; ed = word[4*W-1:3*W];
        es = s_in;
      end
      @(posedge clk); #1;
      checks++;
      if ({a, b, c, d, s} != {ea, eb, ec, ed, es}) begin
        failures++;
        if (failures < 10) $display("FAIL got %h %h %h %h %b exp %h %h %h %h %b",
                                    a, b, c, d, s, ea, eb, ec, ed, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
