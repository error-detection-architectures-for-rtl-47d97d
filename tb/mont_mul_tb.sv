// mont_mul_tb: random and corner operand pairs through the combinational
// and the subpipelined Montgomery multiplier; both must give
// a * b * 2^-16 mod q, the subpipelined one exactly one cycle later.
module mont_mul_tb;
  import ntt_ref_pkg::*;
  localparam int unsigned Q = 12289;
  localparam int unsigned W = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] a, b, p0, p1;
  longint unsigned exp_prev;

  always #5 clk = ~clk;

  mont_mul #(.Q(Q), .W(W), .SUBPIPE(1'b0)) dut0 (.clk, .rst_n, .a, .b, .p(p0));
  mont_mul #(.Q(Q), .W(W), .SUBPIPE(1'b1)) dut1 (.clk, .rst_n, .a, .b, .p(p1));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e;
    a = 0; b = 0; exp_prev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      case (i)
        0: begin a = 0;         b = 0;         end
        1: begin a = W'(Q - 1); b = W'(Q - 1); end
        2: begin a = 1;         b = W'(Q - 1); end
        3: begin a = W'(Q - 1); b = 1;         end
        default: begin a = W'($urandom_range(Q - 1)); b = W'($urandom_range(Q - 1)); end
      endcase
      #1;
      e = ref_mont(a, b, Q, W);
      checks++;
      if (longint'(p0) != e) begin
        failures++;
        if (failures < 10) $display("FAIL comb a=%0d b=%0d p=%0d exp=%0d", a, b, p0, e);
      end
      @(posedge clk); #1;
      if (i > 0) begin
        checks++;
        if (longint'(p1) != e) begin
          failures++;
          if (failures < 10) $display("FAIL pipe a=%0d b=%0d p=%0d exp=%0d", a, b, p1, e);
        end
      end
      exp_prev = e;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
