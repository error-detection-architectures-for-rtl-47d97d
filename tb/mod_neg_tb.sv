// mod_neg_tb: exhaustive check of the modular negation for q = 12289 and a
// small second modulus: y must equal (q - x) mod q for every x in [0, q).
module mod_neg_tb;
  import ntt_ref_pkg::*;
  localparam int unsigned Q  = 12289;
  localparam int unsigned W  = 16;
  localparam int unsigned Q2 = 17;
  localparam int unsigned W2 = 6;

  int checks = 0, failures = 0;
  logic [W-1:0]  x, y;
  logic [W2-1:0] x2, y2;

  mod_neg #(.Q(Q),  .W(W))  dut  (.x(x),  .y(y));
  mod_neg #(.Q(Q2), .W(W2)) dut2 (.x(x2), .y(y2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(Q); i++) begin
      x = W'(i);
      #1;
      checks++;
      if (longint'(y) != ref_neg(i, Q)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d", x, y);
      end
    end
    for (int i = 0; i < int'(Q2); i++) begin
      x2 = W2'(i);
      #1;
      checks++;
      if (longint'(y2) != ref_neg(i, Q2)) begin
        failures++;
        $display("FAIL q=17 x=%0d y=%0d", x2, y2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
