// ntt_ed_pkg: constants, types and modular-arithmetic helpers shared by the
// error-detection datapath of the NTT unit.
//
// The default field is the NewHope one, q = 12289 with n = 512 and k = 3.
// Each coefficient travels in a field of ceil(log2(k*q)) = 16 bits, the
// "log2(kq)" field width of the published operand word; the
// values themselves are kept fully reduced, in [0, q), which is this design's
// choice. Montgomery reduction uses R = 2^16 (also this design's choice).
//
// Every arithmetic helper takes q as an argument so that the modules can be
// parameterised with other moduli.
package ntt_ed_pkg;

  // NewHope parameters
  localparam int unsigned Q_DEF = 12289;
  localparam int unsigned N_DEF = 512;
  localparam int unsigned K_DEF = 3;
  // coefficient field width: ceil(log2(k*q))
  localparam int unsigned W_DEF = $clog2(K_DEF * Q_DEF);

  // which of the two recomputing passes a datapath is in
  typedef enum logic {
    CYC_NORM = 1'b0,  // operands as they are
    CYC_RENO = 1'b1   // operands encoded (negated), result decoded
  } ed_cycle_e;

  // (-x) mod q for x in [0, q)
  function automatic logic [31:0] mod_neg32(input logic [31:0] x, input logic [31:0] q);
    return (x == 32'd0) ? 32'd0 : q - x;
  endfunction

  // (a + b) mod q for a, b in [0, q)
  function automatic logic [31:0] mod_add32(input logic [31:0] a, input logic [31:0] b,
                                            input logic [31:0] q);
    logic [32:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= {1'b0, q}) ? 32'(s - {1'b0, q}) : s[31:0];
  endfunction

  // (a - b) mod q for a, b in [0, q)
  function automatic logic [31:0] mod_sub32(input logic [31:0] a, input logic [31:0] b,
                                            input logic [31:0] q);
    return (a >= b) ? a - b : a + q - b;
  endfunction

  // -q^{-1} mod 2^rbits, by Newton iteration on the 2-adic inverse (q odd)
  function automatic logic [63:0] mont_qneg_inv(input logic [63:0] q, input int unsigned rbits);
    logic [63:0] inv;
    logic [63:0] mask;
    inv  = q;                   // correct to 3 bits for odd q
    for (int i = 0; i < 6; i++) inv = inv * (64'd2 - q * inv);
    mask = (rbits >= 64) ? '1 : ((64'd1 << rbits) - 64'd1);
    return (64'd0 - inv) & mask;
  endfunction

endpackage
