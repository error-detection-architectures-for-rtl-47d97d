// coeff_ram: RAM1 / RAM2, the memories that supply the second multiplication
// operand (twiddle factors in NTT mode, the other polynomial's coefficients in
// multiplication mode).
//
// One write port, filled by the software side of the hardware/software
// co-design, and one read port with a registered output and a read enable, so
// that the word read stays on rdata for as long as the operand set it belongs
// to is being processed (Norm and RENO cycle). DEPTH defaults to n = 512
// words of W bits. Written as an array; it maps onto a block RAM. The
// organisation (depth, ports, read latency) is this design's choice: the
// published scheme only names RAM1 and RAM2.
module coeff_ram #(
  parameter int unsigned DEPTH = ntt_ed_pkg::N_DEF,
  parameter int unsigned W     = ntt_ed_pkg::W_DEF,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
