// norm_reno_ctrl: the Norm/RENO select generator.
//
// Every operand set is processed twice: one Norm cycle, then one RENO cycle in
// which the constructions switch their multiplexers to the encoded operands.
// Without further compensation this doubles the time of the unit (2n cycles
// instead of n).
//
// Handshake: the upstream side offers an operand set with in_valid; it is taken
// (load = 1) in a cycle where in_ready is high. The cycle after a load is the
// Norm cycle (op_valid = 1, cycle = CYC_NORM), the one after it the RENO cycle
// (cycle = CYC_RENO). in_ready is high except in a Norm cycle, so back-to-back
// sets run at one set every two cycles with no idle cycle.
// The two passes per set follow the published scheme; the handshake is this design's.
module norm_reno_ctrl (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  output logic                  load,
  output logic                  op_valid,
  output ntt_ed_pkg::ed_cycle_e cycle
);
  import ntt_ed_pkg::*;

  typedef enum logic [1:0] {ST_IDLE, ST_NORM, ST_RENO} state_e;
  state_e state;

  assign in_ready = (state != ST_NORM);
  assign load     = in_valid && in_ready;
  assign op_valid = (state != ST_IDLE);
  assign cycle    = (state == ST_RENO) ? CYC_RENO : CYC_NORM;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
    end else begin
      unique case (state)
        ST_IDLE: if (load) state <= ST_NORM;
        ST_NORM: state <= ST_RENO;
        ST_RENO: state <= load ? ST_NORM : ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  a_no_load_in_norm: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_NORM) |-> !load);
endmodule
