// pp_alu_stage: integer-unit execute stage protected by parity prediction.
//
// The stage registers its operands (op, a, b) and computes y = L(op, a, b)
// with the ALU L. A second ALU instance, the replica L', feeds an XOR tree C
// that gives the predicted parity P_pre; the actual parity P is the XOR of
// y. A two-rail checker compares P with P_pre. A single-event transient that
// flips an odd number of bits of y makes them differ.
//
//   RECOVERY = 1 (default): the result register is written only when the
//     parity agrees. On a mismatch the operand registers keep their value
//     (in_ready drops, recovering is high) and the same operation is
//     computed again in the next cycle, which removes a transient error.
//     Each mismatch also pulses set_err, for logging as a locally handled
//     error.
//   RECOVERY = 0: detection only. The result is written anyway and set_err
//     is raised for the operating system to roll back.
//
// Against single-event upsets, the operand and result registers are
// par_reg instances: parity written with the value and checked every cycle;
// seu_err reports a mismatch in a live register (centrally handled, since
// the correct value is lost).
//
// Timing: an operand accepted at a clock edge (in_valid && in_ready) gives
// out_valid and result one cycle later, plus one cycle per recovery.
//
// Note for synthesis: L and L' are identical, so a tool that merges equal
// logic would remove the replica; keep the two u_alu instances apart
// (hierarchy kept, no resource sharing), as the parity-prediction scheme
// relies on an optimised but separate predictor.
//
// The parity-prediction structure (replica plus parity coder, double-rail
// comparison, register update only on a correct code) follows the
// protection scheme described for the pipeline. The ALU operation set,
// handshake and error pulses are this design's own choices.
//
// inj_set (XORed onto y, a transient) and inj_seu (flips stored bits of
// operand a) are fault-injection inputs for testing; tie them to zero.
module pp_alu_stage
  import iu_pkg::*;
#(
  parameter bit RECOVERY = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] result,
  output logic        set_err,
  output logic        recovering,
  output logic        seu_err,
  output logic [1:0]  chk_z,      // two-rail output of the parity checker
  input  logic [31:0] inj_set,
  input  logic [31:0] inj_seu
);
  logic        valid_q;
  logic [2:0]  op_q;
  logic [31:0] a_q, b_q, y, y_rep;
  logic        perr_op, perr_a, perr_b, perr_res;
  logic        p_act, p_pre, mismatch, res_we;

  par_reg #(.W(3))  u_op (.clk, .rst_n, .we(in_ready), .d(op), .q(op_q), .err(perr_op), .chk(), .inj_flip(3'd0));
  par_reg #(.W(32)) u_a  (.clk, .rst_n, .we(in_ready), .d(a),  .q(a_q),  .err(perr_a),  .chk(), .inj_flip(inj_seu));
  par_reg #(.W(32)) u_b  (.clk, .rst_n, .we(in_ready), .d(b),  .q(b_q),  .err(perr_b),  .chk(), .inj_flip(32'd0));

  // L and its replica L'
  logic [31:0] y_raw;
  iu_alu u_alu     (.op(alu_op_e'(op_q)), .a(a_q), .b(b_q), .y(y_raw));
  iu_alu u_alu_rep (.op(alu_op_e'(op_q)), .a(a_q), .b(b_q), .y(y_rep));
  assign y = y_raw ^ inj_set;

  assign p_act = ^y;       // parity of the actual result
  assign p_pre = ^y_rep;   // C: parity coder on the replica

  dual_rail_checker #(.N(1)) u_pchk (.a(p_act), .b(~p_pre), .z(chk_z), .err(mismatch));

  assign set_err    = valid_q && mismatch;
  assign recovering = RECOVERY && set_err;
  assign in_ready   = !recovering;
  assign res_we     = valid_q && !recovering;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (in_ready) valid_q <= in_valid;
      out_valid <= res_we;
    end
  end

  par_reg #(.W(32)) u_res (.clk, .rst_n, .we(res_we), .d(y), .q(result), .err(perr_res), .chk(), .inj_flip(32'd0));

  assign seu_err = (valid_q && (perr_op || perr_a || perr_b)) || (out_valid && perr_res);
endmodule
