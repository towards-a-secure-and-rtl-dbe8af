// err_monitor: gathers the detection signals of all hardened blocks and
// passes them to the operating system, which arbitrates fault tolerance.
//
// Each source (see iu_pkg SRC_*) is a one-cycle pulse per detection and
// belongs to one of three classes:
//   local   - already corrected where it happened (cache refill after a
//             parity error, re-execution after a transient in the
//             pipeline). Only logged.
//   central - cannot be corrected in place (upset pipeline or register-file
//             word, transient seen by a detection-only stage). Raises
//             rollback_req, which asks the OS to restore the task state
//             saved at the last context switch; it stays high until
//             rollback_ack.
//   mixed   - handled in place but worth telling the OS (the cryptographic
//             IP aborted, and may have wiped its key). Raises irq, for
//             example to erase other secrets or raise an alarm; it stays high
//             until irq_ack.
// For every source a sticky flag and an 8-bit saturating counter are kept;
// clr clears them. Requests and logs update one cycle after the pulse.
//
// The three classes and the OS at the centre follow the original system's
// protection scheme; the register-level interface is this design's own.
module err_monitor
  import iu_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ERR_NSRC-1:0] err_in,
  input  logic                rollback_ack,
  input  logic                irq_ack,
  input  logic                clr,
  output logic                rollback_req,
  output logic                irq,
  output logic [ERR_NSRC-1:0] sticky,
  output logic [7:0]          count [ERR_NSRC]
);
  logic any_central, any_mixed;

  always_comb begin
    any_central = 1'b0;
    any_mixed   = 1'b0;
    for (int unsigned i = 0; i < ERR_NSRC; i++) begin
      if (err_in[i] && src_class(i) == ERR_CENTRAL) any_central = 1'b1;
      if (err_in[i] && src_class(i) == ERR_MIXED)   any_mixed   = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rollback_req <= 1'b0;
      irq          <= 1'b0;
      sticky       <= '0;
      for (int i = 0; i < ERR_NSRC; i++) count[i] <= '0;
    end else begin
      if (any_central)       rollback_req <= 1'b1;
      else if (rollback_ack) rollback_req <= 1'b0;
      if (any_mixed)         irq <= 1'b1;
      else if (irq_ack)      irq <= 1'b0;
      if (clr) begin
        sticky <= '0;
        for (int i = 0; i < ERR_NSRC; i++) count[i] <= '0;
      end else begin
        sticky <= sticky | err_in;
        for (int i = 0; i < ERR_NSRC; i++)
          if (err_in[i] && count[i] != 8'hff) count[i] <= count[i] + 8'd1;
      end
    end
  end
endmodule
