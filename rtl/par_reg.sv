// par_reg: register protected against single-event upsets by one parity bit.
//
// The even parity of d is computed when the register is written and stored
// beside it. Every cycle the parity of the stored value is recomputed and
// compared with the stored bit through a two-rail checker, in parallel with
// normal use of q, so the check adds no logic on the data path. err (and the
// non-complementary two-rail pair chk) is high in every cycle in which the stored word and its parity disagree (an odd
// number of flipped bits). The register resets to zero with consistent parity.
//
// inj_flip is XORed into the stored word at the clock edge and models an
// upset for testing; tie it to zero in use.
module par_reg #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         err,
  output logic [1:0]   chk,      // two-rail form of the check, complementary when fine
  input  logic [W-1:0] inj_flip
);
  logic p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
      p <= 1'b0;
    end else begin
      if (we) begin
        q <= d ^ inj_flip;
        p <= ^d;
      end else begin
        q <= q ^ inj_flip;
      end
    end
  end

  dual_rail_checker #(.N(1)) u_chk (
    .a  (^q),
    .b  (~p),
    .z  (chk),
    .err(err)
  );
endmodule
