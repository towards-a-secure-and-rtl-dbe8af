// aes_sbox_par: parity-protected AES S-box ROM (forward or inverse).
//
// Each ROM word holds the substituted byte plus one even-parity bit, fixed
// when the table is built. Every read recomputes the parity of the byte and
// compares it with the stored bit; a mismatch is reported on par_err in the
// same cycle. The table is a hard-wired ROM (the faster of the two S-box
// styles; an S-box held in block RAM is not modelled here).
//
// Interface: addr in, data and par_err out, purely combinational.
// inj_flip is XORed onto the word read out and models an upset ROM cell for
// testing; tie it to zero in use.
module aes_sbox_par
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0] addr,
  input  logic [8:0] inj_flip,
  output logic [7:0] data,
  output logic       par_err
);
  localparam logic [256*9-1:0] ROM = aes_sbox_table(INVERSE);

  logic [8:0] word;

  always_comb begin
    word    = ROM[9*addr +: 9] ^ inj_flip;
    data    = word[7:0];
    par_err = (^word[7:0]) != word[8];
  end
endmodule
