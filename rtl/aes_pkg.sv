// aes_pkg: constants, types and pure functions shared by the hardened AES IP.
//
// The S-box tables are not stored as literal tables: aes_sbox_table() builds
// them at elaboration from the AES definition (multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63). Each entry is
// 9 bits wide: {even-parity bit, byte}, which is how the protected ROM keeps
// one parity bit per byte.
//
// Block layout follows FIPS-197: byte 0 of the 128-bit block is bits
// [127:120]; state row r, column c holds byte r + 4*c.
package aes_pkg;

  typedef enum logic [1:0] {
    KEY128 = 2'd0,
    KEY192 = 2'd1,
    KEY256 = 2'd2
  } keylen_e;

  // Fault-injection targets. The injection port exists only so that a test
  // can model an SEU (flipped storage bit) or SET (flipped combinational
  // value) and watch the protection react; it is held at INJ_NONE in use.
  typedef enum logic [2:0] {
    INJ_NONE      = 3'd0,
    INJ_SBOX_FWD  = 3'd1,  // flip a stored bit of a forward S-box ROM word
    INJ_SBOX_INV  = 3'd2,  // flip a stored bit of an inverse S-box ROM word
    INJ_SBOX_KEY  = 3'd3,  // flip a stored bit of a key-schedule S-box ROM word
    INJ_KEY_REG   = 3'd4,  // SEU in the round-key store
    INJ_STATE_REG = 3'd5,  // SEU in the state register
    INJ_ROUND_SET = 3'd6,  // SET on the round-function output
    INJ_KEYGEN_SET= 3'd7   // SET on the key-expansion output
  } aes_inj_e;

  typedef struct packed {
    aes_inj_e   target;
    logic [7:0] sel;     // which S-box / word / bit, meaning depends on target
  } aes_inj_t;

  // Cause of the last detected error.
  typedef struct packed {
    logic sbox_par;    // S-box ROM parity
    logic key_par;     // round-key store parity
    logic state_par;   // state / saved-state register parity
    logic round_chk;   // inverse-round (timing redundancy) mismatch
    logic keygen_chk;  // key-expansion recomputation mismatch
  } aes_err_t;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // a^254 = a^-1 in GF(2^8) (0 maps to 0).
  function automatic logic [7:0] ginv(input logic [7:0] a);
    logic [7:0] sq;
    logic [7:0] r;
    r  = 8'h01;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      sq = gmul(sq, sq);  // a^(2^i)
      r  = gmul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox_fn(input logic [7:0] x);
    logic [7:0] b;
    b = ginv(x);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // Packed table of 256 9-bit words {parity, value}; entry i at [9*i +: 9].
  function automatic logic [256*9-1:0] aes_sbox_table(input bit inverse);
    logic [256*9-1:0] t;
    logic [7:0] s;
    t = '0;
    for (int i = 0; i < 256; i++) begin
      s = sbox_fn(8'(i));
      if (inverse) t[9*s +: 9] = {^8'(i), 8'(i)};
      else         t[9*i +: 9] = {^s, s};
    end
    return t;
  endfunction

  function automatic logic [7:0] get_byte(input logic [127:0] b, input int i);
    return b[127 - 8*i -: 8];
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] b);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(r + 4*c) -: 8] = get_byte(b, r + 4*((c + r) % 4));
    return o;
  endfunction

  function automatic logic [127:0] inv_shift_rows(input logic [127:0] b);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(r + 4*((c + r) % 4)) -: 8] = get_byte(b, r + 4*c);
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] b);
    logic [127:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(b, 4*c);   a1 = get_byte(b, 4*c+1);
      a2 = get_byte(b, 4*c+2); a3 = get_byte(b, 4*c+3);
      o[127 - 8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[127 - 8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[127 - 8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[127 - 8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction

  function automatic logic [127:0] inv_mix_columns(input logic [127:0] b);
    logic [127:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(b, 4*c);   a1 = get_byte(b, 4*c+1);
      a2 = get_byte(b, 4*c+2); a3 = get_byte(b, 4*c+3);
      o[127 - 8*(4*c)   -: 8] = gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09);
      o[127 - 8*(4*c+1) -: 8] = gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d);
      o[127 - 8*(4*c+2) -: 8] = gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b);
      o[127 - 8*(4*c+3) -: 8] = gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e);
    end
    return o;
  endfunction

  // One even-parity bit per byte.
  function automatic logic [15:0] byte_parity128(input logic [127:0] b);
    logic [15:0] p;
    for (int i = 0; i < 16; i++) p[15 - i] = ^b[127 - 8*i -: 8];
    return p;
  endfunction

  function automatic logic [3:0] byte_parity32(input logic [31:0] w);
    return {^w[31:24], ^w[23:16], ^w[15:8], ^w[7:0]};
  endfunction

  function automatic int unsigned nk_of(input keylen_e k);
    case (k)
      KEY192:  return 6;
      KEY256:  return 8;
      default: return 4;
    endcase
  endfunction

  function automatic int unsigned nr_of(input keylen_e k);
    return nk_of(k) + 6;
  endfunction

endpackage
