// aes_core_ft: AES-128/192/256 encryption and decryption core hardened
// against transient faults and fault-injection attacks.
//
// How it works
//   * Key schedule. key_load stores the cipher key and expands it into the
//     full round-key store (up to 60 32-bit words), one word per two cycles:
//     the first cycle computes w[i] = w[i-Nk] ^ f(w[i-1]) and writes it, the
//     second cycle runs f(w[i-1]) again through the same four S-boxes and
//     checks that w[i] ^ f(w[i-1]) gives back w[i-Nk] (timing redundancy on
//     key generation). Every key word carries one parity bit per byte,
//     checked whenever the word is read.
//   * Rounds. One full round (16 S-boxes, ShiftRows, MixColumns,
//     AddRoundKey) is computed per cycle. The next cycle applies the exact
//     inverse round to the result and compares it with the saved round input
//     (timing redundancy by inverse calculation). Encryption uses the forward
//     round to compute and the inverse round to check; decryption the other
//     way round, so both datapaths serve both directions.
//   * Storage. The state register and the saved input carry byte parity,
//     checked every cycle they are live. All 36 S-box ROMs store a parity bit
//     per byte, checked on every read that is used.
//   * Reaction. Any detection aborts the operation (no result is released),
//     pulses err and records err_cause. With self_reset set, the core also
//     wipes the round keys and state (it resets itself); otherwise the key is
//     kept and the processor decides what to do.
//
// Timing: encryption or decryption takes 2*Nr+2 cycles from the start pulse
// to the done pulse (22/26/30 for 128/192/256-bit keys); key expansion takes
// 2*(4*(Nr+1)-Nk)+1 cycles (81/93/105). Start is ignored while busy or when no
// valid key is loaded.
//
// The protection scheme (byte parity on key and state registers and on the
// S-boxes, inverse-round checks on rounds and key generation, self-reset or
// error signalling) follows the hardened AES IP this design reproduces. The
// round architecture (a whole round per cycle, a key schedule expanded in
// advance), the cycle counts and the error-reporting encoding are this
// design's own. The control state machine itself is not protected: a fault
// that makes it jump straight to S_OUT could release an unchecked result.
//
// inj is a fault-injection port for testing (see aes_pkg::aes_inj_e); hold
// it at INJ_NONE in use.
module aes_core_ft
  import aes_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // key
  input  logic [255:0]  key_in,      // key word 0 at [255:224]; 128/192-bit keys use the top bits
  input  keylen_e       key_len,
  input  logic          key_load,    // pulse, accepted when idle
  output logic          key_ready,   // round keys valid
  // data
  input  logic [127:0]  din,
  input  logic          decrypt,
  input  logic          start,       // pulse, accepted when idle and key_ready
  output logic [127:0]  dout,
  output logic          done,        // one-cycle pulse, dout valid from then on
  output logic          busy,
  // protection
  input  logic          self_reset,  // 1: wipe key and state on a detection
  output logic          err,         // one-cycle pulse on a detection
  output aes_err_t      err_cause,   // cause of the last detection
  input  aes_inj_t      inj
);

  typedef enum logic [2:0] {S_IDLE, S_KX_GEN, S_KX_CHK, S_RUN, S_CHK, S_OUT} state_e;
  state_e state;

  keylen_e      klen;
  logic [3:0]   nk, nr;
  logic [31:0]  w  [60];
  logic [3:0]   wp [60];
  logic [5:0]   kx_i;
  logic [2:0]   kx_cnt;
  logic [7:0]   rcon;
  logic [127:0] s, prev;
  logic [15:0]  s_par, prev_par;
  logic [3:0]   rnd;
  logic         dec_q;

  assign nk   = 4'(nk_of(klen));
  assign nr   = 4'(nr_of(klen));
  assign busy = (state != S_IDLE);

  // ---------------- key expansion datapath ----------------
  logic [31:0] kx_prev, kx_back, kx_sub_in, kx_sub, kx_temp, kx_new, kx_cur;
  logic [3:0]  kx_sbox_err;
  logic        kx_use_sub;

  assign kx_prev   = w[kx_i - 6'd1];
  assign kx_back   = w[kx_i - 6'(nk)];
  assign kx_cur    = w[kx_i];
  assign kx_sub_in = (kx_cnt == 3'd0) ? {kx_prev[23:0], kx_prev[31:24]} : kx_prev;
  assign kx_use_sub = (kx_cnt == 3'd0) || (nk == 4'd8 && kx_cnt == 3'd4);

  for (genvar j = 0; j < 4; j++) begin : g_kx_sbox
    aes_sbox_par #(.INVERSE(1'b0)) u_sbox (
      .addr    (kx_sub_in[31-8*j -: 8]),
      .inj_flip((inj.target == INJ_SBOX_KEY && inj.sel[5:4] == 2'(j)) ? 9'(1) << inj.sel[2:0] : 9'd0),
      .data    (kx_sub[31-8*j -: 8]),
      .par_err (kx_sbox_err[j])
    );
  end

  always_comb begin
    if (kx_cnt == 3'd0)  kx_temp = kx_sub ^ {rcon, 24'h0};
    else if (kx_use_sub) kx_temp = kx_sub;
    else                 kx_temp = kx_prev;
    kx_new = kx_back ^ kx_temp;
    if (inj.target == INJ_KEYGEN_SET) kx_new = kx_new ^ (32'd1 << inj.sel[4:0]);
  end

  // ---------------- round datapath ----------------
  logic [3:0]   rk_idx;
  logic [127:0] rk;
  logic [15:0]  rk_par;
  logic         last;
  logic [127:0] sb_out, isb_in, isb_out, fwd_out, inv_out, inv_pre;
  logic [15:0]  fsb_err, isb_err;

  always_comb begin
    if (state == S_IDLE || state == S_OUT) rk_idx = 4'd0;
    else                                   rk_idx = rnd;
    rk     = {w[4*rk_idx], w[4*rk_idx+1], w[4*rk_idx+2], w[4*rk_idx+3]};
    rk_par = {wp[4*rk_idx], wp[4*rk_idx+1], wp[4*rk_idx+2], wp[4*rk_idx+3]};
  end
  assign last = (rnd == nr);

  assign inv_pre = s ^ rk;
  assign isb_in  = inv_shift_rows(last ? inv_pre : inv_mix_columns(inv_pre));

  for (genvar j = 0; j < 16; j++) begin : g_sbox
    aes_sbox_par #(.INVERSE(1'b0)) u_fwd (
      .addr    (s[127-8*j -: 8]),
      .inj_flip((inj.target == INJ_SBOX_FWD && inj.sel[7:4] == 4'(j)) ? 9'(1) << inj.sel[2:0] : 9'd0),
      .data    (sb_out[127-8*j -: 8]),
      .par_err (fsb_err[j])
    );
    aes_sbox_par #(.INVERSE(1'b1)) u_inv (
      .addr    (isb_in[127-8*j -: 8]),
      .inj_flip((inj.target == INJ_SBOX_INV && inj.sel[7:4] == 4'(j)) ? 9'(1) << inj.sel[2:0] : 9'd0),
      .data    (isb_out[127-8*j -: 8]),
      .par_err (isb_err[j])
    );
  end

  assign fwd_out = (last ? shift_rows(sb_out) : mix_columns(shift_rows(sb_out))) ^ rk;
  assign inv_out = isb_out;

  // ---------------- error detection ----------------
  aes_err_t det;
  logic [127:0] round_res;
  logic         fwd_used, inv_used;

  always_comb begin
    fwd_used = (state == S_RUN && !dec_q) || (state == S_CHK && dec_q);
    inv_used = (state == S_RUN && dec_q)  || (state == S_CHK && !dec_q);
    round_res = dec_q ? inv_out : fwd_out;
    if (inj.target == INJ_ROUND_SET) round_res = round_res ^ (128'd1 << inj.sel[6:0]);

    det = '0;
    det.sbox_par = (fwd_used && |fsb_err) || (inv_used && |isb_err) ||
                   ((state == S_KX_GEN || state == S_KX_CHK) && kx_use_sub && |kx_sbox_err);
    det.key_par  = ((state == S_KX_GEN || state == S_KX_CHK) &&
                    ((byte_parity32(kx_prev) != wp[kx_i - 6'd1]) ||
                     (byte_parity32(kx_back) != wp[kx_i - 6'(nk)]))) ||
                   ((state == S_KX_CHK) && byte_parity32(kx_cur) != wp[kx_i]) ||
                   ((state == S_RUN || state == S_CHK || state == S_OUT ||
                     (state == S_IDLE && start && key_ready && !decrypt)) &&
                    byte_parity128(rk) != rk_par);
    det.state_par = ((state == S_RUN || state == S_CHK || state == S_OUT) &&
                     byte_parity128(s) != s_par) ||
                    (state == S_CHK && byte_parity128(prev) != prev_par);
    det.round_chk = (state == S_CHK) && ((dec_q ? fwd_out : inv_out) != prev);
    det.keygen_chk = (state == S_KX_CHK) && ((kx_cur ^ kx_temp) != kx_back);
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      klen      <= KEY128;
      key_ready <= 1'b0;
      kx_i      <= '0;
      kx_cnt    <= '0;
      rcon      <= 8'h01;
      s         <= '0;
      s_par     <= '0;
      prev      <= '0;
      prev_par  <= '0;
      rnd       <= '0;
      dec_q     <= 1'b0;
      dout      <= '0;
      done      <= 1'b0;
      err       <= 1'b0;
      err_cause <= '0;
      for (int i = 0; i < 60; i++) begin
        w[i]  <= '0;
        wp[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      err  <= 1'b0;
      if (|det) begin
        err       <= 1'b1;
        err_cause <= det;
        state     <= S_IDLE;
        if (self_reset) begin
          key_ready <= 1'b0;
          s         <= '0;
          s_par     <= '0;
          prev      <= '0;
          prev_par  <= '0;
          for (int i = 0; i < 60; i++) begin
            w[i]  <= '0;
            wp[i] <= '0;
          end
        end
      end else begin
        unique case (state)
          S_IDLE: begin
            if (key_load) begin
              klen      <= key_len;
              key_ready <= 1'b0;
              for (int i = 0; i < 8; i++) begin
                w[i]  <= key_in[255-32*i -: 32];
                wp[i] <= byte_parity32(key_in[255-32*i -: 32]);
              end
              kx_i   <= 6'(nk_of(key_len));
              kx_cnt <= '0;
              rcon   <= 8'h01;
              state  <= S_KX_GEN;
            end else if (start && key_ready) begin
              dec_q <= decrypt;
              s     <= decrypt ? din : din ^ rk;
              s_par <= byte_parity128(decrypt ? din : din ^ rk);
              rnd   <= decrypt ? nr : 4'd1;
              state <= S_RUN;
            end
          end
          S_KX_GEN: begin
            w[kx_i]  <= kx_new;
            wp[kx_i] <= byte_parity32(kx_new);
            state    <= S_KX_CHK;
          end
          S_KX_CHK: begin
            if (kx_cnt == 3'd0) rcon <= xtime(rcon);
            kx_cnt <= (kx_cnt == 3'(nk - 4'd1)) ? 3'd0 : kx_cnt + 3'd1;
            kx_i   <= kx_i + 6'd1;
            if (kx_i == {nr, 2'b11}) begin  // 4*(Nr+1)-1
              key_ready <= 1'b1;
              state     <= S_IDLE;
            end else begin
              state <= S_KX_GEN;
            end
          end
          S_RUN: begin
            prev     <= s;
            prev_par <= s_par;
            s        <= round_res;
            s_par    <= byte_parity128(round_res);
            state    <= S_CHK;
          end
          S_CHK: begin
            if (dec_q) begin
              if (rnd == 4'd1) state <= S_OUT;
              else begin rnd <= rnd - 4'd1; state <= S_RUN; end
            end else begin
              if (rnd == nr) state <= S_OUT;
              else begin rnd <= rnd + 4'd1; state <= S_RUN; end
            end
          end
          S_OUT: begin
            dout  <= dec_q ? (s ^ rk) : s;
            done  <= 1'b1;
            state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
      // modelled single-event upsets in storage
      if (inj.target == INJ_KEY_REG)   w[6'(inj.sel[7:5])][inj.sel[4:0]] <= ~w[6'(inj.sel[7:5])][inj.sel[4:0]];
      if (inj.target == INJ_STATE_REG) s[inj.sel[6:0]] <= ~s[inj.sel[6:0]];
    end
  end

endmodule
