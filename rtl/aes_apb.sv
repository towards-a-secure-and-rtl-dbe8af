// aes_apb: APB slave that makes the hardened AES core a peripheral of the
// processor and raises its error and completion interrupt.
//
// Bus: AMBA 2.0 APB (psel, penable, pwrite, paddr, pwdata, prdata; no wait
// states and no error response). Writes take effect in the access phase;
// reads return the register selected by paddr combinationally.
//
// Register map (byte offsets, 32-bit registers):
//   0x00 CTRL    W: [0] start, [1] decrypt, [2] key_load (start and key_load
//                are one-shot commands), [5:4] key length (0:128, 1:192,
//                2:256), [8] self_reset, [9] irq_en.
//                R: [1] decrypt, [5:4] key length, [8] self_reset, [9] irq_en.
//   0x04 STATUS  R: [0] busy, [1] key_ready, [2] done, [3] err,
//                [12:8] cause of last error {sbox, key, state, round, keygen}.
//                W: writing 1 to bit 2 or 3 clears done or err.
//   0x10-0x2C KEY0..KEY7  write-only key staging words (KEY0 = most
//                significant). They are cleared when key_load is issued, so
//                that the key afterwards lives only in the core's
//                parity-protected store; reads return 0.
//   0x30-0x3C DIN0..DIN3   input block (DIN0 = most significant word).
//   0x40-0x4C DOUT0..DOUT3 result of the last operation, read-only.
//
// irq is high while irq_en is set and done or err is pending. err_pulse
// follows the core's err pulse and goes to the system error monitor, so
// that a detection is handled locally (abort, optional self-reset) and also
// reported to the operating system. The bus protocol and register map are
// this design's own choice; attaching the IP to the APB is the original system's.
module aes_apb
  import aes_pkg::*;
(
  input  logic        pclk,
  input  logic        presetn,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        irq,
  output logic        err_pulse,
  input  aes_inj_t    inj
);
  logic [31:0] key_r [8];
  logic [31:0] din_r [4];
  logic        decrypt_r, self_reset_r, irq_en_r;
  keylen_e     key_len_r;
  logic        done_st, err_st;
  logic        start_p, key_load_p;

  logic         key_ready, busy, done, err;
  logic [127:0] dout;
  aes_err_t     err_cause;

  wire wr = psel && penable && pwrite;

  aes_core_ft u_core (
    .clk       (pclk),
    .rst_n     (presetn),
    .key_in    ({key_r[0], key_r[1], key_r[2], key_r[3], key_r[4], key_r[5], key_r[6], key_r[7]}),
    .key_len   (key_len_r),
    .key_load  (key_load_p),
    .key_ready (key_ready),
    .din       ({din_r[0], din_r[1], din_r[2], din_r[3]}),
    .decrypt   (decrypt_r),
    .start     (start_p),
    .dout      (dout),
    .done      (done),
    .busy      (busy),
    .self_reset(self_reset_r),
    .err       (err),
    .err_cause (err_cause),
    .inj       (inj)
  );

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      for (int i = 0; i < 8; i++) key_r[i] <= '0;
      for (int i = 0; i < 4; i++) din_r[i] <= '0;
      decrypt_r    <= 1'b0;
      self_reset_r <= 1'b0;
      irq_en_r     <= 1'b0;
      key_len_r    <= KEY128;
      done_st      <= 1'b0;
      err_st       <= 1'b0;
      start_p      <= 1'b0;
      key_load_p   <= 1'b0;
    end else begin
      start_p    <= 1'b0;
      key_load_p <= 1'b0;
      if (key_load_p) for (int i = 0; i < 8; i++) key_r[i] <= '0;
      if (wr) begin
        case (paddr)
          8'h00: begin
            start_p      <= pwdata[0];
            decrypt_r    <= pwdata[1];
            key_load_p   <= pwdata[2];
            key_len_r    <= (pwdata[5:4] == 2'd3) ? KEY256 : keylen_e'(pwdata[5:4]);
            self_reset_r <= pwdata[8];
            irq_en_r     <= pwdata[9];
          end
          8'h04: begin
            if (pwdata[2]) done_st <= 1'b0;
            if (pwdata[3]) err_st  <= 1'b0;
          end
          8'h10, 8'h14, 8'h18, 8'h1c, 8'h20, 8'h24, 8'h28, 8'h2c:
            key_r[3'((paddr - 8'h10) >> 2)] <= pwdata;
          8'h30, 8'h34, 8'h38, 8'h3c:
            din_r[2'((paddr - 8'h30) >> 2)] <= pwdata;
          default: ;
        endcase
      end
      if (done) done_st <= 1'b1;
      if (err)  err_st  <= 1'b1;
    end
  end

  always_comb begin
    prdata = '0;
    case (paddr)
      8'h00: prdata = {22'd0, irq_en_r, self_reset_r, 2'd0, key_len_r, 2'd0, decrypt_r, 1'b0};
      8'h04: prdata = {19'd0, err_cause, 4'd0, err_st, done_st, key_ready, busy};
      8'h30: prdata = din_r[0];
      8'h34: prdata = din_r[1];
      8'h38: prdata = din_r[2];
      8'h3c: prdata = din_r[3];
      8'h40: prdata = dout[127:96];
      8'h44: prdata = dout[95:64];
      8'h48: prdata = dout[63:32];
      8'h4c: prdata = dout[31:0];
      default: prdata = '0;
    endcase
  end

  assign irq       = irq_en_r && (done_st || err_st);
  assign err_pulse = err;

  // APB rule: the access phase (penable) is always inside a selected transfer.
  a_penable_needs_psel: assert property (@(posedge pclk) disable iff (!presetn) penable |-> psel);
endmodule
