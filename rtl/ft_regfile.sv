// ft_regfile: general register bank with one parity bit per word.
//
// A RAM-style register file (two synchronous read ports, one write port)
// for a SPARC V8 integer unit with NWINDOWS register windows: 16 registers
// per window plus 8 globals, 136 words for 8 windows. Each word is stored
// with its even parity, computed at write time. Each read port delivers
// its data one cycle after the address, together with rerr, which is high
// when the word read does not match its parity. A detected error cannot be
// corrected here (the register file is the only copy), so rerr is meant
// for the system error monitor, which asks the operating system for a
// rollback to the last checkpoint.
//
// Protection by parity, as for the caches, follows the original system; the port
// count, read timing and window count are this design's choices (the
// window count follows the usual configuration of the processor). A read
// of the address being written in the same cycle returns the old word.
//
// inj_en/inj_addr/inj_bit flip one stored bit at the clock edge (an upset,
// for testing); hold inj_en low in use.
module ft_regfile #(
  parameter int unsigned NWINDOWS = 8,
  parameter int unsigned NREGS    = NWINDOWS * 16 + 8,
  parameter int unsigned AW       = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          re1,
  input  logic [AW-1:0] raddr1,
  output logic [31:0]   rdata1,
  output logic          rerr1,
  input  logic          re2,
  input  logic [AW-1:0] raddr2,
  output logic [31:0]   rdata2,
  output logic          rerr2,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic          inj_en,
  input  logic [AW-1:0] inj_addr,
  input  logic [5:0]    inj_bit
);
  logic [32:0] mem [NREGS];   // {parity, word}
  logic [32:0] q1, q2;
  logic        v1, v2;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {^wdata, wdata};
    if (inj_en) mem[inj_addr][inj_bit] <= ~mem[inj_addr][inj_bit];
    if (re1) q1 <= mem[raddr1];
    if (re2) q2 <= mem[raddr2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= re1;
      v2 <= re2;
    end
  end

  assign rdata1 = q1[31:0];
  assign rdata2 = q2[31:0];
  assign rerr1  = v1 && ((^q1[31:0]) != q1[32]);
  assign rerr2  = v2 && ((^q2[31:0]) != q2[32]);
endmodule
