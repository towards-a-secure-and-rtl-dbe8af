// ft_cache: direct-mapped, write-through cache whose words are protected by
// two parity bits, one for the tag and one for the data.
//
// Organisation: LINES entries of one 32-bit word each, indexed by address
// bits [IDX_W+1:2]; each entry holds a valid bit, the tag with its parity
// bit and the data word with its parity bit. Both parity bits are computed
// when the entry is written and checked on every lookup.
//
// Recovery: a parity error on a lookup is handled as a miss. The word is
// fetched again from main memory and the entry rewritten, which removes the
// upset. This is sound because the cache is write-through: main memory
// always holds the current value. tag_perr or data_perr pulses for one cycle
// so that the error can be logged; no further action is needed.
//
// Processor side: cpu_req starts an access (held until cpu_ready, which
// pulses for one cycle with cpu_rdata valid for reads). Writes carry byte
// enables, go to memory always (write-through) and update the cached word
// only on a hit (no write allocate). Memory side: mem_req is held until
// mem_ack, which returns mem_rdata for reads.
//
// Timing: read hit 2 cycles from request to cpu_ready (array read, then
// tag compare and parity check); miss and write add the memory latency.
//
// Controller: its combinational part (next state and the control strobes,
// function ctrl_fn) is the logic L of a parity-prediction check: a replica
// L' computes the same strobes, and a two-rail checker compares the parity
// of both. A mismatch (a transient that flipped an odd number of control
// bits) pulses ctrl_err. This is detection only; the corrupted access
// cannot be replayed here, so the error is meant for an operating-system
// rollback. As in the execute stage, synthesis must keep L and L' apart.
//
// The parity arrangement, the miss-on-error recovery and the
// parity-predicted controller follow the published protection scheme;
// the size, the one-word line and the
// handshakes are this design's choices. The valid bits are flip-flops with
// reset; tag and data arrays are RAMs without reset.
//
// inj_ctrl is XORed onto the controller outputs (a transient);
// inj_en/inj_idx/inj_tag/inj_bit flip one stored bit at a clock edge (an
// upset, for testing); hold inj_en low in use.
module ft_cache #(
  parameter int unsigned LINES = 1024,
  parameter int unsigned IDX_W = $clog2(LINES),
  parameter int unsigned TAG_W = 30 - IDX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor side
  input  logic             cpu_req,
  input  logic             cpu_we,
  input  logic [31:0]      cpu_addr,
  input  logic [31:0]      cpu_wdata,
  input  logic [3:0]       cpu_be,
  output logic [31:0]      cpu_rdata,
  output logic             cpu_ready,
  // memory side
  output logic             mem_req,
  output logic             mem_we,
  output logic [31:0]      mem_addr,
  output logic [31:0]      mem_wdata,
  output logic [3:0]       mem_be,
  input  logic [31:0]      mem_rdata,
  input  logic             mem_ack,
  // protection
  output logic             tag_perr,
  output logic             data_perr,
  output logic             hit,       // pulse: lookup hit without error
  output logic             miss,      // pulse: lookup missed (including parity errors)
  input  logic             inj_en,
  input  logic [IDX_W-1:0] inj_idx,
  input  logic             inj_tag,   // 1: flip a tag bit, 0: a data bit
  input  logic [5:0]       inj_bit,
  output logic             ctrl_err,  // transient detected in the controller
  output logic [1:0]       ctrl_chk,  // two-rail output of the controller check
  input  logic [6:0]       inj_ctrl   // flips controller outputs (a transient), test only
);
  localparam int unsigned TBIT_W = $clog2(TAG_W + 1);  // bit index within a tag entry

  typedef enum logic [1:0] {C_IDLE, C_LOOKUP, C_MEMRD, C_MEMWR} cstate_e;
  cstate_e state;

  logic [TAG_W:0]  tag_mem  [LINES];   // {parity, tag}
  logic [32:0]     data_mem [LINES];   // {parity, data}
  logic            valid    [LINES];

  logic [31:0]     addr_q, wdata_q;
  logic [3:0]      be_q;
  logic            we_q;
  logic [TAG_W:0]  tag_rd;
  logic [32:0]     data_rd;
  logic            valid_rd;

  logic [IDX_W-1:0] idx_q;
  logic [TAG_W-1:0] tag_q;
  assign idx_q = addr_q[IDX_W+1:2];
  assign tag_q = addr_q[31 -: TAG_W];

  logic tag_bad, data_bad, tag_match, lookup_hit;
  logic [31:0] merged;

  always_comb begin
    tag_bad    = valid_rd && ((^tag_rd[TAG_W-1:0]) != tag_rd[TAG_W]);
    tag_match  = valid_rd && (tag_rd[TAG_W-1:0] == tag_q);
    data_bad   = tag_match && ((^data_rd[31:0]) != data_rd[32]);
    lookup_hit = tag_match && !tag_bad && !data_bad;
    for (int i = 0; i < 4; i++)
      merged[8*i +: 8] = be_q[i] ? wdata_q[8*i +: 8] : data_rd[8*i +: 8];
  end

  // ---------------- controller: L, replica L' and parity check ----------------
  typedef struct packed {
    cstate_e next;    // next state
    logic    accept;  // capture a new request
    logic    ready;   // complete the access
    logic    fill;    // write the refilled entry
    logic    upd;     // write-hit update of the entry
    logic    inval;   // drop a corrupted entry on a write
  } ctrl_t;

  function automatic ctrl_t ctrl_fn(input cstate_e st, input logic req, input logic rdy,
                                    input logic we, input logic lhit, input logic bad,
                                    input logic ack);
    ctrl_t c;
    c      = '0;
    c.next = st;
    unique case (st)
      C_IDLE:   if (req && !rdy) begin c.accept = 1'b1; c.next = C_LOOKUP; end
      C_LOOKUP: begin
        if (we) begin
          c.upd   = lhit;
          c.inval = bad;
          c.next  = C_MEMWR;
        end else if (lhit) begin
          c.ready = 1'b1;
          c.next  = C_IDLE;
        end else begin
          c.next  = C_MEMRD;
        end
      end
      C_MEMRD:  if (ack) begin c.fill = 1'b1; c.ready = 1'b1; c.next = C_IDLE; end
      C_MEMWR:  if (ack) begin c.ready = 1'b1; c.next = C_IDLE; end
      default:  c.next = C_IDLE;
    endcase
    return c;
  endfunction

  ctrl_t ctrl, ctrl_rep;
  logic  ctrl_mismatch;
  assign ctrl     = ctrl_fn(state, cpu_req, cpu_ready, we_q, lookup_hit, tag_bad || data_bad, mem_ack) ^ inj_ctrl;
  assign ctrl_rep = ctrl_fn(state, cpu_req, cpu_ready, we_q, lookup_hit, tag_bad || data_bad, mem_ack);

  dual_rail_checker #(.N(1)) u_ctrl_chk (.a(^ctrl), .b(~(^ctrl_rep)), .z(ctrl_chk), .err(ctrl_mismatch));
  assign ctrl_err = ctrl_mismatch;

  assign tag_perr  = (state == C_LOOKUP) && tag_bad;
  assign data_perr = (state == C_LOOKUP) && data_bad && !tag_bad;
  assign hit       = (state == C_LOOKUP) && lookup_hit;
  assign miss      = (state == C_LOOKUP) && !lookup_hit;

  assign mem_req   = (state == C_MEMRD) || (state == C_MEMWR);
  assign mem_we    = (state == C_MEMWR);
  assign mem_addr  = {addr_q[31:2], 2'b00};
  assign mem_wdata = wdata_q;
  assign mem_be    = (state == C_MEMWR) ? be_q : 4'hf;

  // tag / data arrays: synchronous read, single write port, upset model
  logic            arr_we;
  logic [TAG_W:0]  arr_tag_w;
  logic [32:0]     arr_data_w;
  always_comb begin
    arr_we     = ctrl.fill || ctrl.upd;
    arr_tag_w  = {^tag_q, tag_q};
    arr_data_w = ctrl.upd ? {^merged, merged} : {^mem_rdata, mem_rdata};
  end

  always_ff @(posedge clk) begin
    if (ctrl.accept) begin
      tag_rd  <= tag_mem[cpu_addr[IDX_W+1:2]];
      data_rd <= data_mem[cpu_addr[IDX_W+1:2]];
    end
    if (arr_we) begin
      tag_mem[idx_q]  <= arr_tag_w;
      data_mem[idx_q] <= arr_data_w;
    end
    if (inj_en) begin
      if (inj_tag) tag_mem[inj_idx][TBIT_W'(inj_bit)] <= ~tag_mem[inj_idx][TBIT_W'(inj_bit)];
      else         data_mem[inj_idx][inj_bit] <= ~data_mem[inj_idx][inj_bit];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      addr_q    <= '0;
      wdata_q   <= '0;
      be_q      <= '0;
      we_q      <= 1'b0;
      valid_rd  <= 1'b0;
      cpu_rdata <= '0;
      cpu_ready <= 1'b0;
      for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
    end else begin
      state     <= ctrl.next;
      cpu_ready <= ctrl.ready;
      if (ctrl.accept) begin
        addr_q   <= cpu_addr;
        wdata_q  <= cpu_wdata;
        be_q     <= cpu_be;
        we_q     <= cpu_we;
        valid_rd <= valid[cpu_addr[IDX_W+1:2]];
      end
      if (ctrl.ready) cpu_rdata <= (state == C_MEMRD) ? mem_rdata : data_rd[31:0];
      if (ctrl.fill)  valid[idx_q] <= 1'b1;
      if (ctrl.inval) valid[idx_q] <= 1'b0;
    end
  end
endmodule
