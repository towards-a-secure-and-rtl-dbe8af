// secure_soc: the hardened parts of a secure embedded processor system.
//
// The system pairs a SPARC V8 processor with an AES coprocessor on the APB
// and lets the operating system arbitrate fault tolerance. This top holds
// everything of it that is hardware designed for the purpose:
//   * u_aes    - hardened AES IP with its APB slave interface;
//   * u_icache, u_dcache - parity-protected write-through instruction and
//                data caches (the same design; the instruction cache is
//                only read);
//   * u_rf     - parity-protected register file;
//   * u_ex     - execute stage hardened by parity prediction
//                (recovery by re-execution when PIPE_RECOVERY is 1);
//   * u_mon    - error monitor that turns all detections into rollback
//                requests and interrupts for the operating system.
// The processor core itself, its buses and the main memory are outside:
// their signals are ports. The blocks share clock and reset; they are not
// connected to each other except through the error monitor, because the
// integer-unit pipeline that would join them is the processor's.
//
// Error routing: cache parity errors and recovered pipeline transients are
// locally handled; pipeline-register and register-file upsets, transients
// in the cache controller and transients seen by a detection-only execute
// stage request a rollback;
// AES detections interrupt the processor (besides aborting locally).
//
// The *_inj ports model single-event upsets and transients for testing;
// tie them to zero in use.
module secure_soc
  import aes_pkg::*;
  import iu_pkg::*;
#(
  parameter int unsigned CACHE_LINES   = 1024,
  parameter int unsigned RF_WINDOWS    = 8,
  parameter bit          PIPE_RECOVERY = 1'b1,
  localparam int unsigned CIDX_W = $clog2(CACHE_LINES),
  localparam int unsigned RF_AW  = $clog2(RF_WINDOWS * 16 + 8)
) (
  input  logic              clk,
  input  logic              rst_n,
  // APB slave: AES coprocessor
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [7:0]        paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              aes_irq,
  // instruction cache: processor side (read only)
  input  logic              ic_req,
  input  logic [31:0]       ic_addr,
  output logic [31:0]       ic_rdata,
  output logic              ic_ready,
  // instruction cache: memory side
  output logic              ic_mem_req,
  output logic [31:0]       ic_mem_addr,
  input  logic [31:0]       ic_mem_rdata,
  input  logic              ic_mem_ack,
  // data cache: processor side
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [31:0]       cpu_addr,
  input  logic [31:0]       cpu_wdata,
  input  logic [3:0]        cpu_be,
  output logic [31:0]       cpu_rdata,
  output logic              cpu_ready,
  // data cache: memory side
  output logic              mem_req,
  output logic              mem_we,
  output logic [31:0]       mem_addr,
  output logic [31:0]       mem_wdata,
  output logic [3:0]        mem_be,
  input  logic [31:0]       mem_rdata,
  input  logic              mem_ack,
  output logic              cache_hit,
  output logic              cache_miss,
  output logic              ic_hit,
  output logic              ic_miss,
  output logic [1:0]        cache_ctrl_chk,  // two-rail output of the data-cache controller check
  output logic [1:0]        ic_ctrl_chk,     // same for the instruction cache
  // register file
  input  logic              rf_re1,
  input  logic [RF_AW-1:0]  rf_raddr1,
  output logic [31:0]       rf_rdata1,
  input  logic              rf_re2,
  input  logic [RF_AW-1:0]  rf_raddr2,
  output logic [31:0]       rf_rdata2,
  input  logic              rf_we,
  input  logic [RF_AW-1:0]  rf_waddr,
  input  logic [31:0]       rf_wdata,
  // execute stage
  input  logic              ex_valid,
  output logic              ex_ready,
  input  alu_op_e           ex_op,
  input  logic [31:0]       ex_a,
  input  logic [31:0]       ex_b,
  output logic              ex_out_valid,
  output logic [31:0]       ex_result,
  output logic              ex_recovering,  // stage recomputing after a transient
  output logic [1:0]        ex_chk,         // two-rail parity-checker output
  // error handling, toward the operating system
  output logic              rollback_req,
  input  logic              rollback_ack,
  output logic              err_irq,
  input  logic              err_irq_ack,
  input  logic              err_clr,
  output logic [ERR_NSRC-1:0] err_sticky,
  output logic [7:0]        err_count [ERR_NSRC],
  // fault injection (test only)
  input  aes_inj_t          aes_inj,
  input  logic              cache_inj_en,
  input  logic [CIDX_W-1:0] cache_inj_idx,
  input  logic              cache_inj_tag,
  input  logic [5:0]        cache_inj_bit,
  input  logic [6:0]        cache_inj_ctrl,
  input  logic              ic_inj_en,
  input  logic [CIDX_W-1:0] ic_inj_idx,
  input  logic              ic_inj_tag,
  input  logic [5:0]        ic_inj_bit,
  input  logic              rf_inj_en,
  input  logic [RF_AW-1:0]  rf_inj_addr,
  input  logic [5:0]        rf_inj_bit,
  input  logic [31:0]       ex_inj_set,
  input  logic [31:0]       ex_inj_seu
);
  logic aes_err, tag_perr, data_perr, rerr1, rerr2, set_err, seu_err, cache_ctrl_err;
  logic [ERR_NSRC-1:0] err_in;

  aes_apb u_aes (
    .pclk(clk), .presetn(rst_n), .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .irq(aes_irq), .err_pulse(aes_err), .inj(aes_inj)
  );

  logic        ic_tag_perr, ic_data_perr, ic_ctrl_err;

  ft_cache #(.LINES(CACHE_LINES)) u_icache (
    .clk, .rst_n, .cpu_req(ic_req), .cpu_we(1'b0), .cpu_addr(ic_addr), .cpu_wdata(32'd0), .cpu_be(4'd0),
    .cpu_rdata(ic_rdata), .cpu_ready(ic_ready),
    // the write-back lines are never used by a read-only cache
    .mem_req(ic_mem_req), .mem_we(), .mem_addr(ic_mem_addr), .mem_wdata(),
    .mem_be(), .mem_rdata(ic_mem_rdata), .mem_ack(ic_mem_ack),
    .tag_perr(ic_tag_perr), .data_perr(ic_data_perr), .hit(ic_hit), .miss(ic_miss),
    .inj_en(ic_inj_en), .inj_idx(ic_inj_idx), .inj_tag(ic_inj_tag), .inj_bit(ic_inj_bit),
    .ctrl_err(ic_ctrl_err), .ctrl_chk(ic_ctrl_chk), .inj_ctrl(7'd0)
  );

  ft_cache #(.LINES(CACHE_LINES)) u_dcache (
    .clk, .rst_n, .cpu_req, .cpu_we, .cpu_addr, .cpu_wdata, .cpu_be, .cpu_rdata, .cpu_ready,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_rdata, .mem_ack,
    .tag_perr, .data_perr, .hit(cache_hit), .miss(cache_miss),
    .inj_en(cache_inj_en), .inj_idx(cache_inj_idx), .inj_tag(cache_inj_tag), .inj_bit(cache_inj_bit),
    .ctrl_err(cache_ctrl_err), .ctrl_chk(cache_ctrl_chk), .inj_ctrl(cache_inj_ctrl)
  );

  ft_regfile #(.NWINDOWS(RF_WINDOWS)) u_rf (
    .clk, .rst_n,
    .re1(rf_re1), .raddr1(rf_raddr1), .rdata1(rf_rdata1), .rerr1,
    .re2(rf_re2), .raddr2(rf_raddr2), .rdata2(rf_rdata2), .rerr2,
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata),
    .inj_en(rf_inj_en), .inj_addr(rf_inj_addr), .inj_bit(rf_inj_bit)
  );

  pp_alu_stage #(.RECOVERY(PIPE_RECOVERY)) u_ex (
    .clk, .rst_n, .in_valid(ex_valid), .in_ready(ex_ready), .op(ex_op), .a(ex_a), .b(ex_b),
    .out_valid(ex_out_valid), .result(ex_result), .set_err, .recovering(ex_recovering), .seu_err,
    .chk_z(ex_chk), .inj_set(ex_inj_set), .inj_seu(ex_inj_seu)
  );

  always_comb begin
    err_in = '0;
    err_in[SRC_CACHE_PERR] = tag_perr || data_perr || ic_tag_perr || ic_data_perr;
    err_in[SRC_SET_RECOV]  = PIPE_RECOVERY && set_err;
    err_in[SRC_PIPE_SEU]   = seu_err;
    err_in[SRC_SET_DETECT] = !PIPE_RECOVERY && set_err;
    err_in[SRC_RF_PERR]    = rerr1 || rerr2;
    err_in[SRC_AES]        = aes_err;
    err_in[SRC_CACHE_SET]  = cache_ctrl_err || ic_ctrl_err;
  end

  err_monitor u_mon (
    .clk, .rst_n, .err_in, .rollback_ack, .irq_ack(err_irq_ack), .clr(err_clr),
    .rollback_req, .irq(err_irq), .sticky(err_sticky), .count(err_count)
  );
endmodule
