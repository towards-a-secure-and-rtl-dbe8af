// tb_secure_soc: end-to-end test of the whole system top at its default
// parameters. It plays the processor and main memory:
//   * AES over APB: FIPS-197 C.1 encryption and decryption, an injected round
//     transient with error signalling only (the key survives and a retry
//     succeeds), and an injected S-box upset with self-reset (the key is
//     wiped);
//   * data cache: reads and writes against a memory model, hits, misses,
//     write-through, and an upset that is recovered by refill;
//   * instruction cache: fetches from its own memory model, and a tag upset
//     that is recovered by refill;
//   * register file: writes, reads, an upset that requests a rollback;
//   * execute stage: random ALU operations, a transient recovered by
//     re-execution, an operand-register upset that requests a rollback.
// It checks the error monitor's routing (rollback request, interrupt,
// counters) and counts how often each mechanism happened; a mechanism that
// never happened counts as a failure.
module tb_secure_soc;
  import aes_pkg::*;
  import iu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  // a falling edge at time 1 so that the asynchronous reset is seen
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic psel, penable, pwrite;
  logic [7:0] paddr;
  logic [31:0] pwdata, prdata;
  logic aes_irq;
  logic cpu_req, cpu_we, cpu_ready;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic [3:0] cpu_be;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  logic cache_hit, cache_miss;
  logic ic_req, ic_ready, ic_mem_req, ic_mem_ack, ic_hit, ic_miss;
  logic [31:0] ic_addr, ic_rdata, ic_mem_addr, ic_mem_rdata;
  logic ic_inj_en, ic_inj_tag;
  logic [9:0] ic_inj_idx;
  logic [5:0] ic_inj_bit;
  logic [1:0] ic_ctrl_chk;
  logic rf_re1, rf_re2, rf_we;
  logic [7:0] rf_raddr1, rf_raddr2, rf_waddr;
  logic [31:0] rf_rdata1, rf_rdata2, rf_wdata;
  logic ex_valid, ex_ready, ex_out_valid, ex_recovering;
  alu_op_e ex_op;
  logic [31:0] ex_a, ex_b, ex_result;
  logic [1:0] ex_chk;
  logic rollback_req, rollback_ack, err_irq, err_irq_ack, err_clr;
  logic [ERR_NSRC-1:0] err_sticky;
  logic [7:0] err_count [ERR_NSRC];
  aes_inj_t aes_inj;
  logic cache_inj_en, cache_inj_tag, rf_inj_en;
  logic [9:0] cache_inj_idx;
  logic [5:0] cache_inj_bit, rf_inj_bit;
  logic [6:0] cache_inj_ctrl;
  logic [1:0] cache_ctrl_chk;
  logic [7:0] rf_inj_addr;
  logic [31:0] ex_inj_set, ex_inj_seu;

  secure_soc dut (.*);

  mem_model #(.WORDS(8192), .LAT(4)) u_mem (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .be(mem_be), .rdata(mem_rdata), .ack(mem_ack));
  mem_model #(.WORDS(8192), .LAT(4)) u_imem (.clk, .req(ic_mem_req), .we(1'b0), .addr(ic_mem_addr),
    .wdata(32'd0), .be(4'd0), .rdata(ic_mem_rdata), .ack(ic_mem_ack));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  typedef enum int {M_AES_ENC, M_AES_DEC, M_AES_ABORT, M_AES_SELFRESET, M_CACHE_HIT, M_CACHE_MISS,
                    M_CACHE_WT, M_CACHE_REFILL, M_CACHE_CTRL_SET, M_ICACHE_HIT, M_ICACHE_MISS,
                    M_ICACHE_REFILL, M_RF_PERR, M_EX_RECOVERY, M_EX_SEU,
                    M_ROLLBACK, M_ERR_IRQ, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"aes encryption", "aes decryption", "aes abort on detection",
    "aes self-reset", "cache hit", "cache miss", "cache write-through", "cache refill after parity error", "cache controller transient",
    "instruction-cache hit", "instruction-cache miss", "instruction-cache refill after parity error",
    "register-file parity error", "execute-stage recovery", "execute-stage register upset",
    "rollback request", "error interrupt"};

  logic rb_q = 0, irq_q = 0;
  always @(posedge clk) begin
    if (cache_hit) mech[M_CACHE_HIT]++;
    if (cache_miss) mech[M_CACHE_MISS]++;
    if (ic_hit) mech[M_ICACHE_HIT]++;
    if (ic_miss) mech[M_ICACHE_MISS]++;
    if (mem_req && mem_we && mem_ack) mech[M_CACHE_WT]++;
    if (ex_recovering) mech[M_EX_RECOVERY]++;
    rb_q <= rollback_req; irq_q <= err_irq;
    if (rst_n && rollback_req && !rb_q) mech[M_ROLLBACK]++;
    if (rst_n && err_irq && !irq_q) mech[M_ERR_IRQ]++;
  end

  // ---------------- APB ----------------
  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
  endtask
  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk);
    penable = 1;
    d = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask
  task automatic aes_wait(input int bitn, output logic [31:0] st);
    int n = 0;
    do begin apb_read(8'h04, st); n++; end while (!st[bitn] && !st[3] && n < 200);
  endtask
  task automatic aes_block(input logic [127:0] b, input logic [31:0] ctrl, output logic [127:0] q,
                           output logic [31:0] st);
    logic [31:0] t;
    for (int i = 0; i < 4; i++) apb_write(8'h30 + 8'(4*i), b[127-32*i -: 32]);
    apb_write(8'h00, ctrl);
    aes_wait(2, st);
    for (int i = 0; i < 4; i++) begin apb_read(8'h40 + 8'(4*i), t); q[127-32*i -: 32] = t; end
    apb_write(8'h04, 32'hc);
  endtask
  task automatic aes_key_c1(input logic [31:0] ctrl);
    logic [31:0] st;
    for (int i = 0; i < 4; i++) apb_write(8'h10 + 8'(4*i), 32'h00010203 + 32'(i) * 32'h04040404);
    apb_write(8'h00, ctrl | 32'h4);
    aes_wait(1, st);
  endtask

  // ---------------- cache ----------------
  logic [31:0] ref_mem [8192];
  task automatic cache_access(input bit w, input int word, input logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    cpu_req = 1; cpu_we = w; cpu_addr = 32'(word) << 2; cpu_wdata = d; cpu_be = 4'hf;
    do @(negedge clk); while (!cpu_ready);
    cpu_req = 0;
    q = cpu_rdata;
  endtask
  task automatic fetch(input int word, output logic [31:0] q);
    @(negedge clk);
    ic_req = 1; ic_addr = 32'(word) << 2;
    do @(negedge clk); while (!ic_ready);
    ic_req = 0;
    q = ic_rdata;
  endtask

  function automatic logic [31:0] ref_alu(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_SLL: return x << y[4:0];
      ALU_SRL: return x >> y[4:0];
      default: return 32'($signed(x) >>> y[4:0]);
    endcase
  endfunction

  logic [127:0] q;
  logic [31:0] st, d, r;
  logic [31:0] rf_model [136];
  logic [31:0] expv;
  int wd;

  initial begin
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_be = 0;
    rf_re1 = 0; rf_re2 = 0; rf_we = 0; rf_raddr1 = 0; rf_raddr2 = 0; rf_waddr = 0; rf_wdata = 0;
    ex_valid = 0; ex_op = ALU_ADD; ex_a = 0; ex_b = 0;
    rollback_ack = 0; err_irq_ack = 0; err_clr = 0;
    aes_inj = '{INJ_NONE, 8'd0};
    cache_inj_en = 0; cache_inj_tag = 0; cache_inj_idx = 0; cache_inj_bit = 0; cache_inj_ctrl = 0;
    ic_req = 0; ic_addr = 0; ic_inj_en = 0; ic_inj_tag = 0; ic_inj_idx = 0; ic_inj_bit = 0;
    rf_inj_en = 0; rf_inj_addr = 0; rf_inj_bit = 0; ex_inj_set = 0; ex_inj_seu = 0;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    for (int i = 0; i < 8192; i++) ref_mem[i] = 32'(i) * 32'h9e3779b1;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- AES ----
    aes_key_c1(32'h0);
    aes_block(128'h00112233445566778899aabbccddeeff, 32'h1, q, st);
    check(q == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "AES C.1 encryption");
    mech[M_AES_ENC]++;
    aes_block(q, 32'h3, q, st);
    check(q == 128'h00112233445566778899aabbccddeeff, "AES C.1 decryption");
    mech[M_AES_DEC]++;
    // transient in a round, error signalling only
    for (int i = 0; i < 4; i++) apb_write(8'h30 + 8'(4*i), 32'h0);
    apb_write(8'h00, 32'h1);
    repeat (3) @(negedge clk);
    aes_inj = '{INJ_ROUND_SET, 8'd99};
    repeat (2) @(negedge clk);
    aes_inj = '{INJ_NONE, 8'd0};
    aes_wait(2, st);
    check(st[3] && !st[2] && st[1], "AES transient: aborted, key kept");
    if (st[3]) mech[M_AES_ABORT]++;
    check(err_irq && !rollback_req && err_count[SRC_AES] == 8'd1, "AES detection interrupts the OS");
    err_irq_ack = 1; @(negedge clk); err_irq_ack = 0;
    apb_write(8'h04, 32'hc);
    aes_block(128'h00112233445566778899aabbccddeeff, 32'h1, q, st);
    check(q == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "AES retry after transient");
    // S-box upset, self-reset
    apb_write(8'h00, 32'h100);
    for (int i = 0; i < 4; i++) apb_write(8'h30 + 8'(4*i), 32'h0);
    apb_write(8'h00, 32'h101);
    aes_inj = '{INJ_SBOX_FWD, 8'h21};
    repeat (3) @(negedge clk);
    aes_inj = '{INJ_NONE, 8'd0};
    aes_wait(2, st);
    check(st[3] && !st[1], "AES S-box upset: self-reset wiped the key");
    if (st[3] && !st[1]) mech[M_AES_SELFRESET]++;
    err_irq_ack = 1; @(negedge clk); err_irq_ack = 0;

    // ---- cache ----
    for (int n = 0; n < 400; n++) begin
      wd = $urandom_range(0, 200) + 1024 * $urandom_range(0, 2);
      if ($urandom_range(0, 4) == 0) begin
        d = $urandom;
        cache_access(1, wd, d, r);
        ref_mem[wd] = d;
      end else begin
        cache_access(0, wd, 0, r);
        check(r == ref_mem[wd], $sformatf("cache read %0d", wd));
      end
    end
    cache_access(0, 3000, 0, r);
    cache_inj_en = 1; cache_inj_idx = 10'(3000 % 1024); cache_inj_tag = 0; cache_inj_bit = 6'd7;
    @(negedge clk);
    cache_inj_en = 0;
    cache_access(0, 3000, 0, r);
    check(r == ref_mem[3000] && err_count[SRC_CACHE_PERR] == 8'd1, "cache upset recovered");
    if (err_count[SRC_CACHE_PERR] == 8'd1) mech[M_CACHE_REFILL]++;
    check(!rollback_req, "cache upset needs no rollback");
    // transient on a controller strobe while idle (drop the current entry)
    @(negedge clk);
    cache_inj_ctrl = 7'b0000001;
    @(negedge clk);
    cache_inj_ctrl = 0;
    @(negedge clk);
    check(rollback_req && err_count[SRC_CACHE_SET] == 8'd1, "controller transient requests rollback");
    if (err_count[SRC_CACHE_SET] == 8'd1) mech[M_CACHE_CTRL_SET]++;
    rollback_ack = 1; @(negedge clk); rollback_ack = 0;
    cache_access(0, 3000, 0, r);
    check(r == ref_mem[3000], "dropped entry refetched");

    // ---- instruction cache ----
    for (int n = 0; n < 300; n++) begin
      wd = $urandom_range(0, 150) + 1024 * $urandom_range(4, 5);
      fetch(wd, r);
      check(r == 32'(wd) * 32'h9e3779b1, $sformatf("fetch %0d", wd));
    end
    fetch(4100, r);
    ic_inj_en = 1; ic_inj_idx = 10'(4100 % 1024); ic_inj_tag = 1; ic_inj_bit = 6'd3;
    @(negedge clk);
    ic_inj_en = 0;
    fetch(4100, r);
    check(r == 32'd4100 * 32'h9e3779b1 && err_count[SRC_CACHE_PERR] == 8'd2,
          "instruction-cache tag upset recovered");
    if (err_count[SRC_CACHE_PERR] == 8'd2) mech[M_ICACHE_REFILL]++;
    check(!rollback_req, "instruction-cache upset needs no rollback");

    // ---- register file ----
    for (int i = 0; i < 136; i++) begin
      @(negedge clk);
      rf_we = 1; rf_waddr = 8'(i); rf_wdata = $urandom; rf_model[i] = rf_wdata;
    end
    @(negedge clk);
    rf_we = 0;
    for (int n = 0; n < 100; n++) begin
      int a1, a2;
      a1 = $urandom_range(0, 135); a2 = $urandom_range(0, 135);
      rf_re1 = 1; rf_re2 = 1; rf_raddr1 = 8'(a1); rf_raddr2 = 8'(a2);
      @(negedge clk);
      check(rf_rdata1 == rf_model[a1] && rf_rdata2 == rf_model[a2], "register file read");
    end
    rf_re1 = 0; rf_re2 = 0;
    check(!rollback_req, "no rollback without errors");
    rf_inj_en = 1; rf_inj_addr = 8'd100; rf_inj_bit = 6'd31;
    @(negedge clk);
    rf_inj_en = 0;
    rf_re1 = 1; rf_raddr1 = 8'd100;
    @(negedge clk);
    rf_re1 = 0;
    @(negedge clk);
    check(rollback_req && err_count[SRC_RF_PERR] == 8'd1, "register-file upset requests rollback");
    if (err_count[SRC_RF_PERR] == 8'd1) mech[M_RF_PERR]++;
    rollback_ack = 1; @(negedge clk); rollback_ack = 0;

    // ---- execute stage ----
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      ex_valid = 1; ex_op = alu_op_e'($urandom_range(0, 7)); ex_a = $urandom; ex_b = $urandom;
      expv = ref_alu(ex_op, ex_a, ex_b);
      if (n == 50) ex_inj_set = 32'h0; // set below, during the compute cycle
      @(negedge clk);
      ex_valid = 0;
      if (n == 50) ex_inj_set = 32'h0040_0000;
      @(negedge clk);
      ex_inj_set = 0;
      if (n == 50) @(negedge clk);
      check(ex_out_valid && ex_result == expv, $sformatf("execute op %0d", n));
    end
    check(err_count[SRC_SET_RECOV] == 8'd1 && !rollback_req, "transient recovered locally");
    @(negedge clk);
    ex_valid = 1; ex_op = ALU_ADD; ex_a = 32'd5; ex_b = 32'd6; ex_inj_seu = 32'h10;
    @(negedge clk);
    ex_valid = 0; ex_inj_seu = 0;
    @(negedge clk);
    check(rollback_req && err_count[SRC_PIPE_SEU] != 8'd0, "operand upset requests rollback");
    if (err_count[SRC_PIPE_SEU] != 8'd0) mech[M_EX_SEU]++;
    rollback_ack = 1; @(negedge clk); rollback_ack = 0;
    repeat (2) @(negedge clk);

    check(mech[M_ROLLBACK] == 3 && mech[M_ERR_IRQ] == 2,
          $sformatf("rollbacks %0d interrupts %0d, expected 3 and 2", mech[M_ROLLBACK], mech[M_ERR_IRQ]));
    // ---- report ----
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-32s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism never happened: %s", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
