// tb_ft_cache: random reads and writes (byte enables included) over an
// address range four times the cache size, checked against a reference copy
// of memory kept here; hit latency; write-through (memory always current);
// and recovery from upsets injected into cached tags and data: the access
// returns the right word, reports the parity error, refills, and the next
// access hits.
module tb_ft_cache;
  logic clk = 1'b0, rst_n = 1'b1;
  // a falling edge at time 1 so that the asynchronous reset is seen
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int LINES = 1024;
  localparam int WORDS = 4096;

  logic cpu_req, cpu_we, cpu_ready;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic [3:0] cpu_be;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  logic tag_perr, data_perr, hit, miss, inj_en, inj_tag;
  logic [9:0] inj_idx;
  logic [5:0] inj_bit;
  logic ctrl_err;
  logic [1:0] ctrl_chk;
  logic [6:0] inj_ctrl;
  int ctrl_errs = 0;
  always @(posedge clk) if (ctrl_err) ctrl_errs++;

  ft_cache dut (.*);
  mem_model #(.WORDS(WORDS), .LAT(3)) u_mem (.clk, .req(mem_req), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .be(mem_be), .rdata(mem_rdata), .ack(mem_ack));

  logic [31:0] ref_mem [WORDS];
  int checks = 0, failures = 0, hits = 0, misses = 0, tperr = 0, dperr = 0;
  always @(posedge clk) begin
    if (hit) hits++;
    if (miss) misses++;
    if (tag_perr) tperr++;
    if (data_perr) dperr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit w, input int word, input logic [31:0] d, input logic [3:0] be,
                        output logic [31:0] q, output int lat);
    int n = 0;
    @(negedge clk);
    cpu_req = 1; cpu_we = w; cpu_addr = 32'(word) << 2; cpu_wdata = d; cpu_be = be;
    do begin @(negedge clk); n++; end while (!cpu_ready);
    cpu_req = 0;
    q = cpu_rdata;
    lat = n;
  endtask

  logic [31:0] q, d;
  logic [3:0] be;
  int lat, wd, h0, e0;

  initial begin
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_be = 0;
    inj_en = 0; inj_idx = 0; inj_tag = 0; inj_bit = 0; inj_ctrl = 0;
    for (int i = 0; i < WORDS; i++) ref_mem[i] = 32'(i) * 32'h9e3779b1;
    repeat (2) @(negedge clk);
    rst_n = 1;

    access(0, 5, 0, 0, q, lat);
    check(q == ref_mem[5], "cold read");
    access(0, 5, 0, 0, q, lat);
    check(q == ref_mem[5] && lat == 2, $sformatf("read hit, latency %0d", lat));

    for (int n = 0; n < 3000; n++) begin
      wd = $urandom_range(0, 300) + (($urandom_range(0, 3)) * LINES);
      if ($urandom_range(0, 3) == 0) begin
        d = $urandom; be = 4'($urandom_range(1, 15));
        access(1, wd, d, be, q, lat);
        for (int b = 0; b < 4; b++) if (be[b]) ref_mem[wd][8*b +: 8] = d[8*b +: 8];
        check(u_mem.mem[wd] == ref_mem[wd], "write-through reached memory");
      end else begin
        access(0, wd, 0, 0, q, lat);
        check(q == ref_mem[wd], $sformatf("read word %0d: %h exp %h", wd, q, ref_mem[wd]));
      end
    end
    check(hits > 500 && misses > 200, $sformatf("hits %0d misses %0d", hits, misses));

    // upsets in cached data and tags
    for (int n = 0; n < 20; n++) begin
      wd = 600 + n;
      access(0, wd, 0, 0, q, lat);           // bring it in
      @(negedge clk);
      inj_en = 1; inj_idx = 10'(wd % LINES); inj_tag = n[0];
      inj_bit = n[0] ? 6'($urandom_range(0, 19)) : 6'($urandom_range(0, 31));
      @(negedge clk);
      inj_en = 0;
      h0 = hits; e0 = tperr + dperr;
      access(0, wd, 0, 0, q, lat);
      check(q == ref_mem[wd], "correct data despite upset");
      // a flipped tag bit can only be seen as a parity error or a plain miss
      check((tperr + dperr) == e0 + 1, $sformatf("parity error reported (tag=%0d)", n[0]));
      check(hits == h0 && lat > 2, "upset access served from memory");
      access(0, wd, 0, 0, q, lat);
      check(q == ref_mem[wd] && lat == 2, "entry refilled, hits again");
    end
    check(tperr == 10 && dperr == 10, $sformatf("tag errors %0d data errors %0d", tperr, dperr));
    check(ctrl_errs == 0, "no controller error without a transient");

    // transients on the controller strobes, while idle: one flipped strobe
    // (drop the entry at idx_q) is flagged; two flipped strobes are not
    for (int b = 0; b < 3; b++) begin
      @(negedge clk);
      inj_ctrl = (b == 2) ? 7'b0000011 : 7'(1) << b;
      #1;
      check((ctrl_err == (b != 2)) && ((ctrl_chk[0] == ctrl_chk[1]) == (b != 2)),
            $sformatf("controller transient pattern %0d", b));
      @(negedge clk);
      inj_ctrl = 0;
    end
    access(0, 700, 0, 0, q, lat);
    check(q == ref_mem[700], "cache still correct after controller transients");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
