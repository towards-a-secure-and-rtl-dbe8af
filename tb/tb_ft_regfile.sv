// tb_ft_regfile: fills the 136-word register file, reads it back through
// both ports against a model array, checks the one-cycle read latency, and
// checks that an upset stored bit is reported on the port that reads it.
module tb_ft_regfile;
  logic clk = 1'b0, rst_n = 1'b1;
  // a falling edge at time 1 so that the asynchronous reset is seen
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  localparam int AW = 8;
  logic re1, re2, we, rerr1, rerr2, inj_en;
  logic [AW-1:0] raddr1, raddr2, waddr, inj_addr;
  logic [31:0] rdata1, rdata2, wdata;
  logic [5:0] inj_bit;
  logic [31:0] model [136];
  int checks = 0, failures = 0;

  ft_regfile dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re1 = 0; re2 = 0; we = 0; raddr1 = 0; raddr2 = 0; waddr = 0; wdata = 0;
    inj_en = 0; inj_addr = 0; inj_bit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 136; i++) begin
      we = 1; waddr = AW'(i); wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 300; n++) begin
      int i1, i2;
      i1 = $urandom_range(0, 135); i2 = $urandom_range(0, 135);
      re1 = 1; re2 = 1; raddr1 = AW'(i1); raddr2 = AW'(i2);
      // simultaneous write to a third register
      we = 1; waddr = AW'($urandom_range(0, 135)); wdata = $urandom;
      @(negedge clk);
      check(rdata1 == model[i1] && rdata2 == model[i2] && !rerr1 && !rerr2,
            $sformatf("read %0d %0d", i1, i2));
      model[waddr] = wdata;
      we = 0; re1 = 0; re2 = 0;
    end
    // upset on register 77, bit 13
    inj_en = 1; inj_addr = 8'd77; inj_bit = 6'd13;
    @(negedge clk);
    inj_en = 0;
    re1 = 1; raddr1 = 8'd77; re2 = 1; raddr2 = 8'd78;
    @(negedge clk);
    re1 = 0; re2 = 0;
    check(rerr1 && rdata1 == (model[77] ^ 32'h2000), "upset word reported on port 1");
    check(!rerr2 && rdata2 == model[78], "neighbour clean");
    re2 = 1; raddr2 = 8'd77;
    @(negedge clk);
    re2 = 0;
    check(rerr2, "upset word reported on port 2");
    @(negedge clk);
    check(!rerr1 && !rerr2, "no error without a read");
    // rewriting the register clears it
    we = 1; waddr = 8'd77; wdata = 32'h1234_5678;
    @(negedge clk);
    we = 0; re1 = 1; raddr1 = 8'd77;
    @(negedge clk);
    re1 = 0;
    check(!rerr1 && rdata1 == 32'h1234_5678, "rewrite restores parity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
