// tb_par_reg: writes random words into a parity-protected register, checks
// the stored value and that no error is flagged, then flips one and two
// stored bits and checks that odd upsets are flagged in the next cycle and
// that a fresh write clears the error.
module tb_par_reg;
  logic clk = 1'b0, rst_n = 1'b1;
  // a falling edge at time 1 so that the asynchronous reset is seen
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we, err;
  logic [31:0] d, q, inj_flip;
  logic [1:0] chk;
  int checks = 0, failures = 0;

  par_reg #(.W(32)) dut (.clk, .rst_n, .we, .d, .q, .err, .chk, .inj_flip);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; d = 0; inj_flip = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!err && q == 0, "reset value consistent");
    for (int i = 0; i < 50; i++) begin
      we = 1; d = $urandom;
      @(negedge clk);
      we = 0;
      check(q == d && !err && chk[0] != chk[1], "write and hold");
      inj_flip = 32'(1) << $urandom_range(0, 31);
      @(negedge clk);
      inj_flip = 0;
      check(err && chk[0] == chk[1] && q != d, "single upset flagged");
      @(negedge clk);
      check(err, "error persists until rewritten");
      we = 1;
      @(negedge clk);
      we = 0;
      check(!err && q == d, "rewrite clears the error");
      inj_flip = 32'h0000_0005 << $urandom_range(0, 29);
      @(negedge clk);
      inj_flip = 0;
      check(!err, "double upset is outside the parity model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
