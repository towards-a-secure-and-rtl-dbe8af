// tb_err_monitor: sends random detection pulses and checks the counters and
// sticky flags against a model kept here, that only central sources raise
// the rollback request and only the cryptographic IP raises the interrupt,
// the acknowledge and clear inputs, and counter saturation.
module tb_err_monitor;
  import iu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  // a falling edge at time 1 so that the asynchronous reset is seen
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [ERR_NSRC-1:0] err_in, sticky;
  logic rollback_ack, irq_ack, clr, rollback_req, irq;
  logic [7:0] count [ERR_NSRC];
  int model [ERR_NSRC];
  int checks = 0, failures = 0;

  err_monitor dut (.*);

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
    err_in = 0; rollback_ack = 0; irq_ack = 0; clr = 0;
    for (int i = 0; i < ERR_NSRC; i++) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // each source alone
    for (int s = 0; s < ERR_NSRC; s++) begin
      err_in = 7'(1) << s;
      @(negedge clk);
      err_in = 0;
      model[s]++;
      check(rollback_req == (s == 2 || s == 3 || s == 4 || s == 6), $sformatf("rollback for source %0d", s));
      check(irq == (s == 5), $sformatf("irq for source %0d", s));
      check(sticky[s] && count[s] == 8'(model[s]), "logged");
      rollback_ack = 1; irq_ack = 1;
      @(negedge clk);
      rollback_ack = 0; irq_ack = 0;
      check(!rollback_req && !irq, "acknowledged");
    end
    // random traffic
    for (int n = 0; n < 200; n++) begin
      err_in = 7'($urandom);
      for (int i = 0; i < ERR_NSRC; i++) if (err_in[i]) model[i]++;
      @(negedge clk);
    end
    err_in = 0;
    for (int i = 0; i < ERR_NSRC; i++) check(count[i] == 8'(model[i]), $sformatf("count %0d", i));
    // saturation
    for (int n = 0; n < 300; n++) begin err_in = 7'h1; @(negedge clk); end
    err_in = 0;
    check(count[0] == 8'hff, "counter saturates");
    clr = 1;
    @(negedge clk);
    clr = 0;
    check(sticky == 0 && count[0] == 0 && count[5] == 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
