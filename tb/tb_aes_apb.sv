// tb_aes_apb: drives the AES peripheral through APB transfers only: loads
// FIPS-197 C.1 and C.3 keys, encrypts and decrypts, reads the results back,
// checks the status bits, the interrupt, the wiping of the key staging
// registers, and the reporting of an injected fault.
module tb_aes_apb;
  import aes_pkg::*;

  logic pclk = 1'b0, presetn = 1'b1;
  // a falling edge at time 1 so that the asynchronous reset is seen
  initial #1 presetn = 1'b0;
  always #5 pclk = ~pclk;
  logic psel, penable, pwrite;
  logic [7:0] paddr;
  logic [31:0] pwdata, prdata;
  logic irq, err_pulse;
  aes_inj_t inj;

  aes_apb dut (.*);

  int checks = 0, failures = 0;
  int err_pulses = 0;
  always @(posedge pclk) if (presetn && err_pulse) err_pulses++;

  initial begin
    repeat (20000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge pclk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge pclk);
    penable = 1;
    @(negedge pclk);
    psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge pclk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge pclk);
    penable = 1;
    d = prdata;
    @(negedge pclk);
    psel = 0; penable = 0;
  endtask

  task automatic wait_status(input int bitn);
    logic [31:0] st;
    int n = 0;
    do begin apb_read(8'h04, st); n++; end while (!st[bitn] && n < 200);
  endtask

  logic [31:0] r;
  logic [127:0] blk;

  task automatic read_out(output logic [127:0] b);
    logic [31:0] t;
    for (int i = 0; i < 4; i++) begin
      apb_read(8'h40 + 8'(4*i), t);
      b[127-32*i -: 32] = t;
    end
  endtask

  task automatic write_block(input logic [127:0] b);
    for (int i = 0; i < 4; i++) apb_write(8'h30 + 8'(4*i), b[127-32*i -: 32]);
  endtask

  initial begin
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0; inj = '{INJ_NONE, 8'd0};
    repeat (3) @(negedge pclk);
    presetn = 1;

    // C.1, 128-bit key, interrupt enabled
    for (int i = 0; i < 4; i++) apb_write(8'h10 + 8'(4*i), 32'h00010203 + 32'(i) * 32'h04040404);
    apb_write(8'h00, 32'h0000_0204);         // key_load, 128 bits, irq_en
    @(negedge pclk);
    check(dut.key_r[0] == 32'h0, "key staging wiped after key_load");
    wait_status(1);
    write_block(128'h00112233445566778899aabbccddeeff);
    apb_write(8'h00, 32'h0000_0201);         // start encryption
    wait_status(2);
    check(irq, "interrupt on completion");
    read_out(blk);
    check(blk == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("C.1 via APB %h", blk));
    apb_write(8'h04, 32'h4);                 // clear done
    check(!irq, "interrupt cleared");
    apb_read(8'h10, r);
    check(r == 32'h0, "key not readable");

    write_block(blk);
    apb_write(8'h00, 32'h0000_0203);         // start decryption
    wait_status(2);
    read_out(blk);
    check(blk == 128'h00112233445566778899aabbccddeeff, "C.1 decryption via APB");
    apb_write(8'h04, 32'h4);

    // C.3, 256-bit key
    for (int i = 0; i < 8; i++) apb_write(8'h10 + 8'(4*i), 32'h00010203 + 32'(i) * 32'h04040404);
    apb_write(8'h00, 32'h0000_0224);
    wait_status(1);
    apb_read(8'h00, r);
    check(r[5:4] == 2'd2 && r[9], "CTRL readback");
    write_block(128'h00112233445566778899aabbccddeeff);
    apb_write(8'h00, 32'h0000_0221);
    wait_status(2);
    read_out(blk);
    check(blk == 128'h8ea2b7ca516745bfeafc49904b496089, "C.3 via APB");
    apb_write(8'h04, 32'h4);

    // injected round SET, self-reset enabled
    apb_write(8'h00, 32'h0000_0320);        // self_reset + irq_en, no command
    apb_write(8'h00, 32'h0000_0321);        // start
    repeat (6) @(negedge pclk);
    inj = '{INJ_ROUND_SET, 8'd40};            // two cycles: covers one RUN cycle
    repeat (2) @(negedge pclk);
    inj = '{INJ_NONE, 8'd0};
    wait_status(3);
    apb_read(8'h04, r);
    check(r[3] && r[9] && !r[1] && !r[2], $sformatf("error reported, key wiped, no result: %h", r));
    check(irq, "interrupt on error");
    check(err_pulses == 1, "error pulse toward the monitor");
    apb_write(8'h04, 32'h8);
    apb_read(8'h04, r);
    check(!r[3] && !irq, "error cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
