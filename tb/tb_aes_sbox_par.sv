// tb_aes_sbox_par: checks the forward and inverse S-box ROMs against
// published S-box entries, checks that the two tables invert each other over
// all 256 inputs, that no read reports a parity error, and that every
// single stored-bit flip is reported.
module tb_aes_sbox_par;
  logic [7:0] fa, fd, ia, id;
  logic [8:0] finj, iinj;
  logic fe, ie;
  int checks = 0, failures = 0;

  aes_sbox_par #(.INVERSE(1'b0)) u_f (.addr(fa), .inj_flip(finj), .data(fd), .par_err(fe));
  aes_sbox_par #(.INVERSE(1'b1)) u_i (.addr(ia), .inj_flip(iinj), .data(id), .par_err(ie));
  assign ia = fd;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a few published values: S(00)=63 S(01)=7c S(53)=ed S(ff)=16 S(10)=ca S(c9)=dd
  logic [7:0] kin  [6] = '{8'h00, 8'h01, 8'h53, 8'hff, 8'h10, 8'hc9};
  logic [7:0] kout [6] = '{8'h63, 8'h7c, 8'hed, 8'h16, 8'hca, 8'hdd};

  initial begin
    finj = 0; iinj = 0;
    for (int k = 0; k < 6; k++) begin
      fa = kin[k];
      #1;
      check(fd == kout[k], $sformatf("S(%h)=%h", fa, fd));
      check(id == kin[k], "inverse of known value");
    end
    for (int x = 0; x < 256; x++) begin
      fa = 8'(x);
      #1;
      check(id == 8'(x) && !fe && !ie, $sformatf("round trip %0d", x));
      for (int b = 0; b < 9; b++) begin
        finj = 9'(1) << b;
        iinj = 9'(1) << (8 - b);
        #1;
        check(fe, "forward ROM upset reported");
        finj = 0;
        #1;
        check(ie, "inverse ROM upset reported");
        iinj = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
