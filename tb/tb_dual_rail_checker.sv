// tb_dual_rail_checker: exhaustive test of an 4-pair two-rail checker
// against the rule "output pair complementary iff every input pair is".
module tb_dual_rail_checker;
  logic [3:0] a, b;
  logic [1:0] z;
  logic err;
  int checks = 0, failures = 0;

  dual_rail_checker #(.N(4)) dut (.a, .b, .z, .err);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      bit all_ok;
      {a, b} = 8'(i);
      #1;
      all_ok = ((a ^ b) == 4'hf);
      checks++;
      if ((z[0] != z[1]) != all_ok || err == all_ok) begin
        failures++;
        $display("FAIL: a=%b b=%b z=%b err=%b", a, b, z, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
