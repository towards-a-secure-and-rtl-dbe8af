// tb_pp_alu_stage: checks the parity-predicted execute stage in both
// configurations against a reference ALU written here: random operations,
// single-cycle latency, recovery by re-execution after an injected transient
// (recovery mode), result written with an error flag (detection mode), and
// detection of an upset operand register.
module tb_pp_alu_stage;
  import iu_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  // a falling edge at time 1 so that the asynchronous reset is seen
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready_r, in_ready_d;
  alu_op_e op;
  logic [31:0] a, b, inj_set, inj_seu;
  logic out_valid_r, out_valid_d, set_err_r, set_err_d, rec_r, rec_d, seu_r, seu_d;
  logic [31:0] res_r, res_d;
  logic [1:0] z_r, z_d;

  pp_alu_stage #(.RECOVERY(1'b1)) dut_r (.clk, .rst_n, .in_valid, .in_ready(in_ready_r), .op, .a, .b,
    .out_valid(out_valid_r), .result(res_r), .set_err(set_err_r), .recovering(rec_r), .seu_err(seu_r),
    .chk_z(z_r), .inj_set, .inj_seu);
  pp_alu_stage #(.RECOVERY(1'b0)) dut_d (.clk, .rst_n, .in_valid, .in_ready(in_ready_d), .op, .a, .b,
    .out_valid(out_valid_d), .result(res_d), .set_err(set_err_d), .recovering(rec_d), .seu_err(seu_d),
    .chk_z(z_d), .inj_set, .inj_seu);

  int checks = 0, failures = 0;
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

  function automatic logic [31:0] ref_alu(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x + ~y + 32'd1;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_SLL: return x << y[4:0];
      ALU_SRL: return x >> y[4:0];
      default: return 32'((64'({{32{x[31]}}, x}) >> y[4:0]));
    endcase
  endfunction

  logic [31:0] expv;
  initial begin
    in_valid = 0; op = ALU_ADD; a = 0; b = 0; inj_set = 0; inj_seu = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // random operations, back to back: result one cycle after acceptance
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_valid = 1; op = alu_op_e'($urandom_range(0, 7)); a = $urandom; b = $urandom;
      expv = ref_alu(op, a, b);
      @(negedge clk);
      in_valid = 0;
      check(in_ready_r, "ready without faults");
      @(negedge clk);
      check(out_valid_r && res_r == expv, $sformatf("rec op %0d %h %h -> %h exp %h", op, a, b, res_r, expv));
      check(out_valid_d && res_d == expv, "detect-mode result");
      check(!set_err_r && !seu_r && z_r[0] != z_r[1], "no error flagged");
    end

    // transient on the ALU output during the compute cycle
    @(negedge clk);
    in_valid = 1; op = ALU_ADD; a = 32'd1000; b = 32'd234;
    @(negedge clk);
    in_valid = 0;
    inj_set = 32'h0000_0100;            // one flipped bit: odd error
    #1;
    check(set_err_r && rec_r && !in_ready_r, "recovery mode flags and stalls");
    check(set_err_d && !rec_d, "detection mode flags without stall");
    @(negedge clk);
    inj_set = 0;
    check(!out_valid_r, "faulty result not written in recovery mode");
    check(out_valid_d && res_d == (32'd1234 ^ 32'h100), "detection mode writes the faulty result");
    @(negedge clk);
    check(out_valid_r && res_r == 32'd1234, "recovered by recomputation");

    // even number of flipped bits is outside the parity model
    @(negedge clk);
    in_valid = 1; op = ALU_XOR; a = 32'hffff_0000; b = 32'h0f0f_0f0f;
    @(negedge clk);
    in_valid = 0;
    inj_set = 32'h0000_0003;
    #1;
    check(!set_err_r, "two flipped bits are not detected by parity");
    @(negedge clk);
    inj_set = 0;

    // SEU in an operand register
    @(negedge clk);
    in_valid = 1; op = ALU_OR; a = 32'h1; b = 32'h2;
    inj_seu = 32'h8000_0000;           // flips a_q as it is written
    @(negedge clk);
    in_valid = 0; inj_seu = 0;
    #1;
    check(seu_r && seu_d, "operand register upset detected");
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
