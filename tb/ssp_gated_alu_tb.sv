// ssp_gated_alu_tb: self-checking test of the gated ALU.
//
// Drives random operands through all five operations and compares the
// result and flags with values computed here. It also checks the input
// gating: for every operation, the operand inputs of all units other than
// the selected one must be zero.
module ssp_gated_alu_tb;
  import ssp_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y, exp_y;
  logic [4:0]  n;
  logic        neg, zero;
  int checks = 0, failures = 0;

  ssp_gated_alu dut (.op(op), .a(a), .b(b), .shamt(n), .result(y), .neg(neg), .zero(zero));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: op=%0d a=%h b=%h n=%0d y=%h", what, op, a, b, n, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a  = $urandom;
      b  = (i % 50 == 0) ? a : $urandom;
      n  = 5'($urandom);
      op = alu_op_e'(i % 5);
      #1;
      case (op)
        ALU_SUB: exp_y = b - a;
        ALU_AND: exp_y = b & a;
        ALU_XOR: exp_y = b ^ a;
        ALU_SHR: exp_y = a >> n;
        default: exp_y = a << n;
      endcase
      check("result", y == exp_y);
      check("neg", neg == exp_y[31]);
      check("zero", zero == (exp_y == 0));
      // gating: idle units see zero inputs
      check("gate sub", (op == ALU_SUB) || (dut.sub_a == 0 && dut.sub_b == 0));
      check("gate and", (op == ALU_AND) || (dut.and_a == 0 && dut.and_b == 0));
      check("gate xor", (op == ALU_XOR) || (dut.xor_a == 0 && dut.xor_b == 0));
      check("gate shr", (op == ALU_SHR) || (dut.shr_a == 0 && dut.shr_n == 0));
      check("gate shl", (op == ALU_SHL) || (dut.shl_a == 0 && dut.shl_n == 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
