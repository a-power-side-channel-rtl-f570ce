// ssp_gated_alu: the SSP's ALU with operand input gating.
//
// The ALU has four units: a subtractor (b - a, also used for memory
// addresses), a bitwise AND, a bitwise XOR and a barrel shifter that shifts
// operand a left or right by any amount 0..31. As the processor's definition
// asks, only the unit needed by the current operation sees the operands: the
// inputs of every other unit are forced to zero, so idle units do not toggle
// and cannot spread secret-dependent glitches (low-power input gating). Since
// a unit with all-zero inputs outputs zero, the result is the OR of the four
// unit outputs, which needs no select-dependent multiplexer.
//
// Purely combinational. Outputs: result, plus the sign (neg) and zero flags
// of the result used by conditional branches. The flag definitions are this
// design's own choice (sign bit of the 32-bit result).
module ssp_gated_alu
  import ssp_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  logic [4:0]      shamt,
  output logic [XLEN-1:0] result,
  output logic            neg,
  output logic            zero
);

  logic en_sub, en_and, en_xor, en_shr, en_shl;
  logic [XLEN-1:0] sub_a, sub_b, and_a, and_b, xor_a, xor_b, shr_a, shl_a;
  logic [4:0]      shr_n, shl_n;
  logic [XLEN-1:0] sub_y, and_y, xor_y, shr_y, shl_y;

  assign en_sub = (op == ALU_SUB);
  assign en_and = (op == ALU_AND);
  assign en_xor = (op == ALU_XOR);
  assign en_shr = (op == ALU_SHR);
  assign en_shl = (op == ALU_SHL);

  // Input gating
  assign sub_a = a & {XLEN{en_sub}};
  assign sub_b = b & {XLEN{en_sub}};
  assign and_a = a & {XLEN{en_and}};
  assign and_b = b & {XLEN{en_and}};
  assign xor_a = a & {XLEN{en_xor}};
  assign xor_b = b & {XLEN{en_xor}};
  assign shr_a = a & {XLEN{en_shr}};
  assign shr_n = shamt & {5{en_shr}};
  assign shl_a = a & {XLEN{en_shl}};
  assign shl_n = shamt & {5{en_shl}};

  // Units
  assign sub_y = sub_b - sub_a;
  assign and_y = and_b & and_a;
  assign xor_y = xor_b ^ xor_a;
  assign shr_y = shr_a >> shr_n;
  assign shl_y = shl_a << shl_n;

  assign result = sub_y | and_y | xor_y | shr_y | shl_y;
  assign neg    = result[XLEN-1];
  assign zero   = (result == '0);

endmodule
