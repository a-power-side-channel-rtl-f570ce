// ssp_decoder: combinational instruction decoder of the SSP.
//
// Input is one instruction slot: the 16-bit main word from the Lo-Imem bank and
// the 16-bit optional block from the Hi-Imem bank. Output is a dec_t struct
// (see ssp_pkg) telling the core where operands A and B come from, which ALU
// unit works, whether RD is written, whether the data memory is read or
// written and whether the optional block is a branch.
//
// Following the processor's definition:
//   * opcode 00 Sub:   RD = B - A. The function bit says whether the optional
//                      block is used. If operand A is code 3 or operand B is
//                      code 20/24 the block is the immediate, otherwise it is
//                      a branch block {target[12:0], condition[2:0]}.
//   * opcode 01 Logic: RD = B & A (function 0) or B ^ A (function 1).
//   * opcode 11 Shift: RD = A >> n (function 0) or A << n (function 1), where
//                      n is the 5-bit RB field, 0..31.
//   * opcode 10 Memory: mr (function 0) RD = M[B - off];
//                      mw (function 1) M[B - off] = RF[bits 3:0];
//                      off is the 4-bit RA field, zero-extended.
//   * Operand A codes 0/1/2 are the constants 0/1/-1, 3 the immediate, 4..15
//     registers; operand B codes 0..15 are registers, 16/17/18 the constants
//     0/1/-1, 20 the zero-extended and 24 the sign-extended immediate.
// This design's own choices: operand-A immediates are sign-extended, unused
// operand-B codes read as constant 0, a Sub with function bit 0 and an
// immediate code uses the immediate 0, and the function bit of Shift selects
// left (1) or right (0).
module ssp_decoder
  import ssp_pkg::*;
(
  input  logic [15:0] main_word,   // Lo-Imem half of the slot
  input  logic [15:0] ext_word,    // Hi-Imem half of the slot
  output dec_t        dec
);

  opcode_e    opc;
  logic       fn;
  logic [3:0] ra;
  logic [4:0] rb;
  logic [3:0] rd;
  logic       a_is_imm, b_is_imm, imm_used;

  assign opc = opcode_e'(main_word[15:14]);
  assign fn  = main_word[13];
  assign ra  = main_word[12:9];
  assign rb  = main_word[8:4];
  assign rd  = main_word[3:0];

  // Which operand fields may name an immediate depends on the class: the RA
  // field of Memory is an offset, the RB field of Shift is the shift amount.
  assign a_is_imm = (opc != OP_MEM) && (ra == OPA_IMM);
  assign b_is_imm = (opc != OP_SHIFT) && ((rb == OPB_ZEXT) || (rb == OPB_SEXT));
  assign imm_used = a_is_imm || b_is_imm;

  // Operand A constant for codes 0..2
  function automatic logic [XLEN-1:0] a_constant(logic [3:0] code);
    case (code)
      OPA_ONE:  return XLEN'(1);
      OPA_MONE: return '1;
      default:  return '0;
    endcase
  endfunction

  // Operand B constant for codes 16..31 that are not immediates
  function automatic logic [XLEN-1:0] b_constant(logic [4:0] code);
    case (code)
      OPB_ONE:  return XLEN'(1);
      OPB_MONE: return '1;
      default:  return '0;
    endcase
  endfunction

  always_comb begin
    dec = '0;
    dec.opcode  = opc;
    dec.rd      = rd;
    dec.shamt   = rb;
    dec.br_off  = ext_word[15:3];
    dec.br_cond = ext_word[2:0];

    // Optional block presence
    unique case (opc)
      OP_SUB:  dec.has_ext = fn;
      default: dec.has_ext = imm_used;
    endcase
    dec.branch = (opc == OP_SUB) && fn && !imm_used;

    // Immediate extension: operand B code 20 zero-extends, everything else
    // sign-extends. A Sub without its optional block has no immediate.
    if (!dec.has_ext)
      dec.imm = '0;
    else if (b_is_imm && rb == OPB_ZEXT)
      dec.imm = {{(XLEN-16){1'b0}}, ext_word};
    else
      dec.imm = {{(XLEN-16){ext_word[15]}}, ext_word};

    // Operand A
    if (opc == OP_MEM) begin
      dec.a_src   = SRC_CONST;                 // address offset
      dec.a_const = {{(XLEN-4){1'b0}}, ra};
      dec.a_reg   = rd;                        // store data register for mw
    end else if (ra == OPA_IMM) begin
      dec.a_src   = SRC_IMM;
      dec.a_reg   = ra;
    end else if (ra < 4'd4) begin
      dec.a_src   = SRC_CONST;
      dec.a_const = a_constant(ra);
      dec.a_reg   = ra;
    end else begin
      dec.a_src   = SRC_REG;
      dec.a_reg   = ra;
    end

    // Operand B (unused by Shift)
    if (rb < 5'd16) begin
      dec.b_src = SRC_REG;
      dec.b_reg = rb[3:0];
    end else if (b_is_imm) begin
      dec.b_src = SRC_IMM;
      dec.b_reg = rb[3:0];
    end else begin
      dec.b_src   = SRC_CONST;
      dec.b_const = b_constant(rb);
      dec.b_reg   = rb[3:0];
    end

    // Operation and side effects
    unique case (opc)
      OP_SUB: begin
        dec.alu_op = ALU_SUB;
        dec.rd_we  = 1'b1;
      end
      OP_LOGIC: begin
        dec.alu_op = fn ? ALU_XOR : ALU_AND;
        dec.rd_we  = 1'b1;
      end
      OP_SHIFT: begin
        dec.alu_op = fn ? ALU_SHL : ALU_SHR;
        dec.rd_we  = 1'b1;
      end
      OP_MEM: begin
        dec.alu_op = ALU_SUB;                  // address = B - offset
        dec.mem_rd = !fn;
        dec.mem_wr = fn;
        dec.rd_we  = !fn;
      end
      default: ;
    endcase
  end

endmodule
