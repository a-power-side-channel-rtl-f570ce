// ssp_pkg: types and constants shared by the Small and Secure Processor (SSP).
//
// The SSP is a 32-bit processor with a four-class instruction set (Sub, Logic,
// Shift, Memory), a 16-entry register file and a Harvard memory system. Every
// instruction starts with a 16-bit main word:
//
//   [15:14] opcode   [13] function bit   [12:9] RA   [8:4] RB   [3:0] RD
//
// optionally followed by a 16-bit block that holds an immediate value or a
// branch. The field boundaries, the opcode values of the four classes, the
// operand-A/B code tables and the layout of the branch block (13-bit relative
// target, 3 condition bits) follow the processor's definition. The meaning of
// the three condition bits, the shift direction encoding of the function bit,
// and the memory-mapped PRNG address are this design's own choices.
package ssp_pkg;

  localparam int XLEN = 32;  // data path width
  localparam int NREG = 16;  // register file entries

  // Instruction classes (opcode field, bits 15:14)
  typedef enum logic [1:0] {
    OP_SUB   = 2'b00,  // sub / subi, optional branch
    OP_LOGIC = 2'b01,  // and (function=0) / xor (function=1)
    OP_MEM   = 2'b10,  // mr (function=0) / mw (function=1)
    OP_SHIFT = 2'b11   // shr (function=0) / shl (function=1)
  } opcode_e;

  // Operand A codes (RA field, 4 bits)
  localparam logic [3:0] OPA_ZERO = 4'd0;   // constant 0
  localparam logic [3:0] OPA_ONE  = 4'd1;   // constant 1
  localparam logic [3:0] OPA_MONE = 4'd2;   // constant -1
  localparam logic [3:0] OPA_IMM  = 4'd3;   // immediate from the optional block
  // 4..15: RF[code]

  // Operand B codes (RB field, 5 bits); 0..15 select RF[code]
  localparam logic [4:0] OPB_ZERO = 5'd16;  // constant 0
  localparam logic [4:0] OPB_ONE  = 5'd17;  // constant 1
  localparam logic [4:0] OPB_MONE = 5'd18;  // constant -1
  localparam logic [4:0] OPB_ZEXT = 5'd20;  // zero-extended immediate
  localparam logic [4:0] OPB_SEXT = 5'd24;  // sign-extended immediate

  // Branch-block condition bits (bits 2:0 of the optional block)
  localparam int COND_NEG = 0;  // taken if the subtraction result is negative
  localparam int COND_ZERO = 1; // taken if the result is zero
  localparam int COND_POS = 2;  // taken if the result is positive (> 0)

  // Word address that reads the PRNG instead of the data memory
  localparam logic [XLEN-1:0] PRNG_ADDR = '1;

  // Source of operand A / B after decoding
  typedef enum logic [1:0] {
    SRC_CONST = 2'd0,  // constant (value in the decoded constant field)
    SRC_IMM   = 2'd1,  // immediate from the optional block
    SRC_REG   = 2'd2   // register file
  } src_e;

  // ALU operation selected by the decoder; it also decides which ALU unit
  // receives its inputs (input gating).
  typedef enum logic [2:0] {
    ALU_SUB = 3'd0,  // b - a
    ALU_AND = 3'd1,  // b & a
    ALU_XOR = 3'd2,  // b ^ a
    ALU_SHR = 3'd3,  // a >> shamt (logical)
    ALU_SHL = 3'd4   // a << shamt
  } alu_op_e;

  // Decoded instruction
  typedef struct packed {
    opcode_e          opcode;
    alu_op_e          alu_op;
    src_e             a_src;
    logic [3:0]       a_reg;     // RF index read for operand A / store data
    logic [XLEN-1:0]  a_const;   // constant or offset used when a_src != SRC_REG
    src_e             b_src;
    logic [3:0]       b_reg;     // RF index read for operand B
    logic [XLEN-1:0]  b_const;
    logic [XLEN-1:0]  imm;       // extended immediate for operand A or B
    logic [4:0]       shamt;     // shift amount
    logic [3:0]       rd;        // destination register
    logic             rd_we;     // writes RD
    logic             mem_rd;    // mr
    logic             mem_wr;    // mw
    logic             has_ext;   // optional block in use (32-bit instruction)
    logic             branch;    // optional block is a branch block
    logic [12:0]      br_off;    // relative branch target (slots)
    logic [2:0]       br_cond;   // condition bits
  } dec_t;

endpackage
