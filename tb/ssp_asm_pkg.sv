// ssp_asm_pkg: instruction encoders for SSP test programs.
//
// Each function returns one 32-bit instruction slot {optional block, main
// word}, the form written into ssp_imem (Hi-Imem half, Lo-Imem half). The
// encodings are written out bit by bit here, independently of ssp_decoder,
// so that the testbenches check the decoder against them.
//
// Register arguments are operand codes: for operand A, 0/1/2 are the
// constants 0/1/-1 (A0, A1, AM1 below) and 4..15 registers; for operand B,
// 0..15 are registers and 16/17/18 the constants 0/1/-1 (B0, B1, BM1).
package ssp_asm_pkg;

  localparam logic [3:0] A0 = 4'd0, A1 = 4'd1, AM1 = 4'd2, AIMM = 4'd3;
  localparam logic [4:0] B0 = 5'd16, B1 = 5'd17, BM1 = 5'd18, BZX = 5'd20, BSX = 5'd24;

  // branch condition bits
  localparam logic [2:0] C_NEG = 3'b001, C_ZERO = 3'b010, C_POS = 3'b100;
  localparam logic [2:0] C_GE  = 3'b110, C_ALWAYS = 3'b111, C_NE = 3'b101;

  function automatic logic [31:0] enc(logic [1:0] op, logic fn, logic [3:0] ra,
                                      logic [4:0] rb, logic [3:0] rd, logic [15:0] ext);
    return {ext, op, fn, ra, rb, rd};
  endfunction

  // rd = b - a
  function automatic logic [31:0] sub_(logic [3:0] a, logic [4:0] b, logic [3:0] rd);
    return enc(2'b00, 1'b0, a, b, rd, 16'h0);
  endfunction
  // rd = b - imm (imm sign-extended)
  function automatic logic [31:0] subi_a(logic [15:0] imm, logic [4:0] b, logic [3:0] rd);
    return enc(2'b00, 1'b1, AIMM, b, rd, imm);
  endfunction
  // rd = imm - a (imm zero-extended)
  function automatic logic [31:0] subi_bz(logic [3:0] a, logic [15:0] imm, logic [3:0] rd);
    return enc(2'b00, 1'b1, a, BZX, rd, imm);
  endfunction
  // rd = imm - a (imm sign-extended)
  function automatic logic [31:0] subi_bs(logic [3:0] a, logic [15:0] imm, logic [3:0] rd);
    return enc(2'b00, 1'b1, a, BSX, rd, imm);
  endfunction
  // rd = b - a; branch by off slots (relative to this slot) if cond holds
  function automatic logic [31:0] subb(logic [3:0] a, logic [4:0] b, logic [3:0] rd,
                                       int off, logic [2:0] cond);
    logic [12:0] o;
    o = off[12:0];
    return enc(2'b00, 1'b1, a, b, rd, {o, cond});
  endfunction
  function automatic logic [31:0] and_(logic [3:0] a, logic [4:0] b, logic [3:0] rd);
    return enc(2'b01, 1'b0, a, b, rd, 16'h0);
  endfunction
  function automatic logic [31:0] xor_(logic [3:0] a, logic [4:0] b, logic [3:0] rd);
    return enc(2'b01, 1'b1, a, b, rd, 16'h0);
  endfunction
  // rd = imm & a / imm ^ a with a sign-extended immediate as operand B
  function automatic logic [31:0] andi(logic [3:0] a, logic [15:0] imm, logic [3:0] rd);
    return enc(2'b01, 1'b0, a, BSX, rd, imm);
  endfunction
  function automatic logic [31:0] xori(logic [3:0] a, logic [15:0] imm, logic [3:0] rd);
    return enc(2'b01, 1'b1, a, BSX, rd, imm);
  endfunction
  function automatic logic [31:0] shr_(logic [3:0] a, int n, logic [3:0] rd);
    logic [4:0] s;
    s = n[4:0];
    return enc(2'b11, 1'b0, a, s, rd, 16'h0);
  endfunction
  function automatic logic [31:0] shl_(logic [3:0] a, int n, logic [3:0] rd);
    logic [4:0] s;
    s = n[4:0];
    return enc(2'b11, 1'b1, a, s, rd, 16'h0);
  endfunction
  // rd = M[b - off]
  function automatic logic [31:0] mr(logic [3:0] off, logic [4:0] b, logic [3:0] rd);
    return enc(2'b10, 1'b0, off, b, rd, 16'h0);
  endfunction
  // M[b - off] = RF[rs]
  function automatic logic [31:0] mw(logic [3:0] off, logic [4:0] b, logic [3:0] rs);
    return enc(2'b10, 1'b1, off, b, rs, 16'h0);
  endfunction
  // rd = M[imm - off], absolute address from a zero-extended immediate
  function automatic logic [31:0] mr_abs(logic [3:0] off, logic [15:0] imm, logic [3:0] rd);
    return enc(2'b10, 1'b0, off, BZX, rd, imm);
  endfunction
  function automatic logic [31:0] mw_abs(logic [3:0] off, logic [15:0] imm, logic [3:0] rs);
    return enc(2'b10, 1'b1, off, BZX, rs, imm);
  endfunction
  // rd = fresh random number (read of address -1)
  function automatic logic [31:0] rnd(logic [3:0] rd);
    return mr(4'd0, BM1, rd);
  endfunction
  // rd = b  (b - 0)
  function automatic logic [31:0] mov(logic [4:0] b, logic [3:0] rd);
    return sub_(A0, b, rd);
  endfunction
  // branch to itself: halts the core
  function automatic logic [31:0] halt();
    return subb(A0, B0, 4'd0, 0, C_ALWAYS);
  endfunction

  // Reference model of the XORSHIFT-ADD generator: one step, returns output
  function automatic logic [31:0] xsadd_step(ref logic [31:0] s [4]);
    logic [31:0] t;
    t = s[0];
    t = t ^ (t << 15);
    t = t ^ (t >> 18);
    t = t ^ (s[3] << 11);
    s[0] = s[1]; s[1] = s[2]; s[2] = s[3]; s[3] = t;
    return s[3] + s[2];
  endfunction

endpackage
