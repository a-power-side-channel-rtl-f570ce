// ssp_decoder_tb: self-checking test of the instruction decoder.
//
// Decodes random instruction slots and compares the decoded fields with a
// reference decoding written here from the instruction format: the ALU
// operation, the effective operand A and B values (given a known register
// content RF[i] = 0x100 + i), the destination, memory flags, presence of
// the optional block and branch fields. A few directed encodings from the
// test assembler are checked as well.
module ssp_decoder_tb;
  import ssp_pkg::*;
  import ssp_asm_pkg::*;

  logic [31:0] slot;
  dec_t        dec;
  int checks = 0, failures = 0;

  ssp_decoder dut (.main_word(slot[15:0]), .ext_word(slot[31:16]), .dec(dec));

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s slot=%h", what, slot); end
  endtask

  function automatic logic [31:0] rf(logic [3:0] i);
    return 32'h100 + 32'(i);
  endfunction

  // effective operand value as the core forms it
  function automatic logic [31:0] opval(src_e s, logic [3:0] r, logic [31:0] c, logic [31:0] imm);
    case (s)
      SRC_REG: return rf(r);
      SRC_IMM: return imm;
      default: return c;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [1:0]  op;
      logic        fn, ext_used, imm_a, imm_b, is_branch;
      logic [3:0]  ra, rd;
      logic [4:0]  rb;
      logic [15:0] ext;
      logic [31:0] ea, eb, immv;
      alu_op_e     eop;
      slot = $urandom;
      if (i % 3 == 0) slot[12:9] = 4'd3;             // more immediates
      if (i % 5 == 0) slot[8:4] = (i % 2) ? 5'd20 : 5'd24;
      #1;
      op = slot[15:14]; fn = slot[13]; ra = slot[12:9]; rb = slot[8:4]; rd = slot[3:0];
      ext = slot[31:16];
      imm_a = (op != 2'b10) && ra == 4'd3;
      imm_b = (op != 2'b11) && (rb == 5'd20 || rb == 5'd24);
      ext_used  = (op == 2'b00) ? fn : (imm_a || imm_b);
      is_branch = (op == 2'b00) && fn && !(imm_a || imm_b);
      if (!ext_used) immv = 0;
      else if (imm_b && rb == 5'd20) immv = {16'h0, ext};
      else immv = {{16{ext[15]}}, ext};
      // operand A
      if (op == 2'b10) ea = {28'h0, ra};
      else if (ra == 0) ea = 0;
      else if (ra == 1) ea = 1;
      else if (ra == 2) ea = 32'hffff_ffff;
      else if (ra == 3) ea = immv;
      else ea = rf(ra);
      // operand B
      if (rb < 16) eb = rf(rb[3:0]);
      else if (rb == 17) eb = 1;
      else if (rb == 18) eb = 32'hffff_ffff;
      else if (imm_b) eb = immv;
      else eb = 0;
      case (op)
        2'b00: eop = ALU_SUB;
        2'b01: eop = fn ? ALU_XOR : ALU_AND;
        2'b11: eop = fn ? ALU_SHL : ALU_SHR;
        default: eop = ALU_SUB;
      endcase
      check("alu op", dec.alu_op == eop);
      check("operand a", opval(dec.a_src, dec.a_reg, dec.a_const, dec.imm) == ea);
      if (op != 2'b11) check("operand b", opval(dec.b_src, dec.b_reg, dec.b_const, dec.imm) == eb);
      else check("shift amount", dec.shamt == rb);
      check("rd", dec.rd == rd);
      check("rd_we", dec.rd_we == !(op == 2'b10 && fn));
      check("mem_rd", dec.mem_rd == (op == 2'b10 && !fn));
      check("mem_wr", dec.mem_wr == (op == 2'b10 && fn));
      if (op == 2'b10 && fn) check("store reg", dec.a_reg == rd);
      check("has_ext", dec.has_ext == ext_used);
      check("branch", dec.branch == is_branch);
      if (is_branch) begin
        check("br_off", dec.br_off == ext[15:3]);
        check("br_cond", dec.br_cond == ext[2:0]);
      end
    end
    // directed: assembler encodings
    slot = subb(4'd5, 5'd6, 4'd7, -3, C_NEG); #1;
    check("subb", dec.branch && dec.br_off == 13'h1ffd && dec.br_cond == 3'b001 &&
                  dec.a_reg == 5 && dec.b_reg == 6 && dec.rd == 7);
    slot = subi_a(16'hfff0, 5'd9, 4'd1); #1;
    check("subi_a", dec.a_src == SRC_IMM && dec.imm == 32'hffff_fff0 && !dec.branch);
    slot = subi_bz(4'd4, 16'h8001, 4'd2); #1;
    check("subi_bz", dec.b_src == SRC_IMM && dec.imm == 32'h0000_8001);
    slot = mw(4'd2, 5'd8, 4'd3); #1;
    check("mw", dec.mem_wr && !dec.rd_we && dec.a_const == 2 && dec.a_reg == 3 && dec.b_reg == 8);
    slot = shl_(4'd6, 13, 4'd6); #1;
    check("shl", dec.alu_op == ALU_SHL && dec.shamt == 13 && !dec.has_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
