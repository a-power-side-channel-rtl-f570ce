// ssp_isa_tb: random-program test of the whole SSP against an instruction
// set model.
//
// Each run fills the instruction memory with random instruction slots: a
// random main word and a random optional block, so every opcode, function bit,
// operand code, constant, immediate form, shift amount, memory offset and
// branch condition occurs. Only branch targets are constrained: a Sub that
// carries a branch block gets a forward offset of 1..6 slots, so every
// program ends at the halt in its last slot. The data memory is filled with
// random words.
//
// The model below executes the same program from the written definition of
// the instruction set (field layout, operand codes, condition bits, the random
// number address 0xFFFFFFFF and the XSadd generator from its reset seed). At
// the end the testbench compares all 16 registers, all 1024 data words, the
// number of instructions executed and the cycle count, which must be
// executed + taken branches + 1: one cycle per instruction, one squashed slot
// per taken branch (the halt included), and one for the first fetch.
module ssp_isa_tb;
  import ssp_asm_pkg::*;

  localparam int LEN = 400, RUNS = 40;
  localparam logic [127:0] SEED = 128'h1234_5678_9abc_def0_0fed_cba9_8765_4321;

  logic         clk = 0, rst_n = 0;
  logic         imem_we = 0, dmem_host_en = 0, dmem_host_we = 0;
  logic [8:0]   imem_waddr = 0, pc_ex;
  logic [31:0]  imem_wdata = 0, dmem_host_wdata = 0, dmem_host_rdata;
  logic [9:0]   dmem_host_addr = 0;
  logic         halted, retire, br_taken;
  int checks = 0, failures = 0;
  int retired = 0;

  ssp_top dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata), .dmem_host_en(dmem_host_en), .dmem_host_we(dmem_host_we),
    .dmem_host_addr(dmem_host_addr), .dmem_host_wdata(dmem_host_wdata),
    .dmem_host_rdata(dmem_host_rdata), .seed_we(1'b0), .seed(128'h0),
    .halted(halted), .retire(retire), .br_taken(br_taken), .pc_ex(pc_ex));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && retire) retired <= retired + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ model
  typedef struct {
    logic [31:0] r [16];
    logic [31:0] m [1024];
    logic [31:0] s [4];
    int          executed;
    int          taken;
  } arch_t;

  function automatic logic [31:0] sx16(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  function automatic void run_model(ref arch_t a, ref logic [31:0] p [512]);
    int pc = 0;
    while (1) begin
      logic [15:0] w, e;
      logic [1:0]  opc;
      logic        fn, a_imm, b_imm, has_ext, is_br;
      logic [3:0]  ra, rd;
      logic [4:0]  rb;
      logic [31:0] imm, va, vb, res, addr;
      int          next;
      w = p[pc][15:0]; e = p[pc][31:16];
      opc = w[15:14]; fn = w[13]; ra = w[12:9]; rb = w[8:4]; rd = w[3:0];
      a_imm = (opc != 2'b10) && (ra == 4'd3);
      b_imm = (opc != 2'b11) && (rb == 5'd20 || rb == 5'd24);
      has_ext = (opc == 2'b00) ? fn : (a_imm || b_imm);
      is_br = (opc == 2'b00) && fn && !(a_imm || b_imm);
      imm = !has_ext ? 32'h0 : (b_imm && rb == 5'd20) ? {16'h0, e} : sx16(e);
      case (ra)
        4'd0: va = 0;
        4'd1: va = 1;
        4'd2: va = '1;
        4'd3: va = imm;
        default: va = a.r[ra];
      endcase
      if (rb < 16)                       vb = a.r[rb[3:0]];
      else if (rb == 16)                 vb = 0;
      else if (rb == 17)                 vb = 1;
      else if (rb == 18)                 vb = '1;
      else if (rb == 20 || rb == 24)     vb = imm;
      else                               vb = 0;
      a.executed++;
      next = pc + 1;
      case (opc)
        2'b00: begin
          res = vb - va;
          a.r[rd] = res;
          if (is_br && ((e[0] && res[31]) || (e[1] && res == 0) || (e[2] && !res[31] && res != 0))) begin
            a.taken++;
            next = pc + int'(signed'(e[15:3]));
            if (next == pc) return;
          end
        end
        2'b01: a.r[rd] = fn ? (vb ^ va) : (vb & va);
        2'b11: a.r[rd] = fn ? (va << rb) : (va >> rb);
        default: begin
          addr = vb - {28'h0, ra};
          if (!fn) begin
            if (addr == 32'hffff_ffff) a.r[rd] = xsadd_step(a.s);
            else                       a.r[rd] = a.m[addr[9:0]];
          end else if (addr != 32'hffff_ffff) begin
            a.m[addr[9:0]] = a.r[rd];
          end
        end
      endcase
      pc = next;
    end
  endfunction

  // ------------------------------------------------------------ programs
  function automatic void random_prog(ref logic [31:0] p [512]);
    for (int i = 0; i < LEN - 1; i++) begin
      logic [31:0] w;
      logic a_imm, b_imm;
      w = $urandom;
      a_imm = (w[15:14] != 2'b10) && (w[12:9] == 4'd3);
      b_imm = (w[15:14] != 2'b11) && (w[8:4] == 5'd20 || w[8:4] == 5'd24);
      if (w[15:14] == 2'b00 && w[13] && !(a_imm || b_imm)) begin
        int off;
        off = 1 + int'($urandom % 6);
        if (i + off > LEN - 1) off = LEN - 1 - i;
        w[31:19] = 13'(off);
      end
      p[i] = w;
    end
    p[LEN - 1] = halt();
  endfunction

  initial begin
    repeat (RUNS * 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [31:0] prog [512];
    static arch_t a;
    static int total_exec = 0, total_taken = 0, total_cycles = 0;
    for (int run = 0; run < RUNS; run++) begin
      int cycles, bad_r, bad_m;
      random_prog(prog);
      foreach (a.r[i]) a.r[i] = 0;
      foreach (a.m[i]) a.m[i] = $urandom;
      {a.s[3], a.s[2], a.s[1], a.s[0]} = SEED;
      a.executed = 0; a.taken = 0;
      rst_n = 0;
      for (int i = 0; i < LEN; i++) begin
        @(negedge clk);
        imem_we = 1; imem_waddr = 9'(i); imem_wdata = prog[i];
      end
      @(negedge clk);
      imem_we = 0; dmem_host_en = 1; dmem_host_we = 1;
      for (int i = 0; i < 1024; i++) begin
        dmem_host_addr = 10'(i); dmem_host_wdata = a.m[i];
        @(negedge clk);
      end
      dmem_host_en = 0; dmem_host_we = 0;
      run_model(a, prog);
      retired = 0;
      rst_n = 1;
      cycles = 0;
      while (!halted) begin
        @(negedge clk);
        cycles++;
      end
      bad_r = 0;
      foreach (a.r[i]) if (dut.u_core.u_rf.regs[i] != a.r[i]) begin
        bad_r++;
        if (bad_r < 4) $display("run %0d R%0d = %08h, model %08h", run, i, dut.u_core.u_rf.regs[i], a.r[i]);
      end
      check($sformatf("run %0d registers", run), bad_r == 0);
      bad_m = 0;
      dmem_host_en = 1; dmem_host_we = 0;
      for (int i = 0; i < 1024; i++) begin
        dmem_host_addr = 10'(i);
        @(negedge clk);
        if (dmem_host_rdata != a.m[i]) bad_m++;
      end
      dmem_host_en = 0;
      check($sformatf("run %0d data memory (%0d words differ)", run, bad_m), bad_m == 0);
      check($sformatf("run %0d instructions executed %0d, model %0d", run, retired, a.executed),
            retired == a.executed);
      check($sformatf("run %0d cycles %0d = executed %0d + taken %0d + 1", run, cycles, a.executed, a.taken),
            cycles == a.executed + a.taken + 1);
      total_exec += a.executed; total_taken += a.taken; total_cycles += cycles;
    end
    $display("%0d random programs: %0d instructions executed, %0d taken branches, %0d cycles",
             RUNS, total_exec, total_taken, total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
