// ssp_chaskey_tb: masked Chaskey-12 permutation on the full-size SSP.
//
// The 128-bit Chaskey state v0..v3 is held in data memory as two Boolean
// shares per word (v = a ^ b): share a at words 16..19, share b at 20..23.
// The program runs the 12 permutation rounds
//   v0 += v1; v1 <<<= 5;  v1 ^= v0; v0 <<<= 16;
//   v2 += v3; v3 <<<= 8;  v3 ^= v2;
//   v0 += v3; v3 <<<= 13; v3 ^= v0;
//   v2 += v1; v1 <<<= 7;  v1 ^= v2; v2 <<<= 16;
// on the shares. Rotations and XORs work share by share. Each modular
// addition converts both operands from Boolean to arithmetic masking
// (Goubin's B2A with a fresh random number), adds the arithmetic shares and
// their masks, and converts back to Boolean masking with the 32-step A2B
// conversion, again with a fresh random number. The round counter is kept in
// data memory (word 30), so the round body is a loop.
//
// The testbench loads random shares, runs the program until the core halts,
// and checks that the recombined result equals the unmasked permutation
// computed here, that the output share a is not the plain result, and that
// the program drew fresh random numbers. It runs three different states.
module ssp_chaskey_tb;
  import ssp_asm_pkg::*;

  localparam int VA = 16, VB = 20, CNT = 30;

  logic         clk = 0, rst_n = 0;
  logic         imem_we = 0, dmem_host_en = 0, dmem_host_we = 0;
  logic [8:0]   imem_waddr = 0, pc_ex;
  logic [31:0]  imem_wdata = 0, dmem_host_wdata = 0, dmem_host_rdata;
  logic [9:0]   dmem_host_addr = 0;
  logic         halted, retire, br_taken;
  logic         seed_we = 0;
  logic [127:0] seed = '0;
  logic [31:0]  prog [512];
  int checks = 0, failures = 0;
  int rand_reads = 0;

  ssp_top dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata), .dmem_host_en(dmem_host_en), .dmem_host_we(dmem_host_we),
    .dmem_host_addr(dmem_host_addr), .dmem_host_wdata(dmem_host_wdata),
    .dmem_host_rdata(dmem_host_rdata), .seed_we(seed_we), .seed(seed),
    .halted(halted), .retire(retire), .br_taken(br_taken), .pc_ex(pc_ex));

  always #5 clk = ~clk;

  always @(posedge clk) if (dut.u_core.prng_next) rand_reads++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(int addr, logic [31:0] v);
    @(negedge clk);
    dmem_host_en = 1; dmem_host_we = 1; dmem_host_addr = 10'(addr); dmem_host_wdata = v;
    @(negedge clk);
    dmem_host_en = 0; dmem_host_we = 0;
  endtask

  task automatic host_read(int addr, output logic [31:0] v);
    @(negedge clk);
    dmem_host_en = 1; dmem_host_we = 0; dmem_host_addr = 10'(addr);
    @(negedge clk);
    dmem_host_en = 0;
    v = dmem_host_rdata;
  endtask

  // ------------------------------------------------------------ program
  function automatic void emit(ref logic [31:0] p [512], ref int pc, input logic [31:0] w);
    p[pc] = w; pc++;
  endfunction

  function automatic void ld(ref logic [31:0] p [512], ref int pc, input int addr, input logic [3:0] rd);
    emit(p, pc, mr_abs(4'd0, 16'(addr), rd));
  endfunction

  function automatic void st(ref logic [31:0] p [512], ref int pc, input int addr, input logic [3:0] rs);
    emit(p, pc, mw_abs(4'd0, 16'(addr), rs));
  endfunction

  // Boolean to arithmetic: in r4 = x' (x = x' ^ r), r5 = r; uses r6 (random),
  // r8; out r7 = A with x = A + r.
  function automatic void b2a(ref logic [31:0] p [512], ref int pc);
    emit(p, pc, rnd(4'd6));
    emit(p, pc, xor_(4'd4, 5'd6, 4'd8));   // T = X' ^ R
    emit(p, pc, sub_(4'd6, 5'd8, 4'd8));   // T = T - R
    emit(p, pc, xor_(4'd4, 5'd8, 4'd8));   // T = T ^ X'
    emit(p, pc, xor_(4'd6, 5'd5, 4'd6));   // R = R ^ r
    emit(p, pc, xor_(4'd4, 5'd6, 4'd7));   // A = X' ^ R
    emit(p, pc, sub_(4'd6, 5'd7, 4'd7));   // A = A - R
    emit(p, pc, xor_(4'd8, 5'd7, 4'd7));   // A = A ^ T
  endfunction

  // v[d] += v[s] on Boolean shares
  function automatic void madd(ref logic [31:0] p [512], ref int pc, input int d, input int s);
    int loop;
    ld(p, pc, VA + d, 4'd4); ld(p, pc, VB + d, 4'd5);
    b2a(p, pc);
    emit(p, pc, mov(5'd7, 4'd9));          // A_x
    emit(p, pc, mov(5'd5, 4'd10));         // r
    ld(p, pc, VA + s, 4'd4); ld(p, pc, VB + s, 4'd5);
    b2a(p, pc);                            // A_y in r7, s in r5
    emit(p, pc, sub_(4'd7, 5'd16, 4'd8));  // -A_y
    emit(p, pc, sub_(4'd8, 5'd9, 4'd9));   // A = A_x + A_y
    emit(p, pc, sub_(4'd5, 5'd16, 4'd8));  // -s
    emit(p, pc, sub_(4'd8, 5'd10, 4'd10)); // m = r + s ; x + y = A + m
    // arithmetic to Boolean: A = r9, r = r10, R = r11, T = r12, X' = r13, O = r14
    emit(p, pc, rnd(4'd11));
    emit(p, pc, shl_(4'd11, 1, 4'd12));    // T = 2R
    emit(p, pc, xor_(4'd11, 5'd10, 4'd13)); // X' = R ^ r
    emit(p, pc, and_(4'd11, 5'd13, 4'd14)); // O = R & X'
    emit(p, pc, xor_(4'd12, 5'd9, 4'd13)); // X' = T ^ A
    emit(p, pc, xor_(4'd11, 5'd13, 4'd11)); // R = R ^ X'
    emit(p, pc, and_(4'd11, 5'd10, 4'd11)); // R = R & r
    emit(p, pc, xor_(4'd14, 5'd11, 4'd14)); // O = O ^ R
    emit(p, pc, and_(4'd12, 5'd9, 4'd11)); // R = T & A
    emit(p, pc, xor_(4'd14, 5'd11, 4'd14)); // O = O ^ R
    emit(p, pc, subi_bz(A0, 16'd31, 4'd15)); // k = 31 steps
    loop = pc;
    emit(p, pc, and_(4'd12, 5'd10, 4'd11)); // R = T & r
    emit(p, pc, xor_(4'd11, 5'd14, 4'd11)); // R = R ^ O
    emit(p, pc, and_(4'd12, 5'd9, 4'd12)); // T = T & A
    emit(p, pc, xor_(4'd11, 5'd12, 4'd11)); // R = R ^ T
    emit(p, pc, shl_(4'd11, 1, 4'd12));    // T = 2R
    emit(p, pc, subb(A1, 5'd15, 4'd15, loop - pc, C_POS));
    emit(p, pc, xor_(4'd13, 5'd12, 4'd13)); // X' = X' ^ T
    st(p, pc, VA + d, 4'd13); st(p, pc, VB + d, 4'd10);
  endfunction

  // v[i] <<<= k, share by share
  function automatic void mrot(ref logic [31:0] p [512], ref int pc, input int i, input int k);
    for (int sh = 0; sh < 2; sh++) begin
      ld(p, pc, (sh != 0 ? VB : VA) + i, 4'd4);
      emit(p, pc, shl_(4'd4, k, 4'd1));
      emit(p, pc, shr_(4'd4, 32 - k, 4'd14));
      emit(p, pc, xor_(4'd14, 5'd1, 4'd4));
      st(p, pc, (sh != 0 ? VB : VA) + i, 4'd4);
    end
  endfunction

  // v[d] ^= v[s], share by share
  function automatic void mxor(ref logic [31:0] p [512], ref int pc, input int d, input int s);
    for (int sh = 0; sh < 2; sh++) begin
      ld(p, pc, (sh != 0 ? VB : VA) + d, 4'd4);
      ld(p, pc, (sh != 0 ? VB : VA) + s, 4'd5);
      emit(p, pc, xor_(4'd4, 5'd5, 4'd4));
      st(p, pc, (sh != 0 ? VB : VA) + d, 4'd4);
    end
  endfunction

  function automatic int chaskey_prog(ref logic [31:0] p [512]);
    int pc = 0, top;
    emit(p, pc, subi_bz(A0, 16'd12, 4'd4));
    st(p, pc, CNT, 4'd4);
    top = pc;
    madd(p, pc, 0, 1); mrot(p, pc, 1, 5);  mxor(p, pc, 1, 0); mrot(p, pc, 0, 16);
    madd(p, pc, 2, 3); mrot(p, pc, 3, 8);  mxor(p, pc, 3, 2);
    madd(p, pc, 0, 3); mrot(p, pc, 3, 13); mxor(p, pc, 3, 0);
    madd(p, pc, 2, 1); mrot(p, pc, 1, 7);  mxor(p, pc, 1, 2); mrot(p, pc, 2, 16);
    ld(p, pc, CNT, 4'd4);
    emit(p, pc, sub_(A1, 5'd4, 4'd4));
    st(p, pc, CNT, 4'd4);
    emit(p, pc, subb(A0, 5'd4, 4'd4, top - pc, C_POS));
    emit(p, pc, halt());
    return pc;
  endfunction

  // ------------------------------------------------------------ reference
  function automatic logic [31:0] rl(logic [31:0] x, int k);
    return (x << k) | (x >> (32 - k));
  endfunction

  function automatic void chaskey_ref(ref logic [31:0] v [4]);
    for (int r = 0; r < 12; r++) begin
      v[0] += v[1]; v[1] = rl(v[1], 5);  v[1] ^= v[0]; v[0] = rl(v[0], 16);
      v[2] += v[3]; v[3] = rl(v[3], 8);  v[3] ^= v[2];
      v[0] += v[3]; v[3] = rl(v[3], 13); v[3] ^= v[0];
      v[2] += v[1]; v[1] = rl(v[1], 7);  v[1] ^= v[2]; v[2] = rl(v[2], 16);
    end
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    len = chaskey_prog(prog);
    check("program fits the instruction memory", len <= 512);
    for (int run = 0; run < 3; run++) begin
      logic [31:0] v [4], a [4], b [4], ga, gb;
      int cycles, draws;
      foreach (v[i]) begin
        v[i] = $urandom; b[i] = $urandom; a[i] = v[i] ^ b[i];
      end
      rst_n = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        imem_we = 1; imem_waddr = 9'(i); imem_wdata = prog[i];
      end
      @(negedge clk) imem_we = 0;
      foreach (v[i]) begin
        host_write(VA + i, a[i]);
        host_write(VB + i, b[i]);
      end
      // a new seed is loaded in the first cycle out of reset; the first random
      // number is read many cycles later
      @(negedge clk);
      rst_n = 1; seed_we = 1; seed = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk) seed_we = 0;
      draws = rand_reads;
      cycles = 1;
      while (!halted) begin
        @(negedge clk);
        cycles++;
      end
      draws = rand_reads - draws;
      chaskey_ref(v);
      foreach (v[i]) begin
        host_read(VA + i, ga);
        host_read(VB + i, gb);
        check($sformatf("run %0d v%0d = share a ^ share b", run, i), (ga ^ gb) == v[i]);
        check($sformatf("run %0d v%0d share a is masked", run, i), ga != v[i]);
      end
      check("three random numbers per addition", draws == 12 * 4 * 3);
      $display("masked Chaskey-12 permutation: %0d instruction slots, %0d cycles (%0d per round), %0d random numbers",
               len, cycles, cycles / 12, draws);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
