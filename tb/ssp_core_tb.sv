// ssp_core_tb: self-checking test of the SSP pipeline.
//
// The core runs a short program from a behavioural instruction memory, data
// memory and random source kept in this testbench. The program exercises
// write-back forwarding (ALU result, loaded word, random number and store
// data), immediates, all ALU operations, a counted loop whose taken branch
// must squash the slot behind it, and the halt branch. Checked: the stored
// results, the number of retired instructions, and the timing: one
// instruction per cycle, two cycles per taken branch, and `halted` rising a
// fixed three cycles after the halt branch's fetch slot.
module ssp_core_tb;
  import ssp_pkg::*;
  import ssp_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        imem_ren, dmem_en, dmem_we, prng_next, halted, retire, br_taken;
  logic [8:0]  imem_addr, pc_ex;
  logic [15:0] imem_lo, imem_hi;
  logic [9:0]  dmem_addr;
  logic [31:0] dmem_wdata, dmem_rdata, prng_rnd;
  logic [31:0] prog [512];
  logic [31:0] mem  [1024];
  int checks = 0, failures = 0;
  int n_retire = 0, n_taken = 0, n_rand = 0, edges = 0;

  ssp_core #(.PCW(9), .DAW(10)) dut (
    .clk(clk), .rst_n(rst_n), .imem_ren(imem_ren), .imem_addr(imem_addr),
    .imem_lo(imem_lo), .imem_hi(imem_hi), .dmem_en(dmem_en), .dmem_we(dmem_we),
    .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dmem_rdata(dmem_rdata),
    .prng_next(prng_next), .prng_rnd(prng_rnd), .halted(halted), .retire(retire),
    .br_taken(br_taken), .pc_ex(pc_ex));

  always #5 clk = ~clk;

  // behavioural memories and random source
  always_ff @(posedge clk) begin
    if (imem_ren) {imem_hi, imem_lo} <= prog[imem_addr];
    if (dmem_en) begin
      if (dmem_we) mem[dmem_addr] <= dmem_wdata;
      dmem_rdata <= mem[dmem_addr];
    end
    if (prng_next) prng_rnd <= $urandom;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rand_seen;
    for (int i = 0; i < 512; i++) prog[i] = halt();
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    prng_rnd = 0;
    prog[0]  = subi_bz(A0, 16'h1234, 4'd4);      // r4 = 0x1234
    prog[1]  = subi_a(16'd4, 5'd4, 4'd5);        // r5 = r4 - 4      (forward)
    prog[2]  = xor_(4'd5, 5'd4, 4'd6);           // r6 = r4 ^ r5 = 4 (forward)
    prog[3]  = mw_abs(4'd0, 16'd10, 4'd6);       // M[10] = r6       (store-data forward)
    prog[4]  = mr_abs(4'd0, 16'd10, 4'd7);       // r7 = M[10]
    prog[5]  = shl_(4'd7, 4, 4'd8);              // r8 = r7 << 4     (load-use forward)
    prog[6]  = mw_abs(4'd0, 16'd11, 4'd8);       // M[11] = 0x40
    prog[7]  = rnd(4'd9);                        // r9 = random
    prog[8]  = mw_abs(4'd0, 16'd12, 4'd9);       // M[12] = r9       (random forward)
    prog[9]  = subi_bz(A0, 16'd5, 4'd10);        // r10 = 5
    prog[10] = subi_a(16'hfffd, 5'd11, 4'd11);   // loop: r11 += 3
    prog[11] = subb(A1, 5'd10, 4'd10, -1, C_POS);// r10 -= 1; if > 0 goto 10
    prog[12] = subi_a(16'hffff, 5'd13, 4'd13);   // r13 += 1 (must run once)
    prog[13] = mw_abs(4'd0, 16'd13, 4'd11);      // M[13] = 15
    prog[14] = mw_abs(4'd0, 16'd15, 4'd13);      // M[15] = 1
    prog[15] = andi(4'd4, 16'h00ff, 4'd12);      // r12 = r4 & 0xff = 0x34
    prog[16] = shr_(4'd12, 3, 4'd14);            // r14 = 0x34 >> 3 = 6
    prog[17] = mw_abs(4'd0, 16'd14, 4'd14);      // M[14] = 6
    prog[18] = mr(4'd1, 5'd17, 4'd15);           // r15 = M[1 - 1] = M[0] = 0 ... overwritten below
    prog[19] = subb(4'd4, 5'd4, 4'd15, 2, C_ZERO); // r15 = 0; zero -> skip slot 20
    prog[20] = mw_abs(4'd0, 16'd16, 4'd4);       // skipped: M[16] stays 0
    prog[21] = subb(A1, 5'd4, 4'd15, 2, C_NEG);  // r15 = r4 - 1 > 0: not taken
    prog[22] = mw_abs(4'd0, 16'd17, 4'd15);      // M[17] = 0x1233
    prog[23] = halt();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    rand_seen = 0;
    while (!halted) begin
      @(posedge clk);
      edges++;
      if (prng_next) rand_seen = 1;
      #1;
      if (retire) n_retire++;
      if (br_taken) n_taken++;
    end
    // dynamic count: slots 0..9 (10), loop 5x2 (10), slots 12..19 (8),
    // slots 21..23 (3) = 31 instructions; taken branches before the halt:
    // 4 loop + 1 skip = 5; halt itself is taken once more.
    check("M[10] xor result", mem[10] == 32'h4);
    check("M[11] load-use shift", mem[11] == 32'h40);
    check("M[12] random number", mem[12] == prng_rnd && rand_seen);
    check("M[13] loop sum", mem[13] == 32'd15);
    check("M[15] squash behind taken branch", mem[15] == 32'd1);
    check("M[14] andi and shr", mem[14] == 32'd6);
    check("M[16] skipped by branch on zero", mem[16] == 32'd0);
    check("M[17] untaken branch falls through", mem[17] == 32'h1233);
    check("retired instructions", n_retire == 31);
    check("taken branches", n_taken == 6);
    // one cycle per instruction, one extra per taken branch, plus 3
    check("cycle count", edges == 30 + 5 + 3);
    $display("edges=%0d retired=%0d taken=%0d", edges, n_retire, n_taken);
    // halted core stays put
    repeat (10) @(posedge clk);
    #1 check("halted holds", halted && !retire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
