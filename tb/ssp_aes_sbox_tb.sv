// ssp_aes_sbox_tb: masked table look-up of the AES S-box on the full-size SSP.
//
// Boolean masking of a table-based S-box: for an input mask m_in and an
// output mask m_out, both fresh 8-bit random numbers, the program first
// builds the masked table T[x ^ m_in] = S[x] ^ m_out (256 entries, one per
// data word at 512..767) from the plain table S (words 256..511). It then
// substitutes the 16 bytes of an AES state. Each byte arrives masked by the
// caller as x ^ h (word i) with its mask h (word 16 + i). The program
// re-masks it to x ^ m_in without unmasking, looks up T, and writes
// S[x] ^ m_out to word 32 + i, and m_out to word 48.
//
// The testbench computes S from its definition (multiplicative inverse in
// GF(2^8) modulo x^8 + x^4 + x^3 + x + 1, then the affine map), loads it,
// runs the program and checks every output byte, the whole masked table and
// that the masks are not zero. It reports the cycles spent building the table
// and the cycles per substituted byte.
module ssp_aes_sbox_tb;
  import ssp_asm_pkg::*;

  localparam int SBOX = 256, TBL = 512, OUT = 32, MOUT = 48;

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

  ssp_top dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata), .dmem_host_en(dmem_host_en), .dmem_host_we(dmem_host_we),
    .dmem_host_addr(dmem_host_addr), .dmem_host_wdata(dmem_host_wdata),
    .dmem_host_rdata(dmem_host_rdata), .seed_we(seed_we), .seed(seed),
    .halted(halted), .retire(retire), .br_taken(br_taken), .pc_ex(pc_ex));

  always #5 clk = ~clk;

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

  // ------------------------------------------------------------ S-box
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv = 0, b;
    for (int c = 1; c < 256; c++) if (gmul(x, 8'(c)) == 8'h01) inv = 8'(c);
    b = inv;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // ------------------------------------------------------------ program
  int lookup_pc;

  function automatic void emit(ref logic [31:0] p [512], ref int pc, input logic [31:0] w);
    p[pc] = w; pc++;
  endfunction

  function automatic int sbox_prog(ref logic [31:0] p [512], output int lk);
    int pc = 0, loop;
    // masks
    emit(p, pc, rnd(4'd4));
    emit(p, pc, andi(4'd4, 16'h00ff, 4'd4));        // m_in
    emit(p, pc, rnd(4'd5));
    emit(p, pc, andi(4'd5, 16'h00ff, 4'd5));        // m_out
    emit(p, pc, mw_abs(4'd0, 16'(MOUT), 4'd5));
    // T[x ^ m_in] = S[x] ^ m_out, x = 255 .. 0
    emit(p, pc, subi_bz(A0, 16'd255, 4'd6));
    loop = pc;
    emit(p, pc, subi_a(-16'(SBOX), 5'd6, 4'd7));    // &S[x]
    emit(p, pc, mr(4'd0, 5'd7, 4'd8));
    emit(p, pc, xor_(4'd5, 5'd8, 4'd8));            // S[x] ^ m_out
    emit(p, pc, xor_(4'd4, 5'd6, 4'd9));            // x ^ m_in
    emit(p, pc, subi_a(-16'(TBL), 5'd9, 4'd9));
    emit(p, pc, mw(4'd0, 5'd9, 4'd8));
    emit(p, pc, subb(A1, 5'd6, 4'd6, loop - pc, C_GE));
    // substitute 16 bytes, i = 15 .. 0
    emit(p, pc, subi_bz(A0, 16'd15, 4'd6));
    lk = pc;
    emit(p, pc, mr(4'd0, 5'd6, 4'd7));              // x ^ h
    emit(p, pc, subi_a(-16'd16, 5'd6, 4'd8));
    emit(p, pc, mr(4'd0, 5'd8, 4'd9));              // h
    emit(p, pc, xor_(4'd4, 5'd7, 4'd7));            // x ^ h ^ m_in
    emit(p, pc, xor_(4'd9, 5'd7, 4'd7));            // x ^ m_in
    emit(p, pc, subi_a(-16'(TBL), 5'd7, 4'd7));
    emit(p, pc, mr(4'd0, 5'd7, 4'd10));             // S[x] ^ m_out
    emit(p, pc, subi_a(-16'(OUT), 5'd6, 4'd8));
    emit(p, pc, mw(4'd0, 5'd8, 4'd10));
    emit(p, pc, subb(A1, 5'd6, 4'd6, lk - pc, C_GE));
    emit(p, pc, halt());
    return pc;
  endfunction

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s [256];
    int len;
    foreach (s[i]) s[i] = sbox(8'(i));
    check("S-box definition", s[0] == 8'h63 && s[1] == 8'h7c && s[8'h53] == 8'hed && s[255] == 8'h16);
    len = sbox_prog(prog, lookup_pc);
    for (int run = 0; run < 3; run++) begin
      logic [7:0] x [16], h [16];
      logic [31:0] v, m_out, t;
      int cycles, table_cycles, min_m;
      rst_n = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        imem_we = 1; imem_waddr = 9'(i); imem_wdata = prog[i];
      end
      @(negedge clk) imem_we = 0;
      foreach (s[i]) host_write(SBOX + i, 32'(s[i]));
      foreach (x[i]) begin
        x[i] = 8'($urandom); h[i] = 8'($urandom);
        host_write(i, 32'(x[i] ^ h[i]));
        host_write(16 + i, 32'(h[i]));
      end
      @(negedge clk);
      rst_n = 1; seed_we = 1; seed = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk) seed_we = 0;
      cycles = 1; table_cycles = 0;
      while (!halted) begin
        @(negedge clk);
        cycles++;
        if (table_cycles == 0 && pc_ex == 9'(lookup_pc)) table_cycles = cycles;
      end
      host_read(MOUT, m_out);
      check($sformatf("run %0d output mask is 8 bits", run), m_out < 256);
      foreach (x[i]) begin
        host_read(OUT + i, v);
        check($sformatf("run %0d byte %0d: S(x) = output ^ m_out", run, i), (v ^ m_out) == 32'(s[x[i]]));
      end
      // the masked table: the input mask is the index of S[0] ^ m_out
      min_m = -1;
      for (int i = 0; i < 256; i++) begin
        host_read(TBL + i, t);
        if (t == (32'(s[0]) ^ m_out)) min_m = i;
      end
      check($sformatf("run %0d masked table found", run), min_m >= 0);
      for (int i = 0; i < 256; i++) begin
        host_read(TBL + (i ^ min_m), t);
        check($sformatf("run %0d T[%0d]", run, i), t == (32'(s[i]) ^ m_out));
      end
      $display("masked AES S-box: m_in %02h m_out %02h, %0d slots, %0d cycles to build the table, %0d cycles for 16 bytes (%0d per byte)",
               min_m, m_out, len, table_cycles, cycles - table_cycles, (cycles - table_cycles) / 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
