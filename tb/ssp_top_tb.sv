// ssp_top_tb: end-to-end test of the SSP at its default sizes.
//
// Loads programs through the instruction-memory load port and data through
// the host data port, runs the processor until it halts, and checks the
// results against reference models:
//   1. one masked Simon64/128 round: the two output shares must XOR to the
//      unmasked round, and the shares must differ from the plain values;
//   2. memory-conscious DTW on 16 x 16 points against the reference DTW.
// Every pipeline mechanism is counted while the programs run: forwarding of
// ALU results, loaded words, random numbers and store data, taken branches
// with the squashed slot, untaken branches, PRNG reads, each gated ALU unit,
// immediates, 32-bit instructions, memory reads and writes, halting. A
// mechanism that never happened counts as a failure.
module ssp_top_tb;
  import ssp_pkg::*;
  import ssp_asm_pkg::*;
  import ssp_progs_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         imem_we = 0, dmem_host_en = 0, dmem_host_we = 0, seed_we = 0;
  logic [8:0]   imem_waddr = 0, pc_ex;
  logic [31:0]  imem_wdata = 0, dmem_host_wdata = 0, dmem_host_rdata;
  logic [9:0]   dmem_host_addr = 0;
  logic [127:0] seed = 0;
  logic         halted, retire, br_taken;
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

  // ------------------------------------------------------ mechanism counters
  typedef enum int {
    M_FWD_ALU, M_FWD_LOAD, M_FWD_RAND, M_FWD_STORE, M_BR_TAKEN, M_SQUASH, M_BR_UNTAKEN,
    M_PRNG, M_SUB, M_AND, M_XOR, M_SHR, M_SHL, M_IMM, M_EXT32, M_LOAD, M_STORE, M_HALT,
    M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"forward ALU result", "forward loaded word",
    "forward random number", "forward store data", "taken branch", "squashed slot",
    "untaken branch", "PRNG read", "ALU sub", "ALU and", "ALU xor", "ALU shr", "ALU shl",
    "immediate operand", "32-bit instruction", "data memory read", "data memory write",
    "halt"};

  always @(posedge clk) if (rst_n) begin
    automatic logic ex = dut.u_core.ex_valid;
    automatic logic fa = dut.u_core.wb_we && dut.u_core.exm.rd == dut.u_core.dec.a_reg &&
                         (dut.u_core.dec.a_src == SRC_REG || dut.u_core.dec.mem_wr);
    automatic logic fb = dut.u_core.wb_we && dut.u_core.exm.rd == dut.u_core.dec.b_reg &&
                         dut.u_core.dec.b_src == SRC_REG;
    if (ex && (fa || fb)) begin
      if (dut.u_core.exm.load) mech[M_FWD_LOAD]++;
      else if (dut.u_core.exm.rand_rd) mech[M_FWD_RAND]++;
      else mech[M_FWD_ALU]++;
      if (fa && dut.u_core.dec.mem_wr) mech[M_FWD_STORE]++;
    end
    if (dut.u_core.exm.br_taken && dut.u_core.if_valid) mech[M_SQUASH]++;
    if (br_taken) mech[M_BR_TAKEN]++;
    if (ex && dut.u_core.dec.branch && !dut.u_core.take) mech[M_BR_UNTAKEN]++;
    if (dut.u_core.prng_next) mech[M_PRNG]++;
    if (ex) begin
      case (dut.u_core.dec.alu_op)
        ALU_SUB: mech[M_SUB]++;
        ALU_AND: mech[M_AND]++;
        ALU_XOR: mech[M_XOR]++;
        ALU_SHR: mech[M_SHR]++;
        default: mech[M_SHL]++;
      endcase
      if (dut.u_core.dec.a_src == SRC_IMM || dut.u_core.dec.b_src == SRC_IMM) mech[M_IMM]++;
      if (dut.u_core.dec.has_ext) mech[M_EXT32]++;
    end
    if (dut.u_core.dmem_en && !dut.u_core.dmem_we) mech[M_LOAD]++;
    if (dut.u_core.dmem_we) mech[M_STORE]++;
  end

  // ------------------------------------------------------------ host tasks
  task automatic load_program(int len);
    rst_n = 0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 9'(i); imem_wdata = prog[i];
    end
    @(negedge clk) imem_we = 0;
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

  task automatic run(output int cycles);
    @(negedge clk) rst_n = 1;
    cycles = 0;
    while (!halted) begin
      @(negedge clk);
      cycles++;
    end
    mech[M_HALT]++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, cycles;
    logic [31:0] v, la, lb, ra, rb;
    logic [31:0] l, r, k;
    logic [63:0] expv;
    logic [31:0] s [], pt [];
    foreach (mech[i]) mech[i] = 0;

    // ---------------- masked Simon round, three different inputs
    for (int t = 0; t < 3; t++) begin
      len = simon_masked_round(prog);
      load_program(len);
      l = $urandom; r = $urandom; k = $urandom;
      host_write(0, l); host_write(1, r); host_write(2, k);
      run(cycles);
      host_read(3, la); host_read(4, lb); host_read(5, ra); host_read(6, rb);
      expv = simon_round(l, r, k);
      check("simon lout", (la ^ lb) == expv[63:32]);
      check("simon rout", (ra ^ rb) == expv[31:0]);
      check("simon shares masked", la != expv[63:32] && ra != expv[31:0]);
      $display("masked Simon round: %0d instructions, %0d cycles", len - 1, cycles);
    end

    // ---------------- DTW 16 x 16
    s = new[16]; pt = new[16];
    foreach (s[i])  s[i]  = 32'($urandom % 1000);
    foreach (pt[i]) pt[i] = 32'($urandom % 1000);
    len = dtw(prog, 16, 16);
    load_program(len);
    foreach (s[i])  host_write(SBASE + i, s[i]);
    foreach (pt[i]) host_write(PBASE + i, pt[i]);
    run(cycles);
    host_read(DPBASE + 15, v);
    check("dtw 16x16 distance", v == dtw_ref(s, pt));
    $display("DTW 16x16: distance %0d (expected %0d), %0d cycles", v, dtw_ref(s, pt), cycles);

    foreach (mech[i]) begin
      $display("mechanism %-22s %0d", mech_name[i], mech[i]);
      check({"mechanism seen: ", mech_name[i]}, mech[i] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
