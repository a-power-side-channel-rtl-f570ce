// ssp_top: the Small and Secure Processor (SSP) with its memories.
//
// Connects the pipeline (ssp_core) to the split instruction memory
// (ssp_imem, Lo-Imem + Hi-Imem, 2 KB), the data memory (ssp_dmem, 4 KB) and
// the XORSHIFT-ADD PRNG (ssp_prng) that feeds random numbers to the register
// file through the write-back multiplexer. The memory sizes are the
// processor's; the host ports are this design's way of loading a program and
// data and reading results:
//   * imem_we/imem_waddr/imem_wdata write one instruction slot {hi, lo} per
//     cycle (normally while rst_n is low),
//   * the dmem_host_* port reads and writes data words at any time
//     (synchronous, read data one cycle after the request),
//   * seed_we/seed reseed the PRNG.
// After rst_n rises the core fetches from slot 0 and runs until it executes a
// taken branch to itself, which raises `halted`.
module ssp_top #(
  parameter int unsigned  IMEM_SLOTS = 512,   // 2 KB: 512 x (16 + 16) bits
  parameter int unsigned  DMEM_WORDS = 1024,  // 4 KB: 1024 x 32 bits
  parameter logic [127:0] PRNG_SEED  = 128'h1234_5678_9abc_def0_0fed_cba9_8765_4321,
  localparam int unsigned PCW        = $clog2(IMEM_SLOTS),
  localparam int unsigned DAW        = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // program load
  input  logic           imem_we,
  input  logic [PCW-1:0] imem_waddr,
  input  logic [31:0]    imem_wdata,
  // host data port
  input  logic           dmem_host_en,
  input  logic           dmem_host_we,
  input  logic [DAW-1:0] dmem_host_addr,
  input  logic [31:0]    dmem_host_wdata,
  output logic [31:0]    dmem_host_rdata,
  // PRNG seed
  input  logic           seed_we,
  input  logic [127:0]   seed,
  // status
  output logic           halted,
  output logic           retire,
  output logic           br_taken,
  output logic [PCW-1:0] pc_ex
);

  logic           imem_ren;
  logic [PCW-1:0] imem_raddr;
  logic [15:0]    imem_lo, imem_hi;
  logic           dmem_en, dmem_we;
  logic [DAW-1:0] dmem_addr;
  logic [31:0]    dmem_wdata, dmem_rdata;
  logic           prng_next;
  logic [31:0]    prng_rnd;

  ssp_core #(.PCW(PCW), .DAW(DAW)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .imem_ren   (imem_ren),
    .imem_addr  (imem_raddr),
    .imem_lo    (imem_lo),
    .imem_hi    (imem_hi),
    .dmem_en    (dmem_en),
    .dmem_we    (dmem_we),
    .dmem_addr  (dmem_addr),
    .dmem_wdata (dmem_wdata),
    .dmem_rdata (dmem_rdata),
    .prng_next  (prng_next),
    .prng_rnd   (prng_rnd),
    .halted     (halted),
    .retire     (retire),
    .br_taken   (br_taken),
    .pc_ex      (pc_ex)
  );

  ssp_imem #(.SLOTS(IMEM_SLOTS)) u_imem (
    .clk      (clk),
    .ren      (imem_ren),
    .raddr    (imem_raddr),
    .rdata_lo (imem_lo),
    .rdata_hi (imem_hi),
    .we       (imem_we),
    .waddr    (imem_waddr),
    .wdata    (imem_wdata)
  );

  ssp_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk     (clk),
    .a_en    (dmem_en),
    .a_we    (dmem_we),
    .a_addr  (dmem_addr),
    .a_wdata (dmem_wdata),
    .a_rdata (dmem_rdata),
    .b_en    (dmem_host_en),
    .b_we    (dmem_host_we),
    .b_addr  (dmem_host_addr),
    .b_wdata (dmem_host_wdata),
    .b_rdata (dmem_host_rdata)
  );

  ssp_prng #(.SEED(PRNG_SEED)) u_prng (
    .clk     (clk),
    .rst_n   (rst_n),
    .next    (prng_next),
    .seed_we (seed_we),
    .seed    (seed),
    .rnd     (prng_rnd)
  );

endmodule
