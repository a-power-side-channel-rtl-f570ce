// ssp_imem: SSP instruction memory, split into Lo-Imem and Hi-Imem.
//
// The processor's instruction memory is divided into two banks so that 16-bit
// and 32-bit instructions are both handled in one access: the Lo-Imem bank
// holds the 16-bit main word of every instruction, the Hi-Imem bank holds the
// optional 16-bit block (immediate or branch) of the instruction in the same
// slot. A fetch reads both banks at one slot address and returns a full
// 32-bit instruction slot in one cycle. Total size is 2 KB
// (SLOTS = 512 slots x 2 banks x 16 bits), the processor's Imem size; the
// slot-per-instruction organisation is this design's reading of the bank split.
//
// Ports: a synchronous read port for the core (address at a rising edge,
// data valid after it, held while `ren` is low) and a write port for loading
// the program (one slot per cycle, {hi, lo}).
module ssp_imem #(
  parameter int unsigned SLOTS = 512,
  localparam int unsigned AW   = $clog2(SLOTS)
) (
  input  logic          clk,
  // core fetch port
  input  logic          ren,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata_lo,   // main word
  output logic [15:0]   rdata_hi,   // optional block
  // program load port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata       // {hi, lo}
);

  logic [15:0] lo_mem [SLOTS];
  logic [15:0] hi_mem [SLOTS];

  always_ff @(posedge clk) begin
    if (we) begin
      lo_mem[waddr] <= wdata[15:0];
      hi_mem[waddr] <= wdata[31:16];
    end
  end

  always_ff @(posedge clk) begin
    if (ren) begin
      rdata_lo <= lo_mem[raddr];
      rdata_hi <= hi_mem[raddr];
    end
  end

endmodule
