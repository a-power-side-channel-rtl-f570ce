// ssp_dmem: SSP data memory, WORDS words of 32 bits (4 KB by default, the
// processor's Dmem size).
//
// The processor's definition gives the size and the Harvard separation from
// the instruction memory; the port structure is this design's choice. Port A
// serves the core: address, write enable and write data arrive from the
// decode/execute stage at a rising edge, and read data is valid during the
// following memory/write-back cycle (synchronous read, read-first). Port B is
// a host port of the same form, used to load inputs and collect results.
// Addresses are word addresses; only the low $clog2(WORDS) bits are decoded.
module ssp_dmem #(
  parameter int unsigned WORDS = 1024,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  // port A: core
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  // port B: host
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

endmodule
