// ssp_regfile: the SSP's register file, NREG entries of XLEN bits.
//
// Two asynchronous read ports (operand A / store data, and operand B) and one
// synchronous write port used by the write-back stage. All entries are
// ordinary registers; the entry count of 16 is the processor's. Flip-flop
// storage, synchronous active-low reset to zero and the absence of a
// hard-wired zero register are this design's own choices (constants are
// provided by the operand codes instead).
//
// Timing: a write at a rising edge is visible on the read ports after that
// edge; a read in the same cycle as a write returns the old value (the core
// forwards the value being written).
module ssp_regfile #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] raddr_a,
  output logic [W-1:0]         rdata_a,
  input  logic [$clog2(N)-1:0] raddr_b,
  output logic [W-1:0]         rdata_b,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  logic [W-1:0]         wdata
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];

endmodule
