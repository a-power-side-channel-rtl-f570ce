// ssp_core: the three-stage pipeline of the Small and Secure Processor.
//
// Stages, as in the processor's block diagram:
//   Fetch            the PC addresses the instruction memory; the slot read
//                    there (main word + optional block) is the fetch/decode
//                    pipeline register (the memory's output register).
//   Decode/Execute   ssp_decoder decodes the slot, the register file is read,
//                    constants and immediates are selected, and the gated ALU
//                    computes the result, a branch decision or a data address.
//                    Data memory and PRNG requests are issued at the end of
//                    this stage.
//   Memory/Write Back the execute/memory register holds the result; the
//                    write-back multiplexer picks the ALU result, the data
//                    memory word or the PRNG number and writes RD.
// The branch decision is registered in the execute/memory register and fed
// back to the PC from there, as drawn in the processor's diagram.
//
// Timing (this design's own choices where the definition is silent):
//   * One instruction per cycle, 16-bit or 32-bit alike.
//   * A taken branch redirects the fetch one cycle after it executes; the one
//     instruction fetched behind it is squashed, so a taken branch costs two
//     cycles and an untaken one cycle. Targets are relative to the branch's
//     own slot address.
//   * The write-back value (ALU result, loaded word or random number) is
//     forwarded to the operands of the instruction in decode/execute, so
//     dependent instructions, loads included, never stall.
//   * A taken branch to itself halts the core (`halted` stays high until
//     reset) and fetching stops.
//   * Reading word address 32'hFFFF_FFFF (e.g. `mr 0, -1, RD`) returns a fresh
//     PRNG number instead of a data memory word; writes there are dropped.
module ssp_core
  import ssp_pkg::*;
#(
  parameter int unsigned     PCW      = 9,    // slot address width (512 slots)
  parameter int unsigned     DAW      = 10,   // data word address width (1024 words)
  parameter logic [PCW-1:0]  RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction memory
  output logic            imem_ren,
  output logic [PCW-1:0]  imem_addr,
  input  logic [15:0]     imem_lo,
  input  logic [15:0]     imem_hi,
  // data memory
  output logic            dmem_en,
  output logic            dmem_we,
  output logic [DAW-1:0]  dmem_addr,
  output logic [XLEN-1:0] dmem_wdata,
  input  logic [XLEN-1:0] dmem_rdata,
  // PRNG
  output logic            prng_next,
  input  logic [XLEN-1:0] prng_rnd,
  // status
  output logic            halted,
  output logic            retire,      // an instruction wrote back this cycle
  output logic            br_taken,    // a taken branch redirects fetch this cycle
  output logic [PCW-1:0]  pc_ex        // slot address of the instruction in execute
);

  // ---------------------------------------------------------------- fetch
  logic [PCW-1:0] pc_q;       // next sequential fetch address
  logic           if_valid;   // imem output holds a fetched slot
  logic [PCW-1:0] if_pc;      // its address

  // execute/memory register
  typedef struct packed {
    logic            valid;
    logic            rd_we;
    logic [3:0]      rd;
    logic [XLEN-1:0] result;
    logic            load;      // write back the data memory word
    logic            rand_rd;   // write back the PRNG number
    logic            br_taken;
    logic [PCW-1:0]  br_target;
    logic [PCW-1:0]  pc;
  } exm_t;
  exm_t exm;

  assign imem_addr = exm.br_taken ? exm.br_target : pc_q;
  assign imem_ren  = !halted;
  assign br_taken  = exm.br_taken;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q     <= RESET_PC;
      if_valid <= 1'b0;
      if_pc    <= RESET_PC;
    end else if (!halted) begin
      pc_q     <= imem_addr + PCW'(1);
      if_valid <= 1'b1;
      if_pc    <= imem_addr;
    end
  end

  // ------------------------------------------------------- decode/execute
  dec_t            dec;
  logic            ex_valid;
  logic [XLEN-1:0] rf_a, rf_b, fwd_a, fwd_b, op_a, op_b;
  logic [XLEN-1:0] alu_y;
  logic            alu_neg, alu_zero;
  logic            take;
  logic            is_rand;
  logic            wb_we;
  logic [XLEN-1:0] wb_data;

  ssp_decoder u_dec (
    .main_word (imem_lo),
    .ext_word  (imem_hi),
    .dec       (dec)
  );

  // the slot behind a taken branch is squashed
  assign ex_valid = if_valid && !exm.br_taken && !halted;
  assign pc_ex    = if_pc;

  ssp_regfile #(.N(NREG), .W(XLEN)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .raddr_a (dec.a_reg),
    .rdata_a (rf_a),
    .raddr_b (dec.b_reg),
    .rdata_b (rf_b),
    .we      (wb_we),
    .waddr   (exm.rd),
    .wdata   (wb_data)
  );

  // forwarding from write-back
  assign fwd_a = (wb_we && exm.rd == dec.a_reg) ? wb_data : rf_a;
  assign fwd_b = (wb_we && exm.rd == dec.b_reg) ? wb_data : rf_b;

  always_comb begin
    unique case (dec.a_src)
      SRC_REG: op_a = fwd_a;
      SRC_IMM: op_a = dec.imm;
      default: op_a = dec.a_const;
    endcase
    unique case (dec.b_src)
      SRC_REG: op_b = fwd_b;
      SRC_IMM: op_b = dec.imm;
      default: op_b = dec.b_const;
    endcase
  end

  ssp_gated_alu u_alu (
    .op     (dec.alu_op),
    .a      (op_a),
    .b      (op_b),
    .shamt  (dec.shamt),
    .result (alu_y),
    .neg    (alu_neg),
    .zero   (alu_zero)
  );

  assign take = ex_valid && dec.branch &&
                ((dec.br_cond[COND_NEG]  &&  alu_neg) ||
                 (dec.br_cond[COND_ZERO] &&  alu_zero) ||
                 (dec.br_cond[COND_POS]  && !alu_neg && !alu_zero));

  // data memory / PRNG requests
  assign is_rand    = (alu_y == PRNG_ADDR);
  assign dmem_en    = ex_valid && (dec.mem_rd || dec.mem_wr) && !is_rand;
  assign dmem_we    = ex_valid && dec.mem_wr && !is_rand;
  assign dmem_addr  = alu_y[DAW-1:0];
  assign dmem_wdata = fwd_a;
  assign prng_next  = ex_valid && dec.mem_rd && is_rand;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      exm <= '0;
    end else begin
      exm.valid     <= ex_valid;
      exm.rd_we     <= ex_valid && dec.rd_we;
      exm.rd        <= dec.rd;
      exm.result    <= alu_y;
      exm.load      <= dec.mem_rd && !is_rand;
      exm.rand_rd   <= dec.mem_rd && is_rand;
      exm.br_taken  <= take;
      exm.br_target <= if_pc + PCW'(signed'(dec.br_off));
      exm.pc        <= if_pc;
    end
  end

  // --------------------------------------------------- memory/write back
  always_comb begin
    if (exm.load)         wb_data = dmem_rdata;
    else if (exm.rand_rd) wb_data = prng_rnd;
    else                  wb_data = exm.result;
  end
  assign wb_we  = exm.valid && exm.rd_we;
  assign retire = exm.valid;

  always_ff @(posedge clk) begin
    if (!rst_n)
      halted <= 1'b0;
    else if (exm.br_taken && exm.br_target == exm.pc)
      halted <= 1'b1;
  end

endmodule
