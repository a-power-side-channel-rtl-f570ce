// ssp_imem_tb: self-checking test of the split instruction memory.
//
// Writes every slot with a distinct {hi, lo} pattern through the load port,
// then reads random slots and checks that the Lo-Imem half returns the main
// word and the Hi-Imem half the optional block one cycle after the address,
// and that the output holds while `ren` is low.
module ssp_imem_tb;
  localparam int SLOTS = 512;
  logic        clk = 0, ren = 0, we = 0;
  logic [8:0]  raddr = 0, waddr = 0;
  logic [31:0] wdata = 0;
  logic [15:0] lo, hi;
  logic [31:0] model [SLOTS];
  int checks = 0, failures = 0;

  ssp_imem #(.SLOTS(SLOTS)) dut (.clk(clk), .ren(ren), .raddr(raddr), .rdata_lo(lo),
                                 .rdata_hi(hi), .we(we), .waddr(waddr), .wdata(wdata));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s addr=%0d lo=%h hi=%h", what, raddr, lo, hi); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < SLOTS; i++) begin
      model[i] = $urandom;
      we = 1; waddr = 9'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [8:0] last;
      ren = 1; raddr = 9'($urandom);
      last = raddr;
      @(posedge clk); #1;
      check("lo", lo == model[last][15:0]);
      check("hi", hi == model[last][31:16]);
      ren = 0; raddr = raddr + 1;
      @(posedge clk); #1;
      check("hold", {hi, lo} == model[last]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
