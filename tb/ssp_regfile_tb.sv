// ssp_regfile_tb: self-checking test of the register file.
//
// Resets the file, checks that all entries read zero, then performs random
// writes and reads on both ports against a reference array, including a read
// of the entry being written in the same cycle (must return the old value).
module ssp_regfile_tb;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  ra, rb, wa;
  logic [31:0] da, db, wd;
  logic        we;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  ssp_regfile #(.N(16), .W(32)) dut (
    .clk(clk), .rst_n(rst_n), .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db),
    .we(we), .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      model[i] = 0;
      ra = 4'(i); rb = 4'(15 - i); #1;
      check("reset a", da == 0);
      check("reset b", db == 0);
    end
    for (int i = 0; i < 3000; i++) begin
      we = ($urandom % 3) != 0;
      wa = 4'($urandom);
      wd = $urandom;
      ra = (i % 4 == 0) ? wa : 4'($urandom);
      rb = 4'($urandom);
      #1;
      check("read a", da == model[ra]);
      check("read b", db == model[rb]);
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
