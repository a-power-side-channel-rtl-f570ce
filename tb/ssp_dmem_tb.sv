// ssp_dmem_tb: self-checking test of the data memory.
//
// Random reads and writes on the core port and the host port against a
// reference array. Reads return the word stored before the same edge
// (read-first) one cycle after the request.
module ssp_dmem_tb;
  localparam int WORDS = 1024;
  logic        clk = 0;
  logic        a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [9:0]  a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  ssp_dmem #(.WORDS(WORDS)) dut (.clk(clk), .a_en(a_en), .a_we(a_we), .a_addr(a_addr),
    .a_wdata(a_wdata), .a_rdata(a_rdata), .b_en(b_en), .b_we(b_we), .b_addr(b_addr),
    .b_wdata(b_wdata), .b_rdata(b_rdata));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through the host port
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      b_en = 1; b_we = 1; b_addr = 10'(i); b_wdata = model[i];
      @(posedge clk); #1;
    end
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] ea, eb;
      a_en = 1; a_we = ($urandom % 2) != 0; a_addr = 10'($urandom); a_wdata = $urandom;
      b_en = 1; b_we = ($urandom % 4) == 0; b_addr = 10'($urandom); b_wdata = $urandom;
      if (b_we && a_we && b_addr == a_addr) b_we = 0;
      ea = model[a_addr]; eb = model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      #1;
      check("port a read", a_rdata == ea);
      check("port b read", b_rdata == eb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
