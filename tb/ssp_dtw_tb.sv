// ssp_dtw_tb: the DTW detection workload on the full-size SSP.
//
// Runs the memory-conscious DTW program on ssp_top with its default sizes
// (2 KB instruction memory, 4 KB data memory) for the four data amounts of
// the eHealth applications, n = m = 100, 128, 200 and 256 points of 16-bit
// sensor data. At 256 points the sample, pattern, d and dp arrays fill the
// 4 KB data memory exactly. For each size the distance is compared with the
// reference DTW, and the cycle count is converted to execution time at 50
// MHz and 5 MHz and checked against the application deadline (the time the
// sensor needs to collect the m samples: 990, 1270, 3980 and 6375 ms).
module ssp_dtw_tb;
  import ssp_asm_pkg::*;
  import ssp_progs_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         imem_we = 0, dmem_host_en = 0, dmem_host_we = 0;
  logic [8:0]   imem_waddr = 0, pc_ex;
  logic [31:0]  imem_wdata = 0, dmem_host_wdata = 0, dmem_host_rdata;
  logic [9:0]   dmem_host_addr = 0;
  logic         halted, retire, br_taken;
  logic [31:0]  prog [512];
  int checks = 0, failures = 0;

  ssp_top dut (
    .clk(clk), .rst_n(rst_n), .imem_we(imem_we), .imem_waddr(imem_waddr),
    .imem_wdata(imem_wdata), .dmem_host_en(dmem_host_en), .dmem_host_we(dmem_host_we),
    .dmem_host_addr(dmem_host_addr), .dmem_host_wdata(dmem_host_wdata),
    .dmem_host_rdata(dmem_host_rdata), .seed_we(1'b0), .seed(128'h0),
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

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [4] = '{100, 128, 200, 256};
    int deadline_ms [4] = '{990, 1270, 3980, 6375};
    foreach (sizes[t]) begin
      int n, len, cycles;
      logic [31:0] s [], pt [], got, want;
      real ms50, ms5;
      n = sizes[t];
      s = new[n]; pt = new[n];
      // a noisy sine-like pattern and a shifted, noisier sample
      foreach (pt[i]) pt[i] = 32'(32768 + int'(12000.0 * $sin(6.2832 * i / 40.0)) + int'($urandom % 500));
      foreach (s[i])  s[i]  = 32'(32768 + int'(12000.0 * $sin(6.2832 * (i + 3) / 40.0)) + int'($urandom % 2000));
      len = dtw(prog, n, n);
      rst_n = 0;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        imem_we = 1; imem_waddr = 9'(i); imem_wdata = prog[i];
      end
      @(negedge clk) imem_we = 0;
      foreach (s[i])  host_write(SBASE + i, s[i]);
      foreach (pt[i]) host_write(PBASE + i, pt[i]);
      @(negedge clk) rst_n = 1;
      cycles = 0;
      while (!halted) begin
        @(negedge clk);
        cycles++;
      end
      @(negedge clk);
      dmem_host_en = 1; dmem_host_addr = 10'(DPBASE + n - 1);
      @(negedge clk);
      dmem_host_en = 0;
      got  = dmem_host_rdata;
      want = dtw_ref(s, pt);
      check($sformatf("DTW %0d distance", n), got == want);
      ms50 = cycles / 50.0e3;
      ms5  = cycles / 5.0e3;
      check($sformatf("DTW %0d meets deadline at 5 MHz", n), ms5 < deadline_ms[t]);
      $display("DTW n=m=%0d: distance %0d (expected %0d), %0d cycles, %0d instruction slots, %.2f ms at 50 MHz, %.1f ms at 5 MHz, deadline %0d ms",
               n, got, want, cycles, len, ms50, ms5, deadline_ms[t]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
