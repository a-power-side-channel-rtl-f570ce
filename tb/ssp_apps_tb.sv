// ssp_apps_tb: four small data-processing programs for IoT edge nodes, run on
// the full-size SSP and checked against models computed here.
//
//   sort       quicksort (Lomuto partition, explicit stack in data memory)
//              of 100 random words at 0..99; stack grows down from 1023.
//   histogram  256-bin histogram of a 16x16 image of 8-bit pixels
//              (pixels at 0..255, bins at 512..767).
//   edge       Laplacian filter 4c - left - right - up - down on the
//              interior 14x14 pixels of a 16x16 image (pixels at 0..255,
//              results at 768 + index).
//   motion     sum of absolute differences of the sixteen 4x4 blocks of two
//              16x16 images (0..255 and 256..511); SADs at 528 + block,
//              flags "block does not match" (SAD > 200) at 512 + block.
//
// Each program is built with the encoders of ssp_asm_pkg; forward branch
// targets are resolved by building it twice. Image sizes, the block size, the
// threshold and the array length are this testbench's choices. The cycle
// count of each program is printed.
module ssp_apps_tb;
  import ssp_asm_pkg::*;

  localparam int NSORT = 100, THR = 200;

  logic         clk = 0, rst_n = 0;
  logic         imem_we = 0, dmem_host_en = 0, dmem_host_we = 0;
  logic [8:0]   imem_waddr = 0, pc_ex;
  logic [31:0]  imem_wdata = 0, dmem_host_wdata = 0, dmem_host_rdata;
  logic [9:0]   dmem_host_addr = 0;
  logic         halted, retire, br_taken;
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

  task automatic host_read(int addr, output logic [31:0] v);
    @(negedge clk);
    dmem_host_en = 1; dmem_host_we = 0; dmem_host_addr = 10'(addr);
    @(negedge clk);
    dmem_host_en = 0;
    v = dmem_host_rdata;
  endtask

  // load a program, release reset, return the cycles until the halt
  task automatic run(ref logic [31:0] p [512], input int len, output int cycles);
    rst_n = 0;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 9'(i); imem_wdata = p[i];
    end
    @(negedge clk) imem_we = 0;
    rst_n = 1;
    cycles = 0;
    while (!halted) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  function automatic void emit(ref logic [31:0] p [512], ref int pc, input logic [31:0] w);
    p[pc] = w; pc++;
  endfunction

  // ------------------------------------------------------------ programs
  // r4 lo, r5 hi, r6 pivot, r7 i, r8 j, r9 a[j], r10 a[i], r11 scratch, r15 sp
  function automatic int sort_prog(ref logic [31:0] p [512], ref int lab [4]);
    int pc = 0;
    emit(p, pc, subi_bz(A0, 16'd1023, 4'd15));
    emit(p, pc, mov(B0, 4'd11));
    emit(p, pc, mw(4'd0, 5'd15, 4'd11));                       // push lo = 0
    emit(p, pc, sub_(A1, 5'd15, 4'd15));
    emit(p, pc, subi_bz(A0, 16'(NSORT - 1), 4'd11));
    emit(p, pc, mw(4'd0, 5'd15, 4'd11));                       // push hi = N-1
    emit(p, pc, sub_(A1, 5'd15, 4'd15));
    lab[0] = pc;                                              // LOOP
    emit(p, pc, subi_bz(4'd15, 16'd1023, 4'd11));              // stack depth
    emit(p, pc, subb(A0, 5'd11, 4'd11, lab[3] - pc, C_ZERO));  // empty: done
    emit(p, pc, sub_(AM1, 5'd15, 4'd15));
    emit(p, pc, mr(4'd0, 5'd15, 4'd5));                        // pop hi
    emit(p, pc, sub_(AM1, 5'd15, 4'd15));
    emit(p, pc, mr(4'd0, 5'd15, 4'd4));                        // pop lo
    emit(p, pc, subb(4'd5, 5'd4, 4'd11, lab[0] - pc, C_GE));   // lo >= hi: next
    emit(p, pc, mr(4'd0, 5'd5, 4'd6));                         // pivot = a[hi]
    emit(p, pc, mov(5'd4, 4'd7));                              // i = lo
    emit(p, pc, mov(5'd4, 4'd8));                              // j = lo
    lab[1] = pc;                                              // JL
    emit(p, pc, subb(4'd5, 5'd8, 4'd11, lab[2] - pc, C_GE));   // j >= hi: end
    emit(p, pc, mr(4'd0, 5'd8, 4'd9));
    emit(p, pc, subb(4'd6, 5'd9, 4'd11, 5, C_GE));             // a[j] >= pivot: skip swap
    emit(p, pc, mr(4'd0, 5'd7, 4'd10));
    emit(p, pc, mw(4'd0, 5'd7, 4'd9));
    emit(p, pc, mw(4'd0, 5'd8, 4'd10));
    emit(p, pc, sub_(AM1, 5'd7, 4'd7));                        // i++
    emit(p, pc, subb(AM1, 5'd8, 4'd8, lab[1] - pc, C_ALWAYS)); // j++, loop
    lab[2] = pc;                                              // partition end
    emit(p, pc, mr(4'd0, 5'd7, 4'd10));
    emit(p, pc, mr(4'd0, 5'd5, 4'd9));
    emit(p, pc, mw(4'd0, 5'd7, 4'd9));
    emit(p, pc, mw(4'd0, 5'd5, 4'd10));
    emit(p, pc, mw(4'd0, 5'd15, 4'd4));                        // push lo
    emit(p, pc, sub_(A1, 5'd15, 4'd15));
    emit(p, pc, sub_(A1, 5'd7, 4'd11));
    emit(p, pc, mw(4'd0, 5'd15, 4'd11));                       // push i-1
    emit(p, pc, sub_(A1, 5'd15, 4'd15));
    emit(p, pc, sub_(AM1, 5'd7, 4'd11));
    emit(p, pc, mw(4'd0, 5'd15, 4'd11));                       // push i+1
    emit(p, pc, sub_(A1, 5'd15, 4'd15));
    emit(p, pc, mw(4'd0, 5'd15, 4'd5));                        // push hi
    emit(p, pc, subb(A1, 5'd15, 4'd15, lab[0] - pc, C_ALWAYS));
    lab[3] = pc;
    emit(p, pc, halt());
    return pc;
  endfunction

  function automatic int hist_prog(ref logic [31:0] p [512]);
    int pc = 0, l;
    emit(p, pc, mov(B0, 4'd6));
    emit(p, pc, subi_bz(A0, 16'd255, 4'd4));
    l = pc;                                                   // clear bins
    emit(p, pc, subi_a(-16'd512, 5'd4, 4'd5));
    emit(p, pc, mw(4'd0, 5'd5, 4'd6));
    emit(p, pc, subb(A1, 5'd4, 4'd4, l - pc, C_GE));
    emit(p, pc, subi_bz(A0, 16'd255, 4'd4));
    l = pc;
    emit(p, pc, mr(4'd0, 5'd4, 4'd5));                         // pixel
    emit(p, pc, subi_a(-16'd512, 5'd5, 4'd5));                 // &bin
    emit(p, pc, mr(4'd0, 5'd5, 4'd7));
    emit(p, pc, sub_(AM1, 5'd7, 4'd7));                        // + 1
    emit(p, pc, mw(4'd0, 5'd5, 4'd7));
    emit(p, pc, subb(A1, 5'd4, 4'd4, l - pc, C_GE));
    emit(p, pc, halt());
    return pc;
  endfunction

  // r4 pointer (238 down), r5 rows, r6 columns
  function automatic int edge_prog(ref logic [31:0] p [512]);
    int pc = 0, row, col;
    emit(p, pc, subi_bz(A0, 16'd238, 4'd4));
    emit(p, pc, subi_bz(A0, 16'd14, 4'd5));
    row = pc;
    emit(p, pc, subi_bz(A0, 16'd14, 4'd6));
    col = pc;
    emit(p, pc, mr(4'd0, 5'd4, 4'd7));
    emit(p, pc, shl_(4'd7, 2, 4'd7));                          // 4c
    emit(p, pc, mr(4'd1, 5'd4, 4'd8));                         // left
    emit(p, pc, sub_(4'd8, 5'd7, 4'd7));
    emit(p, pc, subi_a(-16'd1, 5'd4, 4'd9));
    emit(p, pc, mr(4'd0, 5'd9, 4'd8));                         // right
    emit(p, pc, sub_(4'd8, 5'd7, 4'd7));
    emit(p, pc, subi_a(16'd16, 5'd4, 4'd9));
    emit(p, pc, mr(4'd0, 5'd9, 4'd8));                         // up
    emit(p, pc, sub_(4'd8, 5'd7, 4'd7));
    emit(p, pc, subi_a(-16'd16, 5'd4, 4'd9));
    emit(p, pc, mr(4'd0, 5'd9, 4'd8));                         // down
    emit(p, pc, sub_(4'd8, 5'd7, 4'd7));
    emit(p, pc, subi_a(-16'd768, 5'd4, 4'd9));
    emit(p, pc, mw(4'd0, 5'd9, 4'd7));
    emit(p, pc, sub_(A1, 5'd4, 4'd4));
    emit(p, pc, subb(A1, 5'd6, 4'd6, col - pc, C_POS));
    emit(p, pc, subi_a(16'd2, 5'd4, 4'd4));                    // previous row
    emit(p, pc, subb(A1, 5'd5, 4'd5, row - pc, C_POS));
    emit(p, pc, halt());
    return pc;
  endfunction

  // r4 block, r5 base, r11 -base, r8 SAD, r9 row, r10 row base, r12 column
  function automatic int motion_prog(ref logic [31:0] p [512]);
    int pc = 0, blk, py, px;
    emit(p, pc, subi_bz(A0, 16'd15, 4'd4));
    blk = pc;
    emit(p, pc, shr_(4'd4, 2, 4'd5));
    emit(p, pc, shl_(4'd5, 6, 4'd5));                          // (b / 4) * 64
    emit(p, pc, andi(4'd4, 16'd3, 4'd6));
    emit(p, pc, shl_(4'd6, 2, 4'd6));                          // (b % 4) * 4
    emit(p, pc, sub_(4'd6, B0, 4'd7));
    emit(p, pc, sub_(4'd7, 5'd5, 4'd5));                       // base
    emit(p, pc, sub_(4'd5, B0, 4'd11));
    emit(p, pc, mov(B0, 4'd8));
    emit(p, pc, subi_bz(A0, 16'd3, 4'd9));
    py = pc;
    emit(p, pc, shl_(4'd9, 4, 4'd10));
    emit(p, pc, sub_(4'd11, 5'd10, 4'd10));                    // base + 16 * row
    emit(p, pc, subi_bz(A0, 16'd3, 4'd12));
    px = pc;
    emit(p, pc, sub_(4'd12, B0, 4'd14));
    emit(p, pc, sub_(4'd14, 5'd10, 4'd13));                    // pixel index
    emit(p, pc, mr(4'd0, 5'd13, 4'd14));
    emit(p, pc, subi_a(-16'd256, 5'd13, 4'd6));
    emit(p, pc, mr(4'd0, 5'd6, 4'd15));
    emit(p, pc, subb(4'd14, 5'd15, 4'd6, 2, C_GE));            // d = b - a, skip if >= 0
    emit(p, pc, sub_(4'd6, B0, 4'd6));                         // |d|
    emit(p, pc, sub_(4'd6, B0, 4'd7));
    emit(p, pc, sub_(4'd7, 5'd8, 4'd8));                       // SAD += |d|
    emit(p, pc, subb(A1, 5'd12, 4'd12, px - pc, C_GE));
    emit(p, pc, subb(A1, 5'd9, 4'd9, py - pc, C_GE));
    emit(p, pc, subi_a(-16'd528, 5'd4, 4'd6));
    emit(p, pc, mw(4'd0, 5'd6, 4'd8));
    emit(p, pc, subi_bz(4'd8, 16'(THR), 4'd7));                // THR - SAD
    emit(p, pc, shr_(4'd7, 31, 4'd7));                         // 1 if SAD > THR
    emit(p, pc, subi_a(-16'd512, 5'd4, 4'd6));
    emit(p, pc, mw(4'd0, 5'd6, 4'd7));
    emit(p, pc, subb(A1, 5'd4, 4'd4, blk - pc, C_GE));
    emit(p, pc, halt());
    return pc;
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [31:0] prog [512];
    int len, cycles, lab [4];
    logic [31:0] v;

    // ---------------- sort
    begin
      logic [31:0] a [NSORT];
      int bad = 0;
      foreach (lab[i]) lab[i] = 0;
      void'(sort_prog(prog, lab));
      len = sort_prog(prog, lab);
      foreach (a[i]) begin
        a[i] = 32'($urandom % 100000);
        host_write(i, a[i]);
      end
      run(prog, len, cycles);
      a.sort();
      foreach (a[i]) begin
        host_read(i, v);
        if (v != a[i]) bad++;
      end
      check($sformatf("sort: %0d of %0d words out of place", bad, NSORT), bad == 0);
      $display("sort of %0d words: %0d instruction slots, %0d cycles", NSORT, len, cycles);
    end

    // ---------------- histogram
    begin
      logic [7:0] img [256];
      int hist [256], bad = 0;
      foreach (hist[i]) hist[i] = 0;
      foreach (img[i]) begin
        img[i] = 8'(128 + int'(60.0 * $sin(i / 9.0)) + int'($urandom % 20));
        hist[img[i]]++;
        host_write(i, 32'(img[i]));
      end
      for (int i = 0; i < 256; i++) host_write(512 + i, $urandom);  // stale bins
      len = hist_prog(prog);
      run(prog, len, cycles);
      foreach (hist[i]) begin
        host_read(512 + i, v);
        if (v != 32'(hist[i])) bad++;
      end
      check($sformatf("histogram: %0d bins wrong", bad), bad == 0);
      $display("histogram of 256 pixels: %0d instruction slots, %0d cycles", len, cycles);
    end

    // ---------------- edge
    begin
      logic [7:0] img [256];
      int bad = 0;
      foreach (img[i]) begin
        img[i] = ((i % 16) > 7) ? 8'(200 + $urandom % 10) : 8'(40 + $urandom % 10);
        host_write(i, 32'(img[i]));
      end
      len = edge_prog(prog);
      run(prog, len, cycles);
      for (int y = 1; y < 15; y++)
        for (int x = 1; x < 15; x++) begin
          int c, want;
          c = y * 16 + x;
          want = 4 * int'(img[c]) - int'(img[c - 1]) - int'(img[c + 1]) - int'(img[c - 16]) - int'(img[c + 16]);
          host_read(768 + c, v);
          if (v != 32'(want)) bad++;
        end
      check($sformatf("edge: %0d of 196 pixels wrong", bad), bad == 0);
      $display("Laplacian of 14x14 pixels: %0d instruction slots, %0d cycles", len, cycles);
    end

    // ---------------- motion
    begin
      logic [7:0] ia [256], ib [256];
      int bad = 0, moved = 0;
      foreach (ia[i]) begin
        ia[i] = 8'($urandom);
        // blocks 5 and 10 change, the rest carries small noise
        ib[i] = (((i / 64) * 4 + (i % 16) / 4) inside {5, 10}) ? 8'($urandom)
                                                              : 8'(ia[i] ^ 8'($urandom % 4));
        host_write(i, 32'(ia[i]));
        host_write(256 + i, 32'(ib[i]));
      end
      len = motion_prog(prog);
      run(prog, len, cycles);
      for (int b = 0; b < 16; b++) begin
        int sad;
        logic [31:0] f;
        sad = 0;
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            int i, d;
            i = (b / 4) * 64 + (b % 4) * 4 + y * 16 + x;
            d = int'(ib[i]) - int'(ia[i]);
            sad += (d < 0) ? -d : d;
          end
        host_read(528 + b, v);
        host_read(512 + b, f);
        if (v != 32'(sad) || f != 32'(sad > THR)) begin
          bad++;
          $display("block %0d: SAD %0d flag %0d, expected %0d %0d", b, v, f, sad, sad > THR);
        end
        if (f == 1) moved++;
      end
      check($sformatf("motion: %0d of 16 blocks wrong", bad), bad == 0);
      check("motion: the two changed blocks are flagged", moved == 2);
      $display("motion detection on 16 blocks of 4x4: %0d instruction slots, %0d cycles", len, cycles);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
