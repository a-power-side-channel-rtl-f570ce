// ssp_prng_tb: self-checking test of the XORSHIFT-ADD generator.
//
// Compares the generator's output after reset, after random `next` pulses
// and after reseeding with a reference model of the XSadd recurrence. Also
// checks that the state holds while `next` is low and that an all-zero seed
// falls back to the default seed.
module ssp_prng_tb;
  import ssp_asm_pkg::xsadd_step;
  localparam logic [127:0] SEED = 128'h1234_5678_9abc_def0_0fed_cba9_8765_4321;

  logic         clk = 0, rst_n = 0, next = 0, seed_we = 0;
  logic [127:0] seed = '0;
  logic [31:0]  rnd, exp_rnd;
  logic [31:0]  s [4];
  int checks = 0, failures = 0;

  ssp_prng #(.SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .next(next), .seed_we(seed_we),
                               .seed(seed), .rnd(rnd));

  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s rnd=%h exp=%h", what, rnd, exp_rnd); end
  endtask

  task automatic load_model(logic [127:0] v);
    {s[3], s[2], s[1], s[0]} = v;
    exp_rnd = s[3] + s[2];
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    load_model(SEED);
    check("after reset", rnd == exp_rnd);
    for (int i = 0; i < 2000; i++) begin
      next = ($urandom % 4) != 0;
      if (i == 1000) begin
        seed_we = 1; seed = {$urandom, $urandom, $urandom, $urandom};
      end else if (i == 1500) begin
        seed_we = 1; seed = '0;
      end else seed_we = 0;
      @(posedge clk);
      if (seed_we) load_model(seed == '0 ? SEED : seed);
      else if (next) exp_rnd = xsadd_step(s);
      #1;
      check("sequence", rnd == exp_rnd);
    end
    // the first outputs from the default seed must not repeat
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
