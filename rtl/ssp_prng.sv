// ssp_prng: 32-bit XORSHIFT-ADD (XSadd) pseudo-random number generator.
//
// The SSP draws fresh randomness for masked software from this generator. The
// processor's definition names the algorithm family (XORSHIFT-ADD, a variant
// of Xorshift) and the 32-bit output width, and says the numbers go straight
// into the register file. The exact recurrence used here is the published
// XSadd generator: a 128-bit state s0..s3 of four 32-bit words,
//   t  = s0;  t ^= t << 15;  t ^= t >> 18;  t ^= s3 << 11;
//   (s0, s1, s2, s3) <= (s1, s2, s3, t);   output = s3 + s2 (new state).
//
// Interface: `next` advances the state at the rising edge; `rnd` is always
// the output for the current state, so after a `next` edge it carries the
// fresh number for the whole following cycle. `seed_we` loads a 128-bit seed
// (an all-zero seed is replaced by the default, since zero is a fixed point).
// Reset loads the SEED parameter. Seeding and reset value are this design's
// own choices.
module ssp_prng #(
  parameter logic [127:0] SEED = 128'h1234_5678_9abc_def0_0fed_cba9_8765_4321
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         next,
  input  logic         seed_we,
  input  logic [127:0] seed,
  output logic [31:0]  rnd
);

  logic [31:0] s [4];
  logic [31:0] t0, t1, t2, t3;

  assign t0 = s[0];
  assign t1 = t0 ^ (t0 << 15);
  assign t2 = t1 ^ (t1 >> 18);
  assign t3 = t2 ^ (s[3] << 11);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {s[3], s[2], s[1], s[0]} <= SEED;
    end else if (seed_we) begin
      {s[3], s[2], s[1], s[0]} <= (seed == '0) ? SEED : seed;
    end else if (next) begin
      s[0] <= s[1];
      s[1] <= s[2];
      s[2] <= s[3];
      s[3] <= t3;
    end
  end

  assign rnd = s[3] + s[2];

endmodule
