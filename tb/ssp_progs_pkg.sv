// ssp_progs_pkg: SSP test programs and their reference models.
//
//   simon_masked_round  one round of Simon64/128 on two Boolean shares
//                       (first-order masking with fresh PRNG masks):
//                         lout_a = r_a ^ S2(l_a) ^ (S1 l_a & S8 l_a) ^ (S1 l_a & S8 l_b) ^ k_a
//                         lout_b = r_b ^ S2(l_b) ^ (S1 l_b & S8 l_b) ^ (S1 l_b & S8 l_a) ^ k_b
//                         rout_a = l_a, rout_b = l_b
//                       Inputs l, r, k at data words 0, 1, 2; outputs
//                       lout_a, lout_b, rout_a, rout_b at words 3..6.
//   dtw                 memory-conscious dynamic time warping with two
//                       rows d and dp of m words and distance |s - p|:
//                         d[j] = |s_i - p_j| + min(d[j-1], dp[j], dp[j-1])
//                       sample at words 0.., pattern at 256.., d at 512..,
//                       dp at 768..; the distance ends in dp[m] (word 767+m).
//                       n, m <= 256 (4 arrays x 256 words = 4 KB).
// Programs are built with the encoders of ssp_asm_pkg. Rotations are two
// shifts and an XOR; additions are subtractions of a negated operand.
package ssp_progs_pkg;
  import ssp_asm_pkg::*;

  localparam int SBASE = 0, PBASE = 256, DBASE = 512, DPBASE = 768;
  localparam logic [31:0] DTW_INF = 32'h3fff_ffff;

  // rd = rotl(x, k) using scratch r1 and r14
  function automatic void rotl(ref logic [31:0] p [512], ref int pc,
                               input logic [3:0] x, input int k, input logic [3:0] rd);
    p[pc] = shl_(x, k, 4'd1); pc++;
    p[pc] = shr_(x, 32 - k, 4'd14); pc++;
    p[pc] = xor_(4'd14, 5'd1, rd); pc++;
  endfunction

  function automatic int simon_masked_round(ref logic [31:0] p [512]);
    int pc = 0;
    p[pc] = rnd(4'd4); pc++;                       // lb = mask of l
    p[pc] = rnd(4'd5); pc++;                       // rb = mask of r
    p[pc] = mr_abs(4'd0, 16'd2, 4'd9); pc++;       // k = M[2]
    p[pc] = rnd(4'd6); pc++;                       // kb = mask of k
    p[pc] = xor_(4'd6, 5'd9, 4'd13); pc++;         // ka = k ^ kb
    p[pc] = mr(4'd0, B0, 4'd7); pc++;              // l = M[0]
    p[pc] = xor_(4'd4, 5'd7, 4'd10); pc++;         // la = l ^ lb
    p[pc] = mr(4'd0, B1, 4'd8); pc++;              // r = M[1]
    p[pc] = xor_(4'd5, 5'd8, 4'd12); pc++;         // ra = r ^ rb
    // share a
    rotl(p, pc, 4'd10, 2, 4'd7);
    p[pc] = xor_(4'd7, 5'd12, 4'd0); pc++;         // acc_a = ra ^ S2 la
    rotl(p, pc, 4'd10, 1, 4'd7);               // S1 la
    rotl(p, pc, 4'd10, 8, 4'd8);               // S8 la
    p[pc] = and_(4'd8, 5'd7, 4'd9); pc++;
    p[pc] = xor_(4'd9, 5'd0, 4'd0); pc++;
    rotl(p, pc, 4'd4, 8, 4'd8);                // S8 lb
    p[pc] = and_(4'd8, 5'd7, 4'd9); pc++;          // S1 la & S8 lb
    p[pc] = xor_(4'd9, 5'd0, 4'd0); pc++;
    p[pc] = xor_(4'd13, 5'd0, 4'd0); pc++;         // ^ ka
    // share b
    rotl(p, pc, 4'd4, 2, 4'd7);
    p[pc] = xor_(4'd7, 5'd5, 4'd2); pc++;          // acc_b = rb ^ S2 lb
    rotl(p, pc, 4'd4, 1, 4'd7);                // S1 lb
    rotl(p, pc, 4'd4, 8, 4'd8);                // S8 lb
    p[pc] = and_(4'd8, 5'd7, 4'd9); pc++;
    p[pc] = xor_(4'd9, 5'd2, 4'd2); pc++;
    rotl(p, pc, 4'd10, 8, 4'd8);               // S8 la
    p[pc] = and_(4'd8, 5'd7, 4'd9); pc++;          // S1 lb & S8 la
    p[pc] = xor_(4'd9, 5'd2, 4'd2); pc++;
    p[pc] = xor_(4'd6, 5'd2, 4'd2); pc++;          // ^ kb
    p[pc] = mw_abs(4'd0, 16'd3, 4'd0); pc++;
    p[pc] = mw_abs(4'd0, 16'd4, 4'd2); pc++;
    p[pc] = mw_abs(4'd0, 16'd5, 4'd10); pc++;
    p[pc] = mw_abs(4'd0, 16'd6, 4'd4); pc++;
    p[pc] = halt(); pc++;
    return pc;
  endfunction

  function automatic logic [31:0] rol32(logic [31:0] x, int k);
    return (x << k) | (x >> (32 - k));
  endfunction

  // unmasked Simon round: returns {lout, rout}
  function automatic logic [63:0] simon_round(logic [31:0] l, logic [31:0] r, logic [31:0] k);
    logic [31:0] f;
    f = (rol32(l, 1) & rol32(l, 8)) ^ rol32(l, 2);
    return {r ^ f ^ k, l};
  endfunction

  // DTW program for n samples and m pattern points; returns its length
  function automatic int dtw(ref logic [31:0] p [512], input int n, input int m);
    int pc = 0;
    int l_init = 0, l_row = 0, l_col = 0, l_cpos = 0, l_m1 = 0, l_m2 = 0, l_cp = 0;
    for (int pass = 0; pass < 2; pass++) begin
      pc = 0;
      p[pc] = sub_(A1, B0, 4'd13); pc++;                 // r13 = -1
      p[pc] = shr_(4'd13, 2, 4'd13); pc++;               // r13 = INF
      p[pc] = subi_bz(A0, 16'(m), 4'd15); pc++;          // r15 = m
      p[pc] = subi_bz(A0, 16'(n), 4'd12); pc++;          // r12 = n
      p[pc] = subi_bz(A0, 16'(DPBASE), 4'd3); pc++;
      p[pc] = mov(5'd15, 4'd4); pc++;
      l_init = pc;                                   // dp[1..m] = INF
      p[pc] = mw(4'd0, 5'd3, 4'd13); pc++;
      p[pc] = sub_(AM1, 5'd3, 4'd3); pc++;
      p[pc] = subb(A1, 5'd4, 4'd4, l_init - pc, C_POS); pc++;
      p[pc] = subi_bz(A0, 16'(SBASE), 4'd0); pc++;       // r0 = sample pointer
      p[pc] = mov(B0, 4'd6); pc++;                       // d[0] = 0 for the first row
      l_row = pc;
      p[pc] = mr(4'd0, 5'd0, 4'd5); pc++;                // s = sample[i]
      p[pc] = sub_(AM1, 5'd0, 4'd0); pc++;
      p[pc] = subi_bz(A0, 16'(PBASE), 4'd1); pc++;
      p[pc] = subi_bz(A0, 16'(DBASE), 4'd2); pc++;
      p[pc] = subi_bz(A0, 16'(DPBASE), 4'd3); pc++;
      p[pc] = mov(5'd13, 4'd7); pc++;                    // dp[0] = INF
      p[pc] = mov(5'd15, 4'd4); pc++;
      l_col = pc;
      p[pc] = mr(4'd0, 5'd1, 4'd8); pc++;                // p = pattern[j]
      p[pc] = sub_(AM1, 5'd1, 4'd1); pc++;
      p[pc] = mr(4'd0, 5'd3, 4'd9); pc++;                // up = dp[j]
      p[pc] = sub_(AM1, 5'd3, 4'd3); pc++;
      p[pc] = subb(4'd8, 5'd5, 4'd11, l_cpos - pc, C_GE); pc++; // c = s - p, keep if >= 0
      p[pc] = sub_(4'd5, 5'd8, 4'd11); pc++;             // c = p - s
      l_cpos = pc;
      p[pc] = mov(5'd6, 4'd10); pc++;                    // mn = d[j-1]
      p[pc] = subb(4'd10, 5'd9, 4'd14, l_m1 - pc, C_GE); pc++;
      p[pc] = mov(5'd9, 4'd10); pc++;                    // mn = dp[j]
      l_m1 = pc;
      p[pc] = subb(4'd10, 5'd7, 4'd14, l_m2 - pc, C_GE); pc++;
      p[pc] = mov(5'd7, 4'd10); pc++;                    // mn = dp[j-1]
      l_m2 = pc;
      p[pc] = sub_(4'd10, B0, 4'd14); pc++;              // -mn
      p[pc] = sub_(4'd14, 5'd11, 4'd6); pc++;            // d[j] = c + mn
      p[pc] = mw(4'd0, 5'd2, 4'd6); pc++;
      p[pc] = sub_(AM1, 5'd2, 4'd2); pc++;
      p[pc] = mov(5'd9, 4'd7); pc++;                     // next dp[j-1]
      p[pc] = subb(A1, 5'd4, 4'd4, l_col - pc, C_POS); pc++;
      p[pc] = subi_bz(A0, 16'(DBASE), 4'd2); pc++;       // dp = d, then d = INF
      p[pc] = subi_bz(A0, 16'(DPBASE), 4'd3); pc++;
      p[pc] = mov(5'd15, 4'd4); pc++;
      l_cp = pc;
      p[pc] = mr(4'd0, 5'd2, 4'd14); pc++;
      p[pc] = mw(4'd0, 5'd3, 4'd14); pc++;
      p[pc] = mw(4'd0, 5'd2, 4'd13); pc++;
      p[pc] = sub_(AM1, 5'd2, 4'd2); pc++;
      p[pc] = sub_(AM1, 5'd3, 4'd3); pc++;
      p[pc] = subb(A1, 5'd4, 4'd4, l_cp - pc, C_POS); pc++;
      p[pc] = mov(5'd13, 4'd6); pc++;                    // d[0] = INF for later rows
      p[pc] = subb(A1, 5'd12, 4'd12, l_row - pc, C_POS); pc++;
      p[pc] = halt(); pc++;
    end
    return pc;
  endfunction

  // Reference: Algorithm of the memory-conscious DTW, same INF
  function automatic logic [31:0] dtw_ref(const ref logic [31:0] s [], const ref logic [31:0] pt []);
    logic [31:0] d [], dp [];
    int n = s.size(), m = pt.size();
    d = new[m + 1]; dp = new[m + 1];
    for (int i = 0; i <= m; i++) begin d[i] = DTW_INF; dp[i] = DTW_INF; end
    d[0] = 0;
    for (int i = 1; i <= n; i++) begin
      for (int j = 1; j <= m; j++) begin
        logic [31:0] c, mn;
        c  = (s[i-1] >= pt[j-1]) ? s[i-1] - pt[j-1] : pt[j-1] - s[i-1];
        mn = d[j-1];
        if (dp[j] < mn) mn = dp[j];
        if (dp[j-1] < mn) mn = dp[j-1];
        d[j] = c + mn;
      end
      for (int j = 1; j <= m; j++) dp[j] = d[j];
      for (int j = 0; j <= m; j++) d[j] = DTW_INF;
    end
    return dp[m];
  endfunction

endpackage
