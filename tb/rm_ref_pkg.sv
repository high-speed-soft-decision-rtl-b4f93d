// rm_ref_pkg: behavioural reference for the testbenches of the subtrellis
// decoder. It walks the trellis with plain loops, directly from the branch
// structure (origin -> 64 states with 8 parallel branches, radix-8 groups,
// all 64 states -> each of 8 center states, mirrored on the right half),
// independent of the pipelined hardware.
package rm_ref_pkg;
  import rm_pkg::*;

  typedef sect_syms_t block_t [8];   // index j = section j+1, natural order

  function automatic int sym_score(input int q, input bit b);
    return b ? q : 7 - q;
  endfunction

  // Metric of the code bits `cw` (already including the coset) in section s.
  function automatic int sec_metric(input sect_syms_t s, input label_t cw);
    int m = 0;
    for (int k = 0; k < 8; k++) m += sym_score(int'(s[k]), cw[k]);
    return m;
  endfunction

  // Code bits of branch (u, i) of section sec in subtrellis sub.
  function automatic label_t code_bits(input int sec, input int u, input int i, input int sub);
    return branch_label(sec_t'(sec), 6'(u), 3'(i)) ^ coset_word(SUB_W'(sub), sec_t'(sec));
  endfunction

  // Codeword of a path.
  function automatic logic [63:0] encode(input path_t p, input int sub);
    logic [63:0] cw;
    cw[ 7: 0] = code_bits(1, int'({p.l_g, p.l_h1}), int'(p.l_p), sub);
    cw[15: 8] = code_bits(2, int'({p.l_g, p.l_h2}), int'(p.l_h1), sub);
    cw[23:16] = code_bits(3, int'({p.l_g, p.l_h3}), int'(p.l_h2), sub);
    cw[31:24] = code_bits(4, int'({p.center, p.l_g}), int'(p.l_h3), sub);
    cw[39:32] = code_bits(5, int'({p.center, p.r_g}), int'(p.r_h3), sub);
    cw[47:40] = code_bits(6, int'({p.r_g, p.r_h3}), int'(p.r_h2), sub);
    cw[55:48] = code_bits(7, int'({p.r_g, p.r_h2}), int'(p.r_h1), sub);
    cw[63:56] = code_bits(8, int'({p.r_g, p.r_h1}), int'(p.r_p), sub);
    return cw;
  endfunction

  function automatic int cw_metric(input block_t b, input logic [63:0] cw);
    int m = 0;
    for (int j = 0; j < 8; j++) m += sec_metric(b[j], cw[8*j +: 8]);
    return m;
  endfunction

  // Ideal (noise-free, most confident) symbols of a codeword.
  function automatic block_t ideal_block(input logic [63:0] cw);
    block_t b;
    for (int j = 0; j < 8; j++)
      for (int k = 0; k < 8; k++) b[j][k] = cw[8*j+k] ? 3'd7 : 3'd0;
    return b;
  endfunction

  function automatic path_t random_path();
    return path_t'({$urandom, $urandom});
  endfunction

  // Best metrics of one half: a[0..2][state] after positions 1..3 and the
  // metric into each center state. secs are the section numbers of positions
  // 1..4 (1,2,3,4 for the left half, 8,7,6,5 for the right half).
  typedef int half_t [4][64];

  function automatic half_t half_metrics(input block_t b, input int sub, input int secs[4]);
    half_t a;
    for (int s = 0; s < 64; s++) begin
      a[0][s] = -1;
      for (int p = 0; p < 8; p++) begin
        int m = sec_metric(b[secs[0]-1], code_bits(secs[0], s, p, sub));
        if (m > a[0][s]) a[0][s] = m;
      end
    end
    for (int n = 1; n < 3; n++)
      for (int s = 0; s < 64; s++) begin
        a[n][s] = -1;
        for (int h = 0; h < 8; h++) begin
          int m = a[n-1][(s/8)*8 + h] + sec_metric(b[secs[n]-1], code_bits(secs[n], s, h, sub));
          if (m > a[n][s]) a[n][s] = m;
        end
      end
    for (int c = 0; c < 64; c++) a[3][c] = -1;
    for (int c = 0; c < 8; c++)
      for (int g = 0; g < 8; g++)
        for (int h = 0; h < 8; h++) begin
          int m = a[2][g*8 + h] + sec_metric(b[secs[3]-1], code_bits(secs[3], c*8 + g, h, sub));
          if (m > a[3][c]) a[3][c] = m;
        end
    return a;
  endfunction

  // Largest codeword metric in subtrellis sub.
  function automatic int best_metric(input block_t b, input int sub);
    half_t l, r;
    int best = -1;
    l = half_metrics(b, sub, '{1, 2, 3, 4});
    r = half_metrics(b, sub, '{8, 7, 6, 5});
    for (int c = 0; c < 8; c++)
      if (l[3][c] + r[3][c] > best) best = l[3][c] + r[3][c];
    return best;
  endfunction

  // Random soft block: a codeword of subtrellis sub disturbed by noise that
  // moves each symbol by up to `noise` levels.
  function automatic block_t noisy_block(input logic [63:0] cw, input int noise);
    block_t b;
    for (int j = 0; j < 8; j++)
      for (int k = 0; k < 8; k++) begin
        int q = cw[8*j+k] ? 7 : 0;
        int d = (noise == 0) ? 0 : int'($urandom % (noise + 1));
        q = cw[8*j+k] ? q - d : q + d;
        b[j][k] = 3'(q);
      end
    return b;
  endfunction

  // The ACSU output words of one block, in decoding order 1,8,2,7,3,6,4,5,
  // with the lowest-index rule on ties.
  typedef acsu_out_t acsu_blk_t [8];

  function automatic acsu_blk_t acsu_words(input block_t b, input int sub);
    acsu_blk_t w;
    half_t h [2];
    int secs [2][4] = '{'{1, 2, 3, 4}, '{8, 7, 6, 5}};
    h[0] = half_metrics(b, sub, secs[0]);
    h[1] = half_metrics(b, sub, secs[1]);
    for (int n = 0; n < 8; n++) begin
      int side = n % 2, pos = n / 2, sec = secs[side][pos];
      w[n] = '0;
      w[n].valid = 1'b1;
      w[n].sec = sec_t'(sec);
      if (pos < 3) begin
        for (int u = 0; u < 64; u++) begin
          int best = -1;
          w[n].pm[u] = pm_t'(h[side][pos][u]);
          for (int i = 0; i < 8; i++) begin
            int m = sec_metric(b[sec-1], code_bits(sec, u, i, sub))
                  + ((pos == 0) ? 0 : h[side][pos-1][(u/8)*8 + i]);
            if (m > best) begin best = m; w[n].dec[u] = 6'(i); end
          end
        end
      end else begin
        for (int c = 0; c < 8; c++) begin
          int best = -1;
          w[n].pm[c] = pm_t'(h[side][3][c]);
          for (int g = 0; g < 8; g++)
            for (int hh = 0; hh < 8; hh++) begin
              int m = h[side][2][g*8 + hh] + sec_metric(b[sec-1], code_bits(sec, c*8 + g, hh, sub));
              if (m > best) begin best = m; w[n].dec[c] = 6'(g*8 + hh); end
            end
        end
      end
    end
    return w;
  endfunction

endpackage
