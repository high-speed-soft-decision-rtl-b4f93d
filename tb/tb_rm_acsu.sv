// tb_rm_acsu: self-checking test of the add-compare-select unit.
// Random soft blocks of random subtrellises are turned into branch-metric
// tables here and fed one section per clock in the order 1,8,2,7,3,6,4,5,
// with idle gaps between some blocks. Every ACSU output word is checked
// against a plain-loop trellis walk: the 64 path metrics (8 for the center
// sections), the winning input of every unit (lowest index on ties) and the
// winning source {g,h} of every center state. The output must follow its
// input by exactly 3 clocks.
module tb_rm_acsu;
  import rm_pkg::*;
  import rm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic in_valid = 0;
  sec_t in_sec = 1;
  bm_vec_t in_bm = '0;
  acsu_out_t out;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  rm_acsu dut (.clk, .rst_n, .in_valid, .in_sec, .in_bm, .out);

  typedef struct { int sec; int t; int pm[64]; int dec[64]; } exp_t;
  exp_t q[$];

  function automatic bm_vec_t bm_table(input sect_syms_t s, input int sec, input int sub);
    bm_vec_t t;
    for (int l = 0; l < 256; l++)
      t[l] = bm_t'(sec_metric(s, rotl8(label_t'(l), 3'(sec - 1)) ^ coset_word(SUB_W'(sub), sec_t'(sec))));
    return t;
  endfunction

  // Expected ACSU words of one block, in decoding order.
  task automatic expect_block(input block_t b, input int sub, input int t0);
    half_t h [2];
    int secs [2][4] = '{'{1, 2, 3, 4}, '{8, 7, 6, 5}};
    h[0] = half_metrics(b, sub, secs[0]);
    h[1] = half_metrics(b, sub, secs[1]);
    for (int n = 0; n < 8; n++) begin
      exp_t e;
      int side = n % 2, pos = n / 2, sec = secs[side][pos];
      e.sec = sec;
      e.t = t0 + n;
      for (int u = 0; u < 64; u++) begin e.pm[u] = 0; e.dec[u] = 0; end
      if (pos < 3) begin
        for (int u = 0; u < 64; u++) begin
          int best = -1;
          e.pm[u] = h[side][pos][u];
          for (int i = 0; i < 8; i++) begin
            int m = sec_metric(b[sec-1], code_bits(sec, u, i, sub))
                  + ((pos == 0) ? 0 : h[side][pos-1][(u/8)*8 + i]);
            if (m > best) begin best = m; e.dec[u] = i; end
          end
        end
      end else begin
        for (int c = 0; c < 8; c++) begin
          int best = -1;
          e.pm[c] = h[side][3][c];
          for (int g = 0; g < 8; g++)
            for (int hh = 0; hh < 8; hh++) begin
              int m = h[side][2][g*8 + hh] + sec_metric(b[sec-1], code_bits(sec, c*8 + g, hh, sub));
              if (m > best) begin best = m; e.dec[c] = g*8 + hh; end
            end
        end
      end
      q.push_back(e);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out.valid) begin
    exp_t e;
    automatic int bad = 0, n = (chain_pos(out.sec) == 3'd4) ? 8 : 64;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("unexpected ACSU output");
    end else begin
      e = q.pop_front();
      if (int'(out.sec) != e.sec) bad++;
      if (cyc - e.t != 3) begin
        bad++;
        $display("latency %0d, expected 3", cyc - e.t);
      end
      for (int u = 0; u < n; u++)
        if (int'(out.pm[u]) != e.pm[u] || int'(out.dec[u]) != e.dec[u]) bad++;
      if (bad != 0) begin
        failures++;
        if (failures < 10) $display("section %0d: %0d mismatches", e.sec, bad);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 40; blk++) begin
      block_t b;
      automatic int sub = $urandom % 32;
      automatic logic [63:0] cw = encode(random_path(), sub);
      b = noisy_block(cw, (blk % 4 == 0) ? 7 : blk % 5);
      if (blk % 3 == 2) begin
        @(posedge clk);
        #1 in_valid = 0;
      end
      for (int n = 0; n < 8; n++) begin
        automatic int sec = int'(order_sec(3'(n)));
        @(posedge clk);
        #1;
        if (n == 0) expect_block(b, sub, cyc);
        in_valid = 1;
        in_sec = sec_t'(sec);
        in_bm = bm_table(b[sec-1], sec, sub);
      end
    end
    @(posedge clk);
    #1 in_valid = 0;
    repeat (6) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("%0d sections never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
