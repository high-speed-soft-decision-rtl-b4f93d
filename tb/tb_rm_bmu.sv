// tb_rm_bmu: self-checking test of the branch metric unit. A random section
// (random symbols, section number and subtrellis index) enters every clock;
// three clocks later entry L of the table must equal the metric of the
// label L rotated by (section - 1) xor the section's subtrellis coset word,
// computed symbol by symbol here. The
// 3-clock latency is checked with the valid flag and the section tag.
module tb_rm_bmu;
  import rm_pkg::*;
  import rm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic in_valid = 0;
  sec_t in_sec = 1;
  side_t in_side = '0;
  sect_syms_t in_sym = '0;
  logic out_valid;
  sec_t out_sec;
  side_t out_side;
  bm_vec_t out_bm;
  int checks = 0, failures = 0;

  rm_bmu dut (.clk, .rst_n, .in_valid, .in_sec, .in_side, .in_sym,
              .out_valid, .out_sec, .out_side, .out_bm);

  typedef struct { sect_syms_t s; sec_t sec; side_t side; int t; } item_t;
  item_t q[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      item_t it;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        automatic int bad = 0;
        it = q.pop_front();
        if (cyc - it.t != 3) begin
          failures++;
          $display("latency %0d, expected 3", cyc - it.t);
        end
        if (out_sec != it.sec || out_side != it.side) bad++;
        for (int l = 0; l < 256; l++)
          if (int'(out_bm[l]) != sec_metric(it.s, rotl8(label_t'(l), 3'(it.sec - 1)) ^ coset_word(it.side.sub, it.sec)))
            bad++;
        if (bad != 0) begin
          failures++;
          if (failures < 10) $display("metric mismatch (%0d entries)", bad);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(posedge clk);
      #1;
      in_valid = ($urandom % 8) != 0;
      in_sec   = sec_t'(1 + $urandom % 8);
      in_side  = side_t'($urandom);
      for (int k = 0; k < 8; k++) in_sym[k] = sym_t'($urandom);
      if (n % 50 == 0) in_sym = '1;
      if (in_valid) q.push_back('{in_sym, in_sec, in_side, cyc});
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
