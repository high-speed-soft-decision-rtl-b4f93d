// tb_rm_decoder: self-checking test of the chip decoder (combine + trace
// back). ACSU output words and the BMU sideband are generated here from a
// plain trellis walk of random soft blocks and fed with the chip's timing
// (sideband three clocks ahead of the ACSU words), back to back and with
// gaps. For each block the decoder must output, four clocks after the
// section-5 word: the best path metric of the subtrellis, a path whose
// codeword is the one output, a codeword whose metric equals that metric,
// the block's tag and subtrellis index, and for noise-free blocks exactly
// the transmitted codeword.
module tb_rm_decoder;
  import rm_pkg::*;
  import rm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  acsu_out_t acsu = '0;
  logic bmu_valid = 0;
  sec_t bmu_sec = 1;
  side_t bmu_side = '0;
  logic out_valid;
  dec_result_t out;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  always @(posedge clk) cyc++;

  rm_decoder dut (.clk, .rst_n, .acsu, .bmu_valid, .bmu_sec, .bmu_side, .out_valid, .out);

  typedef struct { block_t b; int sub; int tag; logic [63:0] cw; bit clean; int t; } exp_t;
  exp_t q[$];
  acsu_out_t wmem [30][8];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    automatic exp_t e;
    automatic int bad = 0;
    checks++;
    if (nout >= q.size()) begin
      failures++;
      $display("unexpected decoder output");
    end else begin
      e = q[nout++];
      if (cyc - e.t != 4) begin bad++; $display("latency %0d, expected 4", cyc - e.t); end
      if (int'(out.metric) != best_metric(e.b, e.sub)) begin
        bad++; $display("metric %0d, expected %0d", out.metric, best_metric(e.b, e.sub));
      end
      if (encode(out.path, e.sub) != out.codeword) begin bad++; $display("codeword is not the path's"); end
      if (cw_metric(e.b, out.codeword) != int'(out.metric)) begin bad++; $display("codeword metric differs"); end
      if (int'(out.side.tag) != e.tag || int'(out.side.sub) != e.sub) begin bad++; $display("sideband"); end
      if (e.clean && out.codeword != e.cw) begin bad++; $display("clean block decoded wrongly"); end
      if (bad != 0) failures++;
    end
  end

  initial begin
    int gap;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Stream: sideband of section n at clock t, ACSU word of section n at t+3.
    for (int blk = 0; blk < 30; blk++) begin
      automatic exp_t e;
      e.sub = $urandom % 32;
      e.tag = blk;
      e.cw = encode(random_path(), e.sub);
      e.clean = (blk % 3 == 0);
      e.b = noisy_block(e.cw, e.clean ? 0 : 1 + blk % 6);
      begin
        automatic acsu_blk_t ww = acsu_words(e.b, e.sub);
        for (int n = 0; n < 8; n++) wmem[blk][n] = ww[n];
      end
      q.push_back(e);
    end
    gap = 0;
    for (int blk = 0; blk < 30; blk++) begin
      if (blk % 4 == 3)
        repeat (2) begin
          @(posedge clk); #1;
          bmu_valid = 0; acsu.valid = 0;
        end
      for (int n = 0; n < 8 + 3; n++) begin
        @(posedge clk);
        #1;
        bmu_valid = 0;
        acsu.valid = 0;
        if (n < 8) begin
          bmu_valid = 1;
          bmu_sec = order_sec(3'(n));
          bmu_side = '{tag: TAG_W'(q[blk].tag), sub: SUB_W'(q[blk].sub)};
        end
        if (n >= 3) begin
          acsu = wmem[blk][n-3];
          if (n - 3 == 7) q[blk].t = cyc;
        end
        // The next block's sideband overlaps this block's ACSU words only
        // in the real chip; here blocks are sent one after the other.
      end
    end
    @(posedge clk);
    #1 acsu.valid = 0;
    repeat (8) @(posedge clk);
    if (nout != q.size()) begin failures++; $display("%0d blocks never came out", q.size() - nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
