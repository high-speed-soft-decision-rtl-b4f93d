// tb_rm_viterbi_decoder: end-to-end test of one Viterbi decoder (K_SUB
// subtrellis chips, 4 here, and the selection). Random codewords of random
// subtrellises, noise-free and noisy, are sent back to back and with gaps.
// Each result, 18 clocks after its section 1, must carry the best metric
// over all K_SUB subtrellises (plain-loop trellis walk), a codeword that is
// the returned path in the returned subtrellis and scores that metric, and
// the transmitted codeword for noise-free blocks.
module tb_rm_viterbi_decoder;
  import rm_pkg::*;
  import rm_ref_pkg::*;
  localparam int NBLK = 12;
  localparam int KS = 4;   // 32 at the default; 4 keeps the build short
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, in_first = 0;
  logic [TAG_W-1:0] in_tag = '0;
  sect_syms_t in_sym = '0;
  logic out_valid, seq_err;
  dec_result_t out;
  int checks = 0, failures = 0, cyc = 0, nout = 0;
  always @(posedge clk) cyc++;

  rm_viterbi_decoder #(.K_SUB(KS)) dut (.clk, .rst_n, .in_valid, .in_first, .in_tag, .in_sym,
                          .out_valid, .out, .seq_err);

  typedef struct { block_t b; int sub; logic [63:0] cw; bit clean; int t; int best; } exp_t;
  exp_t q [NBLK];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (seq_err) begin failures++; $display("sequence error"); end
    if (out_valid) begin
      automatic exp_t e;
      automatic int bad = 0;
      checks++;
      if (nout >= NBLK) begin failures++; $display("unexpected output"); end
      else begin
        e = q[nout];
        if (cyc - e.t != 18) begin bad++; $display("latency %0d, expected 18", cyc - e.t); end
        if (int'(out.metric) != e.best) begin bad++; $display("metric %0d, expected %0d", out.metric, e.best); end
        if (encode(out.path, int'(out.side.sub)) != out.codeword) begin bad++; $display("codeword is not the path's"); end
        if (cw_metric(e.b, out.codeword) != int'(out.metric)) begin bad++; $display("codeword metric differs"); end
        if (int'(out.side.tag) != nout) begin bad++; $display("tag"); end
        if (e.clean && out.codeword != e.cw) begin bad++; $display("clean block decoded wrongly"); end
        if (bad != 0) failures++;
        nout++;
      end
    end
  end

  initial begin
    for (int blk = 0; blk < NBLK; blk++) begin
      q[blk].sub = $urandom % KS;
      q[blk].cw = encode(random_path(), q[blk].sub);
      q[blk].clean = (blk % 3 == 0);
      q[blk].b = noisy_block(q[blk].cw, q[blk].clean ? 0 : 2 + blk % 6);
      q[blk].best = -1;
      for (int k = 0; k < KS; k++) begin
        automatic int m = best_metric(q[blk].b, k);
        if (m > q[blk].best) q[blk].best = m;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int blk = 0; blk < NBLK; blk++) begin
      if (blk % 5 == 4) begin
        in_valid = 0; in_first = 0;
        repeat (3) @(posedge clk);
        #1;
      end
      for (int n = 0; n < 8; n++) begin
        in_valid = 1;
        in_first = (n == 0);
        in_tag = TAG_W'(blk);
        in_sym = q[blk].b[int'(order_sec(3'(n))) - 1];
        if (n == 0) q[blk].t = cyc;
        @(posedge clk);
        #1;
      end
    end
    in_valid = 0; in_first = 0;
    repeat (24) @(posedge clk);
    if (nout != NBLK) begin failures++; $display("%0d blocks never came out", NBLK - nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
