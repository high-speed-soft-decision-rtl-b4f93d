// tb_rm_decoder_system: end-to-end test of the decoder system with two
// interleaved decoders and K_SUB subtrellis chips each (2 here; 32 at the
// default, whose simulation build is too slow for a routine run).
// Random codewords of random subtrellises, noise-free and noisy, enter at
// two sections per clock, first at the full rate and then with idle clocks.
// Every decoded block must come out once, in input order (tag), with the
// best metric over all subtrellises (plain-loop trellis walk), a codeword
// that is the returned path of the returned subtrellis and scores that
// metric, and the transmitted codeword when noise-free. Mechanisms counted,
// each of which must occur: blocks decoded by each of the two decoders,
// results released back to back at the full rate (4 clocks apart), input
// idle clocks, and wins by more than one subtrellis.
module tb_rm_decoder_system;
  import rm_pkg::*;
  import rm_ref_pkg::*;
  localparam int KS = 2;
  localparam int NBLK = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, in_ready;
  sym_t [15:0] in_sym = '0;
  logic out_valid, seq_err;
  logic [63:0] out_codeword;
  pm_t out_metric;
  logic [SUB_W-1:0] out_sub;
  path_t out_path;
  logic [TAG_W-1:0] out_tag;
  int checks = 0, failures = 0, cyc = 0, nout = 0, last_out = -100;
  int n_dec [2] = '{0, 0};
  int n_fullrate = 0, n_idle = 0, sub_seen = 0;
  always @(posedge clk) cyc++;

  rm_decoder_system #(.N_DEC(2), .K_SUB(KS)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_sym, .out_valid, .out_codeword, .out_metric,
    .out_sub, .out_path, .out_tag, .seq_err);

  typedef struct { block_t b; logic [63:0] cw; bit clean; int best; } exp_t;
  exp_t q [NBLK];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) if (dut.v_valid[d]) n_dec[d]++;
    if (seq_err) begin failures++; $display("sequence error"); end
    if (out_valid) begin
      automatic exp_t e;
      automatic int bad = 0;
      checks++;
      if (nout >= NBLK) begin failures++; $display("unexpected output"); end
      else begin
        e = q[nout];
        if (int'(out_tag) != nout) begin bad++; $display("tag %0d, expected %0d", out_tag, nout); end
        if (int'(out_metric) != e.best) begin bad++; $display("metric %0d, expected %0d", out_metric, e.best); end
        if (encode(out_path, int'(out_sub)) != out_codeword) begin bad++; $display("codeword is not the path's"); end
        if (cw_metric(e.b, out_codeword) != int'(out_metric)) begin bad++; $display("codeword metric differs"); end
        if (e.clean && out_codeword != e.cw) begin bad++; $display("clean block decoded wrongly"); end
        if (cyc - last_out == 4) n_fullrate++;
        sub_seen |= 1 << out_sub;
        if (bad != 0) failures++;
        nout++;
        last_out = cyc;
      end
    end
  end

  initial begin
    for (int blk = 0; blk < NBLK; blk++) begin
      automatic int sub = $urandom % KS;
      q[blk].cw = encode(random_path(), sub);
      q[blk].clean = (blk % 3 == 0);
      q[blk].b = noisy_block(q[blk].cw, q[blk].clean ? 0 : 1 + blk % 7);
      q[blk].best = -1;
      for (int k = 0; k < KS; k++) begin
        automatic int m = best_metric(q[blk].b, k);
        if (m > q[blk].best) q[blk].best = m;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int blk = 0; blk < NBLK; blk++)
      for (int beat = 0; beat < 4; beat++) begin
        while (blk >= NBLK / 2 && ($urandom % 3) == 0) begin
          in_valid = 0;
          n_idle++;
          @(posedge clk); #1;
        end
        in_valid = 1;
        in_sym = {q[blk].b[2*beat + 1], q[blk].b[2*beat]};
        while (!in_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
      end
    in_valid = 0;
    repeat (40) @(posedge clk);
    if (nout != NBLK) begin failures++; $display("%0d blocks never came out", NBLK - nout); end
    $display("decoder 0: %0d blocks, decoder 1: %0d blocks, full-rate results %0d, idle input clocks %0d, winning subtrellises mask %0h",
             n_dec[0], n_dec[1], n_fullrate, n_idle, sub_seen);
    if (n_dec[0] == 0 || n_dec[1] == 0) begin failures++; $display("a decoder was never used"); end
    if (n_fullrate == 0) begin failures++; $display("full rate never reached"); end
    if (n_idle == 0) begin failures++; $display("no idle input clocks"); end
    if (sub_seen == 1 || sub_seen == 2) begin failures++; $display("only one subtrellis ever won"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
