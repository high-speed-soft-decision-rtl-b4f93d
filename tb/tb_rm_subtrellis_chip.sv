// tb_rm_subtrellis_chip: end-to-end test of one subtrellis chip.
// Random codewords of random subtrellises are sent as soft blocks (noise-free
// and with increasing noise), section by section in the order
// 1,8,2,7,3,6,4,5, mostly back to back (one block per 8 clocks) and
// sometimes with idle clocks between blocks. For every block the chip must
// return, 17 clocks after its section 1 entered: the best path metric of
// the subtrellis (plain-loop trellis walk), a codeword that belongs to the
// returned path and scores that metric, the block tag, and the transmitted
// codeword whenever the block is noise-free. Back-to-back blocks must come
// out 8 clocks apart, and the sequence-error flag must stay low.
module tb_rm_subtrellis_chip;
  import rm_pkg::*;
  import rm_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic in_valid = 0, in_first = 0;
  logic [TAG_W-1:0] in_tag = '0;
  logic [SUB_W-1:0] in_sub = '0;
  sect_syms_t in_sym = '0;
  logic out_valid, seq_err;
  dec_result_t out;
  int checks = 0, failures = 0, cyc = 0, nout = 0, last_out = -100;
  int n_b2b = 0, n_gap = 0;
  localparam int NBLK = 48;
  always @(posedge clk) cyc++;

  rm_subtrellis_chip dut (.clk, .rst_n, .in_valid, .in_first, .in_tag, .in_sub, .in_sym,
                          .out_valid, .out, .seq_err);

  typedef struct { block_t b; int sub; logic [63:0] cw; bit clean; int t; bit b2b; } exp_t;
  exp_t q [NBLK];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (seq_err) begin failures++; $display("sequence error flagged"); end
    if (out_valid) begin
      automatic exp_t e;
      automatic int bad = 0;
      checks++;
      if (nout >= NBLK) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = q[nout];
        if (cyc - e.t != 17) begin bad++; $display("latency %0d, expected 17", cyc - e.t); end
        if (e.b2b) begin
          n_b2b++;
          if (cyc - last_out != 8) begin bad++; $display("spacing %0d, expected 8", cyc - last_out); end
        end
        if (int'(out.metric) != best_metric(e.b, e.sub)) begin
          bad++; $display("metric %0d, expected %0d", out.metric, best_metric(e.b, e.sub));
        end
        if (encode(out.path, e.sub) != out.codeword) begin bad++; $display("codeword is not the path's"); end
        if (cw_metric(e.b, out.codeword) != int'(out.metric)) begin bad++; $display("codeword metric differs"); end
        if (int'(out.side.tag) != nout || int'(out.side.sub) != e.sub) begin bad++; $display("sideband"); end
        if (e.clean && out.codeword != e.cw) begin bad++; $display("clean block decoded wrongly"); end
        if (bad != 0) failures++;
        nout++;
        last_out = cyc;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int blk = 0; blk < NBLK; blk++) begin
      q[blk].sub = $urandom % 32;
      q[blk].cw = encode(random_path(), q[blk].sub);
      q[blk].clean = (blk % 4 == 0);
      q[blk].b = noisy_block(q[blk].cw, q[blk].clean ? 0 : 1 + blk % 7);
      q[blk].b2b = (blk % 6 != 0);
      if (!q[blk].b2b) begin
        n_gap++;
        @(posedge clk); #1;
        in_valid = 0; in_first = 0;
        repeat (blk % 5) @(posedge clk);
        #1;
      end
      for (int n = 0; n < 8; n++) begin
        automatic int sec = int'(order_sec(3'(n)));
        @(posedge clk);
        #1;
        in_valid = 1;
        in_first = (n == 0);
        in_tag = TAG_W'(blk);
        in_sub = SUB_W'(q[blk].sub);
        in_sym = q[blk].b[sec-1];
        if (n == 0) q[blk].t = cyc;
      end
    end
    @(posedge clk);
    #1 in_valid = 0; in_first = 0;
    repeat (24) @(posedge clk);
    if (nout != NBLK) begin failures++; $display("%0d blocks never came out", NBLK - nout); end
    if (n_b2b == 0 || n_gap == 0) begin failures++; $display("back-to-back or gap case not exercised"); end
    $display("back-to-back blocks %0d, blocks after a gap %0d", n_b2b, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
