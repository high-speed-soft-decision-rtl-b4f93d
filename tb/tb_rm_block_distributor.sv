// tb_rm_block_distributor: self-checking test of the input switch.
// Random blocks are offered at two sections per clock with random idle
// clocks and with a slow and a fast phase; the test checks that the blocks
// go to the decoders in turn, that every decoder sees each of its blocks on
// 8 consecutive clocks in the order 1,8,2,7,3,6,4,5 with d_first on
// section 1 and the right tag and symbols, that back-to-back reading occurs
// and that no block is lost. At full input rate in_ready stays high; the
// number of clocks it was low is reported.
module tb_rm_block_distributor;
  import rm_pkg::*;
  localparam int N = 2;
  localparam int NBLK = 120;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, in_ready;
  sym_t [15:0] in_sym = '0;
  logic [N-1:0] d_valid, d_first;
  logic [N-1:0][TAG_W-1:0] d_tag;
  sect_syms_t [N-1:0] d_sym;
  int checks = 0, failures = 0, n_stall = 0, n_b2b = 0;
  int exp_sec [8] = '{1, 8, 2, 7, 3, 6, 4, 5};
  sect_syms_t blocks [NBLK][8];
  int pos [N];       // position inside the current block, -1 idle
  int cur [N];       // block being read
  int nxt [N];       // next block expected at decoder d
  int done_cnt = 0;

  rm_block_distributor #(.N_DEC(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_sym,
                                         .d_valid, .d_first, .d_tag, .d_sym);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < N; d++) begin
      if (pos[d] >= 0 && pos[d] < 8 && !d_valid[d]) begin
        failures++; $display("decoder %0d: gap inside a block", d);
        pos[d] = -1;
      end
      if (d_valid[d]) begin
        checks++;
        if (d_first[d]) begin
          if (pos[d] == 8) n_b2b++;
          if (pos[d] >= 0 && pos[d] < 8) begin failures++; $display("block restarted"); end
          pos[d] = 0;
          cur[d] = nxt[d];
          nxt[d] += N;
          if (int'(d_tag[d]) != cur[d] % 256) begin
            failures++; $display("decoder %0d: tag %0d, expected %0d", d, d_tag[d], cur[d]);
          end
        end
        if (pos[d] < 0 || pos[d] > 7) begin
          failures++; $display("decoder %0d: section without block start", d);
        end else begin
          if (d_sym[d] != blocks[cur[d]][exp_sec[pos[d]] - 1]) begin
            failures++;
            if (failures < 10) $display("decoder %0d block %0d pos %0d: wrong symbols", d, cur[d], pos[d]);
          end
          pos[d]++;
          if (pos[d] == 8) done_cnt++;
        end
      end else if (pos[d] == 8) pos[d] = -1;
    end
  end

  initial begin
    for (int d = 0; d < N; d++) begin pos[d] = -1; nxt[d] = d; end
    for (int b = 0; b < NBLK; b++)
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 8; k++) blocks[b][j][k] = sym_t'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int beat = 0; beat < 4; beat++) begin
        // slow phase with idle clocks, then a fast phase
        while (b < 40 && ($urandom % 3) == 0) begin
          in_valid = 0;
          @(posedge clk); #1;
        end
        in_valid = 1;
        in_sym = {blocks[b][2*beat + 1], blocks[b][2*beat]};
        #0;
        while (!in_ready) begin
          n_stall++;
          @(posedge clk); #1;
        end
        @(posedge clk); #1;
      end
    in_valid = 0;
    repeat (40) @(posedge clk);
    if (done_cnt != NBLK) begin failures++; $display("%0d blocks delivered of %0d", done_cnt, NBLK); end
    if (n_b2b == 0) begin failures++; $display("stall %0d back-to-back %0d", n_stall, n_b2b); end
    $display("in_ready low %0d clocks, back-to-back blocks %0d", n_stall, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
