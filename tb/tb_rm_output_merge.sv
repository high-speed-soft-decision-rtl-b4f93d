// tb_rm_output_merge: self-checking test of the output switch. Two decoder
// models deliver results for alternately assigned blocks, at varying but
// ordered times (at most one per 8 clocks each); the merged stream must
// carry every block exactly once, in block order.
module tb_rm_output_merge;
  import rm_pkg::*;
  localparam int N = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic [N-1:0] in_valid = '0;
  dec_result_t [N-1:0] in_res;
  logic out_valid;
  dec_result_t out;
  int checks = 0, failures = 0, next_tag = 0;
  localparam int NBLK = 200;

  rm_output_merge #(.N_DEC(N)) dut (.clk, .rst_n, .in_valid, .in_res, .out_valid, .out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (int'(out.side.tag) != (next_tag % 256) || out.metric != pm_t'(next_tag * 7)) begin
      failures++;
      if (failures < 10) $display("got tag %0d, expected %0d", out.side.tag, next_tag % 256);
    end
    next_tag++;
  end

  // Block b goes to decoder b % N; decoder d finishes its k-th block at
  // 8*k*N + d*4 + jitter, jitter 0..3 (keeps each decoder 8 clocks apart).
  initial begin
    int due [NBLK];
    for (int b = 0; b < NBLK; b++) due[b] = 20 + 8 * b + ($urandom % 4);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 20 + 8 * NBLK + 20; t++) begin
      in_valid = '0;
      for (int b = 0; b < NBLK; b++)
        if (due[b] == t) begin
          in_valid[b % N] = 1'b1;
          in_res[b % N] = '0;
          in_res[b % N].side.tag = TAG_W'(b);
          in_res[b % N].metric = pm_t'(b * 7);
        end
      @(posedge clk);
      #1;
    end
    in_valid = '0;
    repeat (4) @(posedge clk);
    if (next_tag != NBLK) begin failures++; $display("%0d results missing", NBLK - next_tag); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
