// tb_rm_subtrellis_select: self-checking test of the best-of-K selection.
// Random results with random metrics (and forced ties) are offered in lock
// step; one clock later the output must be the result of the lowest index
// holding the largest metric.
module tb_rm_subtrellis_select;
  import rm_pkg::*;
  localparam int K = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;
  logic [K-1:0] in_valid = '0;
  dec_result_t [K-1:0] in_res;
  logic out_valid;
  dec_result_t out;
  int checks = 0, failures = 0;

  rm_subtrellis_select #(.K_SUB(K)) dut (.clk, .rst_n, .in_valid, .in_res, .out_valid, .out);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      automatic int best = -1, bi = 0;
      automatic logic v = (n % 4) != 3;
      for (int k = 0; k < K; k++) begin
        in_res[k] = dec_result_t'({$urandom, $urandom, $urandom, $urandom});
        in_res[k].metric = pm_t'($urandom % ((n % 2) ? 20 : 449));
        in_res[k].side.sub = SUB_W'(k);
        if (int'(in_res[k].metric) > best) begin best = int'(in_res[k].metric); bi = k; end
      end
      in_valid = {K{v}};
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != v || (v && (out != in_res[bi]))) begin
        failures++;
        if (failures < 10) $display("n=%0d: got sub %0d metric %0d, expected sub %0d metric %0d",
                                    n, out.side.sub, out.metric, bi, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
