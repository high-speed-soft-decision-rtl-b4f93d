// tb_rm_acs8: self-checking test of the 8-way add-compare-select unit.
// Random operands every clock (including forced ties); the expected best sum
// and lowest winning index are computed in the testbench and compared two
// clocks later.
module tb_rm_acs8;
  localparam int PM_W = 9, BM_W = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0][PM_W-1:0] pm_in;
  logic [7:0][BM_W-1:0] bm_in;
  logic [PM_W-1:0] best;
  logic [2:0] dec;
  int checks = 0, failures = 0;

  rm_acs8 #(.PM_W(PM_W), .BM_W(BM_W)) dut (.clk, .pm_in, .bm_in, .best, .dec);

  int exp_best [$];
  int exp_dec [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int b = -1, d = 0;
      for (int i = 0; i < 8; i++) begin
        pm_in[i] = PM_W'($urandom % 390);
        bm_in[i] = BM_W'($urandom % 57);
      end
      if (n % 4 == 1) begin   // a tie between two inputs
        pm_in[5] = pm_in[2];
        bm_in[5] = bm_in[2];
      end
      for (int i = 0; i < 8; i++)
        if (int'(pm_in[i]) + int'(bm_in[i]) > b) begin
          b = int'(pm_in[i]) + int'(bm_in[i]);
          d = i;
        end
      exp_best.push_back(b);
      exp_dec.push_back(d);
      @(posedge clk);
      #1;
      if (n >= 1) begin
        automatic int eb = exp_best.pop_front(), ed = exp_dec.pop_front();
        checks++;
        if (int'(best) != eb || int'(dec) != ed) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d best=%0d/%0d dec=%0d/%0d", n, best, eb, dec, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
