// tb_rm_cmp8: self-checking test of the registered 8-way comparator:
// random metrics with forced ties, expected maximum, lowest index and the
// payload of the winner checked one clock later.
module tb_rm_cmp8;
  localparam int PM_W = 9, DATA_W = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0][PM_W-1:0] m_in;
  logic [7:0][DATA_W-1:0] d_in;
  logic [PM_W-1:0] m_out;
  logic [2:0] idx_out;
  logic [DATA_W-1:0] d_out;
  int checks = 0, failures = 0;

  rm_cmp8 #(.PM_W(PM_W), .DATA_W(DATA_W)) dut (.clk, .m_in, .d_in, .m_out, .idx_out, .d_out);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int b = -1, x = 0;
      for (int i = 0; i < 8; i++) begin
        m_in[i] = PM_W'($urandom % 449);
        d_in[i] = DATA_W'($urandom);
      end
      if (n % 3 == 0) m_in[6] = m_in[1];
      if (n % 5 == 0) m_in[7] = 9'd448;
      for (int i = 0; i < 8; i++)
        if (int'(m_in[i]) > b) begin b = int'(m_in[i]); x = i; end
      @(posedge clk);
      #1;
      checks++;
      if (int'(m_out) != b || int'(idx_out) != x || d_out != d_in[x]) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d m=%0d/%0d idx=%0d/%0d", n, m_out, b, idx_out, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
