// tb_rm_chip_ctrl: self-checking test of the section sequencer. Blocks of
// 8 sections, back to back and with gaps, must be tagged 1,8,2,7,3,6,4,5
// with no error; a gap inside a block, a block start inside a block and a
// section without a block start must each raise seq_err on that clock.
module tb_rm_chip_ctrl;
  import rm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0, in_valid = 0, in_first = 0;
  logic out_valid, seq_err;
  sec_t out_sec;
  int checks = 0, failures = 0;
  int exp_sec [8] = '{1, 8, 2, 7, 3, 6, 4, 5};

  rm_chip_ctrl dut (.clk, .rst_n, .in_valid, .in_first, .out_valid, .out_sec, .seq_err);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input logic v, input logic f, input int sec, input logic err);
    in_valid = v;
    in_first = f;
    #1;
    checks++;
    if (out_valid != v || seq_err != err || (v && int'(out_sec) != sec)) begin
      failures++;
      $display("v=%0b f=%0b: sec %0d (exp %0d) err %0b (exp %0b)", v, f, out_sec, sec, seq_err, err);
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      for (int n = 0; n < 8; n++) drive(1, n == 0, exp_sec[n], 0);
      if (blk % 3 == 0) drive(0, 0, 0, 0);
    end
    // gap inside a block
    for (int n = 0; n < 3; n++) drive(1, n == 0, exp_sec[n], 0);
    drive(0, 0, 0, 1);
    drive(0, 0, 0, 0);
    // block start inside a block
    for (int n = 0; n < 5; n++) drive(1, n == 0, exp_sec[n], 0);
    drive(1, 1, 1, 1);
    for (int n = 1; n < 8; n++) drive(1, 0, exp_sec[n], 0);
    // a section with no block start
    drive(1, 0, 1, 1);
    drive(0, 0, 0, 0);
    for (int n = 0; n < 8; n++) drive(1, n == 0, exp_sec[n], 0);
    drive(0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
