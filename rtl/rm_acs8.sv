// rm_acs8: 8-way add-compare-select unit, the basic building block of the
// ACSU (64 of them per chip).
//
// Stage 1 (first clock) adds each of 8 branch metrics to its source path
// metric and registers the 8 sums. Stage 2 (second clock) compares the sums
// and registers the largest (best) and its input index (dec). Ties go to the
// lower index. There is no enable: a new set of operands is taken every
// clock, and best/dec follow two clocks after the operands. The sum is not
// saturated; PM_W must hold the largest path metric of the application.
// The report names the unit and its radix; its internal staging is this
// design's choice.
module rm_acs8 #(
  parameter int PM_W = 9,
  parameter int BM_W = 6
) (
  input  logic                 clk,
  input  logic [7:0][PM_W-1:0] pm_in,
  input  logic [7:0][BM_W-1:0] bm_in,
  output logic [PM_W-1:0]      best,
  output logic [2:0]           dec
);

  logic [7:0][PM_W-1:0] sum_q;
  logic [PM_W-1:0]      max_c;
  logic [2:0]           idx_c;

  always_ff @(posedge clk)
    for (int i = 0; i < 8; i++)
      sum_q[i] <= pm_in[i] + PM_W'(bm_in[i]);

  always_comb begin
    max_c = sum_q[0];
    idx_c = 3'd0;
    for (int i = 1; i < 8; i++)
      if (sum_q[i] > max_c) begin
        max_c = sum_q[i];
        idx_c = 3'(i);
      end
  end

  always_ff @(posedge clk) begin
    best <= max_c;
    dec  <= idx_c;
  end

endmodule
