// rm_subtrellis_select: post processing behind the K subtrellis chips of one
// decoder. The chips of a decoder work in lock step on the same block, so
// their results arrive on the same clock; this block picks the result with
// the largest path metric (the most likely codeword of the whole code) and
// registers it, one clock later. Ties go to the lowest subtrellis index.
// The selection among the subtrellis winners follows the report; the single
// registered compare chain and the tie rule are this design's.
module rm_subtrellis_select
  import rm_pkg::*;
#(
  parameter int K_SUB = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [K_SUB-1:0] in_valid,
  input  dec_result_t [K_SUB-1:0] in_res,
  output logic                    out_valid,
  output dec_result_t             out
);

  dec_result_t best_c;

  always_comb begin
    best_c = in_res[0];
    for (int k = 1; k < K_SUB; k++)
      if (in_res[k].metric > best_c.metric) best_c = in_res[k];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid[0];
    out <= best_c;
  end

  // All chips of a decoder run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid == '0 || in_valid == '1)
    else $error("rm_subtrellis_select: chips out of step");

endmodule
