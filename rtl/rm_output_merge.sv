// rm_output_merge: the output switch of the decoder system. The N_DEC
// decoders finish their blocks in the order the blocks were handed out
// (round robin), so their results are collected in one holding register per
// decoder and released in the same round-robin order: the output is the
// decoded blocks in input order, one per clock at most, one clock after the
// result is held. A decoder delivers at most one result per 8 clocks, so a
// holding register is always free again in time (checked by an assertion).
// The switch follows the report; the holding registers are this design's.
module rm_output_merge
  import rm_pkg::*;
#(
  parameter int N_DEC = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic        [N_DEC-1:0] in_valid,
  input  dec_result_t [N_DEC-1:0] in_res,
  output logic                    out_valid,
  output dec_result_t             out
);

  localparam int DW = (N_DEC > 1) ? $clog2(N_DEC) : 1;

  logic        [N_DEC-1:0] hv_q;
  dec_result_t [N_DEC-1:0] h_q;
  logic [DW-1:0] exp_q;
  logic release_c;

  assign release_c = hv_q[exp_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hv_q      <= '0;
      exp_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= release_c;
      if (release_c) begin
        hv_q[exp_q] <= 1'b0;
        exp_q <= (int'(exp_q) == N_DEC - 1) ? '0 : exp_q + DW'(1);
      end
      for (int d = 0; d < N_DEC; d++)
        if (in_valid[d]) hv_q[d] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int d = 0; d < N_DEC; d++)
      if (in_valid[d]) h_q[d] <= in_res[d];
    if (release_c) out <= h_q[exp_q];
  end

  for (genvar d = 0; d < N_DEC; d++) begin : g_chk
    a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                   in_valid[d] |-> !hv_q[d] || (release_c && exp_q == DW'(d)))
      else $error("rm_output_merge: result of decoder %0d overwritten", d);
  end

endmodule
