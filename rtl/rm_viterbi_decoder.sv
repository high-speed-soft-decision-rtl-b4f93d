// rm_viterbi_decoder: one complete Viterbi decoder for the (64,40,8)
// Reed-Muller subcode, built from K_SUB parallel isomorphic subtrellis chips
// that see the same symbol stream and differ only in their subtrellis index,
// followed by the selection of the best subtrellis result.
//
// Interface and timing are those of rm_subtrellis_chip (8 sections on 8
// consecutive clocks in the order 1,8,2,7,3,6,4,5, one block per 8 clocks),
// with one more clock for the selection: the decoded block appears 18 clocks
// after its section 1 entered. out.side.sub names the winning subtrellis.
// seq_err is the OR of the chips' sequence-error flags.
module rm_viterbi_decoder
  import rm_pkg::*;
#(
  parameter int K_SUB = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic [TAG_W-1:0] in_tag,
  input  sect_syms_t       in_sym,
  output logic             out_valid,
  output dec_result_t      out,
  output logic             seq_err
);

  logic        [K_SUB-1:0] c_valid, c_err;
  dec_result_t [K_SUB-1:0] c_res;

  for (genvar k = 0; k < K_SUB; k++) begin : g_chip
    rm_subtrellis_chip u_chip (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .in_first  (in_first),
      .in_tag    (in_tag),
      .in_sub    (SUB_W'(k)),
      .in_sym    (in_sym),
      .out_valid (c_valid[k]),
      .out       (c_res[k]),
      .seq_err   (c_err[k])
    );
  end

  rm_subtrellis_select #(.K_SUB(K_SUB)) u_sel (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c_valid),
    .in_res    (c_res),
    .out_valid (out_valid),
    .out       (out)
  );

  assign seq_err = |c_err;

endmodule
