// rm_decoder_system: soft-decision decoder for the (64,40,8) subcode of the
// third-order Reed-Muller code of length 64.
//
// The code's 8-section trellis splits into K_SUB = 32 parallel isomorphic
// subtrellises. One Viterbi decoder (rm_viterbi_decoder) runs K_SUB
// subtrellis chips side by side on the same block and keeps the best of
// their results. To reach the target rate with chips clocked at 60 MHz, N_DEC
// = 2 such decoders work on alternate blocks: rm_block_distributor collects
// each 64-symbol block, reorders it into the decoding order and hands it to
// the next decoder; rm_output_merge returns the decoded blocks in order.
//
// Input: 16 soft symbols (3-bit offset binary, 7 = most confident 1) per
// accepted clock, two sections of a block, with valid/ready. At 60 MHz that
// is 960 Msymbol/s, i.e. 600 Mbit/s of information at rate 40/64.
// Output: per block the decoded 64-bit codeword (section j, symbol k at
// bit 8(j-1)+k), its correlation metric, the winning subtrellis (out_sub)
// and the winning path inside it, in input order. Latency from the last
// input beat of a block to its result is 21 clocks when the decoder is free.
// seq_err reports a broken section sequence inside a decoder (cannot happen
// with this distributor; brought out for observation).
module rm_decoder_system
  import rm_pkg::*;
#(
  parameter int N_DEC = 2,
  parameter int K_SUB = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  sym_t [2*SEC_LEN-1:0]      in_sym,
  output logic                      out_valid,
  output logic [N_SECT*SEC_LEN-1:0] out_codeword,
  output pm_t                       out_metric,
  output logic [SUB_W-1:0]          out_sub,
  output path_t                     out_path,
  output logic [TAG_W-1:0]          out_tag,
  output logic                      seq_err
);

  logic       [N_DEC-1:0]            d_valid, d_first, v_valid, v_err;
  logic       [N_DEC-1:0][TAG_W-1:0] d_tag;
  sect_syms_t [N_DEC-1:0]            d_sym;
  dec_result_t [N_DEC-1:0]           v_res;
  dec_result_t                       m_res;

  rm_block_distributor #(.N_DEC(N_DEC)) u_dist (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_sym   (in_sym),
    .d_valid  (d_valid),
    .d_first  (d_first),
    .d_tag    (d_tag),
    .d_sym    (d_sym)
  );

  for (genvar d = 0; d < N_DEC; d++) begin : g_dec
    rm_viterbi_decoder #(.K_SUB(K_SUB)) u_vd (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (d_valid[d]),
      .in_first  (d_first[d]),
      .in_tag    (d_tag[d]),
      .in_sym    (d_sym[d]),
      .out_valid (v_valid[d]),
      .out       (v_res[d]),
      .seq_err   (v_err[d])
    );
  end

  rm_output_merge #(.N_DEC(N_DEC)) u_merge (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v_valid),
    .in_res    (v_res),
    .out_valid (out_valid),
    .out       (m_res)
  );

  assign out_codeword = m_res.codeword;
  assign out_metric   = m_res.metric;
  assign out_sub      = m_res.side.sub;
  assign out_path     = m_res.path;
  assign out_tag      = m_res.side.tag;
  assign seq_err      = |v_err;

endmodule
