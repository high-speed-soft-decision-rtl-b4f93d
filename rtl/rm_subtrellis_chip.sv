// rm_subtrellis_chip: one subtrellis of the (64,40,8) Reed-Muller subcode
// trellis, decoded by a single chip.
//
// The chip takes a 64-symbol block as 8 sections of 8 soft symbols on 8
// consecutive clocks, in the decoding order 1, 8, 2, 7, 3, 6, 4, 5
// (in_first on section 1), and returns the most likely codeword of its
// subtrellis with the path and the path metric. Blocks may follow each other
// back to back, one block per 8 clocks; at the published 60 MHz input clock
// that is 480 Msymbol/s, the rate of one of two interleaved decoders.
//
// Structure, as in the published chip plan:
//   rm_chip_ctrl  tags sections with their number
//   rm_bmu        3-stage branch metric unit (metrics of all 256 labels)
//   rm_acsu       3-stage add-compare-select unit (64 ACS8 + 8 comparators)
//   rm_decoder    combines the halves at the center and traces back
// The BMU-to-decoder connection carries the block tag and subtrellis index.
//
// Timing: section 1 enters at clock 0; the BMU presents it at clock 3, the
// ACSU at clock 6 (sections follow one per clock, section 5 at clock 13) and
// the result is on out_* at clock 17, for one clock. in_sub is the
// subtrellis index of this chip (a strap in a system of 32 chips).
module rm_subtrellis_chip
  import rm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_first,
  input  logic [TAG_W-1:0] in_tag,
  input  logic [SUB_W-1:0] in_sub,
  input  sect_syms_t       in_sym,
  output logic             out_valid,
  output dec_result_t      out,
  output logic             seq_err
);

  logic    c_valid;
  sec_t    c_sec;
  logic    b_valid;
  sec_t    b_sec;
  side_t   b_side;
  bm_vec_t b_bm;
  acsu_out_t a_out;

  rm_chip_ctrl u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_first  (in_first),
    .out_valid (c_valid),
    .out_sec   (c_sec),
    .seq_err   (seq_err)
  );

  rm_bmu u_bmu (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c_valid),
    .in_sec    (c_sec),
    .in_side   ('{tag: in_tag, sub: in_sub}),
    .in_sym    (in_sym),
    .out_valid (b_valid),
    .out_sec   (b_sec),
    .out_side  (b_side),
    .out_bm    (b_bm)
  );

  rm_acsu u_acsu (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (b_valid),
    .in_sec   (b_sec),
    .in_bm    (b_bm),
    .out      (a_out)
  );

  rm_decoder u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .acsu      (a_out),
    .bmu_valid (b_valid),
    .bmu_sec   (b_sec),
    .bmu_side  (b_side),
    .out_valid (out_valid),
    .out       (out)
  );

endmodule
