// rm_bmu: Branch Metric Unit of the subtrellis decoder chip.
//
// Every clock it accepts the eight 3-bit soft symbols of one trellis section
// and, three clocks later, presents the correlation metric of all 256
// possible 8-bit branch labels for that section. The metric of a label is
// the sum over its eight bits of q (bit 1) or 7-q (bit 0), q being the
// offset-binary symbol (7 = most confident 1); larger is better.
//
// The table is indexed by the unrotated label (rm_pkg::base_label): entry L
// holds the metric of the code bits rotl(L xor coset_base, sec-1), i.e. the
// branch label of that section with the subtrellis coset word applied. This
// is done on the symbols before the sums: they are rotated by sec-1
// positions and complemented where the coset word has a 1. The ACSU then
// picks the metric of every branch with fixed wiring, whatever the section,
// and 32 identical chips serve the 32 subtrellises with a pin-strapped
// subtrellis index.
//
// Pipeline (three stages, as in the published chip timing):
//   stage 1  metrics of the 4 symbol pairs for all 4 bit patterns  (16 sums)
//   stage 2  metrics of the 2 symbol quads for all 16 bit patterns (32 sums)
//   stage 3  metrics of the full section for all 256 patterns      (256 sums)
// The split of the work over the three stages is this design's choice.
// Section number and sideband travel with the data; out_* are registered.
module rm_bmu
  import rm_pkg::*;
#(
  parameter int LATENCY = 3   // fixed by the structure; documents the timing
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sec_t       in_sec,
  input  side_t      in_side,
  input  sect_syms_t in_sym,
  output logic       out_valid,
  output sec_t       out_sec,
  output side_t      out_side,
  output bm_vec_t    out_bm
);

  typedef logic [SYM_W:0]   pair_t;  // 0..14
  typedef logic [SYM_W+1:0] quad_t;  // 0..28

  label_t     coset;
  sect_syms_t sym_c;

  pair_t [3:0][3:0]  pair_q;
  quad_t [1:0][15:0] quad_q;
  logic  [LATENCY-1:0] vld_q;
  sec_t  [LATENCY-1:0] sec_q;
  side_t [LATENCY-1:0] side_q;

  always_comb begin
    coset = coset_base(in_side.sub);
    for (int k = 0; k < SEC_LEN; k++) begin
      sym_t s;
      s = in_sym[3'(k) + 3'(in_sec - 4'd1)];
      sym_c[k] = coset[k] ? ~s : s;
    end
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < 4; m++)
      for (int p = 0; p < 4; p++)
        pair_q[m][p] <= pair_t'(sym_metric(sym_c[2*m],   p[0]))
                      + pair_t'(sym_metric(sym_c[2*m+1], p[1]));
    for (int m = 0; m < 2; m++)
      for (int p = 0; p < 16; p++)
        quad_q[m][p] <= quad_t'(pair_q[2*m][p[1:0]]) + quad_t'(pair_q[2*m+1][p[3:2]]);
    for (int l = 0; l < N_LABEL; l++)
      out_bm[l] <= bm_t'(quad_q[0][l[3:0]]) + bm_t'(quad_q[1][l[7:4]]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LATENCY-2:0], in_valid};
    sec_q  <= {sec_q[LATENCY-2:0],  in_sec};
    side_q <= {side_q[LATENCY-2:0], in_side};
  end

  assign out_valid = vld_q[LATENCY-1];
  assign out_sec   = sec_q[LATENCY-1];
  assign out_side  = side_q[LATENCY-1];

endmodule
