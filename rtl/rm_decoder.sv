// rm_decoder: the chip's Decoder, which turns the ACSU's per-section
// decisions into the most likely path through the subtrellis.
//
// Collection: every valid ACSU word is stored by section number: the winning
// input of each of the 64 units for sections 1, 2, 3, 6, 7, 8, the winning
// source {g,h} and path metric of each center state for sections 4 and 5.
// When section 5, the last of a block, arrives, the stored decisions and the
// section-5 word are copied to a second bank, so the next block can be
// collected while this one is resolved.
// Resolution, a 3-stage pipeline on the second bank:
//   R1  add left and right metrics of each center state, pick the largest
//   R2  trace the winning path back from that center state through both
//       halves (center decision -> group and state, then one state per
//       section down to the parallel branch of section 1 / 8)
//   R3  rebuild the 64 code bits from the branch labels of the path
// The result (codeword, path metric, path, sideband) appears on out_* four
// clocks after the ACSU delivers section 5, and at most once per 8 clocks.
//
// The sideband (block tag, subtrellis index) comes straight from the BMU
// output, which is three clocks ahead of the ACSU; it is captured with
// the BMU's section 5 and joins the block when the ACSU's section 5 arrives.
// Combining the two halves at the center and resolving one block while the
// next is collected follow the report; storage layout and pipeline split are
// this design's.
module rm_decoder
  import rm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  acsu_out_t   acsu,
  input  logic        bmu_valid,
  input  sec_t        bmu_sec,
  input  side_t       bmu_side,
  output logic        out_valid,
  output dec_result_t out
);

  typedef logic [N_STATE-1:0][2:0]    dec64_t;
  typedef logic [N_CENTER-1:0][5:0]   decc_t;
  typedef pm_t  [N_CENTER-1:0]        pmc_t;

  // Collection bank, indexed by chain position 1..3 (left/right).
  dec64_t dl1_q, dl2_q, dl3_q, dr1_q, dr2_q, dr3_q;
  decc_t  dlc_q;
  pmc_t   pml_q;
  side_t  side_hold_q;

  // Resolution bank.
  dec64_t bl1_q, bl2_q, bl3_q, br1_q, br2_q, br3_q;
  decc_t  blc_q, brc_q;
  pmc_t   bpml_q, bpmr_q;
  side_t  bside_q;
  logic   b_valid_q;

  dec64_t acsu_d3;
  always_comb
    for (int u = 0; u < N_STATE; u++) acsu_d3[u] = acsu.dec[u][2:0];

  always_ff @(posedge clk) begin
    if (bmu_valid && bmu_sec == 4'd5) side_hold_q <= bmu_side;
    if (acsu.valid) begin
      case (acsu.sec)
        4'd1: dl1_q <= acsu_d3;
        4'd2: dl2_q <= acsu_d3;
        4'd3: dl3_q <= acsu_d3;
        4'd8: dr1_q <= acsu_d3;
        4'd7: dr2_q <= acsu_d3;
        4'd6: dr3_q <= acsu_d3;
        4'd4: begin
          for (int c = 0; c < N_CENTER; c++) begin
            dlc_q[c] <= acsu.dec[c];
            pml_q[c] <= acsu.pm[c];
          end
        end
        default: ;
      endcase
    end
    if (acsu.valid && acsu.sec == 4'd5) begin
      bl1_q <= dl1_q;  bl2_q <= dl2_q;  bl3_q <= dl3_q;
      br1_q <= dr1_q;  br2_q <= dr2_q;  br3_q <= dr3_q;
      blc_q <= dlc_q;  bpml_q <= pml_q;
      for (int c = 0; c < N_CENTER; c++) begin
        brc_q[c]  <= acsu.dec[c];
        bpmr_q[c] <= acsu.pm[c];
      end
      bside_q <= side_hold_q;
    end
  end

  // R1: combine the two halves at the center states.
  pmc_t       csum;
  pm_t        r1_metric;
  logic [2:0] r1_center;
  logic [0:0] r1_unused;
  always_comb
    for (int c = 0; c < N_CENTER; c++) csum[c] = bpml_q[c] + bpmr_q[c];

  rm_cmp8 #(.PM_W(PM_W), .DATA_W(1)) u_center_cmp (
    .clk     (clk),
    .m_in    (csum),
    .d_in    ('0),
    .m_out   (r1_metric),
    .idx_out (r1_center),
    .d_out   (r1_unused)
  );

  // R2: trace back.
  path_t r2_path_c, r2_path_q;
  pm_t   r2_metric_q;
  side_t r1_side_q, r2_side_q;
  always_comb begin
    logic [5:0] lc, rc;
    lc = blc_q[r1_center];
    rc = brc_q[r1_center];
    r2_path_c.center = r1_center;
    r2_path_c.l_g    = lc[5:3];
    r2_path_c.l_h3   = lc[2:0];
    r2_path_c.l_h2   = bl3_q[{lc[5:3], lc[2:0]}];
    r2_path_c.l_h1   = bl2_q[{lc[5:3], r2_path_c.l_h2}];
    r2_path_c.l_p    = bl1_q[{lc[5:3], r2_path_c.l_h1}];
    r2_path_c.r_g    = rc[5:3];
    r2_path_c.r_h3   = rc[2:0];
    r2_path_c.r_h2   = br3_q[{rc[5:3], rc[2:0]}];
    r2_path_c.r_h1   = br2_q[{rc[5:3], r2_path_c.r_h2}];
    r2_path_c.r_p    = br1_q[{rc[5:3], r2_path_c.r_h1}];
  end

  // R3: code bits of the path.
  logic [N_SECT-1:0][SEC_LEN-1:0] cw_c;
  always_comb begin
    path_t p;
    p = r2_path_q;
    cw_c[0] = branch_label(4'd1, {p.l_g, p.l_h1}, p.l_p);
    cw_c[1] = branch_label(4'd2, {p.l_g, p.l_h2}, p.l_h1);
    cw_c[2] = branch_label(4'd3, {p.l_g, p.l_h3}, p.l_h2);
    cw_c[3] = branch_label(4'd4, {p.center, p.l_g}, p.l_h3);
    cw_c[4] = branch_label(4'd5, {p.center, p.r_g}, p.r_h3);
    cw_c[5] = branch_label(4'd6, {p.r_g, p.r_h3}, p.r_h2);
    cw_c[6] = branch_label(4'd7, {p.r_g, p.r_h2}, p.r_h1);
    cw_c[7] = branch_label(4'd8, {p.r_g, p.r_h1}, p.r_p);
    for (int j = 0; j < N_SECT; j++)
      cw_c[j] = cw_c[j] ^ coset_word(r2_side_q.sub, sec_t'(j + 1));
  end

  logic r1_v_q, r2_v_q, r3_v_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid_q <= 1'b0;
      r1_v_q    <= 1'b0;
      r2_v_q    <= 1'b0;
      r3_v_q    <= 1'b0;
    end else begin
      b_valid_q <= acsu.valid && acsu.sec == 4'd5;
      r1_v_q    <= b_valid_q;
      r2_v_q    <= r1_v_q;
      r3_v_q    <= r2_v_q;
    end
  end

  always_ff @(posedge clk) begin
    r1_side_q   <= bside_q;
    r2_path_q   <= r2_path_c;
    r2_metric_q <= r1_metric;
    r2_side_q   <= r1_side_q;
    out.codeword <= cw_c;
    out.metric   <= r2_metric_q;
    out.path     <= r2_path_q;
    out.side     <= r2_side_q;
  end

  assign out_valid = r3_v_q;

endmodule
