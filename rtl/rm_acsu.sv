// rm_acsu: Add-Compare-Select Unit of the subtrellis decoder chip.
//
// The unit extends the survivor paths of one subtrellis section per clock,
// in the order 1, 8, 2, 7, 3, 6, 4, 5: the left half of the trellis grows
// from the origin towards the 8 center states, the right half from the end
// of the block towards the same center states, one half on each clock.
//
// Datapath: 64 8-way ACS units (rm_acs8) and 8 8-way comparators (rm_cmp8).
//   sections 1, 8      unit {g,h} picks the best of 8 parallel branches from
//                      the block end (source path metric 0)
//   sections 2,3,6,7   unit {g,h} picks the best of the 8 states {g,i}
//   sections 4, 5      unit {c,g} picks the best source {g,i} for center c,
//                      then comparator c picks the best group g
// Pipeline (three stages, as in the published chip timing): stage 1 add,
// stage 2 compare-select, stage 3 output register / center comparators. The
// stage-2 result is fed back to stage 1 two clocks after its section
// entered, exactly when the next section of the same half enters, since the
// other half uses the clock in between. One set of path-metric registers
// therefore serves both halves. This feedback is why a block's 8 sections
// must arrive on 8 consecutive clocks.
//
// Branch metrics are taken from the table by the unrotated label of each
// branch, the same for every section (rm_bmu applies the section rotation).
// Interface: in_* is the branch metric table of one section (from rm_bmu);
// out is registered, three clocks after in_*, and carries the new path
// metrics and the winning input of every unit (radix-8 sections) or the
// winning source {g,h} and metric of every center state (sections 4, 5).
module rm_acsu
  import rm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  sec_t      in_sec,
  input  bm_vec_t   in_bm,
  output acsu_out_t out
);

  logic [N_STATE-1:0][RADIX-1:0][PM_W-1:0] pm_src;
  logic [N_STATE-1:0][RADIX-1:0][BM_W-1:0] bm_sel;
  pm_t  [N_STATE-1:0]                      best;
  logic [N_STATE-1:0][2:0]                 dec;

  logic [2:0] pos;
  logic       v1_q, v2_q, v3_q;
  sec_t       s1_q, s2_q, s3_q;

  pm_t  [N_STATE-1:0]      pm3_q;
  logic [N_STATE-1:0][2:0] dec3_q;
  pm_t  [N_CENTER-1:0]     cpm;
  logic [N_CENTER-1:0][2:0] cg, ch;

  // Stage 1 operand routing.
  always_comb begin
    pos = chain_pos(in_sec);
    for (int u = 0; u < N_STATE; u++)
      for (int i = 0; i < RADIX; i++) begin
        bm_sel[u][i] = in_bm[base_label(6'(u), 3'(i))];
        if (pos == 3'd1)
          pm_src[u][i] = '0;
        else if (pos == 3'd4)
          pm_src[u][i] = best[{3'(u % 8), 3'(i)}];   // u = {c,g}, source {g,i}
        else
          pm_src[u][i] = best[{3'(u / 8), 3'(i)}];   // u = {g,h}, source {g,i}
      end
  end

  for (genvar u = 0; u < N_STATE; u++) begin : g_acs
    rm_acs8 #(.PM_W(PM_W), .BM_W(BM_W)) u_acs (
      .clk   (clk),
      .pm_in (pm_src[u]),
      .bm_in (bm_sel[u]),
      .best  (best[u]),
      .dec   (dec[u])
    );
  end

  // Stage 3: center comparators (sections 4, 5) and output register.
  for (genvar c = 0; c < N_CENTER; c++) begin : g_cmp
    rm_cmp8 #(.PM_W(PM_W), .DATA_W(3)) u_cmp (
      .clk     (clk),
      .m_in    (best[c*8 +: 8]),
      .d_in    (dec[c*8 +: 8]),
      .m_out   (cpm[c]),
      .idx_out (cg[c]),
      .d_out   (ch[c])
    );
  end

  always_ff @(posedge clk) begin
    pm3_q  <= best;
    dec3_q <= dec;
    s1_q <= in_sec;
    s2_q <= s1_q;
    s3_q <= s2_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1_q <= 1'b0;
      v2_q <= 1'b0;
      v3_q <= 1'b0;
    end else begin
      v1_q <= in_valid;
      v2_q <= v1_q;
      v3_q <= v2_q;
    end
  end

  always_comb begin
    out.valid = v3_q;
    out.sec   = s3_q;
    if (chain_pos(s3_q) == 3'd4) begin
      out.pm  = '0;
      out.dec = '0;
      for (int c = 0; c < N_CENTER; c++) begin
        out.pm[c]  = cpm[c];
        out.dec[c] = {cg[c], ch[c]};
      end
    end else begin
      out.pm = pm3_q;
      for (int u = 0; u < N_STATE; u++)
        out.dec[u] = {3'b000, dec3_q[u]};
    end
  end

  // The two halves share the feedback registers: a section other than the
  // first of a half must follow the previous section of its half by exactly
  // two clocks.
  property p_section_cadence;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && chain_pos(in_sec) != 3'd1) |-> $past(in_valid, 2);
  endproperty
  a_section_cadence: assert property (p_section_cadence)
    else $error("rm_acsu: section %0d without its predecessor two clocks earlier", in_sec);

endmodule
