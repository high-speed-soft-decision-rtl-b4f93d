// rm_pkg: shared constants, types and trellis functions of the soft-decision
// decoder for the (64,40,8) Reed-Muller subcode.
//
// The trellis of the code has 8 sections of 8 symbols. It is split into
// K_SUB = 32 parallel isomorphic subtrellises; each subtrellis has 64 states
// at the ends of sections 1, 2, 3, 5, 6, 7, 8 center states at the end of
// section 4, radix 8 in sections 1-3 and 6-8 and radix 64 into the center
// states. States of the 64-state columns are numbered {g,h}: g selects one of
// eight groups, h the state inside the group. Branches of sections 2, 3, 6
// and 7 stay inside a group; section 1 (and 8, mirrored) has eight parallel
// branches from the origin into every state; section 4 (and 5, mirrored)
// joins every state to every center state. These shapes follow the
// published subtrellis structure.
//
// The branch labels of the code are not published with that structure.
// branch_label() below is this design's own labelling: it is built from the
// linear words (AA, CC, F0) and quadratic words (88, A0, C0) of RM(2,3), so
// that the eight branches entering one ACS unit, and the 64 branches entering
// one center state, carry distinct labels. The label is rotated left by
// (section number - 1) so that sections differ. Substituting the real code's labels
// only means replacing branch_label() and coset_word().
//
// Addressing used by the ACSU, the decoder and the testbenches: a section is
// processed by 64 8-way ACS units u = 0..63 with inputs i = 0..7.
//   sections 1 and 8 : u = {g,h} destination state, i = parallel branch
//   sections 2,3,6,7 : u = {g,h} destination state, i = h of source {g,i}
//   sections 4 and 5 : u = {c,g}, c = center state, source state {g,i}
// For sections 5-8 "destination" means the state nearer the center, as the
// right half is processed from the end of the block towards the center.
package rm_pkg;

  localparam int SYM_W    = 3;    // soft symbol width (3-bit ADC)
  localparam int SEC_LEN  = 8;    // symbols per trellis section
  localparam int N_SECT   = 8;    // sections per 64-symbol block
  localparam int N_STATE  = 64;   // states at a non-center section boundary
  localparam int N_CENTER = 8;    // center states (end of section 4)
  localparam int RADIX    = 8;    // ACS way count
  localparam int BM_W     = 6;    // branch metric: 0 .. 8*7 = 56
  localparam int PM_W     = 9;    // path metric: up to 8*56 = 448
  localparam int SUB_W    = 5;    // subtrellis index, 32 subtrellises
  localparam int TAG_W    = 8;    // block tag carried with each block
  localparam int N_LABEL  = 1 << SEC_LEN;
  localparam logic [SYM_W-1:0] SYM_MAX = '1;

  typedef logic [SYM_W-1:0]   sym_t;
  typedef sym_t [SEC_LEN-1:0] sect_syms_t;   // one section, symbol k at [k]
  typedef logic [BM_W-1:0]    bm_t;
  typedef bm_t [N_LABEL-1:0]  bm_vec_t;      // metric of every 8-bit label
  typedef logic [PM_W-1:0]    pm_t;
  typedef logic [3:0]         sec_t;         // section number 1..8
  typedef logic [7:0]         label_t;

  // Sideband that travels with a block through a chip.
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [SUB_W-1:0] sub;
  } side_t;

  // One ACSU output word (one section).
  typedef struct packed {
    logic                     valid;
    sec_t                     sec;
    pm_t  [N_STATE-1:0]       pm;    // center sections: entries 0..7 only
    logic [N_STATE-1:0][5:0]  dec;   // radix-8: winning input in [2:0];
                                     // center: {g, h} of the winning source
  } acsu_out_t;

  // Winning path inside one subtrellis. Left half: group l_g, states l_h1
  // (end of section 1), l_h2, l_h3 (end of section 3), parallel branch l_p of
  // section 1. Right half mirrored: r_h1 at the start of section 8 ... r_h3 at
  // the start of section 6, r_p the parallel branch of section 8.
  typedef struct packed {
    logic [2:0] center;
    logic [2:0] l_g, l_h3, l_h2, l_h1, l_p;
    logic [2:0] r_g, r_h3, r_h2, r_h1, r_p;
  } path_t;

  typedef struct packed {
    logic [N_SECT*SEC_LEN-1:0] codeword;  // section j symbol k at 8(j-1)+k
    pm_t                       metric;
    path_t                     path;
    side_t                     side;
  } dec_result_t;

  // Decoding order of the sections: 1, 8, 2, 7, 3, 6, 4, 5.
  function automatic sec_t order_sec(input logic [2:0] idx);
    case (idx)
      3'd0: return 4'd1;  3'd1: return 4'd8;
      3'd2: return 4'd2;  3'd3: return 4'd7;
      3'd4: return 4'd3;  3'd5: return 4'd6;
      3'd6: return 4'd4;  default: return 4'd5;
    endcase
  endfunction

  // Position 1..4 of a section counted from its own end of the block.
  function automatic logic [2:0] chain_pos(input sec_t sec);
    return (sec <= 4'd4) ? sec[2:0] : 3'(4'd9 - sec);
  endfunction

  function automatic label_t rotl8(input label_t w, input logic [2:0] n);
    return label_t'({w, w} >> (4'd8 - {1'b0, n}));
  endfunction

  function automatic label_t lin_word(input logic [2:0] x);
    return (x[0] ? 8'hAA : 8'h00) ^ (x[1] ? 8'hCC : 8'h00) ^ (x[2] ? 8'hF0 : 8'h00);
  endfunction

  function automatic label_t quad_word(input logic [2:0] x);
    return (x[0] ? 8'h88 : 8'h00) ^ (x[1] ? 8'hA0 : 8'h00) ^ (x[2] ? 8'hC0 : 8'h00);
  endfunction

  function automatic label_t grp_word(input logic [2:0] x);
    return (x[0] ? 8'hFF : 8'h00) ^ (x[1] ? 8'h80 : 8'h00) ^ (x[2] ? 8'h96 : 8'h00);
  endfunction

  // Label of branch (u, i) before the section rotation: the same for every
  // section, so the ACSU can pick branch metrics with fixed wiring.
  function automatic label_t base_label(input logic [5:0] u, input logic [2:0] i);
    return lin_word(i) ^ quad_word(u[2:0]) ^ grp_word(u[5:3]);
  endfunction

  // Label of branch (u, i) of section sec, before the subtrellis coset word.
  function automatic label_t branch_label(input sec_t sec, input logic [5:0] u,
                                          input logic [2:0] i);
    return rotl8(base_label(u, i), 3'(sec - 4'd1));
  endfunction

  // Coset word of subtrellis `sub` before the section rotation.
  function automatic label_t coset_base(input logic [SUB_W-1:0] sub);
    return (sub[0] ? 8'h0F : 8'h00) ^ (sub[1] ? 8'h33 : 8'h00) ^ (sub[2] ? 8'h55 : 8'h00)
         ^ (sub[3] ? 8'h3C : 8'h00) ^ (sub[4] ? 8'h66 : 8'h00);
  endfunction

  // Coset word that distinguishes subtrellis `sub` in section `sec`.
  function automatic label_t coset_word(input logic [SUB_W-1:0] sub, input sec_t sec);
    return rotl8(coset_base(sub), 3'(sec - 4'd1));
  endfunction

  // Metric of one symbol against one code bit: larger means more likely.
  function automatic logic [SYM_W-1:0] sym_metric(input sym_t q, input logic b);
    return b ? q : (SYM_MAX - q);
  endfunction

endpackage
