// rm_chip_ctrl: section sequencing of the subtrellis chip (the control part
// of the chip's clock generation and control block).
//
// A block is 8 sections presented on 8 consecutive clocks in the decoding
// order 1, 8, 2, 7, 3, 6, 4, 5; in_first marks its first clock. The block
// tags each section with its number (out_sec, combinational from the input
// and a registered position counter) and flags a sequence error: a block
// start in the middle of a block, a gap inside a block, or a section with no
// block start. Gaps between blocks are allowed. The decoding order follows
// the report; the error rules follow from the ACSU's 2-clock feedback and
// are this design's. Clock-phase generation is not part of this RTL, which
// uses a single clock edge.
module rm_chip_ctrl
  import rm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_first,
  output logic out_valid,
  output sec_t out_sec,
  output logic seq_err
);

  logic [2:0] idx_q;   // position of the next section inside its block
  logic       busy_q;  // inside a block

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx_q  <= '0;
      busy_q <= 1'b0;
    end else if (in_valid) begin
      idx_q  <= in_first ? 3'd1 : (busy_q ? idx_q + 3'd1 : 3'd0);
      busy_q <= in_first || (busy_q && idx_q != 3'd7);
    end else begin
      idx_q  <= '0;
      busy_q <= 1'b0;
    end
  end

  always_comb begin
    out_valid = in_valid;
    out_sec   = order_sec(in_first ? 3'd0 : idx_q);
    seq_err   = (in_valid && in_first && busy_q)
             || (!in_valid && busy_q)
             || (in_valid && !in_first && !busy_q);
  end

endmodule
