// rm_block_distributor: the input switch of the decoder system.
//
// The symbol stream arrives two sections (16 soft symbols) per clock, in
// natural order: a 64-symbol block takes 4 accepted beats, beat b carrying
// sections 2b+1 (in_sym[7:0]) and 2b+2 (in_sym[15:8]). Whole blocks are
// handed to the N_DEC decoders in turn. Each decoder owns two block buffers
// (ping-pong): one is filled while the other is read out to the decoder one
// section per clock, in the decoding order 1,8,2,7,3,6,4,5, on 8
// consecutive clocks with d_first on section 1. A buffer is read from the
// clock after its last beat is written, and a decoder's next block follows
// its previous one without a gap when it is ready. Every block gets a tag
// (a running block number) that travels with it to the output.
// in_ready is low while the buffer the next block would use is still full;
// in_sym is taken on clocks with in_valid and in_ready.
// The round-robin switch follows the report; the buffering, the reordering
// here and the handshake are this design's.
module rm_block_distributor
  import rm_pkg::*;
#(
  parameter int N_DEC = 2
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  output logic                                in_ready,
  input  sym_t [2*SEC_LEN-1:0]                in_sym,
  output logic       [N_DEC-1:0]              d_valid,
  output logic       [N_DEC-1:0]              d_first,
  output logic       [N_DEC-1:0][TAG_W-1:0]   d_tag,
  output sect_syms_t [N_DEC-1:0]              d_sym
);

  localparam int DW = (N_DEC > 1) ? $clog2(N_DEC) : 1;

  sect_syms_t mem_q [N_DEC][2][N_SECT];
  logic [TAG_W-1:0] tag_q [N_DEC][2];
  logic [N_DEC-1:0][1:0] full_q;
  logic [N_DEC-1:0] wsel_q, rsel_q, rd_q;
  logic [N_DEC-1:0][2:0] ridx_q;
  logic [DW-1:0] wdec_q;
  logic [1:0] beat_q;
  logic [TAG_W-1:0] blk_q;
  logic wr_en, wr_last;

  assign in_ready = !full_q[wdec_q][wsel_q[wdec_q]];
  assign wr_en    = in_valid && in_ready;
  assign wr_last  = wr_en && beat_q == 2'd3;

  // Buffer writes.
  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_q[wdec_q][wsel_q[wdec_q]][2*beat_q]     <= in_sym[SEC_LEN-1:0];
      mem_q[wdec_q][wsel_q[wdec_q]][2*beat_q + 1] <= in_sym[2*SEC_LEN-1:SEC_LEN];
      if (beat_q == 2'd0) tag_q[wdec_q][wsel_q[wdec_q]] <= blk_q;
    end
  end

  // Write side control.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wdec_q <= '0;
      beat_q <= '0;
      blk_q  <= '0;
      wsel_q <= '0;
    end else if (wr_en) begin
      beat_q <= beat_q + 2'd1;
      if (wr_last) begin
        wsel_q[wdec_q] <= ~wsel_q[wdec_q];
        wdec_q <= (int'(wdec_q) == N_DEC - 1) ? '0 : wdec_q + DW'(1);
        blk_q  <= blk_q + TAG_W'(1);
      end
    end
  end

  // Read side, one reader per decoder, and the buffer-full flags.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full_q <= '0;
      rsel_q <= '0;
      rd_q   <= '0;
      ridx_q <= '0;
    end else begin
      for (int d = 0; d < N_DEC; d++) begin
        if (rd_q[d]) begin
          ridx_q[d] <= ridx_q[d] + 3'd1;
          if (ridx_q[d] == 3'd7) begin
            full_q[d][rsel_q[d]] <= 1'b0;
            rsel_q[d] <= ~rsel_q[d];
            rd_q[d]   <= full_q[d][~rsel_q[d]];
          end
        end else if (full_q[d][rsel_q[d]]) begin
          rd_q[d]   <= 1'b1;
          ridx_q[d] <= '0;
        end
      end
      if (wr_last) full_q[wdec_q][wsel_q[wdec_q]] <= 1'b1;
    end
  end

  always_comb
    for (int d = 0; d < N_DEC; d++) begin
      d_valid[d] = rd_q[d];
      d_first[d] = rd_q[d] && ridx_q[d] == 3'd0;
      d_tag[d]   = tag_q[d][rsel_q[d]];
      d_sym[d]   = mem_q[d][rsel_q[d]][3'(order_sec(ridx_q[d]) - 4'd1)];
    end

endmodule
