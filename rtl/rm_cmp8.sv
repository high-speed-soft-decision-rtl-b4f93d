// rm_cmp8: registered 8-way comparator.
//
// Picks the largest of eight metrics and registers it with its index and with
// the payload that came with the winning input. Ties go to the lower index.
// One clock of latency, a new set of inputs every clock. In the ACSU eight of
// them follow the 8-way ACS units to complete the radix-64 selection into
// the center states of sections 4 and 5; the decoder uses one to choose the
// best center state. The report names comparators for this job; the tie rule
// and the payload are this design's choice.
module rm_cmp8 #(
  parameter int PM_W = 9,
  parameter int DATA_W = 3
) (
  input  logic                   clk,
  input  logic [7:0][PM_W-1:0]   m_in,
  input  logic [7:0][DATA_W-1:0] d_in,
  output logic [PM_W-1:0]        m_out,
  output logic [2:0]             idx_out,
  output logic [DATA_W-1:0]      d_out
);

  logic [PM_W-1:0] max_c;
  logic [2:0]      idx_c;

  always_comb begin
    max_c = m_in[0];
    idx_c = 3'd0;
    for (int i = 1; i < 8; i++)
      if (m_in[i] > max_c) begin
        max_c = m_in[i];
        idx_c = 3'(i);
      end
  end

  always_ff @(posedge clk) begin
    m_out   <= max_c;
    idx_out <= idx_c;
    d_out   <= d_in[idx_c];
  end

endmodule
