// lsm: Load Scheduling Matrix.
//
// One row per load queue entry and one column per store queue entry; a set bit
// (r, c) means the load in entry r is predicted to depend on the unresolved store
// in entry c. At dispatch the load's masked store vector is written into its row
// (wr_en, wr_row, wr_vec). When a store issues, its column is cleared (col_clr has
// one bit per store queue entry, so several stores may clear in one cycle, and a
// clear also applies to a row written in the same cycle). row_ready[r] is the NOR
// of row r: the load has no outstanding predicted dependence.
//
// Timing: writes and clears take effect at the clock edge and row_ready is the
// NOR of the registered row, so a load becomes ready in the cycle after its last
// predicted store issues. Reset clears the matrix. The matrix organisation, the
// column clear and the row NOR follow the single-matrix scheduler the design is
// based on; reset and the same-cycle clear are this design's choices.
module lsm #(
  parameter int unsigned LQ  = sv_pkg::LQ_ENTRIES,
  parameter int unsigned STQ = sv_pkg::STQ_ENTRIES,
  localparam int unsigned RW = $clog2(LQ)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_en,
  input  logic [RW-1:0]  wr_row,
  input  logic [STQ-1:0] wr_vec,
  input  logic [STQ-1:0] col_clr,
  output logic [LQ-1:0]  row_ready
);
  logic [STQ-1:0] m_q [LQ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < LQ; r++) m_q[r] <= '0;
    end else begin
      for (int r = 0; r < LQ; r++) begin
        if (wr_en && wr_row == RW'(r)) m_q[r] <= wr_vec & ~col_clr;
        else                           m_q[r] <= m_q[r] & ~col_clr;
      end
    end
  end

  always_comb begin
    for (int r = 0; r < LQ; r++) row_ready[r] = ~|m_q[r];
  end
endmodule
