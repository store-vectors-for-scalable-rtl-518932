// sv_ready_mask: removes already-satisfied predictions from an aligned store vector.
//
// After alignment, bit i of the vector asks the load to wait for store queue entry
// i. The bit is kept only if entry i holds a store whose address is still unknown
// (addr_unknown[i], which the store queue keeps at 0 for empty entries) and which
// is not issuing in this very cycle (col_clr[i]). Waiting on a store that has
// already resolved would never end, since its column clear has already passed.
// The AND with the address-unknown bits is the algorithm's; masking the stores
// issuing in the same cycle is this design's addition for the case where a
// column clear and the row write coincide. Purely combinational.
module sv_ready_mask #(
  parameter int unsigned STQ = sv_pkg::STQ_ENTRIES
) (
  input  logic [STQ-1:0] row_in,
  input  logic [STQ-1:0] addr_unknown,
  input  logic [STQ-1:0] col_clr,
  output logic [STQ-1:0] row_out
);
  assign row_out = row_in & addr_unknown & ~col_clr;
endmodule
