// sv_update: turns an ordering violation into a store vector table update.
//
// When a store finds that a younger load already read its address, the store's
// age relative to that load is the distance from the most recent store at the
// load's dispatch (store queue entry load_tail-1) back to the store:
//     age = (load_tail - 1 - store_idx) mod STQ.
// Bit age of the load's table entry is then set (upd_valid, upd_age); the
// table is indexed with the load's PC, which the caller routes directly.
// If the store is older than the VLEN most recent stores (only possible when the
// vector is shorter than the store queue) nothing is recorded.
// When VLEN equals STQ every age fits, and upd_valid simply follows viol_valid.
// Purely combinational; the table write happens at the next clock edge.
module sv_update #(
  parameter int unsigned STQ  = sv_pkg::STQ_ENTRIES,
  parameter int unsigned VLEN = sv_pkg::SV_LEN,
  localparam int unsigned TW = $clog2(STQ),
  localparam int unsigned AW = (VLEN > 1) ? $clog2(VLEN) : 1
) (
  input  logic            viol_valid,
  input  logic [TW-1:0]   load_tail,
  input  logic [TW-1:0]   store_idx,
  output logic            upd_valid,
  output logic [AW-1:0]   upd_age
);
  logic [TW-1:0] age;
  assign age       = load_tail - TW'(1) - store_idx;
  assign upd_valid = viol_valid && (32'(age) < VLEN);
  assign upd_age   = AW'(age);
endmodule
