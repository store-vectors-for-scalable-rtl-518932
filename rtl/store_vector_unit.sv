// store_vector_unit: store-vector memory dependence predictor and load scheduler.
//
// Loads may issue ahead of older stores whose addresses are unknown; this unit
// makes a load wait only for the older stores it is predicted to collide with,
// without any associative search. The prediction for a load is a store vector,
// read from a PC-indexed table, that names stores by their age relative to the
// load (bit 0 = the most recent older store).
//
// Dispatch cycle (disp_valid && disp_ready, all combinational until the edge):
//   svt lookup -> sv_barrel_shift (age order -> store queue column, using the
//   store queue tail) -> sv_ready_mask (keep only stores with unknown address
//   that are not issuing now) -> written into the load's row of the lsm, and the
//   load is allocated in load_queue. disp_wait_vec shows the row written.
// Scheduling: a store issuing (st_issue[c]) clears column c of the matrix. A load
//   whose row is empty, whose address is computed (agen_valid) and which has not
//   issued requests issue; load_select grants up to LD_ISSUE_W, oldest first, on
//   ld_iss_valid/ld_iss_idx in the same cycle. A load becomes ready the cycle
//   after its last predicted store issues. No load is granted in a cycle in
//   which a violation flushes the load queue.
// Update: viol_valid reports that the store in entry viol_stq_idx collided with
//   the load in entry viol_lq_idx. sv_update sets the store's age bit in that
//   load's table entry, and the load queue drops the load and all younger loads.
// The table is reset every CLEAR_INTERVAL cycles or on svt_clear_req.
//
// The store queue (tail pointer, per-entry address-unknown bits, store issue) and
// the violation-detecting address CAMs are conventional and sit outside; their
// signals are ports. Sizes default to the evaluated machine; the dispatch and
// commit rate (one each per cycle), select policy, PC index bits and table reset
// interval are this design's choices.
module store_vector_unit #(
  parameter int unsigned LQ             = sv_pkg::LQ_ENTRIES,
  parameter int unsigned STQ            = sv_pkg::STQ_ENTRIES,
  parameter int unsigned VLEN           = sv_pkg::SV_LEN,
  parameter int unsigned SVT_ENTRIES    = sv_pkg::SVT_ENTRIES,
  parameter int unsigned LD_ISSUE_W     = sv_pkg::LD_ISSUE_W,
  parameter int unsigned PC_W           = sv_pkg::PC_W,
  parameter int unsigned PC_LSB         = sv_pkg::PC_LSB,
  parameter int unsigned CLEAR_INTERVAL = sv_pkg::SVT_CLEAR_INTERVAL,
  localparam int unsigned RW = $clog2(LQ),
  localparam int unsigned TW = $clog2(STQ),
  localparam int unsigned AW = (VLEN > 1) ? $clog2(VLEN) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // load dispatch
  input  logic                          disp_valid,
  input  logic [PC_W-1:0]               disp_pc,
  output logic                          disp_ready,
  output logic [RW-1:0]                 disp_lq_idx,
  output logic [STQ-1:0]                disp_wait_vec,
  // store queue state and store issue
  input  logic [TW-1:0]                 stq_tail,
  input  logic [STQ-1:0]                stq_addr_unknown,
  input  logic [STQ-1:0]                st_issue,
  // load address generation
  input  logic                          agen_valid,
  input  logic [RW-1:0]                 agen_lq_idx,
  // load issue
  output logic [LD_ISSUE_W-1:0]         ld_iss_valid,
  output logic [LD_ISSUE_W-1:0][RW-1:0] ld_iss_idx,
  // load commit
  input  logic                          commit_valid,
  // ordering violation
  input  logic                          viol_valid,
  input  logic [RW-1:0]                 viol_lq_idx,
  input  logic [TW-1:0]                 viol_stq_idx,
  // table reset
  input  logic                          svt_clear_req,
  output logic                          svt_clear_pulse,
  // status
  output logic [RW:0]                   lq_count,
  output logic                          svt_upd_valid,
  output logic [AW-1:0]                 svt_upd_age
);
  logic [VLEN-1:0] lk_vec;
  logic [STQ-1:0]  aligned;
  logic [PC_W-1:0] viol_pc;
  logic [TW-1:0]   viol_tail;
  logic [LQ-1:0]   row_ready, cand;
  logic [RW-1:0]   lq_head;
  logic            do_disp;

  assign do_disp = disp_valid && disp_ready;

  svt #(.ENTRIES(SVT_ENTRIES), .VLEN(VLEN), .PC_W(PC_W), .PC_LSB(PC_LSB),
        .CLEAR_INTERVAL(CLEAR_INTERVAL)) u_svt (
    .clk, .rst_n,
    .lk_pc(disp_pc), .lk_vec,
    .upd_valid(svt_upd_valid), .upd_pc(viol_pc), .upd_age(svt_upd_age),
    .clear_req(svt_clear_req), .clear_pulse(svt_clear_pulse));

  sv_barrel_shift #(.STQ(STQ), .VLEN(VLEN)) u_shift (
    .vec(lk_vec), .tail(stq_tail), .row(aligned));

  sv_ready_mask #(.STQ(STQ)) u_mask (
    .row_in(aligned), .addr_unknown(stq_addr_unknown), .col_clr(st_issue),
    .row_out(disp_wait_vec));

  lsm #(.LQ(LQ), .STQ(STQ)) u_lsm (
    .clk, .rst_n,
    .wr_en(do_disp), .wr_row(disp_lq_idx), .wr_vec(disp_wait_vec),
    .col_clr(st_issue), .row_ready);

  load_queue #(.LQ(LQ), .STQ(STQ), .PC_W(PC_W), .W(LD_ISSUE_W)) u_lq (
    .clk, .rst_n,
    .disp_valid, .disp_pc, .disp_tail(stq_tail), .disp_ready, .disp_idx(disp_lq_idx),
    .agen_valid, .agen_idx(agen_lq_idx),
    .iss_valid(ld_iss_valid), .iss_idx(ld_iss_idx),
    .commit_valid,
    .flush_valid(viol_valid), .flush_idx(viol_lq_idx),
    .cand, .head(lq_head), .count(lq_count),
    .rd_idx(viol_lq_idx), .rd_pc(viol_pc), .rd_tail(viol_tail));

  load_select #(.LQ(LQ), .W(LD_ISSUE_W)) u_sel (
    .req(viol_valid ? '0 : (cand & row_ready)), .head(lq_head),
    .gnt_valid(ld_iss_valid), .gnt_idx(ld_iss_idx));

  sv_update #(.STQ(STQ), .VLEN(VLEN)) u_upd (
    .viol_valid, .load_tail(viol_tail), .store_idx(viol_stq_idx),
    .upd_valid(svt_upd_valid), .upd_age(svt_upd_age));
endmodule
