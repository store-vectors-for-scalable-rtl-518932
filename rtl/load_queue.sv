// load_queue: program-ordered load entries as the store-vector scheduler sees them.
//
// Each entry holds: valid, address computed, issued, the load's PC and the store
// queue tail pointer at the time the load was dispatched. The entry index is the
// load's row in the load scheduling matrix; the PC and the tail snapshot are what
// an ordering violation needs to find the load's table entry and the offending
// store's age.
//
// Interface and timing (all changes at the clock edge):
//   dispatch  disp_valid && disp_ready allocates entry disp_idx (the tail).
//   agen      agen_valid marks entry agen_idx's address as computed.
//   issue     iss_valid[w] marks entry iss_idx[w] as issued.
//   commit    commit_valid frees the oldest entry (head).
//   flush     flush_valid removes entry flush_idx and every younger entry; the
//             tail moves back to flush_idx. A dispatch in that cycle is refused.
//   cand      entries that are valid, have an address and have not issued.
//   rd_idx    selects the entry whose PC and tail snapshot appear on rd_pc/rd_tail.
// One dispatch and one commit per cycle are this design's choice; the address
// CAMs a full load queue has for violation detection are not part of this block.
module load_queue #(
  parameter int unsigned LQ   = sv_pkg::LQ_ENTRIES,
  parameter int unsigned STQ  = sv_pkg::STQ_ENTRIES,
  parameter int unsigned PC_W = sv_pkg::PC_W,
  parameter int unsigned W    = sv_pkg::LD_ISSUE_W,
  localparam int unsigned RW = $clog2(LQ),
  localparam int unsigned TW = $clog2(STQ)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  disp_valid,
  input  logic [PC_W-1:0]       disp_pc,
  input  logic [TW-1:0]         disp_tail,
  output logic                  disp_ready,
  output logic [RW-1:0]         disp_idx,
  input  logic                  agen_valid,
  input  logic [RW-1:0]         agen_idx,
  input  logic [W-1:0]          iss_valid,
  input  logic [W-1:0][RW-1:0]  iss_idx,
  input  logic                  commit_valid,
  input  logic                  flush_valid,
  input  logic [RW-1:0]         flush_idx,
  output logic [LQ-1:0]         cand,
  output logic [RW-1:0]         head,
  output logic [RW:0]           count,
  input  logic [RW-1:0]         rd_idx,
  output logic [PC_W-1:0]       rd_pc,
  output logic [TW-1:0]         rd_tail
);
  logic [LQ-1:0]   valid_q, addr_q, issued_q;
  logic [PC_W-1:0] pc_q   [LQ];
  logic [TW-1:0]   tail_q [LQ];
  logic [RW:0]     head_q, tail_ptr_q;   // one extra wrap bit

  assign head       = head_q[RW-1:0];
  assign disp_idx   = tail_ptr_q[RW-1:0];
  assign count      = tail_ptr_q - head_q;
  assign disp_ready = (count != (RW+1)'(LQ)) && !flush_valid;
  assign rd_pc      = pc_q[rd_idx];
  assign rd_tail    = tail_q[rd_idx];
  assign cand       = valid_q & addr_q & ~issued_q;

  logic          do_disp;
  logic [RW-1:0] flush_pos;   // age position of the flushed load, 0 = oldest
  assign do_disp   = disp_valid && disp_ready;
  assign flush_pos = flush_idx - head_q[RW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= '0;
      addr_q     <= '0;
      issued_q   <= '0;
      head_q     <= '0;
      tail_ptr_q <= '0;
    end else begin
      if (agen_valid) addr_q[agen_idx] <= 1'b1;
      for (int w = 0; w < W; w++) begin
        if (iss_valid[w]) issued_q[iss_idx[w]] <= 1'b1;
      end
      if (commit_valid) begin
        valid_q[head_q[RW-1:0]] <= 1'b0;
        head_q <= head_q + 1'b1;
      end
      if (flush_valid) begin
        for (int i = 0; i < LQ; i++) begin
          if (RW'(RW'(i) - head_q[RW-1:0]) >= flush_pos) valid_q[i] <= 1'b0;
        end
        tail_ptr_q <= head_q + (RW+1)'(flush_pos);
      end else if (do_disp) begin
        valid_q[disp_idx]  <= 1'b1;
        addr_q[disp_idx]   <= 1'b0;
        issued_q[disp_idx] <= 1'b0;
        tail_ptr_q <= tail_ptr_q + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_disp) begin
      pc_q[disp_idx]   <= disp_pc;
      tail_q[disp_idx] <= disp_tail;
    end
  end

  // a committed load must be present; a flush may not remove the load being committed
  a_commit_valid: assert property (@(posedge clk) disable iff (!rst_n)
    commit_valid |-> valid_q[head_q[RW-1:0]]);
  a_flush_commit: assert property (@(posedge clk) disable iff (!rst_n)
    (commit_valid && flush_valid) |-> (flush_pos != '0));
  a_flush_valid: assert property (@(posedge clk) disable iff (!rst_n)
    flush_valid |-> valid_q[flush_idx]);
endmodule
