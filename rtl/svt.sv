// svt: Store Vector Table.
//
// A tagless table, indexed by low PC bits of a load, whose entries are store
// vectors: bit a set means the load once collided with the store that was the
// (a+1)-th most recent store before it (bit 0 = the most recent store).
//
// Lookup is a combinational read (lk_pc -> lk_vec) used in the load's dispatch
// cycle. An update (upd_valid, upd_pc, upd_age) ORs one bit into an entry at the
// clock edge; a lookup of the same entry in that cycle still sees the old vector.
// Every CLEAR_INTERVAL cycles, or when clear_req is high, the whole table is reset
// so that predictions that no longer hold are forgotten; an update in the same
// cycle is applied after the reset.
//
// Entries start as zero, so loads start out speculating blindly. The reset is made
// with one valid bit per entry: the vector array is a plain memory that is never
// reset, and an entry whose valid bit is clear reads as zero. The index is
// PC[PC_LSB +: log2(ENTRIES)]; the valid-bit scheme, the index bits and the reset
// interval are this design's choices, the rest follows the store-vector algorithm.
module svt #(
  parameter int unsigned ENTRIES        = sv_pkg::SVT_ENTRIES,
  parameter int unsigned VLEN           = sv_pkg::SV_LEN,
  parameter int unsigned PC_W           = sv_pkg::PC_W,
  parameter int unsigned PC_LSB         = sv_pkg::PC_LSB,
  parameter int unsigned CLEAR_INTERVAL = sv_pkg::SVT_CLEAR_INTERVAL,
  localparam int unsigned IW = $clog2(ENTRIES),
  localparam int unsigned AW = (VLEN > 1) ? $clog2(VLEN) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic [PC_W-1:0] lk_pc,
  output logic [VLEN-1:0] lk_vec,
  // update after an ordering violation
  input  logic            upd_valid,
  input  logic [PC_W-1:0] upd_pc,
  input  logic [AW-1:0]   upd_age,
  // table reset
  input  logic            clear_req,
  output logic            clear_pulse
);
  logic [VLEN-1:0] vec_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [31:0] timer_q;

  logic [IW-1:0] lk_idx, upd_idx;
  assign lk_idx  = lk_pc[PC_LSB +: IW];
  assign upd_idx = upd_pc[PC_LSB +: IW];

  assign lk_vec = valid_q[lk_idx] ? vec_q[lk_idx] : '0;

  // periodic reset timer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  timer_q <= '0;
    else if (clear_pulse)        timer_q <= '0;
    else                         timer_q <= timer_q + 32'd1;
  end
  assign clear_pulse = clear_req || (timer_q == CLEAR_INTERVAL - 1);

  // the old contents of the entry being updated, seen through its valid bit
  logic [VLEN-1:0] upd_old, upd_new;
  always_comb begin
    upd_old = (valid_q[upd_idx] && !clear_pulse) ? vec_q[upd_idx] : '0;
    upd_new = upd_old;
    upd_new[upd_age] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      if (clear_pulse) valid_q <= '0;
      if (upd_valid)   valid_q[upd_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid) vec_q[upd_idx] <= upd_new;
  end
endmodule
