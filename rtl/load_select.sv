// load_select: issue select for loads.
//
// Grants up to W of the requesting load queue entries per cycle, oldest first:
// the search starts at the load queue head and wraps around. gnt_idx[0] is the
// oldest granted load. Purely combinational; the oldest-first policy is this
// design's choice.
module load_select #(
  parameter int unsigned LQ = sv_pkg::LQ_ENTRIES,
  parameter int unsigned W  = sv_pkg::LD_ISSUE_W,
  localparam int unsigned RW = $clog2(LQ)
) (
  input  logic [LQ-1:0]         req,
  input  logic [RW-1:0]         head,
  output logic [W-1:0]          gnt_valid,
  output logic [W-1:0][RW-1:0]  gnt_idx
);
  always_comb begin
    logic [LQ-1:0] taken;
    logic [RW-1:0] idx;
    taken     = '0;
    gnt_valid = '0;
    gnt_idx   = '0;
    for (int w = 0; w < W; w++) begin
      for (int p = 0; p < LQ; p++) begin
        idx = head + RW'(p);
        if (!gnt_valid[w] && req[idx] && !taken[idx]) begin
          gnt_valid[w] = 1'b1;
          gnt_idx[w]   = idx;
          taken[idx]   = 1'b1;
        end
      end
    end
  end
endmodule
