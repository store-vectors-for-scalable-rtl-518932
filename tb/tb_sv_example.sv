// tb_sv_example: replays the worked example of the store-vector algorithm on an
// 8-entry load queue and 8-entry store queue with 8-bit vectors.
//
// 1. Training: three violations teach load X's table entry the vector
//    0 0 1 0 0 1 0 1 (most recent, third and sixth most recent store).
// 2. Prediction: store queue entries 0..2 hold stores B, C, D, entries 3..6 are
//    empty, entry 7 holds store A (the oldest); the tail is 3 and the
//    address-unknown bits are 1 1 0 0 0 0 0 1. Load X's row must come out as
//    1 0 0 0 0 0 0 0 by store queue index: it waits only for store B.
// 3. Scheduling: with its address known, load X does not issue until store B
//    issues, and is granted exactly one cycle after that.
// 4. Update: store A then reports a collision with load X; A is the fourth most
//    recent store for X, so bit 3 is set, giving 0 0 1 0 1 1 0 1, which a new
//    dispatch of X with every store unresolved shows as row 1 0 1 0 0 1 0 1.
module tb_sv_example;
  localparam int LQ = 8, STQ = 8, VLEN = 8;
  logic clk = 0, rst_n = 0;
  logic disp_valid, disp_ready; logic [63:0] disp_pc;
  logic [2:0] disp_lq_idx; logic [7:0] disp_wait_vec;
  logic [2:0] stq_tail; logic [7:0] stq_addr_unknown, st_issue;
  logic agen_valid; logic [2:0] agen_lq_idx;
  logic [1:0] ld_iss_valid; logic [1:0][2:0] ld_iss_idx;
  logic commit_valid, viol_valid; logic [2:0] viol_lq_idx, viol_stq_idx;
  logic svt_clear_req, svt_clear_pulse; logic [3:0] lq_count;
  logic svt_upd_valid; logic [2:0] svt_upd_age;
  int checks = 0, failures = 0;
  localparam logic [63:0] PC_X = 64'h0001_2340;

  store_vector_unit #(.LQ(LQ), .STQ(STQ), .VLEN(VLEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  // dispatch load X with the given store queue view; returns its load queue entry
  task automatic dispatch_x(input logic [2:0] tail, input logic [7:0] unknown, output logic [2:0] idx,
                            output logic [7:0] row);
    disp_valid = 1; disp_pc = PC_X; stq_tail = tail; stq_addr_unknown = unknown; #1;
    check(disp_ready, "dispatch accepted");
    idx = disp_lq_idx; row = disp_wait_vec;
    tick(); disp_valid = 0;
  endtask

  task automatic violate(input logic [2:0] lq, input logic [2:0] st, input int exp_age);
    viol_valid = 1; viol_lq_idx = lq; viol_stq_idx = st; #1;
    check(svt_upd_valid && svt_upd_age == 3'(exp_age), $sformatf("update age %0d exp %0d", svt_upd_age, exp_age));
    tick(); viol_valid = 0;
  endtask

  initial begin
    logic [2:0] x; logic [7:0] row; int t0;
    disp_valid = 0; disp_pc = 0; stq_tail = 0; stq_addr_unknown = 0; st_issue = 0;
    agen_valid = 0; agen_lq_idx = 0; commit_valid = 0; viol_valid = 0; viol_lq_idx = 0;
    viol_stq_idx = 0; svt_clear_req = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. training: ages 0, 2 and 5 relative to a dispatch with tail 3
    dispatch_x(3'd3, 8'h00, x, row);
    check(row == 8'h00, "untrained load predicts nothing");
    violate(x, 3'd2, 0);
    dispatch_x(3'd3, 8'h00, x, row);
    violate(x, 3'd0, 2);
    dispatch_x(3'd3, 8'h00, x, row);
    violate(x, 3'd5, 5);
    // the trained vector, seen with every store unresolved
    dispatch_x(3'd3, 8'hff, x, row);
    check(row == 8'b0010_0101, $sformatf("trained row %b", row));
    violate(x, 3'd2, 0);   // flush it again (bit 0 was already set)
    // 2. prediction: B C D in 0..2, A in 7, address-unknown 1 1 0 0 0 0 0 1
    dispatch_x(3'd3, 8'b1000_0011, x, row);
    check(row == 8'b0000_0001, $sformatf("example row %b exp 00000001", row));
    // 3. scheduling
    agen_valid = 1; agen_lq_idx = x; tick(); agen_valid = 0;
    repeat (4) begin
      check(!ld_iss_valid[0], "load X must wait for store B");
      tick();
    end
    st_issue = 8'b0000_0001; #1;      // store B issues
    check(!ld_iss_valid[0], "not ready in store B's issue cycle");
    tick(); st_issue = 0; #1;
    check(ld_iss_valid[0] && ld_iss_idx[0] == x, "load X granted the cycle after store B");
    tick();
    check(!ld_iss_valid[0], "load X granted only once");
    // 4. update: store A (entry 7) collides with load X
    st_issue = 8'b1000_0000; tick(); st_issue = 0;
    violate(x, 3'd7, 3);
    dispatch_x(3'd3, 8'hff, x, row);
    check(row == 8'b1010_0101, $sformatf("updated row %b exp 10100101", row));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
