// tb_lsm: self-checking test of the load scheduling matrix.
// Worked example (8x8): load X's row 1 0 0 0 0 0 0 0 is not ready; when the store
// in entry 0 issues, the row empties and the load is ready in the next cycle.
// Then random row writes and column clears against a reference matrix at 32x32,
// including clears that coincide with the write of the same row.
module tb_lsm;
  localparam int unsigned LQ = 32, STQ = 32;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, same_cycle = 0;

  logic w8; logic [2:0] r8; logic [7:0] v8, c8, rdy8;
  lsm #(.LQ(8), .STQ(8)) u8 (.clk, .rst_n, .wr_en(w8), .wr_row(r8), .wr_vec(v8), .col_clr(c8), .row_ready(rdy8));
  logic we; logic [4:0] wr; logic [STQ-1:0] wv, cc; logic [LQ-1:0] rdy;
  lsm #(.LQ(LQ), .STQ(STQ)) dut (.clk, .rst_n, .wr_en(we), .wr_row(wr), .wr_vec(wv), .col_clr(cc), .row_ready(rdy));
  logic [STQ-1:0] model [LQ];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w8 = 0; r8 = 0; v8 = 0; c8 = 0; we = 0; wr = 0; wv = 0; cc = 0;
    for (int i = 0; i < LQ; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; #1;
    checks++; if (rdy8 !== 8'hff || rdy !== '1) begin failures++; $display("FAIL reset ready"); end
    // example: load X in LQ entry 4 waits on store B (column 0)
    w8 = 1; r8 = 3'd4; v8 = 8'b0000_0001;
    @(posedge clk); #1 w8 = 0; #1;
    checks++; if (rdy8[4] !== 1'b0) begin failures++; $display("FAIL X ready too early"); end
    repeat (3) @(posedge clk); #1;
    checks++; if (rdy8[4] !== 1'b0) begin failures++; $display("FAIL X ready without store"); end
    c8 = 8'b0000_0001;  // store B issues this cycle
    #1;
    checks++; if (rdy8[4] !== 1'b0) begin failures++; $display("FAIL X ready in the issue cycle"); end
    @(posedge clk); #1 c8 = 0; #1;
    checks++; if (rdy8[4] !== 1'b1) begin failures++; $display("FAIL X not ready the cycle after"); end
    // random
    repeat (3000) begin
      we = $urandom_range(1); wr = 5'($urandom); wv = $urandom & $urandom;
      cc = ($urandom_range(3) == 0) ? (32'h1 << $urandom_range(31)) : '0;
      if ($urandom_range(7) == 0) cc = cc | wv;   // a clear that hits bits being written
      if (we && |(cc & wv)) same_cycle++;
      @(posedge clk);
      for (int r = 0; r < LQ; r++) model[r] = ((we && wr == 5'(r)) ? wv : model[r]) & ~cc;
      #1;
      for (int r = 0; r < LQ; r++) begin
        checks++;
        if (rdy[r] !== (model[r] == '0)) begin failures++; $display("FAIL row %0d ready %b", r, rdy[r]); end
      end
    end
    checks++; if (same_cycle == 0) begin failures++; $display("FAIL same-cycle case never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
