// tb_load_select: self-checking test of oldest-first load select.
// Random request vectors and head positions are compared with a reference that
// walks the queue from the head and takes the first W requesters.
module tb_load_select;
  localparam int unsigned LQ = 32, W = 2;
  int checks = 0, failures = 0;
  logic [LQ-1:0] req; logic [4:0] head;
  logic [W-1:0] gv; logic [W-1:0][4:0] gi;
  load_select #(.LQ(LQ), .W(W)) dut (.req(req), .head(head), .gnt_valid(gv), .gnt_idx(gi));

  initial begin
    // directed: entries 1 and 30 request, head 31 -> 1 is older than 30? no: order 31,0,1,...,30
    req = '0; req[1] = 1; req[30] = 1; head = 5'd31; #1;
    checks++; if (gv !== 2'b11 || gi[0] !== 5'd1 || gi[1] !== 5'd30) begin failures++; $display("FAIL directed"); end
    req = '0; #1;
    checks++; if (gv !== 2'b00) begin failures++; $display("FAIL empty"); end
    repeat (3000) begin
      int n;
      req = $urandom & $urandom & $urandom; head = 5'($urandom); #1;
      n = 0;
      for (int p = 0; p < LQ; p++) begin
        automatic int i = (int'(head) + p) % LQ;
        if (req[i] && n < W) begin
          checks++;
          if (!gv[n] || gi[n] !== 5'(i)) begin failures++; $display("FAIL grant %0d exp %0d got %0d", n, i, gi[n]); end
          n++;
        end
      end
      for (int k = n; k < W; k++) begin
        checks++; if (gv[k]) begin failures++; $display("FAIL extra grant"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
