// tb_sv_ready_mask: self-checking test of the address-unknown mask.
// Worked example (8 entries): aligned vector 1 0 1 0 0 1 0 0, address-unknown
// bits 1 1 0 0 0 0 0 1 (by store queue index 0..7) must leave only entry 0.
// Then random vectors against row & unknown & ~issuing at 32 entries.
module tb_sv_ready_mask;
  int checks = 0, failures = 0;
  logic [7:0] a8, u8v, c8, o8;
  sv_ready_mask #(.STQ(8)) m8 (.row_in(a8), .addr_unknown(u8v), .col_clr(c8), .row_out(o8));
  logic [31:0] a, u, c, o;
  sv_ready_mask #(.STQ(32)) m32 (.row_in(a), .addr_unknown(u), .col_clr(c), .row_out(o));

  initial begin
    a8 = 8'b0010_0101; u8v = 8'b1000_0011; c8 = '0; #1;
    checks++; if (o8 !== 8'b0000_0001) begin failures++; $display("FAIL example %b", o8); end
    // the same store issuing in this cycle is dropped as well
    c8 = 8'b0000_0001; #1;
    checks++; if (o8 !== 8'b0) begin failures++; $display("FAIL same-cycle clear %b", o8); end
    repeat (500) begin
      a = $urandom; u = $urandom; c = $urandom & $urandom; #1;
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (o[i] !== (a[i] && u[i] && !c[i])) begin failures++; $display("FAIL bit %0d", i); end
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
