// tb_sv_update: self-checking test of the violation age computation.
// Worked example (8 entries): a load dispatched with store queue tail 3 collides
// with the store in entry 7; that store is the fourth most recent (age 3).
// Then every tail/store pair at 32 entries, and a 16-bit vector where stores
// older than 16 are not recorded.
module tb_sv_update;
  int checks = 0, failures = 0;
  logic v8, uv8; logic [2:0] t8, s8, age8;
  sv_update #(.STQ(8), .VLEN(8)) u8 (.viol_valid(v8), .load_tail(t8),
    .store_idx(s8), .upd_valid(uv8), .upd_age(age8));
  logic v, uv, uv16; logic [4:0] t, s, age; logic [3:0] age16;
  sv_update #(.STQ(32), .VLEN(32)) u32 (.viol_valid(v), .load_tail(t),
    .store_idx(s), .upd_valid(uv), .upd_age(age));
  sv_update #(.STQ(32), .VLEN(16)) u16 (.viol_valid(v), .load_tail(t),
    .store_idx(s), .upd_valid(uv16), .upd_age(age16));

  initial begin
    v8 = 1; t8 = 3; s8 = 7; #1;
    checks++; if (!uv8 || age8 !== 3'd3) begin failures++; $display("FAIL example age %0d", age8); end
    v8 = 0; #1;
    checks++; if (uv8) begin failures++; $display("FAIL update without violation"); end
    v = 1;
    for (int ti = 0; ti < 32; ti++) for (int si = 0; si < 32; si++) begin
      int exp;
      t = 5'(ti); s = 5'(si); #1;
      exp = ((ti - 1 - si) % 32 + 32) % 32;
      checks++; if (!uv || age !== 5'(exp)) begin failures++; $display("FAIL t=%0d s=%0d age=%0d", ti, si, age); end
      checks++; if (uv16 !== (exp < 16) || (exp < 16 && age16 !== 4'(exp))) begin failures++; $display("FAIL16 t=%0d s=%0d", ti, si); end
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
