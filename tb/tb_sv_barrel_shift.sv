// tb_sv_barrel_shift: self-checking test of the store vector alignment.
// First the worked example with an 8-entry store queue: vector 0 0 1 0 0 1 0 1
// (most recent store rightmost) and tail 3 must give 1 0 1 0 0 1 0 0 read by
// store queue index 0..7. Then exhaustive/random checks of
// row[i] = vec[(tail-1-i) mod STQ] at 32 entries, and with a 16-bit vector.
module tb_sv_barrel_shift;
  int checks = 0, failures = 0;

  logic [7:0] v8, r8; logic [2:0] t8;
  sv_barrel_shift #(.STQ(8), .VLEN(8)) u8 (.vec(v8), .tail(t8), .row(r8));
  logic [31:0] v32, r32; logic [4:0] t32;
  sv_barrel_shift #(.STQ(32), .VLEN(32)) u32 (.vec(v32), .tail(t32), .row(r32));
  logic [15:0] v16; logic [31:0] r16; logic [4:0] t16;
  sv_barrel_shift #(.STQ(32), .VLEN(16)) u16 (.vec(v16), .tail(t16), .row(r16));

  function automatic logic [31:0] ref_row(input logic [31:0] v, input int vlen, input int stq, input int tail);
    logic [31:0] r = '0;
    for (int i = 0; i < stq; i++) begin
      int a = ((tail - 1 - i) % stq + stq) % stq;
      r[i] = (a < vlen) ? v[a] : 1'b0;
    end
    return r;
  endfunction

  initial begin
    // figure example: display "0 0 1 0 0 1 0 1" is bit7..bit0
    v8 = 8'b0010_0101; t8 = 3'd3; #1;
    // row displayed by STQ index 0..7 = 1 0 1 0 0 1 0 0 -> row[0]=1,row[2]=1,row[5]=1
    checks++; if (r8 !== 8'b0010_0101 || !r8[0] || !r8[2] || !r8[5]) begin
      failures++; $display("FAIL example row %b", r8); end
    checks++; if (r8[2] !== 1'b1) begin failures++; $display("FAIL most recent store not on column 2"); end
    for (int t = 0; t < 8; t++) for (int v = 0; v < 256; v++) begin
      v8 = 8'(v); t8 = 3'(t); #1;
      checks++; if (r8 !== 8'(ref_row(32'(v), 8, 8, t))) begin failures++; $display("FAIL 8 v=%h t=%0d", v, t); end
    end
    for (int t = 0; t < 32; t++) begin
      v32 = 32'h1 << $urandom_range(31); t32 = 5'(t); #1;
      checks++; if (r32 !== ref_row(v32, 32, 32, t)) begin failures++; $display("FAIL 32 one-hot t=%0d", t); end
      repeat (20) begin
        v32 = $urandom; v16 = 16'($urandom); t16 = 5'(t); #1;
        checks++; if (r32 !== ref_row(v32, 32, 32, t)) begin failures++; $display("FAIL 32 v=%h t=%0d", v32, t); end
        checks++; if (r16 !== ref_row(32'(v16), 16, 32, t)) begin failures++; $display("FAIL 16 v=%h t=%0d", v16, t); end
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
