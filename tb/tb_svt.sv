// tb_svt: self-checking test of the store vector table.
// Replays the table contents of the worked example (vector 0 0 1 0 0 1 0 1 for
// the load, then the fourth-most-recent bit added after a violation gives
// 0 0 1 0 1 1 0 1), then runs random lookups and updates against a reference
// array, and checks the periodic and requested resets, including the exact
// cycle of the periodic reset.
module tb_svt;
  localparam int unsigned ENTRIES = 64, VLEN = 8, PC_W = 32, PC_LSB = 2, CLR = 200;
  localparam int unsigned IW = $clog2(ENTRIES), AW = $clog2(VLEN);
  logic clk = 0, rst_n = 0;
  logic [PC_W-1:0] lk_pc = '0, upd_pc = '0;
  logic [VLEN-1:0] lk_vec;
  logic upd_valid = 0, clear_req = 0, clear_pulse;
  logic [AW-1:0] upd_age = '0;
  int checks = 0, failures = 0;
  logic [VLEN-1:0] model [ENTRIES];
  int cycle = 0;

  svt #(.ENTRIES(ENTRIES), .VLEN(VLEN), .PC_W(PC_W), .PC_LSB(PC_LSB), .CLEAR_INTERVAL(CLR)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic [VLEN-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  task automatic set_bit(input logic [PC_W-1:0] pc, input int age);
    upd_valid = 1; upd_pc = pc; upd_age = AW'(age);
    @(posedge clk); #1;
    upd_valid = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PC_W-1:0] pcx;
    int clr_seen;
    for (int i = 0; i < ENTRIES; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // all entries start at zero
    for (int i = 0; i < ENTRIES; i++) begin
      lk_pc = PC_W'(i << PC_LSB); #1;
      check(lk_vec, '0, "initial zero");
    end
    // worked example: most recent, third and sixth most recent
    pcx = 32'h0000_1234 & ~32'h3;
    set_bit(pcx, 0); set_bit(pcx, 2); set_bit(pcx, 5);
    lk_pc = pcx; #1;
    check(lk_vec, 8'b0010_0101, "example vector");
    // violation with the fourth most recent store
    set_bit(pcx, 3);
    lk_pc = pcx; #1;
    check(lk_vec, 8'b0010_1101, "example after update");
    // an update is not visible to a lookup in the same cycle
    upd_valid = 1; upd_pc = pcx; upd_age = 3'd7; lk_pc = pcx; #1;
    check(lk_vec, 8'b0010_1101, "old value during update");
    @(posedge clk); #1 upd_valid = 0; #1;
    check(lk_vec, 8'b1010_1101, "new value after update");
    // requested reset clears everything
    clear_req = 1; @(posedge clk); #1 clear_req = 0; #1;
    check(lk_vec, '0, "cleared by request");
    // random updates against the model; the periodic reset is tracked
    for (int i = 0; i < ENTRIES; i++) model[i] = '0;
    for (int n = 0; n < 150; n++) begin
      int e, a;
      e = $urandom_range(ENTRIES - 1); a = $urandom_range(VLEN - 1);
      upd_valid = 1; upd_pc = PC_W'((e << PC_LSB) | ($urandom_range(3)) | (($urandom_range(7)) << (PC_LSB + IW)));
      upd_age = AW'(a);
      #1;
      if (clear_pulse) for (int i = 0; i < ENTRIES; i++) model[i] = '0;
      model[e][a] = 1'b1;
      @(posedge clk); #1 upd_valid = 0;
      lk_pc = PC_W'(($urandom_range(ENTRIES - 1)) << PC_LSB); #1;
      check(lk_vec, model[lk_pc[PC_LSB +: IW]], "random lookup");
    end
    // periodic reset: with no requests, pulses come exactly CLR cycles apart
    clr_seen = -1;
    for (int n = 0; n < 2 * CLR + 5; n++) begin
      #1;
      if (clear_pulse) begin
        if (clr_seen >= 0) begin
          checks++;
          if (cycle - clr_seen != CLR) begin failures++; $display("FAIL period %0d", cycle - clr_seen); end
        end
        clr_seen = cycle;
      end
      @(posedge clk);
    end
    checks++; if (clr_seen < 0) begin failures++; $display("FAIL no periodic reset"); end
    // table is empty again after the periodic reset
    lk_pc = pcx; #1;
    check(lk_vec, '0, "empty after periodic reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
