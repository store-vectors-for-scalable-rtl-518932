// tb_load_queue: self-checking test of the load queue.
// A reference queue follows random dispatches, address completions, issues,
// commits and flushes; after every cycle the candidate vector, head, count,
// dispatch index/readiness and the stored PC and store queue tail of every live
// entry are compared. The queue is also filled to capacity to check that
// dispatch is refused when full and while a flush is in progress.
module tb_load_queue;
  localparam int unsigned LQ = 32, STQ = 32, PC_W = 64, W = 2;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, fulls = 0, flushes = 0;
  logic disp_valid, disp_ready, agen_valid, commit_valid, flush_valid;
  logic [PC_W-1:0] disp_pc, rd_pc; logic [4:0] disp_tail, rd_tail;
  logic [4:0] disp_idx, agen_idx, flush_idx, head, rd_idx;
  logic [W-1:0] iss_valid; logic [W-1:0][4:0] iss_idx;
  logic [LQ-1:0] cand; logic [5:0] count;
  load_queue #(.LQ(LQ), .STQ(STQ), .PC_W(PC_W), .W(W)) dut (.*);

  // reference
  int m_head = 0, m_cnt = 0;
  bit m_addr [LQ], m_iss [LQ];
  logic [PC_W-1:0] m_pc [LQ]; logic [4:0] m_tail [LQ];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit live(int i);
    return ((i - m_head + LQ) % LQ) < m_cnt;
  endfunction

  task automatic compare();
    logic [LQ-1:0] ec = '0;
    for (int i = 0; i < LQ; i++) ec[i] = live(i) && m_addr[i] && !m_iss[i];
    checks++; if (cand !== ec) begin failures++; $display("FAIL cand %h exp %h", cand, ec); end
    checks++; if (head !== 5'(m_head) || count !== 6'(m_cnt)) begin failures++; $display("FAIL head/count"); end
    checks++; if (disp_idx !== 5'((m_head + m_cnt) % LQ)) begin failures++; $display("FAIL disp_idx"); end
  endtask

  initial begin
    disp_valid = 0; agen_valid = 0; commit_valid = 0; flush_valid = 0; iss_valid = 0;
    disp_pc = 0; disp_tail = 0; agen_idx = 0; flush_idx = 0; iss_idx = 0; rd_idx = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      automatic int fill = (cyc % 1000) < 300;  // phases that fill the queue
      bit d, a, c, f; int ai, fi;
      // choose stimulus consistent with the reference
      d = $urandom_range(fill ? 1 : 3) != 0;
      a = m_cnt > 0 && $urandom_range(1);
      c = !fill && m_cnt > 0 && m_iss[m_head] && $urandom_range(2) == 0;
      f = m_cnt > 1 && $urandom_range(40) == 0;
      ai = (m_head + $urandom_range(m_cnt > 0 ? m_cnt - 1 : 0)) % LQ;
      fi = (m_head + 1 + $urandom_range(m_cnt > 1 ? m_cnt - 2 : 0)) % LQ;
      disp_valid = d; disp_pc = {$urandom, $urandom}; disp_tail = 5'($urandom);
      agen_valid = a; agen_idx = 5'(ai);
      commit_valid = c; flush_valid = f; flush_idx = 5'(fi);
      iss_valid = '0;
      rd_idx = 5'((m_head + $urandom_range(m_cnt > 0 ? m_cnt - 1 : 0)) % LQ);
      begin
        automatic int n = 0;
        for (int p = 0; p < m_cnt && n < W; p++) begin
          automatic int i = (m_head + p) % LQ;
          if (m_addr[i] && !m_iss[i] && $urandom_range(1)) begin iss_valid[n] = 1; iss_idx[n] = 5'(i); n++; end
        end
      end
      #1;
      checks++;
      if (disp_ready !== (m_cnt < LQ && !f)) begin failures++; $display("FAIL disp_ready"); end
      if (m_cnt == LQ) fulls++;
      if (m_cnt > 0) begin
        checks++;
        if (rd_pc !== m_pc[rd_idx] || rd_tail !== m_tail[rd_idx]) begin failures++; $display("FAIL rd %0d", rd_idx); end
      end
      @(posedge clk);
      // reference update
      if (a) m_addr[ai] = 1;
      for (int w = 0; w < W; w++) if (iss_valid[w]) m_iss[iss_idx[w]] = 1;
      if (f) begin flushes++; m_cnt = (fi - m_head + LQ) % LQ; end
      else if (d && m_cnt < LQ) begin
        automatic int t = (m_head + m_cnt) % LQ;
        m_pc[t] = disp_pc; m_tail[t] = disp_tail; m_addr[t] = 0; m_iss[t] = 0; m_cnt++;
      end
      if (c) begin m_head = (m_head + 1) % LQ; m_cnt--; end
      #1;
      compare();
    end
    checks++; if (fulls == 0) begin failures++; $display("FAIL queue never full"); end
    checks++; if (flushes == 0) begin failures++; $display("FAIL no flush"); end
    $display("queue full in %0d cycles, %0d flushes", fulls, flushes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
