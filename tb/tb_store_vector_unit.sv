// tb_store_vector_unit: end-to-end test of the store-vector predictor and load
// scheduler at its default sizes (32-entry load and store queues, 32-bit
// vectors, 512-entry table, two load issue ports, 2^20-cycle table reset).
//
// The testbench plays the rest of the core: a behavioural store queue (program
// ordered, with per-entry address-unknown bits), a stream of loads and stores
// with small random addresses, address generation, commits, and detection of
// ordering violations (a store resolving to the address of a younger load that
// has already issued). It keeps an independent reference of the predictor: a
// table of store vectors, the matrix rows computed by age arithmetic (store
// column = (tail - 1 - age) mod 32) and an oldest-first issue choice. Every
// cycle it compares the row written at dispatch, dispatch readiness, the issue
// grants, the table updates and the table reset pulse. It counts how often each
// mechanism happened and fails any that never did: predicted waits, masking of
// resolved stores, same-cycle clears, wrap-around of the rotation, wake-ups by
// column clears, dual issue, violations with table update and flush, full load
// queue, requested and periodic table resets. After the random phase it idles
// until the periodic reset, which must come exactly 2^20 cycles after the last.
module tb_store_vector_unit;
  import sv_pkg::*;
  localparam int LQ = LQ_ENTRIES, STQ = STQ_ENTRIES, W = LD_ISSUE_W;
  localparam int RW = $clog2(LQ), TW = $clog2(STQ), IW = $clog2(SVT_ENTRIES);
  localparam int RANDOM_CYCLES = 40000;

  logic clk = 0, rst_n = 0;
  logic disp_valid, disp_ready; logic [PC_W-1:0] disp_pc;
  logic [RW-1:0] disp_lq_idx; logic [STQ-1:0] disp_wait_vec;
  logic [TW-1:0] stq_tail; logic [STQ-1:0] stq_addr_unknown, st_issue;
  logic agen_valid; logic [RW-1:0] agen_lq_idx;
  logic [W-1:0] ld_iss_valid; logic [W-1:0][RW-1:0] ld_iss_idx;
  logic commit_valid, viol_valid; logic [RW-1:0] viol_lq_idx; logic [TW-1:0] viol_stq_idx;
  logic svt_clear_req, svt_clear_pulse; logic [RW:0] lq_count;
  logic svt_upd_valid; logic [$clog2(SV_LEN)-1:0] svt_upd_age;

  store_vector_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat ((1 << 20) + 3 * RANDOM_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference state ----------------
  logic [SV_LEN-1:0] svt_m [SVT_ENTRIES];
  // store queue
  bit st_v [STQ], st_res [STQ]; longint st_seq [STQ]; int st_addr [STQ];
  int sq_head = 0, sq_cnt = 0;
  // load queue
  logic [PC_W-1:0] l_pc [LQ]; int l_tail [LQ]; longint l_seq [LQ]; int l_addr [LQ];
  bit l_aok [LQ], l_iss [LQ], l_waited [LQ]; logic [STQ-1:0] l_row [LQ];
  int lq_head = 0, lq_cnt = 0;
  longint seq = 0;
  int tmr = 0;
  longint last_clear = -1;
  // pending violation, detected when a store issues, reported the next cycle
  bit pv; int pv_lq, pv_st;

  // mechanism counters
  int n_pred_wait = 0, n_masked = 0, n_same_cycle = 0, n_wrap = 0, n_wakeup = 0, n_dual = 0;
  int n_viol = 0, n_full = 0, n_req_clear = 0, n_per_clear = 0, n_multi_clr = 0;

  function automatic bit lq_live(int i);
    return ((i - lq_head + LQ) % LQ) < lq_cnt;
  endfunction
  function automatic bit sq_live(int i);
    return ((i - sq_head + STQ) % STQ) < sq_cnt;
  endfunction
  function automatic int svt_idx(logic [PC_W-1:0] pc);
    return int'(pc[PC_LSB +: IW]);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  task automatic idle_inputs();
    disp_valid = 0; disp_pc = '0; st_issue = '0; agen_valid = 0; agen_lq_idx = '0;
    commit_valid = 0; viol_valid = 0; viol_lq_idx = '0; viol_stq_idx = '0; svt_clear_req = 0;
  endtask

  // one cycle of the core around the unit; random = 0 gives an idle cycle
  task automatic step(input bit random);
    bit do_load, do_store, do_lcommit, do_scommit, clr_pulse_exp;
    int st_alloc_idx, ld_new;
    logic [STQ-1:0] unknown, exp_row, aligned;
    int exp_g [W]; int ng;
    logic [W-1:0] iss_v; logic [W-1:0][RW-1:0] iss_i;
    idle_inputs();
    do_load = 0; do_store = 0; do_lcommit = 0; do_scommit = 0;
    // store queue view
    for (int c = 0; c < STQ; c++) unknown[c] = sq_live(c) && !st_res[c];
    stq_tail = TW'((sq_head + sq_cnt) % STQ);
    stq_addr_unknown = unknown;
    if (pv) begin
      viol_valid = 1; viol_lq_idx = RW'(pv_lq); viol_stq_idx = TW'(pv_st);
    end else if (random) begin
      int phase = int'(cycle / 3000) % 3;   // 0: balanced, 1: loads pile up, 2: drain
      int r = $urandom_range(99);
      if (r < (phase == 1 ? 60 : 35)) do_load = 1;
      else if (r < 70 && sq_cnt < STQ) do_store = 1;
      if (do_load) begin
        disp_valid = 1;
        disp_pc = 64'h0040_0000 + PC_W'($urandom_range(23) << PC_LSB);
      end
      // stores resolve (issue), possibly two in a cycle
      for (int k = 0; k < 2; k++) begin
        if ($urandom_range(phase == 1 ? 9 : 2) == 0 && sq_cnt > 0) begin
          int c = (sq_head + $urandom_range(sq_cnt - 1)) % STQ;
          if (!st_res[c]) st_issue[c] = 1'b1;
        end
      end
      if ($countones(st_issue) > 1) n_multi_clr++;
      if (lq_cnt > 0 && $urandom_range(1)) begin
        int i = (lq_head + $urandom_range(lq_cnt - 1)) % LQ;
        if (!l_aok[i]) begin agen_valid = 1; agen_lq_idx = RW'(i); end
      end
      if (lq_cnt > 0 && l_iss[lq_head] && phase != 1 && $urandom_range(1)) begin
        bit older_unres = 0;
        for (int c = 0; c < STQ; c++) if (sq_live(c) && !st_res[c] && st_seq[c] < l_seq[lq_head]) older_unres = 1;
        if (!older_unres) begin do_lcommit = 1; commit_valid = 1; end
      end
      if (sq_cnt > 0 && st_res[sq_head] && !(do_store && sq_cnt == STQ) && $urandom_range(2) == 0) begin
        bit older_load = 0;
        for (int i = 0; i < LQ; i++) if (lq_live(i) && l_seq[i] < st_seq[sq_head]) older_load = 1;
        if (!older_load) do_scommit = 1;
      end
      if ($urandom_range(4999) == 0) svt_clear_req = 1;
    end
    #1;
    // ---------- expected outputs ----------
    clr_pulse_exp = svt_clear_req || (tmr == SVT_CLEAR_INTERVAL - 1);
    check(svt_clear_pulse == clr_pulse_exp, "table reset pulse");
    check(disp_ready == (lq_cnt < LQ && !pv), "dispatch ready");
    if (disp_valid && lq_cnt == LQ) n_full++;
    exp_row = '0; aligned = '0;
    if (disp_valid && disp_ready) begin
      logic [SV_LEN-1:0] v = svt_m[svt_idx(disp_pc)];
      int t = (sq_head + sq_cnt) % STQ;
      for (int a = 0; a < SV_LEN; a++) if (v[a]) begin
        int c = ((t - 1 - a) % STQ + STQ) % STQ;
        if (t - 1 - a < 0) n_wrap++;
        aligned[c] = 1'b1;
        if (unknown[c] && !st_issue[c]) exp_row[c] = 1'b1;
      end
      check(disp_wait_vec == exp_row, $sformatf("dispatch row %h exp %h", disp_wait_vec, exp_row));
      check(disp_lq_idx == RW'((lq_head + lq_cnt) % LQ), "dispatch index");
      if (exp_row != 0) n_pred_wait++;
      if ((aligned & ~unknown) != 0) n_masked++;
      if ((aligned & unknown & st_issue) != 0) n_same_cycle++;
    end
    // expected grants
    ng = 0;
    for (int p = 0; p < lq_cnt && ng < W && !pv; p++) begin
      int i = (lq_head + p) % LQ;
      if (l_aok[i] && !l_iss[i] && l_row[i] == 0) begin exp_g[ng] = i; ng++; end
    end
    for (int k = 0; k < W; k++) begin
      check(ld_iss_valid[k] == (k < ng), $sformatf("grant valid %0d", k));
      if (k < ng) check(ld_iss_idx[k] == RW'(exp_g[k]), $sformatf("grant index %0d: %0d exp %0d", k, ld_iss_idx[k], exp_g[k]));
    end
    if (ng == 2) n_dual++;
    iss_v = ld_iss_valid; iss_i = ld_iss_idx;
    // expected table update
    if (pv) begin
      int age = ((l_tail[pv_lq] - 1 - pv_st) % STQ + STQ) % STQ;
      check(svt_upd_valid && svt_upd_age == $clog2(SV_LEN)'(age), $sformatf("table update age %0d exp %0d", svt_upd_age, age));
    end else check(!svt_upd_valid, "no table update");

    @(posedge clk);
    // ---------- reference update at the edge ----------
    tmr = clr_pulse_exp ? 0 : tmr + 1;
    if (clr_pulse_exp) begin
      if (svt_clear_req) n_req_clear++; else begin
        n_per_clear++;
        if (last_clear >= 0) check(cycle - 1 - last_clear == SVT_CLEAR_INTERVAL, "periodic reset interval");
      end
      last_clear = cycle - 1;
      for (int e = 0; e < SVT_ENTRIES; e++) svt_m[e] = '0;
    end
    // matrix column clears and wake-ups
    for (int i = 0; i < LQ; i++) if (lq_live(i)) begin
      logic [STQ-1:0] row_before = l_row[i];
      l_row[i] = l_row[i] & ~st_issue;
      if (row_before != 0 && l_row[i] == 0) n_wakeup++;
    end
    for (int k = 0; k < W; k++) if (iss_v[k]) l_iss[iss_i[k]] = 1;
    if (agen_valid) l_aok[agen_lq_idx] = 1;
    if (pv) begin
      int age = ((l_tail[pv_lq] - 1 - pv_st) % STQ + STQ) % STQ;
      longint lseq = l_seq[pv_lq];
      svt_m[svt_idx(l_pc[pv_lq])][age] = 1'b1;
      n_viol++;
      lq_cnt = (pv_lq - lq_head + LQ) % LQ;
      // stores younger than the violating load are flushed as well
      while (sq_cnt > 0 && st_seq[(sq_head + sq_cnt - 1) % STQ] > lseq) sq_cnt--;
      pv = 0;
    end else begin
      // a resolving store finds the oldest younger issued load to its address
      for (int c = 0; c < STQ; c++) if (st_issue[c]) begin
        st_res[c] = 1;
        for (int p = 0; p < lq_cnt; p++) begin
          int i = (lq_head + p) % LQ;
          if (!pv && l_seq[i] > st_seq[c] && (l_iss[i] && !iss_v_has(iss_v, iss_i, i)) && l_addr[i] == st_addr[c]) begin
            pv = 1; pv_lq = i; pv_st = c;
          end
        end
      end
      if (do_load && lq_cnt < LQ) begin
        ld_new = (lq_head + lq_cnt) % LQ;
        l_pc[ld_new] = disp_pc; l_tail[ld_new] = (sq_head + sq_cnt) % STQ; l_seq[ld_new] = seq++;
        l_addr[ld_new] = int'(disp_pc[4 +: 2]) ^ $urandom_range(1);
        l_aok[ld_new] = 0; l_iss[ld_new] = 0; l_row[ld_new] = exp_row;
        lq_cnt++;
      end
      if (do_store) begin
        st_alloc_idx = (sq_head + sq_cnt) % STQ;
        st_v[st_alloc_idx] = 1; st_res[st_alloc_idx] = 0; st_seq[st_alloc_idx] = seq++;
        st_addr[st_alloc_idx] = $urandom_range(3);
        sq_cnt++;
      end
      if (do_lcommit) begin lq_head = (lq_head + 1) % LQ; lq_cnt--; end
      if (do_scommit) begin st_v[sq_head] = 0; sq_head = (sq_head + 1) % STQ; sq_cnt--; end
    end
    #1;
    check(lq_count == (RW+1)'(lq_cnt), "load queue occupancy");
  endtask

  // a load granted this very cycle has not read memory yet
  function automatic bit iss_v_has(logic [W-1:0] v, logic [W-1:0][RW-1:0] ix, int i);
    for (int k = 0; k < W; k++) if (v[k] && ix[k] == RW'(i)) return 1;
    return 0;
  endfunction

  task automatic need(input int n, input string what);
    $display("%-34s %0d", what, n);
    check(n > 0, {"mechanism never exercised: ", what});
  endtask

  initial begin
    idle_inputs();
    stq_tail = '0; stq_addr_unknown = '0; pv = 0;
    for (int e = 0; e < SVT_ENTRIES; e++) svt_m[e] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < RANDOM_CYCLES; n++) step(1);
    // let the queues drain, then idle until the periodic table reset
    while (cycle < last_clear + SVT_CLEAR_INTERVAL + 2 || last_clear < 0 ||
           (n_per_clear == 0)) begin
      step(0);
      if (cycle > (1 << 20) + 2 * RANDOM_CYCLES) break;
    end
    for (int n = 0; n < 2000; n++) step(1);
    need(n_pred_wait,  "loads predicted to wait");
    need(n_masked,     "resolved/empty stores masked");
    need(n_same_cycle, "same-cycle column clear at write");
    need(n_wrap,       "rotation wrapped around");
    need(n_wakeup,     "wake-ups by column clear");
    need(n_multi_clr,  "two columns cleared in one cycle");
    need(n_dual,       "two loads issued in one cycle");
    need(n_viol,       "violations (update and flush)");
    need(n_full,       "dispatch refused, load queue full");
    need(n_req_clear,  "requested table resets");
    need(n_per_clear,  "periodic table resets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
