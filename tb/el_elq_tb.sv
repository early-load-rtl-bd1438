// el_elq_tb: walks early load queue entries through their life in directed
// steps: allocation, activation, start only when the load/store unit is idle
// and oldest first, address forming (up and down offsets), avoidance,
// completion, data-cache miss, invalidation, the decode-time lookup, commit,
// full queue, flush, and a late response for a flushed entry (epoch tag).
// It then resets the queue and runs 6000 random cycles against a reference
// model of the queue written from the same rules: random allocations,
// activations, idle and busy load/store unit, avoidance, responses (hits,
// misses, and stale tags) in any order, invalidations, decode groups with
// blocked and unblocked lookups, commits and flushes. Each cycle it compares
// the free count, the pending set, the start selection and request, the
// decode lookup, and the status, activity and data of every pending entry.
module el_elq_tb;
  import el_pkg::*;

  localparam int D = 12, W = 2;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [1:0] alloc_cnt = 0, commit_cnt = 0;
  predec_t [W-1:0] alloc_pd = '0;
  logic [W-1:0][ELQ_IDW-1:0] alloc_id, cons_idx, commit_idx;
  logic [$clog2(D+1)-1:0] free_cnt;
  logic [D-1:0] activate = 0, inval = 0, pending;
  logic lsu_idle = 0, sel_valid, avoid = 0, req_valid, req_byte, rsp_valid = 0, rsp_hit = 0;
  logic [ELQ_IDW-1:0] sel_idx;
  logic [3:0] sel_breg;
  logic [31:0] sel_base = 0, sel_addr, req_addr, rsp_data = 0;
  logic [ELQ_IDW:0] req_tag, rsp_tag = 0;
  logic [W-1:0] cons_valid = 0, cons_block = 0, cons_hit;
  logic [W-1:0][31:0] cons_data;
  elq_entry_t [D-1:0] ent_o;
  int checks = 0, failures = 0;

  el_elq #(.DEPTH(D), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic predec_t mk(input int breg, input int off, input bit up, input bit byt);
    return '{is_cand: 1'b1, breg: 4'(breg), rd: 4'd9, offset: 12'(off), adr_mode: {1'b1, up, byt, 1'b0}};
  endfunction

  task automatic tick();
    @(posedge clk);
    #1;
    alloc_cnt = 0; commit_cnt = 0; activate = 0; inval = 0; lsu_idle = 0; avoid = 0;
    rsp_valid = 0; cons_valid = 0; cons_block = 0; flush = 0;
  endtask


  // ------------------------------------------------------------------ reference model
  bit                 m_act  [D];
  elq_status_e        m_st   [D];
  int                 m_breg [D], m_off [D];
  bit                 m_up   [D], m_byt [D], m_ep [D];
  logic [31:0]        m_data [D];
  int                 mh, md, mt, ma, mp;
  logic [ELQ_IDW:0]   outstanding[$];

  function automatic bit m_pend(input int i);
    return ((i - md + D) % D) < mp;
  endfunction

  task automatic random_phase(input int n);
    int n_hit = 0, n_start = 0, n_flush = 0, n_stale = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    mh = 0; md = 0; mt = 0; ma = 0; mp = 0;
    for (int i = 0; i < D; i++) begin m_act[i] = 0; m_st[i] = EL_PREPARE; m_ep[i] = 0; end
    outstanding.delete();
    for (int c = 0; c < n; c++) begin
      int na, nc, ncm, sel, k, slot_n;
      bit  do_flush, fire, rv;
      logic [ELQ_IDW:0] rt;
      logic [31:0] exp_addr;
      int  ri;
      // ---- stimulus within the handshake rules
      do_flush = ($urandom % 100) < 2;
      na = (D - ma < 2) ? ($urandom % (D - ma + 1)) : ($urandom % 3);
      if (do_flush) na = 0;
      ncm = $urandom % 3; if (ncm > ma - mp) ncm = ma - mp;
      alloc_cnt = 2'(na); commit_cnt = 2'(ncm); flush = do_flush;
      for (int s2 = 0; s2 < W; s2++)
        alloc_pd[s2] = mk($urandom % 16, $urandom % 4096, $urandom % 2, $urandom % 2);
      cons_valid = 2'($urandom % 4);
      if (do_flush) cons_valid = 0;
      if ($countones(cons_valid) > mp) cons_valid = (mp == 1) ? 2'b01 : 2'b00;
      cons_block = 2'($urandom % 4) & 2'($urandom % 4);
      activate = '0;
      for (int i = 0; i < D; i++) activate[i] = ($urandom % 4) == 0;
      inval = '0;
      for (int i = 0; i < D; i++) inval[i] = ($urandom % 25) == 0;
      lsu_idle = ($urandom % 10) < 6;
      avoid = ($urandom % 5) == 0;
      sel_base = $urandom;
      rv = 0; rt = 0; ri = -1;
      if (outstanding.size() > 0 && ($urandom % 2)) begin
        ri = $urandom % outstanding.size(); rv = 1; rt = outstanding[ri];
      end else if (($urandom % 20) == 0) begin
        rv = 1; rt = (ELQ_IDW + 1)'($urandom % (2 * D));      // stray tag
        n_stale++;
      end
      rsp_valid = rv; rsp_tag = rt; rsp_hit = ($urandom % 100) < 85; rsp_data = $urandom;
      #1;
      // ---- expected outputs
      chk(int'(free_cnt) == D - ma, $sformatf("cycle %0d free %0d expected %0d", c, free_cnt, D - ma));
      for (int i = 0; i < D; i++) begin
        chk(pending[i] == m_pend(i), $sformatf("cycle %0d pending[%0d]", c, i));
        if (m_pend(i)) begin
          chk(ent_o[i].status == m_st[i] && ent_o[i].active == m_act[i],
              $sformatf("cycle %0d entry %0d status %0d/%0d expected %0d/%0d", c, i,
                        ent_o[i].status, ent_o[i].active, m_st[i], m_act[i]));
          if (m_st[i] == EL_COMPLETE) chk(ent_o[i].el_data == m_data[i], $sformatf("cycle %0d entry %0d data", c, i));
        end
      end
      sel = -1;
      for (k = mp - 1; k >= 0; k--)
        if (m_act[(md + k) % D] && m_st[(md + k) % D] == EL_PREPARE) sel = (md + k) % D;
      chk(sel_valid == (sel >= 0), $sformatf("cycle %0d sel_valid", c));
      fire = (sel >= 0) && lsu_idle && !avoid;
      chk(req_valid == fire, $sformatf("cycle %0d req_valid", c));
      if (sel >= 0) begin
        exp_addr = m_up[sel] ? sel_base + 32'(m_off[sel]) : sel_base - 32'(m_off[sel]);
        chk(int'(sel_idx) == sel && int'(sel_breg) == m_breg[sel] && sel_addr == exp_addr,
            $sformatf("cycle %0d selection %0d expected %0d", c, sel_idx, sel));
        if (fire) chk(req_addr == exp_addr && req_byte == m_byt[sel] && req_tag == {m_ep[sel], ELQ_IDW'(sel)},
                      $sformatf("cycle %0d request", c));
      end
      slot_n = 0;
      for (int s2 = 0; s2 < W; s2++) begin
        int idx;
        bit eh;
        idx = (md + slot_n) % D;
        eh = cons_valid[s2] && !cons_block[s2] && slot_n < mp && m_st[idx] == EL_COMPLETE;
        chk(cons_hit[s2] == eh, $sformatf("cycle %0d cons_hit[%0d]", c, s2));
        if (cons_valid[s2]) chk(int'(cons_idx[s2]) == idx, $sformatf("cycle %0d cons_idx[%0d]", c, s2));
        if (eh) begin chk(cons_data[s2] == m_data[idx], $sformatf("cycle %0d cons_data[%0d]", c, s2)); n_hit++; end
        if (cons_valid[s2]) slot_n++;
      end
      for (int s2 = 0; s2 < W; s2++) begin
        chk(int'(alloc_id[s2]) == (mt + s2) % D, "alloc_id");
        if (s2 < ncm) chk(int'(commit_idx[s2]) == (mh + s2) % D, "commit_idx");
      end
      // ---- model next state
      if (ri >= 0) outstanding.delete(ri);
      begin
        elq_status_e nst [D];
        for (int i = 0; i < D; i++) begin
          nst[i] = m_st[i];
          if (m_pend(i)) begin
            if (activate[i]) m_act[i] = 1;
            if (sel == i && lsu_idle) nst[i] = avoid ? EL_INVALID : EL_BUSY;
            if (rv && rt == {m_ep[i], ELQ_IDW'(i)} && m_st[i] == EL_BUSY) begin
              nst[i] = rsp_hit ? EL_COMPLETE : EL_INVALID;
              m_data[i] = rsp_data;
            end
            if (inval[i]) nst[i] = EL_INVALID;
          end
        end
        for (int i = 0; i < D; i++) m_st[i] = nst[i];
      end
      if (fire) begin outstanding.push_back({m_ep[sel], ELQ_IDW'(sel)}); n_start++; end
      if (do_flush) begin
        mt = md; ma = ma - mp - ncm; mp = 0; n_flush++;
      end else begin
        for (int s2 = 0; s2 < na; s2++) begin
          int e;
          e = (mt + s2) % D;
          m_act[e] = 0; m_st[e] = EL_PREPARE; m_breg[e] = alloc_pd[s2].breg; m_off[e] = alloc_pd[s2].offset;
          m_up[e] = alloc_pd[s2].adr_mode[AM_U]; m_byt[e] = alloc_pd[s2].adr_mode[AM_B]; m_ep[e] = !m_ep[e];
        end
        mt = (mt + na) % D; md = (md + slot_n) % D;
        ma = ma + na - ncm; mp = mp + na - slot_n;
      end
      mh = (mh + ncm) % D;
      @(posedge clk);
      #1;
    end
    alloc_cnt = 0; commit_cnt = 0; flush = 0; cons_valid = 0; rsp_valid = 0; activate = 0; inval = 0;
    $display("random phase: %0d starts, %0d early data used, %0d flushes, %0d stray responses",
             n_start, n_hit, n_flush, n_stale);
    chk(n_start > 100 && n_hit > 50 && n_flush > 20, "random phase exercised the queue");
  endtask

  initial begin
    logic [ELQ_IDW:0] tag0, stale;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    chk(free_cnt == D, "empty after reset");
    // 1. allocate A (r1 + 4) and B (r2 - 8, byte)
    alloc_cnt = 2; alloc_pd[0] = mk(1, 4, 1, 0); alloc_pd[1] = mk(2, 8, 0, 1);
    #1 chk(alloc_id[0] == 0 && alloc_id[1] == 1, "allocation ids");
    tick();
    chk(free_cnt == D - 2 && pending == 12'b11, "two pending");
    chk(ent_o[0].status == EL_PREPARE && !ent_o[0].active, "prepare, not active");
    // 2. not active: nothing to start
    lsu_idle = 1;
    #1 chk(!sel_valid && !req_valid, "inactive entry not started");
    // 3. activate A, then start it
    activate = 12'b01;
    tick();
    chk(ent_o[0].active, "activated");
    lsu_idle = 0; sel_base = 32'h100;
    #1 chk(sel_valid && sel_idx == 0 && sel_breg == 1 && !req_valid, "selected, waits for idle unit");
    tick();
    chk(ent_o[0].status == EL_PREPARE, "not started while busy unit");
    lsu_idle = 1; sel_base = 32'h100;
    #1 chk(req_valid && req_addr == 32'h104 && !req_byte, "request r1+4");
    tag0 = req_tag;
    activate = 12'b10;
    tick();
    chk(ent_o[0].status == EL_BUSY && ent_o[0].adr == 32'h104, "A busy with address");
    // 4. B is next; base busy -> avoidance
    lsu_idle = 1; sel_base = 32'h200; avoid = 1;
    #1 chk(sel_idx == 1 && !req_valid && sel_addr == 32'h1F8, "B selected, r2-8, avoided");
    tick();
    chk(ent_o[1].status == EL_INVALID, "B invalid by avoidance");
    // 5. response for A
    rsp_valid = 1; rsp_tag = tag0; rsp_data = 32'hCAFE_0001; rsp_hit = 1;
    tick();
    chk(ent_o[0].status == EL_COMPLETE && ent_o[0].el_data == 32'hCAFE_0001, "A complete");
    // 6. both loads reach decode in one group
    cons_valid = 2'b11;
    #1 chk(cons_hit == 2'b01 && cons_data[0] == 32'hCAFE_0001 && cons_idx[1] == 1, "decode lookup");
    cons_block = 2'b01;
    #1 chk(cons_hit == 2'b00, "blocked lookup");
    cons_block = 0;
    tick();
    chk(pending == '0 && free_cnt == D - 2, "decoded, not committed");
    commit_cnt = 2;
    #1 chk(commit_idx[0] == 0 && commit_idx[1] == 1, "commit ids");
    tick();
    chk(free_cnt == D, "committed");
    // 7. fill the queue; check oldest-first, miss and invalidation
    for (int i = 0; i < D / 2; i++) begin
      alloc_cnt = 2; alloc_pd[0] = mk(3, 4 * i, 1, 0); alloc_pd[1] = mk(4, 4 * i, 1, 0);
      tick();
    end
    chk(free_cnt == 0 && pending == '1, "full");
    activate = 12'b0000_0011_0000;   // entries 4 and 5, 4 is the oldest pending
    tick();
    lsu_idle = 1; sel_base = 0;
    #1 chk(sel_idx == 4, "oldest active first");
    tick();
    lsu_idle = 1;
    #1 chk(sel_idx == 5, "then the next");
    stale = req_tag;
    tick();
    rsp_valid = 1; rsp_tag = stale; rsp_hit = 0;     // miss for entry 5
    inval = 12'b0000_0001_0000;                      // entry 4 invalidated
    tick();
    chk(ent_o[4].status == EL_INVALID && ent_o[5].status == EL_INVALID, "invalidation and miss");
    // 8. flush drops all pending entries; a late response for a flushed entry is ignored
    activate = 12'b0100_0000; tick();
    lsu_idle = 1; #1 stale = req_tag; chk(req_valid && stale[ELQ_IDW-1:0] == 6, "entry 6 started");
    tick();
    flush = 1;
    tick();
    chk(free_cnt == D && pending == '0, "flush");
    for (int i = 0; i < D / 2; i++) begin alloc_cnt = 2; alloc_pd[0] = mk(5, 0, 1, 0); alloc_pd[1] = mk(5, 0, 1, 0); tick(); end
    rsp_valid = 1; rsp_tag = stale; rsp_hit = 1; rsp_data = 32'hDEAD;
    tick();
    chk(ent_o[6].status == EL_PREPARE, "stale response ignored");
    random_phase(6000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
