// el_elq: early load queue.
//
// The ELQ runs parallel to the instruction queue and holds one entry per
// early load candidate, in program order, from fetch until the load commits.
// An entry holds Active, Status (prepare, busy, complete, invalid), the base
// register, offset and addressing mode taken from the pre-decoder, the memory
// address and the early-loaded data.
//
// Life of an entry, following the description of the mechanism:
//  1. allocation at the tail by the pre-decoder: status prepare, not active;
//  2. the lookahead pointer of the instruction queue sets it active;
//  3. when the load/store unit is idle, the oldest active entry in prepare is
//     started: its base register is read (register file, or the ELQ if the
//     register status table says the register is renamed), the address is
//     formed and sent to the load/store unit, and the status becomes busy;
//     if the base register is busy (avoidance) it becomes invalid instead;
//  4. the returned data is written and the status becomes complete;
//     invalidation checks may set it invalid at any time before decode;
//  5. when the load reaches decode its entry is looked up: complete means the
//     data is used and the load need not access the cache again;
//  6. when the load commits the entry is freed at the head.
// Three pointers: head (oldest, next to commit), dec (next to reach decode)
// and tail (next free). Entries from dec to tail are "pending".
//
// This design's own choices: the address is formed here (base +/- offset,
// pre-indexed, per the U bit) rather than in the host's address unit, so the
// address is known while the access is in flight; a cache miss reported by
// the load/store unit makes the entry invalid; the request tag carries the
// entry index and an epoch bit toggled on every allocation, so a response for
// an entry freed by a flush is ignored; flush drops the pending entries and
// keeps those whose loads are already past decode.
//
// Timing: all state changes at the clock edge; the decode-time lookup
// (cons_hit/cons_data), the start request and the entry contents are
// combinational on the registered state. Reset is synchronous, active low.
module el_elq
  import el_pkg::*;
#(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned W     = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          flush,
  // allocation (pre-decoder)
  input  logic [$clog2(W+1)-1:0]        alloc_cnt,
  input  predec_t [W-1:0]               alloc_pd,
  output logic [W-1:0][ELQ_IDW-1:0]     alloc_id,
  output logic [$clog2(DEPTH+1)-1:0]    free_cnt,
  // activation (instruction-queue lookahead pointer)
  input  logic [DEPTH-1:0]              activate,
  // start of an early load
  input  logic                          lsu_idle,
  output logic                          sel_valid,
  output logic [ELQ_IDW-1:0]            sel_idx,
  output logic [3:0]                    sel_breg,
  input  logic [31:0]                   sel_base,    // value of sel_breg
  output logic [31:0]                   sel_addr,
  input  logic                          avoid,       // case 1: do not start
  output logic                          req_valid,
  output logic [31:0]                   req_addr,
  output logic                          req_byte,
  output logic [ELQ_IDW:0]              req_tag,
  // response of the load/store unit
  input  logic                          rsp_valid,
  input  logic [ELQ_IDW:0]              rsp_tag,
  input  logic [31:0]                   rsp_data,
  input  logic                          rsp_hit,
  // invalidation (cases 2 and 3)
  input  logic [DEPTH-1:0]              inval,
  // decode-time lookup, slot order = program order
  input  logic [W-1:0]                  cons_valid,  // slot holds a candidate load
  input  logic [W-1:0]                  cons_block,  // hazard seen at decode
  output logic [W-1:0][ELQ_IDW-1:0]     cons_idx,
  output logic [W-1:0]                  cons_hit,
  output logic [W-1:0][31:0]            cons_data,
  // commit
  input  logic [$clog2(W+1)-1:0]        commit_cnt,
  output logic [W-1:0][ELQ_IDW-1:0]     commit_idx,
  // state for the checks and for renamed register reads
  output elq_entry_t [DEPTH-1:0]        ent_o,
  output logic [DEPTH-1:0]              pending
);

  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned AW = $clog2(W+1);

  elq_entry_t           ent   [DEPTH];
  logic [DEPTH-1:0]     epoch;
  logic [ELQ_IDW-1:0]   head, dec, tail;
  logic [CW-1:0]        cnt_all, cnt_pend;

  function automatic logic [ELQ_IDW-1:0] wadd(input logic [ELQ_IDW-1:0] p, input int unsigned k);
    int unsigned v;
    v = int'(p) + k;
    if (v >= DEPTH) v = v - DEPTH;
    return v[ELQ_IDW-1:0];
  endfunction

  function automatic int unsigned ring_dist(input logic [ELQ_IDW-1:0] from, input int unsigned i);
    return (i >= int'(from)) ? i - int'(from) : i + DEPTH - int'(from);
  endfunction

  assign free_cnt = CW'(DEPTH) - cnt_all;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      ent_o[i]   = ent[i];
      pending[i] = ring_dist(dec, i) < int'(cnt_pend);
    end
    for (int s = 0; s < W; s++) begin
      alloc_id[s]   = wadd(tail, s);
      commit_idx[s] = wadd(head, s);
    end
  end

  // oldest active entry in prepare among the pending ones
  always_comb begin
    logic [ELQ_IDW-1:0] idx;
    sel_valid = 1'b0;
    sel_idx   = '0;
    for (int k = DEPTH - 1; k >= 0; k--) begin
      idx = wadd(dec, k);
      if (k < int'(cnt_pend) && ent[idx].active && ent[idx].status == EL_PREPARE) begin
        sel_valid = 1'b1;
        sel_idx   = idx;
      end
    end
  end

  assign sel_breg  = ent[sel_idx].breg;
  assign sel_addr  = ent[sel_idx].adr_mode[AM_U] ? sel_base + {20'd0, ent[sel_idx].offset}
                                                 : sel_base - {20'd0, ent[sel_idx].offset};
  assign req_valid = sel_valid && lsu_idle && !avoid;
  assign req_addr  = sel_addr;
  assign req_byte  = ent[sel_idx].adr_mode[AM_B];
  assign req_tag   = {epoch[sel_idx], sel_idx};

  // decode-time lookup
  always_comb begin
    int unsigned n;
    n = 0;
    for (int s = 0; s < W; s++) begin
      cons_idx[s]  = wadd(dec, n);
      cons_hit[s]  = cons_valid[s] && !cons_block[s] && (n < int'(cnt_pend)) &&
                     (ent[cons_idx[s]].status == EL_COMPLETE);
      cons_data[s] = ent[cons_idx[s]].el_data;
      if (cons_valid[s]) n++;
    end
  end

  logic [AW-1:0] n_cons;
  always_comb begin
    n_cons = '0;
    for (int s = 0; s < W; s++) n_cons += AW'(cons_valid[s]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head     <= '0;
      dec      <= '0;
      tail     <= '0;
      cnt_all  <= '0;
      cnt_pend <= '0;
      epoch    <= '0;
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else begin
      // activation, start, response, invalidation of pending entries
      for (int i = 0; i < DEPTH; i++) begin
        if (pending[i]) begin
          if (activate[i]) ent[i].active <= 1'b1;
          if (sel_valid && lsu_idle && sel_idx == ELQ_IDW'(i)) begin
            if (avoid) begin
              ent[i].status <= EL_INVALID;
            end else begin
              ent[i].status <= EL_BUSY;
              ent[i].adr    <= sel_addr;
            end
          end
          if (rsp_valid && rsp_tag == {epoch[i], ELQ_IDW'(i)} && ent[i].status == EL_BUSY) begin
            ent[i].status  <= rsp_hit ? EL_COMPLETE : EL_INVALID;
            ent[i].el_data <= rsp_data;
          end
          if (inval[i]) ent[i].status <= EL_INVALID;
        end
      end
      if (flush) begin
        tail     <= dec;
        cnt_all  <= CW'(cnt_all - cnt_pend - CW'(commit_cnt));
        cnt_pend <= '0;
      end else begin
        for (int s = 0; s < W; s++)
          if (s < int'(alloc_cnt)) begin
            ent[wadd(tail, s)] <= '{active: 1'b0, status: EL_PREPARE, breg: alloc_pd[s].breg,
                                   offset: alloc_pd[s].offset, adr_mode: alloc_pd[s].adr_mode,
                                   adr: '0, el_data: '0};
            epoch[wadd(tail, s)] <= ~epoch[wadd(tail, s)];
          end
        tail     <= wadd(tail, int'(alloc_cnt));
        dec      <= wadd(dec, int'(n_cons));
        cnt_all  <= cnt_all + CW'(alloc_cnt) - CW'(commit_cnt);
        cnt_pend <= cnt_pend + CW'(alloc_cnt) - CW'(n_cons);
      end
      head <= wadd(head, int'(commit_cnt));
    end
  end

  // handshake rules
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (int'(alloc_cnt) <= int'(free_cnt))
        else $error("el_elq: allocation of %0d with %0d free", alloc_cnt, free_cnt);
      assert (int'(n_cons) <= int'(cnt_pend))
        else $error("el_elq: decode of %0d loads with %0d pending", n_cons, cnt_pend);
      assert (int'(commit_cnt) <= int'(cnt_all) - int'(cnt_pend))
        else $error("el_elq: commit of %0d loads with %0d decoded", commit_cnt, int'(cnt_all) - int'(cnt_pend));
      assert (!(flush && n_cons != '0))
        else $error("el_elq: decode during flush");
    end
  end

endmodule
