// early_load_top: the early-load unit of an in-order, dual-issue pipeline.
//
// In a deep pipeline a load needs several cycles between decode and the
// moment its data can be forwarded, and a dependent instruction stalls for
// all of them (the load-to-use latency). This unit starts loads early, while
// they wait in the instruction queue, using the load/store unit when the
// pipeline leaves it idle. If the early load was correct, the load finds its
// data ready when it is decoded: its destination register is renamed to the
// early load queue entry, dependent instructions read the value from there
// and do not wait, and the load does not access the cache again. If it was
// not correct, the load simply executes as usual, at no extra cost.
//
// Blocks (all instantiated here):
//   el_predecode_select  pre-decoders per I-cache way, selected by tag hit
//   el_iq                instruction queue with the lookahead (EL) pointer
//   el_elq               early load queue
//   el_rst               register status table
//   el_violation_check   avoidance (case 1) and invalidation (cases 2, 3)
// The rest of the processor (fetch unit, I-cache arrays and tags, decoder,
// register file, forwarding, address unit, data cache, write-back) is the
// host's. This block talks to it through plain ports:
//   fetch     the data of every way of the fetched line and the one-hot hit
//             vector; fetch_ready says the queue has room for a whole group;
//   decode    the host pops dec_cnt instructions from the head of the queue
//             and, in the same cycle, tells for each the registers it writes,
//             its execution latency and whether it is a store; the unit
//             answers dec_el_hit/dec_el_data for candidate loads;
//   operands  rd_reg lookups return the register status and, for a renamed
//             register, the early-loaded value;
//   early loads read the base register through el_rf_raddr/el_rf_rdata,
//             send requests to the load/store unit when lsu_idle, and take
//             the response (data, hit) by tag;
//   stores    report their address when they access the load/store unit;
//   commit    the number of candidate loads committing, in order.
//
// This design's own choices, beside those listed in the blocks: the decode
// point of the mechanism is the cycle the host pops the queue; a load at
// decode does not use early data while an older store has passed decode but
// not yet reported its address, or when an older instruction of the same
// decode group writes its base register or is a store (these cases fall
// between the checks as described, which compare against stores in execute
// and instructions already in decode); the store report must coincide with
// the store's access, in order with early-load accesses, so that an early
// load started later sees the stored data. With el_enable low no candidate is
// recorded and the pipeline behaves as without the mechanism.
//
// Timing: every output is combinational on registered state and the current
// inputs; all state changes at the rising clock edge. Reset is synchronous,
// active low.
module early_load_top
  import el_pkg::*;
#(
  parameter int unsigned WAYS      = 4,
  parameter int unsigned FETCH_W   = 2,
  parameter int unsigned IQ_DEPTH  = 24,
  parameter int unsigned EL_DIST   = 4,
  parameter int unsigned ELQ_DEPTH = 12,
  parameter int unsigned N_RD      = 4,
  parameter int unsigned STAGE_W   = STAGEW,
  localparam int unsigned AW       = $clog2(FETCH_W+1)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               el_enable,
  input  logic                               flush,
  // fetch
  input  logic                               fetch_valid,
  input  logic [AW-1:0]                      fetch_cnt,      // valid words, from slot 0
  input  logic [WAYS-1:0][FETCH_W-1:0][31:0] way_data,
  input  logic [WAYS-1:0]                    way_hit,
  output logic                               fetch_ready,
  // decode
  output iq_entry_t [FETCH_W-1:0]            dec_entry,
  output logic [FETCH_W-1:0]                 dec_valid,
  input  logic [AW-1:0]                      dec_cnt,
  input  logic [FETCH_W-1:0][NREG-1:0]       dec_dst_mask,
  input  logic [FETCH_W-1:0][STAGE_W-1:0]    dec_lat,
  input  logic [FETCH_W-1:0]                 dec_is_store,
  output logic [FETCH_W-1:0]                 dec_el_hit,
  output logic [FETCH_W-1:0][31:0]           dec_el_data,
  // operand status and renamed values
  input  logic [N_RD-1:0][3:0]               rd_reg,
  output reg_status_e [N_RD-1:0]             rd_status,
  output logic [N_RD-1:0][31:0]              rd_el_data,
  // register file read port for early loads
  output logic [3:0]                         el_rf_raddr,
  input  logic [31:0]                        el_rf_rdata,
  // load/store unit
  input  logic                               lsu_idle,
  output logic                               req_valid,
  output logic [31:0]                        req_addr,
  output logic                               req_byte,
  output logic [ELQ_IDW:0]                   req_tag,
  input  logic                               rsp_valid,
  input  logic [ELQ_IDW:0]                   rsp_tag,
  input  logic [31:0]                        rsp_data,
  input  logic                               rsp_hit,
  // store address
  input  logic                               st_valid,
  input  logic [31:0]                        st_addr,
  // commit of candidate loads
  input  logic [AW-1:0]                      commit_cnt,
  // events
  output el_events_t                         events
);


  // ---------------------------------------------------------------- fetch
  logic                        fetch_hit;
  logic [FETCH_W-1:0][31:0]    f_instr;
  predec_t [FETCH_W-1:0]       f_pd;
  logic [$clog2(IQ_DEPTH+1)-1:0]  iq_free;
  logic [$clog2(ELQ_DEPTH+1)-1:0] elq_free;
  logic [AW-1:0]               push_cnt, alloc_cnt;
  iq_entry_t [FETCH_W-1:0]     push_entry;
  predec_t [FETCH_W-1:0]       alloc_pd;
  logic [FETCH_W-1:0][ELQ_IDW-1:0] alloc_id;
  logic                        elq_full_drop;

  el_predecode_select #(.WAYS(WAYS), .FETCH_W(FETCH_W)) u_pds (
    .way_data(way_data), .way_hit(way_hit), .hit(fetch_hit), .instr(f_instr), .pd(f_pd));

  assign fetch_ready = (int'(iq_free) >= int'(FETCH_W));

  always_comb begin
    int unsigned k;
    push_cnt      = (fetch_valid && fetch_hit && fetch_ready) ? fetch_cnt : '0;
    k             = 0;
    alloc_pd      = '0;
    elq_full_drop = 1'b0;
    for (int s = 0; s < FETCH_W; s++) begin
      push_entry[s] = '{instr: f_instr[s], el_cand: 1'b0, elq_id: '0};
      if (s < int'(push_cnt) && el_enable && f_pd[s].is_cand) begin
        if (k < int'(elq_free)) begin
          push_entry[s].el_cand = 1'b1;
          push_entry[s].elq_id  = alloc_id[k];
          alloc_pd[k]           = f_pd[s];
          k++;
        end else begin
          elq_full_drop = 1'b1;
        end
      end
    end
    alloc_cnt = AW'(k);
  end

  // ---------------------------------------------------------------- queues
  logic [ELQ_DEPTH-1:0]            activate;
  logic                            sel_valid, avoid;
  logic [ELQ_IDW-1:0]              sel_idx;
  logic [3:0]                      sel_breg;
  logic [31:0]                     sel_base, sel_addr;
  logic [ELQ_DEPTH-1:0]            inval_reg, inval_mem, pending;
  elq_entry_t [ELQ_DEPTH-1:0]      ent;
  logic [FETCH_W-1:0]              cons_valid, cons_block, cons_hit;
  logic [FETCH_W-1:0][ELQ_IDW-1:0] cons_idx, commit_idx;
  logic [FETCH_W-1:0][31:0]        cons_data;

  el_iq #(.DEPTH(IQ_DEPTH), .W(FETCH_W), .EL_DIST(EL_DIST), .ELQ_DEPTH(ELQ_DEPTH)) u_iq (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .push_cnt(push_cnt), .push_entry(push_entry), .free_cnt(iq_free),
    .pop_cnt(dec_cnt), .head_entry(dec_entry), .head_valid(dec_valid),
    .activate(activate));

  el_elq #(.DEPTH(ELQ_DEPTH), .W(FETCH_W)) u_elq (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .alloc_cnt(alloc_cnt), .alloc_pd(alloc_pd), .alloc_id(alloc_id), .free_cnt(elq_free),
    .activate(activate),
    .lsu_idle(lsu_idle), .sel_valid(sel_valid), .sel_idx(sel_idx), .sel_breg(sel_breg),
    .sel_base(sel_base), .sel_addr(sel_addr), .avoid(avoid),
    .req_valid(req_valid), .req_addr(req_addr), .req_byte(req_byte), .req_tag(req_tag),
    .rsp_valid(rsp_valid), .rsp_tag(rsp_tag), .rsp_data(rsp_data), .rsp_hit(rsp_hit),
    .inval(inval_reg | inval_mem),
    .cons_valid(cons_valid), .cons_block(cons_block), .cons_idx(cons_idx),
    .cons_hit(cons_hit), .cons_data(cons_data),
    .commit_cnt(commit_cnt), .commit_idx(commit_idx),
    .ent_o(ent), .pending(pending));

  // ---------------------------------------------------------------- decode
  logic [FETCH_W-1:0]              id_valid, id_rename, commit_valid;
  logic [FETCH_W-1:0][3:0]         id_rename_reg;
  rst_entry_t [N_RD-1:0]           look;
  rst_entry_t                      base_look;
  logic [3:0]                      st_pend;      // stores past decode, address not yet seen
  logic [AW-1:0]                   n_dec_st;

  always_comb begin
    logic            older_st;
    logic [NREG-1:0] older_dst;
    older_st  = 1'b0;
    older_dst = '0;
    n_dec_st  = '0;
    for (int s = 0; s < FETCH_W; s++) begin
      id_valid[s]      = (s < int'(dec_cnt));
      cons_valid[s]    = id_valid[s] && dec_entry[s].el_cand;
      cons_block[s]    = (st_pend != '0) || older_st || older_dst[dec_entry[s].instr[19:16]];
      id_rename[s]     = cons_hit[s];
      id_rename_reg[s] = dec_entry[s].instr[15:12];
      if (id_valid[s]) begin
        older_st  = older_st | dec_is_store[s];
        older_dst = older_dst | dec_dst_mask[s];
        n_dec_st  = n_dec_st + AW'(dec_is_store[s]);
      end
      commit_valid[s]  = (s < int'(commit_cnt));
    end
    dec_el_hit  = cons_hit;
    dec_el_data = cons_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) st_pend <= '0;
    else        st_pend <= st_pend + 4'(n_dec_st) - 4'(st_valid);
  end

  always_ff @(posedge clk)
    if (rst_n) assert (!(st_valid && st_pend == '0))
      else $error("early_load_top: store address without a store past decode");

  el_rst #(.W(FETCH_W), .NLOOK(N_RD), .STAGE_W(STAGE_W)) u_rst (
    .clk(clk), .rst_n(rst_n),
    .id_valid(id_valid), .id_dst_mask(dec_dst_mask), .id_lat(dec_lat),
    .id_rename(id_rename), .id_rename_reg(id_rename_reg), .id_rename_elq(cons_idx),
    .commit_valid(commit_valid), .commit_elq(commit_idx),
    .look_reg(rd_reg), .look(look), .base_reg(sel_breg), .base(base_look));

  always_comb begin
    for (int p = 0; p < N_RD; p++) begin
      rd_status[p]  = look[p].status;
      rd_el_data[p] = ent[look[p].elq_id].el_data;
    end
    el_rf_raddr   = sel_breg;
    sel_base      = (base_look.status == RS_RENAME) ? ent[base_look.elq_id].el_data : el_rf_rdata;
  end

  // ---------------------------------------------------------------- checks
  el_violation_check #(.DEPTH(ELQ_DEPTH), .W(FETCH_W)) u_chk (
    .ent(ent), .pending(pending),
    .start_try(sel_valid && lsu_idle), .start_idx(sel_idx), .start_addr(sel_addr),
    .start_base_status(base_look.status),
    .id_valid(id_valid), .id_dst_mask(dec_dst_mask),
    .st_valid(st_valid), .st_addr(st_addr),
    .avoid(avoid), .inval_reg(inval_reg), .inval_mem(inval_mem));

  // ---------------------------------------------------------------- events
  always_comb begin
    events           = '0;
    events.alloc     = 2'(alloc_cnt);
    events.elq_full  = elq_full_drop;
    events.activate  = |(activate & pending);
    events.start     = req_valid;
    events.lsu_wait  = sel_valid && !lsu_idle;
    events.base_renamed = req_valid && (base_look.status == RS_RENAME);
    events.avoid     = avoid;
    events.inval_reg = |inval_reg;
    events.inval_mem = |inval_mem;
    events.complete  = rsp_valid && rsp_hit;
    events.dmiss     = rsp_valid && !rsp_hit;
    for (int s = 0; s < FETCH_W; s++) begin
      events.hit      = events.hit + 2'(cons_hit[s]);
      events.fallback = events.fallback + 2'(cons_valid[s] && !cons_hit[s]);
      if (cons_valid[s] && cons_block[s] && st_pend != '0) events.st_block = 1'b1;
    end
    for (int p = 0; p < N_RD; p++)
      if (look[p].status == RS_RENAME) events.rename_read = 1'b1;
  end

endmodule
