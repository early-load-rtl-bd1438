// el_host_model: behavioural model of the host pipeline around the early-load
// unit, shared by the end-to-end testbenches. Not synthesizable.
//
// It plays an in-order, dual-issue host: it fetches a program through a
// WAYS-way I-cache model (hit way chosen at random, the other ways holding
// decoy words, occasional misses), decodes up to two instructions a cycle
// from the unit's instruction queue with a register scoreboard built on the
// unit's register status table, writes results back after a fixed latency
// (ALU LAT_ALU cycles, loads LAT_LD), and models a pipelined load/store unit
// that takes one access a cycle, answers early loads after LSU_LAT cycles
// (with a given rate of data-cache misses) and is taken by other traffic in
// 5% of its free cycles. Optionally it flushes the front end at a fixed
// interval and refetches from the oldest instruction not yet decoded, as a
// branch misprediction would.
//
// Two models run side by side: the golden one executes each instruction in
// program order when it is decoded; the timing one holds the register file and
// memory the unit actually reads. Every operand read by a decoded instruction
// (from the register file, from the ELQ through a rename, or the early data
// of the older load in the same decode group) and every early-loaded value
// used at decode is compared with the golden model; after a run both register
// files and memories must agree. Counters record how often each mechanism of
// the unit occurred.
//
// Programs use a small ARM subset: ADD (immediate and register), MOV
// immediate, LDR/LDRB with immediate offset, LDR with register offset and STR.
// The random program generator is a linear congruential generator seeded by
// the caller, so hosts with different unit parameters can run the same program.
module el_host_model
  import el_pkg::*;
  import el_tb_pkg::*;
#(
  parameter int WAYS    = 4,
  parameter int FW      = 2,
  parameter int NRD     = 4,
  parameter int LAT_ALU = 2,
  parameter int LAT_LD  = 6,
  parameter int LSU_LAT = 4,
  parameter int MEMW    = 1024,   // words of data memory
  parameter int HALF    = 50,
  parameter int SW      = STAGEW  // width of the execution-latency field
) (
  output logic                          clk,
  output logic                          rst_n,
  output logic                          el_enable,
  output logic                          flush,
  output logic                          fetch_valid,
  output logic [1:0]                    fetch_cnt,
  output logic [WAYS-1:0][FW-1:0][31:0] way_data,
  output logic [WAYS-1:0]               way_hit,
  input  logic                          fetch_ready,
  input  iq_entry_t [FW-1:0]            dec_entry,
  input  logic [FW-1:0]                 dec_valid,
  output logic [1:0]                    dec_cnt,
  output logic [FW-1:0][NREG-1:0]       dec_dst_mask,
  output logic [FW-1:0][SW-1:0]         dec_lat,
  output logic [FW-1:0]                 dec_is_store,
  input  logic [FW-1:0]                 dec_el_hit,
  input  logic [FW-1:0][31:0]           dec_el_data,
  output logic [NRD-1:0][3:0]           rd_reg,
  input  reg_status_e [NRD-1:0]         rd_status,
  input  logic [NRD-1:0][31:0]          rd_el_data,
  input  logic [3:0]                    el_rf_raddr,
  output logic [31:0]                   el_rf_rdata,
  output logic                          lsu_idle,
  input  logic                          req_valid,
  input  logic [31:0]                   req_addr,
  input  logic                          req_byte,
  input  logic [ELQ_IDW:0]              req_tag,
  output logic                          rsp_valid,
  output logic [ELQ_IDW:0]              rsp_tag,
  output logic [31:0]                   rsp_data,
  output logic                          rsp_hit,
  output logic                          st_valid,
  output logic [31:0]                   st_addr,
  output logic [1:0]                    commit_cnt,
  input  el_events_t                    events
);

  initial begin
    clk = 0; rst_n = 0; el_enable = 1; flush = 0; fetch_valid = 0; fetch_cnt = 0;
    way_data = '0; way_hit = '0; dec_cnt = 0; dec_dst_mask = '0; dec_lat = '0; dec_is_store = '0;
    rd_reg = '0; el_rf_rdata = 0; lsu_idle = 1; rsp_valid = 0; rsp_tag = 0; rsp_data = 0; rsp_hit = 0;
    st_valid = 0; st_addr = 0; commit_cnt = 0;
  end

  always #HALF clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [31:0] lcg_state = 32'd1;
  function automatic int unsigned lcg();
    lcg_state = lcg_state * 32'd1664525 + 32'd1013904223;
    return int'(lcg_state >> 8);
  endfunction

  task automatic init_memory(input int seed);
    lcg_state = 32'(seed);
    for (int i = 0; i < MEMW; i++) init_mem[i] = 32'(lcg()) & 32'h0000_0FFC | (32'(lcg()) << 12);
  endtask

  // ------------------------------------------------------------------ ISA
  typedef enum int {K_ALU_IMM, K_ALU_REG, K_MOV, K_LDR, K_LDR_REG, K_STR} kind_e;
  typedef struct {
    kind_e kind; int rd, rn, rm, imm; bit up, byt;
  } ins_t;

  function automatic ins_t dec(input logic [31:0] w);
    ins_t d;
    d.rd = (w >> 12) & 15; d.rn = (w >> 16) & 15; d.rm = w & 15;
    d.imm = w & 12'hFFF; d.up = w[23]; d.byt = w[22];
    if (w[27:26] == 2'b01) begin
      if (!w[20])      d.kind = K_STR;
      else if (w[25])  d.kind = K_LDR_REG;
      else             d.kind = K_LDR;
    end else if (w[24:21] == 4'b1101) begin
      d.kind = K_MOV; d.imm = w & 8'hFF;
    end else begin
      d.kind = w[25] ? K_ALU_IMM : K_ALU_REG; d.imm = w & 8'hFF;
    end
    return d;
  endfunction

  function automatic bit is_mem(input ins_t d);
    return d.kind inside {K_LDR, K_LDR_REG, K_STR};
  endfunction

  // sources of an instruction (-1: none)
  function automatic void srcs(input ins_t d, output int s0, output int s1);
    s0 = -1; s1 = -1;
    case (d.kind)
      K_ALU_IMM, K_LDR: s0 = d.rn;
      K_ALU_REG, K_LDR_REG: begin s0 = d.rn; s1 = d.rm; end
      K_STR: begin s0 = d.rn; s1 = d.rd; end
      default: ;
    endcase
  endfunction

  function automatic int dst(input ins_t d);
    return (d.kind == K_STR) ? -1 : d.rd;
  endfunction

  // ------------------------------------------------------------------ models
  logic [31:0] prog[$];
  logic [31:0] g_reg[16], t_reg[16];
  logic [31:0] g_mem[MEMW], t_mem[MEMW], init_mem[MEMW];

  function automatic logic [31:0] ea(input ins_t d, input logic [31:0] vn, input logic [31:0] vm);
    logic [31:0] off;
    off = (d.kind == K_LDR_REG) ? vm : 32'(d.imm);
    return d.up ? vn + off : vn - off;
  endfunction

  function automatic logic [31:0] mem_rd(ref logic [31:0] m[MEMW], input logic [31:0] a, input bit byt);
    logic [31:0] wd;
    wd = m[(a >> 2) & (MEMW - 1)];
    return byt ? 32'(wd >> (8 * a[1:0]) & 32'hFF) : wd;
  endfunction

  function automatic logic [31:0] alu(input ins_t d, input logic [31:0] vn, input logic [31:0] vm);
    case (d.kind)
      K_ALU_IMM: return vn + 32'(d.imm);
      K_ALU_REG: return vn + vm;
      default:   return 32'(d.imm);   // MOV
    endcase
  endfunction

  // golden: one instruction in program order
  function automatic void golden_exec(input ins_t d);
    logic [31:0] vn, vm;
    vn = g_reg[d.rn]; vm = g_reg[d.rm];
    case (d.kind)
      K_LDR, K_LDR_REG: g_reg[d.rd] = mem_rd(g_mem, ea(d, vn, vm), d.byt);
      K_STR:            g_mem[(ea(d, vn, vm) >> 2) & (MEMW - 1)] = g_reg[d.rd];
      default:          g_reg[d.rd] = alu(d, vn, vm);
    endcase
  endfunction

  // timing events
  typedef struct { int due; int rd; logic [31:0] val; } wb_t;
  typedef struct { int due; bit store; int rd; logic [31:0] addr; logic [31:0] data; bit byt; int cand; } mop_t;
  typedef struct { int due; logic [ELQ_IDW:0] tag; logic [31:0] data; bit hit; } rsp_t;
  wb_t  wbq[$];
  mop_t mopq[$];
  rsp_t rspq[$];
  int   commitq[$];

  // ------------------------------------------------------------------ counters
  int n_alloc, n_act, n_start, n_avoid, n_inval_reg, n_inval_mem, n_complete, n_dmiss;
  int n_hit, n_fallback, n_st_block, n_rename_read, n_elq_full, n_base_renamed, n_lsu_wait;
  int n_icache_miss, n_same_group_use, n_flush, n_loads, n_loads_reg;
  int cyc;
  int dec_cycle[$];      // decode cycle of every instruction

  task automatic clear_counters();
    n_alloc = 0; n_act = 0; n_start = 0; n_avoid = 0; n_inval_reg = 0; n_inval_mem = 0;
    n_complete = 0; n_dmiss = 0; n_hit = 0; n_fallback = 0; n_st_block = 0; n_rename_read = 0;
    n_elq_full = 0; n_base_renamed = 0; n_lsu_wait = 0; n_icache_miss = 0; n_same_group_use = 0; n_flush = 0;
    n_loads = 0; n_loads_reg = 0;
  endtask

  // status and renamed value of a register, through lookup port 0
  task automatic look(input int r, output reg_status_e st, output logic [31:0] v);
    rd_reg[0] = 4'(r);
    #1;
    st = rd_status[0];
    v  = rd_el_data[0];
  endtask

  // ------------------------------------------------------------------ one run
  task automatic run(input bit en, input int hold_decode, input int miss_pct, input int flush_every, output int cycles);
    int fpc, dpc, quiet;
    bit done;
    el_enable = en;
    for (int r = 0; r < 16; r++) begin g_reg[r] = 32'(r * 64); t_reg[r] = 32'(r * 64); end
    for (int i = 0; i < MEMW; i++) begin g_mem[i] = init_mem[i]; t_mem[i] = init_mem[i]; end
    wbq.delete(); mopq.delete(); rspq.delete(); commitq.delete(); dec_cycle.delete();
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fpc = 0; dpc = 0; cyc = 0; quiet = 0; done = 0;
    while (!done) begin
      ins_t d[FW];
      bit ok[FW], hit0;
      int s0, s1, nd;
      reg_status_e st;
      logic [31:0] v;
      @(negedge clk);
      // ---- load/store unit side
      lsu_idle = 1; st_valid = 0; rsp_valid = 0; commit_cnt = 0;
      foreach (mopq[i]) if (mopq[i].due == cyc) begin
        lsu_idle = 0;
        if (mopq[i].store) begin st_valid = 1; st_addr = mopq[i].addr; end
      end
      if (lsu_idle && (lcg() % 100) < 5) lsu_idle = 0;   // unit taken by something else
      foreach (rspq[i]) if (rspq[i].due == cyc) begin
        rsp_valid = 1; rsp_tag = rspq[i].tag; rsp_data = rspq[i].data; rsp_hit = rspq[i].hit;
      end
      foreach (commitq[i]) if (commitq[i] == cyc) commit_cnt++;
      // ---- fetch
      fetch_valid = (fpc < prog.size());
      fetch_cnt   = 2'((prog.size() - fpc) >= FW ? FW : prog.size() - fpc);
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < FW; s++)
          way_data[w][s] = (lcg() % 2) ? enc_ldr(4 + lcg() % 8, lcg() % 4, 4 * (lcg() % 8)) : 32'($urandom);
      begin
        int hw;
        hw = lcg() % WAYS;
        for (int s = 0; s < FW; s++) way_data[hw][s] = (fpc + s < prog.size()) ? prog[fpc + s] : 32'h0;
        way_hit = (lcg() % 100 < 4) ? '0 : WAYS'(1) << hw;
      end
      // ---- decode
      dec_cnt = 0; dec_dst_mask = '0; dec_lat = '0; dec_is_store = '0;
      el_rf_rdata = t_reg[el_rf_raddr];
      #1;
      for (int s = 0; s < FW; s++) begin
        ok[s] = 0;
        if (dec_valid[s]) begin
          chk(dec_entry[s].instr == prog[dpc + s], $sformatf("queue order at %0d", dpc + s));
          d[s] = dec(dec_entry[s].instr);
        end
      end
      hit0 = 0;
      flush = (flush_every > 0) && (cyc % flush_every == flush_every - 1) && (dpc < prog.size());
      if (flush) n_flush++;
      if (!flush && cyc >= hold_decode && dec_valid[0]) begin
        ok[0] = 1;
        srcs(d[0], s0, s1);
        if (s0 >= 0) begin look(s0, st, v); if (st == RS_BUSY) ok[0] = 0; end
        if (s1 >= 0) begin look(s1, st, v); if (st == RS_BUSY) ok[0] = 0; end
        if (dst(d[0]) >= 0) begin look(dst(d[0]), st, v); if (st != RS_READY) ok[0] = 0; end
        if (ok[0]) begin
          dec_cnt = 1;
          dec_dst_mask[0] = (dst(d[0]) >= 0) ? NREG'(1) << dst(d[0]) : '0;
          dec_lat[0]      = SW'(is_mem(d[0]) ? LAT_LD : LAT_ALU);
          dec_is_store[0] = (d[0].kind == K_STR);
          #1;
          hit0 = dec_el_hit[0];
        end
      end
      if (ok[0] && dec_valid[1]) begin
        bit uses0;
        ok[1] = !(is_mem(d[0]) && is_mem(d[1]));
        srcs(d[1], s0, s1);
        uses0 = (dst(d[0]) >= 0) && (s0 == dst(d[0]) || s1 == dst(d[0]));
        if (uses0 && !hit0) ok[1] = 0;
        if (dst(d[1]) >= 0 && dst(d[1]) == dst(d[0])) ok[1] = 0;
        if (s0 >= 0 && s0 != dst(d[0])) begin look(s0, st, v); if (st == RS_BUSY) ok[1] = 0; end
        if (s1 >= 0 && s1 != dst(d[0])) begin look(s1, st, v); if (st == RS_BUSY) ok[1] = 0; end
        if (dst(d[1]) >= 0) begin look(dst(d[1]), st, v); if (st != RS_READY) ok[1] = 0; end
        if (ok[1]) begin
          if (uses0) n_same_group_use++;
          dec_cnt = 2;
          dec_dst_mask[1] = (dst(d[1]) >= 0) ? NREG'(1) << dst(d[1]) : '0;
          dec_lat[1]      = SW'(is_mem(d[1]) ? LAT_LD : LAT_ALU);
          dec_is_store[1] = (d[1].kind == K_STR);
          #1;
        end
      end
      // ---- execute the decoded instructions on both models
      nd = int'(dec_cnt);
      for (int s = 0; s < nd; s++) begin
        logic [31:0] vn, vm, vd, gval, a;
        int r0, r1;
        // operand values as the host sees them
        r0 = d[s].rn; r1 = (d[s].kind == K_STR) ? d[s].rd : d[s].rm;
        vn = t_reg[r0]; vm = t_reg[r1];
        look(r0, st, v); if (st == RS_RENAME) begin vn = v; n_rename_read++; end
        look(r1, st, v); if (st == RS_RENAME) begin vm = v; n_rename_read++; end
        if (s == 1 && hit0 && dst(d[0]) >= 0) begin
          if (r0 == dst(d[0])) vn = dec_el_data[0];
          if (r1 == dst(d[0])) vm = dec_el_data[0];
        end
        srcs(d[s], s0, s1);
        if (s0 >= 0) chk(vn == g_reg[s0], $sformatf("operand r%0d of instr %0d", s0, dpc + s));
        if (s1 >= 0) chk(vm == g_reg[s1], $sformatf("operand r%0d of instr %0d", s1, dpc + s));
        golden_exec(d[s]);
        if (d[s].kind inside {K_LDR, K_LDR_REG}) n_loads++;
        if (d[s].kind == K_LDR_REG) n_loads_reg++;
        gval = (dst(d[s]) >= 0) ? g_reg[dst(d[s])] : 32'h0;
        case (d[s].kind)
          K_LDR, K_LDR_REG: begin
            a = ea(d[s], vn, vm);
            if (dec_el_hit[s]) begin
              chk(dec_el_data[s] == gval, $sformatf("early data of instr %0d: %h vs %h", dpc + s, dec_el_data[s], gval));
              wbq.push_back('{due: cyc + LAT_LD, rd: d[s].rd, val: dec_el_data[s]});
            end else begin
              mopq.push_back('{due: cyc + 1, store: 0, rd: d[s].rd, addr: a, data: 0, byt: d[s].byt, cand: 0});
            end
            if (dec_entry[s].el_cand) commitq.push_back(cyc + LAT_LD);
          end
          K_STR: begin
            a = ea(d[s], vn, vm);
            mopq.push_back('{due: cyc + 1, store: 1, rd: 0, addr: a, data: vm, byt: 0, cand: 0});
          end
          default: wbq.push_back('{due: cyc + LAT_ALU, rd: d[s].rd, val: alu(d[s], vn, vm)});
        endcase
        dec_cycle.push_back(cyc);
      end
      dpc += nd;
      // ---- sample the unit's requests and events (all inputs settled)
      #1;
      if (req_valid) begin
        rsp_t r;
        r.due = cyc + LSU_LAT; r.tag = req_tag; r.data = mem_rd(t_mem, req_addr, req_byte);
        r.hit = (lcg() % 100) >= miss_pct;
        if (!r.hit) r.data = 32'($urandom);
        rspq.push_back(r);
      end
      n_alloc += events.alloc;       n_elq_full += events.elq_full;  n_act += events.activate;
      n_start += events.start;       n_avoid += events.avoid;        n_inval_reg += events.inval_reg;
      n_inval_mem += events.inval_mem; n_complete += events.complete; n_dmiss += events.dmiss;
      n_hit += events.hit;           n_fallback += events.fallback;  n_st_block += events.st_block;
      n_lsu_wait += events.lsu_wait;  n_base_renamed += events.base_renamed;
      if (fetch_valid && way_hit == '0) n_icache_miss++;
      if (flush) fpc = dpc;
      else if (fetch_valid && fetch_ready && way_hit != '0) fpc += int'(fetch_cnt);
      // ---- clock edge: host state changes that the unit sees from the next cycle
      @(posedge clk);
      #1;
      foreach (mopq[i]) if (mopq[i].due == cyc) begin
        if (mopq[i].store) t_mem[(mopq[i].addr >> 2) & (MEMW - 1)] = mopq[i].data;
        else wbq.push_back('{due: cyc + LAT_LD - 1, rd: mopq[i].rd, val: mem_rd(t_mem, mopq[i].addr, mopq[i].byt)});
      end
      foreach (wbq[i]) if (wbq[i].due == cyc) t_reg[wbq[i].rd] = wbq[i].val;
      cyc++;
      if (dpc == prog.size() && wbq.size() >= 0) begin
        bit busy;
        busy = 0;
        foreach (wbq[i]) if (wbq[i].due >= cyc) busy = 1;
        foreach (mopq[i]) if (mopq[i].due >= cyc) busy = 1;
        foreach (commitq[i]) if (commitq[i] >= cyc) busy = 1;
        foreach (rspq[i]) if (rspq[i].due >= cyc) busy = 1;
        if (!busy) quiet++;
        if (quiet > 3) done = 1;
      end
    end
    cycles = cyc;
    for (int r = 0; r < 16; r++) chk(t_reg[r] == g_reg[r], $sformatf("final r%0d %h vs %h", r, t_reg[r], g_reg[r]));
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < MEMW; i++) if (t_mem[i] != g_mem[i]) bad++;
      chk(bad == 0, $sformatf("final memory, %0d words differ", bad));
    end
  endtask

  // ------------------------------------------------------------------ programs
  task automatic make_fig_example();
    prog.delete();
    prog.push_back(enc_add_imm(4, 1, 10));      // stands for CMP r1, #10
    prog.push_back(enc_add_imm(5, 5, 0));       // stands for BEQ loop
    prog.push_back(enc_ldr(2, 0, 0));           // LOAD r2, [r0, #0]
    prog.push_back(enc_add_reg(3, 3, 2));       // ADD  r3, r3, r2
    prog.push_back(enc_add_imm(1, 1, 1));       // ADD  r1, r1, #1
  endtask

  task automatic make_random(input int n, input int seed);
    int last_b[$], last_o[$];
    prog.delete();
    lcg_state = 32'(seed);
    for (int b = 0; b < 4; b++) prog.push_back(enc_mov_imm(b, 16 * b + 4 * (lcg() % 4)));
    while (prog.size() < n) begin
      int p, rb, rd, off;
      p  = lcg() % 100;
      rb = lcg() % 4;
      rd = 4 + lcg() % 8;
      off = 4 * (lcg() % 16);
      if (p < 3) begin
        // burst of independent loads
        for (int k = 0; k < 18; k++) prog.push_back(enc_ldr(4 + k % 8, k % 4, 4 * k));
      end else if (p < 33) begin
        prog.push_back(enc_ldr(rd, rb, off, (lcg() % 8) != 0));
        last_b.push_back(rb); last_o.push_back(off);
      end else if (p < 38) prog.push_back(enc_ldr(rd, rb, lcg() % 64, 1, 1));
      else if (p < 42) prog.push_back(enc_ldr(rb, lcg() % 4, off));          // pointer chase
      else if (p < 46) prog.push_back(enc_ldr_reg(rd, rb, 4 + lcg() % 8));
      else if (p < 58) begin
        if (last_b.size() > 0 && (lcg() % 2)) begin
          int k;
          k = lcg() % last_b.size();
          // store to a location a nearby load reads, then load it again
          prog.push_back(enc_str(rd, last_b[k], last_o[k]));
          prog.push_back(enc_add_imm(4 + lcg() % 8, 4 + lcg() % 8, 1));
          prog.push_back(enc_ldr(4 + lcg() % 8, last_b[k], last_o[k]));
        end else prog.push_back(enc_str(rd, rb, off));
      end else if (p < 68) prog.push_back(enc_add_imm(rb, rb, 4));              // pointer bump
      else if (p < 91) prog.push_back(enc_add_reg(rd, 4 + lcg() % 8, 4 + lcg() % 8));
      else prog.push_back(enc_mov_imm((lcg() % 3 == 0) ? rb : rd, lcg() % 256));
      if (last_b.size() > 6) begin void'(last_b.pop_front()); void'(last_o.pop_front()); end
    end
  endtask

endmodule
