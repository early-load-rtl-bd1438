// early_load_top_tb: end-to-end test of the early-load unit with all of its
// parameters at their defaults, driven by the host pipeline model
// (el_host_model: dual-issue in-order host, ALU latency 2, load latency 6,
// load/store unit answering after 4 cycles, random data-cache misses).
//
// Every operand a decoded instruction reads and every early-loaded value used
// at decode is compared with a golden in-order model, and at the end of each
// run both register files and memories must agree.
//
// Programs:
//  1. the load-use example of the mechanism (a load followed by a dependent
//     add): with early load the add must be decoded in the same cycle as the
//     load, without it LAT_LD + 1 cycles later;
//  2. a random program of 1500 instructions with pointer bumps, pointer
//     chasing, store-then-load pairs and bursts of loads; it must make every
//     mechanism of the unit happen, and run in fewer cycles with early load
//     than without;
//  3. the same program with a front-end flush every 97 cycles, which drops
//     every early load not yet decoded and refetches.
module early_load_top_tb;
  import el_pkg::*;

  localparam int FW = 2, WAYS = 4, NRD = 4, LAT_LD = 6;

  logic clk, rst_n, el_enable, flush;
  logic fetch_valid, fetch_ready;
  logic [1:0] fetch_cnt, dec_cnt, commit_cnt;
  logic [WAYS-1:0][FW-1:0][31:0] way_data;
  logic [WAYS-1:0] way_hit;
  iq_entry_t [FW-1:0] dec_entry;
  logic [FW-1:0] dec_valid, dec_is_store, dec_el_hit;
  logic [FW-1:0][NREG-1:0] dec_dst_mask;
  logic [FW-1:0][STAGEW-1:0] dec_lat;
  logic [FW-1:0][31:0] dec_el_data;
  logic [NRD-1:0][3:0] rd_reg;
  reg_status_e [NRD-1:0] rd_status;
  logic [NRD-1:0][31:0] rd_el_data;
  logic [3:0] el_rf_raddr;
  logic [31:0] el_rf_rdata;
  logic lsu_idle, req_valid, req_byte, rsp_valid, rsp_hit, st_valid;
  logic [31:0] req_addr, rsp_data, st_addr;
  logic [ELQ_IDW:0] req_tag, rsp_tag;
  el_events_t events;

  early_load_top dut (.*);

  el_host_model #(.WAYS(WAYS), .FW(FW), .NRD(NRD), .LAT_ALU(2), .LAT_LD(LAT_LD), .LSU_LAT(4)) h (.*);

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures + 1);
    $finish;
  end

  initial begin
    int c_on, c_off, d_on, d_off;
    h.init_memory(7);
    // ---- 1. load-use example
    h.make_fig_example();
    h.clear_counters();
    h.run(1, 12, 0, 0, c_on);
    d_on = h.dec_cycle[3] - h.dec_cycle[2];
    h.chk(h.n_hit == 1, "example: the load uses early data");
    h.chk(d_on == 0, $sformatf("example with early load: add decoded %0d cycles after the load", d_on));
    h.run(0, 12, 0, 0, c_off);
    d_off = h.dec_cycle[3] - h.dec_cycle[2];
    h.chk(d_off == LAT_LD + 1, $sformatf("example without early load: add decoded %0d cycles after the load", d_off));
    $display("example: load-to-use distance %0d cycles with early load, %0d without", d_on, d_off);
    // ---- 2. random program
    h.make_random(1500, 11);
    h.clear_counters();
    h.run(1, 0, 8, 0, c_on);
    $display("random program: %0d instructions", h.prog.size());
    $display("  allocated %0d  elq-full drops %0d  activations %0d  started %0d  avoided %0d",
             h.n_alloc, h.n_elq_full, h.n_act, h.n_start, h.n_avoid);
    $display("  invalidated by register %0d  by store %0d  completed %0d  cache misses %0d",
             h.n_inval_reg, h.n_inval_mem, h.n_complete, h.n_dmiss);
    $display("  used at decode %0d  fallback %0d  held by store %0d  renamed operand reads %0d",
             h.n_hit, h.n_fallback, h.n_st_block, h.n_rename_read);
    $display("  renamed base registers %0d  waits for the load/store unit %0d  same-group uses %0d  I-cache misses %0d",
             h.n_base_renamed, h.n_lsu_wait, h.n_same_group_use, h.n_icache_miss);
    h.chk(h.n_alloc > 0, "allocation happened");
    h.chk(h.n_elq_full > 0, "ELQ full happened");
    h.chk(h.n_act > 0, "activation happened");
    h.chk(h.n_start > 0, "early load start happened");
    h.chk(h.n_avoid > 0, "avoidance (case 1) happened");
    h.chk(h.n_inval_reg > 0, "invalidation by register (case 2) happened");
    h.chk(h.n_inval_mem > 0, "invalidation by store (case 3) happened");
    h.chk(h.n_complete > 0, "completion happened");
    h.chk(h.n_dmiss > 0, "data-cache miss happened");
    h.chk(h.n_hit > 0, "use of early data happened");
    h.chk(h.n_fallback > 0, "fallback happened");
    h.chk(h.n_st_block > 0, "hold for an unresolved store happened");
    h.chk(h.n_rename_read > 0, "renamed operand read happened");
    h.chk(h.n_base_renamed > 0, "early load with a renamed base happened");
    h.chk(h.n_lsu_wait > 0, "wait for the load/store unit happened");
    h.chk(h.n_same_group_use > 0, "use in the same decode group happened");
    $display("  loads decoded %0d: early data used %0.1f%%, register offset %0.1f%%, not a candidate, not in the ELQ or not valid %0.1f%%",
             h.n_loads, 100.0 * h.n_hit / h.n_loads, 100.0 * h.n_loads_reg / h.n_loads,
             100.0 * (h.n_loads - h.n_hit - h.n_loads_reg) / h.n_loads);
    h.chk(h.n_hit + h.n_fallback == h.n_alloc, "every allocated candidate reaches decode as a hit or a fallback");
    h.run(0, 0, 8, 0, c_off);
    $display("  cycles with early load %0d, without %0d (%0.2f%% faster)", c_on, c_off,
             100.0 * (real'(c_off) - real'(c_on)) / real'(c_on));
    h.chk(c_on < c_off, "early load shortens the run");
    // ---- 3. same program with a front-end flush every 97 cycles
    h.clear_counters();
    h.run(1, 0, 8, 97, c_on);
    $display("with flushes: %0d flushes, %0d early loads used, %0d cycles", h.n_flush, h.n_hit, c_on);
    h.chk(h.n_flush > 0, "flush happened");
    h.chk(h.n_hit > 0, "early data used after flushes");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
