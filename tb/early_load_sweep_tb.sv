// early_load_sweep_tb: runs the same random program on the early-load unit
// built in the configurations whose performance the design is evaluated on,
// each driven by its own copy of the host pipeline model:
//   - ELQ sizes 4, 8, 12 and 16 entries (lookahead distance 4);
//   - lookahead distances 1 to 7 (16-entry ELQ);
//   - load-to-use latencies of 3, 5 and 8 cycles (12-entry ELQ, distance 4;
//     host load latency 4, 6 and 9), as in 8-, 12- and 20-stage pipelines.
//     The 8-cycle case needs a 4-bit register status count-down.
// Each configuration runs with early load on and off. Every run is checked
// operand by operand against the golden model, early data must be used, and
// early load must not make the program slower, a 16-entry ELQ and a distance
// of 7 must use early data more often than 4 entries and distance 1, and the
// gain must grow from a 3-cycle to an 8-cycle load-to-use latency.
// The cycle counts are printed so the trend over each parameter can be read
// off the log. The program, memory image and host noise come from fixed seeds,
// so every configuration sees the same instruction stream.
module early_load_sweep_tb;
  import el_pkg::*;

  localparam int FW = 2, WAYS = 4, NRD = 4;
  localparam int NCFG = 12;
  //                                  ELQ sizes        distances (16 entries)    latency 3, 8
  localparam int CFG_ELQ [NCFG] = '{4, 8, 12, 16,  16, 16, 16, 16, 16, 16,  12, 12};
  localparam int CFG_DIST[NCFG] = '{4, 4,  4,  4,   1,  2,  3,  5,  6,  7,   4,  4};
  localparam int CFG_LAT [NCFG] = '{6, 6,  6,  6,   6,  6,  6,  6,  6,  6,   4,  9};
  localparam int CFG_SW  [NCFG] = '{3, 3,  3,  3,   3,  3,  3,  3,  3,  3,   3,  4};
  localparam int PROG_LEN = 1200, PROG_SEED = 23, MEM_SEED = 5, MISS_PCT = 8;

  int   c_on[NCFG], c_off[NCFG], hits[NCFG], chks[NCFG], fails[NCFG];
  logic done[NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    logic clk, rst_n, el_enable, flush;
    logic fetch_valid, fetch_ready;
    logic [1:0] fetch_cnt, dec_cnt, commit_cnt;
    logic [WAYS-1:0][FW-1:0][31:0] way_data;
    logic [WAYS-1:0] way_hit;
    iq_entry_t [FW-1:0] dec_entry;
    logic [FW-1:0] dec_valid, dec_is_store, dec_el_hit;
    logic [FW-1:0][NREG-1:0] dec_dst_mask;
    logic [FW-1:0][CFG_SW[g]-1:0] dec_lat;
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

    early_load_top #(.ELQ_DEPTH(CFG_ELQ[g]), .EL_DIST(CFG_DIST[g]), .STAGE_W(CFG_SW[g])) dut (.*);

    el_host_model #(.WAYS(WAYS), .FW(FW), .NRD(NRD), .LAT_ALU(2), .LAT_LD(CFG_LAT[g]), .LSU_LAT(4),
                  .SW(CFG_SW[g])) h (.*);

    initial begin
      done[g] = 0;
      h.init_memory(MEM_SEED);
      h.make_random(PROG_LEN, PROG_SEED);
      h.clear_counters();
      h.run(1, 0, MISS_PCT, 0, c_on[g]);
      hits[g] = h.n_hit;
      h.chk(h.n_hit > 0, "early data used");
      h.run(0, 0, MISS_PCT, 0, c_off[g]);
      h.chk(c_on[g] <= c_off[g], "early load does not slow the program down");
      chks[g] = h.checks;
      fails[g] = h.failures;
      done[g] = 1;
    end
  end

  initial begin
    int checks, failures;
    #100;
    wait (done.and());
    checks = 0; failures = 0;
    $display(" ELQ  dist  load-to-use  early-used  cycles-on  cycles-off  gain%%");
    for (int i = 0; i < NCFG; i++) begin
      checks += chks[i]; failures += fails[i];
      $display(" %3d  %4d  %11d  %10d  %9d  %10d  %5.2f", CFG_ELQ[i], CFG_DIST[i], CFG_LAT[i] - 1,
               hits[i], c_on[i], c_off[i], 100.0 * (real'(c_off[i]) - real'(c_on[i])) / real'(c_on[i]));
    end
    // more entries and a longer lookahead give early loads more room
    checks += 3;
    if (real'(c_off[11]) / real'(c_on[11]) <= real'(c_off[10]) / real'(c_on[10])) begin
      failures++; $display("FAIL gain at 8-cycle latency not above gain at 3 cycles");
    end
    if (hits[3] <= hits[0]) begin failures++; $display("FAIL 16-entry ELQ used no more early data than 4 entries"); end
    if (hits[9] <= hits[4]) begin failures++; $display("FAIL distance 7 used no more early data than distance 1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100 * 200000);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
