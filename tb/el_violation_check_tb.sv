// el_violation_check_tb: the three cases on directed examples (the base
// register and store examples of the mechanism) and on random queue contents
// against a reference written from the rules: avoid when the base register
// is busy; invalidate a pending entry that has started (or starts now) when
// its base register is written at decode, or when a store hits its word.
module el_violation_check_tb;
  import el_pkg::*;

  localparam int D = 12, W = 2;
  elq_entry_t [D-1:0] ent;
  logic [D-1:0] pending;
  logic start_try;
  logic [ELQ_IDW-1:0] start_idx;
  logic [31:0] start_addr, st_addr;
  reg_status_e start_base_status;
  logic [W-1:0] id_valid;
  logic [W-1:0][NREG-1:0] id_dst_mask;
  logic st_valid, avoid;
  logic [D-1:0] inval_reg, inval_mem;
  int checks = 0, failures = 0;

  el_violation_check #(.DEPTH(D), .W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear();
    ent = '0; pending = '0; start_try = 0; start_idx = 0; start_addr = 0;
    start_base_status = RS_READY; id_valid = 0; id_dst_mask = 0; st_valid = 0; st_addr = 0;
  endtask

  task automatic expect_out(input string what, input bit a, input logic [D-1:0] ir, input logic [D-1:0] im);
    #1;
    checks++;
    if (avoid !== a || inval_reg !== ir || inval_mem !== im) begin
      failures++;
      $display("FAIL %s: avoid=%0d reg=%b mem=%b", what, avoid, inval_reg, inval_mem);
    end
  endtask

  initial begin
    // case 1: LDR r2,[r1] about to start while ADD r1 is in flight
    clear();
    start_try = 1; start_idx = 3; start_base_status = RS_BUSY; pending[3] = 1;
    expect_out("case 1 busy base", 1, '0, '0);
    start_base_status = RS_RENAME;
    expect_out("case 1 renamed base", 0, '0, '0);
    // case 2: entry 5 (base r1) has started; ADD r1 reaches decode in slot 1
    clear();
    pending[5] = 1; ent[5].status = EL_BUSY; ent[5].breg = 4'd1;
    id_valid = 2'b10; id_dst_mask[1] = 16'h0002;
    expect_out("case 2 busy", 0, D'(1) << 5, '0);
    ent[5].status = EL_COMPLETE;
    expect_out("case 2 complete", 0, D'(1) << 5, '0);
    ent[5].status = EL_PREPARE;
    expect_out("case 2 not started", 0, '0, '0);
    start_try = 1; start_idx = 5;
    expect_out("case 2 starting now", 0, D'(1) << 5, '0);
    start_try = 0; pending[5] = 0; ent[5].status = EL_COMPLETE;
    expect_out("case 2 older load", 0, '0, '0);
    // case 3: STR to [r1,#0] while the LOAD of [r1,#0] has completed early
    clear();
    pending[7] = 1; ent[7].status = EL_COMPLETE; ent[7].adr = 32'h0000_1004;
    st_valid = 1; st_addr = 32'h0000_1006;
    expect_out("case 3 same word", 0, '0, D'(1) << 7);
    st_addr = 32'h0000_1008;
    expect_out("case 3 other word", 0, '0, '0);
    // random
    for (int i = 0; i < 5000; i++) begin
      bit ea;
      logic [D-1:0] er, em;
      logic [NREG-1:0] wr;
      for (int k = 0; k < D; k++) begin
        ent[k] = '0;
        ent[k].status = elq_status_e'($urandom % 4);
        ent[k].breg   = 4'($urandom % 6);
        ent[k].adr    = 32'($urandom % 8) << 2;
      end
      pending = D'($urandom);
      start_try = $urandom % 2; start_idx = 4'($urandom % D); start_addr = 32'($urandom % 32);
      start_base_status = reg_status_e'($urandom % 3);
      id_valid = 2'($urandom);
      id_dst_mask[0] = 16'($urandom % 64); id_dst_mask[1] = 16'($urandom % 64);
      st_valid = $urandom % 2; st_addr = 32'($urandom % 32);
      ea = start_try && start_base_status == RS_BUSY;
      wr = (id_valid[0] ? id_dst_mask[0] : 16'h0) | (id_valid[1] ? id_dst_mask[1] : 16'h0);
      for (int k = 0; k < D; k++) begin
        bit st, now;
        st = ent[k].status inside {EL_BUSY, EL_COMPLETE};
        now = start_try && !ea && int'(start_idx) == k;
        er[k] = pending[k] && (st || now) && wr[ent[k].breg];
        em[k] = pending[k] && st_valid && ((st && ent[k].adr[31:2] == st_addr[31:2]) ||
                                           (now && start_addr[31:2] == st_addr[31:2]));
      end
      expect_out("random", ea, er, em);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
