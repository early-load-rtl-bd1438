// el_rst_tb: random decode-point updates (register writes with latencies,
// renames of early-loaded destinations) and commits against a cycle model of
// the table. It checks every lookup port each cycle, and separately that a
// register written with latency L reads busy for exactly L cycles.
module el_rst_tb;
  import el_pkg::*;

  localparam int W = 2, NL = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] id_valid = 0, id_rename = 0, commit_valid = 0;
  logic [W-1:0][NREG-1:0] id_dst_mask = 0;
  logic [W-1:0][STAGEW-1:0] id_lat = 0;
  logic [W-1:0][3:0] id_rename_reg = 0;
  logic [W-1:0][ELQ_IDW-1:0] id_rename_elq = 0, commit_elq = 0;
  logic [NL-1:0][3:0] look_reg = 0;
  rst_entry_t [NL-1:0] look;
  logic [3:0] base_reg = 0;
  rst_entry_t base;
  int checks = 0, failures = 0;

  // model: status, id and remaining busy cycles
  int m_status[NREG], m_id[NREG], m_left[NREG];

  el_rst #(.W(W), .NLOOK(NL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    for (int r = 0; r < NREG; r++) begin
      if (m_status[r] == 1) begin
        m_left[r]--;
        if (m_left[r] == 0) m_status[r] = 0;
      end
      for (int c = 0; c < W; c++)
        if (commit_valid[c] && m_status[r] == 2 && m_id[r] == int'(commit_elq[c])) m_status[r] = 0;
      for (int s = 0; s < W; s++)
        if (id_valid[s] && id_rename[s] && int'(id_rename_reg[s]) == r) begin
          m_status[r] = 2; m_id[r] = id_rename_elq[s];
        end else if (id_valid[s] && id_dst_mask[s][r]) begin
          m_status[r] = 1; m_left[r] = (id_lat[s] == 0) ? 1 : int'(id_lat[s]);
        end
    end
  endtask

  task automatic compare();
    for (int p = 0; p < NL; p++) begin
      int r;
      r = look_reg[p];
      checks++;
      if (int'(look[p].status) != m_status[r] ||
          (m_status[r] == 2 && int'(look[p].elq_id) != m_id[r])) begin
        failures++;
        if (failures < 10) $display("FAIL r%0d status %0d model %0d", r, look[p].status, m_status[r]);
      end
    end
    checks++;
    if (int'(base.status) != m_status[base_reg]) begin failures++; $display("FAIL base port"); end
  endtask

  initial begin
    int busy_cycles;
    for (int r = 0; r < NREG; r++) begin m_status[r] = 0; m_id[r] = 0; m_left[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: latency 5 on r3 -> busy for exactly 5 cycles
    @(negedge clk);
    id_valid = 2'b01; id_dst_mask[0] = 16'h0008; id_lat[0] = 3'd5; look_reg[0] = 4'd3;
    @(negedge clk);
    id_valid = 0;
    busy_cycles = 0;
    while (look[0].status == RS_BUSY && busy_cycles < 20) begin busy_cycles++; @(negedge clk); end
    checks++;
    if (busy_cycles != 5) begin failures++; $display("FAIL latency 5 gave %0d busy cycles", busy_cycles); end
    repeat (10) @(negedge clk);
    // random
    for (int cyc = 0; cyc < 5000; cyc++) begin
      for (int s = 0; s < W; s++) begin
        id_valid[s]      = $urandom % 2;
        id_dst_mask[s]   = 16'(1 << ($urandom % 16)) | (($urandom % 8 == 0) ? 16'(1 << ($urandom % 16)) : 16'h0);
        id_lat[s]        = 3'($urandom);
        id_rename[s]     = ($urandom % 4) == 0;
        id_rename_reg[s] = 4'($urandom);
        id_rename_elq[s] = 4'($urandom % 12);
        commit_valid[s]  = $urandom % 2;
        commit_elq[s]    = 4'($urandom % 12);
      end
      for (int p = 0; p < NL; p++) look_reg[p] = 4'($urandom);
      base_reg = 4'($urandom);
      #1;
      compare();
      @(posedge clk);
      model_step();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
