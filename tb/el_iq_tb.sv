// el_iq_tb: random pushes and pops against a queue model. Every cycle it
// checks the head entries, their valid bits, the free count and the
// lookahead-pointer activation vector (candidates within EL_DIST of the head).
// A flush in the middle must empty the queue.
module el_iq_tb;
  import el_pkg::*;

  localparam int DEPTH = 24, W = 2, DIST = 4, ELQ = 12;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [1:0] push_cnt = 0, pop_cnt = 0;
  iq_entry_t [W-1:0] push_entry;
  logic [$clog2(DEPTH+1)-1:0] free_cnt;
  iq_entry_t [W-1:0] head_entry;
  logic [W-1:0] head_valid;
  logic [ELQ-1:0] activate;
  int checks = 0, failures = 0;
  iq_entry_t model[$];

  el_iq #(.DEPTH(DEPTH), .W(W), .EL_DIST(DIST), .ELQ_DEPTH(ELQ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    logic [ELQ-1:0] act;
    checks++;
    if (int'(free_cnt) != DEPTH - model.size()) begin
      failures++; $display("FAIL free %0d model %0d", free_cnt, DEPTH - model.size());
    end
    for (int s = 0; s < W; s++) begin
      if (head_valid[s] != (s < model.size())) begin failures++; $display("FAIL valid[%0d]", s); end
      else if (s < model.size() && head_entry[s] != model[s]) begin
        failures++; $display("FAIL head[%0d] %h vs %h", s, head_entry[s], model[s]);
      end
    end
    act = '0;
    for (int k = 0; k < model.size() && k <= DIST; k++)
      if (model[k].el_cand) act[model[k].elq_id] = 1'b1;
    if (act != activate) begin failures++; $display("FAIL activate %b vs %b", activate, act); end
  endtask

  initial begin
    int seq = 0, maxfill = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int np, nq, bias;
      @(negedge clk);
      check_state();
      bias = (cyc / 500) % 2;        // alternate filling and draining phases
      np = $urandom % 3;
      nq = $urandom % 3;
      if (bias == 1 && nq > 0) nq--; else if (bias == 0 && np > 0) np--;
      if (np > DEPTH - model.size()) np = DEPTH - model.size();
      if (nq > model.size()) nq = model.size();
      for (int s = 0; s < W; s++) begin
        push_entry[s].instr   = 32'(seq + s);
        push_entry[s].el_cand = ($urandom % 3) == 0;
        push_entry[s].elq_id  = 4'($urandom % ELQ);
      end
      push_cnt = 2'(np);
      pop_cnt  = 2'(nq);
      flush    = (cyc == 3000);
      @(posedge clk);
      #1;
      if (flush) model.delete();
      else begin
        for (int s = 0; s < nq; s++) void'(model.pop_front());
        for (int s = 0; s < np; s++) model.push_back(push_entry[s]);
      end
      seq += np;
      if (model.size() > maxfill) maxfill = model.size();
    end
    checks++;
    if (maxfill != DEPTH) begin failures++; $display("FAIL queue never filled (%0d)", maxfill); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
