// el_predecode_select_tb: every way holds different words (loads and others);
// for a random one-hot hit vector the selected words must be those of the
// hit way and the candidate flags those of the reference decoder; with no hit
// nothing is selected.
module el_predecode_select_tb;
  import el_pkg::*;
  import el_tb_pkg::*;

  localparam int WAYS = 4, FW = 2;
  logic [WAYS-1:0][FW-1:0][31:0] way_data;
  logic [WAYS-1:0]               way_hit;
  logic                          hit;
  logic [FW-1:0][31:0]           instr;
  predec_t [FW-1:0]              pd;
  int checks = 0, failures = 0;

  el_predecode_select #(.WAYS(WAYS), .FETCH_W(FW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int hw;
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < FW; s++)
          way_data[w][s] = ($urandom % 2) ? enc_ldr($urandom % 15, $urandom % 15, $urandom % 4096, 1'($urandom), 1'($urandom))
                                          : 32'($urandom);
      hw = $urandom % (WAYS + 1);      // WAYS means: miss
      way_hit = (hw == WAYS) ? '0 : WAYS'(1) << hw;
      #1;
      checks++;
      if (hw == WAYS) begin
        if (hit || instr != '0 || pd[0].is_cand || pd[1].is_cand) begin
          failures++; $display("FAIL miss selected something");
        end
      end else begin
        bit bad;
        bad = 0;
        for (int s = 0; s < FW; s++)
          if (!hit || instr[s] != way_data[hw][s] || pd[s].is_cand != ref_is_cand(way_data[hw][s]) ||
              (pd[s].is_cand && (pd[s].breg != way_data[hw][s][19:16] || pd[s].offset != way_data[hw][s][11:0]))) begin
            bad = 1;
            if (failures < 10) $display("FAIL way %0d slot %0d: %h vs %h", hw, s, instr[s], way_data[hw][s]);
          end
        if (bad) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
