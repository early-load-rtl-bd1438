// el_predecoder_tb: checks the pre-decoder on hand-encoded instructions with
// known answers and on random words against the reference decoder.
module el_predecoder_tb;
  import el_pkg::*;
  import el_tb_pkg::*;

  logic [31:0] instr;
  predec_t     pd;
  int checks = 0, failures = 0;

  el_predecoder dut (.instr(instr), .pd(pd));

  task automatic expect_word(input logic [31:0] w, input bit cand, input int breg, input int off, input logic [3:0] am);
    instr = w;
    #1;
    checks++;
    if (pd.is_cand !== cand || (cand && (pd.breg != 4'(breg) || pd.offset != 12'(off) || pd.adr_mode != am))) begin
      failures++;
      $display("FAIL %h: cand=%0d breg=%0d off=%h am=%b", w, pd.is_cand, pd.breg, pd.offset, pd.adr_mode);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // LDR r2, [r0, #0]
    expect_word(32'hE590_2000, 1, 0, 0, 4'b1100);
    // LDRB r3, [r1, #15]
    expect_word(32'hE5D1_300F, 1, 1, 15, 4'b1110);
    // LDR r4, [r5, #-8]
    expect_word(32'hE515_4008, 1, 5, 8, 4'b1000);
    // LDR r4, [r5, #8]! (write-back) - not a candidate
    expect_word(32'hE5B5_4008, 0, 0, 0, 4'b0);
    // LDR r4, [r5], #8 (post-indexed) - not a candidate
    expect_word(32'hE495_4008, 0, 0, 0, 4'b0);
    // LDRNE r2, [r0] - condition not "always"
    expect_word(32'h1590_2000, 0, 0, 0, 4'b0);
    // STR r2, [r0] - store
    expect_word(32'hE580_2000, 0, 0, 0, 4'b0);
    // LDR r2, [r0, r1] - register offset
    expect_word(32'hE790_2001, 0, 0, 0, 4'b0);
    // LDR r2, [pc, #4] and LDR pc, [r0]
    expect_word(32'hE59F_2004, 0, 0, 0, 4'b0);
    expect_word(32'hE590_F000, 0, 0, 0, 4'b0);
    // ADD r1, r1, #1
    expect_word(32'hE281_1001, 0, 0, 0, 4'b0);
    // random words, and random words forced into the load space
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] w;
      w = $urandom;
      if (i % 2 == 0) w = {4'hE, 3'b010, w[24:0]};
      instr = w;
      #1;
      checks++;
      if (pd.is_cand !== ref_is_cand(w) ||
          (ref_is_cand(w) && (pd.breg != w[19:16] || pd.rd != w[15:12] || pd.offset != w[11:0] ||
                              pd.adr_mode != {w[24], w[23], w[22], w[21]}))) begin
        failures++;
        if (failures < 10) $display("FAIL random %h cand=%0d", w, pd.is_cand);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
