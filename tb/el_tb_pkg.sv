// el_tb_pkg: reference functions shared by the early-load testbenches.
//
// The reference pre-decoder is written from the ARM encoding tables field by
// field, independently of the RTL: a word is an early-load candidate when it
// is LDR/LDRB with immediate offset, pre-indexed, without write-back,
// condition "always", and neither base nor destination is R15.
package el_tb_pkg;

  function automatic bit ref_is_cand(input logic [31:0] w);
    int unsigned cond, op3, p, wb, l, rn, rd;
    cond = w >> 28;
    op3  = (w >> 25) & 7;       // 3'b010: single data transfer, immediate offset
    p    = (w >> 24) & 1;
    wb   = (w >> 21) & 1;
    l    = (w >> 20) & 1;
    rn   = (w >> 16) & 15;
    rd   = (w >> 12) & 15;
    return cond == 14 && op3 == 2 && l == 1 && p == 1 && wb == 0 && rn != 15 && rd != 15;
  endfunction

  // encodings used by the testbenches (condition "always")
  function automatic logic [31:0] enc_ldr(input int rd, input int rn, input int off, input bit up = 1, input bit byt = 0);
    return 32'hE510_0000 | (32'(up) << 23) | (32'(byt) << 22) | (32'(rn) << 16) | (32'(rd) << 12) | 32'(off & 12'hFFF);
  endfunction
  function automatic logic [31:0] enc_str(input int rd, input int rn, input int off);
    return 32'hE580_0000 | (32'(rn) << 16) | (32'(rd) << 12) | 32'(off & 12'hFFF);
  endfunction
  function automatic logic [31:0] enc_ldr_reg(input int rd, input int rn, input int rm);
    return 32'hE790_0000 | (32'(rn) << 16) | (32'(rd) << 12) | 32'(rm);
  endfunction
  function automatic logic [31:0] enc_add_imm(input int rd, input int rn, input int imm);
    return 32'hE280_0000 | (32'(rn) << 16) | (32'(rd) << 12) | 32'(imm & 8'hFF);
  endfunction
  function automatic logic [31:0] enc_add_reg(input int rd, input int rn, input int rm);
    return 32'hE080_0000 | (32'(rn) << 16) | (32'(rd) << 12) | 32'(rm);
  endfunction
  function automatic logic [31:0] enc_mov_imm(input int rd, input int imm);
    return 32'hE3A0_0000 | (32'(rd) << 12) | 32'(imm & 8'hFF);
  endfunction

endpackage
