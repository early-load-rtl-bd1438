// el_predecoder: identifies early load candidates in one ARM instruction word.
//
// The pre-decoder sits in the last fetch stage, in front of the instruction
// queue, and decides whether an instruction also goes into the early load
// queue. A candidate is an ARM single data transfer load (LDR or LDRB) with an
// immediate offset and the condition "always" (cond = 4'b1110). For a
// candidate it hands on the base register, the 12-bit offset and the
// addressing-mode bits {P, U, B, W}.
//
// Following the description: only register +/- immediate addressing and only
// the "always" condition qualify; register +/- register loads are left to the
// normal pipeline. This design's own choices: pre-indexed addressing without
// base write-back (P = 1, W = 0) is required, so an early load never has to
// update its base register, and loads that use R15 as base or as destination
// are excluded (PC-relative address, change of control flow).
//
// Purely combinational; no clock.
module el_predecoder
  import el_pkg::*;
(
  input  logic [31:0] instr,
  output predec_t     pd
);

  logic cond_al, is_sdt_load_imm, mode_ok;

  always_comb begin
    cond_al         = (instr[31:28] == 4'b1110);
    // bits[27:26] = 01 single data transfer, bit 25 = 0 immediate offset, bit 20 = 1 load
    is_sdt_load_imm = (instr[27:26] == 2'b01) && !instr[25] && instr[20];
    mode_ok         = instr[24] && !instr[21] && (instr[19:16] != 4'd15) && (instr[15:12] != 4'd15);

    pd.is_cand  = cond_al && is_sdt_load_imm && mode_ok;
    pd.breg     = instr[19:16];
    pd.rd       = instr[15:12];
    pd.offset   = instr[11:0];
    pd.adr_mode = {instr[24], instr[23], instr[22], instr[21]};
  end

endmodule
