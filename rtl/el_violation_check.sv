// el_violation_check: avoidance and invalidation of incorrect early loads.
//
// An early load can fetch wrong data in two ways: its base register is still
// being computed by an older instruction (base register dependency), or an
// older store writes the location it read (memory dependency). This block
// evaluates the three checks of the mechanism every cycle:
//  case 1 (avoidance)    the early load about to start has a busy base
//                        register in the register status table: it is not
//                        started and its entry becomes invalid;
//  case 2 (invalidation) an instruction passing the decode point writes the
//                        base register of an early load that has already
//                        started (busy or complete): that entry becomes invalid;
//  case 3 (invalidation) a store presents its address in the execute stage
//                        and an early load that has already started read the
//                        same address: that entry becomes invalid.
// Only entries whose load has not reached decode yet ("pending") are checked:
// the others are older than the instruction or store being compared.
//
// This design's own choices: the early load starting in the same cycle counts
// as started for cases 2 and 3 (it read the register file in this cycle);
// addresses are compared per 32-bit word, which also catches byte accesses to
// the same word.
//
// Combinational; no clock.
module el_violation_check
  import el_pkg::*;
#(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned W     = 2
) (
  input  elq_entry_t [DEPTH-1:0]   ent,
  input  logic [DEPTH-1:0]         pending,
  // early load selected for starting this cycle
  input  logic                     start_try,    // selected and the LSU is idle
  input  logic [ELQ_IDW-1:0]       start_idx,
  input  logic [31:0]              start_addr,
  input  reg_status_e              start_base_status,
  // decode point
  input  logic [W-1:0]             id_valid,
  input  logic [W-1:0][NREG-1:0]   id_dst_mask,
  // store address in execute
  input  logic                     st_valid,
  input  logic [31:0]              st_addr,
  // results
  output logic                     avoid,        // case 1
  output logic [DEPTH-1:0]         inval_reg,    // case 2
  output logic [DEPTH-1:0]         inval_mem     // case 3
);

  logic [NREG-1:0] written;

  always_comb begin
    written = '0;
    for (int s = 0; s < W; s++)
      if (id_valid[s]) written |= id_dst_mask[s];

    avoid = start_try && (start_base_status == RS_BUSY);

    for (int i = 0; i < DEPTH; i++) begin
      logic started_now, started;
      started_now  = start_try && !avoid && (start_idx == ELQ_IDW'(i));
      started      = (ent[i].status == EL_BUSY) || (ent[i].status == EL_COMPLETE);
      inval_reg[i] = pending[i] && (started || started_now) && written[ent[i].breg];
      inval_mem[i] = pending[i] && st_valid &&
                     ((started     && (ent[i].adr[31:2] == st_addr[31:2])) ||
                      (started_now && (start_addr[31:2] == st_addr[31:2])));
    end
  end

endmodule
