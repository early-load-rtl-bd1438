// el_rst: register status table.
//
// One entry per architectural register records whether its value is ready in
// the register file, still being computed (busy) or held in an early load
// queue entry (rename, with ELQ_ID naming the entry). A Stage field, 3 bits
// wide by default (STAGE_W), counts down the cycles until a busy register's
// producer writes it back; a deeper pipeline whose latencies exceed 7 cycles
// needs a wider one.
//
// Update rules, following the description of the mechanism:
//  * when an instruction passes the decode (ID) point, each register it
//    writes becomes busy and Stage is loaded with its execution latency;
//  * Stage decreases by one per cycle; when it runs out the register is ready;
//  * when a load whose early-loaded data is used passes ID, its destination
//    register becomes rename and ELQ_ID records the ELQ entry.
// This design's own choices: the decode point handles W instructions per cycle
// in program order, so where two of them write the same register the younger
// one wins; a renamed register returns to ready when its load commits, which
// is when the host writes the loaded value back into the register file;
// a latency of 0 is treated as 1; reset makes every register ready.
//
// Timing: updates at the clock edge; lookups are combinational on the state.
// With latency L given in cycle t, the register reads busy in cycles
// t+1 .. t+L and ready from t+L+1, so the register file must hold the new
// value by then.
module el_rst
  import el_pkg::*;
#(
  parameter int unsigned W     = 2,   // decode width
  parameter int unsigned NLOOK = 4,   // operand lookup ports
  parameter int unsigned STAGE_W = STAGEW  // width of the Stage count-down
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // decode point
  input  logic [W-1:0]                      id_valid,
  input  logic [W-1:0][NREG-1:0]            id_dst_mask,   // registers written
  input  logic [W-1:0][STAGE_W-1:0]         id_lat,        // execution latency
  input  logic [W-1:0]                      id_rename,     // early-loaded data used
  input  logic [W-1:0][3:0]                 id_rename_reg, // its destination register
  input  logic [W-1:0][ELQ_IDW-1:0]         id_rename_elq, // its ELQ entry
  // load commit (ELQ entries deallocated)
  input  logic [W-1:0]                      commit_valid,
  input  logic [W-1:0][ELQ_IDW-1:0]         commit_elq,
  // lookups
  input  logic [NLOOK-1:0][3:0]             look_reg,
  output rst_entry_t [NLOOK-1:0]            look,
  // lookup of the base register of the early load being started
  input  logic [3:0]                        base_reg,
  output rst_entry_t                        base
);

  rst_entry_t         tbl   [NREG];
  logic [STAGE_W-1:0] stage [NREG];

  always_comb
    for (int p = 0; p < NLOOK; p++) look[p] = tbl[look_reg[p]];

  assign base = tbl[base_reg];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        tbl[r]   <= '{status: RS_READY, elq_id: '0};
        stage[r] <= '0;
      end
    end else begin
      for (int r = 0; r < NREG; r++) begin
        rst_entry_t         e;
        logic [STAGE_W-1:0] st;
        e  = tbl[r];
        st = stage[r];
        // count down and release
        if (e.status == RS_BUSY) begin
          if (st <= STAGE_W'(1)) begin
            e.status = RS_READY;
            st = '0;
          end else begin
            st = st - STAGE_W'(1);
          end
        end
        for (int c = 0; c < W; c++)
          if (commit_valid[c] && e.status == RS_RENAME && e.elq_id == commit_elq[c]) begin
            e.status = RS_READY;
            st = '0;
          end
        // new producers, oldest slot first so the youngest wins
        for (int s = 0; s < W; s++) begin
          if (id_valid[s] && id_rename[s] && id_rename_reg[s] == 4'(r)) begin
            e.status = RS_RENAME;
            e.elq_id = id_rename_elq[s];
            st = '0;
          end else if (id_valid[s] && id_dst_mask[s][r]) begin
            e.status = RS_BUSY;
            st = (id_lat[s] == '0) ? STAGE_W'(1) : id_lat[s];
          end
        end
        tbl[r]   <= e;
        stage[r] <= st;
      end
    end
  end

endmodule
