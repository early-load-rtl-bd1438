// el_pkg: types and constants shared by the early-load blocks.
//
// The early-load mechanism lets a load instruction fetch its data from the
// data cache while it still waits in the instruction queue. The package holds
// the record formats of the early load queue (ELQ), of the register status
// table (RST), of the pre-decoder and of an instruction-queue entry.
//
// Field names and widths of the ELQ entry (Active, Status[1:0], BReg[3:0],
// Offset[11:0], Adr_mode[3:0], Adr[31:0], EL_Data[31:0]) and of the RST entry
// (Status[1:0], ELQ_ID[3:0], Stage[2:0]) follow the description of the
// mechanism. The numeric codes of the status values are this design's choice;
// they keep the order in which the states are listed (prepare, busy,
// complete, invalid and ready, busy, rename).
package el_pkg;

  localparam int unsigned NREG    = 16;  // ARM general purpose registers R0..R15
  localparam int unsigned ELQ_IDW = 4;   // width of an ELQ index (ELQ_ID[3:0])
  localparam int unsigned STAGEW  = 3;   // default width of the RST count-down (Stage[2:0])

  // ELQ entry status
  typedef enum logic [1:0] {
    EL_PREPARE  = 2'b00,
    EL_BUSY     = 2'b01,
    EL_COMPLETE = 2'b10,
    EL_INVALID  = 2'b11
  } elq_status_e;

  // RST register status
  typedef enum logic [1:0] {
    RS_READY  = 2'b00,
    RS_BUSY   = 2'b01,
    RS_RENAME = 2'b10
  } reg_status_e;

  // Pre-decode result of one instruction word.
  // adr_mode holds the ARM single-data-transfer bits {P, U, B, W}.
  typedef struct packed {
    logic        is_cand;   // early load candidate
    logic [3:0]  breg;      // base register Rn
    logic [3:0]  rd;        // destination register Rd
    logic [11:0] offset;    // immediate offset
    logic [3:0]  adr_mode;  // {P, U, B, W}
  } predec_t;

  // Instruction-queue entry: the instruction word and its ELQ tag.
  typedef struct packed {
    logic [31:0]        instr;
    logic               el_cand;  // has an ELQ entry
    logic [ELQ_IDW-1:0] elq_id;   // that entry
  } iq_entry_t;

  // Early load queue entry.
  typedef struct packed {
    logic               active;
    elq_status_e        status;
    logic [3:0]         breg;
    logic [11:0]        offset;
    logic [3:0]         adr_mode;
    logic [31:0]        adr;
    logic [31:0]        el_data;
  } elq_entry_t;

  // Register status table entry as seen by a lookup (the Stage count-down is
  // kept inside the table, whose width is a parameter of el_rst).
  typedef struct packed {
    reg_status_e        status;
    logic [ELQ_IDW-1:0] elq_id;
  } rst_entry_t;

  // Per-cycle event flags of the early-load unit, for performance counters.
  typedef struct packed {
    logic [1:0] alloc;        // candidates entered into the ELQ
    logic       elq_full;     // a candidate found no free ELQ entry
    logic       activate;     // the lookahead pointer activated an entry
    logic       start;        // an early load was sent to the load/store unit
    logic       avoid;        // case 1: start suppressed, base register busy
    logic       inval_reg;    // case 2: started early load invalidated by a register write
    logic       inval_mem;    // case 3: started early load invalidated by a store address
    logic       complete;     // early-loaded data returned
    logic       dmiss;        // early load missed in the data cache
    logic [1:0] hit;          // loads at decode that use early-loaded data
    logic [1:0] fallback;     // candidate loads at decode that execute normally
    logic       st_block;     // a load at decode was held off by an unresolved store
    logic       rename_read;  // an operand was read from the ELQ through a rename
    logic       lsu_wait;     // an early load is ready but the load/store unit is taken
    logic       base_renamed; // an early load started with its base read from the ELQ
  } el_events_t;

  // Position bits of {P, U, B, W} inside adr_mode.
  localparam int unsigned AM_P = 3;
  localparam int unsigned AM_U = 2;
  localparam int unsigned AM_B = 1;
  localparam int unsigned AM_W = 0;

endpackage
