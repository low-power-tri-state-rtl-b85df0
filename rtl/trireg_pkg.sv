// trireg_pkg: types and constants shared by the tri-state register file RTL.
//
// The register file holds physical registers whose cells can be in one of
// three electrical states: work (normal operation), drowsy (data kept with a
// gated, raised virtual ground) and dead (cells discharged to all zeros).
// The defaults below are the main configuration: 128 physical registers of
// 32 bits with two read ports. The write-port count, the counter widths and
// the tag width are choices of this design, not given numbers.
package trireg_pkg;

  // Default register file geometry (128 entries x 32 bits, two read ports).
  localparam int unsigned NREGS_DEF = 128;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned NRD       = 2;

  // Physical register tag width; every NREGS used must fit in it.
  localparam int unsigned PREG_W    = 7;

  // RegUse counter width (pending consumers) and CP counter width.
  // The CP counter must count up to the eight checkpoints of an
  // eight-deep checkpoint buffer, hence four bits.
  localparam int unsigned USE_W     = 4;
  localparam int unsigned CP_W      = 4;

  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [DATA_W-1:0] word_t;

  // Observed state of a register's cells.
  typedef enum logic [1:0] {
    RS_WORK   = 2'd0,  // dead=0, drowsy=0, holds live data
    RS_DROWSY = 2'd1,  // dead=0, drowsy=1, data retained for recovery
    RS_DEAD   = 2'd2   // released; cells discharged to zeros
  } reg_state_e;

  // A rename-time or commit-time event naming one physical register.
  typedef struct packed {
    logic  valid;
    preg_t preg;
  } preg_evt_t;

  // A consumer (source operand) being renamed. 'last' marks the consumer the
  // compiler identified as the last reader of this register version;
  // 'lconfree' is the compiler's LConFree hint that comes with it.
  typedef struct packed {
    logic  valid;
    preg_t preg;
    logic  last;
    logic  lconfree;
  } src_evt_t;

  // A register file read port request. 'consume' marks a read by a counted
  // consumer, which decrements that register's RegUse counter.
  typedef struct packed {
    logic  valid;
    preg_t preg;
    logic  consume;
  } rd_req_t;

  // The register file write port.
  typedef struct packed {
    logic  valid;
    preg_t preg;
    word_t data;
  } wr_req_t;

endpackage
