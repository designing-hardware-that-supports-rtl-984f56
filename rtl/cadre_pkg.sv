// cadre_pkg: types and constants shared by the deterministic-replay support logic.
//
// The design makes a board-level computer cycle-deterministic between two checkpoints.
// Every domain keeps a domain-clock count that a checkpoint broadcast resets to zero;
// source-synchronous buses tag each message with the low bits of the sender's count
// so that the receiver can hold it until the last cycle at which it could have
// arrived. The memory controller logs first overwrites (for rollback), makes refresh
// and scrubbing repeatable, and records I/O input for replay.
//
// The sizes below marked "assumed" are this design's choices; the document gives
// the mechanisms but no widths.
package cadre_pkg;

  // Domain-clock count width (assumed): 32 bits hold one second at up to 4 GHz.
  localparam int unsigned DC_W   = 32;
  // Tag width (document: "typically 1 or 2 bits"); W = 2**RHO_W.
  localparam int unsigned RHO_W  = 2;
  // Memory line address and data widths (assumed).
  localparam int unsigned ADDR_W = 12;
  localparam int unsigned DATA_W = 64;

  typedef logic [DC_W-1:0]   dcount_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;

  // Record/replay mode of the whole machine.
  typedef enum logic {MODE_RECORD = 1'b0, MODE_REPLAY = 1'b1} mode_e;

  // A memory request carried over a processor-to-memory link.
  typedef struct packed {
    logic  we;
    addr_t addr;
    data_t wdata;
  } mem_req_t;

  // Commands from the memory controller to the DRAM.
  typedef enum logic [1:0] {
    DRAM_RD    = 2'd0,
    DRAM_WR    = 2'd1,
    DRAM_REF   = 2'd2,   // refresh one row
    DRAM_SCRUB = 2'd3    // read, correct and write back one line
  } dram_cmd_e;

  // Event kinds recorded by the CPU log.
  typedef enum logic [1:0] {
    CPU_EV_DUTY  = 2'd0, // clock duty-cycle modulation setting
    CPU_EV_DVFS  = 2'd1, // voltage-frequency operating point
    CPU_EV_THERM = 2'd2, // thermal emergency interrupt
    CPU_EV_ECC   = 2'd3  // ECC failure (soft error) exception
  } cpu_ev_e;

  typedef struct packed {
    cpu_ev_e    kind;
    logic [7:0] value;
  } cpu_event_t;

  // One input-log entry payload: what the I/O side delivered in one cycle.
  typedef struct packed {
    logic       msg_valid;
    data_t      msg;
    logic       irq_valid;
    logic [7:0] irq_vec;
  } io_event_t;

endpackage
