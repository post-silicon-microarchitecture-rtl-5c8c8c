// psm_pkg: types and constants shared by the PSM-Agent, the queues and the
// reconfigurable-fabric designs.
//
// A Post-Silicon Microarchitecture (PSM) system couples an out-of-order core
// to a reconfigurable fabric through an agent that snoops retiring and
// fetched instructions and passes messages through observation and
// intervention queues. This package fixes the payload formats of those four
// queues and the six per-entry configuration flags of the Retire Snoop Table.
// The flag set, the fetch command set (BRANCH_DIR, SYNC, DONE, INSTRUCTION)
// and the issue command set (LOAD, PREFETCH) follow the architecture; the bit
// widths and encodings are this implementation's own choice.
package psm_pkg;

  // Widths of program counters, data addresses and data values.
  localparam int unsigned PC_W   = 48;
  localparam int unsigned ADDR_W = 48;
  localparam int unsigned DATA_W = 64;
  // Width of an injected instruction word carried by IntvQ-F.
  localparam int unsigned INSN_W = 32;

  // Configuration flags of one Retire Snoop Table entry.
  typedef struct packed {
    logic enable_psm;      // start of region of interest, queues enabled
    logic full_squash;     // mispredictions squash from the ROB head
    logic custom_bp;       // consult the agent for branch predictions
    logic disable_psm;     // end of region of interest, back to baseline
    logic enable_ifetch;   // squash, checkpoint, fetch from the agent
    logic disable_ifetch;  // restore checkpoint, fetch from the I-cache
  } rst_cfg_t;

  // Payload-type bits of a Retire Snoop Table entry.
  typedef struct packed {
    logic branch;          // carry the taken/not-taken direction
    logic dest_reg;        // carry the destination register value
  } rst_ptype_t;

  typedef struct packed {
    logic       valid;
    logic [PC_W-1:0] pc;
    rst_cfg_t   cfg;
    rst_ptype_t ptype;
  } rst_entry_t;

  // Observation Queue at Retire payload.
  typedef struct packed {
    logic              squash;  // marker: the core squashed while PSM was on
    logic [PC_W-1:0]   pc;
    rst_cfg_t          cfg;
    rst_ptype_t        ptype;
    logic              taken;   // valid when ptype.branch
    logic [DATA_W-1:0] value;   // valid when ptype.dest_reg
  } obs_r_t;

  // Intervention Queue at Fetch commands and payload.
  typedef enum logic [1:0] {
    CMD_BRANCH_DIR  = 2'd0,
    CMD_SYNC        = 2'd1,
    CMD_DONE        = 2'd2,
    CMD_INSTRUCTION = 2'd3
  } intv_f_cmd_e;

  typedef struct packed {
    logic [PC_W-1:0]   pc;
    intv_f_cmd_e       cmd;
    logic [INSN_W-1:0] data;   // bit 0 = direction for BRANCH_DIR, else instruction word
  } intv_f_t;

  // Intervention Queue at Issue commands and payload.
  typedef enum logic {
    CMD_LOAD     = 1'b0,
    CMD_PREFETCH = 1'b1
  } intv_is_cmd_e;

  typedef struct packed {
    intv_is_cmd_e      cmd;
    logic [ADDR_W-1:0] addr;
    logic [1:0]        size;   // log2 of the access size in bytes, LOAD only
  } intv_is_t;

  // Observation Queue at Execute payload.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] value;
  } obs_ex_t;

  // Configuration-port table selectors of the agent.
  typedef enum logic {
    CFG_RST = 1'b0,
    CFG_FST = 1'b1
  } cfg_sel_e;

endpackage
