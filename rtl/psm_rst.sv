// psm_rst: Retire Snoop Table of the PSM-Agent.
//
// Each entry holds a PC, six configuration flags (enable/disable PSM, full
// squash, custom branch prediction, enable/disable instruction fetch) and two
// payload-type bits (branch direction, destination register). Every core cycle
// the retiring instruction's PC is compared with all entries in parallel. On a
// hit the table builds an Observation-Queue-at-Retire payload (PC, the flags,
// the taken flag if the branch bit is set, the destination value if the
// destination bit is set) and reports the entry's flags to the mode
// controller. Payloads are pushed only while PSM is on, or by the entry that
// turns it on.
//
// Interface: a configuration write port loads one entry per cycle. The retire
// port takes one instruction per core cycle. If a payload must be pushed but
// the queue is full, retire_stall asks the core to hold that instruction and
// nothing is reported until it retires. Lookup is combinational: hit, flags
// and payload appear in the cycle the instruction retires.
//
// The entry contents and the match-then-push behaviour follow the
// architecture. The number of entries, one lookup per cycle, lowest-index
// priority and stalling retirement on a full queue are choices of this design.
module psm_rst
  import psm_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic clk,
  input  logic rst_n,
  // configuration
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  rst_entry_t                 cfg_entry,
  // retire port
  input  logic              retire_valid,
  input  logic [PC_W-1:0]   retire_pc,
  input  logic              retire_taken,
  input  logic [DATA_W-1:0] retire_value,
  output logic              retire_stall,
  // mode
  input  logic              psm_on,
  output logic              flag_valid,
  output rst_cfg_t          flags,
  // ObsQ-R push side
  input  logic              obs_space,
  output logic              obs_push,
  output obs_r_t            obs_payload
);
  rst_entry_t tbl [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else if (cfg_we) begin
      tbl[cfg_idx] <= cfg_entry;
    end
  end

  logic       hit;
  rst_entry_t hit_e;
  logic       want_push;

  always_comb begin
    hit   = 1'b0;
    hit_e = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].pc == retire_pc) begin
        hit   = retire_valid;
        hit_e = tbl[i];
      end
    end
    want_push                 = hit && (psm_on || hit_e.cfg.enable_psm);
    retire_stall              = want_push && !obs_space;
    obs_push                  = want_push && obs_space;
    flag_valid                = hit && !retire_stall;
    flags                     = hit_e.cfg;
    obs_payload.squash        = 1'b0;
    obs_payload.pc            = retire_pc;
    obs_payload.cfg           = hit_e.cfg;
    obs_payload.ptype         = hit_e.ptype;
    obs_payload.taken         = hit_e.ptype.branch & retire_taken;
    obs_payload.value         = hit_e.ptype.dest_reg ? retire_value : '0;
  end
endmodule
