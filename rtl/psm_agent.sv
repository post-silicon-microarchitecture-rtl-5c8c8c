// psm_agent: the PSM-Agent, the interface unit between an out-of-order core
// and a reconfigurable fabric that hosts application-specific
// microarchitecture.
//
// The agent runs on the core clock and has only limited configurability, so
// it can sit close to the pipeline. It contains:
//   * the Retire Snoop Table (psm_rst), which selects retiring instructions
//     to report and carries the mode-changing flags,
//   * the mode controller (psm_mode_ctrl),
//   * the Fetch Snoop Table with IntvQ-F handling (psm_fetch_intv),
//   * the IntvQ-IS issue logic with ObsQ-EX push (psm_issue_intv),
//   * four dual-clock queues (psm_queue): ObsQ-R and ObsQ-EX towards the
//     fabric, IntvQ-F and IntvQ-IS from it.
// The core side of each queue moves one payload per core cycle; the fabric
// side moves up to W per fabric cycle. When the core squashes while PSM is on
// (core_squash), the agent reports it to the fabric with a squash-marker
// payload in ObsQ-R (carrying the restart PC) so the fabric can resynchronise.
//
// Configuration: cfg_we writes entry cfg_idx of the table chosen by cfg_sel;
// an FST entry uses the valid and pc fields of cfg_entry. Retire, fetch and
// issue ports are as described in the sub-blocks. The structure follows the
// architecture; the squash marker is this design's way of telling the fabric
// about a squash.
module psm_agent
  import psm_pkg::*;
#(
  parameter int unsigned Q           = 32,
  parameter int unsigned W           = 4,
  parameter int unsigned RST_ENTRIES = 16,
  parameter int unsigned FST_ENTRIES = 16,
  localparam int unsigned CW         = $clog2(W + 1),
  localparam int unsigned IW         = $clog2((RST_ENTRIES > FST_ENTRIES) ? RST_ENTRIES : FST_ENTRIES)
) (
  input  logic clk,
  input  logic rst_n,
  // configuration
  input  logic              cfg_we,
  input  cfg_sel_e          cfg_sel,
  input  logic [IW-1:0]     cfg_idx,
  input  rst_entry_t        cfg_entry,
  // retire
  input  logic              retire_valid,
  input  logic [PC_W-1:0]   retire_pc,
  input  logic              retire_taken,
  input  logic [DATA_W-1:0] retire_value,
  output logic              retire_stall,
  // squashes
  input  logic              core_squash,
  input  logic [PC_W-1:0]   core_squash_pc,
  // modes and requests to the core
  output logic              psm_on,
  output logic              full_squash_mode,
  output logic              custom_bp_mode,
  output logic              ifetch_mode,
  output logic              squash_req,
  output logic              checkpoint_req,
  output logic              restore_req,
  // fetch
  input  logic              fetch_valid,
  input  logic [PC_W-1:0]   fetch_pc,
  output logic              fetch_stall,
  output logic              bp_override,
  output logic              bp_taken,
  output logic              inj_valid,
  output logic [PC_W-1:0]   inj_pc,
  output logic [INSN_W-1:0] inj_insn,
  // load lane
  input  logic              lane_bubble,
  output logic              issue_valid,
  output intv_is_t          issue_op,
  input  logic              resolve_valid,
  input  logic [DATA_W-1:0] resolve_data,
  // fabric side
  input  logic              rf_clk,
  input  logic              rf_rst_n,
  output logic [CW-1:0]     obs_r_avail,
  output obs_r_t            obs_r_data [W],
  input  logic [CW-1:0]     obs_r_pop_n,
  output logic [CW-1:0]     intv_f_space,
  input  intv_f_t           intv_f_data [W],
  input  logic [CW-1:0]     intv_f_push_n,
  output logic [CW-1:0]     intv_is_space,
  input  intv_is_t          intv_is_data [W],
  input  logic [CW-1:0]     intv_is_push_n,
  output logic [CW-1:0]     obs_ex_avail,
  output obs_ex_t           obs_ex_data [W],
  input  logic [CW-1:0]     obs_ex_pop_n,
  // status
  output logic              bp_done,
  output logic              bp_draining
);
  // ---------------- mode control and retire snooping ----------------
  logic     flag_valid;
  rst_cfg_t flags;
  logic     obsr_space1, rst_push;
  obs_r_t   rst_payload;
  logic [0:0] obsr_space;

  psm_rst #(.ENTRIES(RST_ENTRIES)) u_rst (
    .clk, .rst_n,
    .cfg_we (cfg_we && cfg_sel == CFG_RST),
    .cfg_idx(cfg_idx[$clog2(RST_ENTRIES)-1:0]),
    .cfg_entry,
    .retire_valid, .retire_pc, .retire_taken, .retire_value, .retire_stall,
    .psm_on, .flag_valid, .flags,
    .obs_space(obsr_space1), .obs_push(rst_push), .obs_payload(rst_payload)
  );

  psm_mode_ctrl u_mode (
    .clk, .rst_n, .flag_valid, .flags,
    .psm_on, .full_squash_mode, .custom_bp_mode, .ifetch_mode,
    .squash_req, .checkpoint_req, .restore_req
  );

  // Squash marker: queued behind any retire payload of the same cycle.
  logic            sq_pend;
  logic [PC_W-1:0] sq_pc;
  logic            sq_push;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq_pend <= 1'b0;
      sq_pc   <= '0;
    end else if (core_squash && psm_on) begin
      sq_pend <= 1'b1;
      sq_pc   <= core_squash_pc;
    end else if (sq_push || !psm_on) begin
      sq_pend <= 1'b0;
    end
  end
  assign sq_push     = sq_pend && !rst_push && obsr_space[0];
  assign obsr_space1 = obsr_space[0];

  logic [0:0] obsr_push_n;
  obs_r_t     obsr_push_data [1];
  always_comb begin
    obsr_push_n[0] = rst_push | sq_push;
    obsr_push_data[0] = rst_payload;
    if (!rst_push) begin
      obsr_push_data[0]        = '0;
      obsr_push_data[0].squash = 1'b1;
      obsr_push_data[0].pc     = sq_pc;
    end
  end

  psm_queue #(.T(obs_r_t), .DEPTH(Q), .PUSH_W(1), .POP_W(W)) u_obsq_r (
    .wclk(clk), .wrst_n(rst_n), .push_n(obsr_push_n), .push_data(obsr_push_data), .push_space(obsr_space),
    .rclk(rf_clk), .rrst_n(rf_rst_n), .pop_n(obs_r_pop_n), .pop_data(obs_r_data), .pop_avail(obs_r_avail)
  );

  // ---------------- fetch interventions ----------------
  logic [0:0] intvf_avail, intvf_pop;
  intv_f_t    intvf_head [1];
  logic       intvf_pop1;

  psm_queue #(.T(intv_f_t), .DEPTH(Q), .PUSH_W(W), .POP_W(1)) u_intvq_f (
    .wclk(rf_clk), .wrst_n(rf_rst_n), .push_n(intv_f_push_n), .push_data(intv_f_data), .push_space(intv_f_space),
    .rclk(clk), .rrst_n(rst_n), .pop_n(intvf_pop), .pop_data(intvf_head), .pop_avail(intvf_avail)
  );
  assign intvf_pop[0] = intvf_pop1;

  psm_fetch_intv #(.ENTRIES(FST_ENTRIES)) u_fetch (
    .clk, .rst_n,
    .cfg_we   (cfg_we && cfg_sel == CFG_FST),
    .cfg_idx  (cfg_idx[$clog2(FST_ENTRIES)-1:0]),
    .cfg_valid(cfg_entry.valid),
    .cfg_pc   (cfg_entry.pc),
    .psm_on, .custom_bp_mode, .ifetch_mode,
    .squash   (core_squash),
    .fetch_valid, .fetch_pc, .fetch_stall, .bp_override, .bp_taken,
    .inj_valid, .inj_pc, .inj_insn,
    .head_valid(intvf_avail[0]), .head(intvf_head[0]), .pop(intvf_pop1),
    .done(bp_done), .draining(bp_draining)
  );

  // ---------------- issue interventions and execute observations ----------------
  logic [0:0] intvis_avail, intvis_pop, obsex_space, obsex_push;
  intv_is_t   intvis_head [1];
  obs_ex_t    obsex_data [1];
  logic       intvis_pop1, obsex_push1;

  psm_queue #(.T(intv_is_t), .DEPTH(Q), .PUSH_W(W), .POP_W(1)) u_intvq_is (
    .wclk(rf_clk), .wrst_n(rf_rst_n), .push_n(intv_is_push_n), .push_data(intv_is_data), .push_space(intv_is_space),
    .rclk(clk), .rrst_n(rst_n), .pop_n(intvis_pop), .pop_data(intvis_head), .pop_avail(intvis_avail)
  );
  assign intvis_pop[0] = intvis_pop1;
  assign obsex_push[0] = obsex_push1;

  psm_issue_intv u_issue (
    .clk, .rst_n, .psm_on,
    .head_valid(intvis_avail[0]), .head(intvis_head[0]), .pop(intvis_pop1),
    .lane_bubble, .issue_valid, .issue_op, .resolve_valid, .resolve_data,
    .obs_space(obsex_space[0]), .obs_push(obsex_push1), .obs_payload(obsex_data[0])
  );

  psm_queue #(.T(obs_ex_t), .DEPTH(Q), .PUSH_W(1), .POP_W(W)) u_obsq_ex (
    .wclk(clk), .wrst_n(rst_n), .push_n(obsex_push), .push_data(obsex_data), .push_space(obsex_space),
    .rclk(rf_clk), .rrst_n(rf_rst_n), .pop_n(obs_ex_pop_n), .pop_data(obs_ex_data), .pop_avail(obs_ex_avail)
  );
endmodule
