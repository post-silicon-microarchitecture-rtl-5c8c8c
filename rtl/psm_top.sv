// psm_top: a Post-Silicon Microarchitecture (PSM) system, the agent that
// attaches to an out-of-order core plus the reconfigurable-fabric region that
// hosts an application-specific microarchitecture component.
//
// Two clock domains meet here. On the core clock (clk) the PSM-Agent snoops
// retiring and fetched instructions, changes the core's execution modes and
// feeds the core custom branch predictions, injected instructions and
// prefetch/load operations. On the fabric clock (rf_clk), which may be
// several times slower, the fabric region holds the component loaded for the
// current application. The four use-case designs are all built and a fabric
// configuration register (rf_sel) chooses which one is connected to the
// queues, standing in for loading a configuration bitstream:
//   0 psm_exact_bp        decoupled custom branch predictor  (IntvQ-F)
//   1 psm_cfd             control-flow decoupling             (IntvQ-F)
//   2 psm_prefetch_engine strided prefetcher, adaptive distance (IntvQ-IS)
//   3 psm_ldl_prefetch    load-dependent load prefetcher     (IntvQ-IS, ObsQ-EX)
// Designs that are not selected see no observation payloads and their
// interventions are not pushed. rf_busy shows which designs are active.
//
// Core-side ports are those of psm_agent. Fabric configuration: rf_cfg_we
// writes register rf_cfg_addr of the design rf_cfg_target (0..3 as above);
// rf_cfg_target 4 writes rf_sel. Each design's activity counters are brought
// out as status.
//
// The agent/fabric split and the queues follow the architecture; selecting
// among fixed designs by a register is this design's stand-in for the
// reconfigurable fabric, which is not modelled.
module psm_top
  import psm_pkg::*;
#(
  parameter int unsigned Q           = 32,
  parameter int unsigned W           = 4,
  parameter int unsigned RST_ENTRIES = 16,
  parameter int unsigned FST_ENTRIES = 16,
  localparam int unsigned IW         = $clog2((RST_ENTRIES > FST_ENTRIES) ? RST_ENTRIES : FST_ENTRIES)
) (
  // core clock domain
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  cfg_sel_e          cfg_sel,
  input  logic [IW-1:0]     cfg_idx,
  input  rst_entry_t        cfg_entry,
  input  logic              retire_valid,
  input  logic [PC_W-1:0]   retire_pc,
  input  logic              retire_taken,
  input  logic [DATA_W-1:0] retire_value,
  output logic              retire_stall,
  input  logic              core_squash,
  input  logic [PC_W-1:0]   core_squash_pc,
  output logic              psm_on,
  output logic              full_squash_mode,
  output logic              custom_bp_mode,
  output logic              ifetch_mode,
  output logic              squash_req,
  output logic              checkpoint_req,
  output logic              restore_req,
  input  logic              fetch_valid,
  input  logic [PC_W-1:0]   fetch_pc,
  output logic              fetch_stall,
  output logic              bp_override,
  output logic              bp_taken,
  output logic              inj_valid,
  output logic [PC_W-1:0]   inj_pc,
  output logic [INSN_W-1:0] inj_insn,
  input  logic              lane_bubble,
  output logic              issue_valid,
  output intv_is_t          issue_op,
  input  logic              resolve_valid,
  input  logic [DATA_W-1:0] resolve_data,
  output logic              bp_done,
  output logic              bp_draining,
  // fabric clock domain
  input  logic              rf_clk,
  input  logic              rf_rst_n,
  input  logic              rf_cfg_we,
  input  logic [2:0]        rf_cfg_target,
  input  logic [3:0]        rf_cfg_addr,
  input  logic [63:0]       rf_cfg_data,
  output logic [1:0]        rf_sel,
  // fabric status
  output logic [31:0]       exact_n_pred,
  output logic [31:0]       exact_n_resync,
  output logic [31:0]       exact_n_run_ahead,
  output logic [31:0]       exact_n_done,
  output logic [31:0]       exact_n_commit,
  output logic [31:0]       cfd_n_insn,
  output logic [31:0]       cfd_n_outcome,
  output logic [31:0]       cfd_n_forced,
  output logic [15:0]       pf_distance,
  output logic [31:0]       pf_dist_changes,
  output logic [31:0]       ldl_n_prefetch,
  output logic [31:0]       ldl_n_load,
  output logic [31:0]       ldl_n_dep_prefetch,
  output logic [3:0]        rf_busy
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [CW-1:0] obs_r_avail, obs_r_pop_n, intv_f_space, intv_f_push_n;
  logic [CW-1:0] intv_is_space, intv_is_push_n, obs_ex_avail, obs_ex_pop_n;
  obs_r_t        obs_r_data   [W];
  intv_f_t       intv_f_data  [W];
  intv_is_t      intv_is_data [W];
  obs_ex_t       obs_ex_data  [W];

  psm_agent #(.Q(Q), .W(W), .RST_ENTRIES(RST_ENTRIES), .FST_ENTRIES(FST_ENTRIES)) u_agent (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_idx, .cfg_entry,
    .retire_valid, .retire_pc, .retire_taken, .retire_value, .retire_stall,
    .core_squash, .core_squash_pc,
    .psm_on, .full_squash_mode, .custom_bp_mode, .ifetch_mode,
    .squash_req, .checkpoint_req, .restore_req,
    .fetch_valid, .fetch_pc, .fetch_stall, .bp_override, .bp_taken,
    .inj_valid, .inj_pc, .inj_insn,
    .lane_bubble, .issue_valid, .issue_op, .resolve_valid, .resolve_data,
    .rf_clk, .rf_rst_n,
    .obs_r_avail, .obs_r_data, .obs_r_pop_n,
    .intv_f_space, .intv_f_data, .intv_f_push_n,
    .intv_is_space, .intv_is_data, .intv_is_push_n,
    .obs_ex_avail, .obs_ex_data, .obs_ex_pop_n,
    .bp_done, .bp_draining
  );

  // ---------------- fabric region ----------------
  always_ff @(posedge rf_clk or negedge rf_rst_n) begin
    if (!rf_rst_n)                            rf_sel <= 2'd0;
    else if (rf_cfg_we && rf_cfg_target == 3'd4) rf_sel <= rf_cfg_data[1:0];
  end

  logic [3:0] cfg_we_d;
  always_comb for (int d = 0; d < 4; d++) cfg_we_d[d] = rf_cfg_we && rf_cfg_target == 3'(d);

  // Per-design views of the queues: only the selected design sees payloads
  // and space.
  logic [CW-1:0] d_obs_r_avail [4], d_obs_r_pop [4];
  logic [CW-1:0] d_push_n [4];
  logic [CW-1:0] ex_f_space, cfd_f_space, pf_is_space, ldl_is_space, ldl_ex_avail, ldl_ex_pop;
  intv_f_t       exact_f_data [W], cfd_f_data [W];
  intv_is_t      pf_is_data [W], ldl_is_data [W];
  logic          exact_busy, cfd_running, pf_active, ldl_active;

  assign rf_busy = {ldl_active, pf_active, cfd_running, exact_busy};

  always_comb begin
    for (int d = 0; d < 4; d++) d_obs_r_avail[d] = (rf_sel == 2'(d)) ? obs_r_avail : '0;
    obs_r_pop_n   = d_obs_r_pop[rf_sel];
    ex_f_space    = (rf_sel == 2'd0) ? intv_f_space  : '0;
    cfd_f_space   = (rf_sel == 2'd1) ? intv_f_space  : '0;
    pf_is_space   = (rf_sel == 2'd2) ? intv_is_space : '0;
    ldl_is_space  = (rf_sel == 2'd3) ? intv_is_space : '0;
    ldl_ex_avail  = (rf_sel == 2'd3) ? obs_ex_avail  : '0;
    // Operations returned while no design consumes them are dropped.
    obs_ex_pop_n  = (rf_sel == 2'd3) ? ldl_ex_pop : obs_ex_avail;
    intv_f_push_n = (rf_sel == 2'd0) ? d_push_n[0] : (rf_sel == 2'd1) ? d_push_n[1] : '0;
    intv_is_push_n = (rf_sel == 2'd2) ? d_push_n[2] : (rf_sel == 2'd3) ? d_push_n[3] : '0;
    for (int k = 0; k < W; k++) begin
      intv_f_data[k]  = (rf_sel == 2'd1) ? cfd_f_data[k] : exact_f_data[k];
      intv_is_data[k] = (rf_sel == 2'd3) ? ldl_is_data[k] : pf_is_data[k];
    end
  end

  psm_exact_bp #(.W(W)) u_exact (
    .clk(rf_clk), .rst_n(rf_rst_n),
    .cfg_we(cfg_we_d[0]), .cfg_addr(rf_cfg_addr), .cfg_data(rf_cfg_data),
    .obs_r_avail(d_obs_r_avail[0]), .obs_r_data, .obs_r_pop_n(d_obs_r_pop[0]),
    .intv_f_space(ex_f_space), .intv_f_data(exact_f_data), .intv_f_push_n(d_push_n[0]),
    .busy(exact_busy), .n_pred(exact_n_pred), .n_resync(exact_n_resync),
    .n_run_ahead(exact_n_run_ahead), .n_done(exact_n_done), .n_commit(exact_n_commit)
  );

  psm_cfd #(.W(W)) u_cfd (
    .clk(rf_clk), .rst_n(rf_rst_n),
    .cfg_we(cfg_we_d[1]), .cfg_addr(rf_cfg_addr), .cfg_data(rf_cfg_data),
    .obs_r_avail(d_obs_r_avail[1]), .obs_r_data, .obs_r_pop_n(d_obs_r_pop[1]),
    .intv_f_space(cfd_f_space), .intv_f_data(cfd_f_data), .intv_f_push_n(d_push_n[1]),
    .running(cfd_running), .n_insn(cfd_n_insn), .n_outcome(cfd_n_outcome), .n_forced(cfd_n_forced)
  );

  psm_prefetch_engine #(.W(W)) u_pf (
    .clk(rf_clk), .rst_n(rf_rst_n),
    .cfg_we(cfg_we_d[2]), .cfg_addr(rf_cfg_addr), .cfg_data(rf_cfg_data),
    .obs_r_avail(d_obs_r_avail[2]), .obs_r_data, .obs_r_pop_n(d_obs_r_pop[2]),
    .intv_is_space(pf_is_space), .intv_is_data(pf_is_data), .intv_is_push_n(d_push_n[2]),
    .active(pf_active), .distance(pf_distance), .dist_changes(pf_dist_changes)
  );

  psm_ldl_prefetch #(.W(W)) u_ldl (
    .clk(rf_clk), .rst_n(rf_rst_n),
    .cfg_we(cfg_we_d[3]), .cfg_addr(rf_cfg_addr), .cfg_data(rf_cfg_data),
    .obs_r_avail(d_obs_r_avail[3]), .obs_r_data, .obs_r_pop_n(d_obs_r_pop[3]),
    .obs_ex_avail(ldl_ex_avail), .obs_ex_data, .obs_ex_pop_n(ldl_ex_pop),
    .intv_is_space(ldl_is_space), .intv_is_data(ldl_is_data), .intv_is_push_n(d_push_n[3]),
    .active(ldl_active), .n_prefetch(ldl_n_prefetch), .n_load(ldl_n_load),
    .n_dep_prefetch(ldl_n_dep_prefetch)
  );
endmodule
