// psm_ldl_prefetch: fabric-side prefetcher for load-dependent loads (pointer
// chasing such as a[i]->field).
//
// The loop walks an array of pointers, element j at base + j*stride, and then
// loads through each pointer. Three streams run over the iteration index j,
// all ahead of the core's retire stream (iteration r, counted from
// retirements of a configured load):
//   * Prefetch stream: PREFETCH base + j*stride for j < r + PF_DIST, so the
//     pointers are already cached when they are loaded;
//   * Load stream: LOAD base + j*stride, kept LD_DELAY iterations behind the
//     prefetch stream so that a Load OP rarely misses and blocks IntvQ-IS
//     (only one Load OP executes at a time, pinned at the queue head);
//   * Load-dependent prefetch stream: every loaded pointer value returned
//     through ObsQ-EX produces PREFETCH value + DEP_OFFSET.
// Each fabric cycle fills up to W IntvQ-IS slots, load-dependent prefetches
// first, then loads, then prefetches. A base-address snoop restarts all
// streams; a payload with the disable-PSM flag stops them.
//
// Configuration registers (fabric clock): 0 PC of the base snoop, 1 PC of the
// count snoop, 2 PC of the progress load, 3 stride, 4 PF_DIST, 5 LD_DELAY,
// 6 DEP_OFFSET, 7 load size (log2 bytes).
//
// The three streams, the Load-delay Distance and the use of ObsQ-EX follow
// the architecture; the slot priority, the register map and counting progress
// from one retiring load are this design's choices.
module psm_ldl_prefetch
  import psm_pkg::*;
#(
  parameter int unsigned W  = 4,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic              cfg_we,
  input  logic [3:0]        cfg_addr,
  input  logic [63:0]       cfg_data,
  input  logic [CW-1:0]     obs_r_avail,
  input  obs_r_t            obs_r_data [W],
  output logic [CW-1:0]     obs_r_pop_n,
  input  logic [CW-1:0]     obs_ex_avail,
  input  obs_ex_t           obs_ex_data [W],
  output logic [CW-1:0]     obs_ex_pop_n,
  input  logic [CW-1:0]     intv_is_space,
  output intv_is_t          intv_is_data [W],
  output logic [CW-1:0]     intv_is_push_n,
  output logic              active,
  output logic [31:0]       n_prefetch,
  output logic [31:0]       n_load,
  output logic [31:0]       n_dep_prefetch
);
  logic [PC_W-1:0]   pc_base, pc_count, pc_iter;
  logic [ADDR_W-1:0] stride, dep_off;
  logic [31:0]       pf_dist, ld_delay;
  logic [1:0]        ld_size;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_base <= '0; pc_count <= '0; pc_iter <= '0;
      stride <= ADDR_W'(8); pf_dist <= 32'd16; ld_delay <= 32'd4; dep_off <= '0; ld_size <= 2'd3;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        4'd0: pc_base  <= cfg_data[PC_W-1:0];
        4'd1: pc_count <= cfg_data[PC_W-1:0];
        4'd2: pc_iter  <= cfg_data[PC_W-1:0];
        4'd3: stride   <= cfg_data[ADDR_W-1:0];
        4'd4: pf_dist  <= cfg_data[31:0];
        4'd5: ld_delay <= cfg_data[31:0];
        4'd6: dep_off  <= cfg_data[ADDR_W-1:0];
        4'd7: ld_size  <= cfg_data[1:0];
        default: ;
      endcase
    end
  end

  logic [ADDR_W-1:0] pf_addr_q, ld_addr_q, pf_addr_n, ld_addr_n;
  logic [31:0] count_q, pf_j_q, ld_j_q, core_j_q, count_n, pf_j_n, ld_j_n, core_j_n;
  logic [31:0] n_pf_n, n_ld_n, n_dep_n;
  logic        active_n;

  always_comb begin
    int slot;
    pf_addr_n = pf_addr_q; ld_addr_n = ld_addr_q;
    count_n = count_q; pf_j_n = pf_j_q; ld_j_n = ld_j_q; core_j_n = core_j_q;
    n_pf_n = n_prefetch; n_ld_n = n_load; n_dep_n = n_dep_prefetch;
    active_n = active;
    obs_r_pop_n = obs_r_avail;
    for (int k = 0; k < W; k++) intv_is_data[k] = '{cmd: CMD_PREFETCH, addr: '0, size: 2'd0};

    for (int k = 0; k < W; k++) begin
      if (k < int'(obs_r_avail) && !obs_r_data[k].squash) begin
        if (obs_r_data[k].pc == pc_count) count_n = obs_r_data[k].value[31:0];
        if (obs_r_data[k].pc == pc_base) begin
          pf_addr_n = obs_r_data[k].value[ADDR_W-1:0];
          ld_addr_n = obs_r_data[k].value[ADDR_W-1:0];
          pf_j_n = '0; ld_j_n = '0; core_j_n = '0;
          active_n = 1'b1;
        end
        if (obs_r_data[k].pc == pc_iter && active_n) core_j_n = core_j_n + 1;
        if (obs_r_data[k].cfg.disable_psm) active_n = 1'b0;
      end
    end

    slot = 0;
    // Load-dependent prefetches from returned pointer values.
    obs_ex_pop_n = '0;
    for (int k = 0; k < W; k++) begin
      if (k < int'(obs_ex_avail) && slot < int'(intv_is_space)) begin
        intv_is_data[slot] = '{cmd: CMD_PREFETCH, addr: obs_ex_data[k].value[ADDR_W-1:0] + dep_off, size: 2'd0};
        slot         = slot + 1;
        obs_ex_pop_n = obs_ex_pop_n + 1'b1;
        n_dep_n      = n_dep_n + 1;
      end
    end
    // Load stream, LD_DELAY iterations behind the prefetch stream.
    for (int k = 0; k < W; k++) begin
      if (active_n && slot < int'(intv_is_space) && ld_j_n < count_n &&
          (ld_j_n + ld_delay < pf_j_n || pf_j_n >= count_n)) begin
        intv_is_data[slot] = '{cmd: CMD_LOAD, addr: ld_addr_n, size: ld_size};
        slot      = slot + 1;
        ld_addr_n = ld_addr_n + stride;
        ld_j_n    = ld_j_n + 1;
        n_ld_n    = n_ld_n + 1;
      end
    end
    // Prefetch stream, PF_DIST iterations ahead of retirement.
    for (int k = 0; k < W; k++) begin
      if (active_n && slot < int'(intv_is_space) && pf_j_n < count_n &&
          pf_j_n < core_j_n + pf_dist) begin
        intv_is_data[slot] = '{cmd: CMD_PREFETCH, addr: pf_addr_n, size: 2'd0};
        slot      = slot + 1;
        pf_addr_n = pf_addr_n + stride;
        pf_j_n    = pf_j_n + 1;
        n_pf_n    = n_pf_n + 1;
      end
    end
    intv_is_push_n = CW'(slot);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_addr_q <= '0; ld_addr_q <= '0; count_q <= '0; pf_j_q <= '0; ld_j_q <= '0; core_j_q <= '0;
      n_prefetch <= '0; n_load <= '0; n_dep_prefetch <= '0; active <= 1'b0;
    end else begin
      pf_addr_q <= pf_addr_n; ld_addr_q <= ld_addr_n; count_q <= count_n;
      pf_j_q <= pf_j_n; ld_j_q <= ld_j_n; core_j_q <= core_j_n;
      n_prefetch <= n_pf_n; n_load <= n_ld_n; n_dep_prefetch <= n_dep_n; active <= active_n;
    end
  end
endmodule
