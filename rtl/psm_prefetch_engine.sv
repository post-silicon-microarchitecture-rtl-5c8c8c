// psm_prefetch_engine: fabric-side Prefetch Generation Engine with an
// adaptive prefetch distance, for a strided delinquent load inside a loop
// (for example node[i].state over i < size).
//
// From the retire stream (ObsQ-R) it snoops, by PC, the loop's base address,
// its iteration count and its stride, and counts retirements of the
// delinquent load itself to know which iteration the core has reached. It
// then generates PREFETCH operations for base + j*stride, j = 0 .. count-1,
// keeping j below (core iteration + distance), up to W per fabric cycle, into
// IntvQ-IS.
//
// Performance feedback: every WINDOW core iterations the engine compares the
// fabric cycles that window took with the previous window. If the loop got
// faster it keeps moving the distance in the same direction, otherwise it
// reverses; the distance moves by DIST_STEP and stays within
// [DIST_MIN, DIST_MAX]. The ROI ends with a payload whose disable-PSM flag is
// set, which stops the engine.
//
// Configuration registers (cfg_we, cfg_addr, cfg_data, fabric clock):
//   0 PC of the base-address snoop   1 PC of the iteration-count snoop
//   2 PC of the stride snoop         3 PC of the delinquent load
//   4 initial distance  5 DIST_MIN   6 DIST_MAX   7 DIST_STEP   8 WINDOW
// A base-address snoop restarts generation at j = 0.
//
// What the engine snoops and that it feeds IntvQ-IS with an adaptively chosen
// distance follows the architecture. The hill-climbing rule, the window
// length and the register map are this design's choices.
module psm_prefetch_engine
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
  // ObsQ-R pop side
  input  logic [CW-1:0]     obs_r_avail,
  input  obs_r_t            obs_r_data [W],
  output logic [CW-1:0]     obs_r_pop_n,
  // IntvQ-IS push side
  input  logic [CW-1:0]     intv_is_space,
  output intv_is_t          intv_is_data [W],
  output logic [CW-1:0]     intv_is_push_n,
  // status
  output logic              active,
  output logic [15:0]       distance,
  output logic [31:0]       dist_changes
);
  logic [PC_W-1:0] pc_base, pc_count, pc_stride, pc_load;
  logic [15:0]     dist_init, dist_min, dist_max, dist_step;
  logic [31:0]     window;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_base <= '0; pc_count <= '0; pc_stride <= '0; pc_load <= '0;
      dist_init <= 16'd8; dist_min <= 16'd1; dist_max <= 16'd64; dist_step <= 16'd2;
      window <= 32'd16;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        4'd0: pc_base   <= cfg_data[PC_W-1:0];
        4'd1: pc_count  <= cfg_data[PC_W-1:0];
        4'd2: pc_stride <= cfg_data[PC_W-1:0];
        4'd3: pc_load   <= cfg_data[PC_W-1:0];
        4'd4: dist_init <= cfg_data[15:0];
        4'd5: dist_min  <= cfg_data[15:0];
        4'd6: dist_max  <= cfg_data[15:0];
        4'd7: dist_step <= cfg_data[15:0];
        4'd8: window    <= cfg_data[31:0];
        default: ;
      endcase
    end
  end

  // Loop state.
  logic [ADDR_W-1:0] base_q, stride_q, next_addr_q;
  logic [31:0]       count_q, next_j_q, core_j_q;
  logic              dir_up_q;
  logic [31:0]       win_iters_q, win_cycles_q, prev_cycles_q;
  logic              have_prev_q;

  logic [ADDR_W-1:0] base_n, stride_n, next_addr_n;
  logic [31:0]       count_n, next_j_n, core_j_n;
  logic              active_n, dir_up_n, have_prev_n;
  logic [15:0]       dist_n;
  logic [31:0]       win_iters_n, win_cycles_n, prev_cycles_n, dist_changes_n;

  always_comb begin
    base_n = base_q; stride_n = stride_q; next_addr_n = next_addr_q;
    count_n = count_q; next_j_n = next_j_q; core_j_n = core_j_q;
    active_n = active; dir_up_n = dir_up_q; have_prev_n = have_prev_q;
    dist_n = distance; win_iters_n = win_iters_q; win_cycles_n = win_cycles_q + 1;
    prev_cycles_n = prev_cycles_q; dist_changes_n = dist_changes;
    obs_r_pop_n = obs_r_avail;
    intv_is_push_n = '0;
    for (int k = 0; k < W; k++) intv_is_data[k] = '{cmd: CMD_PREFETCH, addr: '0, size: 2'd0};

    // Consume every visible retire payload, oldest first.
    for (int k = 0; k < W; k++) begin
      if (k < int'(obs_r_avail) && !obs_r_data[k].squash) begin
        if (obs_r_data[k].pc == pc_stride) stride_n = obs_r_data[k].value[ADDR_W-1:0];
        if (obs_r_data[k].pc == pc_count)  count_n  = obs_r_data[k].value[31:0];
        if (obs_r_data[k].pc == pc_base) begin
          base_n        = obs_r_data[k].value[ADDR_W-1:0];
          next_addr_n   = obs_r_data[k].value[ADDR_W-1:0];
          next_j_n      = '0;
          core_j_n      = '0;
          active_n      = 1'b1;
          dist_n        = dist_init;
          dir_up_n      = 1'b1;
          have_prev_n   = 1'b0;
          win_iters_n   = '0;
          win_cycles_n  = '0;
        end
        if (obs_r_data[k].pc == pc_load && active_n) begin
          core_j_n    = core_j_n + 1;
          win_iters_n = win_iters_n + 1;
        end
        if (obs_r_data[k].cfg.disable_psm) active_n = 1'b0;
      end
    end

    // Performance feedback at the end of each window.
    if (active_n && win_iters_n >= window) begin
      if (have_prev_n && win_cycles_n >= prev_cycles_n) dir_up_n = !dir_up_n;
      if (have_prev_n) begin
        if (dir_up_n) dist_n = (dist_n + dist_step > dist_max) ? dist_max : dist_n + dist_step;
        else          dist_n = (dist_n < dist_min + dist_step) ? dist_min : dist_n - dist_step;
        dist_changes_n = dist_changes_n + 1;
      end
      have_prev_n   = 1'b1;
      prev_cycles_n = win_cycles_n;
      win_iters_n   = '0;
      win_cycles_n  = '0;
    end

    // Generate prefetches ahead of the core, at most distance iterations.
    for (int k = 0; k < W; k++) begin
      if (active_n && k < int'(intv_is_space) && next_j_n < count_n &&
          next_j_n < core_j_n + 32'(dist_n)) begin
        intv_is_data[k] = '{cmd: CMD_PREFETCH, addr: next_addr_n, size: 2'd0};
        intv_is_push_n  = intv_is_push_n + 1'b1;
        next_addr_n     = next_addr_n + stride_n;
        next_j_n        = next_j_n + 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q <= '0; stride_q <= '0; next_addr_q <= '0;
      count_q <= '0; next_j_q <= '0; core_j_q <= '0;
      active <= 1'b0; dir_up_q <= 1'b1; have_prev_q <= 1'b0;
      distance <= 16'd8; win_iters_q <= '0; win_cycles_q <= '0; prev_cycles_q <= '0;
      dist_changes <= '0;
    end else begin
      base_q <= base_n; stride_q <= stride_n; next_addr_q <= next_addr_n;
      count_q <= count_n; next_j_q <= next_j_n; core_j_q <= core_j_n;
      active <= active_n; dir_up_q <= dir_up_n; have_prev_q <= have_prev_n;
      distance <= dist_n; win_iters_q <= win_iters_n; win_cycles_q <= win_cycles_n;
      prev_cycles_q <= prev_cycles_n; dist_changes <= dist_changes_n;
    end
  end
endmodule
