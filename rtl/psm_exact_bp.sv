// psm_exact_bp: fabric-side decoupled branch predictor for a worklist-driven
// graph walk (astar's makebound2): for each index taken from an input
// worklist, each of its 8 grid neighbours index1 is tested against a waymap
// ("already visited in this fill?", branch E) and, if not visited, against a
// maparp map (branch F); neighbours that pass are marked visited and appended
// to the output worklist. Input and output worklists swap on every call.
//
// The predictor mirrors the program's data instead of learning from branch
// history (active update): the branches are predicted from index1 itself.
//   * Worklist mirrors A/B (wl[0], wl[1]) and an architectural state that
//     follows the retire stream: START (the first worklist element), CALL
//     (worklists swap), INDEX (arch pointer advances), E and F outcomes, G
//     (output-worklist store) and H (waymap store). This is the retire update
//     unit.
//   * A speculative pointer (spec) reads indices ahead of the core, forms the
//     8 index1 values, looks up the direct-mapped waymap and maparp tables and
//     sends BRANCH_DIR predictions for E and F into IntvQ-F, up to W per
//     fabric cycle. When it predicts that a neighbour is added, it marks the
//     waymap entry visited and appends index1 to its own copy of the output
//     worklist, so it can run on into the next worklist while the core is
//     still in the current one (at most one worklist ahead). Every speculative
//     waymap write is recorded in an undo log; the matching retired H store
//     commits it.
//   * waymap entries hold a fill epoch (visited = entry equals the current
//     epoch), so starting a new fill needs no clearing; maparp entries hold
//     the "map cell is zero" bit learned from retired F branches.
//   * Resynchronisation: a squash marker in ObsQ-R (a misprediction squashed
//     the core) makes the block roll back all uncommitted speculative waymap
//     writes from the undo log and send SYNC (PC of the INDEX load), so the
//     core uses its own predictions until it fetches the next INDEX load.
//     When that load retires, every store of the previous index has retired
//     too, so the speculative state is copied from the architectural state
//     and prediction resumes with that index. The core may stall briefly on
//     its first predicted branch while this happens.
//   * When it runs out of worklist entries it sends DONE.
//
// Configuration registers (fabric clock): 0 START PC, 1 CALL PC, 2 INDEX PC,
// 3 branch E PC, 4 branch F PC, 5 store G PC, 6 store H PC, 7 yoffset (grid
// row pitch), 8 polarity (bit 0: E taken means "not visited"; bit 1: F taken
// means "maparp is zero").
//
// The structure (worklist mirrors, arch/spec pointers, index1 generation,
// waymap/maparp tables, undo log, retire update unit, IntvQ-F output) follows
// the architecture; the epoch tags, the resynchronisation protocol, the
// neighbour order and the table organisation are this design's choices.
// After reset, and when the 8-bit epoch wraps, both tables are cleared one
// entry per cycle (MP_ENTRIES cycles) before predictions start. The START
// payload marks the start cell visited in the new epoch (except right after
// a wrap, where the clear overwrites it and the first E test of the start
// cell may mispredict once).
module psm_exact_bp
  import psm_pkg::*;
#(
  parameter int unsigned W          = 4,
  parameter int unsigned WL_DEPTH   = 512,
  parameter int unsigned WM_ENTRIES = 16384,   // 8-bit entries: 16 KB
  parameter int unsigned MP_ENTRIES = 131072,  // 1-bit entries: 16 KB
  parameter int unsigned ULOG_DEPTH = 512,
  localparam int unsigned CW        = $clog2(W + 1)
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
  // IntvQ-F push side
  input  logic [CW-1:0]     intv_f_space,
  output intv_f_t           intv_f_data [W],
  output logic [CW-1:0]     intv_f_push_n,
  // status
  output logic              busy,
  output logic [31:0]       n_pred,
  output logic [31:0]       n_resync,
  output logic [31:0]       n_run_ahead,
  output logic [31:0]       n_done,
  output logic [31:0]       n_commit
);
  localparam int unsigned IDX_W = 32;
  localparam int unsigned PW    = $clog2(WL_DEPTH + 1);
  localparam int unsigned WMA   = $clog2(WM_ENTRIES);
  localparam int unsigned MPA   = $clog2(MP_ENTRIES);
  localparam int unsigned ULA   = $clog2(ULOG_DEPTH);
  localparam int unsigned SWA   = (MPA > WMA) ? MPA : WMA;
  localparam int unsigned NWP   = 2 * W + 1;   // waymap write ports

  typedef enum logic [2:0] {S_SWEEP, S_IDLE, S_RUN, S_ROLLBACK, S_WAITC, S_DONE} state_e;
  typedef enum logic {PH_E, PH_F} phase_e;
  typedef struct packed {
    logic [WMA-1:0] addr;
    logic [7:0]     old;
  } ulog_t;

  // ---------------- configuration ----------------
  logic [PC_W-1:0] pc_start, pc_call, pc_index, pc_e, pc_f, pc_g, pc_h;
  logic [IDX_W-1:0] yoff;
  logic [1:0]       pol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_start <= '0; pc_call <= '0; pc_index <= '0; pc_e <= '0; pc_f <= '0; pc_g <= '0; pc_h <= '0;
      yoff <= IDX_W'(64); pol <= 2'b11;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        4'd0: pc_start <= cfg_data[PC_W-1:0];
        4'd1: pc_call  <= cfg_data[PC_W-1:0];
        4'd2: pc_index <= cfg_data[PC_W-1:0];
        4'd3: pc_e     <= cfg_data[PC_W-1:0];
        4'd4: pc_f     <= cfg_data[PC_W-1:0];
        4'd5: pc_g     <= cfg_data[PC_W-1:0];
        4'd6: pc_h     <= cfg_data[PC_W-1:0];
        4'd7: yoff     <= cfg_data[IDX_W-1:0];
        4'd8: pol      <= cfg_data[1:0];
        default: ;
      endcase
    end
  end

  // Neighbour k of index: row above (k = 0..2), same row (3, 4), row below (5..7).
  function automatic logic [IDX_W-1:0] neighbour(logic [IDX_W-1:0] idx, logic [2:0] k,
                                                 logic [IDX_W-1:0] y);
    unique case (k)
      3'd0: return idx - y - 1;
      3'd1: return idx - y;
      3'd2: return idx - y + 1;
      3'd3: return idx - 1;
      3'd4: return idx + 1;
      3'd5: return idx + y - 1;
      3'd6: return idx + y;
      default: return idx + y + 1;
    endcase
  endfunction

  // ---------------- storage ----------------
  logic [IDX_W-1:0] wl [2][WL_DEPTH];
  logic [7:0]       waymap [WM_ENTRIES];
  logic             maparp [MP_ENTRIES];
  ulog_t            ulog [ULOG_DEPTH];

  // ---------------- state ----------------
  state_e          state, state_n;
  logic [7:0]      epoch, epoch_n;
  logic            run_after, run_after_n;
  logic [SWA:0]    sweep, sweep_n;
  // architectural (retire-side) state
  logic            a_in, a_in_n;                 // buffer holding the input worklist
  logic [PW-1:0]   a_in_len, a_in_len_n, a_ptr, a_ptr_n, a_out_len, a_out_len_n;
  logic [7:0]      a_gen, a_gen_n;
  logic [IDX_W-1:0] a_idx, a_idx_n, a_i1, a_i1_n;
  logic [3:0]      a_k, a_k_n;
  // speculative state
  logic            s_in, s_in_n;
  logic [PW-1:0]   s_in_len, s_in_len_n, s_ptr, s_ptr_n, s_out_len, s_out_len_n;
  logic [7:0]      s_gen, s_gen_n;
  logic [IDX_W-1:0] s_idx, s_idx_n;
  logic [2:0]      s_k, s_k_n;
  phase_e          s_ph, s_ph_n;
  logic            s_sync, s_sync_n;
  // undo log
  logic [ULA:0]    u_cnt, u_cnt_n;
  logic [ULA-1:0]  u_head, u_head_n;
  // statistics
  logic [31:0]     n_pred_n, n_resync_n, n_run_ahead_n, n_done_n, n_commit_n;

  // write requests
  logic           wm_we [NWP];
  logic [WMA-1:0] wm_wa [NWP];
  logic [7:0]     wm_wd [NWP];
  logic           mp_we [W + 1];
  logic [MPA-1:0] mp_wa [W + 1];
  logic           mp_wd [W + 1];
  logic           wl_we [2 * W];
  logic           wl_wb [2 * W];
  logic [PW-1:0]  wl_wa [2 * W];
  logic [IDX_W-1:0] wl_wd [2 * W];
  logic           ul_we [W];
  logic [ULA-1:0] ul_wa [W];
  ulog_t          ul_wd [W];

  always_comb begin
    int nwm, nmp, nwl, nul, nout;
    logic stop, resync;
    logic [IDX_W-1:0] i1, cur;
    logic [WMA-1:0] wa;
    logic cond, need_body;
    obs_r_t p;

    state_n = state; epoch_n = epoch; run_after_n = run_after; sweep_n = sweep;
    a_in_n = a_in; a_in_len_n = a_in_len; a_ptr_n = a_ptr; a_out_len_n = a_out_len;
    a_gen_n = a_gen; a_idx_n = a_idx; a_i1_n = a_i1; a_k_n = a_k;
    s_in_n = s_in; s_in_len_n = s_in_len; s_ptr_n = s_ptr; s_out_len_n = s_out_len;
    s_gen_n = s_gen; s_idx_n = s_idx; s_k_n = s_k; s_ph_n = s_ph; s_sync_n = s_sync;
    u_cnt_n = u_cnt; u_head_n = u_head;
    n_pred_n = n_pred; n_resync_n = n_resync; n_run_ahead_n = n_run_ahead; n_done_n = n_done;
    n_commit_n = n_commit;
    nwm = 0; nmp = 0; nwl = 0; nul = 0; nout = 0;
    for (int i = 0; i < NWP; i++) begin wm_we[i] = 1'b0; wm_wa[i] = '0; wm_wd[i] = '0; end
    for (int i = 0; i <= W; i++) begin mp_we[i] = 1'b0; mp_wa[i] = '0; mp_wd[i] = 1'b0; end
    for (int i = 0; i < 2 * W; i++) begin wl_we[i] = 1'b0; wl_wb[i] = 1'b0; wl_wa[i] = '0; wl_wd[i] = '0; end
    for (int i = 0; i < W; i++) begin ul_we[i] = 1'b0; ul_wa[i] = '0; ul_wd[i] = '0; end
    for (int i = 0; i < W; i++) intv_f_data[i] = '{pc: pc_e, cmd: CMD_BRANCH_DIR, data: '0};
    resync = 1'b0;
    stop = 1'b0; cond = 1'b0; need_body = 1'b0; cur = '0; i1 = '0; wa = '0; p = '0;
    intv_f_push_n = '0;
    obs_r_pop_n = obs_r_avail;

    // ---------- retire update unit ----------
    for (int k = 0; k < W; k++) begin
      p = obs_r_data[k];
      if (k < int'(obs_r_avail)) begin
        if (p.squash) begin
          if (state_n == S_RUN || state_n == S_WAITC || state_n == S_DONE || state_n == S_ROLLBACK)
            resync = 1'b1;
        end else if (p.pc == pc_start) begin
          wl_we[nwl] = 1'b1; wl_wb[nwl] = 1'b0; wl_wa[nwl] = '0; wl_wd[nwl] = p.value[IDX_W-1:0];
          nwl = nwl + 1;
          a_in_n = 1'b1; a_in_len_n = '0; a_out_len_n = PW'(1); a_ptr_n = '0; a_k_n = '0;
          // New fill: advance the epoch; on wrap-around the tables are cleared first.
          if (epoch_n == 8'hff) begin
            epoch_n = 8'd1; state_n = S_SWEEP; sweep_n = '0;
          end else begin
            epoch_n = epoch_n + 1'b1;
            state_n = S_RUN;
          end
          // The start cell is visited before the first call.
          wm_we[nwm] = 1'b1; wm_wa[nwm] = p.value[WMA-1:0]; wm_wd[nwm] = epoch_n; nwm = nwm + 1;
          run_after_n = 1'b1;
          resync = 1'b0;
          // The speculative side starts with the first call's worklists.
          s_in_n = 1'b0; s_in_len_n = PW'(1); s_ptr_n = '0; s_out_len_n = '0;
          s_gen_n = a_gen_n + 1'b1; s_k_n = '0; s_ph_n = PH_E; s_sync_n = 1'b0;
          u_cnt_n = '0; u_head_n = '0;
        end else if (p.pc == pc_call) begin
          a_in_n = !a_in_n; a_in_len_n = a_out_len_n; a_out_len_n = '0; a_ptr_n = '0;
          a_gen_n = a_gen_n + 1'b1; a_k_n = '0;
          // The speculative side must already be in the new worklist.
          if ((state_n == S_RUN || state_n == S_DONE) && s_gen_n != a_gen_n) resync = 1'b1;
        end else if (p.pc == pc_index) begin
          a_idx_n = p.value[IDX_W-1:0]; a_ptr_n = a_ptr_n + 1'b1; a_k_n = '0;
          if (state_n == S_WAITC && !resync) begin
            // Resume from the index the core just loaded.
            state_n = S_RUN;
            s_in_n = a_in_n; s_in_len_n = a_in_len_n; s_ptr_n = a_ptr_n - 1'b1;
            s_out_len_n = a_out_len_n; s_gen_n = a_gen_n; s_k_n = '0; s_ph_n = PH_E;
          end
        end else if (p.pc == pc_e) begin
          a_i1_n = neighbour(a_idx_n, a_k_n[2:0], yoff);
          a_k_n  = a_k_n + 1'b1;
          cond   = pol[0] ? p.taken : !p.taken;   // true: not visited
          if (!cond) begin
            wm_we[nwm] = 1'b1; wm_wa[nwm] = a_i1_n[WMA-1:0]; wm_wd[nwm] = epoch_n; nwm = nwm + 1;
          end
        end else if (p.pc == pc_f) begin
          cond = pol[1] ? p.taken : !p.taken;      // true: maparp is zero
          mp_we[nmp] = 1'b1; mp_wa[nmp] = a_i1_n[MPA-1:0]; mp_wd[nmp] = cond; nmp = nmp + 1;
        end else if (p.pc == pc_g) begin
          wl_we[nwl] = 1'b1; wl_wb[nwl] = !a_in_n; wl_wa[nwl] = a_out_len_n; wl_wd[nwl] = p.value[IDX_W-1:0];
          nwl = nwl + 1;
          a_out_len_n = a_out_len_n + 1'b1;
        end else if (p.pc == pc_h) begin
          wm_we[nwm] = 1'b1; wm_wa[nwm] = a_i1_n[WMA-1:0]; wm_wd[nwm] = epoch_n; nwm = nwm + 1;
          if (u_cnt_n != 0 && ulog[u_head_n].addr == a_i1_n[WMA-1:0]) begin
            u_head_n = u_head_n + 1'b1; u_cnt_n = u_cnt_n - 1'b1; n_commit_n = n_commit_n + 1;
          end
        end
        if (!p.squash && p.cfg.disable_psm) begin
          if (state_n != S_SWEEP) state_n = S_IDLE;
          run_after_n = 1'b0;
          resync = 1'b0;
        end
      end
    end

    if (resync) begin
      state_n = S_ROLLBACK;
      n_resync_n = n_resync_n + 1;
    end

    // ---------- speculative side ----------
    unique case (state)
      S_SWEEP: begin
        if (sweep < (SWA + 1)'(WM_ENTRIES)) begin
          wm_we[NWP-1] = 1'b1; wm_wa[NWP-1] = sweep[WMA-1:0]; wm_wd[NWP-1] = 8'd0;
        end
        mp_we[W] = 1'b1; mp_wa[W] = sweep[MPA-1:0]; mp_wd[W] = 1'b0;
        sweep_n = sweep + 1'b1;
        if (sweep == (SWA + 1)'(((MP_ENTRIES > WM_ENTRIES) ? MP_ENTRIES : WM_ENTRIES) - 1))
          state_n = run_after_n ? S_RUN : S_IDLE;
      end
      S_ROLLBACK: if (!resync) begin
        if (u_cnt_n != 0) begin
          wm_we[NWP-1] = 1'b1;
          wm_wa[NWP-1] = ulog[ULA'(u_head_n + ULA'(u_cnt_n) - 1'b1)].addr;
          wm_wd[NWP-1] = ulog[ULA'(u_head_n + ULA'(u_cnt_n) - 1'b1)].old;
          u_cnt_n = u_cnt_n - 1'b1;
        end else if (state_n == S_ROLLBACK) begin
          state_n  = S_WAITC;
          s_sync_n = 1'b1;
        end
      end
      S_WAITC: if (s_sync_n && intv_f_space != 0 && state_n != S_ROLLBACK) begin
        intv_f_data[0] = '{pc: pc_index, cmd: CMD_SYNC, data: '0};
        nout = 1; s_sync_n = 1'b0;
      end
      S_RUN: if (state_n == S_RUN) begin
        for (int s = 0; s < W; s++) begin
          if (!stop && s_sync_n) begin
            if (nout < int'(intv_f_space)) begin
              intv_f_data[nout] = '{pc: pc_index, cmd: CMD_SYNC, data: '0};
              nout = nout + 1; s_sync_n = 1'b0;
            end else stop = 1'b1;
          end else if (!stop && s_k_n == 0 && s_ph_n == PH_E && s_ptr_n == s_in_len_n) begin
            // End of the input worklist.
            stop = 1'b1;
            if (s_gen_n == a_gen_n) begin
              if (s_out_len_n == 0) begin
                if (nout < int'(intv_f_space)) begin
                  intv_f_data[nout] = '{pc: pc_index, cmd: CMD_DONE, data: '0};
                  nout = nout + 1; state_n = S_DONE; n_done_n = n_done_n + 1;
                end
              end else begin
                s_in_n = !s_in_n; s_in_len_n = s_out_len_n; s_out_len_n = '0; s_ptr_n = '0;
                s_gen_n = s_gen_n + 1'b1; n_run_ahead_n = n_run_ahead_n + 1;
              end
            end
          end else if (!stop) begin
            cur = (s_k_n == 0 && s_ph_n == PH_E) ? wl[s_in_n][s_ptr_n[PW-2:0]] : s_idx_n;
            s_idx_n = cur;
            i1 = neighbour(cur, s_k_n, yoff);
            wa = i1[WMA-1:0];
            need_body = 1'b0;
            if (s_ph_n == PH_E) cond = (waymap[wa] != epoch);
            else begin
              cond = maparp[i1[MPA-1:0]];
              need_body = cond;
            end
            // A predicted append must not overwrite worklist entries the
            // retire side may still re-read, and needs undo-log room.
            if (nout >= int'(intv_f_space) ||
                (need_body && (u_cnt_n + ULA'(nul) >= (ULA + 1)'(ULOG_DEPTH) ||
                               (s_gen_n != a_gen_n && 32'(s_out_len_n) + 1 >= 32'(a_ptr_n)) ||
                               32'(s_out_len_n) >= WL_DEPTH))) begin
              stop = 1'b1;
            end else begin
              intv_f_data[nout] = '{pc: (s_ph_n == PH_E) ? pc_e : pc_f, cmd: CMD_BRANCH_DIR,
                                    data: INSN_W'(((s_ph_n == PH_E) ? pol[0] : pol[1]) ? cond : !cond)};
              nout = nout + 1; n_pred_n = n_pred_n + 1;
              if (need_body) begin
                wm_we[nwm] = 1'b1; wm_wa[nwm] = wa; wm_wd[nwm] = epoch_n; nwm = nwm + 1;
                ul_we[nul] = 1'b1; ul_wa[nul] = ULA'(u_head_n + ULA'(u_cnt_n) + ULA'(nul));
                ul_wd[nul] = '{addr: wa, old: waymap[wa]}; nul = nul + 1;
                wl_we[nwl] = 1'b1; wl_wb[nwl] = !s_in_n; wl_wa[nwl] = s_out_len_n; wl_wd[nwl] = i1;
                nwl = nwl + 1;
                s_out_len_n = s_out_len_n + 1'b1;
              end
              if (s_ph_n == PH_E && cond) s_ph_n = PH_F;
              else begin
                s_ph_n = PH_E;
                s_k_n  = s_k_n + 1'b1;
                if (s_k_n == 0) begin
                  // Finished the 8 neighbours of this index.
                  s_ptr_n = s_ptr_n + 1'b1;
                  stop = 1'b1;
                end
              end
            end
          end
        end
        u_cnt_n = u_cnt_n + (ULA + 1)'(nul);
      end
      default: ;
    endcase
    intv_f_push_n = CW'(nout);
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NWP; i++) if (wm_we[i]) waymap[wm_wa[i]] <= wm_wd[i];
    for (int i = 0; i <= W; i++)  if (mp_we[i]) maparp[mp_wa[i]] <= mp_wd[i];
    for (int i = 0; i < 2 * W; i++) if (wl_we[i]) wl[wl_wb[i]][wl_wa[i][PW-2:0]] <= wl_wd[i];
    for (int i = 0; i < W; i++)  if (ul_we[i]) ulog[ul_wa[i]] <= ul_wd[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SWEEP; epoch <= 8'd1; run_after <= 1'b0; sweep <= '0;
      a_in <= 1'b0; a_in_len <= '0; a_ptr <= '0; a_out_len <= '0; a_gen <= '0;
      a_idx <= '0; a_i1 <= '0; a_k <= '0;
      s_in <= 1'b0; s_in_len <= '0; s_ptr <= '0; s_out_len <= '0; s_gen <= '0;
      s_idx <= '0; s_k <= '0; s_ph <= PH_E; s_sync <= 1'b0;
      u_cnt <= '0; u_head <= '0;
      n_pred <= '0; n_resync <= '0; n_run_ahead <= '0; n_done <= '0; n_commit <= '0;
    end else begin
      state <= state_n; epoch <= epoch_n; run_after <= run_after_n; sweep <= sweep_n;
      a_in <= a_in_n; a_in_len <= a_in_len_n; a_ptr <= a_ptr_n; a_out_len <= a_out_len_n;
      a_gen <= a_gen_n; a_idx <= a_idx_n; a_i1 <= a_i1_n; a_k <= a_k_n;
      s_in <= s_in_n; s_in_len <= s_in_len_n; s_ptr <= s_ptr_n; s_out_len <= s_out_len_n;
      s_gen <= s_gen_n; s_idx <= s_idx_n; s_k <= s_k_n; s_ph <= s_ph_n;
      s_sync <= s_sync_n; u_cnt <= u_cnt_n; u_head <= u_head_n;
      n_pred <= n_pred_n; n_resync <= n_resync_n; n_run_ahead <= n_run_ahead_n;
      n_done <= n_done_n; n_commit <= n_commit_n;
    end
  end

  assign busy = (state != S_IDLE);
endmodule
