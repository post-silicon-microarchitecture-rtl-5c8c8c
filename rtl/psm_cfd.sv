// psm_cfd: fabric-side control-flow-decoupling (CFD) design for a loop whose
// branches depend on loaded data and on stores made inside the loop itself
// (astar's makebound2: branch B tests waymap[index1].fillnum != fillnum,
// branch C tests maparp[index1] == 0, and the body stores
// waymap[index1].fillnum, which changes later B outcomes).
//
// Operation, one run per loop entry:
//   1. A retire payload from the loop entry point (the instruction carrying
//      the enable-instruction-fetch flag; its destination value is the
//      iteration count) starts a run. The core has squashed and taken a
//      checkpoint and now fetches from the agent.
//   2. The design streams the branch slice as INSTRUCTION payloads into
//      IntvQ-F, up to W per cycle, from a small slice memory: a prologue
//      once, the loop body once per iteration, then one exit instruction.
//      Virtual PCs are slice_pc + 4*(position in the slice memory), so every
//      iteration of the body reuses the same PCs and snoop-table entries.
//   3. It snoops the slice's loads as they retire: the fillnum load, the index
//      load, and for the tracked neighbour (index1 = index + offset of
//      neighbour number K) the waymap-fillnum load (giving B) and the maparp
//      load (giving C, only if B enters the body).
//   4. The slice cannot see the body's stores, so a direct-mapped index table
//      fixes the control flow: a neighbour whose B and C both enter the body
//      will be marked visited by the body, so its index table entry is set;
//      a later waymap load of a neighbour whose entry is set has its B
//      outcome forced to "already visited".
//   5. Outcomes are buffered and, once the whole slice has been sent, streamed
//      as BRANCH_DIR payloads (PCs of the original B and C) in program order,
//      followed by DONE once the exit instruction has retired (it carries the
//      disable-instruction-fetch flag, which restores the checkpoint) and the
//      buffer is empty. The core, back in its own code, uses them as custom
//      predictions.
// Index table entries carry a run tag, so nothing is cleared between runs;
// the table is cleared once after reset (IT_ENTRIES cycles, during which a
// loop entry is ignored). After the 8-bit tag wraps, an entry left from 255
// runs earlier can force an outcome wrongly; that costs a misprediction, not
// correctness.
//
// Configuration registers (fabric clock): 0 entry-point PC, 1 virtual PC of
// the slice, 2 PC of B, 3 PC of C, 4..7 PCs of the slice's fillnum, index,
// waymap and maparp loads, 8 yoffset, 9 polarity (bit 0: B taken means "not
// visited"; bit 1: C taken means "maparp zero"), 10 prologue length, 11 body
// length, 12 neighbour number K (0..7), 13 slice-memory write
// (data[47:32] = address, data[31:0] = instruction word).
//
// Streaming the slice, snooping its loads, the index table and buffered
// outcomes follow the architecture. The slice-memory format, the register map
// and sending outcomes only after the whole slice are this design's choices.
module psm_cfd
  import psm_pkg::*;
#(
  parameter int unsigned W           = 4,
  parameter int unsigned SLICE_DEPTH = 64,
  parameter int unsigned IT_ENTRIES  = 16384,
  parameter int unsigned OB_DEPTH    = 8192,
  localparam int unsigned CW         = $clog2(W + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic              cfg_we,
  input  logic [3:0]        cfg_addr,
  input  logic [63:0]       cfg_data,
  input  logic [CW-1:0]     obs_r_avail,
  input  obs_r_t            obs_r_data [W],
  output logic [CW-1:0]     obs_r_pop_n,
  input  logic [CW-1:0]     intv_f_space,
  output intv_f_t           intv_f_data [W],
  output logic [CW-1:0]     intv_f_push_n,
  output logic              running,
  output logic [31:0]       n_insn,
  output logic [31:0]       n_outcome,
  output logic [31:0]       n_forced
);
  localparam int unsigned SA  = $clog2(SLICE_DEPTH);
  localparam int unsigned ITA = $clog2(IT_ENTRIES);
  localparam int unsigned OBA = $clog2(OB_DEPTH);
  localparam int unsigned IDX_W = 32;

  typedef struct packed {
    logic is_c;   // 0: branch B, 1: branch C
    logic dir;
  } outcome_t;

  logic [PC_W-1:0]  pc_a, pc_slice, pc_b, pc_c, pc_ld_fill, pc_ld_idx, pc_ld_way, pc_ld_map;
  logic [IDX_W-1:0] yoff;
  logic [1:0]       pol;
  logic [SA:0]      pro_len, body_len;
  logic [2:0]       nbk;
  logic [INSN_W-1:0] slice [SLICE_DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_a <= '0; pc_slice <= '0; pc_b <= '0; pc_c <= '0;
      pc_ld_fill <= '0; pc_ld_idx <= '0; pc_ld_way <= '0; pc_ld_map <= '0;
      yoff <= IDX_W'(64); pol <= 2'b11; pro_len <= '0; body_len <= '0; nbk <= 3'd0;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        4'd0:  pc_a       <= cfg_data[PC_W-1:0];
        4'd1:  pc_slice   <= cfg_data[PC_W-1:0];
        4'd2:  pc_b       <= cfg_data[PC_W-1:0];
        4'd3:  pc_c       <= cfg_data[PC_W-1:0];
        4'd4:  pc_ld_fill <= cfg_data[PC_W-1:0];
        4'd5:  pc_ld_idx  <= cfg_data[PC_W-1:0];
        4'd6:  pc_ld_way  <= cfg_data[PC_W-1:0];
        4'd7:  pc_ld_map  <= cfg_data[PC_W-1:0];
        4'd8:  yoff       <= cfg_data[IDX_W-1:0];
        4'd9:  pol        <= cfg_data[1:0];
        4'd10: pro_len    <= cfg_data[SA:0];
        4'd11: body_len   <= cfg_data[SA:0];
        4'd12: nbk        <= cfg_data[2:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_addr == 4'd13) slice[cfg_data[32+SA-1:32]] <= cfg_data[INSN_W-1:0];
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

  logic [7:0]  itab [IT_ENTRIES];
  outcome_t    obuf [OB_DEPTH];

  // run state
  logic [7:0]        tag, tag_n;
  logic              running_n, sent_all, sent_all_n, done_sent, done_sent_n;
  logic [31:0]       iters, iters_n, it_cnt, it_cnt_n;     // iterations to stream / streamed
  logic [SA:0]       pos, pos_n;                            // position within prologue/body
  logic              in_body, in_body_n;
  // snoop state
  logic [63:0]       fillnum, fillnum_n;
  logic [IDX_W-1:0]  cur_idx, cur_idx_n, cur_i1, cur_i1_n;
  logic              b_enter, b_enter_n;
  logic              slice_retired, slice_retired_n;
  // outcome buffer
  logic [OBA:0]      ob_cnt, ob_cnt_n;
  logic [OBA-1:0]    ob_head, ob_head_n;
  logic [31:0]       n_insn_n, n_outcome_n, n_forced_n;
  logic [ITA:0]      clr;                                   // reset-time clear

  logic              it_we [W];
  logic [ITA-1:0]    it_wa [W];
  logic              ob_we [W];
  logic [OBA-1:0]    ob_wa [W];
  outcome_t          ob_wd [W];

  always_comb begin
    int nout, nob, nit, taken;
    logic cond, set_now, forced;
    logic [ITA-1:0] ia;
    logic [SA:0] addr;
    obs_r_t p;
    tag_n = tag; running_n = running; sent_all_n = sent_all; done_sent_n = done_sent;
    iters_n = iters; it_cnt_n = it_cnt; pos_n = pos; in_body_n = in_body;
    fillnum_n = fillnum; cur_idx_n = cur_idx; cur_i1_n = cur_i1; b_enter_n = b_enter;
    slice_retired_n = slice_retired;
    ob_cnt_n = ob_cnt; ob_head_n = ob_head;
    n_insn_n = n_insn; n_outcome_n = n_outcome; n_forced_n = n_forced;
    nout = 0; nob = 0; nit = 0;
    cond = 1'b0; set_now = 1'b0; forced = 1'b0; ia = '0; p = '0; addr = '0;
    for (int i = 0; i < W; i++) begin
      it_we[i] = 1'b0; it_wa[i] = '0; ob_we[i] = 1'b0; ob_wa[i] = '0; ob_wd[i] = '0;
      intv_f_data[i] = '{pc: '0, cmd: CMD_BRANCH_DIR, data: '0};
    end
    obs_r_pop_n = obs_r_avail;

    // ---------- snoop the retire stream ----------
    for (int k = 0; k < W; k++) begin
      p = obs_r_data[k];
      if (k < int'(obs_r_avail) && !p.squash) begin
        if (running_n && p.cfg.disable_ifetch) slice_retired_n = 1'b1;
        if (p.pc == pc_a && clr[ITA]) begin
          // Start of a run: new tag, empty buffer, stream from the prologue.
          running_n = 1'b1; sent_all_n = 1'b0; done_sent_n = 1'b0;
          tag_n = (tag_n == 8'hff) ? 8'd1 : tag_n + 1'b1;
          iters_n = p.value[31:0]; it_cnt_n = '0; pos_n = '0; in_body_n = (pro_len == 0);
          if (body_len == 0) iters_n = '0;
          b_enter_n = 1'b0; slice_retired_n = 1'b0;
          ob_cnt_n = '0; ob_head_n = '0;
        end else if (running_n && p.pc == pc_ld_fill) begin
          fillnum_n = p.value;
        end else if (running_n && p.pc == pc_ld_idx) begin
          cur_idx_n = p.value[IDX_W-1:0];
        end else if (running_n && p.pc == pc_ld_way) begin
          cur_i1_n = neighbour(cur_idx_n, nbk, yoff);
          ia = cur_i1_n[ITA-1:0];
          set_now = (itab[ia] == tag_n);
          for (int j = 0; j < W; j++) if (j < nit && it_wa[j] == ia) set_now = 1'b1;
          cond   = (p.value != fillnum_n);      // true: not visited
          forced = cond && set_now;
          if (forced) begin
            cond = 1'b0;
            n_forced_n = n_forced_n + 1;
          end
          b_enter_n = cond;
          ob_we[nob] = 1'b1; ob_wa[nob] = OBA'(ob_head_n + OBA'(ob_cnt_n) + OBA'(nob));
          ob_wd[nob] = '{is_c: 1'b0, dir: pol[0] ? cond : !cond};
          nob = nob + 1;
        end else if (running_n && p.pc == pc_ld_map && b_enter_n) begin
          cond = (p.value == 0);                // true: maparp zero, body runs
          ob_we[nob] = 1'b1; ob_wa[nob] = OBA'(ob_head_n + OBA'(ob_cnt_n) + OBA'(nob));
          ob_wd[nob] = '{is_c: 1'b1, dir: pol[1] ? cond : !cond};
          nob = nob + 1;
          if (cond) begin
            it_we[nit] = 1'b1; it_wa[nit] = cur_i1_n[ITA-1:0]; nit = nit + 1;
          end
          b_enter_n = 1'b0;
        end
      end
    end
    ob_cnt_n = ob_cnt_n + (OBA + 1)'(nob);

    // ---------- stream the slice, then the buffered outcomes ----------
    for (int s = 0; s < W; s++) begin
      if (running_n && !sent_all_n && nout < int'(intv_f_space)) begin
        // Position in the slice memory: prologue, body, then the exit word.
        if (!in_body_n)                 addr = pos_n;
        else if (it_cnt_n < iters_n)    addr = pro_len + pos_n;
        else                            addr = pro_len + body_len;
        intv_f_data[nout] = '{pc: pc_slice + PC_W'({addr, 2'b00}), cmd: CMD_INSTRUCTION,
                              data: slice[SA'(addr)]};
        nout = nout + 1; n_insn_n = n_insn_n + 1;
        if (in_body_n && it_cnt_n >= iters_n) begin
          sent_all_n = 1'b1;
        end else begin
          pos_n = pos_n + 1'b1;
          if (!in_body_n && pos_n == pro_len) begin
            in_body_n = 1'b1; pos_n = '0;
          end else if (in_body_n && pos_n == body_len) begin
            pos_n = '0; it_cnt_n = it_cnt_n + 1;
          end
        end
      end
    end
    // Outcomes in program order once the whole slice has been sent.
    taken = 0;
    for (int s = 0; s < W; s++) begin
      if (running_n && sent_all && nout < int'(intv_f_space) && taken < int'(ob_cnt)) begin
        intv_f_data[nout] = '{pc: obuf[OBA'(ob_head + OBA'(taken))].is_c ? pc_c : pc_b,
                              cmd: CMD_BRANCH_DIR,
                              data: INSN_W'(obuf[OBA'(ob_head + OBA'(taken))].dir)};
        nout = nout + 1; taken = taken + 1; n_outcome_n = n_outcome_n + 1;
      end
    end
    ob_head_n = ob_head_n + OBA'(taken);
    ob_cnt_n  = ob_cnt_n - (OBA + 1)'(taken);
    // DONE after the last outcome, once the slice has fully retired.
    if (running_n && sent_all && slice_retired_n && !done_sent && ob_cnt_n == 0 &&
        nout < int'(intv_f_space)) begin
      intv_f_data[nout] = '{pc: pc_b, cmd: CMD_DONE, data: '0};
      nout = nout + 1; done_sent_n = 1'b1; running_n = 1'b0;
    end
    intv_f_push_n = CW'(nout);
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < W; i++) begin
      if (it_we[i]) itab[it_wa[i]] <= tag_n;
      if (ob_we[i]) obuf[ob_wa[i]] <= ob_wd[i];
    end
    if (!clr[ITA]) itab[clr[ITA-1:0]] <= 8'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         clr <= '0;
    else if (!clr[ITA]) clr <= clr + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag <= '0; running <= 1'b0; sent_all <= 1'b0; done_sent <= 1'b0;
      iters <= '0; it_cnt <= '0; pos <= '0; in_body <= 1'b0;
      fillnum <= '0; cur_idx <= '0; cur_i1 <= '0; b_enter <= 1'b0; slice_retired <= 1'b0;
      ob_cnt <= '0; ob_head <= '0; n_insn <= '0; n_outcome <= '0; n_forced <= '0;
    end else begin
      tag <= tag_n; running <= running_n; sent_all <= sent_all_n; done_sent <= done_sent_n;
      iters <= iters_n; it_cnt <= it_cnt_n; pos <= pos_n; in_body <= in_body_n;
      fillnum <= fillnum_n; cur_idx <= cur_idx_n; cur_i1 <= cur_i1_n;
      b_enter <= b_enter_n; slice_retired <= slice_retired_n;
      ob_cnt <= ob_cnt_n; ob_head <= ob_head_n;
      n_insn <= n_insn_n; n_outcome <= n_outcome_n; n_forced <= n_forced_n;
    end
  end
endmodule
