// tb_psm_top: end-to-end test of the PSM system at its default size (queues
// of 32, 4 payloads per fabric cycle, fabric clock 4x slower than the core).
//
// The testbench is an out-of-order core reduced to what the agent sees: one
// fetch port (stalls, overrides, injected instructions), an in-order retire
// port, squashes, and a load lane that reports bubbles and resolves issued
// operations after a few cycles. It runs four programs, loading the matching
// fabric design through rf_sel and reprogramming the snoop tables for each:
//   1. strided loop with the prefetch engine (adaptive distance);
//   2. pointer-array loop with the load-dependent load prefetcher;
//   3. data-dependent branch loop with control-flow decoupling;
//   4. two worklist fills with the decoupled custom branch predictor.
// It counts every mechanism (predictions used, fetch stalls, injected
// instructions, squash/checkpoint/restore requests, SYNC recovery, DONE,
// issued and pinned operations, values returned through ObsQ-EX, distance
// changes, dependent prefetches, run-ahead, forced outcomes) and fails any
// that never happens, besides checking each program's results.
module tb_psm_top;
  import psm_pkg::*;
  localparam int W = 4;

  logic clk = 0, rst_n = 0, rf_clk = 0, rf_rst_n = 0;
  always #5 clk = ~clk;
  always #20 rf_clk = ~rf_clk;

  logic cfg_we = 0; cfg_sel_e cfg_sel = CFG_RST; logic [3:0] cfg_idx = 0; rst_entry_t cfg_entry = '0;
  logic retire_valid = 0, retire_taken = 0; logic [PC_W-1:0] retire_pc = 0; logic [DATA_W-1:0] retire_value = 0;
  logic retire_stall, core_squash = 0; logic [PC_W-1:0] core_squash_pc = 0;
  logic psm_on, full_squash_mode, custom_bp_mode, ifetch_mode, squash_req, checkpoint_req, restore_req;
  logic fetch_valid = 0; logic [PC_W-1:0] fetch_pc = 0;
  logic fetch_stall, bp_override, bp_taken, inj_valid; logic [PC_W-1:0] inj_pc; logic [INSN_W-1:0] inj_insn;
  logic lane_bubble = 0, issue_valid, resolve_valid = 0; intv_is_t issue_op; logic [DATA_W-1:0] resolve_data = 0;
  logic bp_done, bp_draining;
  logic rf_cfg_we = 0; logic [2:0] rf_cfg_target = 0; logic [3:0] rf_cfg_addr = 0; logic [63:0] rf_cfg_data = 0;
  logic [1:0] rf_sel;
  logic [31:0] exact_n_pred, exact_n_resync, exact_n_run_ahead, exact_n_done, exact_n_commit;
  logic [31:0] cfd_n_insn, cfd_n_outcome, cfd_n_forced;
  logic [15:0] pf_distance; logic [31:0] pf_dist_changes;
  logic [31:0] ldl_n_prefetch, ldl_n_load, ldl_n_dep_prefetch;
  logic [3:0] rf_busy;

  psm_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_override, m_stall, m_inj, m_squash_req, m_ckpt, m_restore, m_drain, m_done;
  int m_issue, m_pinned, m_resolve_load, m_retire_stall, m_mispredict, m_double_issue;
  logic drain_q, done_q;
  always_ff @(posedge clk) if (rst_n) begin
    if (fetch_valid && bp_override && !fetch_stall) m_override++;
    if (fetch_valid && fetch_stall) m_stall++;
    if (fetch_valid && inj_valid) m_inj++;
    if (squash_req) m_squash_req++;
    if (checkpoint_req) m_ckpt++;
    if (restore_req) m_restore++;
    if (retire_valid && retire_stall) m_retire_stall++;
    drain_q <= bp_draining; done_q <= bp_done;
    if (bp_draining && !drain_q) m_drain++;
    if (bp_done && !done_q) m_done++;
  end

  // ---------------- load lane ----------------
  function automatic logic [63:0] ptr_at(logic [ADDR_W-1:0] a);
    return 64'h90_0000 + 64'((a[15:3] * 13) % 509) * 64;
  endfunction
  logic outstanding = 0; int lat_cnt = 0; intv_is_t cur_op;
  always_ff @(posedge clk) begin
    lane_bubble <= ($urandom_range(0, 2) != 0);
    resolve_valid <= 1'b0;
    if (rst_n) begin
      if (issue_valid) begin
        if (outstanding) m_double_issue++;
        outstanding <= 1'b1; cur_op <= issue_op; lat_cnt <= int'($urandom_range(2, 6)); m_issue++;
      end else if (outstanding) begin
        if (lane_bubble) m_pinned++;
        if (lat_cnt == 0) begin
          resolve_valid <= 1'b1;
          resolve_data <= ptr_at(cur_op.addr);
          if (cur_op.cmd == CMD_LOAD) m_resolve_load++;
          outstanding <= 1'b0;
        end else lat_cnt <= lat_cnt - 1;
      end
    end
  end

  // ---------------- core fetch / retire ----------------
  // Fetch one instruction (waiting out stalls), then retire it. A predicted
  // branch whose direction was wrong squashes the core first.
  task automatic exec(logic [PC_W-1:0] pc, bit actual, logic [63:0] value, output bit wrong);
    bit ov, tk;
    @(negedge clk); fetch_valid = 1; fetch_pc = pc; #1;
    while (fetch_stall) begin @(negedge clk); #1; end
    ov = bp_override; tk = bp_taken;
    @(negedge clk); fetch_valid = 0;
    wrong = ov && (tk != actual);
    if (wrong) begin
      m_mispredict++;
      core_squash = 1; core_squash_pc = pc;
      @(negedge clk); core_squash = 0;
      @(negedge clk);
    end
    retire_valid = 1; retire_pc = pc; retire_taken = actual; retire_value = value; #1;
    while (retire_stall) begin @(negedge clk); #1; end
    @(negedge clk); retire_valid = 0;
  endtask

  task automatic run(logic [PC_W-1:0] pc, logic [63:0] value);
    bit w;
    exec(pc, 1'b0, value, w);
  endtask

  task automatic rst_set(int idx, logic [PC_W-1:0] pc, rst_cfg_t c, rst_ptype_t t);
    @(negedge clk); cfg_we = 1; cfg_sel = CFG_RST; cfg_idx = 4'(idx);
    cfg_entry = '{valid: 1'b1, pc: pc, cfg: c, ptype: t};
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic fst_set(int idx, logic [PC_W-1:0] pc, bit v);
    @(negedge clk); cfg_we = 1; cfg_sel = CFG_FST; cfg_idx = 4'(idx);
    cfg_entry = '{valid: v, pc: pc, cfg: '0, ptype: '0};
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic clear_tables();
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); cfg_we = 1; cfg_sel = CFG_RST; cfg_idx = 4'(i); cfg_entry = '0;
      @(negedge clk); cfg_sel = CFG_FST;
      @(negedge clk); cfg_we = 0;
    end
  endtask
  task automatic rf_set(int target, int addr, logic [63:0] d);
    @(negedge rf_clk); rf_cfg_we = 1; rf_cfg_target = 3'(target); rf_cfg_addr = 4'(addr); rf_cfg_data = d;
    @(negedge rf_clk); rf_cfg_we = 0;
  endtask

  localparam rst_cfg_t F_NONE = '0;
  localparam rst_ptype_t T_NONE = '0, T_VAL = '{branch: 1'b0, dest_reg: 1'b1}, T_BR = '{branch: 1'b1, dest_reg: 1'b0};
  function automatic rst_cfg_t flags(bit en, bit fs, bit bp, bit dis, bit eif, bit dif);
    return '{enable_psm: en, full_squash: fs, custom_bp: bp, disable_psm: dis,
             enable_ifetch: eif, disable_ifetch: dif};
  endfunction

  // ---------------- phase 1: strided prefetching ----------------
  task automatic phase_pf();
    int n0, iss0;
    clear_tables();
    rf_set(4, 0, 2);
    rf_set(2, 0, 48'h1010); rf_set(2, 1, 48'h1008); rf_set(2, 2, 48'h1004); rf_set(2, 3, 48'h1014);
    rst_set(0, 48'h1000, flags(1, 0, 0, 0, 0, 0), T_NONE);
    rst_set(1, 48'h1004, F_NONE, T_VAL);
    rst_set(2, 48'h1008, F_NONE, T_VAL);
    rst_set(3, 48'h1010, F_NONE, T_VAL);
    rst_set(4, 48'h1014, F_NONE, T_NONE);
    rst_set(5, 48'h1018, flags(0, 0, 0, 1, 0, 0), T_NONE);
    iss0 = m_issue;
    run(48'h1000, 0);
    run(48'h1004, 64);          // stride
    run(48'h1008, 400);         // iteration count
    run(48'h1010, 64'h50_0000); // base address
    for (int j = 0; j < 400; j++) begin
      run(48'h1014, 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    run(48'h1018, 0);
    repeat (40) @(negedge clk);
    $display("INFO prefetch: issued %0d distance %0d changes %0d", m_issue - iss0, pf_distance, pf_dist_changes);
    check(m_issue - iss0 > 200, "prefetches issued into load-lane bubbles");
    check(!psm_on && !rf_busy[2], "region ends and the engine stops");
  endtask

  // ---------------- phase 2: load-dependent loads ----------------
  task automatic phase_ldl();
    int iss0;
    clear_tables();
    rf_set(4, 0, 3);
    rf_set(3, 0, 48'h2010); rf_set(3, 1, 48'h2008); rf_set(3, 2, 48'h2014);
    rf_set(3, 3, 8); rf_set(3, 4, 16); rf_set(3, 5, 4); rf_set(3, 6, 16); rf_set(3, 7, 3);
    rst_set(0, 48'h2000, flags(1, 0, 0, 0, 0, 0), T_NONE);
    rst_set(1, 48'h2008, F_NONE, T_VAL);
    rst_set(2, 48'h2010, F_NONE, T_VAL);
    rst_set(3, 48'h2014, F_NONE, T_NONE);
    rst_set(4, 48'h2018, flags(0, 0, 0, 1, 0, 0), T_NONE);
    iss0 = m_issue;
    run(48'h2000, 0);
    run(48'h2008, 150);
    run(48'h2010, 64'h60_0000);
    for (int j = 0; j < 150; j++) begin
      run(48'h2014, 0);
      repeat (25) @(negedge clk);
    end
    run(48'h2018, 0);
    repeat (40) @(negedge clk);
    $display("INFO ldl: prefetch %0d load %0d dependent %0d issued %0d returned %0d",
             ldl_n_prefetch, ldl_n_load, ldl_n_dep_prefetch, m_issue - iss0, m_resolve_load);
    check(ldl_n_load == 150 && ldl_n_prefetch == 150, "one load and one prefetch per element");
    check(ldl_n_dep_prefetch > 100, "loaded pointers turned into dependent prefetches");
  endtask

  // ---------------- phase 3: control-flow decoupling ----------------
  localparam logic [PC_W-1:0] C_A = 48'h3000, C_SL = 48'h8000, C_B = 48'h3010, C_C = 48'h3014, C_X = 48'h3020;
  localparam int CY = 32;
  logic [31:0] c_slice [7] = '{32'hA000_0001, 32'hA000_0000, 32'hA000_0002, 32'hA000_0003,
                               32'hA000_0004, 32'hA000_0000, 32'hA000_0005};
  logic [63:0] c_fill [CY * CY];
  logic [63:0] c_map [CY * CY];
  int c_wl [$];
  int c_wrong;
  task automatic phase_cfd(int n);
    int it, idx, i1, words;
    bit w;
    clear_tables();
    rf_set(4, 0, 1);
    rf_set(1, 0, C_A); rf_set(1, 1, C_SL); rf_set(1, 2, C_B); rf_set(1, 3, C_C);
    rf_set(1, 4, C_SL); rf_set(1, 5, C_SL + 8); rf_set(1, 6, C_SL + 12); rf_set(1, 7, C_SL + 16);
    rf_set(1, 8, CY); rf_set(1, 9, 3); rf_set(1, 10, 2); rf_set(1, 11, 4); rf_set(1, 12, 6);
    for (int a = 0; a < 7; a++) rf_set(1, 13, {16'd0, 16'(a), c_slice[a]});
    rst_set(0, C_A, flags(1, 0, 1, 0, 1, 0), T_VAL);
    rst_set(1, C_SL, F_NONE, T_VAL);
    rst_set(2, C_SL + 8, F_NONE, T_VAL);
    rst_set(3, C_SL + 12, F_NONE, T_VAL);
    rst_set(4, C_SL + 16, F_NONE, T_VAL);
    rst_set(5, C_SL + 24, flags(0, 0, 0, 0, 0, 1), T_NONE);
    rst_set(6, C_X, flags(0, 0, 0, 1, 0, 0), T_NONE);
    fst_set(0, C_B, 1); fst_set(1, C_C, 1);
    for (int i = 0; i < CY * CY; i++) begin
      c_fill[i] = ((i * 13) % 10 < 3) ? 64'd7 : 64'(i % 5);
      c_map[i] = ((i * 29) % 10 < 3) ? 64'd9 : 64'd0;
    end
    c_wl.delete();
    for (int i = 0; i < n; i++) c_wl.push_back(CY + 1 + ((i * 7) % 40) + CY * ((i / 40) % 3));
    // Loop entry: the agent squashes, checkpoints and feeds the slice.
    run(C_A, 64'(n));
    while (!ifetch_mode) @(negedge clk);
    it = 0; words = 0;
    while (ifetch_mode) begin
      logic [PC_W-1:0] p; logic [31:0] word;
      @(negedge clk); fetch_valid = 1; fetch_pc = C_A + 4; #1;
      while (fetch_stall) begin @(negedge clk); #1; end
      p = inj_pc; word = inj_insn;
      @(negedge clk); fetch_valid = 0;
      words++;
      // Execute the slice instruction and retire it.
      retire_valid = 1; retire_pc = p; retire_taken = 0; retire_value = 0;
      case (word[7:0])
        8'd1: retire_value = 64'd7;
        8'd2: begin idx = c_wl[it]; i1 = idx + CY; retire_value = 64'(idx); end
        8'd3: begin retire_value = c_fill[i1]; end
        8'd4: if (c_fill[i1] == 64'd7) retire_valid = 0; else retire_value = c_map[i1];
        default: ;
      endcase
      if (word[7:0] == 8'd4 || (word[7:0] == 8'd3 && c_fill[i1] == 64'd7)) ;
      if (word[7:0] == 8'd0 && p == C_SL + 20) it++;
      #1; while (retire_stall) begin @(negedge clk); #1; end
      @(negedge clk); retire_valid = 0;
      repeat (2) @(negedge clk);
    end
    // Back in the program: the real loop with the body's stores.
    c_wrong = 0;
    for (int j = 0; j < n; j++) begin
      bit nv, fr;
      idx = c_wl[j]; i1 = idx + CY;
      nv = (c_fill[i1] != 64'd7);
      exec(C_B, nv, 0, w); if (w) c_wrong++;
      if (nv) begin
        fr = (c_map[i1] == 0);
        exec(C_C, fr, 0, w); if (w) c_wrong++;
        if (fr) c_fill[i1] = 64'd7;
      end
    end
    run(C_X, 0);
    repeat (40) @(negedge clk);
    $display("INFO cfd: words %0d insn %0d outcomes %0d forced %0d wrong %0d",
             words, cfd_n_insn, cfd_n_outcome, cfd_n_forced, c_wrong);
    check(words == 2 + 4 * n + 1, "slice injected in full");
    check(c_wrong == 0, "decoupled outcomes are all correct");
  endtask

  // ---------------- phase 4: custom branch predictor ----------------
  localparam logic [PC_W-1:0] E_START = 48'h4000, E_CALL = 48'h4004, E_INDEX = 48'h4008,
                              E_E = 48'h400c, E_F = 48'h4010, E_G = 48'h4014, E_H = 48'h4018, E_X = 48'h401c;
  localparam int EY = 16;
  bit e_wall [EY * EY];
  int e_vis [EY * EY];
  int e_wl [2][$];
  int e_wrong, e_used;
  task automatic fill_once(int start);
    int cur, nxt;
    bit w;
    e_wl[0].delete(); e_wl[1].delete();
    for (int i = 0; i < EY * EY; i++) e_vis[i] = 0;
    e_wl[0].push_back(start); e_vis[start] = 1;
    e_wrong = 0; e_used = m_override;
    run(E_START, 64'(start));
    cur = 0;
    while (e_wl[cur].size() != 0) begin
      nxt = 1 - cur;
      e_wl[nxt].delete();
      run(E_CALL, 0);
      foreach (e_wl[cur][n]) begin
        int idx;
        idx = e_wl[cur][n];
        run(E_INDEX, 64'(idx));
        for (int k = 0; k < 8; k++) begin
          int i1;
          bit nv, fr;
          case (k)
            0: i1 = idx - EY - 1; 1: i1 = idx - EY; 2: i1 = idx - EY + 1; 3: i1 = idx - 1;
            4: i1 = idx + 1; 5: i1 = idx + EY - 1; 6: i1 = idx + EY; default: i1 = idx + EY + 1;
          endcase
          nv = (e_vis[i1] == 0);
          exec(E_E, nv, 0, w); if (w) e_wrong++;
          if (nv) begin
            fr = !e_wall[i1];
            exec(E_F, fr, 0, w); if (w) e_wrong++;
            if (fr) begin
              e_vis[i1] = 1;
              run(E_H, 0);
              e_wl[nxt].push_back(i1);
              run(E_G, 64'(i1));
            end
          end
        end
      end
      cur = nxt;
    end
    run(E_X, 0);
    e_used = m_override - e_used;
  endtask

  task automatic phase_exact();
    int r1, d0;
    clear_tables();
    rf_set(4, 0, 0);
    rf_set(0, 0, E_START); rf_set(0, 1, E_CALL); rf_set(0, 2, E_INDEX); rf_set(0, 3, E_E);
    rf_set(0, 4, E_F); rf_set(0, 5, E_G); rf_set(0, 6, E_H); rf_set(0, 7, EY); rf_set(0, 8, 3);
    rst_set(0, E_START, flags(1, 1, 1, 0, 0, 0), T_VAL);
    rst_set(1, E_CALL, F_NONE, T_NONE);
    rst_set(2, E_INDEX, F_NONE, T_VAL);
    rst_set(3, E_E, F_NONE, T_BR);
    rst_set(4, E_F, F_NONE, T_BR);
    rst_set(5, E_G, F_NONE, T_VAL);
    rst_set(6, E_H, F_NONE, T_NONE);
    rst_set(7, E_X, flags(0, 0, 0, 1, 0, 0), T_NONE);
    fst_set(0, E_E, 1); fst_set(1, E_F, 1);
    for (int i = 0; i < EY * EY; i++) begin
      int r, c;
      r = i / EY; c = i % EY;
      e_wall[i] = (r == 0 || c == 0 || r == EY - 1 || c == EY - 1) || ((i * 73 + 11) % 100 < 22);
    end
    e_wall[5 * EY + 6] = 0;
    while (rf_busy[0]) @(negedge clk);   // table clear after reset
    fill_once(5 * EY + 6);
    $display("INFO exact fill 1: predictions used %0d wrong %0d resync %0d", e_used, e_wrong, exact_n_resync);
    r1 = exact_n_run_ahead; d0 = exact_n_done;
    repeat (40) @(negedge clk);
    fill_once(5 * EY + 6);
    repeat (40) @(negedge clk);
    $display("INFO exact fill 2: predictions used %0d wrong %0d run-ahead %0d done %0d",
             e_used, e_wrong, exact_n_run_ahead - r1, exact_n_done - d0);
    check(e_wrong == 0 && e_used > 500, "trained fill is predicted correctly");
  endtask

  initial begin
    #40000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge rf_clk); rst_n = 1; rf_rst_n = 1;
    repeat (4) @(negedge rf_clk);
    phase_pf();
    phase_ldl();
    repeat (17000) @(negedge rf_clk);   // index-table clear of the CFD design after reset
    phase_cfd(120);
    phase_exact();

    $display("INFO mechanisms: override %0d stall %0d inject %0d squash_req %0d checkpoint %0d restore %0d",
             m_override, m_stall, m_inj, m_squash_req, m_ckpt, m_restore);
    $display("INFO mechanisms: mispredict %0d drain %0d done %0d issue %0d pinned %0d loads returned %0d retire_stall %0d",
             m_mispredict, m_drain, m_done, m_issue, m_pinned, m_resolve_load, m_retire_stall);
    check(m_override > 0, "mechanism: fabric prediction overrides the core");
    check(m_stall > 0, "mechanism: fetch stalls waiting for the fabric");
    check(m_inj > 0, "mechanism: instructions fetched from the agent");
    check(m_squash_req > 0, "mechanism: squash request");
    check(m_ckpt > 0, "mechanism: checkpoint request");
    check(m_restore > 0, "mechanism: checkpoint restore");
    check(m_mispredict > 0 && m_drain > 0, "mechanism: squash marker and drain to SYNC");
    check(exact_n_resync > 0, "mechanism: predictor resynchronisation");
    check(m_done > 0 && exact_n_done > 0, "mechanism: DONE ends custom prediction");
    check(m_issue > 0, "mechanism: operations issued into load-lane bubbles");
    check(m_pinned > 0, "mechanism: head pinned while an operation is outstanding");
    check(m_double_issue == 0, "one outstanding operation at a time");
    check(m_resolve_load > 0, "mechanism: loaded values returned through ObsQ-EX");
    check(pf_dist_changes > 0, "mechanism: prefetch distance adapted");
    check(ldl_n_dep_prefetch > 0, "mechanism: load-dependent prefetches");
    check(exact_n_run_ahead > 0, "mechanism: predictor runs ahead into the next worklist");
    check(exact_n_commit > 0, "mechanism: retired stores commit speculative writes");
    check(cfd_n_forced > 0, "mechanism: index table forces outcomes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
