// tb_psm_exact_bp: self-checking test of the EXACT-style decoupled branch
// predictor on a small grid.
//
// The testbench is the core: it runs the worklist fill (makebound2-style)
// over a 16x16 map with walled borders and scattered obstacles, emits the
// retire payloads (START, CALL, INDEX, branches E and F, stores H and G) into
// an ObsQ-R model, and fetches its E/F branch directions from an IntvQ-F
// model. A wrong prediction squashes: a squash marker goes into ObsQ-R, the
// fetch side discards predictions up to the next SYNC, and that SYNC is
// consumed when the core next fetches the INDEX load. The fill is run twice
// from the same start. The first fill trains the maparp table, so it must
// resynchronise; the second must be predicted without a single mistake, run
// ahead into following worklists, and end with DONE. The predictions must
// always be for the branch the core is fetching.
module tb_psm_exact_bp;
  import psm_pkg::*;
  localparam int W = 4;
  localparam int Y = 16;
  localparam int IFQ = 32;
  localparam logic [PC_W-1:0] PC_START = 48'h100, PC_CALL = 48'h104, PC_INDEX = 48'h108,
                              PC_E = 48'h10c, PC_F = 48'h110, PC_G = 48'h114, PC_H = 48'h118;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [63:0] cfg_data = 0;
  logic [2:0] obs_r_avail, obs_r_pop_n, intv_f_space, intv_f_push_n;
  obs_r_t obs_r_data [W]; intv_f_t intv_f_data [W];
  logic busy; logic [31:0] n_pred, n_resync, n_run_ahead, n_done, n_commit;
  psm_exact_bp #(.W(W), .WL_DEPTH(128), .WM_ENTRIES(256), .MP_ENTRIES(1024), .ULOG_DEPTH(64)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  obs_r_t oq[$];
  intv_f_t fq[$];
  always_comb begin
    obs_r_avail = 3'((oq.size() < W) ? oq.size() : W);
    intv_f_space = 3'((IFQ - fq.size() < W) ? IFQ - fq.size() : W);
    for (int k = 0; k < W; k++) obs_r_data[k] = (k < oq.size()) ? oq[k] : '0;
  end
  always_ff @(posedge clk) if (rst_n) begin
    for (int k = 0; k < W; k++) if (k < int'(obs_r_pop_n)) void'(oq.pop_front());
    for (int k = 0; k < W; k++) if (k < int'(intv_f_push_n)) fq.push_back(intv_f_data[k]);
  end

  // ---------------- the program ----------------
  bit wall [Y * Y];
  int visited [Y * Y];
  int wl [2][$];
  bit draining;
  int cur_i1, cur_idx, cur_k, cur_n, cur_gen;
  int fill, mispred [3], used [3], pc_mismatch, stall_cycles;

  task automatic retire(logic [PC_W-1:0] pc, logic [63:0] v, bit taken);
    obs_r_t p;
    p = '0; p.pc = pc; p.value = v; p.taken = taken; p.ptype.branch = (pc == PC_E || pc == PC_F);
    oq.push_back(p);
    @(negedge clk);
  endtask

  // Fetch of a predicted branch: returns 1 when the prediction was wrong.
  task automatic fetch_branch(logic [PC_W-1:0] pc, bit actual, output bit wrong);
    int waited;
    wrong = 1'b0;
    if (draining) return;
    waited = 0;
    while (fq.size() == 0 && waited < 5000) begin @(negedge clk); waited++; stall_cycles++; end
    if (fq.size() == 0) begin
      check(1'b0, $sformatf("fill %0d: no prediction for branch %h", fill, pc));
      return;
    end
    begin
      intv_f_t e;
      e = fq.pop_front();
      used[fill]++;
      if (e.cmd != CMD_BRANCH_DIR || e.pc != pc) begin
        pc_mismatch++;
        $display("INFO fill %0d: got cmd %0d pc %h for branch %h", fill, e.cmd, e.pc, pc);
      end
      if (e.cmd != CMD_BRANCH_DIR || e.pc != pc || e.data[0] != actual) wrong = 1'b1;
    end
    if (wrong && fill == 2) $display("INFO t=%0t fill 2 mispredict at %h actual %0d, state %0d idx %0d k %0d i1 %0d n %0d gen %0d wm %0d ep %0d sgen %0d agen %0d", $time, pc, actual, dut.state, cur_idx, cur_k, cur_i1, cur_n, cur_gen, dut.waymap[cur_i1], dut.epoch, dut.s_gen, dut.a_gen);
    if (wrong) begin
      obs_r_t m;
      mispred[fill]++;
      m = '0; m.squash = 1'b1; m.pc = pc;
      oq.push_back(m);
      draining = 1'b1;
    end
  endtask

  // Fetch of the INDEX load: a pending SYNC is consumed here.
  task automatic fetch_index();
    int waited;
    if (!draining) return;
    waited = 0;
    forever begin
      if (fq.size() != 0) begin
        intv_f_t e;
        e = fq.pop_front();
        if (e.cmd == CMD_SYNC) begin
          check(e.pc == PC_INDEX, "SYNC names the INDEX load");
          draining = 1'b0;
          return;
        end
      end else begin
        @(negedge clk); waited++;
        if (waited > 5000) begin check(1'b0, $sformatf("no SYNC after squash, t=%0t state %0d", $time, dut.state)); return; end
      end
    end
  endtask

  task automatic run_fill(int start);
    int cur, nxt, in_b;
    bit wrong;
    wl[0].delete(); wl[1].delete();
    for (int i = 0; i < Y * Y; i++) visited[i] = 0;
    wl[0].push_back(start);
    visited[start] = 1;
    retire(PC_START, 64'(start), 1'b0);
    cur = 0;
    while (wl[cur].size() != 0) begin
      nxt = 1 - cur;
      wl[nxt].delete();
      retire(PC_CALL, 0, 1'b0);
      cur_gen++;
      foreach (wl[cur][n]) begin
        int idx;
        idx = wl[cur][n];
        fetch_index();
        retire(PC_INDEX, 64'(idx), 1'b0);
        for (int k = 0; k < 8; k++) begin
          int i1;
          bit not_vis, free_;
          case (k)
            0: i1 = idx - Y - 1; 1: i1 = idx - Y; 2: i1 = idx - Y + 1; 3: i1 = idx - 1;
            4: i1 = idx + 1; 5: i1 = idx + Y - 1; 6: i1 = idx + Y; default: i1 = idx + Y + 1;
          endcase
          cur_i1 = i1; cur_idx = idx; cur_k = k; cur_n = n;
          not_vis = (visited[i1] == 0);
          fetch_branch(PC_E, not_vis, wrong);
          retire(PC_E, 0, not_vis);
          if (not_vis) begin
            free_ = !wall[i1];
            fetch_branch(PC_F, free_, wrong);
            retire(PC_F, 0, free_);
            if (free_) begin
              visited[i1] = 1;
              retire(PC_H, 0, 1'b0);
              wl[nxt].push_back(i1);
              retire(PC_G, 64'(i1), 1'b0);
            end
          end
        end
      end
      cur = nxt;
    end
    // The predictor reports the end of the fill.
    if (!draining) begin
      int waited;
      intv_f_t e;
      waited = 0;
      while (fq.size() == 0 && waited < 5000) begin @(negedge clk); waited++; end
      check(fq.size() != 0 && fq[0].cmd == CMD_DONE, $sformatf("fill %0d ends with DONE", fill));
      if (fq.size() != 0) e = fq.pop_front();
    end
  endtask

  task automatic setreg(int a, logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(a); cfg_data = d; @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    #3000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ra1, done1;
    for (int i = 0; i < Y * Y; i++) begin
      int r, c;
      r = i / Y; c = i % Y;
      wall[i] = (r == 0 || c == 0 || r == Y - 1 || c == Y - 1) || ((i * 73 + 11) % 100 < 22);
    end
    wall[5 * Y + 6] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    setreg(0, PC_START); setreg(1, PC_CALL); setreg(2, PC_INDEX); setreg(3, PC_E);
    setreg(4, PC_F); setreg(5, PC_G); setreg(6, PC_H); setreg(7, Y); setreg(8, 3);
    while (busy) @(negedge clk);   // table clear after reset
    check(!busy, "idle after the reset table clear");

    draining = 1'b0;
    fill = 1;
    run_fill(5 * Y + 6);
    $display("INFO fill 1: used %0d mispredicted %0d resync %0d run-ahead %0d commit %0d",
             used[1], mispred[1], n_resync, n_run_ahead, n_commit);
    check(mispred[1] > 0 && n_resync > 0, "learning fill resynchronises");
    ra1 = n_run_ahead; done1 = n_done;
    repeat (20) @(negedge clk);
    fill = 2;
    run_fill(5 * Y + 6);
    repeat (20) @(negedge clk);
    $display("INFO fill 2: used %0d mispredicted %0d run-ahead %0d done %0d stall %0d",
             used[2], mispred[2], n_run_ahead - ra1, n_done - done1, stall_cycles);
    check(mispred[2] == 0, $sformatf("trained fill has no mispredictions (%0d)", mispred[2]));
    check(used[2] > 100, "trained fill is predicted");
    check(n_run_ahead > ra1, "predictor ran ahead into the next worklist");
    check(n_done == done1 + 1, "DONE counted once");
    check(pc_mismatch == 0, "predictions always match the fetched branch");
    check(n_commit > 0, "retired stores commit speculative waymap writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
