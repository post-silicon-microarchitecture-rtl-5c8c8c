// tb_psm_agent: self-checking test of the PSM-Agent with its queues, core
// clock 4x faster than the fabric clock.
//
// The testbench plays the core on one side and the fabric on the other. It
// configures the snoop tables, retires an enabling instruction and a snooped
// branch and checks that the payloads reach the fabric side in order, pushes
// four BRANCH_DIR predictions in one fabric cycle and checks that four fetches
// of the snooped branch get them in order, sends a LOAD through IntvQ-IS and
// checks the issued operation and the value returned through ObsQ-EX, and
// checks the squash marker a core squash produces. It also checks that an
// observation reaches the fabric within a few fabric cycles.
module tb_psm_agent;
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
  logic [2:0] obs_r_avail, obs_r_pop_n, intv_f_space, intv_f_push_n, intv_is_space, intv_is_push_n;
  logic [2:0] obs_ex_avail, obs_ex_pop_n;
  obs_r_t obs_r_data [W]; intv_f_t intv_f_data [W]; intv_is_t intv_is_data [W]; obs_ex_t obs_ex_data [W];
  logic bp_done, bp_draining;

  psm_agent #(.Q(32), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Fabric side: collect every observation.
  obs_r_t  got_r[$];
  obs_ex_t got_ex[$];
  assign obs_r_pop_n  = obs_r_avail;
  assign obs_ex_pop_n = obs_ex_avail;
  always_ff @(posedge rf_clk) if (rf_rst_n) begin
    for (int k = 0; k < W; k++) if (k < int'(obs_r_avail)) got_r.push_back(obs_r_data[k]);
    for (int k = 0; k < W; k++) if (k < int'(obs_ex_avail)) got_ex.push_back(obs_ex_data[k]);
  end
  logic [2:0] f_push = 0, is_push = 0;
  assign intv_f_push_n = f_push;
  assign intv_is_push_n = is_push;

  task automatic cfg(cfg_sel_e sel, int idx, logic [PC_W-1:0] pc, rst_cfg_t c, rst_ptype_t t);
    @(negedge clk); cfg_we = 1; cfg_sel = sel; cfg_idx = 4'(idx);
    cfg_entry = '{valid: 1'b1, pc: pc, cfg: c, ptype: t};
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic retire(logic [PC_W-1:0] pc, logic tk, logic [DATA_W-1:0] v);
    @(negedge clk); retire_valid = 1; retire_pc = pc; retire_taken = tk; retire_value = v;
    @(negedge clk); retire_valid = 0;
  endtask

  initial begin
    #200000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int t0, lat, n_over;
  initial begin
    repeat (3) @(negedge rf_clk); rst_n = 1; rf_rst_n = 1;
    cfg(CFG_RST, 0, 48'h100, '{enable_psm:1, full_squash:1, custom_bp:1, default:0}, '{branch:0, dest_reg:1});
    cfg(CFG_RST, 1, 48'h200, '0, '{branch:1, dest_reg:0});
    cfg(CFG_FST, 0, 48'h300, '0, '0);

    t0 = $time;
    retire(48'h100, 0, 64'h1234);
    while (got_r.size() < 1) @(posedge clk);
    lat = ($time - t0) / 40;
    check(lat <= 4, $sformatf("observation latency %0d fabric cycles", lat));
    check(psm_on && custom_bp_mode && full_squash_mode, "modes on after enabling entry");
    check(got_r[0].pc == 48'h100 && got_r[0].value == 64'h1234 && got_r[0].cfg.enable_psm, $sformatf("enable payload %p", got_r[0]));
    retire(48'h200, 1, 0);
    retire(48'h200, 0, 0);
    while (got_r.size() < 3) @(posedge clk);
    check(got_r[1].taken && !got_r[2].taken && got_r[2].pc == 48'h200, "branch payloads in order");

    // Four predictions in one fabric cycle.
    @(negedge rf_clk);
    for (int k = 0; k < W; k++) intv_f_data[k] = '{pc: 48'h300, cmd: CMD_BRANCH_DIR, data: INSN_W'(k % 2)};
    f_push = 3'(W);
    check(intv_f_space == 3'(W), "IntvQ-F accepts W payloads");
    @(negedge rf_clk); f_push = 0;
    n_over = 0;
    for (int k = 0; k < W; k++) begin
      @(negedge clk); fetch_valid = 1; fetch_pc = 48'h300; #1;
      while (fetch_stall) begin @(negedge clk); #1; end
      check(bp_override && bp_taken == (k % 2 == 1), $sformatf("prediction %0d in order", k));
      if (bp_override) n_over++;
    end
    @(negedge clk); fetch_valid = 0;
    check(n_over == W, "all predictions used");

    // A LOAD through IntvQ-IS and back through ObsQ-EX.
    @(negedge rf_clk);
    intv_is_data[0] = '{cmd: CMD_LOAD, addr: 48'hABC0, size: 3}; is_push = 1;
    @(negedge rf_clk); is_push = 0;
    @(negedge clk); lane_bubble = 1;
    wait (issue_valid); #1;
    check(issue_op.cmd == CMD_LOAD && issue_op.addr == 48'hABC0, "load issued");
    @(negedge clk); lane_bubble = 0;
    repeat (3) @(negedge clk);
    resolve_valid = 1; resolve_data = 64'h5555;
    @(negedge clk); resolve_valid = 0;
    while (got_ex.size() < 1) @(posedge clk);
    check(got_ex[0].value == 64'h5555 && got_ex[0].addr == 48'hABC0, "loaded value observed");

    // Squash marker.
    @(negedge clk); core_squash = 1; core_squash_pc = 48'h777;
    @(negedge clk); core_squash = 0;
    while (got_r.size() < 4) @(posedge clk);
    check(got_r[3].squash && got_r[3].pc == 48'h777, "squash marker");
    check(bp_draining, "fetch side drains after squash");
    repeat (4) @(negedge rf_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
