// tb_psm_cfd: self-checking test of the control-flow-decoupling design.
//
// The testbench is the core. It retires the loop-entry payload (value = the
// iteration count), then fetches and executes the branch slice streamed as
// INSTRUCTION payloads, retiring its loads with values from a memory model
// (the slice has no stores, so it sees the memory as it was before the
// loop). After the exit instruction (disable-instruction-fetch flag) it runs
// the real loop, whose body marks cells visited, and takes every B and C
// direction from the BRANCH_DIR payloads. It checks the slice stream (PCs
// and words), that every streamed outcome equals the real outcome (including
// those the index table has to force because the body stored to the same
// cell earlier in the loop), that DONE follows the last outcome, and that a
// second run reuses the design without clearing.
module tb_psm_cfd;
  import psm_pkg::*;
  localparam int W = 4;
  localparam int Y = 32;
  localparam int K = 6;                          // neighbour index + Y
  localparam logic [PC_W-1:0] PC_A = 48'h200, PC_SL = 48'h4000, PC_B = 48'h210, PC_C = 48'h214;
  localparam int PRO = 2, BODY = 4;
  localparam int IFQ = 32;
  localparam logic [63:0] FILL = 64'd7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [63:0] cfg_data = 0;
  logic [2:0] obs_r_avail, obs_r_pop_n, intv_f_space, intv_f_push_n;
  obs_r_t obs_r_data [W]; intv_f_t intv_f_data [W];
  logic running; logic [31:0] n_insn, n_outcome, n_forced;
  psm_cfd #(.W(W), .SLICE_DEPTH(16), .IT_ENTRIES(1024), .OB_DEPTH(1024)) dut (.*);

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

  // Slice memory: role codes in the low byte. 1 fillnum load, 2 index load,
  // 3 waymap load, 4 maparp load, 5 exit, 0 other.
  logic [31:0] slice_w [7] = '{32'hA000_0001, 32'hA000_0000,
                              32'hA000_0002, 32'hA000_0003, 32'hA000_0004, 32'hA000_0000,
                              32'hA000_0005};
  logic [63:0] mem_fill [Y * Y];
  logic [63:0] mem_map [Y * Y];
  int wlist [$];

  task automatic retire(logic [PC_W-1:0] pc, logic [63:0] v, bit dis);
    obs_r_t p;
    p = '0; p.pc = pc; p.value = v; p.cfg.disable_ifetch = dis;
    oq.push_back(p);
  endtask

  task automatic pop_f(output intv_f_t e, output bit ok);
    int waited;
    waited = 0;
    while (fq.size() == 0 && waited < 5000) begin @(negedge clk); waited++; end
    ok = (fq.size() != 0);
    if (ok) e = fq.pop_front();
    else e = '0;
  endtask

  int bad_insn, bad_pred, n_b, n_c, forced_expect;

  task automatic run(int n);
    intv_f_t e;
    bit ok;
    int it, idx, i1;
    bit seen [Y * Y];
    for (int i = 0; i < Y * Y; i++) seen[i] = 1'b0;
    forced_expect = 0;
    retire(PC_A, 64'(n), 1'b0);
    // The slice.
    it = 0;
    for (int a = 0; a < PRO + n * BODY + 1; a++) begin
      int addr;
      addr = (a < PRO) ? a : (a == PRO + n * BODY) ? PRO + BODY : PRO + (a - PRO) % BODY;
      pop_f(e, ok);
      if (!ok || e.cmd != CMD_INSTRUCTION || e.pc != PC_SL + PC_W'(4 * addr) || e.data != slice_w[addr]) begin
        bad_insn++;
        if (bad_insn < 4) $display("INFO slice word %0d: cmd %0d pc %h data %h", a, e.cmd, e.pc, e.data);
      end
      case (slice_w[addr][7:0])
        8'd1: retire(e.pc, FILL, 1'b0);
        8'd2: begin idx = wlist[it]; i1 = idx + Y; retire(e.pc, 64'(idx), 1'b0); end
        8'd3: retire(e.pc, mem_fill[i1], 1'b0);
        8'd4: if (mem_fill[i1] != FILL) retire(e.pc, mem_map[i1], 1'b0);
        8'd5: retire(e.pc, 0, 1'b1);
        default: retire(e.pc, 0, 1'b0);
      endcase
      if (a >= PRO && a < PRO + n * BODY && (a - PRO) % BODY == BODY - 1) it++;
      @(negedge clk);
    end
    // The real loop, with the body's stores.
    for (int j = 0; j < n; j++) begin
      bit nv, fr;
      idx = wlist[j]; i1 = idx + Y;
      nv = (mem_fill[i1] != FILL);
      if (!nv && seen[i1]) forced_expect++;
      pop_f(e, ok);
      n_b++;
      if (!ok || e.cmd != CMD_BRANCH_DIR || e.pc != PC_B || e.data[0] != nv) bad_pred++;
      if (nv) begin
        fr = (mem_map[i1] == 0);
        pop_f(e, ok);
        n_c++;
        if (!ok || e.cmd != CMD_BRANCH_DIR || e.pc != PC_C || e.data[0] != fr) bad_pred++;
        if (fr) begin mem_fill[i1] = FILL; seen[i1] = 1'b1; end
      end
      @(negedge clk);
    end
    pop_f(e, ok);
    check(ok && e.cmd == CMD_DONE, "DONE after the last outcome");
    repeat (3) @(negedge clk);
    check(!running, "run finished");
  endtask

  task automatic setreg(int a, logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(a); cfg_data = d; @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int f0;
    for (int i = 0; i < Y * Y; i++) begin
      mem_fill[i] = ((i * 13) % 10 < 3) ? FILL : 64'(i % 5);
      mem_map[i] = ((i * 29) % 10 < 3) ? 64'd9 : 64'd0;
    end
    // Worklist with repeated cells, so the body's stores change later B outcomes.
    for (int i = 0; i < 120; i++) wlist.push_back(Y + 1 + ((i * 7) % 40) + Y * ((i / 40) % 3));
    repeat (2) @(negedge clk); rst_n = 1;
    setreg(0, PC_A); setreg(1, PC_SL); setreg(2, PC_B); setreg(3, PC_C);
    setreg(4, PC_SL + 0); setreg(5, PC_SL + 8); setreg(6, PC_SL + 12); setreg(7, PC_SL + 16);
    setreg(8, Y); setreg(9, 3); setreg(10, PRO); setreg(11, BODY); setreg(12, K);
    for (int a = 0; a < 7; a++) setreg(13, {16'd0, 16'(a), slice_w[a]});
    repeat (1100) @(negedge clk);   // index table clear after reset

    run(120);
    $display("INFO run 1: insn %0d outcomes %0d forced %0d (expected %0d) B %0d C %0d",
             n_insn, n_outcome, n_forced, forced_expect, n_b, n_c);
    check(bad_insn == 0, "slice stream: prologue, body per iteration, exit");
    check(bad_pred == 0, $sformatf("all outcomes correct (%0d wrong)", bad_pred));
    check(n_forced == 32'(forced_expect) && forced_expect > 0, "index table forced the revisited cells");
    check(n_outcome == 32'(n_b + n_c), "one outcome per executed B and C");
    check(n_insn == 32'(PRO + 120 * BODY + 1), "instruction count");
    // Second run: memory now holds the first run's stores; new cells.
    f0 = n_forced;
    for (int i = 0; i < 60; i++) wlist[i] = Y + 1 + ((i * 11) % 60) + Y * 4;
    run(60);
    check(bad_insn == 0 && bad_pred == 0, "second run correct");
    check(n_forced - f0 == 32'(forced_expect), "second run forcing uses only its own stores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
