// tb_psm_ldl_prefetch: self-checking test of the load-dependent load
// prefetcher.
//
// The testbench snoops count and base payloads into the engine, retires the
// progress load at a steady rate, and answers every Load OP through an
// ObsQ-EX model with the pointer stored at that address (a fixed function of
// the element index) after a variable latency. It checks that the prefetch
// stream covers base + j*stride once each and in order and never runs more
// than PF_DIST iterations past retirement, that the load stream follows in
// order and LD_DELAY iterations behind the prefetch stream, that every
// returned pointer produces exactly one PREFETCH of pointer + DEP_OFFSET, that
// the counters agree with the observed traffic, and that the disable payload
// stops the engine.
module tb_psm_ldl_prefetch;
  import psm_pkg::*;
  localparam int W = 4;
  localparam int COUNT = 200;
  localparam int STRIDE = 8;
  localparam int PF_DIST = 12;
  localparam int LD_DELAY = 3;
  localparam logic [ADDR_W-1:0] BASE = 48'h20_0000;
  localparam logic [ADDR_W-1:0] DEP_OFF = 48'h18;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [63:0] cfg_data = 0;
  logic [2:0] obs_r_avail, obs_r_pop_n, obs_ex_avail, obs_ex_pop_n, intv_is_space, intv_is_push_n;
  obs_r_t obs_r_data [W]; obs_ex_t obs_ex_data [W]; intv_is_t intv_is_data [W];
  logic active; logic [31:0] n_prefetch, n_load, n_dep_prefetch;
  psm_ldl_prefetch #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [ADDR_W-1:0] ptr(int j);
    return 48'h80_0000 + ADDR_W'(((j * 37) % 251) * 64);
  endfunction

  obs_r_t oq[$];
  obs_ex_t xq[$];
  always_comb begin
    obs_r_avail = 3'((oq.size() < W) ? oq.size() : W);
    obs_ex_avail = 3'((xq.size() < W) ? xq.size() : W);
    for (int k = 0; k < W; k++) begin
      obs_r_data[k] = (k < oq.size()) ? oq[k] : '0;
      obs_ex_data[k] = (k < xq.size()) ? xq[k] : '0;
    end
  end

  function automatic obs_r_t pl(logic [PC_W-1:0] pc, logic [63:0] v);
    obs_r_t p = '0; p.pc = pc; p.value = v; p.ptype.dest_reg = 1'b1; return p;
  endfunction

  // Load OPs wait in a memory model for a variable number of cycles.
  int pf_j = 0, ld_j = 0, dep_j = 0, core_j = 0;
  int bad_pf = 0, bad_ld = 0, bad_dep = 0, far = 0, early_ld = 0;
  logic [ADDR_W-1:0] mem_addr [$];
  int mem_wait [$];
  always_ff @(posedge clk) begin
    intv_is_space <= 3'($urandom_range(1, W));
    for (int k = 0; k < W; k++) if (k < int'(obs_r_pop_n)) void'(oq.pop_front());
    for (int k = 0; k < W; k++) if (k < int'(obs_ex_pop_n)) void'(xq.pop_front());
    if (rst_n) begin
      int pj, lj, dj;
      intv_is_t op;
      pj = pf_j; lj = ld_j; dj = dep_j;
      for (int k = 0; k < W; k++) if (k < int'(intv_is_push_n)) begin
        op = intv_is_data[k];
        if (op.cmd == CMD_LOAD) begin
          if (op.addr != BASE + ADDR_W'(lj * STRIDE) || op.size != 2'd3) bad_ld++;
          if (!(lj + LD_DELAY < pj || pj >= COUNT)) early_ld++;
          mem_addr.push_back(op.addr); mem_wait.push_back($urandom_range(1, 6));
          lj++;
        end else if (op.addr >= 48'h80_0000) begin
          if (op.addr != ptr(dj) + DEP_OFF) bad_dep++;
          dj++;
        end else begin
          if (op.addr != BASE + ADDR_W'(pj * STRIDE)) bad_pf++;
          if (pj >= core_j + PF_DIST) far++;
          pj++;
        end
      end
      pf_j <= pj; ld_j <= lj; dep_j <= dj;
      // One outstanding load completes at a time, like the pinned head.
      if (mem_wait.size() != 0) begin
        if (mem_wait[0] <= 1) begin
          obs_ex_t r;
          r = '0;
          r.addr = mem_addr[0];
          r.value = 64'(ptr(int'((mem_addr[0] - BASE) / STRIDE)));
          xq.push_back(r);
          void'(mem_addr.pop_front()); void'(mem_wait.pop_front());
        end else mem_wait[0] = mem_wait[0] - 1;
      end
    end
  end

  task automatic setreg(int a, logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(a); cfg_data = d; @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    intv_is_space = W;
    repeat (2) @(negedge clk); rst_n = 1;
    setreg(0, 48'h40); setreg(1, 48'h44); setreg(2, 48'h48); setreg(3, STRIDE);
    setreg(4, PF_DIST); setreg(5, LD_DELAY); setreg(6, 64'(DEP_OFF)); setreg(7, 3);
    oq.push_back(pl(48'h44, COUNT));
    oq.push_back(pl(48'h40, BASE));
    for (int j = 0; j < COUNT; j++) begin
      repeat (3) @(negedge clk);
      oq.push_back(pl(48'h48, 0));
      core_j = j + 1;
    end
    repeat (200) @(negedge clk);
    check(pf_j == COUNT, $sformatf("%0d prefetches of %0d elements", pf_j, COUNT));
    check(ld_j == COUNT, $sformatf("%0d loads of %0d elements", ld_j, COUNT));
    check(dep_j == COUNT, $sformatf("%0d dependent prefetches of %0d", dep_j, COUNT));
    check(bad_pf == 0, "prefetch addresses in order");
    check(bad_ld == 0, "load addresses and size in order");
    check(bad_dep == 0, "dependent prefetches are pointer + offset in order");
    check(far == 0, "prefetch stream within PF_DIST of retirement");
    check(early_ld == 0, "load stream LD_DELAY behind prefetch stream");
    check(n_prefetch == 32'(COUNT) && n_load == 32'(COUNT) && n_dep_prefetch == 32'(COUNT), "counters");
    begin obs_r_t p = pl(48'h99, 0); p.cfg.disable_psm = 1'b1; oq.push_back(p); end
    repeat (4) @(negedge clk);
    check(!active, "disable stops the engine");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
