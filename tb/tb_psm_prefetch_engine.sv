// tb_psm_prefetch_engine: self-checking test of the Prefetch Generation
// Engine with adaptive distance.
//
// The testbench feeds retire payloads (stride, iteration count, base address,
// then one payload per retired delinquent load) and plays a core whose loop
// iteration is slow unless its element was prefetched at least LAT cycles
// earlier. It checks that prefetches cover base + j*stride for every j below
// the count exactly once and in order, that no prefetch runs more than the
// current distance ahead of the core, that the distance is adapted and stays
// within its bounds, and that the engine stops after the disable payload.
module tb_psm_prefetch_engine;
  import psm_pkg::*;
  localparam int W = 4;
  localparam int COUNT = 300;
  localparam int LAT = 24;
  localparam logic [ADDR_W-1:0] BASE = 48'h10_0000;
  localparam int STRIDE = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0; logic [3:0] cfg_addr = 0; logic [63:0] cfg_data = 0;
  logic [2:0] obs_r_avail, obs_r_pop_n, intv_is_space, intv_is_push_n;
  obs_r_t obs_r_data [W]; intv_is_t intv_is_data [W];
  logic active; logic [15:0] distance; logic [31:0] dist_changes;
  psm_prefetch_engine #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Observation stream presented W at a time.
  obs_r_t oq[$];
  always_comb begin
    obs_r_avail = 3'((oq.size() < W) ? oq.size() : W);
    for (int k = 0; k < W; k++) obs_r_data[k] = (k < oq.size()) ? oq[k] : '0;
  end
  always_ff @(posedge clk) for (int k = 0; k < W; k++) if (k < int'(obs_r_pop_n)) void'(oq.pop_front());

  function automatic obs_r_t pl(logic [PC_W-1:0] pc, logic [63:0] v);
    obs_r_t p = '0; p.pc = pc; p.value = v; p.ptype.dest_reg = 1'b1; return p;
  endfunction

  // Prefetch capture and checks.
  int next_j = 0, core_j = 0, cyc = 0, bad_order = 0, too_far = 0, out_of_range = 0;
  int pf_time [COUNT];
  logic [15:0] dmin = 16'hffff, dmax = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    intv_is_space <= 3'($urandom_range(1, W));
    if (rst_n) for (int k = 0; k < W; k++) if (k < int'(intv_is_push_n)) begin
      if (intv_is_data[k].cmd != CMD_PREFETCH || intv_is_data[k].addr != BASE + ADDR_W'((next_j + k) * STRIDE))
        bad_order <= bad_order + 1;
      if (next_j + k >= COUNT) out_of_range <= out_of_range + 1;
      else pf_time[next_j + k] <= cyc;
      if (next_j + k >= core_j + int'(dut.dist_n)) too_far <= too_far + 1;
    end
    if (rst_n) next_j <= next_j + int'(intv_is_push_n);
    if (rst_n && active) begin
      if (distance < dmin) dmin <= distance;
      if (distance > dmax) dmax <= distance;
    end
  end

  task automatic setreg(int a, logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(a); cfg_data = d; @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int j = 0; j < COUNT; j++) pf_time[j] = -1;
    intv_is_space = W;
    repeat (2) @(negedge clk); rst_n = 1;
    setreg(0, 48'h10); setreg(1, 48'h14); setreg(2, 48'h18); setreg(3, 48'h1c);
    setreg(4, 4); setreg(5, 2); setreg(6, 40); setreg(7, 2); setreg(8, 8);
    oq.push_back(pl(48'h18, STRIDE));
    oq.push_back(pl(48'h14, COUNT));
    oq.push_back(pl(48'h10, BASE));
    // The core: iteration j needs its prefetch LAT cycles old, else waits.
    for (int j = 0; j < COUNT; j++) begin
      int waited;
      waited = 0;
      @(negedge clk);
      while ((pf_time[j] < 0 || cyc - pf_time[j] < LAT) && waited < LAT) begin
        @(negedge clk); waited++;
      end
      oq.push_back(pl(48'h1c, 0));
      core_j = j + 1;
    end
    while (oq.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
    check(next_j == COUNT, $sformatf("%0d prefetches for %0d iterations", next_j, COUNT));
    check(bad_order == 0, "prefetch addresses are base + j*stride in order");
    check(out_of_range == 0, "no prefetch beyond the iteration count");
    check(too_far == 0, "no prefetch more than the distance ahead");
    check(dist_changes > 0, $sformatf("distance adapted %0d times", dist_changes));
    check(dmax > 16'd4, $sformatf("distance grew (max %0d)", dmax));
    check(dmin >= 16'd2 && dmax <= 16'd40, $sformatf("distance within bounds (%0d..%0d)", dmin, dmax));
    // Disable payload stops the engine.
    begin obs_r_t p = pl(48'h99, 0); p.cfg.disable_psm = 1'b1; oq.push_back(p); end
    repeat (4) @(negedge clk);
    check(!active, "disable stops the engine");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
