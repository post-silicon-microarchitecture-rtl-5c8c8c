// tb_psm_issue_intv: self-checking test of the IntvQ-IS issue logic.
//
// Checks that an operation issues only into a load-lane bubble and only while
// PSM is on, stays pinned at the head (no second issue, no pop) until it
// resolves, that a PREFETCH is popped on resolve, that a LOAD pushes its value
// and address into ObsQ-EX, and that with ObsQ-EX full the value is held and
// pushed later. Operations are discarded while PSM is off.
module tb_psm_issue_intv;
  import psm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic psm_on = 0, lane_bubble = 0, resolve_valid = 0, obs_space = 1;
  logic [DATA_W-1:0] resolve_data = 0;
  logic head_valid, pop, issue_valid, obs_push;
  intv_is_t head, issue_op; obs_ex_t obs_payload;
  psm_issue_intv dut (.*);

  intv_is_t q[$];
  assign head_valid = q.size() != 0;
  assign head = (q.size() != 0) ? q[0] : '0;
  always_ff @(posedge clk) if (pop && q.size() != 0) void'(q.pop_front());

  int checks = 0, failures = 0, issues = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always_ff @(posedge clk) if (issue_valid) issues <= issues + 1;

  task automatic step(); @(negedge clk); #1; endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    q.push_back('{cmd: CMD_PREFETCH, addr: 48'h40, size: 0});
    step(); step();
    check(q.size() == 0, "discarded while PSM is off");
    psm_on = 1;
    q.push_back('{cmd: CMD_PREFETCH, addr: 48'h1000, size: 0});
    q.push_back('{cmd: CMD_LOAD, addr: 48'h2000, size: 3});
    step();
    check(!issue_valid, "no issue without a bubble");
    lane_bubble = 1; #1;
    check(issue_valid && issue_op.cmd == CMD_PREFETCH && issue_op.addr == 48'h1000, "prefetch issues into bubble");
    step(); step(); step();
    check(issues == 1 && q.size() == 2, "pinned: no second issue, no pop before resolve");
    resolve_valid = 1; #1;
    check(pop && !obs_push, "prefetch pops on resolve, no observation");
    step(); resolve_valid = 0; #1;
    check(issue_valid && issue_op.cmd == CMD_LOAD && issue_op.size == 3, "load issues next");
    step(); step();
    obs_space = 0; resolve_valid = 1; resolve_data = 64'hfeed; #1;
    check(!pop && !obs_push, "load with ObsQ-EX full waits");
    step(); resolve_valid = 0; resolve_data = 0; step(); #1;
    check(!issue_valid && q.size() == 1, "held load blocks the queue");
    obs_space = 1; #1;
    check(obs_push && pop && obs_payload.value == 64'hfeed && obs_payload.addr == 48'h2000,
          "held value pushed with its address");
    step();
    q.push_back('{cmd: CMD_LOAD, addr: 48'h3000, size: 2});
    step(); step();
    resolve_valid = 1; resolve_data = 64'h77; #1;
    check(obs_push && pop && obs_payload.value == 64'h77 && obs_payload.addr == 48'h3000, "direct load value push");
    step(); resolve_valid = 0;
    check(issues == 3, "three operations issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
