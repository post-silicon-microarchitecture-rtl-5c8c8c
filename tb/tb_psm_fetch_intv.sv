// tb_psm_fetch_intv: self-checking test of the Fetch Snoop Table and the
// IntvQ-F head handling.
//
// The testbench plays IntvQ-F with a simple array-backed queue and drives
// fetched PCs. It checks: custom direction override and pop on a matching
// BRANCH_DIR head; default prediction when the head does not match; fetch
// stall when a snooped branch finds the queue empty; SYNC waiting for its PC;
// DONE switching to default predictions; INSTRUCTION delivery and stall in
// instruction-fetch mode; draining to the next SYNC after a squash; and
// discarding payloads while PSM is off.
module tb_psm_fetch_intv;
  import psm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0; logic [3:0] cfg_idx = 0; logic cfg_valid = 0; logic [PC_W-1:0] cfg_pc = 0;
  logic psm_on = 0, custom_bp_mode = 0, ifetch_mode = 0, squash = 0;
  logic fetch_valid = 0; logic [PC_W-1:0] fetch_pc = 0;
  logic fetch_stall, bp_override, bp_taken, inj_valid, pop, done, draining;
  logic [PC_W-1:0] inj_pc; logic [INSN_W-1:0] inj_insn;
  logic head_valid; intv_f_t head;

  psm_fetch_intv #(.ENTRIES(16)) dut (.*);

  intv_f_t q[$];
  assign head_valid = q.size() != 0;
  assign head = (q.size() != 0) ? q[0] : '0;
  always_ff @(posedge clk) if (pop && q.size() != 0) void'(q.pop_front());

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic fetch(logic [PC_W-1:0] pc);
    @(negedge clk); fetch_valid = 1; fetch_pc = pc; #1;
  endtask
  task automatic idle();
    @(negedge clk); fetch_valid = 0; #1;
  endtask
  function automatic intv_f_t bd(logic [PC_W-1:0] pc, bit dir);
    return '{pc: pc, cmd: CMD_BRANCH_DIR, data: INSN_W'(dir)};
  endfunction

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); cfg_we = 1; cfg_idx = 0; cfg_valid = 1; cfg_pc = 48'h100;
    @(negedge clk); cfg_idx = 1; cfg_pc = 48'h200;
    @(negedge clk); cfg_we = 0;

    // PSM off: payloads are discarded.
    q.push_back(bd(48'h100, 1));
    idle(); idle();
    check(q.size() == 0, "payload discarded while PSM is off");

    psm_on = 1; custom_bp_mode = 1;
    // Empty queue and a snooped branch: stall.
    fetch(48'h100);
    check(fetch_stall && !bp_override, "snooped branch with empty queue stalls");
    // Unsnooped PC never stalls.
    fetch(48'h300);
    check(!fetch_stall && !bp_override, "unsnooped PC: default prediction");
    // Override.
    q.push_back(bd(48'h100, 1)); q.push_back(bd(48'h200, 0));
    fetch(48'h100);
    check(bp_override && bp_taken && !fetch_stall && pop, "override taken");
    fetch(48'h100);
    check(!bp_override && !fetch_stall && !pop, "head for another PC: default prediction");
    fetch(48'h200);
    check(bp_override && !bp_taken && pop, "override not taken");
    // SYNC: default until its PC is fetched.
    q.push_back('{pc: 48'h180, cmd: CMD_SYNC, data: '0}); q.push_back(bd(48'h100, 0));
    fetch(48'h100);
    check(!bp_override && !fetch_stall && !pop, "SYNC at head: default prediction");
    fetch(48'h180);
    check(pop, "SYNC popped at its PC");
    fetch(48'h100);
    check(bp_override && !bp_taken, "prediction after SYNC");
    // DONE.
    q.push_back('{pc: 48'h0, cmd: CMD_DONE, data: '0}); q.push_back(bd(48'h100, 1));
    idle(); idle();
    check(done, "DONE sets done");
    fetch(48'h100);
    check(!bp_override && !fetch_stall, "after DONE: default predictions");
    // Squash: drain to the next SYNC.
    custom_bp_mode = 0; idle(); custom_bp_mode = 1; q.delete();
    q.push_back(bd(48'h100, 1)); q.push_back(bd(48'h200, 1));
    q.push_back('{pc: 48'h180, cmd: CMD_SYNC, data: '0}); q.push_back(bd(48'h100, 0));
    @(negedge clk); squash = 1; @(negedge clk); squash = 0; #1;
    check(draining, "squash starts draining");
    fetch(48'h100);
    check(!bp_override && !fetch_stall, "no override while draining");
    idle(); idle(); idle();
    check(!draining && q.size() == 2 && q[0].cmd == CMD_SYNC, "drained up to SYNC");
    fetch(48'h180); fetch(48'h100);
    check(bp_override && !bp_taken, "prediction after drain and SYNC");
    // Instruction-fetch mode.
    idle(); q.delete(); ifetch_mode = 1;
    fetch(48'h0);
    check(fetch_stall && !inj_valid, "instruction fetch with empty queue stalls");
    idle();
    q.push_back('{pc: 48'h9000, cmd: CMD_INSTRUCTION, data: 32'h1234_5678});
    q.push_back(bd(48'h100, 1));
    fetch(48'h0);
    check(inj_valid && inj_pc == 48'h9000 && inj_insn == 32'h1234_5678 && pop, $sformatf("injected instruction %0b %h %h %0b", inj_valid, inj_pc, inj_insn, pop));
    fetch(48'h0);
    check(fetch_stall && !inj_valid && !pop, "non-instruction head stalls instruction fetch");
    ifetch_mode = 0;
    fetch(48'h100);
    check(bp_override && bp_taken, "branch direction consumed after instruction fetch ends");
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
