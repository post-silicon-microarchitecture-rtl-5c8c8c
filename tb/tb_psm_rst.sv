// tb_psm_rst: self-checking test of the Retire Snoop Table.
//
// Loads entries with different flag and payload-type bits, retires matching
// and non-matching PCs and checks, in the retire cycle: the hit and its
// flags, the payload (PC, flags, taken only with the branch bit, value only
// with the destination bit), that nothing is pushed while PSM is off unless
// the entry enables it, and that a full ObsQ-R stalls retirement.
module tb_psm_rst;
  import psm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cfg_we = 0; logic [3:0] cfg_idx = 0; rst_entry_t cfg_entry = '0;
  logic retire_valid = 0, retire_taken = 0; logic [PC_W-1:0] retire_pc = 0; logic [DATA_W-1:0] retire_value = 0;
  logic retire_stall, psm_on = 0, flag_valid, obs_space = 1, obs_push;
  rst_cfg_t flags; obs_r_t obs_payload;

  psm_rst #(.ENTRIES(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(int idx, logic [PC_W-1:0] pc, rst_cfg_t c, rst_ptype_t t);
    @(negedge clk);
    cfg_we = 1; cfg_idx = 4'(idx); cfg_entry = '{valid: 1'b1, pc: pc, cfg: c, ptype: t};
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic retire(logic [PC_W-1:0] pc, logic tk, logic [DATA_W-1:0] v);
    @(negedge clk);
    retire_valid = 1; retire_pc = pc; retire_taken = tk; retire_value = v;
    #1;
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    write(0, 48'h1000, '{enable_psm:1, full_squash:1, custom_bp:1, default:0}, '{branch:0, dest_reg:1});
    write(1, 48'h2000, '0, '{branch:1, dest_reg:0});
    write(2, 48'h3000, '{disable_psm:1, default:0}, '{branch:1, dest_reg:1});
    write(15, 48'h4000, '{enable_ifetch:1, default:0}, '0);

    // PSM off: an ordinary entry reports its flags but pushes nothing.
    retire(48'h2000, 1, 64'h55);
    check(flag_valid && !obs_push, "PSM off: hit without push");
    // The enabling entry pushes even while PSM is off.
    retire(48'h1000, 1, 64'hdead_beef);
    check(flag_valid && flags.enable_psm && flags.full_squash && flags.custom_bp && !flags.disable_psm,
          "enable entry flags");
    check(obs_push && obs_payload.pc == 48'h1000 && obs_payload.value == 64'hdead_beef && !obs_payload.taken,
          "enable entry payload: value, no taken flag");
    psm_on = 1;
    retire(48'h2000, 1, 64'h55);
    check(obs_push && obs_payload.taken && obs_payload.value == 0 && obs_payload.ptype.branch,
          "branch entry: taken, no value");
    retire(48'h2000, 0, 64'h55);
    check(obs_push && !obs_payload.taken, "branch entry: not taken");
    retire(48'h3000, 1, 64'h77);
    check(obs_push && obs_payload.taken && obs_payload.value == 64'h77 && flags.disable_psm,
          "both payload bits and disable flag");
    retire(48'h4000, 0, 0);
    check(flag_valid && flags.enable_ifetch && obs_push && !obs_payload.squash, "last entry matches");
    retire(48'h5000, 1, 1);
    check(!flag_valid && !obs_push && !retire_stall, "miss: nothing");
    // Full queue: retirement stalls and no flags are reported.
    obs_space = 0;
    retire(48'h2000, 1, 0);
    check(retire_stall && !obs_push && !flag_valid, "full queue stalls the matching retire");
    retire(48'h5000, 1, 0);
    check(!retire_stall, "full queue does not stall a miss");
    obs_space = 1;
    retire(48'h2000, 1, 0);
    check(!retire_stall && obs_push, "push once space returns");
    // Invalidated entry no longer matches.
    @(negedge clk); retire_valid = 0; cfg_we = 1; cfg_idx = 1; cfg_entry = '0;
    @(negedge clk); cfg_we = 0;
    retire(48'h2000, 1, 0);
    check(!flag_valid && !obs_push, "invalidated entry misses");
    @(negedge clk); retire_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
