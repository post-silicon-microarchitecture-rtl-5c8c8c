// tb_psm_mode_ctrl: self-checking test of the PSM mode controller.
//
// Applies the flag combinations of the snoop-table entries and checks the
// registered modes and the one-cycle squash, checkpoint and restore requests
// in the cycle after each flag, including: flags ignored while PSM is off,
// enable with full squash and custom prediction together, entering and
// leaving instruction-fetch mode, and disable returning to baseline (with a
// restore if instruction fetch was still on).
module tb_psm_mode_ctrl;
  import psm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic flag_valid = 0; rst_cfg_t flags = '0;
  logic psm_on, full_squash_mode, custom_bp_mode, ifetch_mode, squash_req, checkpoint_req, restore_req;
  psm_mode_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Apply flags for one cycle; return after the registers have updated.
  task automatic apply(rst_cfg_t f);
    @(negedge clk); flag_valid = 1; flags = f;
    @(negedge clk); flag_valid = 0; flags = '0;
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(!psm_on && !full_squash_mode && !custom_bp_mode && !ifetch_mode, "reset: baseline");
    apply('{custom_bp:1, full_squash:1, default:0});
    check(!custom_bp_mode && !full_squash_mode && !squash_req, "flags ignored while PSM is off");
    apply('{enable_psm:1, full_squash:1, custom_bp:1, default:0});
    check(psm_on && full_squash_mode && custom_bp_mode && !ifetch_mode, "enable + full squash + custom BP");
    check(squash_req && !checkpoint_req && !restore_req, "full squash requests a squash");
    @(negedge clk);
    check(!squash_req, "squash request lasts one cycle");
    apply('{enable_ifetch:1, default:0});
    check(ifetch_mode && squash_req && checkpoint_req, "enable instruction fetch: squash + checkpoint");
    apply('{disable_ifetch:1, default:0});
    check(!ifetch_mode && restore_req && psm_on, "disable instruction fetch: restore");
    apply('{enable_ifetch:1, default:0});
    apply('{disable_psm:1, default:0});
    check(!psm_on && !full_squash_mode && !custom_bp_mode && !ifetch_mode, "disable PSM: baseline");
    check(restore_req, "disable PSM while fetching from the agent restores the checkpoint");
    apply('{enable_psm:1, disable_psm:1, default:0});
    check(!psm_on, "disable wins over enable in one entry");
    apply('{enable_psm:1, default:0});
    apply('{disable_psm:1, default:0});
    check(!psm_on && !restore_req, "disable without instruction fetch: no restore");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
