// psm_mode_ctrl: execution-mode state of the PSM-Agent.
//
// The configuration flags of a matching Retire Snoop Table entry change how
// the core runs. This block keeps the four modes they set and clears and
// turns the flag actions into one-cycle requests to the core:
//   enable_psm      -> psm_on (region of interest: queues in use)
//   full_squash     -> full_squash_mode, plus a pipeline squash request
//   custom_bp       -> custom_bp_mode (fetch consults the agent)
//   enable_ifetch   -> ifetch_mode, plus squash and checkpoint requests
//   disable_ifetch  -> leaves ifetch_mode, plus a checkpoint-restore request
//   disable_psm     -> back to baseline: all modes cleared, and a restore
//                      request if instruction fetch from the agent was on
// Flags other than enable_psm act only while PSM is on or when the same entry
// turns it on; when one entry carries both, enables act before disables.
//
// Timing: modes and requests are registered and change in the cycle after
// flag_valid. The mode meanings follow the architecture; precedence and the
// request pulses are this design's choices.
module psm_mode_ctrl
  import psm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flag_valid,
  input  rst_cfg_t flags,
  output logic     psm_on,
  output logic     full_squash_mode,
  output logic     custom_bp_mode,
  output logic     ifetch_mode,
  output logic     squash_req,
  output logic     checkpoint_req,
  output logic     restore_req
);
  logic on_n, fs_n, bp_n, if_n, sq_n, ck_n, rs_n;

  always_comb begin
    on_n = psm_on;
    fs_n = full_squash_mode;
    bp_n = custom_bp_mode;
    if_n = ifetch_mode;
    sq_n = 1'b0;
    ck_n = 1'b0;
    rs_n = 1'b0;
    if (flag_valid && (psm_on || flags.enable_psm)) begin
      on_n = 1'b1;
      if (flags.full_squash) begin
        fs_n = 1'b1;
        sq_n = 1'b1;
      end
      if (flags.custom_bp) bp_n = 1'b1;
      if (flags.enable_ifetch && !ifetch_mode) begin
        if_n = 1'b1;
        sq_n = 1'b1;
        ck_n = 1'b1;
      end
      if (flags.disable_ifetch && if_n) begin
        if_n = 1'b0;
        rs_n = 1'b1;
      end
      if (flags.disable_psm) begin
        rs_n = rs_n | if_n;
        on_n = 1'b0;
        fs_n = 1'b0;
        bp_n = 1'b0;
        if_n = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psm_on           <= 1'b0;
      full_squash_mode <= 1'b0;
      custom_bp_mode   <= 1'b0;
      ifetch_mode      <= 1'b0;
      squash_req       <= 1'b0;
      checkpoint_req   <= 1'b0;
      restore_req      <= 1'b0;
    end else begin
      psm_on           <= on_n;
      full_squash_mode <= fs_n;
      custom_bp_mode   <= bp_n;
      ifetch_mode      <= if_n;
      squash_req       <= sq_n;
      checkpoint_req   <= ck_n;
      restore_req      <= rs_n;
    end
  end
endmodule
