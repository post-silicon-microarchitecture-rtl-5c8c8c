// psm_fetch_intv: Fetch Snoop Table (FST) and the fetch-side handling of the
// Intervention Queue at Fetch (IntvQ-F).
//
// The FST holds the PCs of branches the fabric predicts. In custom branch
// prediction mode every fetched PC is looked up in the FST and compared with
// the payload at the head of IntvQ-F:
//   * FST hit, head is BRANCH_DIR for this PC: the fabric's direction
//     overrides the core's prediction and the head is popped;
//   * FST hit, head is something else: the core's own prediction is used;
//   * FST hit, queue empty: the fabric's prediction stream is late, fetch
//     stalls (fetch_stall) until a payload arrives.
// A SYNC head is a synchronisation point: default predictions are used until
// an instruction with the SYNC payload's PC is fetched, which pops it. A DONE
// head is popped at once and switches to default predictions for the rest of
// the custom-BP episode. In instruction-fetch mode the core fetches from the
// agent: an INSTRUCTION head is handed to the core (inj_valid, inj_pc,
// inj_insn) and popped; with anything else at the head fetch stalls.
//
// After the core squashes in custom-BP mode, predictions already popped for
// squashed instructions are lost, so the block discards IntvQ-F payloads up
// to the next SYNC (drain state); the fabric resynchronises by sending SYNC
// followed by fresh predictions.
//
// While PSM is off, any payload reaching the head is discarded, so a region
// of interest never sees predictions left over from the previous one.
//
// Timing: lookups are combinational, in the fetch cycle; pop takes effect at
// the next clock edge. One fetched PC per cycle. The override, stall, SYNC,
// DONE and INSTRUCTION behaviour follow the architecture; the drain after a
// squash, the FST size and the one-lookup-per-cycle port are this design's.
module psm_fetch_intv
  import psm_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic clk,
  input  logic rst_n,
  // configuration
  input  logic                       cfg_we,
  input  logic [$clog2(ENTRIES)-1:0] cfg_idx,
  input  logic                       cfg_valid,
  input  logic [PC_W-1:0]            cfg_pc,
  // modes
  input  logic            psm_on,
  input  logic            custom_bp_mode,
  input  logic            ifetch_mode,
  input  logic            squash,
  // fetch port
  input  logic            fetch_valid,
  input  logic [PC_W-1:0] fetch_pc,
  output logic            fetch_stall,
  output logic            bp_override,
  output logic            bp_taken,
  output logic            inj_valid,
  output logic [PC_W-1:0] inj_pc,
  output logic [INSN_W-1:0] inj_insn,
  // IntvQ-F head
  input  logic            head_valid,
  input  intv_f_t         head,
  output logic            pop,
  // status
  output logic            done,
  output logic            draining
);
  logic [PC_W-1:0] fst_pc    [ENTRIES];
  logic            fst_valid [ENTRIES];
  logic            fst_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        fst_pc[i]    <= '0;
        fst_valid[i] <= 1'b0;
      end
    end else if (cfg_we) begin
      fst_pc[cfg_idx]    <= cfg_pc;
      fst_valid[cfg_idx] <= cfg_valid;
    end
  end

  always_comb begin
    fst_hit = 1'b0;
    for (int i = 0; i < ENTRIES; i++)
      if (fst_valid[i] && fst_pc[i] == fetch_pc) fst_hit = 1'b1;
  end

  always_comb begin
    fetch_stall = 1'b0;
    bp_override = 1'b0;
    bp_taken    = 1'b0;
    inj_valid   = 1'b0;
    inj_pc      = head.pc;
    inj_insn    = head.data;
    pop         = 1'b0;
    if (!psm_on) begin
      pop = head_valid;  // stale payloads from an ended region are discarded
    end else if (ifetch_mode) begin
      if (fetch_valid) begin
        if (head_valid && head.cmd == CMD_INSTRUCTION) begin
          inj_valid = 1'b1;
          pop       = 1'b1;
        end else begin
          fetch_stall = 1'b1;
        end
      end
    end else if (custom_bp_mode && draining) begin
      pop = head_valid && head.cmd != CMD_SYNC;
    end else if (custom_bp_mode && !done) begin
      if (head_valid && head.cmd == CMD_DONE) begin
        pop = 1'b1;
      end else if (head_valid && head.cmd == CMD_SYNC) begin
        pop = fetch_valid && fetch_pc == head.pc;
      end else if (fetch_valid && fst_hit) begin
        if (!head_valid) begin
          fetch_stall = 1'b1;
        end else if (head.cmd == CMD_BRANCH_DIR && head.pc == fetch_pc) begin
          bp_override = 1'b1;
          bp_taken    = head.data[0];
          pop         = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= 1'b0;
      draining <= 1'b0;
    end else if (!psm_on || !custom_bp_mode) begin
      done     <= 1'b0;
      draining <= 1'b0;
    end else begin
      if (squash && !ifetch_mode) begin
        draining <= 1'b1;
        done     <= 1'b0;
      end else if (draining && head_valid && head.cmd == CMD_SYNC) begin
        draining <= 1'b0;
      end
      if (!draining && !done && head_valid && head.cmd == CMD_DONE && !ifetch_mode) done <= 1'b1;
    end
  end
endmodule
