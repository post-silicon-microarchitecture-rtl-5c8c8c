// psm_issue_intv: issue-side handling of the Intervention Queue at Issue
// (IntvQ-IS) and the push side of the Observation Queue at Execute (ObsQ-EX).
//
// The fabric sends LOAD and PREFETCH operations for opportunistic execution.
// When the core reports a bubble in its load execution lane, the operation at
// the head of IntvQ-IS is issued into that lane. It stays at the head of the
// queue, so no second operation can issue, until the core reports that it
// resolved. A resolved PREFETCH is then popped; a resolved LOAD has its value
// (with its address) pushed into ObsQ-EX for the fabric and is popped in the
// same cycle, or later if ObsQ-EX is full (the value is held meanwhile).
//
// Interface: issue_valid is a one-cycle pulse carrying the operation; the core
// answers with resolve_valid and, for a LOAD, resolve_data. Operations issue
// only while PSM is on; while it is off, operations reaching the head are
// discarded. States: IDLE -> ISSUED -> (WRITEBACK) -> IDLE.
// One operation at a time and the pinned head follow the architecture; the
// held value while ObsQ-EX is full and the address in the ObsQ-EX payload are
// this design's choices.
module psm_issue_intv
  import psm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              psm_on,
  // IntvQ-IS head
  input  logic              head_valid,
  input  intv_is_t          head,
  output logic              pop,
  // load lane
  input  logic              lane_bubble,
  output logic              issue_valid,
  output intv_is_t          issue_op,
  input  logic              resolve_valid,
  input  logic [DATA_W-1:0] resolve_data,
  // ObsQ-EX push side
  input  logic              obs_space,
  output logic              obs_push,
  output obs_ex_t           obs_payload
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUED, S_WB} state_e;
  state_e            state, state_n;
  logic [DATA_W-1:0] held, held_n;

  always_comb begin
    state_n     = state;
    held_n      = held;
    issue_valid = 1'b0;
    issue_op    = head;
    pop         = 1'b0;
    obs_push    = 1'b0;
    obs_payload = '{addr: head.addr, value: resolve_data};
    unique case (state)
      S_IDLE: if (!psm_on) begin
        pop = head_valid;  // stale operations from an ended region are discarded
      end else if (head_valid && lane_bubble) begin
        issue_valid = 1'b1;
        state_n     = S_ISSUED;
      end
      S_ISSUED: if (resolve_valid) begin
        if (head.cmd == CMD_PREFETCH) begin
          pop     = 1'b1;
          state_n = S_IDLE;
        end else if (obs_space) begin
          obs_push = 1'b1;
          pop      = 1'b1;
          state_n  = S_IDLE;
        end else begin
          held_n  = resolve_data;
          state_n = S_WB;
        end
      end
      S_WB: begin
        obs_payload.value = held;
        if (obs_space) begin
          obs_push = 1'b1;
          pop      = 1'b1;
          state_n  = S_IDLE;
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      held  <= '0;
    end else begin
      state <= state_n;
      held  <= held_n;
    end
  end

  a_head_pinned: assert property (@(posedge clk) disable iff (!rst_n)
    state != S_IDLE |-> head_valid);
endmodule
