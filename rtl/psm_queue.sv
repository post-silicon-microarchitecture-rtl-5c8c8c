// psm_queue: an observation or intervention queue of the PSM-Agent, crossing
// between the core clock and the reconfigurable-fabric clock.
//
// The fabric may run C times slower than the core, and moves up to W payloads
// per fabric cycle into or out of a queue, while the core side handles one
// payload per core cycle. The queue is therefore built from LANES = max(PUSH_W,
// POP_W) independent dual-clock FIFO lanes of DEPTH/LANES entries each. Both
// sides walk the lanes round-robin from their own lane pointer, so payloads
// leave in the order they entered, and a wide side can move several payloads
// in one cycle without any multi-bit pointer crossing the clock boundary.
//
// Push side: push_space tells how many payloads (at most PUSH_W) can be
// written now; the producer drives push_n <= push_space payloads in
// push_data[0..push_n-1]. Pop side: pop_avail tells how many payloads (at most
// POP_W) are visible in pop_data[0..pop_avail-1], oldest first; the consumer
// takes the first pop_n of them. A payload pushed becomes visible on the other
// side about three destination-clock cycles later.
//
// The total size Q (DEPTH) and width W follow the evaluated configuration
// (queue32, w4); the lane organisation is this implementation's choice.
module psm_queue #(
  parameter type         T      = logic [7:0],
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned PUSH_W = 1,
  parameter int unsigned POP_W  = 4
) (
  input  logic wclk,
  input  logic wrst_n,
  input  logic [$clog2(PUSH_W+1)-1:0] push_n,
  input  T     push_data [PUSH_W],
  output logic [$clog2(PUSH_W+1)-1:0] push_space,

  input  logic rclk,
  input  logic rrst_n,
  input  logic [$clog2(POP_W+1)-1:0] pop_n,
  output T     pop_data [POP_W],
  output logic [$clog2(POP_W+1)-1:0] pop_avail
);
  localparam int unsigned LANES      = (PUSH_W > POP_W) ? PUSH_W : POP_W;
  localparam int unsigned LANE_DEPTH = DEPTH / LANES;
  localparam int unsigned LW         = (LANES > 1) ? $clog2(LANES) : 1;

  logic [LANES-1:0] lane_wr, lane_full, lane_rd, lane_empty;
  T                 lane_wdata [LANES];
  T                 lane_rdata [LANES];
  logic [LW-1:0]    wsel, rsel;

  function automatic logic [LW-1:0] lane_of(logic [LW-1:0] base, int unsigned k);
    return LW'((int'(base) + k) % LANES);
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    psm_async_fifo #(.T(T), .DEPTH(LANE_DEPTH)) u_fifo (
      .wr_clk (wclk), .wr_rst_n(wrst_n), .wr_en(lane_wr[l]), .wr_data(lane_wdata[l]), .full(lane_full[l]),
      .rd_clk (rclk), .rd_rst_n(rrst_n), .rd_en(lane_rd[l]), .rd_data(lane_rdata[l]), .empty(lane_empty[l])
    );
  end

  // Push side: count writable lanes in round-robin order and steer payloads.
  always_comb begin
    logic stop;
    push_space = '0;
    stop       = 1'b0;
    lane_wr    = '0;
    for (int l = 0; l < LANES; l++) lane_wdata[l] = push_data[0];
    for (int unsigned k = 0; k < PUSH_W; k++) begin
      if (!stop && !lane_full[lane_of(wsel, k)]) push_space = push_space + 1'b1;
      else stop = 1'b1;
      if (k < push_n) begin
        lane_wr[lane_of(wsel, k)]    = 1'b1;
        lane_wdata[lane_of(wsel, k)] = push_data[k];
      end
    end
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) wsel <= '0;
    else         wsel <= lane_of(wsel, int'(push_n));
  end

  // Pop side: count readable lanes in round-robin order and present them.
  always_comb begin
    logic stop;
    pop_avail = '0;
    stop      = 1'b0;
    lane_rd   = '0;
    for (int unsigned k = 0; k < POP_W; k++) begin
      pop_data[k] = lane_rdata[lane_of(rsel, k)];
      if (!stop && !lane_empty[lane_of(rsel, k)]) pop_avail = pop_avail + 1'b1;
      else stop = 1'b1;
      if (k < pop_n) lane_rd[lane_of(rsel, k)] = 1'b1;
    end
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) rsel <= '0;
    else         rsel <= lane_of(rsel, int'(pop_n));
  end

  // The producer and consumer must respect the advertised counts.
  a_push_in_space: assert property (@(posedge wclk) disable iff (!wrst_n) push_n <= push_space);
  a_pop_in_avail:  assert property (@(posedge rclk) disable iff (!rrst_n) pop_n <= pop_avail);

  initial begin
    assert (DEPTH % LANES == 0 && LANE_DEPTH >= 2)
      else $error("psm_queue: DEPTH must be a multiple of max(PUSH_W,POP_W) with at least two entries per lane");
  end
endmodule
