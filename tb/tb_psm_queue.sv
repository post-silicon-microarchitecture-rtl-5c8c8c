// tb_psm_queue: self-checking test of the dual-clock PSM queue.
//
// Two queues of 32 entries are tested with the write clock four times faster
// than the read clock and the reverse: a narrow-to-wide queue (1 push per
// core cycle, up to 4 pops per fabric cycle, like ObsQ-R) and a
// wide-to-narrow one (up to 4 pushes per fabric cycle, 1 pop per core cycle,
// like IntvQ-F). Sequence numbers are pushed and every popped value must be
// the next expected one. Each queue is also filled without popping to check
// that it holds exactly 32 entries, then drained.
module tb_psm_queue;
  localparam int DEPTH = 32;
  localparam int W = 4;

  logic fclk = 0, sclk = 0;   // fast (core) and slow (fabric) clocks
  logic frst_n = 0, srst_n = 0;
  always #5  fclk = ~fclk;
  always #20 sclk = ~sclk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // narrow push (fast) -> wide pop (slow)
  logic [0:0]  a_push_n, a_space;
  logic [15:0] a_pdata [1];
  logic [2:0]  a_pop_n, a_avail;
  logic [15:0] a_rdata [W];
  psm_queue #(.T(logic [15:0]), .DEPTH(DEPTH), .PUSH_W(1), .POP_W(W)) u_a (
    .wclk(fclk), .wrst_n(frst_n), .push_n(a_push_n), .push_data(a_pdata), .push_space(a_space),
    .rclk(sclk), .rrst_n(srst_n), .pop_n(a_pop_n), .pop_data(a_rdata), .pop_avail(a_avail));

  // wide push (slow) -> narrow pop (fast)
  logic [2:0]  b_push_n, b_space;
  logic [15:0] b_pdata [W];
  logic [0:0]  b_pop_n, b_avail;
  logic [15:0] b_rdata [1];
  psm_queue #(.T(logic [15:0]), .DEPTH(DEPTH), .PUSH_W(W), .POP_W(1)) u_b (
    .wclk(sclk), .wrst_n(srst_n), .push_n(b_push_n), .push_data(b_pdata), .push_space(b_space),
    .rclk(fclk), .rrst_n(frst_n), .pop_n(b_pop_n), .pop_data(b_rdata), .pop_avail(b_avail));

  int a_wr = 0, a_rd = 0, b_wr = 0, b_rd = 0;
  bit a_pop_en = 0, b_pop_en = 0, a_push_en = 0, b_push_en = 0;
  int N = 400;

  // queue A producer (fast)
  always_ff @(posedge fclk) if (frst_n) begin
    if (a_push_n != 0) a_wr <= a_wr + 1;
  end
  always_comb begin
    a_push_n = (a_push_en && a_space != 0 && a_wr < N && ($urandom_range(0, 3) != 0 || 1)) ? 1'b1 : 1'b0;
    a_pdata[0] = 16'(a_wr);
  end
  // queue A consumer (slow), pops a random number of the visible entries
  int a_take;
  always @(negedge sclk) a_take = a_pop_en ? $urandom_range(0, W) : 0;
  always_comb a_pop_n = 3'((a_take < int'(a_avail)) ? a_take : int'(a_avail));
  always_ff @(posedge sclk) if (srst_n) begin
    for (int k = 0; k < W; k++) if (k < int'(a_pop_n)) begin
      check(a_rdata[k] == 16'(a_rd + k), $sformatf("A order: got %0d want %0d", a_rdata[k], a_rd + k));
    end
    a_rd <= a_rd + int'(a_pop_n);
  end

  // queue B producer (slow), pushes a random number up to the space
  int b_want;
  always @(negedge sclk) b_want = b_push_en ? $urandom_range(0, W) : 0;
  always_comb begin
    int n;
    n = (b_want < int'(b_space)) ? b_want : int'(b_space);
    if (n > N - b_wr) n = N - b_wr;
    b_push_n = 3'(n);
    for (int k = 0; k < W; k++) b_pdata[k] = 16'(b_wr + k);
  end
  always_ff @(posedge sclk) if (srst_n) b_wr <= b_wr + int'(b_push_n);
  // queue B consumer (fast)
  always_comb b_pop_n = (b_pop_en && b_avail != 0) ? 1'b1 : 1'b0;
  always_ff @(posedge fclk) if (frst_n) begin
    if (b_pop_n != 0) begin
      check(b_rdata[0] == 16'(b_rd), $sformatf("B order: got %0d want %0d", b_rdata[0], b_rd));
      b_rd <= b_rd + 1;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge sclk);
    frst_n = 1; srst_n = 1;
    // Fill both queues without popping: exactly DEPTH entries fit.
    a_push_en = 1; b_push_en = 1;
    repeat (40) @(posedge sclk);
    check(a_wr == DEPTH, $sformatf("A holds %0d entries, want %0d", a_wr, DEPTH));
    check(b_wr == DEPTH, $sformatf("B holds %0d entries, want %0d", b_wr, DEPTH));
    check(a_space == 0 && b_space == 0, "full queues report no space");
    check(a_avail == 3'(W), "A shows W entries to the wide side");
    check(b_avail == 1'b1, "B shows one entry to the narrow side");
    // Stream the rest through with random pop widths.
    a_pop_en = 1; b_pop_en = 1;
    wait (a_rd == N && b_rd == N);
    repeat (10) @(posedge sclk);
    check(a_avail == 0 && b_avail == 0, "queues empty at the end");
    check(a_rd == N && b_rd == N, "all entries delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
