// psm_async_fifo: one lane of a PSM communication queue, a first-in first-out
// buffer whose write side and read side run on unrelated clocks.
//
// The core and the reconfigurable fabric may run at different frequencies, so
// every queue between them crosses a clock boundary. Each side keeps a binary
// pointer one bit wider than the address and publishes its Gray-coded copy;
// the other side samples that copy through two flip-flops. Full and empty are
// therefore pessimistic by two destination-clock cycles and never wrong.
// The storage is a register array written on the write clock and read
// combinationally at the read pointer (a first-word-fall-through read).
//
// Interface: wr_en with wr_data when !full; rd_en when !empty consumes
// rd_data. Each side has its own active-low asynchronous reset; both must be
// asserted together. The Gray-pointer crossing is a standard technique
// chosen here; the architecture only asks for queues that cross clocks.
module psm_async_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 8            // power of two, at least 2
) (
  input  logic wr_clk,
  input  logic wr_rst_n,
  input  logic wr_en,
  input  T     wr_data,
  output logic full,

  input  logic rd_clk,
  input  logic rd_rst_n,
  input  logic rd_en,
  output T     rd_data,
  output logic empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  T mem [DEPTH];

  logic [AW:0] wptr_bin, wptr_gray, rptr_bin, rptr_gray;
  logic [AW:0] wq1_rptr, wq2_rptr;   // read pointer seen by the write side
  logic [AW:0] rq1_wptr, rq2_wptr;   // write pointer seen by the read side

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side.
  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr_bin  <= '0;
      wptr_gray <= '0;
      wq1_rptr  <= '0;
      wq2_rptr  <= '0;
    end else begin
      wq1_rptr <= rptr_gray;
      wq2_rptr <= wq1_rptr;
      if (wr_en && !full) begin
        wptr_bin  <= wptr_bin + 1'b1;
        wptr_gray <= bin2gray(wptr_bin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wptr_bin[AW-1:0]] <= wr_data;
  end

  // Full when the write Gray pointer equals the synchronised read pointer
  // with its two top bits inverted.
  localparam logic [AW:0] FULL_XOR = (AW+1)'(3) << (AW - 1);
  assign full = ((wptr_gray ^ wq2_rptr) == FULL_XOR);

  // Read side.
  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr_bin  <= '0;
      rptr_gray <= '0;
      rq1_wptr  <= '0;
      rq2_wptr  <= '0;
    end else begin
      rq1_wptr <= wptr_gray;
      rq2_wptr <= rq1_wptr;
      if (rd_en && !empty) begin
        rptr_bin  <= rptr_bin + 1'b1;
        rptr_gray <= bin2gray(rptr_bin + 1'b1);
      end
    end
  end

  assign empty   = (rptr_gray == rq2_wptr);
  assign rd_data = mem[rptr_bin[AW-1:0]];

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("psm_async_fifo: DEPTH must be a power of two >= 2");
  end
endmodule
