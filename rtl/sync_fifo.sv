// sync_fifo: single-clock first-in first-out buffer.
//
// Used twice inside the CRA detector: as the PTM FIFO (branch records from the
// trace analyzer) and as the MMIO FIFO (function boundary records written by
// the instrumented program over the bus).  The document names both buffers and
// their EMPTY/POP/ODATA read side; the depth and the write side are this
// design's choice.
//
// Interface: push/wdata with full, pop/rdata with empty.  The read side is
// first-word-fall-through: rdata shows the oldest entry whenever empty is low,
// and pop removes it at the next clock edge.  A push while full and a pop
// while empty are protocol errors, caught by assertions.  Push and pop in the
// same cycle are allowed at any fill level other than empty-with-pop.
module sync_fifo #(
  parameter type         T     = logic [31:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,      // synchronous flush
  input  logic push,
  input  T     wdata,
  output logic full,
  input  logic pop,
  output T     rdata,
  output logic empty,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T               mem [DEPTH];
  logic [AW-1:0]  wptr, rptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else if (clear) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_push) wptr <= incr(wptr);
      if (do_pop)  rptr <= incr(rptr);
      cnt <= cnt + $bits(cnt)'(do_push) - $bits(cnt)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  assign rdata = mem[rptr];
  assign full  = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty = (cnt == '0);
  assign level = cnt;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
