// shadow_call_stack: on-chip copy of the host's call stack.
//
// Holds DEPTH entries (16 in the document), each a return address, the
// caller's function bounds and its recursion count.  Besides push and pop at
// the top, the shadow stack manager can remove the oldest BLOCK entries (8 in
// the document) when the stack is full, and put BLOCK entries back underneath
// when it has run empty.  To make both ends cheap the entries live in a
// circular register file addressed by a bottom pointer and a count, which is
// this design's choice.
//
// Interface: one operation per clock, chosen by the one-hot inputs push, pop,
// evict and refill.  top and oldest[] are combinational views of the current
// contents; every operation takes effect at the next clock edge.  push needs
// !full, pop needs !empty, evict needs count >= BLOCK and refill needs
// count <= DEPTH - BLOCK; assertions check these rules.
module shadow_call_stack
  import cra_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned BLOCK = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,

  input  logic      push,
  input  ss_entry_t push_entry,
  input  logic      pop,
  output ss_entry_t top,

  input  logic      evict,               // drop the BLOCK oldest entries
  output ss_entry_t oldest [BLOCK],      // oldest[0] is the bottom entry
  input  logic      refill,              // place refill_block under the bottom
  input  ss_entry_t refill_block [BLOCK],// refill_block[0] becomes the bottom

  output logic      full,
  output logic      empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  ss_entry_t     mem [DEPTH];
  logic [AW-1:0] bot;
  logic [CW-1:0] cnt;

  assign count = cnt;
  assign full  = (cnt == CW'(DEPTH));
  assign empty = (cnt == '0);
  assign top   = mem[AW'(bot + AW'(cnt) - 1'b1)];

  always_comb begin
    for (int i = 0; i < BLOCK; i++) oldest[i] = mem[AW'(bot + AW'(i))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bot <= '0;
      cnt <= '0;
    end else if (clear) begin
      bot <= '0;
      cnt <= '0;
    end else if (push) begin
      cnt <= cnt + 1'b1;
    end else if (pop) begin
      cnt <= cnt - 1'b1;
    end else if (evict) begin
      bot <= AW'(bot + AW'(BLOCK));
      cnt <= cnt - CW'(BLOCK);
    end else if (refill) begin
      bot <= AW'(bot - AW'(BLOCK));
      cnt <= cnt + CW'(BLOCK);
    end
  end

  always_ff @(posedge clk) begin
    if (!clear && push) begin
      mem[AW'(bot + AW'(cnt))] <= push_entry;
    end else if (!clear && !pop && !evict && refill) begin
      for (int i = 0; i < BLOCK; i++) mem[AW'(bot - AW'(BLOCK) + AW'(i))] <= refill_block[i];
    end
  end

  a_onehot:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0({push, pop, evict, refill}));
  a_push:     assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_pop:      assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
  a_evict:    assert property (@(posedge clk) disable iff (!rst_n) evict |-> cnt >= CW'(BLOCK));
  a_refill:   assert property (@(posedge clk) disable iff (!rst_n) refill |-> cnt <= CW'(DEPTH - BLOCK));

  initial begin
    assert ((DEPTH & (DEPTH - 1)) == 0 && BLOCK <= DEPTH && BLOCK > 0)
      else $error("shadow_call_stack: DEPTH must be a power of two and BLOCK <= DEPTH");
  end

endmodule
