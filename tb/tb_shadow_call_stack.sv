// tb_shadow_call_stack: self-checking test of the on-chip shadow call stack.
//
// Random push, pop, evict-oldest-block and refill-block operations, each
// issued only when its precondition holds, are mirrored on a queue model
// (front = bottom).  After every operation the count, full and empty flags,
// the top entry and the BLOCK oldest entries are compared with the model.
// The stack pointer is driven around its circular buffer many times.
module tb_shadow_call_stack;
  import cra_pkg::*;
  localparam int DEPTH = 16, BLOCK = 8;

  logic clk = 0, rst_n = 0, clear = 0;
  logic push = 0, pop = 0, evict = 0, refill = 0;
  ss_entry_t push_entry = '0, top;
  ss_entry_t oldest [BLOCK];
  ss_entry_t refill_block [BLOCK];
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  ss_entry_t model[$];
  int checks = 0, failures = 0, n_evict = 0, n_refill = 0;

  shadow_call_stack #(.DEPTH(DEPTH), .BLOCK(BLOCK)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ss_entry_t rnd();
    ss_entry_t e;
    e.ret = $urandom; e.bounds.entry = $urandom; e.bounds.fend = $urandom; e.rec = 8'($urandom);
    return e;
  endfunction

  task automatic verify();
    #1;
    check(count == $bits(count)'(model.size()), "count");
    check(full == (model.size() == DEPTH), "full");
    check(empty == (model.size() == 0), "empty");
    if (model.size() > 0) check(top == model[model.size() - 1], "top entry");
    if (model.size() >= BLOCK)
      for (int i = 0; i < BLOCK; i++) check(oldest[i] == model[i], "oldest block");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    verify();
    for (int t = 0; t < 4000; t++) begin
      automatic int k = $urandom_range(99);
      if (k < 50 && model.size() < DEPTH) begin
        push_entry <= rnd(); push <= 1;
        @(posedge clk); push <= 0;
        model.push_back(push_entry);
      end else if (k < 82 && model.size() > 0) begin
        pop <= 1;
        @(posedge clk); pop <= 0;
        void'(model.pop_back());
      end else if (k < 92 && model.size() >= BLOCK) begin
        evict <= 1;
        @(posedge clk); evict <= 0;
        for (int i = 0; i < BLOCK; i++) void'(model.pop_front());
        n_evict++;
      end else if (model.size() <= DEPTH - BLOCK) begin
        for (int i = 0; i < BLOCK; i++) refill_block[i] = rnd();
        refill <= 1;
        @(posedge clk); refill <= 0;
        for (int i = BLOCK - 1; i >= 0; i--) model.push_front(refill_block[i]);
        n_refill++;
      end else begin
        @(posedge clk);
      end
      verify();
    end
    clear <= 1; @(posedge clk); clear <= 0; model.delete();
    verify();
    check(n_evict > 10 && n_refill > 10, "evict and refill exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
