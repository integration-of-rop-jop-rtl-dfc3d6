// tb_sync_fifo: self-checking test of sync_fifo (PTM and MMIO FIFOs).
//
// Random pushes and pops (never pushing when full or popping when empty, as
// the users of the FIFO guarantee) are checked against a queue model: the
// head data, full, empty and level flags every cycle.  Also fills the FIFO to
// DEPTH, checks full, and checks that clear empties it.
module tb_sync_fifo;
  localparam int DEPTH = 16;
  typedef logic [19:0] word_t;

  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  word_t wdata = '0, rdata;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0;
  word_t model[$];

  sync_fifo #(.T(word_t), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(bit do_push, bit do_pop);
    push  <= do_push;
    pop   <= do_pop;
    wdata <= word_t'($urandom);
    @(posedge clk);
    if (do_pop)  void'(model.pop_front());
    if (do_push) model.push_back(wdata);
    push <= 0; pop <= 0;
    #1;
    check(level == $bits(level)'(model.size()), "level");
    check(full == (model.size() == DEPTH), "full");
    check(empty == (model.size() == 0), "empty");
    if (model.size() > 0) check(rdata == model[0], "head data");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // fill to full
    for (int i = 0; i < DEPTH; i++) step(1, 0);
    check(full, "full after DEPTH pushes");
    // simultaneous push/pop while full is not allowed; pop and push
    step(0, 1); step(1, 1);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      bit pu = ($urandom_range(99) < 55) && !full;
      bit po = ($urandom_range(99) < 50) && !empty;
      step(pu, po);
    end
    // clear
    clear <= 1; @(posedge clk); clear <= 0; model.delete(); #1;
    check(empty && level == 0, "clear empties");
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
