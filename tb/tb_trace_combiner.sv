// tb_trace_combiner: self-checking test of the trace combiner.
//
// A random program-ordered event list (calls with their callee's boundary
// record, returns, indirect jumps) is split into the two streams the
// combiner really sees: branch records for the PTM FIFO and boundary records
// for the MMIO FIFO.  The two FIFOs (queue models in the testbench) are
// filled at independent random rates, so boundary records arrive both ahead
// of and behind their calls.  The combiner must rebuild the original order:
// START with the first function's record, then each branch, calls paired
// with the right boundary record.  Branch records arriving before START must
// be dropped, and a call must wait when its boundary record is late.
module tb_trace_combiner;
  import cra_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0;
  logic ptm_empty, ptm_pop, mmio_empty, mmio_pop, ev_valid, ev_ready = 0, started;
  ptm_rec_t ptm_data;
  func_rec_t mmio_data;
  cdc_ev_t ev;

  ptm_rec_t  ptm_q[$], ptm_src[$];
  func_rec_t mmio_q[$], mmio_src[$];
  cdc_ev_t   exp_q[$];
  int checks = 0, failures = 0, waits = 0, n_ev = 0;

  trace_combiner dut (.*);

  always #5 clk = ~clk;

  assign ptm_empty  = (ptm_q.size() == 0);
  assign ptm_data   = ptm_empty ? '0 : ptm_q[0];
  assign mmio_empty = (mmio_q.size() == 0);
  assign mmio_data  = mmio_empty ? '0 : mmio_q[0];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FIFO models and stream sources
  bit feed = 0, mmio_slow = 0;
  always @(posedge clk) begin
    if (ptm_pop && ptm_q.size() > 0) void'(ptm_q.pop_front());
    if (mmio_pop && mmio_q.size() > 0) void'(mmio_q.pop_front());
    if (feed && ptm_src.size() > 0 && $urandom_range(3) == 0) ptm_q.push_back(ptm_src.pop_front());
    if (feed && mmio_src.size() > 0 && !mmio_slow && $urandom_range(3) == 0)
      mmio_q.push_back(mmio_src.pop_front());
    if ($urandom_range(199) == 0) mmio_slow <= !mmio_slow;
    if (ptm_q.size() > 0 && mmio_q.size() == 0 && started &&
        (ptm_q[0].btype == BR_DC || ptm_q[0].btype == BR_IC)) waits++;
    ev_ready <= ($urandom_range(3) != 0);
  end

  // output checker
  always @(posedge clk) begin
    if (ev_valid && ev_ready) begin
      n_ev++;
      if (exp_q.size() == 0) check(0, "unexpected event");
      else begin
        cdc_ev_t e;
        e = exp_q.pop_front();
        check(ev.kind == e.kind, $sformatf("event kind %0d exp %0d", ev.kind, e.kind));
        if (e.kind != EV_START) check(ev.br == e.br, "branch part");
        if (e.kind inside {EV_START, EV_DC, EV_IC}) check(ev.fb == e.fb, "boundary part");
      end
    end
  end

  function automatic func_rec_t rnd_fb();
    func_rec_t f;
    f.entry = $urandom & 32'h00FF_FFFC; f.size = $urandom_range(4096, 8);
    return f;
  endfunction

  initial begin
    func_rec_t f0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // records before START are dropped
    for (int i = 0; i < 3; i++) ptm_q.push_back('{btype: br_type_e'(i), src: 32'h100 * i, tgt: 32'h44});
    repeat (10) @(posedge clk);
    check(ptm_q.size() == 0 && n_ev == 0 && !started, "pre-start records dropped");
    f0 = rnd_fb();
    mmio_q.push_back(f0);
    exp_q.push_back('{kind: EV_START, br: '0, fb: f0});
    repeat (5) @(posedge clk);
    check(started, "started after first boundary record");
    for (int i = 0; i < 2000; i++) begin
      automatic int k = $urandom_range(3);
      automatic ptm_rec_t b;
      automatic func_rec_t f = rnd_fb();
      b.btype = br_type_e'(k); b.src = $urandom; b.tgt = $urandom;
      ptm_src.push_back(b);
      if (k <= 1) mmio_src.push_back(f);
      exp_q.push_back('{kind: (k == 0) ? EV_DC : (k == 1) ? EV_IC : (k == 2) ? EV_R : EV_IJ,
                        br: b, fb: (k <= 1) ? f : '0});
    end
    feed = 1;
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    check(ptm_q.size() == 0 && mmio_q.size() == 0, "both FIFOs drained");
    check(waits > 0, "call waited for a late boundary record");
    // clear returns to the not-started state
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    check(!started, "clear forgets START");
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
