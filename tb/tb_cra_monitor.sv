// tb_cra_monitor: end-to-end test of the CRA monitor at its default sizes.
//
// A model of an instrumented program runs on a "host" in the testbench: it
// keeps a call stack over 64 functions, calls through trampoline slots (both
// direct and indirect calls, some of them recursive), returns through the
// slot stubs and makes in-bounds indirect jumps.  Each step is emitted as
// trace bytes on a trace clock five times faster than the monitor clock, and
// each call's "store func_info" is written over the detector's AXI slave by a
// separate bus process, so bus and trace information arrive in no fixed
// order.  The call depth swings up to about 45, so the shadow stack spills to
// and refills from the CRA region (behavioural memory).  Checked:
//   * a benign run raises no interrupt and drops no trace byte;
//   * the final DEPTH register and the bus traffic to the CRA region match a
//     count of spills and refills (from VICTIM_ENTRY or memory) derived from
//     the program's own call depth;
//   * RECORDS equals the number of calls, returns and jumps emitted;
//   * holding the trace back while boundary records keep coming fills the
//     MMIO FIFO and stalls the bus;
//   * the five attacks of the evaluation (A1-A3 ROP, A4-A5 JOP) are each
//     detected, with the expected class;
//   * a dense trace burst overflows the branch trace FIFO and is flagged.
// Every mechanism is counted and a failure is counted for one that never
// happened.
module tb_cra_monitor;
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;
  import tb_trace_pkg::*;

  localparam addr_t A      = 32'h0080_0000;   // trampoline
  localparam int    NSLOT  = 1024;
  localparam int    NF     = 64;              // functions
  localparam addr_t REGION = 32'h3000_0000;   // CRA region

  // ---------------- DUT and environment ----------------
  logic trace_clk = 0, trace_rst_n = 0, trace_ctl = 0;
  logic [7:0] trace_data = '0;
  logic clk = 0, rst_n = 0;
  axi_req_t  bfm_req = '0, pta_req, det_req, mem_req;
  axi_resp_t bfm_resp, pta_resp, det_resp, mem_resp;
  logic irq, trace_overflow;
  bit sel_pta = 0;
  int n_writes, n_reads;

  cra_monitor dut (
    .trace_clk, .trace_rst_n, .trace_ctl, .trace_data,
    .clk, .rst_n,
    .pta_axi_req(pta_req), .pta_axi_resp(pta_resp),
    .det_axi_req(det_req), .det_axi_resp(det_resp),
    .mem_axi_req(mem_req), .mem_axi_resp(mem_resp),
    .irq, .trace_overflow
  );
  axi_mem_model #(.MAX_WAIT(1)) mem (.clk, .rst_n, .req(mem_req), .resp(mem_resp), .n_writes, .n_reads);

  // one bus master in the testbench, routed to either slave
  always_comb begin
    pta_req  = sel_pta ? bfm_req : '0;
    det_req  = sel_pta ? '0 : bfm_req;
    bfm_resp = sel_pta ? pta_resp : det_resp;
  end

  `include "axi_bfm.svh"

  always #2  trace_clk = ~trace_clk;    // host trace clock
  always #10 clk = ~clk;                // monitor clock, 5:1

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- trace port and bus processes ----------------
  logic [7:0] tq[$];
  func_rec_t  mq[$];
  bit hold_trace = 0, dense = 0, bus_busy = 0;
  int trace_div = 40;          // average trace clocks per byte
  addr_t last = '0;
  int stall_cycles = 0;

  always @(posedge trace_clk) begin
    if (tq.size() > 0 && !hold_trace && (dense || $urandom_range(trace_div - 1) == 0)) begin
      trace_ctl  <= 1;
      trace_data <= tq.pop_front();
    end else trace_ctl <= 0;
  end

  initial begin
    forever begin
      @(posedge clk);
      if (mq.size() > 0 && !sel_pta) begin
        automatic func_rec_t f = mq.pop_front();
        automatic logic [31:0] q[$] = '{f.entry, f.size};
        bus_busy = 1;
        repeat ($urandom_range(6)) @(posedge clk);
        axi_write(32'h0 | DET_FUNC_ENTRY, q);
        bus_busy = 0;
      end
    end
  end

  always @(posedge clk) if (!sel_pta && bfm_req.wvalid && !bfm_resp.wready) stall_cycles++;

  task automatic emit_branch(addr_t a);
    byte_q_t q = enc_branch(a, last);
    foreach (q[i]) tq.push_back(q[i]);
    last = a;
  endtask

  task automatic drain();
    while (tq.size() > 0 || mq.size() > 0 || bus_busy) @(posedge clk);
    repeat (1500) @(posedge clk);
  endtask

  task automatic reg_rd(bit pta_side, logic [7:0] off, output logic [31:0] d);
    while (mq.size() > 0 || bus_busy) @(posedge clk);
    #1 sel_pta = pta_side;
    axi_read32(32'h0 | off, d);
    #1 sel_pta = 0;        // after the slaves sampled the last handshake
  endtask

  task automatic reg_wr(bit pta_side, logic [7:0] off, logic [31:0] d);
    while (mq.size() > 0 || bus_busy) @(posedge clk);
    #1 sel_pta = pta_side;
    axi_write32(32'h0 | off, d);
    #1 sel_pta = 0;        // after the slaves sampled the last handshake
  endtask

  // ---------------- host program model ----------------
  function automatic addr_t f_entry(int f); return 32'h0001_0000 + 32'h1000 * f; endfunction
  function automatic addr_t f_size(int f);  return 32'h200 + 32'h30 * f; endfunction

  typedef struct { int f; int slot; bit recursive; } frame_t;
  frame_t stk[$];
  int cur_f;
  // independent count of what the shadow stack must do
  int m_onchip = 0, m_blocks = 0, m_rec = 0;
  bit m_victim = 0;
  int n_spill = 0, n_fill_victim = 0, n_fill_mem = 0, n_recursion = 0;
  int n_dc = 0, n_ic = 0, n_ret = 0, n_ij = 0, n_records = 0;
  int rec_stack[$];

  task automatic start_program();
    stk.delete(); rec_stack.delete();
    cur_f = 0; m_rec = 0;
    mq.push_back('{f_entry(0), f_size(0)});     // F.B0: main()
  endtask

  task automatic do_call(int callee, bit indirect);
    automatic int slot = $urandom_range(NSLOT - 1);
    automatic bit recursive = (callee == cur_f) && m_rec < 255;
    emit_branch(A + 8 * slot);
    if (indirect) emit_branch(f_entry(callee));
    else tq.push_back(enc_atom(1));
    mq.push_back('{f_entry(callee), f_size(callee)});
    stk.push_back('{cur_f, slot, recursive});
    if (indirect) n_ic++; else n_dc++;
    n_records++;
    if (recursive) begin
      m_rec++; n_recursion++;
    end else begin
      if (m_onchip == 16) begin
        m_onchip = 8; m_blocks++; m_victim = 1; n_spill++;
      end
      m_onchip++;
      rec_stack.push_back(m_rec);
      m_rec = 0;
    end
    cur_f = callee;
  endtask

  task automatic do_return();
    automatic frame_t fr = stk.pop_back();
    emit_branch(A + 8 * fr.slot + 4);
    tq.push_back(enc_atom(1));                  // the stub's jump back
    n_ret++; n_records++;
    if (fr.recursive) m_rec--;
    else begin
      if (m_onchip == 0) begin
        if (m_victim) n_fill_victim++; else n_fill_mem++;
        m_victim = 0; m_blocks--; m_onchip = 8;
      end
      m_onchip--;
      m_rec = rec_stack.pop_back();
    end
    cur_f = fr.f;
  endtask

  task automatic do_jump();
    emit_branch(f_entry(cur_f) + 4 * $urandom_range(f_size(cur_f) / 4 - 1));
    n_ij++; n_records++;
  endtask

  task automatic restart_monitor();
    drain();
    reg_wr(0, DET_CTRL, 32'h5);                 // enable, restart
    m_onchip = 0; m_blocks = 0; m_victim = 0;
    start_program();
    drain();
  endtask

  task automatic expect_attack(string name, attack_e a1, attack_e a2);
    logic [31:0] d;
    drain();
    check(irq, {name, ": interrupt raised"});
    reg_rd(0, DET_STATUS, d);
    check(d[0] && (d[2:1] == a1 || d[2:1] == a2), $sformatf("%s: class %0d", name, d[2:1]));
    reg_wr(0, DET_CTRL, 32'h3);                 // clear the interrupt
    check(!irq, {name, ": interrupt cleared"});
  endtask

  // ---------------- stimulus ----------------
  initial begin
    logic [31:0] d;
    int target, stall0;
    repeat (4) @(posedge clk);
    trace_rst_n <= 1; rst_n <= 1;
    repeat (4) @(posedge clk);
    reg_wr(1, PTA_TRAMP_BASE, A);
    reg_wr(1, PTA_TRAMP_END, A + 8 * NSLOT);
    reg_wr(1, PTA_CTRL, 32'h1);
    reg_wr(0, DET_CRA_BASE, REGION);
    reg_wr(0, DET_CTRL, 32'h1);
    start_program();
    drain();
    reg_rd(0, DET_STATUS, d);
    check(d[3] == 1, "monitor started by the first boundary record");

    // benign run with deep call chains
    target = 45;
    for (int i = 0; i < 2500; i++) begin
      automatic int k = $urandom_range(99);
      if (stk.size() >= target) target = $urandom_range(8, 0);
      else if (stk.size() <= target && $urandom_range(60) == 0) target = $urandom_range(48, 20);
      if (stk.size() < target ? (k < 60) : (k < 15)) begin
        automatic int callee = ($urandom_range(4) == 0) ? cur_f : $urandom_range(NF - 1);
        do_call(callee, $urandom_range(1));
      end else if (stk.size() > 0 && k < 85) do_return();
      else do_jump();
      // hold the trace back once so the MMIO FIFO fills and the bus stalls
      if (i == 1200) begin
        hold_trace = 1;
        for (int j = 0; j < 24; j++) do_call($urandom_range(NF - 1), 0);
        repeat (3000) @(posedge clk);
        hold_trace = 0;
      end
      if (i % 50 == 0) while (tq.size() > 200) @(posedge clk);
    end
    drain();
    if (irq) begin
      logic [31:0] t, e;
      reg_rd(0, DET_ATK_TGT, t); reg_rd(0, DET_ATK_EXP, e); reg_rd(0, DET_STATUS, d);
      $display("unexpected alarm: status %h target %h expected %h", d, t, e);
    end
    check(!irq, "benign program raises no interrupt");
    check(!trace_overflow, "no trace byte dropped at this trace rate");
    reg_rd(0, DET_DEPTH, d);
    check(d[7:0] == m_onchip && d[15:8] == m_rec && d[31:16] == m_blocks,
          $sformatf("DEPTH %h vs onchip %0d rec %0d blocks %0d", d, m_onchip, m_rec, m_blocks));
    check(n_writes == 32 * n_spill, $sformatf("spill traffic %0d words for %0d spills", n_writes, n_spill));
    check(n_reads == 32 * n_fill_mem, $sformatf("refill traffic %0d words for %0d memory refills", n_reads, n_fill_mem));
    reg_rd(1, PTA_RECORDS, d);
    check(d == n_records, $sformatf("RECORDS %0d vs %0d emitted", d, n_records));

    // A1: ROP, return redirected to a gadget in another function
    restart_monitor();
    do_call(5, 0); do_call(9, 1);
    emit_branch(f_entry(30) + 32'h40);
    expect_attack("A1 ROP gadget", ATK_JOP_JUMP, ATK_ROP);
    // A2: ROP with a long gadget reached through another call's stub
    restart_monitor();
    do_call(5, 0); do_call(7, 0);
    emit_branch(A + 8 * ((stk[$].slot + 3) % NSLOT) + 4); tq.push_back(enc_atom(1));
    expect_attack("A2 ROP wrong return", ATK_ROP, ATK_ROP);
    // A3: ROP, returning past the outermost frame (stack pivot)
    restart_monitor();
    do_call(3, 1); do_return();
    emit_branch(A + 8 * 17 + 4); tq.push_back(enc_atom(1));
    expect_attack("A3 ROP empty stack", ATK_ROP, ATK_ROP);
    // A4: JOP, indirect call into the middle of a function
    restart_monitor();
    do_call(4, 0);
    emit_branch(A + 8 * 100); emit_branch(f_entry(12) + 32'h24);
    mq.push_back('{f_entry(12), f_size(12)});
    expect_attack("A4 JOP call", ATK_JOP_CALL, ATK_JOP_CALL);
    // A5: JOP, indirect jump out of the current function
    restart_monitor();
    do_call(6, 1);
    emit_branch(f_entry(6) + f_size(6) + 32'h10);
    expect_attack("A5 JOP jump", ATK_JOP_JUMP, ATK_JOP_JUMP);

    // trace burst denser than the monitor can take: FIFO overflow
    restart_monitor();
    dense = 1;
    for (int i = 0; i < 300; i++) emit_branch(f_entry(0) + 4 * (i % 64));
    drain();
    check(trace_overflow, "branch trace FIFO overflow flagged");
    reg_rd(1, PTA_STATUS, d);
    check(d[0], "overflow visible in PTA STATUS");
    reg_rd(0, DET_STATUS, d);
    check(d[6], "trace loss visible in detector STATUS");

    // mechanism coverage
    check(n_spill > 0,       $sformatf("spills: %0d", n_spill));
    check(n_fill_victim > 0, $sformatf("refills from VICTIM_ENTRY: %0d", n_fill_victim));
    check(n_fill_mem > 0,    $sformatf("refills from the CRA region: %0d", n_fill_mem));
    check(n_recursion > 0,   $sformatf("recursive calls: %0d", n_recursion));
    check(n_dc > 0 && n_ic > 0 && n_ret > 0 && n_ij > 0, "all branch classes");
    check(stall_cycles > 0,  $sformatf("bus stall cycles on a full MMIO FIFO: %0d", stall_cycles));
    $display("mechanisms: spill=%0d refill_victim=%0d refill_mem=%0d recursion=%0d DC=%0d IC=%0d R=%0d IJ=%0d mmio_stall_cycles=%0d",
             n_spill, n_fill_victim, n_fill_mem, n_recursion, n_dc, n_ic, n_ret, n_ij, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
