// tb_freq_gap: frequency-gap sweep of the CRA monitor (host : monitor clock).
//
// The host trace clock stays fixed while the monitor clock is slowed from the
// host's rate (1:1) to a fifth of it (5:1), the range of the document's
// frequency-gap experiment, with the default 32-byte branch trace FIFO.  At
// each ratio the monitor is reset and configured, and the same synthetic
// instrumented program runs (calls, recursion, returns and jumps with call
// depths that make the shadow stack spill and refill), its trace offered at
// one byte per 16 host clocks on average, then at one byte per 12; boundary
// records go over the bus as in the end-to-end test.  The testbench reports, per ratio,
// whether a trace byte was dropped.  Checked at every ratio: with no byte
// dropped, the program raises no alarm and the DEPTH register matches the
// model; a dropped byte is flagged in both PTA and detector STATUS, and the
// bus must not hang on boundary records the detector can no longer pair.
// At 1:1 nothing may be dropped.  The
// byte rate is this testbench's choice: the document does not give the trace
// density of its experiment.
module tb_freq_gap;
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;
  import tb_trace_pkg::*;

  localparam addr_t A = 32'h0080_0000;
  localparam int NSLOT = 1024, NF = 64;
  int host_clks_per_byte = 16;            // average host clocks per trace byte

  logic trace_clk = 0, trace_rst_n = 0, trace_ctl = 0;
  logic [7:0] trace_data = '0;
  logic clk = 0, rst_n = 0;
  axi_req_t  bfm_req = '0, pta_req, det_req, mem_req;
  axi_resp_t bfm_resp, pta_resp, det_resp, mem_resp;
  logic irq, trace_overflow;
  bit sel_pta = 0;
  int n_writes, n_reads;
  int half = 2;                          // monitor half period, ns

  cra_monitor dut (
    .trace_clk, .trace_rst_n, .trace_ctl, .trace_data, .clk, .rst_n,
    .pta_axi_req(pta_req), .pta_axi_resp(pta_resp),
    .det_axi_req(det_req), .det_axi_resp(det_resp),
    .mem_axi_req(mem_req), .mem_axi_resp(mem_resp),
    .irq, .trace_overflow
  );
  axi_mem_model #(.MAX_WAIT(1)) mem (.clk, .rst_n, .req(mem_req), .resp(mem_resp), .n_writes, .n_reads);

  always_comb begin
    pta_req  = sel_pta ? bfm_req : '0;
    det_req  = sel_pta ? '0 : bfm_req;
    bfm_resp = sel_pta ? pta_resp : det_resp;
  end

  `include "axi_bfm.svh"

  always #2 trace_clk = ~trace_clk;
  always #(half) clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] tq[$];
  func_rec_t  mq[$];
  bit bus_busy = 0;
  addr_t last = '0;

  always @(posedge trace_clk) begin
    if (trace_rst_n && tq.size() > 0 && $urandom_range(host_clks_per_byte - 1) == 0) begin
      trace_ctl  <= 1;
      trace_data <= tq.pop_front();
    end else trace_ctl <= 0;
  end

  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && mq.size() > 0 && !sel_pta) begin
        automatic func_rec_t f = mq.pop_front();
        automatic logic [31:0] q[$] = '{f.entry, f.size};
        bus_busy = 1;
        axi_write(32'h0 | DET_FUNC_ENTRY, q);
        bus_busy = 0;
      end
    end
  end

  task automatic emit_branch(addr_t a);
    byte_q_t q = enc_branch(a, last);
    foreach (q[i]) tq.push_back(q[i]);
    last = a;
  endtask

  task automatic reg_rd(bit pta_side, logic [7:0] off, output logic [31:0] d);
    while (mq.size() > 0 || bus_busy) @(posedge clk);
    #1 sel_pta = pta_side;
    axi_read32(32'h0 | off, d);
    #1 sel_pta = 0;
  endtask

  task automatic reg_wr(bit pta_side, logic [7:0] off, logic [31:0] d);
    while (mq.size() > 0 || bus_busy) @(posedge clk);
    #1 sel_pta = pta_side;
    axi_write32(32'h0 | off, d);
    #1 sel_pta = 0;
  endtask

  function automatic addr_t f_entry(int f); return 32'h0001_0000 + 32'h1000 * f; endfunction
  function automatic addr_t f_size(int f);  return 32'h200 + 32'h30 * f; endfunction

  typedef struct { int f; int slot; bit recursive; } frame_t;
  frame_t stk[$];
  int rec_stack[$];
  int cur_f, m_onchip, m_blocks, m_rec;

  task automatic do_call(int callee, bit indirect);
    automatic int slot = $urandom_range(NSLOT - 1);
    automatic bit recursive = (callee == cur_f) && m_rec < 255;
    emit_branch(A + 8 * slot);
    if (indirect) emit_branch(f_entry(callee));
    else tq.push_back(enc_atom(1));
    mq.push_back('{f_entry(callee), f_size(callee)});
    stk.push_back('{cur_f, slot, recursive});
    if (recursive) m_rec++;
    else begin
      if (m_onchip == 16) begin m_onchip = 8; m_blocks++; end
      m_onchip++;
      rec_stack.push_back(m_rec);
      m_rec = 0;
    end
    cur_f = callee;
  endtask

  task automatic do_return();
    automatic frame_t fr = stk.pop_back();
    emit_branch(A + 8 * fr.slot + 4);
    tq.push_back(enc_atom(1));
    if (fr.recursive) m_rec--;
    else begin
      if (m_onchip == 0) begin m_blocks--; m_onchip = 8; end
      m_onchip--;
      m_rec = rec_stack.pop_back();
    end
    cur_f = fr.f;
  endtask

  initial begin
    logic [31:0] d;
    for (int rate = 0; rate < 2; rate++)
    for (int ratio = 1; ratio <= 5; ratio++) begin
      host_clks_per_byte = rate == 0 ? 16 : 12;
      half = 2 * ratio;
      rst_n = 0; trace_rst_n = 0;
      tq.delete(); mq.delete(); stk.delete(); rec_stack.delete();
      cur_f = 0; m_onchip = 0; m_blocks = 0; m_rec = 0; last = '0;
      repeat (4) @(posedge clk);
      trace_rst_n = 1; rst_n = 1;
      repeat (4) @(posedge clk);
      reg_wr(1, PTA_TRAMP_BASE, A);
      reg_wr(1, PTA_TRAMP_END, A + 8 * NSLOT);
      reg_wr(1, PTA_CTRL, 32'h1);
      reg_wr(0, DET_CRA_BASE, 32'h3000_0000);
      reg_wr(0, DET_CTRL, 32'h1);
      $urandom(1234);                    // same program at every ratio
      mq.push_back('{f_entry(0), f_size(0)});
      begin
        automatic int target = 40;
        for (int i = 0; i < 1500; i++) begin
          automatic int k = $urandom_range(99);
          if (stk.size() >= target) target = $urandom_range(6, 0);
          else if (stk.size() <= target && $urandom_range(40) == 0) target = $urandom_range(44, 18);
          if (stk.size() < target ? (k < 65) : (k < 15))
            do_call(($urandom_range(4) == 0) ? cur_f : $urandom_range(NF - 1), $urandom_range(1));
          else if (stk.size() > 0 && k < 85) do_return();
          else emit_branch(f_entry(cur_f) + 4 * $urandom_range(f_size(cur_f) / 4 - 1));
          if (i % 50 == 0) while (tq.size() > 200) @(posedge trace_clk);
        end
      end
      while (tq.size() > 0 || mq.size() > 0 || bus_busy) @(posedge clk);
      repeat (1500) @(posedge clk);
      reg_rd(1, PTA_STATUS, d);
      check(d[0] == trace_overflow, $sformatf("%0d:1 overflow flag visible in STATUS", ratio));
      if (trace_overflow) begin
        reg_rd(0, DET_STATUS, d);
        check(d[6], $sformatf("%0d:1 detector reports the trace loss", ratio));
      end else begin
        check(!irq, $sformatf("%0d:1 no false alarm", ratio));
        reg_rd(0, DET_DEPTH, d);
        check(d[7:0] == m_onchip && d[15:8] == m_rec && d[31:16] == m_blocks,
              $sformatf("%0d:1 DEPTH %h vs onchip %0d rec %0d blocks %0d", ratio, d, m_onchip, m_rec, m_blocks));
      end
      $display("ratio %0d:1  one trace byte per %0d host clocks  trace bytes dropped: %s",
               ratio, host_clks_per_byte, trace_overflow ? "yes" : "no");
      check(ratio > 1 || !trace_overflow, "nothing dropped at 1:1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
