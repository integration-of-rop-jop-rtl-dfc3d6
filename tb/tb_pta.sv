// tb_pta: self-checking test of the PTM Trace Analyzer.
//
// Software programs the trampoline range and enables decoding over AXI.  A
// random instrumented program flow is encoded into trace bytes and sent on a
// trace clock five times faster than the monitor clock, one byte in eight
// trace clocks on average; the branch records that come out (under random
// back-pressure) must match the flow, and the RECORDS register must count
// them.  Then the record output is stalled, a long burst is sent, and the
// overflow bit of STATUS must be set.
module tb_pta;
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;
  import tb_trace_pkg::*;

  localparam addr_t A = 32'h0070_0000;
  localparam int NCALL = 256;

  logic trace_clk = 0, trace_rst_n = 0, trace_valid = 0;
  logic [7:0] trace_data = '0;
  logic clk = 0, rst_n = 0;
  axi_req_t  bfm_req = '0;
  axi_resp_t bfm_resp;
  logic rec_valid, rec_ready = 0, trace_overflow;
  ptm_rec_t rec;

  pta #(.TRACE_FIFO_DEPTH(32)) dut (
    .trace_clk, .trace_rst_n, .trace_valid, .trace_data,
    .clk, .rst_n, .axi_req(bfm_req), .axi_resp(bfm_resp),
    .rec_valid, .rec, .rec_ready, .trace_overflow
  );

  `include "axi_bfm.svh"

  always #2  trace_clk = ~trace_clk;
  always #10 clk = ~clk;

  int checks = 0, failures = 0, n_rec = 0;
  ptm_rec_t exp_q[$];
  logic [7:0] bytes[$];
  addr_t last = '0;
  bit stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_branch(addr_t a);
    byte_q_t q = enc_branch(a, last);
    foreach (q[i]) bytes.push_back(q[i]);
    last = a;
  endtask

  function automatic addr_t code_addr();
    return 32'h0001_0000 + 4 * $urandom_range(32'h3_0000);
  endfunction

  task automatic gen_one();
    automatic int k = $urandom_range(3);
    automatic addr_t slot = A + 8 * $urandom_range(NCALL - 1);
    automatic addr_t t = code_addr();
    unique case (k)
      0: begin send_branch(slot); bytes.push_back(enc_atom(1));
               exp_q.push_back('{btype: BR_DC, src: slot, tgt: '0}); end
      1: begin send_branch(slot); send_branch(t);
               exp_q.push_back('{btype: BR_IC, src: slot, tgt: t}); end
      2: begin send_branch(slot + 4); bytes.push_back(enc_atom(1));
               exp_q.push_back('{btype: BR_R, src: '0, tgt: slot + 4}); end
      default: begin send_branch(t); exp_q.push_back('{btype: BR_IJ, src: '0, tgt: t}); end
    endcase
  endtask

  // trace port: sparse bytes
  always @(posedge trace_clk) begin
    if (bytes.size() > 0 && $urandom_range(7) == 0) begin
      trace_valid <= 1;
      trace_data  <= bytes.pop_front();
    end else trace_valid <= 0;
  end

  // record sink
  always @(posedge clk) begin
    if (rec_valid && rec_ready) begin
      n_rec++;
      if (exp_q.size() == 0) check(0, "unexpected record");
      else begin
        ptm_rec_t e;
        e = exp_q.pop_front();
        check(rec.btype == e.btype && (e.btype == BR_DC || rec.tgt == e.tgt) &&
              (!(e.btype inside {BR_DC, BR_IC}) || rec.src == e.src), "branch record");
      end
    end
    rec_ready <= !stall && ($urandom_range(3) != 0);
  end

  initial begin
    logic [31:0] d;
    repeat (4) @(posedge clk);
    trace_rst_n <= 1; rst_n <= 1;
    @(posedge clk);
    axi_write32(32'h0 | PTA_TRAMP_BASE, A);
    axi_write32(32'h0 | PTA_TRAMP_END, A + NCALL * 8);
    axi_write32(32'h0 | PTA_CTRL, 32'h1);
    axi_read32(32'h0 | PTA_TRAMP_BASE, d);
    check(d == A, "TRAMP_BASE readback");
    axi_read32(32'h0 | PTA_TRAMP_END, d);
    check(d == A + NCALL * 8, "TRAMP_END readback");
    for (int i = 0; i < 1500; i++) gen_one();
    wait (bytes.size() == 0 && exp_q.size() == 0);
    repeat (10) @(posedge clk);
    axi_read32(32'h0 | PTA_RECORDS, d);
    check(d == n_rec && n_rec == 1500, "RECORDS counts records");
    axi_read32(32'h0 | PTA_STATUS, d);
    check(d[0] == 0 && !trace_overflow, "no overflow at 1/8 byte rate");
    // overflow: stall the output and send a dense burst
    stall = 1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 100; i++) send_branch(code_addr());
    wait (bytes.size() == 0);
    repeat (6) @(posedge clk);
    axi_read32(32'h0 | PTA_STATUS, d);
    check(d[0] == 1 && trace_overflow, "overflow flagged when stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
