// tb_cra_detector: self-checking test of the CRA detector.
//
// Drives the detector as the system does: branch records on its record
// input, function boundary records as "store func_info" bus writes (a
// two-word burst to FUNC_ENTRY/FUNC_SIZE), configuration and status over the
// same AXI slave, and a behavioural memory on the master port for the CRA
// region.  The program runs a 40-deep call chain (so the shadow stack spills
// three blocks), in-bounds jumps, and unwinds it (refilling from VICTIM_ENTRY
// and from memory), with the order of record and bus write randomised.  The
// DEPTH register is compared with an independent count after each call and
// return.  Then each attack class is provoked and STATUS, ATK_TGT, ATK_EXP
// and irq are checked and cleared, a burst of boundary writes with no calls
// must stall the bus once the MMIO FIFO is full (but not once trace has been
// lost, when they are dropped), and restart must clear state.
module tb_cra_detector;
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;

  localparam addr_t A = 32'h0080_0000;
  localparam addr_t REGION = 32'h3000_0000;

  logic clk = 0, rst_n = 0;
  logic rec_valid = 0, rec_ready, irq;
  ptm_rec_t rec = '0;
  axi_req_t  bfm_req = '0, m_req;
  axi_resp_t bfm_resp, m_resp;
  int n_writes, n_reads;

  cra_detector dut (
    .clk, .rst_n, .rec_valid, .rec, .rec_ready,
    .trace_lost, .s_axi_req(bfm_req), .s_axi_resp(bfm_resp), .m_axi_req(m_req), .m_axi_resp(m_resp), .irq
  );
  axi_mem_model #(.MAX_WAIT(2)) mem (.clk, .rst_n, .req(m_req), .resp(m_resp), .n_writes, .n_reads);

  `include "axi_bfm.svh"

  always #5 clk = ~clk;

  int checks = 0, failures = 0, stall_cycles = 0;
  logic trace_lost = 0;
  int depth = 0;           // logical shadow stack depth
  int m_onchip = 0, m_blocks = 0;
  addr_t rets[$];
  bounds_t bnds[$];
  bounds_t cur;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk)
    if (bfm_req.wvalid && !bfm_resp.wready) stall_cycles++;

  task automatic send_rec(ptm_rec_t r);
    rec <= r; rec_valid <= 1;
    do @(posedge clk); while (!rec_ready);
    rec_valid <= 0;
    #1;  // let the deassertion settle before a following send
  endtask

  task automatic func_info(addr_t entry, addr_t size);
    automatic logic [31:0] q[$] = '{entry, size};
    axi_write(32'h0 | DET_FUNC_ENTRY, q);
  endtask

  // long enough for a spill or refill of one block (32 bus transfers)
  task automatic settle();
    repeat (400) @(posedge clk);
  endtask

  task automatic reg_rd(logic [7:0] off, output logic [31:0] d);
    axi_read32(32'h0 | off, d);
  endtask

  // model of the on-chip count / spilled blocks after a push or pop
  task automatic model_push();
    if (m_onchip == 16) begin m_onchip = 8; m_blocks++; end
    m_onchip++;
  endtask
  task automatic model_pop();
    if (m_onchip == 0) begin m_onchip = 8; m_blocks--; end
    m_onchip--;
  endtask

  task automatic check_depth(string what);
    logic [31:0] d;
    reg_rd(DET_DEPTH, d);
    check(d[7:0] == m_onchip && d[31:16] == m_blocks,
          $sformatf("%s: DEPTH %h, expected onchip %0d blocks %0d", what, d, m_onchip, m_blocks));
  endtask

  task automatic do_call(bit indirect, addr_t entry, addr_t size);
    automatic addr_t slot = A + 8 * $urandom_range(500);
    automatic ptm_rec_t r = '{btype: indirect ? BR_IC : BR_DC, src: slot, tgt: indirect ? entry : '0};
    if ($urandom_range(1)) begin func_info(entry, size); send_rec(r); end
    else begin send_rec(r); func_info(entry, size); end
    rets.push_back(slot + 4); bnds.push_back(cur);
    cur = '{entry, entry + size};
    model_push();
  endtask

  task automatic do_ret();
    send_rec('{btype: BR_R, src: '0, tgt: rets.pop_back()});
    cur = bnds.pop_back();
    model_pop();
  endtask

  task automatic expect_attack(attack_e a, addr_t tgt, addr_t exp_addr, string what);
    logic [31:0] d;
    settle();
    check(irq, {what, ": irq raised"});
    reg_rd(DET_STATUS, d);
    check(d[0] && d[2:1] == a, {what, ": STATUS class"});
    reg_rd(DET_ATK_TGT, d);
    check(d == tgt, {what, ": ATK_TGT"});
    reg_rd(DET_ATK_EXP, d);
    check(d == exp_addr, $sformatf("%s: ATK_EXP %h exp %h", what, d, exp_addr));
    axi_write32(32'h0 | DET_CTRL, 32'h3);       // keep enabled, clear irq
    @(posedge clk);
    check(!irq, {what, ": irq cleared"});
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    axi_write32(32'h0 | DET_CRA_BASE, REGION);
    axi_write32(32'h0 | DET_CTRL, 32'h1);
    reg_rd(DET_CRA_BASE, d);
    check(d == REGION, "CRA_BASE readback");
    cur = '{32'h0001_0000, 32'h0001_0000 + 32'h200};
    func_info(32'h0001_0000, 32'h200);         // F.B0: main()
    settle();
    reg_rd(DET_STATUS, d);
    check(d[3] && !d[0], "started, no attack");
    // deep call chain with in-bounds jumps
    for (int i = 0; i < 40; i++) begin
      do_call(i % 3 == 0, 32'h0002_0000 + 32'h1000 * i, 32'h400);
      send_rec('{btype: BR_IJ, src: '0, tgt: cur.entry + 32'h3F0});
      settle();
      check_depth($sformatf("call %0d", i));
    end
    check(n_writes == 3 * 32, "three blocks spilled to the CRA region");
    for (int i = 0; i < 40; i++) begin
      do_ret();
      send_rec('{btype: BR_IJ, src: '0, tgt: cur.entry});
      settle();
      check_depth($sformatf("return %0d", i));
    end
    check(!irq, "benign program raises no interrupt");
    check(n_reads == 2 * 32, "two blocks read back (one came from VICTIM_ENTRY)");
    // recursion: REC_CNT counts, nothing pushed
    do_call(0, 32'h0005_0000, 32'h100);
    for (int i = 0; i < 5; i++) send_rec('{btype: BR_DC, src: A + 16, tgt: '0});
    for (int i = 0; i < 5; i++) func_info(32'h0005_0000, 32'h100);
    settle();
    reg_rd(DET_DEPTH, d);
    check(d[15:8] == 5 && d[7:0] == m_onchip, $sformatf("REC_CNT counts recursive calls: DEPTH %h", d));
    for (int i = 0; i < 5; i++) send_rec('{btype: BR_R, src: '0, tgt: A + 20});
    do_ret();
    settle();
    reg_rd(DET_DEPTH, d);
    check(d == 0 && !irq, "recursion unwound");
    // JOP: indirect jump out of the function
    send_rec('{btype: BR_IJ, src: '0, tgt: cur.fend + 8});
    expect_attack(ATK_JOP_JUMP, cur.fend + 8, cur.entry, "JOP jump");
    // JOP: indirect call to a non-entry address
    send_rec('{btype: BR_IC, src: A + 40, tgt: 32'h0006_0010});
    func_info(32'h0006_0000, 32'h80);
    expect_attack(ATK_JOP_CALL, 32'h0006_0010, 32'h0006_0000, "JOP call");
    // ROP: return to a different stub
    do_call(0, 32'h0007_0000, 32'h80);
    send_rec('{btype: BR_R, src: '0, tgt: rets[$] + 8});
    expect_attack(ATK_ROP, rets[$] + 8, rets[$], "ROP");
    // MMIO FIFO full: boundary writes with no calls stall the bus
    fork
      for (int i = 0; i < 20; i++) func_info(32'h0008_0000 + 32'h100 * i, 32'h40);
      begin
        repeat (400) @(posedge clk);
        for (int i = 0; i < 20; i++) send_rec('{btype: BR_DC, src: A + 8 * i, tgt: '0});
      end
    join
    settle();
    check(stall_cycles > 100, "bus stalled while the MMIO FIFO was full");
    // restart
    axi_write32(32'h0 | DET_CTRL, 32'h5);
    settle();
    reg_rd(DET_STATUS, d);
    check(d[3] == 0 && d[0] == 0, "restart clears started");
    reg_rd(DET_DEPTH, d);
    check(d == 0, "restart empties the shadow stack");
    // after lost trace, boundary writes to a full MMIO FIFO are dropped, not stalled
    trace_lost = 1;
    begin
      automatic int st0 = stall_cycles;
      for (int i = 0; i < 24; i++) func_info(32'h0009_0000 + 32'h100 * i, 32'h40);
      check(stall_cycles == st0, "no bus stall once trace is lost");
    end
    reg_rd(DET_STATUS, d);
    check(d[6], "trace loss in STATUS");
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
