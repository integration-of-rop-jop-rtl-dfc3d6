// tb_trace_decoder: self-checking test of the trace decoder.
//
// A random instrumented program flow is turned into trace bytes by the
// reference encoder in tb_trace_pkg: jumps into trampoline call slots
// followed by a taken atom (direct call) or a branch address (indirect
// call), returns onto trampoline stubs (followed by the stub's taken atom),
// indirect jumps elsewhere, stray atoms and padding.  The expected branch
// records are worked out from the flow itself, not from the bytes, and
// compared in order with the decoder output under random input gaps and
// output back-pressure.  A slot jump followed by a not-taken atom must give
// no record, and bytes sent while decoding is disabled must be dropped.
module tb_trace_decoder;
  import cra_pkg::*;
  import tb_trace_pkg::*;

  localparam addr_t A     = 32'h0080_0000;   // trampoline base
  localparam int    NCALL = 512;             // calls in the trampoline

  logic clk = 0, rst_n = 0, enable = 0;
  addr_t tramp_base = A, tramp_end = A + NCALL * 8;
  logic in_valid = 0, in_ready;
  logic [7:0] in_byte = '0;
  logic out_valid, out_ready = 0;
  ptm_rec_t out_rec;

  int checks = 0, failures = 0;
  int n_type[4] = '{0, 0, 0, 0};
  ptm_rec_t exp_q[$];
  logic [7:0] bytes[$];
  addr_t last = '0;

  trace_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic addr_t rand_code_addr();
    addr_t a;
    do a = {$urandom_range(32'h00FF_FFFF, 32'h0001_0000)} & 32'hFFFF_FFFC;
    while (a >= A && a < A + NCALL * 8);
    if ($urandom_range(9) == 0) a = 32'hB6F0_0000 | (a & 32'h000F_FFFC);  // library code
    return a;
  endfunction

  task automatic send_branch(addr_t a, bit full = 0);
    byte_q_t q = enc_branch(a, last, full);
    foreach (q[i]) bytes.push_back(q[i]);
    last = a;
  endtask

  // Build one program-flow element and its expected record.
  task automatic gen_one();
    int k = $urandom_range(99);
    addr_t slot = A + 8 * $urandom_range(NCALL - 1);
    if (k < 25) begin            // direct call
      send_branch(slot);
      bytes.push_back(enc_atom(1));
      exp_q.push_back('{btype: BR_DC, src: slot, tgt: '0});
    end else if (k < 40) begin   // indirect call
      addr_t t = rand_code_addr();
      send_branch(slot);
      send_branch(t);
      exp_q.push_back('{btype: BR_IC, src: slot, tgt: t});
    end else if (k < 65) begin   // return to a stub, then the stub's direct jump
      send_branch(slot + 4);
      bytes.push_back(enc_atom(1));
      exp_q.push_back('{btype: BR_R, src: '0, tgt: slot + 4});
    end else if (k < 85) begin   // indirect jump
      addr_t t = rand_code_addr();
      send_branch(t);
      exp_q.push_back('{btype: BR_IJ, src: '0, tgt: t});
    end else if (k < 92) begin   // ordinary conditional branches
      bytes.push_back(enc_atom($urandom_range(1)));
    end else if (k < 96) begin   // padding
      bytes.push_back(8'h00);
    end else begin               // slot jump whose call is not taken
      send_branch(slot);
      bytes.push_back(enc_atom(0));
    end
  endtask

  // byte feeder
  initial begin
    forever begin
      @(posedge clk);
      if (in_valid && in_ready) begin
        void'(bytes.pop_front());
      end
      if (bytes.size() > 0 && $urandom_range(3) != 0) begin
        in_valid <= 1;
        in_byte  <= bytes[0];
      end else in_valid <= 0;
      // keep the byte stable while offered
      if (in_valid && !in_ready) begin in_valid <= 1; in_byte <= in_byte; end
    end
  end

  // output checker
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected record");
      else begin
        ptm_rec_t e;
        e = exp_q.pop_front();
        check(out_rec.btype == e.btype, $sformatf("record type got %0d/%h/%h exp %0d/%h/%h", out_rec.btype, out_rec.src, out_rec.tgt, e.btype, e.src, e.tgt));
        if (e.btype == BR_DC || e.btype == BR_IC) check(out_rec.src == e.src, "call source");
        if (e.btype != BR_DC) check(out_rec.tgt == e.tgt, "target address");
        n_type[out_rec.btype]++;
      end
    end
    out_ready <= ($urandom_range(4) != 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // disabled: bytes are consumed and dropped
    send_branch(rand_code_addr(), 1);
    wait (bytes.size() == 0);
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0 && !out_valid, "nothing decoded while disabled");
    enable <= 1;
    @(posedge clk);
    last = '0;
    send_branch(rand_code_addr(), 1);      // resynchronise with a full address
    void'(exp_q.size());
    exp_q.push_back('{btype: BR_IJ, src: '0, tgt: last});
    for (int i = 0; i < 3000; i++) gen_one();
    wait (bytes.size() == 0);
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all records delivered");
    check(n_type[BR_DC] > 0 && n_type[BR_IC] > 0 && n_type[BR_R] > 0 && n_type[BR_IJ] > 0,
          "every branch class seen");
    $display("DC=%0d IC=%0d R=%0d IJ=%0d", n_type[0], n_type[1], n_type[2], n_type[3]);
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
