// tb_axi_slave_if: self-checking test of the AXI slave front end.
//
// A 64-word register array in the testbench sits behind the front end and
// stalls write beats at random through reg_wr_ready.  Single writes and INCR
// bursts of up to 8 words are issued with the AXI tasks of axi_bfm.svh and
// read back one word at a time; every read must return the model value and
// carry the request's ID, every write must return an OKAY response with the
// request's ID, and the register array must see exactly the addressed words.
module tb_axi_slave_if;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0;
  axi_req_t  bfm_req = '0;
  axi_resp_t bfm_resp;

  logic        reg_wr_valid, reg_wr_ready, reg_rd_valid;
  logic [7:0]  reg_wr_addr, reg_rd_addr;
  logic [31:0] reg_wr_data, reg_rd_data;
  logic [3:0]  reg_wr_strb;

  logic [31:0] regs [64];
  logic [31:0] model [64];
  int checks = 0, failures = 0, stalls = 0, bursts = 0;

  axi_slave_if #(.OFF_W(8)) dut (
    .clk, .rst_n, .axi_req(bfm_req), .axi_resp(bfm_resp),
    .reg_wr_valid, .reg_wr_addr, .reg_wr_data, .reg_wr_strb, .reg_wr_ready,
    .reg_rd_valid, .reg_rd_addr, .reg_rd_data
  );

  `include "axi_bfm.svh"

  always #5 clk = ~clk;

  assign reg_rd_data = regs[reg_rd_addr[7:2]];
  always @(posedge clk) begin
    if (reg_wr_valid && reg_wr_ready) regs[reg_wr_addr[7:2]] <= reg_wr_data;
    if (reg_wr_valid && !reg_wr_ready) stalls++;
    reg_wr_ready <= ($urandom_range(2) != 0);
  end

  // ID checks on the response channels
  always @(posedge clk) begin
    if (bfm_resp.bvalid && bfm_req.bready) begin
      checks++;
      if (bfm_resp.bid != 12'h0A5 || bfm_resp.bresp != RESP_OKAY) begin
        failures++; $display("FAIL: B response");
      end
    end
    if (bfm_resp.rvalid && bfm_req.rready) begin
      checks++;
      if (bfm_resp.rid != 12'h05A || !bfm_resp.rlast) begin
        failures++; $display("FAIL: R id/last");
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 64; i++) begin regs[i] = 32'h0; model[i] = 32'h0; end
    reg_wr_ready = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      automatic int n = ($urandom_range(3) == 0) ? $urandom_range(8, 2) : 1;
      automatic int w = $urandom_range(64 - n);
      automatic logic [31:0] q[$];
      for (int i = 0; i < n; i++) begin
        q.push_back($urandom);
        model[w + i] = q[i];
      end
      if (n > 1) bursts++;
      axi_write(32'h4000_0000 | (w * 4), q);
      for (int i = 0; i < 3; i++) begin
        automatic int r = (i == 0) ? w : $urandom_range(63);
        axi_read32(32'h4000_0000 | (r * 4), d);
        check(d == model[r], $sformatf("read word %0d", r));
      end
    end
    for (int r = 0; r < 64; r++) check(regs[r] == model[r], "register contents");
    check(stalls > 0, "write stalls exercised");
    check(bursts > 0, "bursts exercised");
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
