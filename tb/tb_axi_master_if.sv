// tb_axi_master_if: self-checking test of the single-word AXI master.
//
// The master talks to the behavioural memory (random wait states on every
// channel).  Random write and read commands are issued; each write updates a
// word model, each read must return the model value, every command must end
// with exactly one rsp_valid pulse, and the memory must count one beat per
// command.  Also checks that cmd_ready is low while a command is in flight.
module tb_axi_master_if;
  import axi_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_write = 0, rsp_valid, rsp_err;
  addr_t cmd_addr = '0;
  data_t cmd_wdata = '0, rsp_rdata;
  axi_req_t  axi_req;
  axi_resp_t axi_resp;
  int n_writes, n_reads;
  int checks = 0, failures = 0;
  logic [31:0] model [logic [31:0]];

  axi_master_if dut (.*);
  axi_mem_model #(.MAX_WAIT(3)) mem (.clk, .rst_n, .req(axi_req), .resp(axi_resp), .n_writes, .n_reads);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_cmd(bit wr, addr_t a, data_t d, output data_t r);
    cmd_valid <= 1; cmd_write <= wr; cmd_addr <= a; cmd_wdata <= d;
    do @(posedge clk); while (!cmd_ready);
    cmd_valid <= 0;
    @(posedge clk);
    check(!cmd_ready, "busy while in flight");
    while (!rsp_valid) @(posedge clk);
    r = rsp_rdata;
    check(!rsp_err, "no bus error");
  endtask

  initial begin
    data_t r;
    int nw, nr;
    nw = 0; nr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 600; t++) begin
      automatic addr_t a = 32'h1000_0000 + 4 * $urandom_range(31);
      if (!model.exists(a) || $urandom_range(1)) begin
        automatic data_t d = $urandom;
        do_cmd(1, a, d, r);
        model[a] = d;
        nw++;
      end else begin
        do_cmd(0, a, '0, r);
        check(r == model[a], "read data");
        nr++;
      end
    end
    repeat (5) @(posedge clk);
    check(n_writes == nw && n_reads == nr, "one beat per command");
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
