// axi_mem_model: behavioural AXI slave memory for testbenches.
//
// Stands in for the DDR memory and its controller.  Accepts one transaction
// at a time (INCR bursts, 32-bit words), with a pseudo-random number of wait
// clocks before each handshake.  Memory is a sparse word array; unwritten
// words read as 32'hDEAD_BEEF.  Counts accepted write and read beats.
module axi_mem_model
  import axi_pkg::*;
#(
  parameter int unsigned MAX_WAIT = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axi_req_t  req,
  output axi_resp_t resp,
  output int        n_writes,
  output int        n_reads
);

  logic [31:0] mem [logic [31:0]];

  function automatic logic [31:0] peek(logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : 32'hDEAD_BEEF;
  endfunction

  task automatic waitn();
    int n = (MAX_WAIT == 0) ? 0 : int'($urandom_range(MAX_WAIT, 0));
    repeat (n) @(posedge clk);
  endtask

  // Drives with nonblocking assignments just after a clock edge and samples
  // the request at the edge, so it behaves like clocked logic.
  initial begin
    resp = '0;
    n_writes = 0;
    n_reads = 0;
    forever begin
      @(posedge clk);
      if (!rst_n) continue;
      if (req.awvalid) begin
        logic [31:0] a;
        logic [3:0]  len;
        waitn();
        resp.awready <= 1'b1;
        do @(posedge clk); while (!req.awvalid);
        a = req.awaddr; len = req.awlen;
        resp.bid     <= req.awid;
        resp.awready <= 1'b0;
        for (int b = 0; b <= int'(len); b++) begin
          waitn();
          resp.wready <= 1'b1;
          do @(posedge clk); while (!req.wvalid);
          mem[a[31:2]] = req.wdata;
          n_writes++;
          resp.wready <= 1'b0;
          a += 4;
        end
        resp.bvalid <= 1'b1;
        resp.bresp  <= RESP_OKAY;
        do @(posedge clk); while (!req.bready);
        resp.bvalid <= 1'b0;
      end else if (req.arvalid) begin
        logic [31:0] a;
        logic [3:0]  len;
        waitn();
        resp.arready <= 1'b1;
        do @(posedge clk); while (!req.arvalid);
        a = req.araddr; len = req.arlen;
        resp.rid     <= req.arid;
        resp.arready <= 1'b0;
        for (int b = 0; b <= int'(len); b++) begin
          waitn();
          resp.rvalid <= 1'b1;
          resp.rdata  <= peek(a);
          resp.rresp  <= RESP_OKAY;
          resp.rlast  <= (b == int'(len));
          do @(posedge clk); while (!req.rready);
          n_reads++;
          resp.rvalid <= 1'b0;
          a += 4;
        end
      end
    end
  end

endmodule
