// axi_bfm.svh: AXI master tasks for testbenches (included inside a module).
//
// Expects in the including module: `clk`, an axi_pkg::axi_req_t `bfm_req`
// driven only by these tasks, and an axi_pkg::axi_resp_t `bfm_resp`.  Signals
// are driven with nonblocking assignments after a clock edge and sampled at
// the edge.  axi_write sends an INCR burst of data.size() words.

task automatic axi_write(input logic [31:0] addr, input logic [31:0] data[$]);
  bfm_req.awaddr  <= addr;
  bfm_req.awlen   <= 4'(data.size() - 1);
  bfm_req.awsize  <= 3'd2;
  bfm_req.awburst <= 2'b01;
  bfm_req.awid    <= 12'h0A5;
  bfm_req.awvalid <= 1'b1;
  do @(posedge clk); while (!bfm_resp.awready);
  bfm_req.awvalid <= 1'b0;
  foreach (data[i]) begin
    bfm_req.wdata  <= data[i];
    bfm_req.wstrb  <= 4'hF;
    bfm_req.wlast  <= (i == data.size() - 1);
    bfm_req.wvalid <= 1'b1;
    do @(posedge clk); while (!bfm_resp.wready);
  end
  bfm_req.wvalid <= 1'b0;
  bfm_req.bready <= 1'b1;
  do @(posedge clk); while (!bfm_resp.bvalid);
  bfm_req.bready <= 1'b0;
endtask

task automatic axi_write32(input logic [31:0] addr, input logic [31:0] d);
  logic [31:0] q[$];
  q.push_back(d);
  axi_write(addr, q);
endtask

task automatic axi_read32(input logic [31:0] addr, output logic [31:0] d);
  bfm_req.araddr  <= addr;
  bfm_req.arlen   <= 4'd0;
  bfm_req.arsize  <= 3'd2;
  bfm_req.arburst <= 2'b01;
  bfm_req.arid    <= 12'h05A;
  bfm_req.arvalid <= 1'b1;
  do @(posedge clk); while (!bfm_resp.arready);
  bfm_req.arvalid <= 1'b0;
  bfm_req.rready  <= 1'b1;
  do @(posedge clk); while (!bfm_resp.rvalid);
  d = bfm_resp.rdata;
  bfm_req.rready  <= 1'b0;
endtask
