// axi_master_if: single-word AXI master used by the shadow stack manager.
//
// The shadow stack manager moves blocks of stack entries between the CRA
// detector and the CRA region in main memory.  This engine performs one
// 32-bit single-beat AXI transfer per command: a write drives AW and W
// together and waits for B; a read drives AR and waits for R.  One command is
// in flight at a time, so no ordering or ID handling is needed.  The document
// names an AXI master interface inside the shadow stack manager; the
// single-beat protocol is this design's choice (simplest that works).
//
// Interface: cmd_valid/cmd_ready with cmd_write, cmd_addr, cmd_wdata; the
// result comes back as a one-clock rsp_valid pulse with rsp_rdata (reads) and
// rsp_err (SLVERR or DECERR).  Latency is two clocks plus the slave's.
module axi_master_if
  import axi_pkg::*;
#(
  parameter id_t AXI_ID = '0
) (
  input  logic      clk,
  input  logic      rst_n,

  input  logic      cmd_valid,
  output logic      cmd_ready,
  input  logic      cmd_write,
  input  addr_t     cmd_addr,
  input  data_t     cmd_wdata,
  output logic      rsp_valid,
  output data_t     rsp_rdata,
  output logic      rsp_err,

  output axi_req_t  axi_req,
  input  axi_resp_t axi_resp
);

  typedef enum logic [2:0] { IDLE, WADDR, WRESP, RADDR, RDATA } st_e;

  st_e   st;
  addr_t addr_q;
  data_t data_q;
  logic  aw_done, w_done;

  assign cmd_ready = (st == IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      addr_q    <= '0;
      data_q    <= '0;
      aw_done   <= 1'b0;
      w_done    <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      rsp_err   <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (st)
        IDLE: if (cmd_valid) begin
          addr_q  <= {cmd_addr[31:2], 2'b00};
          data_q  <= cmd_wdata;
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          st      <= cmd_write ? WADDR : RADDR;
        end
        WADDR: begin
          if (axi_resp.awready) aw_done <= 1'b1;
          if (axi_resp.wready)  w_done  <= 1'b1;
          if ((aw_done || axi_resp.awready) && (w_done || axi_resp.wready)) st <= WRESP;
        end
        WRESP: if (axi_resp.bvalid) begin
          rsp_valid <= 1'b1;
          rsp_err   <= axi_resp.bresp[1];
          st        <= IDLE;
        end
        RADDR: if (axi_resp.arready) st <= RDATA;
        RDATA: if (axi_resp.rvalid) begin
          rsp_valid <= 1'b1;
          rsp_rdata <= axi_resp.rdata;
          rsp_err   <= axi_resp.rresp[1];
          st        <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    axi_req         = '0;
    axi_req.awid    = AXI_ID;
    axi_req.awaddr  = addr_q;
    axi_req.awsize  = 3'd2;
    axi_req.awburst = BURST_INCR;
    axi_req.awvalid = (st == WADDR) && !aw_done;
    axi_req.wid     = AXI_ID;
    axi_req.wdata   = data_q;
    axi_req.wstrb   = '1;
    axi_req.wlast   = 1'b1;
    axi_req.wvalid  = (st == WADDR) && !w_done;
    axi_req.bready  = (st == WRESP);
    axi_req.arid    = AXI_ID;
    axi_req.araddr  = addr_q;
    axi_req.arsize  = 3'd2;
    axi_req.arburst = BURST_INCR;
    axi_req.arvalid = (st == RADDR);
    axi_req.rready  = (st == RDATA);
  end

endmodule
