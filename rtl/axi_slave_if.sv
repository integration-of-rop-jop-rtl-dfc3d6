// axi_slave_if: AXI slave front end for a block of 32-bit registers.
//
// Both the trace analyzer and the CRA detector are programmed, and fed the
// function boundary records, through memory-mapped registers on the AXI
// interconnect.  This module converts AXI transfers into one register access
// per beat, so the register blocks only see a simple strobe interface.
//
// Writes: the address phase is accepted when idle, then each data beat is
// offered as reg_wr_valid with its word offset; reg_wr_ready from the register
// block may hold a beat (the MMIO FIFO uses this to stall the bus when full).
// After the last beat one B response (OKAY) is returned.  Reads: the address
// phase is accepted when no write is in progress, then each beat returns
// reg_rd_data for the current offset, combinationally, with RLAST on the last.
// INCR bursts of up to 16 beats step the offset by 4; other burst types are
// treated as INCR.  Only one transaction is open at a time; the register
// offset is the low OFF_W bits of the address.  The document names the
// block; its behaviour here is this design's choice.
module axi_slave_if
  import axi_pkg::*;
#(
  parameter int unsigned OFF_W = 8     // register window: 2**OFF_W bytes
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axi_req_t   axi_req,
  output axi_resp_t  axi_resp,

  output logic             reg_wr_valid,
  output logic [OFF_W-1:0] reg_wr_addr,
  output data_t            reg_wr_data,
  output strb_t            reg_wr_strb,
  input  logic             reg_wr_ready,

  output logic             reg_rd_valid,   // a read beat is being transferred
  output logic [OFF_W-1:0] reg_rd_addr,
  input  data_t            reg_rd_data
);

  typedef enum logic [2:0] { IDLE, WDATA, WRESP, RDATA } st_e;

  st_e              st;
  id_t              id_q;
  logic [OFF_W-1:0] off_q;
  logic [3:0]       beats_q;     // beats left minus one

  wire aw_hs = (st == IDLE) && axi_req.awvalid;
  wire ar_hs = (st == IDLE) && !axi_req.awvalid && axi_req.arvalid;
  wire w_hs  = (st == WDATA) && axi_req.wvalid && reg_wr_ready;
  wire r_hs  = (st == RDATA) && axi_req.rready;
  wire b_hs  = (st == WRESP) && axi_req.bready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      id_q    <= '0;
      off_q   <= '0;
      beats_q <= '0;
    end else begin
      unique case (st)
        IDLE: begin
          if (aw_hs) begin
            st      <= WDATA;
            id_q    <= axi_req.awid;
            off_q   <= OFF_W'(axi_req.awaddr);
            beats_q <= axi_req.awlen;
          end else if (ar_hs) begin
            st      <= RDATA;
            id_q    <= axi_req.arid;
            off_q   <= OFF_W'(axi_req.araddr);
            beats_q <= axi_req.arlen;
          end
        end
        WDATA: if (w_hs) begin
          off_q   <= off_q + OFF_W'(4);
          beats_q <= beats_q - 4'd1;
          if (beats_q == 4'd0 || axi_req.wlast) st <= WRESP;
        end
        WRESP: if (b_hs) st <= IDLE;
        RDATA: if (r_hs) begin
          off_q   <= off_q + OFF_W'(4);
          beats_q <= beats_q - 4'd1;
          if (beats_q == 4'd0) st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    axi_resp         = '0;
    axi_resp.awready = (st == IDLE);
    axi_resp.arready = (st == IDLE) && !axi_req.awvalid;
    axi_resp.wready  = (st == WDATA) && reg_wr_ready;
    axi_resp.bvalid  = (st == WRESP);
    axi_resp.bid     = id_q;
    axi_resp.bresp   = RESP_OKAY;
    axi_resp.rvalid  = (st == RDATA);
    axi_resp.rid     = id_q;
    axi_resp.rdata   = reg_rd_data;
    axi_resp.rresp   = RESP_OKAY;
    axi_resp.rlast   = (st == RDATA) && (beats_q == 4'd0);
  end

  assign reg_wr_valid = (st == WDATA) && axi_req.wvalid;
  assign reg_wr_addr  = off_q;
  assign reg_wr_data  = axi_req.wdata;
  assign reg_wr_strb  = axi_req.wstrb;
  assign reg_rd_valid = r_hs;
  assign reg_rd_addr  = off_q;

  // AXI rule: a master keeps VALID and its payload until READY.
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (axi_req.wvalid && !axi_resp.wready && st == WDATA) |=> axi_req.wvalid);

endmodule
