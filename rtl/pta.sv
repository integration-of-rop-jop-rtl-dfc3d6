// pta: PTM Trace Analyzer.
//
// Receives the host's program-flow trace from the trace port, carries it into
// the monitor clock domain through the branch trace FIFO, and lets the trace
// decoder turn it into branch records (type, call source address, target
// address) for the CRA detector.  This split into FIFO and decoder is the
// document's.  The register window on the bus, through which software sets
// the trampoline range and enables decoding, is this design's choice:
//   0x00 CTRL        [0] enable decoding (reset 0)
//   0x04 TRAMP_BASE  trampoline start A (8-byte aligned)
//   0x08 TRAMP_END   first address after the trampoline
//   0x0C STATUS      [0] a trace byte was dropped because the FIFO was full
//   0x10 RECORDS     number of branch records handed to the detector
//
// Timing: a trace byte written on trace_clk is visible to the decoder about
// three monitor clocks later; the decoder takes one byte per monitor clock.
module pta
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;
#(
  parameter int unsigned TRACE_FIFO_DEPTH = 32
) (
  // trace port domain
  input  logic       trace_clk,
  input  logic       trace_rst_n,
  input  logic       trace_valid,    // TRACECTL: byte present
  input  logic [7:0] trace_data,

  // monitor domain
  input  logic       clk,
  input  logic       rst_n,
  input  axi_req_t   axi_req,
  output axi_resp_t  axi_resp,

  output logic       rec_valid,
  output ptm_rec_t   rec,
  input  logic       rec_ready,
  output logic       trace_overflow
);

  logic       fifo_empty, fifo_pop, wr_full, wr_ovf;
  logic [7:0] fifo_byte;

  branch_trace_fifo #(.WIDTH(8), .DEPTH(TRACE_FIFO_DEPTH)) u_btf (
    .wr_clk      (trace_clk),
    .wr_rst_n    (trace_rst_n),
    .wr_en       (trace_valid),
    .wr_data     (trace_data),
    .wr_full     (wr_full),
    .wr_overflow (wr_ovf),
    .rd_clk      (clk),
    .rd_rst_n    (rst_n),
    .rd_en       (fifo_pop),
    .rd_data     (fifo_byte),
    .rd_empty    (fifo_empty),
    .rd_overflow (trace_overflow)
  );

  logic  enable_q;
  addr_t tramp_base_q, tramp_end_q;
  logic [31:0] rec_cnt_q;
  logic  dec_ready;

  trace_decoder u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (enable_q),
    .tramp_base (tramp_base_q),
    .tramp_end  (tramp_end_q),
    .in_valid   (!fifo_empty),
    .in_byte    (fifo_byte),
    .in_ready   (dec_ready),
    .out_valid  (rec_valid),
    .out_rec    (rec),
    .out_ready  (rec_ready)
  );
  assign fifo_pop = !fifo_empty && dec_ready;

  // register file
  logic        wr_valid, rd_valid;
  logic [7:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axi_slave_if #(.OFF_W(8)) u_slv (
    .clk          (clk),
    .rst_n        (rst_n),
    .axi_req      (axi_req),
    .axi_resp     (axi_resp),
    .reg_wr_valid (wr_valid),
    .reg_wr_addr  (wr_addr),
    .reg_wr_data  (wr_data),
    .reg_wr_strb  (wr_strb),
    .reg_wr_ready (1'b1),
    .reg_rd_valid (rd_valid),
    .reg_rd_addr  (rd_addr),
    .reg_rd_data  (rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable_q     <= 1'b0;
      tramp_base_q <= '0;
      tramp_end_q  <= '0;
      rec_cnt_q    <= '0;
    end else begin
      if (rec_valid && rec_ready) rec_cnt_q <= rec_cnt_q + 1;
      if (wr_valid) begin
        unique case (wr_addr)
          PTA_CTRL:       enable_q     <= wr_data[0];
          PTA_TRAMP_BASE: tramp_base_q <= {wr_data[31:3], 3'b000};
          PTA_TRAMP_END:  tramp_end_q  <= wr_data;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      PTA_CTRL:       rd_data = {31'd0, enable_q};
      PTA_TRAMP_BASE: rd_data = tramp_base_q;
      PTA_TRAMP_END:  rd_data = tramp_end_q;
      PTA_STATUS:     rd_data = {31'd0, trace_overflow};
      PTA_RECORDS:    rd_data = rec_cnt_q;
      default:        rd_data = '0;
    endcase
  end

endmodule
