// cra_monitor: code-reuse-attack monitor for an ARM SoC (top level).
//
// Watches a program running on an unmodified ARM core from outside it.  The
// core's trace port delivers indirect-branch targets and branch atoms; the
// instrumented program writes each function's entry and size to the monitor
// over the bus.  The PTM Trace Analyzer turns the trace into classified
// branch records, and the CRA detector merges them with the boundary records
// and checks return addresses against a shadow stack (ROP) and call and jump
// targets against function boundaries (JOP), raising irq on a violation.
// The two-part structure is the document's (its Fig. 1 and Fig. 3).
//
// Ports: the trace port (its own clock and reset), the monitor clock and
// reset, two AXI slave ports (trace analyzer and detector registers, see
// pta.sv and cra_detector.sv for the maps), one AXI master port to the CRA
// region in main memory, the interrupt to the host, and the sticky trace
// overflow flag (also fed to the detector, which then stops stalling the bus
// on boundary records it may never be able to pair).  The AXI
// interconnect, the host core, its trace macrocell and trace port unit, and
// the memory lie outside.
module cra_monitor
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;
#(
  parameter int unsigned TRACE_FIFO_DEPTH = 32,
  parameter int unsigned PTM_FIFO_DEPTH   = 16,
  parameter int unsigned MMIO_FIFO_DEPTH  = 16,
  parameter int unsigned SS_DEPTH         = 16,
  parameter int unsigned SS_BLOCK         = 8,
  parameter int unsigned REGION_BLOCKS    = 512
) (
  input  logic       trace_clk,
  input  logic       trace_rst_n,
  input  logic       trace_ctl,       // trace byte valid
  input  logic [7:0] trace_data,

  input  logic       clk,
  input  logic       rst_n,

  input  axi_req_t   pta_axi_req,
  output axi_resp_t  pta_axi_resp,
  input  axi_req_t   det_axi_req,
  output axi_resp_t  det_axi_resp,
  output axi_req_t   mem_axi_req,
  input  axi_resp_t  mem_axi_resp,

  output logic       irq,
  output logic       trace_overflow
);

  logic     rec_valid, rec_ready;
  ptm_rec_t rec;

  pta #(.TRACE_FIFO_DEPTH(TRACE_FIFO_DEPTH)) u_pta (
    .trace_clk      (trace_clk),
    .trace_rst_n    (trace_rst_n),
    .trace_valid    (trace_ctl),
    .trace_data     (trace_data),
    .clk            (clk),
    .rst_n          (rst_n),
    .axi_req        (pta_axi_req),
    .axi_resp       (pta_axi_resp),
    .rec_valid      (rec_valid),
    .rec            (rec),
    .rec_ready      (rec_ready),
    .trace_overflow (trace_overflow)
  );

  cra_detector #(
    .PTM_FIFO_DEPTH  (PTM_FIFO_DEPTH),
    .MMIO_FIFO_DEPTH (MMIO_FIFO_DEPTH),
    .SS_DEPTH        (SS_DEPTH),
    .SS_BLOCK        (SS_BLOCK),
    .REGION_BLOCKS   (REGION_BLOCKS)
  ) u_det (
    .clk        (clk),
    .rst_n      (rst_n),
    .rec_valid  (rec_valid),
    .rec        (rec),
    .rec_ready  (rec_ready),
    .trace_lost (trace_overflow),
    .s_axi_req  (det_axi_req),
    .s_axi_resp (det_axi_resp),
    .m_axi_req  (mem_axi_req),
    .m_axi_resp (mem_axi_resp),
    .irq        (irq)
  );

endmodule
