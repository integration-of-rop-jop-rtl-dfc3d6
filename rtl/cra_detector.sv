// cra_detector: the unified ROP/JOP detector.
//
// Branch records from the trace analyzer enter the PTM FIFO; function
// boundary records written by the instrumented program enter the MMIO FIFO.
// The trace combiner merges both into program order, the detector
// controller (CDC) checks each event against FUNC_BOUNDS and the shadow
// stack, and the shadow stack manager spills and refills the 16-entry
// on-chip stack through an AXI master.  This structure is the document's
// (its Fig. 4).  The register map and the FIFO depths are this design's:
//   0x00 CTRL        [0] enable (reset 0); write 1 to [1] clears the
//                    interrupt; write 1 to [2] restarts monitoring (FIFOs,
//                    combiner, CDC state and shadow stack are emptied)
//   0x04 STATUS      [0] irq [2:1] attack class [3] started
//                    [4] CRA region full [5] AXI master error
//                    [6] trace lost (trace_lost input)
//   0x08 CRA_BASE    base address of the CRA region
//   0x0C FUNC_ENTRY  function entry address (held until FUNC_SIZE)
//   0x10 FUNC_SIZE   function size; the write pushes {FUNC_ENTRY, size} into
//                    the MMIO FIFO and stalls the bus while that FIFO is full
//                    (once trace has been lost, a write to a full FIFO is
//                    dropped instead)
//   0x14 ATK_TGT     target address of the first violation
//   0x18 ATK_EXP     expected return address (ROP), callee entry (JOP call)
//                    or function entry (JOP jump)
//   0x1C DEPTH       [7:0] on-chip entries [15:8] REC_CNT [31:16] spilled blocks
module cra_detector
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;
#(
  parameter int unsigned PTM_FIFO_DEPTH  = 16,
  parameter int unsigned MMIO_FIFO_DEPTH = 16,
  parameter int unsigned SS_DEPTH        = 16,
  parameter int unsigned SS_BLOCK        = 8,
  parameter int unsigned REGION_BLOCKS   = 512
) (
  input  logic      clk,
  input  logic      rst_n,

  input  logic      rec_valid,     // from the trace analyzer
  input  ptm_rec_t  rec,
  output logic      rec_ready,
  input  logic      trace_lost,    // the trace analyzer dropped trace bytes

  input  axi_req_t  s_axi_req,     // register slave
  output axi_resp_t s_axi_resp,
  output axi_req_t  m_axi_req,     // CRA region master
  input  axi_resp_t m_axi_resp,

  output logic      irq
);

  // ---------------- registers ----------------
  logic        wr_valid, wr_ready, rd_valid;
  logic [7:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axi_slave_if #(.OFF_W(8)) u_slv (
    .clk          (clk),
    .rst_n        (rst_n),
    .axi_req      (s_axi_req),
    .axi_resp     (s_axi_resp),
    .reg_wr_valid (wr_valid),
    .reg_wr_addr  (wr_addr),
    .reg_wr_data  (wr_data),
    .reg_wr_strb  (wr_strb),
    .reg_wr_ready (wr_ready),
    .reg_rd_valid (rd_valid),
    .reg_rd_addr  (rd_addr),
    .reg_rd_data  (rd_data)
  );

  logic  enable_q, irq_clear, restart;
  addr_t cra_base_q, func_entry_q;
  logic  mmio_full, mmio_push;

  assign mmio_push = wr_valid && wr_addr == DET_FUNC_SIZE && !mmio_full;
  // Stall a boundary write while the MMIO FIFO is full, unless trace has been
  // lost: the combiner may then wait for a call record that never comes, and
  // the record is dropped rather than stalling the host for ever.
  assign wr_ready  = !(wr_addr == DET_FUNC_SIZE && mmio_full && !trace_lost);
  assign irq_clear = wr_valid && wr_addr == DET_CTRL && wr_data[1];
  assign restart   = wr_valid && wr_addr == DET_CTRL && wr_data[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable_q     <= 1'b0;
      cra_base_q   <= '0;
      func_entry_q <= '0;
    end else if (wr_valid && wr_ready) begin
      unique case (wr_addr)
        DET_CTRL:       enable_q     <= wr_data[0];
        DET_CRA_BASE:   cra_base_q   <= wr_data;
        DET_FUNC_ENTRY: func_entry_q <= wr_data;
        default: ;
      endcase
    end
  end

  // ---------------- FIFOs ----------------
  logic      ptm_full, ptm_empty, ptm_pop;
  ptm_rec_t  ptm_head;
  logic      mmio_empty, mmio_pop;
  func_rec_t mmio_head;

  sync_fifo #(.T(ptm_rec_t), .DEPTH(PTM_FIFO_DEPTH)) u_ptm_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (restart),
    .push  (rec_valid && !ptm_full),
    .wdata (rec),
    .full  (ptm_full),
    .pop   (ptm_pop),
    .rdata (ptm_head),
    .empty (ptm_empty),
    .level ()
  );
  assign rec_ready = !ptm_full;

  sync_fifo #(.T(func_rec_t), .DEPTH(MMIO_FIFO_DEPTH)) u_mmio_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (restart),
    .push  (mmio_push),
    .wdata ('{entry: func_entry_q, size: wr_data}),
    .full  (mmio_full),
    .pop   (mmio_pop),
    .rdata (mmio_head),
    .empty (mmio_empty),
    .level ()
  );

  // ---------------- trace combiner ----------------
  logic    ev_valid, ev_ready, tc_started;
  cdc_ev_t ev;

  trace_combiner u_tc (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (restart),
    .ptm_empty  (ptm_empty),
    .ptm_data   (ptm_head),
    .ptm_pop    (ptm_pop),
    .mmio_empty (mmio_empty),
    .mmio_data  (mmio_head),
    .mmio_pop   (mmio_pop),
    .ev_valid   (ev_valid),
    .ev         (ev),
    .ev_ready   (ev_ready),
    .started    (tc_started)
  );

  // ---------------- CDC ----------------
  logic      req_valid, req_ready, req_push, ssm_done, pop_empty;
  ss_entry_t req_entry, pop_entry;
  attack_e   attack;
  addr_t     atk_tgt, atk_exp;
  bounds_t   func_bounds;
  rec_cnt_t  rec_cnt;
  logic      cdc_started;

  cra_detector_controller u_cdc (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear         (restart),
    .enable        (enable_q),
    .ev_valid      (ev_valid),
    .ev            (ev),
    .ev_ready      (ev_ready),
    .ssm_req_valid (req_valid),
    .ssm_req_ready (req_ready),
    .ssm_req_push  (req_push),
    .ssm_req_entry (req_entry),
    .ssm_done      (ssm_done),
    .ssm_pop_entry (pop_entry),
    .ssm_pop_empty (pop_empty),
    .irq_clear     (irq_clear),
    .irq           (irq),
    .attack        (attack),
    .attack_tgt    (atk_tgt),
    .attack_exp    (atk_exp),
    .func_bounds   (func_bounds),
    .rec_cnt       (rec_cnt),
    .started       (cdc_started)
  );

  // ---------------- SSM ----------------
  logic        region_full, bus_err, victim_valid;
  logic [$clog2(SS_DEPTH+1)-1:0] onchip_count;
  logic [15:0] spilled;

  shadow_stack_manager #(.DEPTH(SS_DEPTH), .BLOCK(SS_BLOCK), .REGION_BLOCKS(REGION_BLOCKS)) u_ssm (
    .clk            (clk),
    .rst_n          (rst_n),
    .clear          (restart),
    .cra_base       (cra_base_q),
    .req_valid      (req_valid),
    .req_ready      (req_ready),
    .req_push       (req_push),
    .req_entry      (req_entry),
    .done           (ssm_done),
    .pop_entry      (pop_entry),
    .pop_empty      (pop_empty),
    .axi_req        (m_axi_req),
    .axi_resp       (m_axi_resp),
    .region_full    (region_full),
    .bus_err        (bus_err),
    .onchip_count   (onchip_count),
    .spilled_blocks (spilled),
    .victim_valid   (victim_valid)
  );

  always_comb begin
    unique case (rd_addr)
      DET_CTRL:       rd_data = {31'd0, enable_q};
      DET_STATUS:     rd_data = {25'd0, trace_lost, bus_err, region_full, cdc_started, attack, irq};
      DET_CRA_BASE:   rd_data = cra_base_q;
      DET_FUNC_ENTRY: rd_data = func_entry_q;
      DET_ATK_TGT:    rd_data = atk_tgt;
      DET_ATK_EXP:    rd_data = atk_exp;
      DET_DEPTH:      rd_data = {spilled, rec_cnt, 8'(onchip_count)};
      default:        rd_data = '0;
    endcase
  end

endmodule
