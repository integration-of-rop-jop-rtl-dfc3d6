// trace_combiner: puts bus and trace information back into program order.
//
// Function boundary records (written over the bus by the instrumented
// function prologues) and branch records (from the trace analyzer) reach the
// detector through two FIFOs with no ordering between them.  Following the
// document, the combiner
//   * waits for the first boundary record, that of the initially invoked
//     function, and passes it on alone as a START event (F.B0);
//   * then, whenever a branch record is at the head of the PTM FIFO, looks at
//     its type: a direct or indirect call is held until a boundary record is
//     also available, and both are popped and passed on together; any other
//     branch is passed on alone.  A boundary record with no call yet simply
//     waits in its FIFO.
// Branch records that arrive before the START record are dropped, since no
// function is being tracked yet (this design's choice).
//
// Interface: FIFO read sides (empty/pop/data) and one event output with
// valid/ready.  The output is registered: an event appears one clock after
// its inputs are at the FIFO heads.
module trace_combiner
  import cra_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,        // restart: forget START

  input  logic      ptm_empty,
  input  ptm_rec_t  ptm_data,
  output logic      ptm_pop,

  input  logic      mmio_empty,
  input  func_rec_t mmio_data,
  output logic      mmio_pop,

  output logic      ev_valid,
  output cdc_ev_t   ev,
  input  logic      ev_ready,
  output logic      started
);

  logic slot_free;
  logic is_call;

  assign slot_free = !ev_valid || ev_ready;
  assign is_call   = (ptm_data.btype == BR_DC) || (ptm_data.btype == BR_IC);

  always_comb begin
    ptm_pop  = 1'b0;
    mmio_pop = 1'b0;
    if (!started) begin
      mmio_pop = !mmio_empty && slot_free;
      ptm_pop  = !ptm_empty;                      // discard pre-start branches
    end else if (!ptm_empty && slot_free) begin
      if (!is_call) begin
        ptm_pop = 1'b1;
      end else if (!mmio_empty) begin
        ptm_pop  = 1'b1;
        mmio_pop = 1'b1;
      end
    end
  end

  function automatic ev_kind_e kind_of(br_type_e t);
    unique case (t)
      BR_DC:   return EV_DC;
      BR_IC:   return EV_IC;
      BR_R:    return EV_R;
      default: return EV_IJ;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started  <= 1'b0;
      ev_valid <= 1'b0;
      ev       <= '0;
    end else if (clear) begin
      started  <= 1'b0;
      ev_valid <= 1'b0;
    end else begin
      if (ev_valid && ev_ready) ev_valid <= 1'b0;
      if (!started) begin
        if (mmio_pop) begin
          started  <= 1'b1;
          ev_valid <= 1'b1;
          ev       <= '{kind: EV_START, br: '0, fb: mmio_data};
        end
      end else if (ptm_pop) begin
        ev_valid <= 1'b1;
        ev       <= '{kind: kind_of(ptm_data.btype), br: ptm_data,
                      fb: (mmio_pop ? mmio_data : '0)};
      end
    end
  end

endmodule
