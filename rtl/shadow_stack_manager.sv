// shadow_stack_manager: keeps the shadow call stack going past 16 entries.
//
// The on-chip shadow call stack holds DEPTH (16) entries.  As the document
// describes, when a push finds it full the manager moves the oldest BLOCK (8)
// entries out to the CRA region in main memory through its AXI master, and
// the register VICTIM_ENTRY keeps a copy of the block evicted last.  This
// design's choices for what the document leaves open:
//   * The CRA region is used as a stack of blocks.  An evicted block is
//     copied into VICTIM_ENTRY, the push completes at once, and the block is
//     written back to the region at block index mem_blocks (which then
//     increments) in the background while the detector carries on.  The
//     next eviction, or a refill that must read memory, waits until that
//     write-back has finished.
//   * A pop that finds the on-chip stack empty refills it with the most
//     recently spilled block: from VICTIM_ENTRY if that still holds it (no
//     bus traffic), else read back from the region.  mem_blocks decrements.
//   * A pop with nothing on chip and nothing spilled returns "empty".
//   * If the region (REGION_BLOCKS blocks) is full, an evicted block is
//     dropped and region_full is set; later returns may then be flagged.
// Memory layout: entry i of block b sits at cra_base + (b*BLOCK + i)*16 as
// four words: return address, function entry, function end, REC_CNT.
//
// Interface to the detector controller: req_valid/req_ready with req_push
// (1 push, 0 pop) and req_entry; completion is a one-clock done pulse,
// carrying pop_entry/pop_empty for a pop.  A push or pop served on chip
// completes in two clocks, a push that spills in three (plus any wait for the
// previous write-back); a refill from memory adds 4*BLOCK bus reads.
module shadow_stack_manager
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;
#(
  parameter int unsigned DEPTH         = 16,
  parameter int unsigned BLOCK         = 8,
  parameter int unsigned REGION_BLOCKS = 512   // 64 KiB CRA region
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  addr_t     cra_base,

  input  logic      req_valid,
  output logic      req_ready,
  input  logic      req_push,
  input  ss_entry_t req_entry,
  output logic      done,
  output ss_entry_t pop_entry,
  output logic      pop_empty,

  output axi_req_t  axi_req,
  input  axi_resp_t axi_resp,

  output logic      region_full,
  output logic      bus_err,
  output logic [$clog2(DEPTH+1)-1:0] onchip_count,
  output logic [15:0] spilled_blocks,
  output logic      victim_valid
);

  localparam int unsigned WORDS = BLOCK * SS_WORDS;
  localparam int unsigned IW    = $clog2(WORDS);
  localparam int unsigned BLK_BYTES = WORDS * 4;

  typedef enum logic [2:0] { IDLE, EVICT, DO_PUSH, READ, REFILL, DO_POP } st_e;

  st_e        st;
  ss_entry_t  entry_q;
  ss_entry_t  victim [BLOCK];          // VICTIM_ENTRY
  logic [IW-1:0] widx;                 // write-back word
  logic [IW-1:0] ridx;                 // refill word
  logic       wb_busy;                 // VICTIM_ENTRY being written back
  logic [15:0] wb_blk;                 // its block index in the region
  logic       cmd_sent;
  logic [15:0] mem_blocks;

  // ---------------- on-chip stack ----------------
  logic      s_push, s_pop, s_evict, s_refill, s_full, s_empty;
  ss_entry_t s_top;
  ss_entry_t s_oldest [BLOCK];

  shadow_call_stack #(.DEPTH(DEPTH), .BLOCK(BLOCK)) u_stack (
    .clk          (clk),
    .rst_n        (rst_n),
    .clear        (clear),
    .push         (s_push),
    .push_entry   (entry_q),
    .pop          (s_pop),
    .top          (s_top),
    .evict        (s_evict),
    .oldest       (s_oldest),
    .refill       (s_refill),
    .refill_block (victim),
    .full         (s_full),
    .empty        (s_empty),
    .count        (onchip_count)
  );

  // ---------------- bus engine ----------------
  logic  cmd_valid, cmd_ready, cmd_write, rsp_valid, rsp_err;
  addr_t cmd_addr;
  logic [31:0] cmd_wdata, rsp_rdata;
  logic [15:0] blk_sel;

  axi_master_if u_mst (
    .clk       (clk),
    .rst_n     (rst_n),
    .cmd_valid (cmd_valid),
    .cmd_ready (cmd_ready),
    .cmd_write (cmd_write),
    .cmd_addr  (cmd_addr),
    .cmd_wdata (cmd_wdata),
    .rsp_valid (rsp_valid),
    .rsp_rdata (rsp_rdata),
    .rsp_err   (rsp_err),
    .axi_req   (axi_req),
    .axi_resp  (axi_resp)
  );

  function automatic logic [31:0] word_of(ss_entry_t e, logic [1:0] w);
    unique case (w)
      2'd0:    return e.ret;
      2'd1:    return e.bounds.entry;
      2'd2:    return e.bounds.fend;
      default: return 32'(e.rec);
    endcase
  endfunction

  // The write-back owns the bus while busy; a refill read waits for it.
  assign blk_sel   = wb_busy ? wb_blk : mem_blocks - 16'd1;
  assign cmd_valid = (wb_busy || (st == READ)) && !cmd_sent;
  assign cmd_write = wb_busy;
  assign cmd_addr  = cra_base + 32'(blk_sel) * BLK_BYTES + 32'(wb_busy ? widx : ridx) * 4;
  assign cmd_wdata = word_of(victim[widx[IW-1:2]], widx[1:0]);

  // ---------------- control ----------------
  assign req_ready = (st == IDLE);
  assign s_push    = (st == DO_PUSH);
  assign s_pop     = (st == DO_POP);
  assign s_evict   = (st == EVICT) && !wb_busy;
  assign s_refill  = (st == REFILL);
  assign spilled_blocks = mem_blocks;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= IDLE;
      entry_q      <= '0;
      widx         <= '0;
      ridx         <= '0;
      wb_busy      <= 1'b0;
      wb_blk       <= '0;
      cmd_sent     <= 1'b0;
      mem_blocks   <= '0;
      victim_valid <= 1'b0;
      region_full  <= 1'b0;
      bus_err      <= 1'b0;
      done         <= 1'b0;
      pop_entry    <= '0;
      pop_empty    <= 1'b0;
      for (int i = 0; i < BLOCK; i++) victim[i] <= '0;
    end else if (clear) begin
      st           <= IDLE;
      wb_busy      <= 1'b0;
      cmd_sent     <= 1'b0;
      mem_blocks   <= '0;
      victim_valid <= 1'b0;
      region_full  <= 1'b0;
      bus_err      <= 1'b0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cmd_valid && cmd_ready) cmd_sent <= 1'b1;
      if (rsp_valid && rsp_err) bus_err <= 1'b1;
      // background write-back of VICTIM_ENTRY
      if (wb_busy && cmd_sent && rsp_valid) begin
        cmd_sent <= 1'b0;
        widx     <= widx + 1'b1;
        if (widx == IW'(WORDS - 1)) wb_busy <= 1'b0;
      end
      unique case (st)
        IDLE: if (req_valid) begin
          entry_q <= req_entry;
          if (req_push) begin
            st <= s_full ? EVICT : DO_PUSH;
          end else if (!s_empty) begin
            st <= DO_POP;
          end else if (mem_blocks == 16'd0) begin
            done      <= 1'b1;
            pop_empty <= 1'b1;
          end else if (victim_valid) begin
            st <= REFILL;
          end else begin
            st   <= READ;
            ridx <= '0;
          end
        end
        // waits while the previous block is still being written back
        EVICT: if (!wb_busy) begin
          if (mem_blocks < 16'(REGION_BLOCKS)) begin
            for (int i = 0; i < BLOCK; i++) victim[i] <= s_oldest[i];
            victim_valid <= 1'b1;
            wb_busy      <= 1'b1;
            wb_blk       <= mem_blocks;
            widx         <= '0;
            mem_blocks   <= mem_blocks + 16'd1;
          end else begin
            region_full <= 1'b1;
          end
          st <= DO_PUSH;
        end
        DO_PUSH: begin
          done      <= 1'b1;
          pop_empty <= 1'b0;
          st        <= IDLE;
        end
        READ: if (!wb_busy && cmd_sent && rsp_valid) begin
          cmd_sent <= 1'b0;
          ridx     <= ridx + 1'b1;
          unique case (ridx[1:0])
            2'd0:    victim[ridx[IW-1:2]].ret          <= rsp_rdata;
            2'd1:    victim[ridx[IW-1:2]].bounds.entry <= rsp_rdata;
            2'd2:    victim[ridx[IW-1:2]].bounds.fend  <= rsp_rdata;
            default: victim[ridx[IW-1:2]].rec          <= rec_cnt_t'(rsp_rdata);
          endcase
          if (ridx == IW'(WORDS - 1)) st <= REFILL;
        end
        REFILL: begin
          victim_valid <= 1'b0;
          mem_blocks   <= mem_blocks - 16'd1;
          st           <= DO_POP;
        end
        DO_POP: begin
          done      <= 1'b1;
          pop_entry <= s_top;
          pop_empty <= 1'b0;
          st        <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
