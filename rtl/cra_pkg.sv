// cra_pkg: types and constants shared by the blocks of the CRA monitor.
//
// Branch records travel from the trace decoder through the PTM FIFO to the
// trace combiner; function boundary records travel from the bus through the
// MMIO FIFO; the combiner hands program-ordered events to the detector
// controller, which keeps shadow stack entries.  The four branch classes
// (direct call, indirect call, return, indirect jump) are the document's;
// the encodings, widths and register offsets are this design's choices.
package cra_pkg;

  typedef logic [31:0] addr_t;

  // Branch classes delivered by the trace decoder.
  typedef enum logic [1:0] {
    BR_DC = 2'd0,   // direct call: bl/blx <imm> in a trampoline slot
    BR_IC = 2'd1,   // indirect call: blx <reg> in a trampoline slot
    BR_R  = 2'd2,   // return: lands on a trampoline stub (A + 8n + 4)
    BR_IJ = 2'd3    // indirect jump: any other indirect branch target
  } br_type_e;

  // One entry of the PTM FIFO.
  typedef struct packed {
    br_type_e btype;
    addr_t    src;   // address of the call slot (DC, IC)
    addr_t    tgt;   // target address (IC, R, IJ)
  } ptm_rec_t;

  // One entry of the MMIO FIFO: written by the func_info annotation code.
  typedef struct packed {
    addr_t entry;
    addr_t size;
  } func_rec_t;

  // Events from the trace combiner to the detector controller.
  typedef enum logic [2:0] {
    EV_START = 3'd0,  // boundaries of the first function (F.B0)
    EV_DC    = 3'd1,
    EV_IC    = 3'd2,
    EV_R     = 3'd3,
    EV_IJ    = 3'd4
  } ev_kind_e;

  typedef struct packed {
    ev_kind_e  kind;
    ptm_rec_t  br;
    func_rec_t fb;
  } cdc_ev_t;

  // FUNC_BOUNDS register: entry and end (= entry + size) of the running function.
  typedef struct packed {
    addr_t entry;
    addr_t fend;
  } bounds_t;

  localparam int unsigned REC_W = 8;   // width of REC_CNT
  typedef logic [REC_W-1:0] rec_cnt_t;

  // One shadow call stack entry: return address, the caller's bounds and its
  // recursion count.
  typedef struct packed {
    addr_t    ret;
    bounds_t  bounds;
    rec_cnt_t rec;
  } ss_entry_t;

  localparam int unsigned SS_WORDS = 4;  // 32-bit words per entry in the CRA region

  // Attack classes reported in STATUS.
  typedef enum logic [1:0] {
    ATK_NONE     = 2'd0,
    ATK_ROP      = 2'd1,  // return target differs from the shadow stack
    ATK_JOP_CALL = 2'd2,  // indirect call target is not the callee's entry
    ATK_JOP_JUMP = 2'd3   // indirect jump leaves the current function
  } attack_e;

  // Register offsets of the trace analyzer (PTA) slave.
  localparam logic [7:0] PTA_CTRL       = 8'h00; // [0] enable decoding
  localparam logic [7:0] PTA_TRAMP_BASE = 8'h04; // trampoline start A
  localparam logic [7:0] PTA_TRAMP_END  = 8'h08; // first address after the trampoline
  localparam logic [7:0] PTA_STATUS     = 8'h0C; // [0] branch trace FIFO overflowed
  localparam logic [7:0] PTA_RECORDS    = 8'h10; // branch records emitted

  // Register offsets of the CRA detector slave.
  localparam logic [7:0] DET_CTRL       = 8'h00; // [0] enable, [1] W1: clear irq, [2] W1: restart
  localparam logic [7:0] DET_STATUS     = 8'h04; // [0] irq [2:1] attack [3] started [4] region full [5] bus error
  localparam logic [7:0] DET_CRA_BASE   = 8'h08; // base of the CRA region in main memory
  localparam logic [7:0] DET_FUNC_ENTRY = 8'h0C; // func_info: entry address (staged)
  localparam logic [7:0] DET_FUNC_SIZE  = 8'h10; // func_info: size, pushes the record
  localparam logic [7:0] DET_ATK_TGT    = 8'h14; // target address of the first violation
  localparam logic [7:0] DET_ATK_EXP    = 8'h18; // expected address (ROP) or bound (JOP)
  localparam logic [7:0] DET_DEPTH      = 8'h1C; // [7:0] on-chip entries [15:8] REC_CNT [31:16] spilled blocks

endpackage
