// trace_decoder: turns the trace byte stream into classified branch records.
//
// The host program is instrumented so that every call sits in a trampoline
// section at A + 8n and is reached by an indirect jump, and every return lands
// on a stub at A + 8n + 4.  The trace port only reports indirect-branch
// targets and taken/not-taken atoms, so the decoder classifies branches from
// the target address alone, as the document describes:
//   * target at A + 8n     -> a call is about to run from slot A + 8n (the
//                             call's source address).  If the next trace
//                             element is a branch address, it is an indirect
//                             call to that address; if it is a taken atom, a
//                             direct call.
//   * target at A + 8n + 4 -> return.
//   * any other target     -> indirect jump.
// Atoms outside a pending call are ignored.
//
// Packet format (this design's reading of the trace protocol, a simplified
// subset of the ARM program-flow trace format):
//   8'h00                 padding / alignment byte, ignored
//   b[0] = 1              branch address packet, first byte: b[6:1] = addr[7:2],
//                         b[7] = another byte follows
//   following bytes       byte 1: b[6:0] = addr[14:8], byte 2: addr[21:15],
//                         byte 3: addr[28:22] (b[7] = continue), byte 4:
//                         b[2:0] = addr[31:29].  Address bits not sent are kept
//                         from the previous branch address; addr[1:0] = 0.
//   8'b1000_00E0          atom: E = 1 taken, 0 not taken
//   other bytes           ignored
//
// Interface: byte input with valid/ready (ready is low while a record waits);
// record output with valid/ready.  One byte is consumed per clock; a record is
// presented the clock after its last byte.  tramp_base must be 8-byte aligned.
module trace_decoder
  import cra_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enable,      // when low, bytes are consumed and dropped
  input  addr_t    tramp_base,  // A
  input  addr_t    tramp_end,   // first address past the trampoline

  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       in_ready,

  output logic     out_valid,
  output ptm_rec_t out_rec,
  input  logic     out_ready
);

  typedef enum logic [0:0] { S_HDR, S_ADDR } st_e;

  st_e         st;
  logic [2:0]  byte_idx;        // index of the next address byte (1..4)
  addr_t       last_addr;       // last full branch address (compression base)
  addr_t       cur_addr;        // address being assembled
  logic        call_pending;
  addr_t       call_src;

  // Address assembly: merge one more payload byte into cur_addr.
  function automatic addr_t merge(addr_t a, logic [2:0] idx, logic [7:0] b);
    addr_t r = a;
    unique case (idx)
      3'd1: r[14:8]  = b[6:0];
      3'd2: r[21:15] = b[6:0];
      3'd3: r[28:22] = b[6:0];
      default: r[31:29] = b[2:0];
    endcase
    return r;
  endfunction

  logic  addr_done;     // a branch address completes this cycle
  addr_t addr_val;
  logic  atom_seen, atom_e;
  logic  take;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  always_comb begin
    addr_done = 1'b0;
    addr_val  = cur_addr;
    atom_seen = 1'b0;
    atom_e    = in_byte[1];
    if (take && enable) begin
      if (st == S_HDR) begin
        if (in_byte[0]) begin
          addr_val      = last_addr;
          addr_val[7:2] = in_byte[6:1];
          addr_val[1:0] = 2'b00;
          addr_done     = !in_byte[7];
        end else if (in_byte[7] && in_byte[6:2] == 5'd0) begin
          atom_seen = 1'b1;
        end
      end else begin
        addr_val  = merge(cur_addr, byte_idx, in_byte);
        addr_done = (byte_idx == 3'd4) || !in_byte[7];
      end
    end
  end

  // Classification of a completed branch address.
  addr_t off;
  logic  in_tramp;
  assign off      = addr_val - tramp_base;
  assign in_tramp = (addr_val >= tramp_base) && (addr_val < tramp_end);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_HDR;
      byte_idx     <= 3'd1;
      last_addr    <= '0;
      cur_addr     <= '0;
      call_pending <= 1'b0;
      call_src     <= '0;
      out_valid    <= 1'b0;
      out_rec      <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (!enable) begin
        st           <= S_HDR;
        call_pending <= 1'b0;
      end else if (take) begin
        // packet framing
        if (st == S_HDR) begin
          if (in_byte[0] && in_byte[7]) begin
            st       <= S_ADDR;
            byte_idx <= 3'd1;
            cur_addr <= addr_val;
          end
        end else if (!addr_done) begin
          byte_idx <= byte_idx + 3'd1;
          cur_addr <= addr_val;
        end else begin
          st <= S_HDR;
        end

        if (addr_done) begin
          last_addr <= addr_val;
          if (call_pending) begin
            call_pending <= 1'b0;
            out_valid    <= 1'b1;
            out_rec      <= '{btype: BR_IC, src: call_src, tgt: addr_val};
          end else if (in_tramp && !off[2]) begin
            call_pending <= 1'b1;
            call_src     <= addr_val;
          end else if (in_tramp) begin
            out_valid <= 1'b1;
            out_rec   <= '{btype: BR_R, src: '0, tgt: addr_val};
          end else begin
            out_valid <= 1'b1;
            out_rec   <= '{btype: BR_IJ, src: '0, tgt: addr_val};
          end
        end else if (atom_seen && call_pending) begin
          call_pending <= 1'b0;
          if (atom_e) begin
            out_valid <= 1'b1;
            out_rec   <= '{btype: BR_DC, src: call_src, tgt: '0};
          end
        end
      end
    end
  end

endmodule
