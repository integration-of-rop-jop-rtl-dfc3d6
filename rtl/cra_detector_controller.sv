// cra_detector_controller: CDC, the decision stage of the CRA detector.
//
// Consumes program-ordered events from the trace combiner and applies the
// document's ROP and JOP rules:
//   START  the initially invoked function: FUNC_BOUNDS <= {entry, entry+size}.
//   call   (direct or indirect) carries the callee's entry and size.  An
//          indirect call whose target is not the callee's entry is a JOP
//          attack.  Otherwise, if the callee is the running function itself
//          (FUNC_BOUNDS.entry), REC_CNT counts one more recursion level and
//          nothing is pushed; else {return address = source + 4, FUNC_BOUNDS,
//          REC_CNT} is pushed on the shadow stack and FUNC_BOUNDS becomes the
//          callee's bounds.
//   return if REC_CNT is non-zero it is decremented; else the top entry is
//          popped and its return address must equal the return target (else
//          ROP attack); on a match FUNC_BOUNDS and REC_CNT are restored.
//   indirect jump  the target must lie in [FUNC_BOUNDS.entry, FUNC_BOUNDS.end),
//          else JOP attack.
// A violation raises irq, which stays high until irq_clear, and records the
// first violation's class, target and expected address.  Saving REC_CNT with
// each stack entry (so recursion counts survive nested calls of other
// functions), keeping a failed call or return out of the tracked state, the
// treatment of a return with an empty stack as ROP, and REC_CNT saturating
// into ordinary pushes are this design's choices.
//
// Interface: ev_valid/ev_ready event input (one event accepted per idle
// clock); ssm_req_* request to the shadow stack manager, answered by a done
// pulse.  A jump check or recursion update takes one clock; a push or pop
// takes the manager's latency plus two clocks.  With enable low, events are
// consumed and ignored.
module cra_detector_controller
  import cra_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,        // restart monitoring
  input  logic      enable,

  input  logic      ev_valid,
  input  cdc_ev_t   ev,
  output logic      ev_ready,

  output logic      ssm_req_valid,
  input  logic      ssm_req_ready,
  output logic      ssm_req_push,
  output ss_entry_t ssm_req_entry,
  input  logic      ssm_done,
  input  ss_entry_t ssm_pop_entry,
  input  logic      ssm_pop_empty,

  input  logic      irq_clear,
  output logic      irq,
  output attack_e   attack,
  output addr_t     attack_tgt,
  output addr_t     attack_exp,

  output bounds_t   func_bounds,  // FUNC_BOUNDS
  output rec_cnt_t  rec_cnt,      // REC_CNT
  output logic      started
);

  typedef enum logic [2:0] { IDLE, PUSH_REQ, PUSH_WAIT, POP_REQ, POP_WAIT } st_e;

  st_e     st;
  bounds_t callee_q;   // bounds to install once the push completes
  addr_t   ret_tgt_q;  // return target awaiting the popped entry

  assign ev_ready      = (st == IDLE);
  assign ssm_req_valid = (st == PUSH_REQ) || (st == POP_REQ);
  assign ssm_req_push  = (st == PUSH_REQ);
  assign ssm_req_entry = '{ret: ret_tgt_q, bounds: func_bounds, rec: rec_cnt};

  wire take = ev_valid && (st == IDLE);

  // Combinational view of the accepted event.
  bounds_t ev_bounds;
  assign ev_bounds = '{entry: ev.fb.entry, fend: ev.fb.entry + ev.fb.size};

  task automatic flag(input attack_e a, input addr_t tgt, input addr_t exp_addr);
    // first violation wins until software clears the interrupt
    if (!irq) begin
      attack     <= a;
      attack_tgt <= tgt;
      attack_exp <= exp_addr;
    end
    irq <= 1'b1;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= IDLE;
      callee_q    <= '0;
      ret_tgt_q   <= '0;
      irq         <= 1'b0;
      attack      <= ATK_NONE;
      attack_tgt  <= '0;
      attack_exp  <= '0;
      func_bounds <= '0;
      rec_cnt     <= '0;
      started     <= 1'b0;
    end else if (clear) begin
      st          <= IDLE;
      func_bounds <= '0;
      rec_cnt     <= '0;
      started     <= 1'b0;
      irq         <= 1'b0;
      attack      <= ATK_NONE;
    end else begin
      if (irq_clear) begin
        irq    <= 1'b0;
        attack <= ATK_NONE;
      end
      unique case (st)
        IDLE: if (take && enable) begin
          unique case (ev.kind)
            EV_START: begin
              func_bounds <= ev_bounds;
              rec_cnt     <= '0;
              started     <= 1'b1;
            end
            EV_DC, EV_IC: if (started) begin
              if (ev.kind == EV_IC && ev.br.tgt != ev.fb.entry) begin
                flag(ATK_JOP_CALL, ev.br.tgt, ev.fb.entry);
              end else if (ev.fb.entry == func_bounds.entry && rec_cnt != '1) begin
                rec_cnt <= rec_cnt + 1'b1;
              end else begin
                callee_q  <= ev_bounds;
                ret_tgt_q <= ev.br.src + 32'd4;
                st        <= PUSH_REQ;
              end
            end
            EV_R: if (started) begin
              if (rec_cnt != '0) begin
                rec_cnt <= rec_cnt - 1'b1;
              end else begin
                ret_tgt_q <= ev.br.tgt;
                st        <= POP_REQ;
              end
            end
            default: if (started) begin   // EV_IJ
              if (ev.br.tgt < func_bounds.entry || ev.br.tgt >= func_bounds.fend)
                flag(ATK_JOP_JUMP, ev.br.tgt, func_bounds.entry);
            end
          endcase
        end
        PUSH_REQ: if (ssm_req_ready) st <= PUSH_WAIT;
        PUSH_WAIT: if (ssm_done) begin
          func_bounds <= callee_q;
          rec_cnt     <= '0;
          st          <= IDLE;
        end
        POP_REQ: if (ssm_req_ready) st <= POP_WAIT;
        POP_WAIT: if (ssm_done) begin
          if (ssm_pop_empty) begin
            flag(ATK_ROP, ret_tgt_q, '0);
          end else if (ssm_pop_entry.ret != ret_tgt_q) begin
            flag(ATK_ROP, ret_tgt_q, ssm_pop_entry.ret);
          end else begin
            func_bounds <= ssm_pop_entry.bounds;
            rec_cnt     <= ssm_pop_entry.rec;
          end
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
