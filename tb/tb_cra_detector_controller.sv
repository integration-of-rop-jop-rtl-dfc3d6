// tb_cra_detector_controller: self-checking test of the detector controller.
//
// The shadow stack manager is replaced by a queue with random response
// latency.  A random event stream is generated from a reference model of the
// ROP/JOP rules kept in the testbench: mostly benign calls (direct and
// indirect, some recursive), matching returns and in-bounds indirect jumps,
// with occasional attacks (indirect call to a non-entry address, return to a
// wrong stub, return with an empty stack, jump out of the function).  After
// every event FUNC_BOUNDS, REC_CNT, the irq line and the recorded attack
// class and target are compared with the model; the interrupt is cleared
// after each detected attack.
module tb_cra_detector_controller;
  import cra_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, enable = 1;
  logic ev_valid = 0, ev_ready;
  cdc_ev_t ev = '0;
  logic ssm_req_valid, ssm_req_ready, ssm_req_push, ssm_done = 0, ssm_pop_empty = 0;
  ss_entry_t ssm_req_entry, ssm_pop_entry = '0;
  logic irq_clear = 0, irq, started;
  attack_e attack;
  addr_t attack_tgt, attack_exp;
  bounds_t func_bounds;
  rec_cnt_t rec_cnt;

  cra_detector_controller dut (.*);

  always #5 clk = ~clk;

  // ---------------- behavioural shadow stack ----------------
  ss_entry_t ss[$];
  bit ssm_busy = 0;
  assign ssm_req_ready = !ssm_busy;
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && ssm_req_valid && ssm_req_ready) begin
        automatic bit psh = ssm_req_push;
        automatic ss_entry_t e = ssm_req_entry;
        ssm_busy <= 1;
        repeat ($urandom_range(6, 1)) @(posedge clk);
        if (psh) ss.push_back(e);
        else if (ss.size() == 0) ssm_pop_empty <= 1;
        else begin ssm_pop_empty <= 0; ssm_pop_entry <= ss.pop_back(); end
        ssm_done <= 1;
        @(posedge clk);
        ssm_done <= 0; ssm_busy <= 0;
      end
    end
  end

  // ---------------- reference model ----------------
  typedef struct { addr_t ret; bounds_t b; int rec; } m_ent_t;
  bounds_t m_b;
  int      m_rec;
  m_ent_t  m_ss[$];
  int checks = 0, failures = 0;
  int n_kind[5] = '{0, 0, 0, 0, 0};
  int n_atk[4] = '{0, 0, 0, 0};
  int n_recur = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(cdc_ev_t e);
    ev <= e; ev_valid <= 1;
    do @(posedge clk); while (!ev_ready);
    ev_valid <= 0;
    @(posedge clk);
    while (!ev_ready) @(posedge clk);
    #1;
  endtask

  // apply the rules to the model; returns the expected attack class
  function automatic attack_e model_step(cdc_ev_t e, output addr_t tgt);
    attack_e a = ATK_NONE;
    tgt = e.br.tgt;
    unique case (e.kind)
      EV_START: begin m_b = '{e.fb.entry, e.fb.entry + e.fb.size}; m_rec = 0; end
      EV_DC, EV_IC: begin
        if (e.kind == EV_IC && e.br.tgt != e.fb.entry) a = ATK_JOP_CALL;
        else if (e.fb.entry == m_b.entry && m_rec < 255) begin m_rec++; n_recur++; end
        else begin
          m_ss.push_back('{e.br.src + 4, m_b, m_rec});
          m_b = '{e.fb.entry, e.fb.entry + e.fb.size}; m_rec = 0;
        end
      end
      EV_R: begin
        if (m_rec > 0) m_rec--;
        else if (m_ss.size() == 0) a = ATK_ROP;
        else begin
          m_ent_t t = m_ss.pop_back();
          if (t.ret != e.br.tgt) a = ATK_ROP;
          else begin m_b = t.b; m_rec = t.rec; end
        end
      end
      default: if (e.br.tgt < m_b.entry || e.br.tgt >= m_b.fend) a = ATK_JOP_JUMP;
    endcase
    return a;
  endfunction

  localparam addr_t A = 32'h0080_0000;

  function automatic cdc_ev_t gen(bit attack_now);
    cdc_ev_t e = '0;
    int k = $urandom_range(99);
    if (k < 35 && m_ss.size() < 200) begin            // call
      e.kind = ($urandom_range(1)) ? EV_DC : EV_IC;
      e.br.src = A + 8 * $urandom_range(1000);
      if ($urandom_range(4) == 0) e.fb = '{m_b.entry, m_b.fend - m_b.entry};   // recursion
      else e.fb = '{($urandom & 32'h000F_FFF0) + 32'h0001_0000, $urandom_range(2000, 16)};
      e.br.btype = (e.kind == EV_DC) ? BR_DC : BR_IC;
      e.br.tgt = (e.kind == EV_IC) ? (attack_now ? e.fb.entry + 8 : e.fb.entry) : '0;
    end else if (k < 70) begin                         // return
      e.kind = EV_R; e.br.btype = BR_R;
      if (m_rec > 0) e.br.tgt = A + 4;
      else if (m_ss.size() > 0) e.br.tgt = attack_now ? m_ss[m_ss.size()-1].ret + 8
                                                       : m_ss[m_ss.size()-1].ret;
      else begin e.kind = EV_IJ; e.br.btype = BR_IJ; e.br.tgt = m_b.entry; end
    end else begin                                     // indirect jump
      e.kind = EV_IJ; e.br.btype = BR_IJ;
      e.br.tgt = attack_now ? m_b.fend + 4 * $urandom_range(3)
                            : m_b.entry + ($urandom_range(m_b.fend - m_b.entry - 1) & ~32'h3);
    end
    return e;
  endfunction

  initial begin
    cdc_ev_t e;
    addr_t t;
    attack_e a;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // before START nothing is tracked
    e = '0; e.kind = EV_IJ; e.br.tgt = 32'h1234;
    send(e);
    check(!irq && !started, "events before START ignored");
    e = '0; e.kind = EV_START; e.fb = '{32'h0001_0000, 32'h400};
    a = model_step(e, t);
    send(e);
    check(started && func_bounds == '{32'h0001_0000, 32'h0001_0400}, "START sets FUNC_BOUNDS");
    for (int i = 0; i < 4000; i++) begin
      e = gen($urandom_range(24) == 0);
      a = model_step(e, t);
      n_kind[e.kind]++;
      send(e);
      check(func_bounds == m_b, "FUNC_BOUNDS");
      check(int'(rec_cnt) == m_rec, "REC_CNT");
      check(irq == (a != ATK_NONE), $sformatf("irq for event %0d (expected class %0d)", e.kind, a));
      if (a != ATK_NONE) begin
        n_atk[a]++;
        check(attack == a && attack_tgt == t, "attack class and target");
        irq_clear <= 1; @(posedge clk); irq_clear <= 0; @(posedge clk); #1;
        check(!irq, "irq cleared");
      end
    end
    check(ss.size() == m_ss.size(), $sformatf("shadow stack depth %0d vs %0d", ss.size(), m_ss.size()));
    // return with an empty stack
    while (m_ss.size() > 0 || m_rec > 0) begin
      e = '0; e.kind = EV_R;
      e.br.tgt = (m_rec > 0) ? A + 4 : m_ss[m_ss.size()-1].ret;
      a = model_step(e, t);
      send(e);
    end
    check(!irq, "unwinding is benign");
    e = '0; e.kind = EV_R; e.br.tgt = A + 12;
    a = model_step(e, t);
    send(e);
    check(a == ATK_ROP && irq && attack == ATK_ROP, "return with empty stack is ROP");
    n_atk[ATK_ROP]++;
    check(n_atk[ATK_ROP] > 0 && n_atk[ATK_JOP_CALL] > 0 && n_atk[ATK_JOP_JUMP] > 0 && n_recur > 0,
          "all attack classes and recursion seen");
    $display("events DC=%0d IC=%0d R=%0d IJ=%0d; attacks ROP=%0d JOPcall=%0d JOPjump=%0d; recursion=%0d",
             n_kind[1], n_kind[2], n_kind[3], n_kind[4], n_atk[1], n_atk[2], n_atk[3], n_recur);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
