// tb_shadow_stack_manager: self-checking test of the shadow stack manager.
//
// Pushes and pops are issued with a random bias that drives the stack up to
// about 60 entries deep and back, so the on-chip stack spills to and refills
// from the CRA region (behavioural memory) many times.  A queue models the
// whole logical stack; every pop must return the model's top entry, and a pop
// of an empty stack must report pop_empty.  Checks that each spilled block,
// once its background write-back is done, sits at cra_base + (block*8 + i)*16
// in the documented word order, that refills come from VICTIM_ENTRY without
// bus reads when possible and from memory otherwise, that an on-chip push or
// pop completes in 2 clocks and a spilling push in 3 when no write-back is
// still running.
module tb_shadow_stack_manager;
  import cra_pkg::*;
  import axi_pkg::axi_req_t, axi_pkg::axi_resp_t;

  localparam addr_t BASE = 32'h3F00_0000;

  logic clk = 0, rst_n = 0, clear = 0;
  logic req_valid = 0, req_ready, req_push = 0, done, pop_empty;
  ss_entry_t req_entry = '0, pop_entry;
  axi_req_t  axi_req;
  axi_resp_t axi_resp;
  logic region_full, bus_err, victim_valid;
  logic [4:0] onchip_count;
  logic [15:0] spilled_blocks;
  int n_writes, n_reads;
  int checks = 0, failures = 0;
  int n_spill = 0, n_fill_victim = 0, n_fill_mem = 0, n_empty = 0;
  ss_entry_t model[$];
  // spilled blocks whose background write-back is still to be checked
  typedef struct { int target; int blk; ss_entry_t e [8]; } pend_t;
  pend_t pend[$];
  int wb_target = 0;
  int n_wb_checked = 0;

  shadow_stack_manager #(.DEPTH(16), .BLOCK(8), .REGION_BLOCKS(512)) dut (
    .clk, .rst_n, .clear, .cra_base(BASE),
    .req_valid, .req_ready, .req_push, .req_entry, .done, .pop_entry, .pop_empty,
    .axi_req, .axi_resp, .region_full, .bus_err, .onchip_count, .spilled_blocks, .victim_valid
  );
  axi_mem_model #(.MAX_WAIT(2)) mem (.clk, .rst_n, .req(axi_req), .resp(axi_resp), .n_writes, .n_reads);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ss_entry_t rnd();
    ss_entry_t e;
    e.ret = $urandom & 32'hFFFF_FFFC; e.bounds.entry = $urandom; e.bounds.fend = $urandom;
    e.rec = 8'($urandom);
    return e;
  endfunction

  // issue one request, return the clocks from handshake to done
  // check each spilled block in memory once its 32 writes have been made
  always @(posedge clk) begin
    if (pend.size() > 0 && n_writes >= pend[0].target) begin
      automatic pend_t pe = pend.pop_front();
      check(n_writes == pe.target, "one write-back at a time");
      for (int i = 0; i < 8; i++) begin
        automatic addr_t a = BASE + (pe.blk * 8 + i) * 16;
        check(mem.peek(a) == pe.e[i].ret && mem.peek(a + 4) == pe.e[i].bounds.entry &&
              mem.peek(a + 8) == pe.e[i].bounds.fend && mem.peek(a + 12) == 32'(pe.e[i].rec),
              "spilled entry layout");
      end
      n_wb_checked++;
    end
  end

  task automatic request(bit psh, ss_entry_t e, output int lat);
    req_valid <= 1; req_push <= psh; req_entry <= e;
    do @(posedge clk); while (!req_ready);
    req_valid <= 0;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!done);
  endtask

  initial begin
    int lat, wr0, rd0, sp0, target;
    bit vv;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // pop of an empty stack
    request(0, '0, lat);
    check(pop_empty, "empty pop reported");
    target = 60;
    for (int t = 0; t < 3000; t++) begin
      automatic bit psh;
      if (model.size() >= target) target = $urandom_range(10, 0);
      else if (model.size() <= target && $urandom_range(20) == 0) target = $urandom_range(60, 20);
      psh = (model.size() < target) ? ($urandom_range(9) < 8) : ($urandom_range(9) < 2);
      wr0 = n_writes; rd0 = n_reads; sp0 = spilled_blocks; vv = victim_valid;
      if (psh) begin
        automatic ss_entry_t e = rnd();
        automatic bit was_full = (onchip_count == 16);
        request(1, e, lat);
        model.push_back(e);
        if (was_full) begin
          automatic pend_t pe;
          n_spill++;
          check(spilled_blocks == sp0 + 1, "spilled block count");
          // no write-back outstanding: the push completes in 3 clocks
          if (wr0 == wb_target) check(lat == 3, "spilling push latency");
          else                  check(lat >= 3, "spilling push waits for the write-back");
          // the evicted block holds model entries [size-17 .. size-10]
          wb_target += 32;
          pe.target = wb_target;
          pe.blk    = sp0;
          for (int i = 0; i < 8; i++) pe.e[i] = model[model.size() - 17 - (onchip_count - 9) + i];
          pend.push_back(pe);
        end else begin
          check(lat == 2, "on-chip push latency");
        end
      end else begin
        automatic bit was_empty = (onchip_count == 0);
        request(0, '0, lat);
        if (model.size() == 0) begin
          check(pop_empty, "empty pop reported");
          n_empty++;
        end else begin
          automatic ss_entry_t m = model.pop_back();
          check(!pop_empty && pop_entry == m, "popped entry");
          if (was_empty) begin
            check(spilled_blocks == sp0 - 1, "refill consumed a block");
            if (vv) begin
              n_fill_victim++;
              check(n_reads == rd0, "refill from VICTIM_ENTRY needs no bus read");
            end else begin
              n_fill_mem++;
              check(n_reads - rd0 == 32, "refill from memory reads 32 words");
            end
          end else begin
            check(lat == 2, "on-chip pop latency");
          end
        end
      end
    end
    repeat (400) @(posedge clk);
    check(pend.size() == 0 && n_wb_checked == n_spill, "every spilled block written back");
    check(!bus_err && !region_full, "no error flags");
    check(n_spill > 5 && n_fill_victim > 2 && n_fill_mem > 2 && n_empty > 0,
          $sformatf("mechanisms: spill=%0d victim=%0d mem=%0d empty=%0d",
                    n_spill, n_fill_victim, n_fill_mem, n_empty));
    $display("spill=%0d refill_victim=%0d refill_mem=%0d empty=%0d",
             n_spill, n_fill_victim, n_fill_mem, n_empty);
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
