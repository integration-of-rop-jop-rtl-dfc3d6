// tb_branch_trace_fifo: self-checking test of the asynchronous trace FIFO.
//
// The write clock runs five times faster than the read clock (the 5:1 trace
// to monitor ratio).  Phase 1: random bytes are offered and counted as sent
// only at an edge where the FIFO is not full, and the reader pops at random;
// every byte must come out once, in order.  Phase 2: with the reader
// stopped, more than DEPTH bytes are written; exactly DEPTH must be kept, the
// overflow flag must rise in both domains and the kept bytes must be the
// first DEPTH written.
module tb_branch_trace_fifo;
  localparam int DEPTH = 32;

  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = '0, rd_data;
  logic wr_full, wr_overflow, rd_empty, rd_overflow;
  int checks = 0, failures = 0;
  logic [7:0] model[$];
  bit reader_on = 1;
  int received = 0;

  branch_trace_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #2  wr_clk = ~wr_clk;    // period 4
  always #10 rd_clk = ~rd_clk;    // period 20: 5:1

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reader
  always @(posedge rd_clk) begin
    if (rd_rst_n && rd_en && !rd_empty) begin
      check(model.size() > 0 && rd_data == model[0], "read data in order");
      if (model.size() > 0) void'(model.pop_front());
      received++;
    end
    rd_en <= reader_on && ($urandom_range(3) != 0);
  end

  initial begin
    int sent;
    sent = 0;
    repeat (4) @(posedge rd_clk);
    wr_rst_n <= 1; rd_rst_n <= 1;
    repeat (2) @(posedge rd_clk);
    // phase 1: every offered byte is either taken or re-offered
    while (sent < 2000) begin
      @(posedge wr_clk);
      // a byte is taken at an edge where wr_en is high and the FIFO not full
      if (wr_en && !wr_full) begin
        model.push_back(wr_data);
        sent++;
      end
      wr_en   <= ($urandom_range(9) < 3);
      wr_data <= 8'($urandom);
    end
    @(posedge wr_clk); wr_en <= 0;
    wait (model.size() == 0);
    repeat (10) @(posedge rd_clk);
    check(received == 2000, "all bytes received");
    
    check(rd_empty, "empty at end of phase 1");

    // phase 2: overflow with the reader stopped
    reader_on = 0;
    repeat (3) @(posedge rd_clk);
    for (int i = 0; i < DEPTH + 10; i++) begin
      @(posedge wr_clk);
      wr_en   <= 1;
      wr_data <= 8'(i + 1);
      if (i < DEPTH) model.push_back(8'(i + 1));
    end
    @(posedge wr_clk); wr_en <= 0;
    #1;
    check(wr_full, "full after overflow burst");
    check(wr_overflow, "overflow flagged in write domain");
    repeat (4) @(posedge rd_clk);
    check(rd_overflow, "overflow seen in read domain");
    received = 0;
    reader_on = 1;
    wait (model.size() == 0);
    repeat (10) @(posedge rd_clk);
    check(received == DEPTH, "exactly DEPTH bytes kept");
    check(rd_empty, "empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge rd_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
