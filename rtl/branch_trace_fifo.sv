// branch_trace_fifo: asynchronous FIFO between the trace port and the monitor.
//
// The host core and its trace port run faster than the monitor, so trace
// bytes arriving on the trace clock are written here and read out on the
// monitor clock by the trace decoder.  The document gives the purpose and a
// depth of 32 entries; the structure is the usual one and is this design's
// choice: a register array written on the write clock, binary+Gray pointers
// with one extra wrap bit, and two-flop synchronizers carrying each Gray
// pointer into the other domain.
//
// Write side (wr_clk): wr_en/wr_data.  A byte that arrives while the FIFO is
// full is dropped and sets the sticky wr_overflow flag (the trace port cannot
// be stalled); the flag is also synchronized to the read domain as
// rd_overflow.  Read side (rd_clk): first-word-fall-through, rd_data is the
// oldest byte while rd_empty is low, rd_en pops it.  Full and empty are
// conservative: a pointer change is seen by the other side two or three
// clocks later.
module branch_trace_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 32     // power of two
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  output logic             wr_overflow,

  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty,
  output logic             rd_overflow
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain
  logic        ovf_r1, ovf_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  wire [AW:0] wbin_nxt  = wbin + 1'b1;
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin        <= '0;
      wgray       <= '0;
      rgray_w1    <= '0;
      rgray_w2    <= '0;
      wr_overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin_nxt;
        wgray <= bin2gray(wbin_nxt);
      end
      if (wr_en && wr_full) wr_overflow <= 1'b1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // ---------------- read domain ----------------
  wire [AW:0] rbin_nxt = rbin + 1'b1;
  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      ovf_r1   <= 1'b0;
      ovf_r2   <= 1'b0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      ovf_r1   <= wr_overflow;
      ovf_r2   <= ovf_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin_nxt;
        rgray <= bin2gray(rbin_nxt);
      end
    end
  end

  assign rd_overflow = ovf_r2;

  initial begin
    assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("branch_trace_fifo: DEPTH must be a power of two >= 4");
  end

endmodule
