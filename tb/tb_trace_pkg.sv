// tb_trace_pkg: reference encoder for the trace byte stream used in tests.
//
// Builds the byte sequences the trace decoder expects: branch address packets
// that send only as many address bytes as needed relative to the previous
// branch address (byte 0: addr[7:2]; then addr[14:8], addr[21:15],
// addr[28:22], addr[31:29]; bit 7 = more bytes), atom bytes 8'b1000_00E0 and
// padding 8'h00.  Written independently of the decoder from the format
// description.
package tb_trace_pkg;

  typedef logic [7:0] byte_q_t[$];

  // Bytes of a branch address packet for `addr`, compressed against `last`.
  function automatic byte_q_t enc_branch(logic [31:0] addr, logic [31:0] last, bit full = 0);
    byte_q_t q;
    int n;            // number of bytes
    logic [31:0] d = addr ^ last;
    if (full || d[31:29] != 0) n = 5;
    else if (d[28:22] != 0)    n = 4;
    else if (d[21:15] != 0)    n = 3;
    else if (d[14:8]  != 0)    n = 2;
    else                       n = 1;
    q.push_back({(n > 1), addr[7:2], 1'b1});
    if (n > 1) q.push_back({(n > 2), addr[14:8]});
    if (n > 2) q.push_back({(n > 3), addr[21:15]});
    if (n > 3) q.push_back({(n > 4), addr[28:22]});
    if (n > 4) q.push_back({5'b00000, addr[31:29]});
    return q;
  endfunction

  function automatic logic [7:0] enc_atom(bit taken);
    return {6'b100000, taken, 1'b0};
  endfunction

endpackage
