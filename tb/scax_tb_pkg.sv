// scax_tb_pkg: helpers shared by the SCAX testbenches: an independent model
// of the HDLC frame check sequence (CRC-16/X-25 written in its textbook
// MSB-first form with reflected input and output) and the builders of
// request frames as byte queues.
package scax_tb_pkg;

  typedef logic [7:0] byte_q_t [$];

  function automatic logic [7:0] rev8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) rev8[i] = b[7-i];
  endfunction

  function automatic logic [15:0] rev16(input logic [15:0] b);
    for (int i = 0; i < 16; i++) rev16[i] = b[15-i];
  endfunction

  // FCS value to transmit for the bytes in q (already complemented).
  function automatic logic [15:0] x25(input byte_q_t q);
    logic [15:0] c = 16'hFFFF;
    foreach (q[n]) begin
      c ^= {rev8(q[n]), 8'h00};
      for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return rev16(c) ^ 16'hFFFF;
  endfunction

  // Append the FCS, low byte first.
  function automatic byte_q_t add_fcs(input byte_q_t q);
    logic [15:0] f = x25(q);
    byte_q_t r = q;
    r.push_back(f[7:0]);
    r.push_back(f[15:8]);
    return r;
  endfunction

  // Information frame: ADDR CTRL TRID CH LEN CMD D3 D2 D1 D0 FCS.
  function automatic byte_q_t iframe(input logic [2:0] ns, input logic [7:0] trid,
                                     input logic [7:0] ch, input logic [7:0] cmd,
                                     input logic [31:0] data);
    byte_q_t q = '{8'h00, {3'd0, 1'b0, ns, 1'b0}, trid, ch, 8'd4, cmd,
                   data[31:24], data[23:16], data[15:8], data[7:0]};
    return add_fcs(q);
  endfunction

  // Link-level frame: ADDR CTRL FCS.
  function automatic byte_q_t lframe(input logic [7:0] ctrl);
    byte_q_t q = '{8'h00, ctrl};
    return add_fcs(q);
  endfunction

endpackage
