// scax_sreply_manager: auxiliary module that handles the link-level side of
// the SCA protocol: it answers the frames that carry no command (HDLC
// unnumbered and supervisory frames) and keeps the HDLC sequence numbers
// used in the control byte of every numbered reply.
//
// A link-level frame is passed in by a one-cycle lf_valid pulse with its
// control byte. One clock later lr_valid pulses; lr_send says whether a
// reply is due and lr_ctrl holds its control byte:
//   CONNECT (0x2F) or RESET (0x8F) -> UA (0x63), sequence numbers cleared and
//                                     a one-cycle link_reset pulse issued;
//   TEST (0xE3)                    -> TEST echoed;
//   RR (receive ready, 0x01)       -> RR carrying the current N(R);
//   anything else                  -> no reply.
// The poll bit (bit 4) of the request is returned as the final bit.
// For numbered (information) frames, rx_i pulses with the frame's N(S) and
// sets N(R) to N(S)+1; tx_i pulses when a numbered reply is sent and
// advances N(S). iframe_ctrl is the control byte for the next numbered
// reply: {N(R), 0, N(S), 0}.
//
// The document only names the S-Reply Manager; its behaviour here follows
// the HDLC link protocol the SCA uses.
module scax_sreply_manager
  import scax_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // link-level frame in
  input  logic       lf_valid,
  input  logic [7:0] lf_ctrl,
  // its reply
  output logic       lr_valid,
  output logic       lr_send,
  output logic [7:0] lr_ctrl,
  // sequence numbers
  input  logic       rx_i,
  input  logic [2:0] rx_ns,
  input  logic       tx_i,
  output logic [7:0] iframe_ctrl,
  output logic       link_reset
);

  logic [2:0] ns_q, nr_q;
  logic [7:0] code;
  logic       pbit;

  assign code        = lf_ctrl & 8'hEF;
  assign pbit        = lf_ctrl[4];
  assign iframe_ctrl = {nr_q, 1'b0, ns_q, 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ns_q       <= '0;
      nr_q       <= '0;
      lr_valid   <= 1'b0;
      lr_send    <= 1'b0;
      lr_ctrl    <= '0;
      link_reset <= 1'b0;
    end else begin
      lr_valid   <= 1'b0;
      link_reset <= 1'b0;
      if (rx_i) nr_q <= rx_ns + 3'd1;
      if (tx_i) ns_q <= ns_q + 3'd1;
      if (lf_valid) begin
        lr_valid <= 1'b1;
        lr_send  <= 1'b0;
        if (code == U_CONNECT || code == U_RESET) begin
          lr_send    <= 1'b1;
          lr_ctrl    <= U_UA | {3'b0, pbit, 4'b0};
          ns_q       <= '0;
          nr_q       <= '0;
          link_reset <= 1'b1;
        end else if (code == U_TEST) begin
          lr_send <= 1'b1;
          lr_ctrl <= U_TEST | {3'b0, pbit, 4'b0};
        end else if (code[3:0] == S_RR[3:0]) begin
          lr_send <= 1'b1;
          lr_ctrl <= {nr_q, pbit, S_RR[3:0]};
        end
      end
    end
  end

  // Link-level frames and numbered frames are never handled together.
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(lf_valid && rx_i));

endmodule
