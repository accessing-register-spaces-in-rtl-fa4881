// scax_framer: turns a reply taken from the reply bus into the outbound byte
// stream towards the e-link encoder, appending the Frame Check Sequence
// (FCS_GEN).
//
// A tx_frame_t is accepted with in_valid/in_ready and copied into a register,
// so the reply bus is free again at once. The frame is then sent one byte per
// accepted cycle (tx_valid/tx_ready), tx_sop on the first byte and tx_eop on
// the last: 12 bytes for an information frame (ADDR CTRL TRID CH ERR LEN and
// four data bytes, most significant first), 2 for a link-level frame, then
// the two FCS bytes in either case. The FCS is the complemented HDLC CRC-16
// of all preceding bytes, low byte first. The first byte is offered the
// cycle after in_valid is accepted.
//
// The document only names the Framer and its FCS generator; the byte layout
// is the SCA reply format (see scax_pkg).
module scax_framer
  import scax_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // reply bus
  input  logic       in_valid,
  output logic       in_ready,
  input  tx_frame_t  in_frame,
  // outbound byte stream
  output logic       tx_valid,
  input  logic       tx_ready,
  output logic [7:0] tx_data,
  output logic       tx_sop,
  output logic       tx_eop
);

  tx_frame_t   f_q;
  logic        busy_q;
  logic [3:0]  idx_q;
  logic [15:0] crc_q;
  logic [3:0]  last_idx;   // index of the final (high FCS) byte
  logic [7:0]  body_byte;
  logic [15:0] fcs;

  assign last_idx = f_q.info ? 4'd11 : 4'd3;
  assign fcs      = ~crc_q;
  assign in_ready = !busy_q;
  assign tx_valid = busy_q;
  assign tx_sop   = busy_q && (idx_q == 4'd0);
  assign tx_eop   = busy_q && (idx_q == last_idx);

  always_comb begin
    unique case (idx_q)
      4'd0:    body_byte = f_q.addr;
      4'd1:    body_byte = f_q.ctrl;
      4'd2:    body_byte = f_q.rep.trid;
      4'd3:    body_byte = f_q.rep.ch;
      4'd4:    body_byte = f_q.rep.err;
      4'd5:    body_byte = f_q.rep.len;
      4'd6:    body_byte = f_q.rep.data[31:24];
      4'd7:    body_byte = f_q.rep.data[23:16];
      4'd8:    body_byte = f_q.rep.data[15:8];
      default: body_byte = f_q.rep.data[7:0];
    endcase
    if (idx_q == last_idx - 4'd1) tx_data = fcs[7:0];
    else if (idx_q == last_idx)   tx_data = fcs[15:8];
    else                          tx_data = body_byte;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q    <= '0;
      busy_q <= 1'b0;
      idx_q  <= '0;
      crc_q  <= FCS_INIT;
    end else if (!busy_q) begin
      if (in_valid) begin
        f_q    <= in_frame;
        busy_q <= 1'b1;
        idx_q  <= '0;
        crc_q  <= FCS_INIT;
      end
    end else if (tx_ready) begin
      if (idx_q < last_idx - 4'd1) crc_q <= fcs_update(crc_q, tx_data);
      if (idx_q == last_idx) busy_q <= 1'b0;
      else                   idx_q  <= idx_q + 4'd1;
    end
  end

  // The byte on offer may not change until it is taken.
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
