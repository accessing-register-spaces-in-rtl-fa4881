// scax_deframer: collects an inbound frame from the decoded e-link byte
// stream, checks its Frame Check Sequence (FCS_CHK) and presents its fields
// to the Traffic Handler on the RX bus.
//
// Bytes arrive with rx_valid, the first one flagged by rx_sop and the last by
// rx_eop (the framing markers delivered by the e-link decoder). Each byte is
// stored and folded into a running CRC-16; at rx_eop the CRC must have reached
// the HDLC residue FCS_GOOD. A good frame of 4 bytes (link-level frame) or of
// 8 to MAX_BYTES bytes (information frame) is held on `frame` with
// frame_valid until frame_ready; while a frame is held rx_ready is low, so
// the upstream FIFO keeps the next one. A frame with a wrong FCS or a wrong
// length is dropped and reported by a one-cycle pulse on fcs_err or len_err.
// The first frame field appears one clock after the rx_eop byte.
//
// The document states only that the Deframer registers the frame and checks
// its integrity; the byte layout (see scax_pkg) and the drop-on-error policy
// are choices of this design.
module scax_deframer
  import scax_pkg::*;
#(
  parameter int unsigned MAX_BYTES = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  // decoded inbound byte stream
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  input  logic       rx_sop,
  input  logic       rx_eop,
  output logic       rx_ready,
  // RX bus
  output logic       frame_valid,
  input  logic       frame_ready,
  output rx_frame_t  frame,
  // error pulses
  output logic       fcs_err,
  output logic       len_err
);

  localparam int unsigned IW = $clog2(MAX_BYTES);

  logic [7:0]  buf_q [MAX_BYTES];
  logic [4:0]  cnt_q;        // bytes received of the current frame
  logic [4:0]  nbytes_q;     // length of the frame on display
  logic [15:0] crc_q;

  logic        take;
  logic [4:0]  idx;          // position of the incoming byte
  logic [15:0] crc_base, crc_next;
  logic [4:0]  total;
  logic        len_ok;

  assign rx_ready = !frame_valid;
  assign take     = rx_valid && rx_ready;
  assign idx      = rx_sop ? 5'd0 : cnt_q;
  assign crc_base = rx_sop ? FCS_INIT : crc_q;
  assign crc_next = fcs_update(crc_base, rx_data);
  assign total    = idx + 5'd1;
  assign len_ok   = (total == 5'd4) || (total >= 5'd8 && total <= 5'(MAX_BYTES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q       <= '0;
      nbytes_q    <= '0;
      crc_q       <= FCS_INIT;
      frame_valid <= 1'b0;
      fcs_err     <= 1'b0;
      len_err     <= 1'b0;
      for (int i = 0; i < MAX_BYTES; i++) buf_q[i] <= '0;
    end else begin
      fcs_err <= 1'b0;
      len_err <= 1'b0;
      if (frame_valid && frame_ready) frame_valid <= 1'b0;
      if (take) begin
        if (idx < 5'(MAX_BYTES)) buf_q[IW'(idx)] <= rx_data;
        if (idx != 5'd31) cnt_q <= idx + 5'd1;
        crc_q <= crc_next;
        if (rx_eop) begin
          cnt_q <= '0;
          if (!len_ok)                   len_err <= 1'b1;
          else if (crc_next != FCS_GOOD) fcs_err <= 1'b1;
          else begin
            frame_valid <= 1'b1;
            nbytes_q    <= total;
          end
        end
      end
    end
  end

  // Field view of the held frame. Data bytes missing from a short
  // information frame read as zero.
  always_comb begin
    frame      = '0;
    frame.addr = buf_q[0];
    frame.ctrl = buf_q[1];
    frame.info = (nbytes_q >= 5'd8);
    if (frame.info) begin
      frame.trid = buf_q[2];
      frame.ch   = buf_q[3];
      frame.len  = buf_q[4];
      frame.cmd  = buf_q[5];
      for (int b = 0; b < 4; b++)
        if (5'(8 + b) < nbytes_q && 6 + b < MAX_BYTES)
          frame.data[31-8*b -: 8] = buf_q[6+b];
    end
  end

  // A held frame must stay on the bus until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           frame_valid && !frame_ready |=> frame_valid && $stable(frame));

endmodule
