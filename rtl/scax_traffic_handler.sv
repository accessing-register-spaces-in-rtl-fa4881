// scax_traffic_handler: the core of the SCAX. It takes each frame the Deframer
// presents on the RX bus, routes its fields to the sub-module it is meant
// for, waits for that sub-module's reply and passes the reply over the reply
// bus to the Framer.
//
// Routing, by frame type and SCA channel number:
//   link-level frame (control byte bit 0 = 1)   -> S-Reply Manager
//   information frame, channel 0x00 or 0x14     -> Controller
//   information frame, channel 0x03..0x12       -> I2C Router
//   anything else                               -> error reply built here
// An I2C channel that is not built (CH_ACTIVE bit clear) or an unknown
// channel is answered with the invalid-channel error bit; a built channel
// whose enable bit in the Controller is clear is answered with the
// channel-disabled error bit, as the SCA does. Every numbered reply has
// LEN = 4 and four data bytes (zero in an error reply).
//
// One frame is handled at a time (FSM IDLE -> WAIT_REP / WAIT_S / LOCAL ->
// SEND);
// frame_ready is high only in IDLE, so later frames wait in the Deframer and
// the e-link FIFO in front of it. Sub-modules receive a one-cycle pulse with
// the request on `req` (registered) and answer with a one-cycle pulse; the
// reply is registered here before it is offered to the Framer with
// tx_valid/tx_ready. Numbered replies get their control byte from the
// S-Reply Manager when they are sent. No timeout is kept: every sub-module
// always answers.
//
// The document gives the Traffic Handler's role (routing inbound fields,
// waiting for the active sub-module, arbitrating the reply bus) and shows an
// FSM; the states, the pulse handshakes and the error policy are this
// design's.
module scax_traffic_handler
  import scax_pkg::*;
#(
  parameter logic [N_I2C_CH-1:0] CH_ACTIVE = '1
) (
  input  logic                clk,
  input  logic                rst_n,
  // RX bus from the Deframer
  input  logic                frame_valid,
  output logic                frame_ready,
  input  rx_frame_t           frame,
  // request bus to the sub-modules
  output req_t                req,
  output logic                ctl_req_valid,
  output logic                rt_req_valid,
  input  logic                ctl_rep_valid,
  input  rep_t                ctl_rep,
  input  logic                rt_rep_valid,
  input  rep_t                rt_rep,
  input  logic [N_I2C_CH-1:0] i2c_en,
  // S-Reply Manager
  output logic                lf_valid,
  output logic [7:0]          lf_ctrl,
  input  logic                lr_valid,
  input  logic                lr_send,
  input  logic [7:0]          lr_ctrl,
  output logic                rx_i,
  output logic [2:0]          rx_ns,
  output logic                tx_i,
  input  logic [7:0]          iframe_ctrl,
  // reply bus to the Framer
  output logic                tx_valid,
  input  logic                tx_ready,
  output tx_frame_t           tx_frame,
  // one-cycle event: an error reply was generated here
  output logic                local_err
);

  typedef enum logic [2:0] {IDLE, WAIT_REP, WAIT_S, LOCAL, SEND} state_t;

  state_t    state_q;
  tx_frame_t txf_q;
  logic [7:0] off;
  logic       is_i2c, is_ctl, is_iframe;
  logic [3:0] k;

  assign frame_ready = (state_q == IDLE);
  assign is_iframe   = frame.info && !frame.ctrl[0];
  assign off         = frame.ch - CH_I2C0;
  assign k           = off[3:0];
  assign is_i2c      = (frame.ch >= CH_I2C0) && (frame.ch <= CH_I2C15);
  assign is_ctl      = (frame.ch == CH_CTRL) || (frame.ch == CH_ADC);

  assign tx_valid = (state_q == SEND);
  always_comb begin
    tx_frame = txf_q;
    if (txf_q.info) tx_frame.ctrl = iframe_ctrl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= IDLE;
      txf_q         <= '0;
      req           <= '0;
      ctl_req_valid <= 1'b0;
      rt_req_valid  <= 1'b0;
      lf_valid      <= 1'b0;
      lf_ctrl       <= '0;
      rx_i          <= 1'b0;
      rx_ns         <= '0;
      tx_i          <= 1'b0;
      local_err     <= 1'b0;
    end else begin
      ctl_req_valid <= 1'b0;
      rt_req_valid  <= 1'b0;
      lf_valid      <= 1'b0;
      rx_i          <= 1'b0;
      tx_i          <= 1'b0;
      local_err     <= 1'b0;
      unique case (state_q)
        IDLE: if (frame_valid) begin
          txf_q.addr     <= REPLY_ADDR;
          txf_q.ctrl     <= '0;
          txf_q.info     <= 1'b1;
          txf_q.rep      <= '0;
          txf_q.rep.trid <= frame.trid;
          txf_q.rep.ch   <= frame.ch;
          txf_q.rep.len  <= 8'd4;
          req <= '{trid: frame.trid, ch: frame.ch, cmd: frame.cmd, data: frame.data};
          if (!is_iframe) begin
            if (frame.ctrl[0]) begin
              lf_valid <= 1'b1;
              lf_ctrl  <= frame.ctrl;
              state_q  <= WAIT_S;
            end
            // a numbered frame without a command is dropped
          end else begin
            rx_i  <= 1'b1;
            rx_ns <= frame.ctrl[3:1];
            if (is_ctl) begin
              ctl_req_valid <= 1'b1;
              state_q       <= WAIT_REP;
            end else if (is_i2c && CH_ACTIVE[k] && i2c_en[k]) begin
              rt_req_valid <= 1'b1;
              state_q      <= WAIT_REP;
            end else begin
              if (is_i2c && CH_ACTIVE[k]) txf_q.rep.err[ERR_CH_DIS] <= 1'b1;
              else                        txf_q.rep.err[ERR_INV_CH] <= 1'b1;
              local_err <= 1'b1;
              state_q   <= LOCAL;
            end
          end
        end
        WAIT_REP: begin
          if (ctl_rep_valid) begin
            txf_q.rep <= ctl_rep;
            state_q   <= SEND;
          end else if (rt_rep_valid) begin
            txf_q.rep <= rt_rep;
            state_q   <= SEND;
          end
        end
        // one clock for the S-Reply Manager to take the new N(R)
        LOCAL: state_q <= SEND;
        WAIT_S: if (lr_valid) begin
          txf_q.info <= 1'b0;
          txf_q.ctrl <= lr_ctrl;
          state_q    <= lr_send ? SEND : IDLE;
        end
        SEND: if (tx_ready) begin
          tx_i    <= txf_q.info;
          state_q <= IDLE;
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // The reply bus carries one reply at a time.
  a_one_rep: assert property (@(posedge clk) disable iff (!rst_n) !(ctl_rep_valid && rt_rep_valid));
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              tx_valid && !tx_ready |=> tx_valid && $stable(tx_frame));

endmodule
