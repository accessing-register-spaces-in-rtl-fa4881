// scax_i2c_router: selects the I2C channel that receives a request and brings
// its reply back to the Traffic Handler.
//
// A request arrives as a one-cycle req_valid pulse; req.ch is an SCA I2C
// channel number (CH_I2C0 + k, the Traffic Handler only forwards valid ones).
// The router copies the request into ch_req, a register shared by all
// channels, and starts a strobe for channel k down a PIPE-stage shift
// register; the strobe reaches the channel as ch_req_valid[k] PIPE clocks
// later. Going the other way, a channel holds its reply on ch_rep[k] and
// pulses ch_rep_valid[k]; that strobe again passes PIPE flip-flops before the
// router samples ch_rep[k] and pulses rep_valid with the reply.
//
// Timing: single-bit strobes are pipelined and multi-bit buses are left
// stable for PIPE+1 clocks before they are sampled, so the buses between the
// router and a channel placed far away are multicycle paths (to be declared
// as such with a constraint of PIPE+1 cycles). This follows the document's
// remedy for channels placed far from the router; PIPE is this design's
// parameter and its default is a choice.
module scax_i2c_router
  import scax_pkg::*;
#(
  parameter int unsigned N_CH = 16,
  parameter int unsigned PIPE = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  // from / to the Traffic Handler
  input  logic            req_valid,
  input  req_t            req,
  output logic            rep_valid,
  output rep_t            rep,
  // to / from the channels
  output req_t            ch_req,
  output logic [N_CH-1:0] ch_req_valid,
  input  rep_t            ch_rep [N_CH],
  input  logic [N_CH-1:0] ch_rep_valid
);

  localparam int unsigned CW = (N_CH > 1) ? $clog2(N_CH) : 1;

  logic [N_CH-1:0] req_pipe [PIPE];
  logic [N_CH-1:0] rep_pipe [PIPE];
  logic [N_CH-1:0] sel;
  logic [7:0]      chan_off;
  logic [CW-1:0]   rep_idx;

  assign chan_off = req.ch - CH_I2C0;

  always_comb begin
    sel = '0;
    for (int k = 0; k < N_CH; k++) sel[k] = (chan_off == 8'(k));
  end

  always_comb begin
    rep_idx = '0;
    for (int k = 0; k < N_CH; k++)
      if (rep_pipe[PIPE-1][k]) rep_idx = CW'(k);
  end

  assign ch_req_valid = req_pipe[PIPE-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_req    <= '0;
      rep_valid <= 1'b0;
      rep       <= '0;
      for (int s = 0; s < PIPE; s++) begin
        req_pipe[s] <= '0;
        rep_pipe[s] <= '0;
      end
    end else begin
      if (req_valid) ch_req <= req;
      req_pipe[0] <= req_valid ? sel : '0;
      rep_pipe[0] <= ch_rep_valid;
      for (int s = 1; s < PIPE; s++) begin
        req_pipe[s] <= req_pipe[s-1];
        rep_pipe[s] <= rep_pipe[s-1];
      end
      rep_valid <= |rep_pipe[PIPE-1];
      if (|rep_pipe[PIPE-1]) rep <= ch_rep[rep_idx];
    end
  end

  // Only one transaction is in flight: at most one channel answers at once.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(rep_pipe[PIPE-1]));
  a_route:  assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> $onehot(sel));

endmodule
