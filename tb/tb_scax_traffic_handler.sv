// tb_scax_traffic_handler: presents random frames on the RX bus and plays the
// Controller, the I2C Router and the S-Reply Manager itself. Checks that each
// frame goes to the right sub-module with its fields, that the sub-module's
// reply reaches the Framer side with the numbered-reply control byte, that
// link-level frames are answered (or not) as the S-Reply Manager says, that
// absent, unknown and disabled channels get the right error reply, that the
// sequence-number events fire, and that no new frame is taken while one is
// being handled.
module tb_scax_traffic_handler;
  import scax_pkg::*;

  localparam logic [15:0] ACTIVE = 16'h00FF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_valid = 0, frame_ready;
  rx_frame_t frame = '0;
  req_t req;
  logic ctl_req_valid, rt_req_valid, ctl_rep_valid = 0, rt_rep_valid = 0;
  rep_t ctl_rep = '0, rt_rep = '0;
  logic [15:0] i2c_en = 16'h00F0;
  logic lf_valid, lr_valid = 0, lr_send = 0, rx_i, tx_i, tx_valid, tx_ready = 0, local_err;
  logic [7:0] lf_ctrl, lr_ctrl = 0, iframe_ctrl = 8'h5A;
  logic [2:0] rx_ns;
  tx_frame_t tx_frame;

  int checks = 0, failures = 0;
  int n_ctl = 0, n_rt = 0, n_lf = 0, n_rxi = 0, n_txi = 0;
  req_t last_req;
  logic [7:0] last_lf;
  logic [2:0] last_ns;

  scax_traffic_handler #(.CH_ACTIVE(ACTIVE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ctl_req_valid) begin n_ctl++; last_req = req; end
    if (rt_req_valid)  begin n_rt++;  last_req = req; end
    if (lf_valid)      begin n_lf++;  last_lf = lf_ctrl; end
    if (rx_i)          begin n_rxi++; last_ns = rx_ns; end
    if (tx_i)          n_txi++;
  end

  // Present a frame; return once it has been taken.
  task automatic put(input rx_frame_t f);
    frame_valid = 1; frame = f;
    while (!frame_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    frame_valid = 0;
  endtask

  // Wait for the reply on the Framer side (with a random stall) and take it.
  task automatic take(output tx_frame_t t, output bit ok);
    int c = 0;
    while (!tx_valid && c < 50) begin @(posedge clk); #1; c++; end
    ok = tx_valid;
    tx_ready = 0;
    repeat ($urandom_range(0, 3)) begin
      @(posedge clk); #1;
      if (!tx_valid) ok = 0;
      if (frame_ready) ok = 0;
    end
    t = tx_frame;
    tx_ready = 1;
    @(posedge clk); #1;
    tx_ready = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx_frame_t f;
    tx_frame_t t;
    bit ok;
    int c0, k;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int kind;
      kind = $urandom_range(0, 5);
      f = '0;
      f.trid = 8'($urandom); f.cmd = 8'($urandom); f.data = $urandom; f.len = 8'd4;
      f.info = 1; f.ctrl = {4'b0, 3'($urandom), 1'b0};
      k = $urandom_range(0, 15);
      case (kind)
        0: f.ch = ($urandom_range(0, 1) != 0) ? CH_CTRL : CH_ADC;
        1, 2: f.ch = 8'(CH_I2C0 + k);
        3: f.ch = 8'h30;
        default: begin f.info = 0; f.ctrl = 8'($urandom) | 8'h01; end
      endcase
      c0 = n_lf;
      put(f);
      repeat (2) @(posedge clk); #1;
      check(!frame_ready || (kind >= 4), "busy while a frame is handled");
      if (kind >= 4) begin
        check(n_lf == c0 + 1 && last_lf == f.ctrl, "link frame to the S-Reply Manager");
        lr_valid = 1; lr_send = $urandom_range(0, 1); lr_ctrl = 8'($urandom);
        @(posedge clk); #1;
        lr_valid = 0;
        if (lr_send) begin
          take(t, ok);
          check(ok && !t.info && t.ctrl == lr_ctrl && t.addr == 8'h00, "link reply framed");
        end else begin
          @(posedge clk); #1;
          check(!tx_valid && frame_ready, "no link reply");
        end
      end else begin
        check(last_ns == f.ctrl[3:1], "N(S) handed to the S-Reply Manager");
        if (kind == 0) begin
          check(last_req == '{f.trid, f.ch, f.cmd, f.data}, "request to the Controller");
          ctl_rep = '{trid: f.trid, ch: f.ch, err: 0, len: 4, data: ~f.data};
          ctl_rep_valid = 1; @(posedge clk); #1; ctl_rep_valid = 0;
          take(t, ok);
          check(ok && t.info && t.rep == ctl_rep && t.ctrl == iframe_ctrl, "controller reply framed");
        end else if (f.ch != 8'h30 && ACTIVE[k] && i2c_en[k]) begin
          check(last_req == '{f.trid, f.ch, f.cmd, f.data}, "request to the router");
          rt_rep = '{trid: f.trid, ch: f.ch, err: 0, len: 4, data: f.data + 1};
          rt_rep_valid = 1; @(posedge clk); #1; rt_rep_valid = 0;
          take(t, ok);
          check(ok && t.info && t.rep == rt_rep, "channel reply framed");
        end else begin
          take(t, ok);
          if (f.ch != 8'h30 && ACTIVE[k])
            check(ok && t.rep.err == 8'h20 && t.rep.trid == f.trid, "disabled channel error");
          else
            check(ok && t.rep.err == 8'h02 && t.rep.trid == f.trid, "invalid channel error");
        end
      end
    end
    repeat (2) @(posedge clk); #1;
    check(n_rxi + n_lf == 200 && n_txi == n_rxi, "one numbered reply per numbered request");
    $display("handled: controller %0d, router %0d, link %0d", n_ctl, n_rt, n_lf);
    check(n_ctl > 0 && n_rt > 0 && n_lf > 0, "all routes used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
