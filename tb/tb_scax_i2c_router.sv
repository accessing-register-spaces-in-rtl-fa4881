// tb_scax_i2c_router: sends requests to random I2C channels; behavioural
// channels answer after a random delay with a reply derived from the request
// and their own index. Checks that only the addressed channel is strobed,
// exactly PIPE clocks after the request, that the shared request bus holds
// the request, and that the reply comes back PIPE+1 clocks after the
// channel's strobe with that channel's reply.
module tb_scax_i2c_router;
  import scax_pkg::*;

  localparam int N_CH = 16;
  localparam int PIPE = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, rep_valid;
  req_t req = '0, ch_req;
  rep_t rep;
  logic [N_CH-1:0] ch_req_valid, ch_rep_valid = '0;
  rep_t ch_rep [N_CH];

  int checks = 0, failures = 0;

  scax_i2c_router dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial for (int k = 0; k < N_CH; k++) ch_rep[k] = '0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_t r;
    int k, t;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      k = $urandom_range(0, N_CH - 1);
      r = '{trid: 8'($urandom), ch: 8'(CH_I2C0 + k), cmd: 8'($urandom), data: $urandom};
      req_valid = 1; req = r;
      @(posedge clk); #1;
      req_valid = 0; req = '0;
      t = 1;
      while (ch_req_valid == 0 && t < 20) begin @(posedge clk); #1; t++; end
      check(t == PIPE, $sformatf("request strobe after %0d clocks", t));
      check(ch_req_valid == (N_CH'(1) << k), "only the addressed channel strobed");
      check(ch_req == r, "request bus holds the request");
      // the channel answers after a random delay
      repeat ($urandom_range(0, 5)) begin @(posedge clk); #1; end
      ch_rep[k] = '{trid: r.trid, ch: r.ch, err: 8'(k), len: 8'd4, data: r.data ^ 32'(k)};
      ch_rep_valid[k] = 1;
      @(posedge clk); #1;
      ch_rep_valid[k] = 0;
      t = 1;
      while (!rep_valid && t < 20) begin @(posedge clk); #1; t++; end
      check(t == PIPE + 1, $sformatf("reply after %0d clocks", t));
      check(rep.trid == r.trid && rep.err == 8'(k) && rep.data == (r.data ^ 32'(k)), "reply of that channel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
