// tb_scax_sreply_manager: sends CONNECT, RESET, TEST, RR and unknown control
// bytes, and numbered-frame events, and checks the reply control bytes, the
// poll/final bit, the link reset pulse and the N(S)/N(R) bookkeeping that
// goes into the control byte of numbered replies.
module tb_scax_sreply_manager;
  import scax_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lf_valid = 0, lr_valid, lr_send, rx_i = 0, tx_i = 0, link_reset;
  logic [7:0] lf_ctrl = 0, lr_ctrl, iframe_ctrl;
  logic [2:0] rx_ns = 0;

  int checks = 0, failures = 0;

  scax_sreply_manager dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lf(input logic [7:0] c, output bit send, output logic [7:0] rc, output bit lr);
    lf_valid = 1; lf_ctrl = c;
    @(posedge clk); #1;
    lf_valid = 0;
    check(lr_valid, "answer one clock later");
    send = lr_send; rc = lr_ctrl; lr = link_reset;
  endtask

  task automatic rxi(input logic [2:0] s);
    rx_i = 1; rx_ns = s; @(posedge clk); #1; rx_i = 0;
  endtask
  task automatic txi();
    tx_i = 1; @(posedge clk); #1; tx_i = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit s, lr;
    logic [7:0] rc;
    logic [2:0] ns, nr;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    lf(8'h2F, s, rc, lr); check(s && rc == 8'h63 && lr, "CONNECT -> UA, link reset");
    lf(8'h3F, s, rc, lr); check(s && rc == 8'h73, "CONNECT with poll -> UA with final");
    lf(8'h8F, s, rc, lr); check(s && rc == 8'h63 && lr, "RESET -> UA");
    lf(8'hE3, s, rc, lr); check(s && rc == 8'hE3 && !lr, "TEST echoed");
    lf(8'h0F, s, rc, lr); check(!s, "unknown frame not answered");
    // numbered traffic
    ns = 0; nr = 0;
    for (int n = 0; n < 40; n++) begin
      logic [2:0] rs;
      rs = 3'($urandom);
      rxi(rs); nr = rs + 1;
      check(iframe_ctrl == {nr, 1'b0, ns, 1'b0}, "N(R) follows the received N(S)");
      txi(); ns = ns + 1;
      check(iframe_ctrl == {nr, 1'b0, ns, 1'b0}, "N(S) advances per reply");
    end
    lf(8'h11, s, rc, lr); check(s && rc == {nr, 1'b1, 4'b0001}, "RR carries N(R)");
    lf(8'h2F, s, rc, lr);
    @(posedge clk); #1;
    check(iframe_ctrl == 8'h00, "CONNECT clears the sequence numbers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
