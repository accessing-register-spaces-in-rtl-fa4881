// tb_scax_controller: writes random values into the CRB, CRC and CRD enable
// registers, reads them back, checks the decoded per-channel enables against
// the SCA bit mapping, the chip-ID read, the invalid-command reply, the
// one-clock reply latency and the clearing by a link reset.
module tb_scax_controller;
  import scax_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic link_reset = 0, req_valid = 0, rep_valid;
  req_t req = '0;
  rep_t rep;
  logic [15:0] i2c_en;

  int checks = 0, failures = 0;

  scax_controller #(.CHIP_ID(24'hABCDEF)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmd(input logic [7:0] ch, input logic [7:0] c, input logic [31:0] d, output rep_t r);
    logic [7:0] t = 8'($urandom);
    req_valid = 1; req = '{trid: t, ch: ch, cmd: c, data: d};
    @(posedge clk); #1;
    req_valid = 0;
    check(rep_valid, "reply one clock after the request");
    r = rep;
    check(r.trid == t && r.ch == ch, "reply carries TRID and channel");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rep_t r;
    logic [7:0] b, c, d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      cmd(CH_CTRL, 8'h02, {24'h0, b}, r);
      cmd(CH_CTRL, 8'h04, {24'h0, c}, r);
      cmd(CH_CTRL, 8'h06, {24'h0, d}, r);
      check(r.err == 0, "write ok");
      cmd(CH_CTRL, 8'h03, 0, r); check(r.data[7:0] == b && r.err == 0, "CRB read back");
      cmd(CH_CTRL, 8'h05, 0, r); check(r.data[7:0] == c, "CRC read back");
      cmd(CH_CTRL, 8'h07, 0, r); check(r.data[7:0] == d, "CRD read back");
      for (int k = 0; k < 16; k++) begin
        bit e;
        e = (k < 5) ? b[k+3] : (k < 13) ? c[k-5] : d[k-13];
        check(i2c_en[k] == e, $sformatf("enable of channel %0d", k));
      end
    end
    cmd(CH_ADC, 8'hD1, 0, r);
    check(r.data == 32'h00ABCDEF && r.err == 0, "chip ID");
    cmd(CH_CTRL, 8'h55, 0, r);
    check(r.err[2] == 1'b1, "invalid command flagged");
    cmd(CH_CTRL, 8'h02, 32'hFF, r);
    link_reset = 1; @(posedge clk); #1; link_reset = 0;
    check(i2c_en == 0, "link reset clears the enables");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
