// tb_scax_framer: hands random information and link-level replies to the
// Framer while the byte sink stalls at random, and checks every emitted byte,
// the start/end flags, the frame length, the FCS (from the testbench's own
// CRC model) and that the first byte appears one clock after acceptance.
module tb_scax_framer;
  import scax_pkg::*;
  import scax_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, tx_valid, tx_ready = 1, tx_sop, tx_eop;
  tx_frame_t in_frame = '0;
  logic [7:0] tx_data;

  int checks = 0, failures = 0;
  byte_q_t rx;

  scax_framer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // byte sink with random stalls
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      if (tx_sop) begin
        if (rx.size() != 0) begin failures++; $display("FAIL: sop inside a frame"); end
        rx.delete();
      end
      rx.push_back(tx_data);
    end
  end
  always @(posedge clk) begin #1; tx_ready = ($urandom_range(0, 3) != 0); end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx_frame_t f;
    byte_q_t exp;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      f = '0;
      f.addr = 8'($urandom); f.ctrl = 8'($urandom); f.info = (n % 3 != 0);
      f.rep = '{trid: 8'($urandom), ch: 8'($urandom), err: 8'($urandom), len: 8'($urandom), data: $urandom};
      if (f.info) exp = '{f.addr, f.ctrl, f.rep.trid, f.rep.ch, f.rep.err, f.rep.len,
                         f.rep.data[31:24], f.rep.data[23:16], f.rep.data[15:8], f.rep.data[7:0]};
      else        exp = '{f.addr, f.ctrl};
      exp = add_fcs(exp);
      while (!in_ready) begin @(posedge clk); #1; end
      in_valid = 1; in_frame = f;
      @(posedge clk); #1;
      in_valid = 0; in_frame = '0;
      check(tx_valid && tx_sop, "first byte one clock after acceptance");
      // wait for the last byte
      do @(posedge clk); while (!(tx_valid && tx_ready && tx_eop));
      #1;
      check(rx.size() == exp.size(), $sformatf("length %0d vs %0d", rx.size(), exp.size()));
      check(rx == exp, "bytes and FCS");
      rx.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
