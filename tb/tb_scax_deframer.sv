// tb_scax_deframer: sends good, corrupted and badly sized frames into the
// Deframer and checks the decoded fields, the error pulses and the
// back-pressure while a frame is held. Expected values come from the frames
// the test builds; the FCS is computed by the testbench's own CRC model,
// itself checked against the standard CRC-16/X-25 check value.
module tb_scax_deframer;
  import scax_pkg::*;
  import scax_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rx_valid = 0, rx_sop = 0, rx_eop = 0, rx_ready;
  logic [7:0] rx_data = 0;
  logic frame_valid, frame_ready = 1, fcs_err, len_err;
  rx_frame_t frame;

  int checks = 0, failures = 0;
  int n_frames = 0, n_fcs = 0, n_len = 0;
  rx_frame_t got [$];

  scax_deframer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Inputs change 1 time unit after a rising edge; a byte is taken at the
  // edge where rx_ready was high.
  task automatic send(input byte_q_t q);
    bit ok;
    foreach (q[i]) begin
      rx_valid = 1; rx_data = q[i]; rx_sop = (i == 0); rx_eop = (i == q.size() - 1);
      do begin
        ok = rx_ready;
        @(posedge clk); #1;
      end while (!ok);
      rx_valid = 0;
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
    end
    rx_valid = 0; rx_sop = 0; rx_eop = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (frame_valid && frame_ready) got.push_back(frame);
    if (fcs_err) n_fcs++;
    if (len_err) n_len++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_q_t q;
    logic [7:0] trid, ch, cmd;
    logic [31:0] data;
    logic [2:0] ns;
    rx_frame_t f;
    q = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check(x25(q) == 16'h906E, "CRC model check value");
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // good information frames
    for (int n = 0; n < 50; n++) begin
      ns = 3'($urandom); trid = 8'($urandom); ch = 8'($urandom); cmd = 8'($urandom); data = $urandom;
      send(iframe(ns, trid, ch, cmd, data));
      repeat (3) @(posedge clk);
      check(got.size() == 1, "one frame out");
      if (got.size() == 1) begin
        f = got.pop_front();
        check(f.info && f.trid == trid && f.ch == ch && f.cmd == cmd && f.data == data &&
              f.len == 8'd4 && f.ctrl == {4'b0, ns, 1'b0} && f.addr == 8'h00, "fields");
      end
      got.delete();
    end
    // link-level frame
    send(lframe(8'h2F));
    repeat (3) @(posedge clk);
    check(got.size() == 1 && !got[0].info && got[0].ctrl == 8'h2F, "link frame");
    got.delete();
    // corrupted frames are dropped
    for (int n = 0; n < 20; n++) begin
      int unsigned pos, bitn;
      q = iframe(3'd1, 8'($urandom), 8'h03, 8'h41, $urandom);
      pos = $urandom_range(0, q.size() - 1);
      bitn = $urandom_range(0, 7);
      q[pos][bitn] = ~q[pos][bitn];
      send(q);
      repeat (3) @(posedge clk);
    end
    check(got.size() == 0, "corrupted frames dropped");
    check(n_fcs == 20, $sformatf("fcs_err count %0d", n_fcs));
    // wrong length (5 bytes, FCS correct) is dropped
    q = add_fcs('{8'h00, 8'h00, 8'h01});
    send(q);
    repeat (3) @(posedge clk);
    check(n_len == 1 && got.size() == 0, "length error");
    // a held frame blocks the input
    #1 frame_ready = 0;
    send(iframe(3'd2, 8'hA5, 8'h04, 8'hE6, 32'h0000_0123));
    repeat (5) @(posedge clk);
    check(frame_valid && !rx_ready, "held frame back-pressures");
    check(frame.trid == 8'hA5 && frame.data == 32'h123, "held frame stable");
    #1 frame_ready = 1;
    @(posedge clk);
    repeat (2) @(posedge clk);
    check(!frame_valid && rx_ready, "released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
