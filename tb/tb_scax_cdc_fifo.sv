// tb_scax_cdc_fifo: pushes a random sequence through the dual-clock FIFO
// with unrelated write (10 ns) and read (7 ns) clocks and random push/pop
// activity, and checks that every word comes out once, in order, that full
// and empty are honoured, and that the FIFO fills to DEPTH when not read.
module tb_scax_cdc_fifo;

  localparam int W = 16, D = 4, N = 500;

  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  always #5 wr_clk = ~wr_clk;
  always #3.5 rd_clk = ~rd_clk;

  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;

  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  int nrecv = 0;
  bit reading = 0;

  scax_cdc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  always @(posedge rd_clk) if (rd_rst_n) begin
    if (rd_en && !empty) begin
      check(sent.size() > 0 && rd_data == sent[0], "word order");
      if (sent.size() > 0) void'(sent.pop_front());
      nrecv++;
    end
    #1 rd_en = reading && ($urandom_range(0, 2) != 0);
  end

  initial begin
    int pushed = 0, cnt = 0;
    repeat (3) @(posedge wr_clk);
    #1 wr_rst_n = 1; rd_rst_n = 1;
    // fill without reading
    while (!full && cnt < 10) begin
      wr_en = 1; wr_data = W'($urandom);
      @(posedge wr_clk); sent.push_back(wr_data); pushed++; cnt++; #1;
    end
    wr_en = 0;
    check(cnt == D, $sformatf("full after %0d words", cnt));
    reading = 1;
    while (pushed < N) begin
      wr_en = ($urandom_range(0, 1) == 1); wr_data = W'($urandom);
      @(posedge wr_clk);
      if (wr_en && !full) begin sent.push_back(wr_data); pushed++; end
      #1;
    end
    wr_en = 0;
    repeat (40) @(posedge wr_clk);
    check(nrecv == N, $sformatf("received %0d of %0d", nrecv, N));
    check(empty, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
