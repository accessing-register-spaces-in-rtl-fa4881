// tb_scax_debug_buffer: streams random frames past a 16-entry debug buffer
// with random valid/ready, then reads the buffer back and checks that it
// holds the last 16 transferred bytes with their flags, that the write
// pointer counts transfers only, that `wrapped` is set, and that nothing is
// recorded while `enable` is low.
module tb_scax_debug_buffer;

  localparam int D = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable = 1, s_valid = 0, s_ready = 0, s_sop = 0, s_eop = 0, wrapped;
  logic [7:0] s_data = 0;
  logic [3:0] rd_addr = 0, wr_ptr;
  logic [9:0] rd_data;

  int checks = 0, failures = 0;
  logic [9:0] hist [$];

  scax_debug_buffer #(.DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total = 0;
    logic [3:0] p0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 100; c++) begin
      s_valid = $urandom_range(0, 1); s_ready = $urandom_range(0, 1);
      s_data = 8'($urandom); s_sop = $urandom_range(0, 1); s_eop = $urandom_range(0, 1);
      if (s_valid && s_ready) begin hist.push_back({s_sop, s_eop, s_data}); total++; end
      @(posedge clk); #1;
    end
    s_valid = 0;
    check(wr_ptr == 4'(total), "write pointer counts transfers");
    check(wrapped == (total >= D), "wrapped flag");
    for (int i = 0; i < D; i++) begin
      rd_addr = 4'(total - D + i);
      @(posedge clk); #1;
      check(rd_data == hist[hist.size() - D + i], $sformatf("entry %0d", i));
    end
    p0 = wr_ptr;
    enable = 0; s_valid = 1; s_ready = 1;
    repeat (5) @(posedge clk); #1;
    check(wr_ptr == p0, "nothing recorded while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
