// tb_scax_register_file: a register file of 40 registers behind a 6-bit
// address (so that some addresses have no register) in front of a
// behavioural bank of user registers. Writes all registers in random order,
// reads them back in random order, and checks the one-hot write and read
// strobes, the broadcast write data and addr_ok.
module tb_scax_register_file;

  localparam int AW = 6, DW = 32, N = 40;

  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wr_data = '0, rd_data, ufl_wr_data;
  logic wr_en = 0, rd_en = 0, addr_ok;
  logic [N-1:0] ufl_wr_en, ufl_rd_en;
  logic [N-1:0][DW-1:0] ufl_rd_data;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  scax_register_file #(.ADDR_W(AW), .DATA_W(DW), .N_REGS(N)) dut (.*);

  // user registers load on their write strobe
  always_ff @(posedge clk)
    for (int i = 0; i < N; i++) if (ufl_wr_en[i]) ufl_rd_data[i] <= ufl_wr_data;

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
    logic [DW-1:0] model [N];
    int order [N];
    for (int i = 0; i < N; i++) begin ufl_rd_data[i] = '0; order[i] = i; end
    order.shuffle();
    #1;
    foreach (order[j]) begin
      int i;
      i = order[j];
      model[i] = $urandom;
      addr = AW'(i); wr_data = model[i]; wr_en = 1;
      #1;
      check(ufl_wr_en == (N'(1) << i) && ufl_wr_data == model[i], "write strobe one-hot on the address");
      check(ufl_rd_en == 0, "no read strobe on a write");
      @(posedge clk); #1;
      wr_en = 0;
    end
    order.shuffle();
    foreach (order[j]) begin
      int i;
      i = order[j];
      addr = AW'(i); rd_en = 1;
      #1;
      check(addr_ok && rd_data == model[i], $sformatf("read back register %0d", i));
      check(ufl_rd_en == (N'(1) << i) && ufl_wr_en == 0, "read strobe one-hot");
      @(posedge clk); #1;
      rd_en = 0;
    end
    for (int a = N; a < 2**AW; a++) begin
      addr = AW'(a); wr_en = 1; rd_en = 1;
      #1;
      check(!addr_ok && ufl_wr_en == 0 && ufl_rd_en == 0 && rd_data == 0, "address without a register");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
