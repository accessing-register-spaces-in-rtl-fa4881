// tb_scax_mem_ctrl: a behavioural block RAM (one-clock read) behind the SCAX
// Memory Controller. Loads the pointer, writes a burst of words through the
// DATA slot, reloads the pointer and reads the burst back through the DATA
// slot, checking the RAM contents, the data read and the auto-increment and
// wrap of the pointer, with strobes spaced as a register-file channel spaces
// them.
module tb_scax_mem_ctrl;

  localparam int AW = 6, DW = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DW-1:0] wr_data = '0, addr_rd_data, data_rd_data, ram_wdata, ram_rdata;
  logic addr_wr_en = 0, data_wr_en = 0, data_rd_en = 0, ram_we;
  logic [AW-1:0] ram_addr;
  logic [DW-1:0] ram [2**AW];

  int checks = 0, failures = 0;

  scax_mem_ctrl #(.RAM_AW(AW), .DATA_W(DW)) dut (.*);

  always_ff @(posedge clk) begin
    if (ram_we) ram[ram_addr] <= ram_wdata;
    ram_rdata <= ram[ram_addr];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic strobe(ref logic s, input logic [DW-1:0] d);
    wr_data = d; s = 1; @(posedge clk); #1; s = 0;
    repeat (4) @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] model [2**AW];
    int base, len;
    for (int i = 0; i < 2**AW; i++) begin ram[i] = '0; model[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      base = $urandom_range(0, 2**AW - 1); len = $urandom_range(1, 20);
      strobe(addr_wr_en, DW'(base));
      check(addr_rd_data == DW'(base), "pointer loaded");
      for (int i = 0; i < len; i++) begin
        int a;
        a = (base + i) % (2**AW);
        model[a] = $urandom;
        strobe(data_wr_en, model[a]);
        check(ram[a] == model[a], "word written at the pointer");
        check(addr_rd_data == DW'((a + 1) % (2**AW)), "pointer advanced after a write");
      end
      strobe(addr_wr_en, DW'(base));
      for (int i = 0; i < len; i++) begin
        int a;
        a = (base + i) % (2**AW);
        check(data_rd_data == model[a], $sformatf("word %0d read back", a));
        strobe(data_rd_en, '0);
        check(addr_rd_data == DW'((a + 1) % (2**AW)), "pointer advanced after a read");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
