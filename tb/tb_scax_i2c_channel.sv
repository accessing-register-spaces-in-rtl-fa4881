// tb_scax_i2c_channel: two I2C channels, one on the core clock and one in CDC
// mode with its register side on an unrelated 7 ns clock, each in front of
// a behavioural bank of 40 user registers behind a 6-bit address. Both get
// the same commands: control and status register access, write-data and
// read-data registers, M_10B_W / M_10B_R to every register in random order,
// addresses without a register (NOACK) and an invalid command. Checks every
// reply, the register contents, that the address was held MCP clocks before
// each strobe, and the reply latency of the core-clock channel (1 clock for
// register commands, MCP+3 for register-file accesses; the address is
// stable for MCP+1 clocks up to the edge that takes a strobe).
module tb_scax_i2c_channel;
  import scax_pkg::*;

  localparam int AW = 6, N = 40, MCP = 4;

  logic clk = 0, uclk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always #3.5 uclk = ~uclk;

  logic req_valid = 0;
  req_t req = '0;
  logic [1:0] rep_valid;
  rep_t rep [2];
  logic [1:0][AW-1:0] rf_addr;
  logic [1:0][DW-1:0] rf_wdata, rf_rdata;
  logic [1:0] rf_wr_en, rf_rd_en, rf_addr_ok;
  logic [DW-1:0] regs [2][N];
  int held [2];

  int checks = 0, failures = 0;

  scax_i2c_channel #(.ADDR_W(AW), .MCP(MCP), .CDC_MODE(1'b0)) u_sync (
    .clk, .rst_n, .req_valid, .req, .rep_valid(rep_valid[0]), .rep(rep[0]),
    .ufl_clk(1'b0), .ufl_rst_n(1'b0),
    .rf_addr(rf_addr[0]), .rf_wdata(rf_wdata[0]), .rf_wr_en(rf_wr_en[0]), .rf_rd_en(rf_rd_en[0]),
    .rf_rdata(rf_rdata[0]), .rf_addr_ok(rf_addr_ok[0]));

  scax_i2c_channel #(.ADDR_W(AW), .MCP(MCP), .CDC_MODE(1'b1)) u_cdc (
    .clk, .rst_n, .req_valid, .req, .rep_valid(rep_valid[1]), .rep(rep[1]),
    .ufl_clk(uclk), .ufl_rst_n(rst_n),
    .rf_addr(rf_addr[1]), .rf_wdata(rf_wdata[1]), .rf_wr_en(rf_wr_en[1]), .rf_rd_en(rf_rd_en[1]),
    .rf_rdata(rf_rdata[1]), .rf_addr_ok(rf_addr_ok[1]));

  // behavioural user register banks, each in its channel's register clock
  for (genvar u = 0; u < 2; u++) begin : g_ufl
    assign rf_addr_ok[u] = (rf_addr[u] < AW'(N));
    assign rf_rdata[u]   = rf_addr_ok[u] ? regs[u][rf_addr[u]] : 32'hDEAD_BEEF;
    logic [AW-1:0] last;
    always @(posedge (u == 0 ? clk : uclk)) if (rst_n) begin
      if (rf_wr_en[u] || rf_rd_en[u]) begin
        checks++;
        if (held[u] < MCP - 1) begin failures++; $display("FAIL: channel %0d address held %0d clocks", u, held[u]); end
      end
      if (rf_wr_en[u]) regs[u][rf_addr[u]] <= rf_wdata[u];
      held[u] = (rf_addr[u] == last) ? held[u] + 1 : 0;
      last = rf_addr[u];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Send one command to both channels and collect both replies.
  task automatic cmd(input logic [7:0] c, input logic [31:0] d, output rep_t r0, output rep_t r1,
                     output int lat0);
    bit got0, got1;
    logic [7:0] t;
    int cyc;
    t = 8'($urandom);
    req_valid = 1; req = '{trid: t, ch: 8'h05, cmd: c, data: d};
    @(posedge clk); #1;
    req_valid = 0;
    got0 = 0; got1 = 0; cyc = 1; lat0 = -1;
    while (!(got0 && got1) && cyc < 200) begin
      if (rep_valid[0] && !got0) begin got0 = 1; r0 = rep[0]; lat0 = cyc; end
      if (rep_valid[1] && !got1) begin got1 = 1; r1 = rep[1]; end
      if (!(got0 && got1)) begin @(posedge clk); #1; cyc++; end
    end
    check(got0 && got1, "both channels replied");
    check(r0.trid == t && r1.trid == t && r0.ch == 8'h05, "reply TRID and channel");
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rep_t r0, r1;
    int lat;
    logic [31:0] model [N];
    int order [N];
    held = '{0, 0};
    for (int i = 0; i < N; i++) begin
      regs[0][i] = '0; regs[1][i] = '0; model[i] = '0; order[i] = i;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (5) @(posedge clk); #1;
    // channel registers
    cmd(I2C_W_CTRL, 32'h0000_00A7, r0, r1, lat);
    check(lat == 1, $sformatf("W_CTRL latency %0d", lat));
    cmd(I2C_R_CTRL, 0, r0, r1, lat);
    check(r0.data[7:0] == 8'hA7 && r1.data[7:0] == 8'hA7 && r0.err == 0, "control register read back");
    // write all registers in random order
    order.shuffle();
    foreach (order[j]) begin
      int i;
      i = order[j];
      model[i] = $urandom;
      cmd(I2C_W_DATA0, model[i], r0, r1, lat);
      cmd(I2C_M_10B_W, 32'(i), r0, r1, lat);
      check(lat == MCP + 3, $sformatf("register write latency %0d", lat));
      check(r0.data[7:0] == 8'h04 && r1.data[7:0] == 8'h04, "write status SUCC");
      check(regs[0][i] == model[i] && regs[1][i] == model[i], $sformatf("register %0d written", i));
    end
    // read them back in random order
    order.shuffle();
    foreach (order[j]) begin
      int i;
      i = order[j];
      cmd(I2C_M_10B_R, 32'(i), r0, r1, lat);
      check(lat == MCP + 3, $sformatf("register read latency %0d", lat));
      check(r0.data[7:0] == 8'h04 && r1.data[7:0] == 8'h04, "read status SUCC");
      cmd(I2C_R_DATA0, 0, r0, r1, lat);
      check(r0.data == model[i] && r1.data == model[i], $sformatf("register %0d read back", i));
    end
    // address with no register behind it
    cmd(I2C_M_10B_R, 32'(N + 3), r0, r1, lat);
    check(r0.data[7:0] == 8'h40 && r1.data[7:0] == 8'h40, "NOACK for an empty address");
    cmd(I2C_R_STR, 0, r0, r1, lat);
    check(r0.data[7:0] == 8'h40 && r1.data[7:0] == 8'h40, "status register keeps NOACK");
    // invalid command
    cmd(8'h99, 0, r0, r1, lat);
    check(r0.err[2] && r1.err[2], "invalid command error bit");
    cmd(I2C_R_STR, 0, r0, r1, lat);
    check(r0.data[7:0] == 8'h20 && r1.data[7:0] == 8'h20, "status INVOM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
