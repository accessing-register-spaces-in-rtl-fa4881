// tb_scax_top_full: the document's stress test on the SCAX at its default
// parameters: two active channels, each with a fully populated register file
// of 1024 32-bit registers; every register (on channel 0 all but the two
// memory-controller slots) is written in random order and read back in random order.
//
// The testbench plays the back-end (request frames in, reply frames out,
// with its own FCS model and random back-pressure on the reply stream) and
// the user logic (a bank of 1024 32-bit registers behind each active
// channel and a block RAM behind the SCAX Memory Controller). It counts how
// often each mechanism happened and fails any that never did: link
// connect/test/receive-ready, controller registers and chip ID, the
// disabled-channel, invalid-channel and invalid-command error replies, a
// frame dropped for a bad FCS, register writes and reads on both channels,
// memory-controller bursts, reply back-pressure, inbound back-pressure and
// the debug buffer. Every reply is checked for FCS, sequence numbers,
// transaction ID and contents, and its latency inside the SCAX (last request
// byte to first reply byte) must stay below 224 clocks, 700 ns at 320 MHz,
// the shortest reply time quoted for the whole link.
module tb_scax_top_full;
  import scax_pkg::*;
  import scax_tb_pkg::*;

  localparam int NR = 1024;            // registers per file (top default)
  localparam int NWORK = NR;      // registers per channel in the workload
  localparam int SMC_BASE = NR - 2;    // memory controller slots on channel 0

  logic clk = 0, rst_n = 0;
  always #1.5625 clk = ~clk;           // 320 MHz
  logic uclk = 0;
  always #2.5 uclk = ~uclk;            // 200 MHz user clock for channel 1

  logic rx_valid = 0, rx_sop = 0, rx_eop = 0, rx_ready;
  logic [7:0] rx_data = 0;
  logic tx_valid, tx_ready = 0, tx_sop, tx_eop;
  logic [7:0] tx_data;
  logic [15:0] ufl_clk, ufl_rst_n;
  logic [15:0][31:0] ufl_wr_data;
  logic [15:0][NR-1:0] ufl_wr_en, ufl_rd_en;
  logic [15:0][NR-1:0][31:0] ufl_rd_data;
  logic [9:0] ram_addr;
  logic ram_we;
  logic [31:0] ram_wdata, ram_rdata;
  logic dbg_enable = 1;
  logic [8:0] dbg_rd_addr = 0, dbg_rx_wr_ptr, dbg_tx_wr_ptr;
  logic [9:0] dbg_rx_rd_data, dbg_tx_rd_data;
  logic [15:0] i2c_en;
  logic fcs_err, len_err, local_err;

  assign ufl_clk   = {14'b0, uclk, 1'b0};
  assign ufl_rst_n = {16{rst_n}};

  scax_top dut
  (
    .clk, .rst_n, .rx_valid, .rx_data, .rx_sop, .rx_eop, .rx_ready,
    .tx_valid, .tx_ready, .tx_data, .tx_sop, .tx_eop,
    .ufl_clk, .ufl_rst_n, .ufl_wr_data, .ufl_wr_en, .ufl_rd_en, .ufl_rd_data,
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .dbg_enable, .dbg_rd_addr, .dbg_rx_rd_data, .dbg_tx_rd_data, .dbg_rx_wr_ptr, .dbg_tx_wr_ptr,
    .i2c_en, .fcs_err, .len_err, .local_err
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_ua = 0, n_test = 0, n_rr = 0, n_ctl = 0, n_id = 0, n_dis = 0, n_inv_ch = 0, n_inv_cmd = 0;
  int n_fcs_drop = 0, n_wr[2] = '{0, 0}, n_rd[2] = '{0, 0}, n_smc_wr = 0, n_smc_rd = 0;
  int n_exp[2] = '{0, 0};
  int n_tx_stall = 0, n_rx_stall = 0, n_dbg = 0, max_lat = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ user logic
  always @(posedge clk) begin
    if (!rst_n) ufl_rd_data[0] <= '0;
    else if (|ufl_wr_en[0])
      for (int i = 0; i < NR; i++) if (ufl_wr_en[0][i]) ufl_rd_data[0][i] <= ufl_wr_data[0];
  end
  // channel 1 registers live in the channel's register clock domain
  wire clk1 = clk;
  always @(posedge clk1) begin
    if (!rst_n) ufl_rd_data[1] <= '0;
    else if (|ufl_wr_en[1])
      for (int i = 0; i < NR; i++) if (ufl_wr_en[1][i]) ufl_rd_data[1][i] <= ufl_wr_data[1];
  end
  initial for (int k = 2; k < 16; k++) ufl_rd_data[k] = '0;

  logic [31:0] ram [1024];
  always @(posedge clk) begin
    if (ram_we) ram[ram_addr] <= ram_wdata;
    ram_rdata <= ram[ram_addr];
  end

  // ------------------------------------------------------- reply receiver
  byte_q_t rxq [$];
  byte_q_t cur;
  int last_req_t, first_rep_t, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (tx_valid && !tx_ready) n_tx_stall++;
      if (rx_valid && !rx_ready) n_rx_stall++;
      if (tx_valid && tx_ready) begin
        if (tx_sop) begin cur.delete(); first_rep_t = cyc; end
        cur.push_back(tx_data);
        if (tx_eop) rxq.push_back(cur);
      end
      if (fcs_err) n_fcs_drop++;
    end
    #0.5 tx_ready = ($urandom_range(0, 3) != 0);
  end

  // --------------------------------------------------------- frame sender
  task automatic send(input byte_q_t q);
    bit ok;
    foreach (q[i]) begin
      rx_valid = 1; rx_data = q[i]; rx_sop = (i == 0); rx_eop = (i == q.size() - 1);
      do begin
        ok = rx_ready;
        @(posedge clk); #0.5;
      end while (!ok);
    end
    last_req_t = cyc;
    rx_valid = 0; rx_sop = 0; rx_eop = 0;
  endtask

  // Wait for one reply frame, check its FCS and return its body.
  task automatic get_reply(output byte_q_t body, output bit ok);
    int c = 0;
    while (rxq.size() == 0 && c < 2000) begin @(posedge clk); #0.5; c++; end
    ok = (rxq.size() != 0);
    check(ok, "reply received");
    if (ok) begin
      byte_q_t q;
      logic [15:0] f;
      q = rxq.pop_front();
      body = q[0:q.size()-3];
      f = x25(body);
      check(q[q.size()-2] == f[7:0] && q[q.size()-1] == f[15:8], "reply FCS");
      if (first_rep_t - last_req_t > max_lat) max_lat = first_rep_t - last_req_t;
      check(first_rep_t - last_req_t < 224, $sformatf("reply within 700 ns (%0d clocks)", first_rep_t - last_req_t));
    end
  endtask

  logic [2:0] tx_ns = 0, rx_ns_exp = 0;

  // Numbered request and its reply.
  task automatic xact(input logic [7:0] ch, input logic [7:0] cmd, input logic [31:0] d,
                      output logic [7:0] err, output logic [31:0] rd);
    byte_q_t b;
    bit ok;
    logic [7:0] t;
    t = 8'($urandom);
    send(iframe(tx_ns, t, ch, cmd, d));
    get_reply(b, ok);
    err = 8'hFF; rd = '0;
    if (ok) begin
      check(b.size() == 10, "numbered reply length");
      if (b.size() == 10) begin
        check(b[1] == {3'(tx_ns + 1), 1'b0, rx_ns_exp, 1'b0}, $sformatf("reply control byte N(R)/N(S) %h %p", b[1], b));
        check(b[2] == t && b[3] == ch && b[5] == 8'd4, "reply TRID, channel, length");
        err = b[4];
        rd = {b[6], b[7], b[8], b[9]};
      end
    end
    tx_ns++;
    rx_ns_exp++;
  endtask

  task automatic link(input logic [7:0] c, output logic [7:0] rc, output bit got);
    byte_q_t b;
    bit ok;
    send(lframe(c));
    get_reply(b, ok);
    got = ok;
    rc = (ok && b.size() == 2) ? b[1] : 8'hFF;
  endtask

  // I2C register write and read through channel k
  task automatic reg_write(input int k, input int a, input logic [31:0] v);
    logic [7:0] e;
    logic [31:0] r;
    xact(8'(CH_I2C0 + k), I2C_W_DATA0, v, e, r);
    check(e == 0, "W_DATA0 accepted");
    xact(8'(CH_I2C0 + k), I2C_M_10B_W, 32'(a), e, r);
    check(e == 0 && r[7:0] == 8'h04, "register write SUCC");
  endtask

  task automatic reg_read(input int k, input int a, output logic [31:0] v);
    logic [7:0] e;
    logic [31:0] r;
    xact(8'(CH_I2C0 + k), I2C_M_10B_R, 32'(a), e, r);
    check(e == 0 && r[7:0] == 8'h04, "register read SUCC");
    xact(8'(CH_I2C0 + k), I2C_R_DATA0, 0, e, v);
    check(e == 0, "R_DATA0 accepted");
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] rc, e;
    logic [31:0] r, v;
    bit got;
    byte_q_t q;
    logic [31:0] model [2][NR];
    int order [$];
    for (int i = 0; i < 1024; i++) ram[i] = '0;
    repeat (10) @(posedge clk);
    #0.5 rst_n = 1;
    repeat (10) @(posedge clk); #0.5;

    // link set-up
    link(8'h2F, rc, got); check(got && rc == 8'h63, "CONNECT answered with UA"); if (rc == 8'h63) n_ua++;
    for (int i = 0; i < 4; i++) begin
      dbg_rd_addr = 9'(i);
      @(posedge clk); @(posedge clk); #0.5;
      q = lframe(8'h2F);
      check(dbg_rx_rd_data == {i == 0, i == 3, q[i]}, "inbound debug buffer holds the CONNECT frame");
      n_dbg++;
    end
    check(dbg_tx_wr_ptr == 9'd4, "outbound debug buffer recorded the UA frame");
    link(8'hE3, rc, got); check(got && rc == 8'hE3, "TEST echoed"); if (rc == 8'hE3) n_test++;

    // channels are disabled after CONNECT
    xact(8'(CH_I2C0), I2C_R_CTRL, 0, e, r);
    check(e == 8'h20, "disabled channel error"); if (e == 8'h20) n_dis++;
    // channel 5 is not built
    xact(8'(CH_I2C0 + 5), I2C_R_CTRL, 0, e, r);
    check(e == 8'h02, "absent channel error"); if (e == 8'h02) n_inv_ch++;
    // controller: enable I2C channels 0 and 1 (CRB bits 3 and 4)
    xact(CH_CTRL, CMD_W_CRB, 32'h18, e, r); check(e == 0, "W_CRB");
    xact(CH_CTRL, CMD_R_CRB, 0, e, r); check(e == 0 && r == 32'h18, "R_CRB"); n_ctl++;
    check(i2c_en == 16'h0003, "channels 0 and 1 enabled");
    xact(CH_ADC, CMD_R_ID, 0, e, r); check(e == 0 && r == 32'h005CA001, "chip ID"); n_id++;
    // invalid I2C command
    xact(8'(CH_I2C0 + 1), 8'h99, 0, e, r);
    check(e == 8'h04, "invalid command error"); if (e == 8'h04) n_inv_cmd++;
    // a corrupted frame is dropped without a reply
    q = iframe(tx_ns, 8'h77, CH_CTRL, CMD_R_CRB, 0);
    q[4] ^= 8'h10;
    send(q);
    repeat (300) @(posedge clk); #0.5;
    check(rxq.size() == 0 && n_fcs_drop == 1, "corrupted frame dropped");
    // inbound back-pressure: two frames back to back
    fork
      begin send(iframe(tx_ns, 8'h01, CH_CTRL, CMD_R_CRB, 0)); send(iframe(3'(tx_ns + 1), 8'h02, CH_CTRL, CMD_R_CRB, 0)); end
    join
    repeat (200) @(posedge clk); #0.5;
    check(rxq.size() == 2, "two back-to-back requests both answered");
    rxq.delete();
    tx_ns += 2; rx_ns_exp += 2;

    // workload: random-order writes then random-order reads on both channels
    for (int k = 0; k < 2; k++) begin
      order.delete();
      for (int i = 0; i < NR; i++) if (!(k == 0 && i >= SMC_BASE)) order.push_back(i);
      order.shuffle();
      if (order.size() > NWORK) order = order[0:NWORK-1];
      n_exp[k] = order.size();
      foreach (order[j]) begin
        int a;
        a = order[j];
        model[k][a] = $urandom;
        reg_write(k, a, model[k][a]);
        n_wr[k]++;
      end
      repeat (20) @(posedge clk); #0.5;
      foreach (order[j]) check(ufl_rd_data[k][order[j]] == model[k][order[j]], "user register written");
      order.shuffle();
      foreach (order[j]) begin
        int a;
        a = order[j];
        reg_read(k, a, v);
        check(v == model[k][a], $sformatf("channel %0d register %0d read back", k, a));
        n_rd[k]++;
      end
    end

    // memory controller: burst write, then burst read
    begin
      int base, len;
      logic [31:0] mm [$];
      base = $urandom_range(0, 1023); len = 24;
      reg_write(0, SMC_BASE, 32'(base));
      for (int i = 0; i < len; i++) begin
        mm.push_back($urandom);
        reg_write(0, SMC_BASE + 1, mm[i]);
        n_smc_wr++;
      end
      repeat (5) @(posedge clk);
      for (int i = 0; i < len; i++) check(ram[(base + i) % 1024] == mm[i], "RAM written through the SMC");
      reg_read(0, SMC_BASE, v);
      check(v == 32'((base + len) % 1024), "SMC pointer advanced");
      reg_write(0, SMC_BASE, 32'(base));
      for (int i = 0; i < len; i++) begin
        reg_read(0, SMC_BASE + 1, v);
        check(v == mm[i], "RAM read through the SMC");
        n_smc_rd++;
      end
    end

    // receive-ready poll
    link(8'h11, rc, got);
    check(got && rc == {tx_ns, 1'b1, 4'b0001}, "RR carries N(R)");
    if (got && rc[3:0] == 4'b0001) n_rr++;

    $display("mechanisms: UA %0d TEST %0d RR %0d ctl %0d id %0d disabled %0d absent %0d invcmd %0d fcsdrop %0d",
             n_ua, n_test, n_rr, n_ctl, n_id, n_dis, n_inv_ch, n_inv_cmd, n_fcs_drop);
    $display("writes %0d/%0d reads %0d/%0d smc %0d/%0d tx stalls %0d rx stalls %0d dbg %0d max latency %0d clocks",
             n_wr[0], n_wr[1], n_rd[0], n_rd[1], n_smc_wr, n_smc_rd, n_tx_stall, n_rx_stall, n_dbg, max_lat);
    check(n_ua > 0 && n_test > 0 && n_rr > 0 && n_ctl > 0 && n_id > 0, "link and controller mechanisms seen");
    check(n_dis > 0 && n_inv_ch > 0 && n_inv_cmd > 0 && n_fcs_drop > 0, "error mechanisms seen");
    check(n_wr[0] == n_exp[0] && n_wr[1] == n_exp[1] && n_rd[0] == n_exp[0] && n_rd[1] == n_exp[1] &&
          n_exp[0] == ((NWORK < NR - 2) ? NWORK : NR - 2) && n_exp[1] == ((NWORK < NR) ? NWORK : NR), "workload complete");
    check(n_smc_wr > 0 && n_smc_rd > 0, "memory controller used");
    check(n_tx_stall > 0 && n_rx_stall > 0 && n_dbg > 0, "back-pressure and debug buffer seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
