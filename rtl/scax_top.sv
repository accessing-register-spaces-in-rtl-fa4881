// scax_top: the Slow Control Adapter eXtension (SCAX), a module placed inside
// an FPGA that answers the back-end slow-control system exactly as an SCA
// ASIC would, so that the same OPC UA server and software can read and write
// the FPGA's own registers.
//
// Data path (one transaction at a time):
//   rx byte stream -> Deframer (FCS check) -> Traffic Handler
//        -> Controller | S-Reply Manager | I2C Router -> I2C Channel k
//        -> Register File k -> user registers (ufl_* ports)
//   reply <- ... <- Traffic Handler (reply bus) -> Framer (FCS) -> tx stream
// The rx/tx byte streams are the decoded sides of the FELIX e-link
// interface (Elink2FIFO / FIFO2Elink), which are not part of this RTL:
// rx_sop/rx_eop and tx_sop/tx_eop mark frame boundaries.
//
// There are N_I2C_CH (16) SCA I2C channel numbers. A channel and its
// Register File are built where CH_ACTIVE has a 1; each Register File
// reaches N_REGS registers of 32 bits with a 10-bit address. Channel k's
// user registers are ufl_*[k][i]: the user logic loads ufl_wr_data[k] into
// register i on ufl_wr_en[k][i] and presents the register on
// ufl_rd_data[k][i]; ufl_rd_en[k][i] pulses when it is read. With bit k of
// CDC_MODE set, channel k and its Register File run on ufl_clk[k] and talk
// to the core through CDC FIFOs; otherwise ufl_clk[k] is unused and the
// ufl_* signals of channel k are in the clk domain.
//
// If SMC_EN is set, the SCAX Memory Controller is attached to register
// slots SMC_ADDR_SLOT (RAM pointer) and SMC_ADDR_SLOT+1 (RAM data) of channel
// SMC_CH, whose ufl_rd_data inputs for those two slots are then ignored; its
// RAM port is ram_*. Two debug buffers record the inbound and outbound byte
// streams; they are read through dbg_*.
//
// Timing: the core runs on clk (320 MHz in the document's main use). Paths
// between router and channels are multicycle (ROUTER_PIPE+1 clocks) and
// register-file paths are multicycle (RF_MCP+1 clocks). A channel register
// command is answered about 20 clocks after the last request byte, a user
// register access about 20 + RF_MCP clocks after it, plus the 14 clocks
// of reply bytes. The block structure follows the document's Figure 1;
// CH_ACTIVE's default (two channels, as in the document's stress test),
// RF_MCP, ROUTER_PIPE, the SMC slot placement and the debug buffer depth are
// this design's choices.
module scax_top
  import scax_pkg::*;
#(
  parameter logic [N_I2C_CH-1:0] CH_ACTIVE     = 16'h0003,
  parameter logic [N_I2C_CH-1:0] CDC_MODE      = 16'h0000,
  parameter int unsigned         ADDR_W        = 10,
  parameter int unsigned         N_REGS        = 1024,
  parameter int unsigned         RF_MCP        = 4,
  parameter int unsigned         ROUTER_PIPE   = 2,
  parameter bit                  SMC_EN        = 1'b1,
  parameter int unsigned         SMC_CH        = 0,
  parameter int unsigned         SMC_ADDR_SLOT = N_REGS - 2,
  parameter int unsigned         RAM_AW        = 10,
  parameter int unsigned         DBG_DEPTH     = 512,
  parameter logic [23:0]         CHIP_ID       = 24'h5CA001
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  // inbound decoded e-link bytes
  input  logic                                      rx_valid,
  input  logic [7:0]                                rx_data,
  input  logic                                      rx_sop,
  input  logic                                      rx_eop,
  output logic                                      rx_ready,
  // outbound bytes to the e-link encoder
  output logic                                      tx_valid,
  input  logic                                      tx_ready,
  output logic [7:0]                                tx_data,
  output logic                                      tx_sop,
  output logic                                      tx_eop,
  // user FPGA logic, one group per I2C channel
  input  logic [N_I2C_CH-1:0]                       ufl_clk,
  input  logic [N_I2C_CH-1:0]                       ufl_rst_n,
  output logic [N_I2C_CH-1:0][DW-1:0]               ufl_wr_data,
  output logic [N_I2C_CH-1:0][N_REGS-1:0]           ufl_wr_en,
  output logic [N_I2C_CH-1:0][N_REGS-1:0]           ufl_rd_en,
  input  logic [N_I2C_CH-1:0][N_REGS-1:0][DW-1:0]   ufl_rd_data,
  // RAM behind the SCAX Memory Controller
  output logic [RAM_AW-1:0]                         ram_addr,
  output logic                                      ram_we,
  output logic [DW-1:0]                             ram_wdata,
  input  logic [DW-1:0]                             ram_rdata,
  // debug buffers
  input  logic                                      dbg_enable,
  input  logic [$clog2(DBG_DEPTH)-1:0]              dbg_rd_addr,
  output logic [9:0]                                dbg_rx_rd_data,
  output logic [9:0]                                dbg_tx_rd_data,
  output logic [$clog2(DBG_DEPTH)-1:0]              dbg_rx_wr_ptr,
  output logic [$clog2(DBG_DEPTH)-1:0]              dbg_tx_wr_ptr,
  // status
  output logic [N_I2C_CH-1:0]                       i2c_en,
  output logic                                      fcs_err,
  output logic                                      len_err,
  output logic                                      local_err
);

  // --------------------------------------------------------- back-end side
  logic      frame_valid, frame_ready;
  rx_frame_t frame;
  req_t      req;
  logic      ctl_req_valid, rt_req_valid, ctl_rep_valid, rt_rep_valid;
  rep_t      ctl_rep, rt_rep;
  logic      lf_valid, lr_valid, lr_send, rx_i, tx_i, link_reset;
  logic [7:0] lf_ctrl, lr_ctrl, iframe_ctrl;
  logic [2:0] rx_ns;
  logic      fr_valid, fr_ready;
  tx_frame_t fr_frame;

  scax_deframer u_deframer (
    .clk, .rst_n,
    .rx_valid, .rx_data, .rx_sop, .rx_eop, .rx_ready,
    .frame_valid, .frame_ready, .frame,
    .fcs_err, .len_err
  );

  scax_traffic_handler #(.CH_ACTIVE(CH_ACTIVE)) u_traffic (
    .clk, .rst_n,
    .frame_valid, .frame_ready, .frame,
    .req, .ctl_req_valid, .rt_req_valid,
    .ctl_rep_valid, .ctl_rep, .rt_rep_valid, .rt_rep, .i2c_en,
    .lf_valid, .lf_ctrl, .lr_valid, .lr_send, .lr_ctrl,
    .rx_i, .rx_ns, .tx_i, .iframe_ctrl,
    .tx_valid(fr_valid), .tx_ready(fr_ready), .tx_frame(fr_frame),
    .local_err
  );

  scax_controller #(.CHIP_ID(CHIP_ID)) u_controller (
    .clk, .rst_n, .link_reset,
    .req_valid(ctl_req_valid), .req,
    .rep_valid(ctl_rep_valid), .rep(ctl_rep),
    .i2c_en
  );

  scax_sreply_manager u_sreply (
    .clk, .rst_n,
    .lf_valid, .lf_ctrl, .lr_valid, .lr_send, .lr_ctrl,
    .rx_i, .rx_ns, .tx_i, .iframe_ctrl, .link_reset
  );

  scax_framer u_framer (
    .clk, .rst_n,
    .in_valid(fr_valid), .in_ready(fr_ready), .in_frame(fr_frame),
    .tx_valid, .tx_ready, .tx_data, .tx_sop, .tx_eop
  );

  scax_debug_buffer #(.DEPTH(DBG_DEPTH)) u_dbg_rx (
    .clk, .rst_n, .enable(dbg_enable),
    .s_valid(rx_valid), .s_ready(rx_ready), .s_data(rx_data), .s_sop(rx_sop), .s_eop(rx_eop),
    .rd_addr(dbg_rd_addr), .rd_data(dbg_rx_rd_data), .wr_ptr(dbg_rx_wr_ptr), .wrapped()
  );

  scax_debug_buffer #(.DEPTH(DBG_DEPTH)) u_dbg_tx (
    .clk, .rst_n, .enable(dbg_enable),
    .s_valid(tx_valid), .s_ready(tx_ready), .s_data(tx_data), .s_sop(tx_sop), .s_eop(tx_eop),
    .rd_addr(dbg_rd_addr), .rd_data(dbg_tx_rd_data), .wr_ptr(dbg_tx_wr_ptr), .wrapped()
  );

  // ------------------------------------------------------------- I2C side
  req_t                ch_req;
  logic [N_I2C_CH-1:0] ch_req_valid, ch_rep_valid;
  rep_t                ch_rep [N_I2C_CH];

  scax_i2c_router #(.N_CH(N_I2C_CH), .PIPE(ROUTER_PIPE)) u_router (
    .clk, .rst_n,
    .req_valid(rt_req_valid), .req, .rep_valid(rt_rep_valid), .rep(rt_rep),
    .ch_req, .ch_req_valid, .ch_rep, .ch_rep_valid
  );

  // register-file read inputs, with the SMC slots substituted
  logic [N_I2C_CH-1:0][N_REGS-1:0][DW-1:0] rf_in;
  logic [DW-1:0] smc_addr_rd, smc_data_rd;

  always_comb begin
    rf_in = ufl_rd_data;
    if (SMC_EN) begin
      rf_in[SMC_CH][SMC_ADDR_SLOT]     = smc_addr_rd;
      rf_in[SMC_CH][SMC_ADDR_SLOT + 1] = smc_data_rd;
    end
  end

  for (genvar k = 0; k < N_I2C_CH; k++) begin : g_ch
    if (CH_ACTIVE[k]) begin : g_on
      logic [ADDR_W-1:0] rf_addr;
      logic [DW-1:0]     rf_wdata, rf_rdata;
      logic              rf_wr_en, rf_rd_en, rf_addr_ok;

      scax_i2c_channel #(.ADDR_W(ADDR_W), .MCP(RF_MCP), .CDC_MODE(CDC_MODE[k])) u_channel (
        .clk, .rst_n,
        .req_valid(ch_req_valid[k]), .req(ch_req),
        .rep_valid(ch_rep_valid[k]), .rep(ch_rep[k]),
        .ufl_clk(ufl_clk[k]), .ufl_rst_n(ufl_rst_n[k]),
        .rf_addr, .rf_wdata, .rf_wr_en, .rf_rd_en, .rf_rdata, .rf_addr_ok
      );

      scax_register_file #(.ADDR_W(ADDR_W), .DATA_W(DW), .N_REGS(N_REGS)) u_regfile (
        .addr(rf_addr), .wr_data(rf_wdata), .wr_en(rf_wr_en), .rd_en(rf_rd_en),
        .rd_data(rf_rdata), .addr_ok(rf_addr_ok),
        .ufl_wr_data(ufl_wr_data[k]), .ufl_wr_en(ufl_wr_en[k]),
        .ufl_rd_en(ufl_rd_en[k]), .ufl_rd_data(rf_in[k])
      );
    end else begin : g_off
      assign ch_rep_valid[k] = 1'b0;
      assign ch_rep[k]       = '0;
      assign ufl_wr_data[k]  = '0;
      assign ufl_wr_en[k]    = '0;
      assign ufl_rd_en[k]    = '0;
    end
  end

  // ---------------------------------------------- SCAX Memory Controller
  if (SMC_EN) begin : g_smc
    logic smc_clk, smc_rst_n;
    if (CDC_MODE[SMC_CH]) begin : g_uclk
      assign smc_clk   = ufl_clk[SMC_CH];
      assign smc_rst_n = ufl_rst_n[SMC_CH];
    end else begin : g_cclk
      assign smc_clk   = clk;
      assign smc_rst_n = rst_n;
    end
    scax_mem_ctrl #(.RAM_AW(RAM_AW), .DATA_W(DW)) u_smc (
      .clk(smc_clk), .rst_n(smc_rst_n),
      .wr_data(ufl_wr_data[SMC_CH]),
      .addr_wr_en(ufl_wr_en[SMC_CH][SMC_ADDR_SLOT]),
      .addr_rd_data(smc_addr_rd),
      .data_wr_en(ufl_wr_en[SMC_CH][SMC_ADDR_SLOT + 1]),
      .data_rd_en(ufl_rd_en[SMC_CH][SMC_ADDR_SLOT + 1]),
      .data_rd_data(smc_data_rd),
      .ram_addr, .ram_we, .ram_wdata, .ram_rdata
    );
  end else begin : g_nosmc
    assign smc_addr_rd = '0;
    assign smc_data_rd = '0;
    assign ram_addr    = '0;
    assign ram_we      = 1'b0;
    assign ram_wdata   = '0;
  end

endmodule
