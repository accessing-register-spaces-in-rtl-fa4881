// scax_i2c_channel: one of the sixteen emulated SCA I2C channels. It looks to
// the back-end like an SCA I2C master, but instead of driving a serial bus it
// reads and writes user registers directly through its Register File.
//
// Commands arrive from the I2C Router as a one-cycle req_valid pulse with the
// request on `req`; every command is answered by a one-cycle rep_valid pulse,
// the reply staying on `rep` until the next one. The channel keeps the SCA
// I2C channel registers:
//   W_CTRL / R_CTRL  control register (written and read back, not used)
//   R_STR            status register: SUCC, INVOM (invalid command) or
//                    NOACK (no register at the address) of the last command
//   W_DATA0          32-bit write-data register
//   R_DATA0          32-bit read-data register
//   M_10B_W          write the write-data register into user register
//                    req.data[ADDR_W-1:0]
//   M_10B_R          read user register req.data[ADDR_W-1:0] into the
//                    read-data register
// Register commands are answered one clock after the request; M_10B_W and
// M_10B_R reply with the status register in the data field after the
// register-file access.
//
// Register-file accesses go through scax_i2c_access, which holds address and
// data for MCP clocks before strobing (multicycle path). With CDC_MODE = 0
// that engine runs on the core clock and the reply to an access follows the
// request by MCP+3 clocks. With CDC_MODE = 1 it runs on ufl_clk, the clock of the user
// registers, and the access and its result cross through two CDC FIFOs, one
// per direction, as the document describes for "CDC mode"; the register
// file ports are then in the ufl_clk domain. In CDC_MODE = 0 ufl_clk and
// ufl_rst_n are not used.
//
// Command codes and status bits follow the SCA; using the 10-bit
// addressing mode for 32-bit registers and the command subset are choices
// of this design (an unsupported command answers INVOM and the
// invalid-command error bit).
module scax_i2c_channel
  import scax_pkg::*;
#(
  parameter int unsigned ADDR_W   = 10,
  parameter int unsigned MCP      = 4,
  parameter bit          CDC_MODE = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  // router side
  input  logic              req_valid,
  input  req_t              req,
  output logic              rep_valid,
  output rep_t              rep,
  // register file side
  input  logic              ufl_clk,
  input  logic              ufl_rst_n,
  output logic [ADDR_W-1:0] rf_addr,
  output logic [DW-1:0]     rf_wdata,
  output logic              rf_wr_en,
  output logic              rf_rd_en,
  input  logic [DW-1:0]     rf_rdata,
  input  logic              rf_addr_ok
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_t;

  state_t          state_q;
  logic [7:0]      ctrl_q, status_q;
  logic [DW-1:0]   wdata_q, rdata_q;
  req_t            cur_q;

  // core-side view of the access engine
  logic              op_valid, op_ready, res_valid, res_noack;
  logic [DW-1:0]     res_rdata;
  logic              op_we;
  logic [ADDR_W-1:0] op_addr;

  assign op_we   = (cur_q.cmd == I2C_M_10B_W);
  assign op_addr = cur_q.data[ADDR_W-1:0];
  assign op_valid = (state_q == S_ISSUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      ctrl_q    <= '0;
      status_q  <= '0;
      wdata_q   <= '0;
      rdata_q   <= '0;
      cur_q     <= '0;
      rep_valid <= 1'b0;
      rep       <= '0;
    end else begin
      rep_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (req_valid) begin
          cur_q    <= req;
          rep.trid <= req.trid;
          rep.ch   <= req.ch;
          rep.err  <= '0;
          rep.len  <= 8'd4;
          rep.data <= '0;
          unique case (req.cmd)
            I2C_W_CTRL:  begin ctrl_q  <= req.data[7:0]; rep_valid <= 1'b1; end
            I2C_R_CTRL:  begin rep.data <= {24'h0, ctrl_q};   rep_valid <= 1'b1; end
            I2C_R_STR:   begin rep.data <= {24'h0, status_q}; rep_valid <= 1'b1; end
            I2C_W_DATA0: begin wdata_q <= req.data;           rep_valid <= 1'b1; end
            I2C_R_DATA0: begin rep.data <= rdata_q;           rep_valid <= 1'b1; end
            I2C_M_10B_W, I2C_M_10B_R: state_q <= S_ISSUE;
            default: begin
              status_q             <= 8'(1 << STR_INVOM);
              rep.err[ERR_INV_CMD] <= 1'b1;
              rep_valid            <= 1'b1;
            end
          endcase
        end
        S_ISSUE: if (op_ready) state_q <= S_WAIT;
        S_WAIT: if (res_valid) begin
          state_q   <= S_IDLE;
          status_q  <= res_noack ? 8'(1 << STR_NOACK) : 8'(1 << STR_SUCC);
          rep.data  <= {24'h0, res_noack ? 8'(1 << STR_NOACK) : 8'(1 << STR_SUCC)};
          if (!op_we && !res_noack) rdata_q <= res_rdata;
          rep_valid <= 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  if (!CDC_MODE) begin : g_sync
    // The access engine shares the core clock.
    logic ready;
    scax_i2c_access #(.ADDR_W(ADDR_W), .DATA_W(DW), .MCP(MCP)) u_access (
      .clk, .rst_n,
      .op_valid, .op_ready(ready), .op_we, .op_addr, .op_wdata(wdata_q),
      .done(res_valid), .done_rdata(res_rdata), .done_noack(res_noack),
      .rf_addr, .rf_wdata, .rf_wr_en, .rf_rd_en, .rf_rdata, .rf_addr_ok
    );
    assign op_ready = ready;
  end else begin : g_cdc
    // CDC mode: write FIFO core -> ufl_clk, read FIFO ufl_clk -> core.
    localparam int unsigned OPW = 1 + ADDR_W + DW;
    localparam int unsigned RSW = 1 + DW;
    logic           wf_full, wf_empty, rf_full, rf_empty;
    logic [OPW-1:0] wf_out;
    logic [RSW-1:0] rf_out;
    logic           u_ready, u_done, u_noack;
    logic [DW-1:0]  u_rdata;

    assign op_ready  = !wf_full;
    assign res_valid = !rf_empty;
    assign {res_noack, res_rdata} = rf_out;

    scax_cdc_fifo #(.WIDTH(OPW), .DEPTH(4)) u_wfifo (
      .wr_clk(clk), .wr_rst_n(rst_n), .wr_en(op_valid),
      .wr_data({op_we, op_addr, wdata_q}), .full(wf_full),
      .rd_clk(ufl_clk), .rd_rst_n(ufl_rst_n), .rd_en(u_ready && !wf_empty),
      .rd_data(wf_out), .empty(wf_empty)
    );

    scax_i2c_access #(.ADDR_W(ADDR_W), .DATA_W(DW), .MCP(MCP)) u_access (
      .clk(ufl_clk), .rst_n(ufl_rst_n),
      .op_valid(!wf_empty), .op_ready(u_ready),
      .op_we(wf_out[OPW-1]), .op_addr(wf_out[DW +: ADDR_W]), .op_wdata(wf_out[DW-1:0]),
      .done(u_done), .done_rdata(u_rdata), .done_noack(u_noack),
      .rf_addr, .rf_wdata, .rf_wr_en, .rf_rd_en, .rf_rdata, .rf_addr_ok
    );

    scax_cdc_fifo #(.WIDTH(RSW), .DEPTH(4)) u_rfifo (
      .wr_clk(ufl_clk), .wr_rst_n(ufl_rst_n), .wr_en(u_done),
      .wr_data({u_noack, u_rdata}), .full(rf_full),
      .rd_clk(clk), .rd_rst_n(rst_n), .rd_en(state_q == S_WAIT && res_valid),
      .rd_data(rf_out), .empty(rf_empty)
    );
  end

  // One command at a time: a new request only comes after the reply.
  a_one: assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> state_q == S_IDLE);

endmodule
