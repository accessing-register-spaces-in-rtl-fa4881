// scax_i2c_access: the part of an I2C channel that drives its Register File.
// It runs in the clock domain of the register file: the SCAX core clock
// normally, the user register clock when the channel is in CDC mode.
//
// An operation (op_we, op_addr, op_wdata) is taken on a one-cycle op_valid
// pulse while op_ready is high. The address and write data are put on rf_addr
// and rf_wdata and then held; the engine waits MCP clocks, so that the
// combinational Register File and the wires to the user logic have MCP clocks
// to settle (a multicycle path of MCP+1 cycles), and then
//   - for a write, pulses rf_wr_en for one clock,
//   - for a read, samples rf_rdata and pulses rf_rd_en for one clock.
// In that same clock done pulses with done_rdata (the sampled word) and
// done_noack (the address has no register, in which case no strobe is
// given). done is high MCP clocks after the edge that took the operation,
// so the address has been stable for MCP+1 clocks at the edge where the
// user logic takes a strobe. rf_addr and rf_wdata stay unchanged until the
// next operation.
//
// The multicycle access of the Register File, with a configurable length, is
// the document's; MCP's default value is this design's choice.
module scax_i2c_access #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned MCP    = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // operation
  input  logic              op_valid,
  output logic              op_ready,
  input  logic              op_we,
  input  logic [ADDR_W-1:0] op_addr,
  input  logic [DATA_W-1:0] op_wdata,
  output logic              done,
  output logic [DATA_W-1:0] done_rdata,
  output logic              done_noack,
  // register file
  output logic [ADDR_W-1:0] rf_addr,
  output logic [DATA_W-1:0] rf_wdata,
  output logic              rf_wr_en,
  output logic              rf_rd_en,
  input  logic [DATA_W-1:0] rf_rdata,
  input  logic              rf_addr_ok
);

  localparam int unsigned CW = $clog2(MCP + 1);

  logic          busy_q;
  logic          we_q;
  logic [CW-1:0] cnt_q;

  assign op_ready = !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      we_q       <= 1'b0;
      cnt_q      <= '0;
      rf_addr    <= '0;
      rf_wdata   <= '0;
      rf_wr_en   <= 1'b0;
      rf_rd_en   <= 1'b0;
      done       <= 1'b0;
      done_rdata <= '0;
      done_noack <= 1'b0;
    end else begin
      rf_wr_en <= 1'b0;
      rf_rd_en <= 1'b0;
      done     <= 1'b0;
      if (!busy_q) begin
        if (op_valid) begin
          busy_q   <= 1'b1;
          we_q     <= op_we;
          rf_addr  <= op_addr;
          rf_wdata <= op_wdata;
          cnt_q    <= CW'(MCP - 1);
        end
      end else if (cnt_q != '0) begin
        cnt_q <= cnt_q - 1'b1;
      end else begin
        busy_q     <= 1'b0;
        done       <= 1'b1;
        done_noack <= !rf_addr_ok;
        rf_wr_en   <= we_q && rf_addr_ok;
        rf_rd_en   <= !we_q && rf_addr_ok;
        if (!we_q) done_rdata <= rf_rdata;
      end
    end
  end

  // Address and data must not move while an access is in progress.
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             busy_q |=> $stable(rf_addr) && $stable(rf_wdata));

endmodule
