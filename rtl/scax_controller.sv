// scax_controller: the SCAX's counterpart of the SCA controller, an auxiliary
// module that answers the requests the back-end software sends to the chip
// itself rather than to a user register.
//
// It holds the three channel-enable registers CRB, CRC and CRD (written and
// read on the control channel) and answers a chip-ID read on the ADC channel
// with the CHIP_ID parameter, since OPC servers query these at connection
// time and while a link is up. The enable bits are decoded into i2c_en, one
// bit per I2C channel (CRB[7:3] -> channels 0-4, CRC[7:0] -> 5-12,
// CRD[2:0] -> 13-15). A request arrives as a one-cycle req_valid pulse; the
// reply is presented one clock later with a one-cycle rep_valid pulse and
// held on `rep` afterwards. Unknown commands are answered with the
// invalid-command error bit. link_reset (an HDLC connect or reset) clears the
// enables.
//
// The document describes this block only as loosely based on the SCA
// controller and adapted to the SCAX; the register set, codes and bit
// mapping are those of the SCA protocol, chosen here.
module scax_controller
  import scax_pkg::*;
#(
  parameter logic [23:0] CHIP_ID = 24'h5CA001
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                link_reset,
  input  logic                req_valid,
  input  req_t                req,
  output logic                rep_valid,
  output rep_t                rep,
  output logic [N_I2C_CH-1:0] i2c_en
);

  logic [7:0] crb_q, crc_q, crd_q;

  assign i2c_en = {crd_q[2:0], crc_q[7:0], crb_q[7:3]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crb_q     <= '0;
      crc_q     <= '0;
      crd_q     <= '0;
      rep_valid <= 1'b0;
      rep       <= '0;
    end else begin
      rep_valid <= 1'b0;
      if (link_reset) begin
        crb_q <= '0;
        crc_q <= '0;
        crd_q <= '0;
      end else if (req_valid) begin
        rep_valid <= 1'b1;
        rep.trid  <= req.trid;
        rep.ch    <= req.ch;
        rep.err   <= '0;
        rep.len   <= 8'd4;
        rep.data  <= '0;
        if (req.ch == CH_ADC) begin
          if (req.cmd == CMD_R_ID) rep.data <= {8'h00, CHIP_ID};
          else                     rep.err[ERR_INV_CMD] <= 1'b1;
        end else begin
          unique case (req.cmd)
            CMD_W_CRB: crb_q <= req.data[7:0];
            CMD_W_CRC: crc_q <= req.data[7:0];
            CMD_W_CRD: crd_q <= req.data[7:0];
            CMD_R_CRB: rep.data <= {24'h0, crb_q};
            CMD_R_CRC: rep.data <= {24'h0, crc_q};
            CMD_R_CRD: rep.data <= {24'h0, crd_q};
            default:   rep.err[ERR_INV_CMD] <= 1'b1;
          endcase
        end
      end
    end
  end

endmodule
