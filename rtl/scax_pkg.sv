// scax_pkg: types, constants and the frame check sequence shared by the SCAX
// (Slow Control Adapter eXtension) modules.
//
// The SCAX speaks the slow-control protocol of the SCA ASIC so that the
// existing back-end software can reach FPGA registers. The frame layout, the
// channel numbers, the command codes and the error/status bits below follow
// that public SCA protocol; the SCAX design itself only requires that it
// looks like an SCA to the back-end. Frames are HDLC-like:
//
//   request : ADDR CTRL TRID CH  LEN CMD  D3 D2 D1 D0  FCSlo FCShi
//   reply   : ADDR CTRL TRID CH  ERR LEN  D3 D2 D1 D0  FCSlo FCShi
//   link    : ADDR CTRL FCSlo FCShi     (unnumbered / supervisory frames)
//
// Data words travel most significant byte first (a choice of this design).
// The FCS is the HDLC CRC-16 (polynomial x^16+x^12+x^5+1, bit-reversed
// form 0x8408, preset 0xFFFF, transmitted complemented, low byte first).
package scax_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_I2C_CH    = 16;   // I2C channels of the SCA
  localparam int unsigned DW          = 32;   // register / data field width

  // ------------------------------------------------------------ channels
  localparam logic [7:0] CH_CTRL      = 8'h00;
  localparam logic [7:0] CH_I2C0      = 8'h03; // I2C channel k is CH_I2C0 + k
  localparam logic [7:0] CH_I2C15     = 8'h12;
  localparam logic [7:0] CH_ADC       = 8'h14;

  // ---------------------------------------------- controller commands
  localparam logic [7:0] CMD_W_CRB    = 8'h02;
  localparam logic [7:0] CMD_R_CRB    = 8'h03;
  localparam logic [7:0] CMD_W_CRC    = 8'h04;
  localparam logic [7:0] CMD_R_CRC    = 8'h05;
  localparam logic [7:0] CMD_W_CRD    = 8'h06;
  localparam logic [7:0] CMD_R_CRD    = 8'h07;
  localparam logic [7:0] CMD_R_ID     = 8'hD1; // chip ID, on the ADC channel

  // -------------------------------------------------- I2C commands
  localparam logic [7:0] I2C_W_CTRL   = 8'h30;
  localparam logic [7:0] I2C_R_CTRL   = 8'h31;
  localparam logic [7:0] I2C_R_STR    = 8'h11;
  localparam logic [7:0] I2C_W_DATA0  = 8'h40;
  localparam logic [7:0] I2C_R_DATA0  = 8'h41;
  localparam logic [7:0] I2C_M_10B_W  = 8'hE2;
  localparam logic [7:0] I2C_M_10B_R  = 8'hE6;

  // I2C status register bits
  localparam int unsigned STR_SUCC    = 2;
  localparam int unsigned STR_INVOM   = 5;
  localparam int unsigned STR_NOACK   = 6;

  // reply ERR field bits
  localparam int unsigned ERR_INV_CH  = 1;
  localparam int unsigned ERR_INV_CMD = 2;
  localparam int unsigned ERR_CH_DIS  = 5;

  // ------------------------------------------- HDLC control field codes
  localparam logic [7:0] U_CONNECT    = 8'h2F; // SABM, P bit (bit 4) masked
  localparam logic [7:0] U_RESET      = 8'h8F;
  localparam logic [7:0] U_TEST       = 8'hE3;
  localparam logic [7:0] U_UA         = 8'h63;
  localparam logic [7:0] S_RR         = 8'h01; // receive ready, N(R) in [7:5]
  localparam logic [7:0] REPLY_ADDR   = 8'h00;

  // ------------------------------------------------------------- types
  // Fields of a request frame, as the Deframer presents them on the RX bus.
  typedef struct packed {
    logic [7:0]    addr;
    logic [7:0]    ctrl;
    logic [7:0]    trid;
    logic [7:0]    ch;
    logic [7:0]    len;
    logic [7:0]    cmd;
    logic [DW-1:0] data;
    logic          info;   // 1: frame carries TRID..data (I-frame)
  } rx_frame_t;

  // A command for one sub-module (controller or I2C channel).
  typedef struct packed {
    logic [7:0]    trid;
    logic [7:0]    ch;
    logic [7:0]    cmd;
    logic [DW-1:0] data;
  } req_t;

  // The answer of a sub-module, as carried on the reply bus.
  typedef struct packed {
    logic [7:0]    trid;
    logic [7:0]    ch;
    logic [7:0]    err;
    logic [7:0]    len;
    logic [DW-1:0] data;
  } rep_t;

  // A frame handed to the Framer.
  typedef struct packed {
    logic [7:0] addr;
    logic [7:0] ctrl;
    logic       info;  // 1: append the rep fields, 0: link-level frame
    rep_t       rep;
  } tx_frame_t;

  // One step of the bit-reversed CRC-16 over a byte (LSB first, as HDLC).
  function automatic logic [15:0] fcs_update(input logic [15:0] crc, input logic [7:0] b);
    logic [15:0] c;
    c = crc;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ b[i]) c = (c >> 1) ^ 16'h8408;
      else             c = c >> 1;
    end
    return c;
  endfunction

  // Running CRC over a whole good frame, FCS included, ends at this value.
  localparam logic [15:0] FCS_GOOD = 16'hF0B8;
  localparam logic [15:0] FCS_INIT = 16'hFFFF;

endpackage
