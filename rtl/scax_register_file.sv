// scax_register_file: the purely combinational switch between one I2C channel
// and the user registers of one block of FPGA logic.
//
// For writes it acts as a demultiplexer: wr_data is presented to all user
// registers in parallel on ufl_wr_data, and the one-cycle wr_en strobe is
// steered to the register selected by addr (ufl_wr_en[addr]); the register
// itself lives in the user logic and loads ufl_wr_data on that strobe. For
// reads it is a multiplexer: rd_data shows ufl_rd_data[addr]. rd_en is
// steered the same way to ufl_rd_en[addr], so that a user FIFO can pop, or
// the SCAX Memory Controller can advance its address, when a register is
// read. addr_ok is low for addresses at or above N_REGS, which have no
// register behind them. Registers narrower than DATA_W leave the upper bits
// of their ufl_rd_data slot at zero.
//
// Timing: there is no register inside. The channel keeps addr and wr_data
// stable for several clocks around its strobes, so every path through this
// block is a multicycle path (see scax_i2c_access). The mux/demux structure,
// the 10-bit address, the 32-bit data and the 1024-register maximum are
// the document's; the read strobe and addr_ok are this design's additions.
module scax_register_file #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned N_REGS = 1024
) (
  // channel side
  input  logic [ADDR_W-1:0]              addr,
  input  logic [DATA_W-1:0]              wr_data,
  input  logic                           wr_en,
  input  logic                           rd_en,
  output logic [DATA_W-1:0]              rd_data,
  output logic                           addr_ok,
  // user logic side
  output logic [DATA_W-1:0]              ufl_wr_data,
  output logic [N_REGS-1:0]              ufl_wr_en,
  output logic [N_REGS-1:0]              ufl_rd_en,
  input  logic [N_REGS-1:0][DATA_W-1:0]  ufl_rd_data
);

  logic [N_REGS-1:0] hit;

  assign ufl_wr_data = wr_data;
  assign addr_ok     = ({1'b0, addr} < (ADDR_W+1)'(N_REGS));

  always_comb begin
    for (int i = 0; i < N_REGS; i++) hit[i] = (addr == ADDR_W'(i));
  end

  assign ufl_wr_en = wr_en ? hit : '0;
  assign ufl_rd_en = rd_en ? hit : '0;
  assign rd_data   = addr_ok ? ufl_rd_data[addr] : '0;

endmodule
