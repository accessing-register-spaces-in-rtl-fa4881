// scax_mem_ctrl: the SCAX Memory Controller (SMC), an add-on that lets the
// back-end read and write a RAM through two slots of a Register File while
// sending as few transactions as possible.
//
// Two user-register slots are attached to it. Writing the ADDRESS slot loads
// the RAM address pointer (reading it returns the pointer). Writing the DATA
// slot writes the word into the RAM at the pointer; reading the DATA slot
// returns the RAM word at the pointer. Each DATA write or read then advances
// the pointer by one (wrapping at 2^RAM_AW), so a block of consecutive words
// needs one address write followed by one transaction per word.
//
// RAM port: ram_addr is the pointer, held in a register; the RAM is expected
// to have a one-clock synchronous read (a block RAM), so data_rd_data is
// valid one clock after the pointer changes. That is always met: the
// channel holds an address for several clocks before it samples. A write
// is ram_we for one clock with ram_wdata = wr_data. The slot strobes are the
// one-clock ufl_wr_en/ufl_rd_en pulses of the Register File.
//
// The pointer loaded through the Register File and its auto-increment on
// each read or write are the document's; RAM_AW and the slot layout are
// this design's choices.
module scax_mem_ctrl #(
  parameter int unsigned RAM_AW = 10,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // register file slots
  input  logic [DATA_W-1:0] wr_data,
  input  logic              addr_wr_en,
  output logic [DATA_W-1:0] addr_rd_data,
  input  logic              data_wr_en,
  input  logic              data_rd_en,
  output logic [DATA_W-1:0] data_rd_data,
  // RAM port
  output logic [RAM_AW-1:0] ram_addr,
  output logic              ram_we,
  output logic [DATA_W-1:0] ram_wdata,
  input  logic [DATA_W-1:0] ram_rdata
);

  logic [RAM_AW-1:0] ptr_q;

  assign ram_addr     = ptr_q;
  assign ram_we       = data_wr_en;
  assign ram_wdata    = wr_data;
  assign data_rd_data = ram_rdata;
  assign addr_rd_data = DATA_W'(ptr_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        ptr_q <= '0;
    else if (addr_wr_en)               ptr_q <= wr_data[RAM_AW-1:0];
    else if (data_wr_en || data_rd_en) ptr_q <= ptr_q + 1'b1;
  end

endmodule
