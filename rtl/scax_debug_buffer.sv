// scax_debug_buffer: records the bytes of a frame stream for inspection, as
// one of the two debug buffers placed on the inbound and outbound side of
// the back-end interface.
//
// Every byte that passes the observed stream (valid && ready) while `enable`
// is high is written, with its start- and end-of-frame flags, into a
// circular buffer of DEPTH entries at wr_ptr, which then advances; `wrapped`
// goes high once old entries have been overwritten. The contents can be read
// at any time through a synchronous read port (rd_data one clock after
// rd_addr), which is where a logic analyser or a register file would
// attach. Entries are {sop, eop, byte}.
//
// The document describes one inbound and one outbound buffer storing
// received and generated packets; DEPTH and the circular policy are this
// design's choices.
module scax_debug_buffer #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  // observed stream
  input  logic                     s_valid,
  input  logic                     s_ready,
  input  logic [7:0]               s_data,
  input  logic                     s_sop,
  input  logic                     s_eop,
  // read-out
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [9:0]               rd_data,
  output logic [$clog2(DEPTH)-1:0] wr_ptr,
  output logic                     wrapped
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [9:0] mem [DEPTH];
  logic       wr;

  assign wr = enable && s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (wr) mem[wr_ptr] <= {s_sop, s_eop, s_data};
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      wrapped <= 1'b0;
    end else if (wr) begin
      wr_ptr <= wr_ptr + 1'b1;
      if (wr_ptr == AW'(DEPTH - 1)) wrapped <= 1'b1;
    end
  end

endmodule
