// scax_cdc_fifo: dual-clock FIFO that carries the transactions of an I2C
// channel in "CDC mode" between the SCAX core clock and the clock of the
// user registers.
//
// Classic asynchronous FIFO: binary read and write pointers one bit wider
// than the address, exchanged between the two domains in Gray code through
// two-flop synchronisers. The write side sees `full`, the read side `empty`;
// both flags are pessimistic by the synchroniser delay (two clocks of the
// observing domain plus one). The read side is show-ahead: rd_data is the
// oldest entry whenever empty is low, and rd_en removes it. Writes to a full
// FIFO and reads from an empty one are ignored.
//
// The document specifies that two CDC FIFOs, one for each direction, are
// placed in a channel in CDC mode; their structure and DEPTH are this
// design's choice.
module scax_cdc_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4      // power of two, at least 4
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin_q, rbin_q, wgray_q, rgray_q;
  logic [AW:0] rgray_s1, rgray_s2, wgray_s1, wgray_s2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ------------------------------------------------------------ write side
  assign full   = (wgray_q == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
  assign wbin_n = wbin_q + (AW+1)'(wr_en && !full);

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wbin_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin_q   <= '0;
      wgray_q  <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      wbin_q   <= wbin_n;
      wgray_q  <= bin2gray(wbin_n);
      rgray_s1 <= rgray_q;
      rgray_s2 <= rgray_s1;
    end
  end

  // ------------------------------------------------------------- read side
  assign empty   = (rgray_q == wgray_s2);
  assign rbin_n  = rbin_q + (AW+1)'(rd_en && !empty);
  assign rd_data = mem[rbin_q[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin_q   <= '0;
      rgray_q  <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      rbin_q   <= rbin_n;
      rgray_q  <= bin2gray(rbin_n);
      wgray_s1 <= wgray_q;
      wgray_s2 <= wgray_s1;
    end
  end

endmodule
