// range_table -- the single shared range-kernel table.
//
// Holds the range kernel g as TBL_N unsigned integer weights of G_W bits,
// indexed by the distance in bins between the target pixel and a histogram
// bin. A Gaussian is symmetric, so only one side is kept, and it falls to
// nothing a few sigma out, so distances of TBL_N bins or more are taken as
// weight 0 (truncation); that shrinks the table from 256 entries to 32.
// The intended contents are  round(exp(-d^2 / (2 sigma^2)) * 1023)  for a
// distance d measured in intensity steps, 1023 being the scale that fits the
// weights into 10 bits.
//
// The entries are registers written through a simple port (one entry per
// cycle, wr_en/wr_addr/wr_data), so sigma can be chosen at run time; all
// entries are read in parallel by the table-selection logic. Reset clears the
// table. The size and the 10-bit weights are the document's; making the table
// writable instead of a fixed ROM is this design's choice, as the document
// does not give sigma.
module range_table #(
  parameter int unsigned TBL_N = 32,
  parameter int unsigned G_W   = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(TBL_N)-1:0]   wr_addr,
  input  logic [G_W-1:0]             wr_data,
  output logic [TBL_N-1:0][G_W-1:0]  table_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     table_out <= '0;
    else if (wr_en) table_out[wr_addr] <= wr_data;
  end

endmodule
