// ih_line_buffer -- on-chip memory for one line of integral histograms.
//
// With the sliding origin, the integral histogram at column x of the current
// stripe row covers the window-high band of rows ending at this row and the
// columns from the left edge of the extended stripe up to x. Only one such
// line, one entry per column of the extended stripe, has to be stored: entry x
// holds the previous row's histogram (S') until the current row overwrites it
// with S, and an entry written earlier in the current row is read back as R,
// the left edge of the filter window, |S| columns later.
//
// Each entry holds all bins of one histogram side by side (NB x W bits), so
// one access moves a whole histogram. Two synchronous read ports (S' and R)
// and one write port (S) serve the three histogram accesses per cycle that
// remain after the delay buffers. Reads are registered and hold their value
// while en is low, so the whole pipeline can stall. The document gives the
// size of this memory and the accesses per cycle; the port arrangement is
// this design's choice. Contents are not reset: every entry is written before
// it is read in a way that matters (the first row of a stripe ignores S').
module ih_line_buffer #(
  parameter int unsigned DEPTH = 90,   // columns of the extended stripe
  parameter int unsigned DW    = 768   // NB x W bits per histogram
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic [$clog2(DEPTH)-1:0] ra0,
  output logic [DW-1:0]            rd0,
  input  logic [$clog2(DEPTH)-1:0] ra1,
  output logic [DW-1:0]            rd1,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wa,
  input  logic [DW-1:0]            wd
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[wa] <= wd;
      rd0 <= mem[ra0];
      rd1 <= mem[ra1];
    end
  end

endmodule
