// sba -- selected-bin adder.
//
// The last step of integrating one histogram: every bin b of the incoming
// vector passes through unchanged except the bin selected by the entering
// pixel, which gains add_val, and the bin selected by the leaving pixel, which
// loses sub_val. When both pixels fall into the same bin both corrections
// apply. Each bin has its own comparator and adder, so all NB bins are updated
// in the same cycle, as the range-parallel histogram engines need.
//
// In the pixel-count engine the values are the constant 1; in the
// pixel-intensity engine they are the source pixels J. A pixel outside the
// frame is turned off with its enable. Arithmetic is modulo 2^W, as the
// integral histograms only ever need correct differences.
//
// Purely combinational. The comparator-and-adder per bin follows the
// document's description; the enables are this design's way of handling the
// frame border.
module sba #(
  parameter int unsigned NB = 64,   // number of bins
  parameter int unsigned W  = 12,   // bin width
  parameter int unsigned VW = 8     // width of the added/subtracted value
) (
  input  logic [NB-1:0][W-1:0]    hist_in,
  input  logic                    add_en,
  input  logic [$clog2(NB)-1:0]   add_bin,
  input  logic [VW-1:0]           add_val,
  input  logic                    sub_en,
  input  logic [$clog2(NB)-1:0]   sub_bin,
  input  logic [VW-1:0]           sub_val,
  output logic [NB-1:0][W-1:0]    hist_out
);

  always_comb begin
    for (int unsigned b = 0; b < NB; b++) begin
      logic [W-1:0] plus, minus;
      plus  = (add_en && add_bin == b[$clog2(NB)-1:0]) ? W'(add_val) : '0;
      minus = (sub_en && sub_bin == b[$clog2(NB)-1:0]) ? W'(sub_val) : '0;
      hist_out[b] = hist_in[b] + plus - minus;
    end
  end

endmodule
