// table_selection -- range weight of every bin from the one shared table.
//
// For the target pixel's bin bc and each histogram bin b, the weight is
// G(|bc - b|): the absolute bin distance (the symmetry of the Gaussian) picks
// the table entry, and distances beyond the table (truncation) give 0. One
// multiplexer per bin reads the shared table, so the NB parallel multipliers
// of the convolution engine need only one table instead of NB copies.
//
// Purely combinational. Sharing one table through per-bin selection is the
// document's; measuring the distance in bins is this design's reading of it.
module table_selection #(
  parameter int unsigned NB    = 64,
  parameter int unsigned TBL_N = 32,
  parameter int unsigned G_W   = 10
) (
  input  logic [TBL_N-1:0][G_W-1:0]  table_in,
  input  logic [$clog2(NB)-1:0]      bin_c,
  output logic [NB-1:0][G_W-1:0]     weight
);

  localparam int unsigned BW = $clog2(NB);

  always_comb begin
    for (int unsigned b = 0; b < NB; b++) begin
      logic [BW-1:0] bdist;
      bdist = (bin_c >= BW'(b)) ? bin_c - BW'(b) : BW'(b) - bin_c;
      weight[b] = (32'(bdist) < TBL_N) ? table_in[bdist[$clog2(TBL_N)-1:0]] : '0;
    end
  end

endmodule
