// convolution_engine -- kernel calculation, 1-D convolution and normalisation.
//
// Takes the two window histograms of one target pixel, the pixel count hc and
// the intensity sum hi of the source image, together with the target's
// guidance intensity I_c, and produces the filtered pixel
//     result = sum_b G(b) * hi(b)  /  sum_b G(b) * hc(b)
// with G(b) the range weight for the bin distance between I_c and bin b.
//
// All NB bins are handled in parallel: the table-selection logic reads every
// bin's weight from the one shared range table, 2 x NB multipliers form the
// products, and two adder trees sum them into the numerator Nu and the
// denominator De. A divider gives the 8-bit result.
//
// Timing: one pixel per enabled cycle. Stage 1 (weights, products and sums)
// is registered, stage 2 divides and registers the result, so out_valid and
// out_pix follow in_valid by 2 + PIPE enabled cycles. With PIPE = 1 a further
// register cuts both adder trees after the partial sums of four groups of
// bins, for a faster clock. These registers sit on cut lines of the datapath;
// the document names such cut lines as the way to raise the clock rate (from
// 100 to 200 MHz) without saying where they are, so their places are this
// design's choice. The range table is written through wr_en / wr_addr /
// wr_data.
module convolution_engine #(
  parameter int unsigned NB    = 64,
  parameter int unsigned WC    = 12,   // pixel-count bin width
  parameter int unsigned WI    = 20,   // intensity-sum bin width
  parameter int unsigned G_W   = 10,   // range weight width
  parameter int unsigned TBL_N = 32,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned PIPE  = 0     // 1: extra register inside the adder trees
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  // range table write port
  input  logic                       tbl_wr_en,
  input  logic [$clog2(TBL_N)-1:0]   tbl_wr_addr,
  input  logic [G_W-1:0]             tbl_wr_data,
  // one target pixel per cycle
  input  logic                       in_valid,
  input  logic [PIX_W-1:0]           in_ic,
  input  logic [NB-1:0][WC-1:0]      in_hc,
  input  logic [NB-1:0][WI-1:0]      in_hi,
  output logic                       out_valid,
  output logic [PIX_W-1:0]           out_pix
);

  localparam int unsigned BW   = $clog2(NB);
  localparam int unsigned DE_W = G_W + WC + BW;
  localparam int unsigned NU_W = G_W + WI + BW;

  logic [TBL_N-1:0][G_W-1:0] tbl;
  logic [NB-1:0][G_W-1:0]    weight;

  range_table #(.TBL_N(TBL_N), .G_W(G_W)) u_table (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (tbl_wr_en),
    .wr_addr   (tbl_wr_addr),
    .wr_data   (tbl_wr_data),
    .table_out (tbl)
  );

  table_selection #(.NB(NB), .TBL_N(TBL_N), .G_W(G_W)) u_select (
    .table_in (tbl),
    .bin_c    (in_ic[PIX_W-1 -: BW]),
    .weight   (weight)
  );

  // stage 1: products and adder trees, first as partial sums over NG groups
  localparam int unsigned NG = (NB % 4 == 0) ? 4 : 1;
  localparam int unsigned GS = NB / NG;

  logic [NG-1:0][DE_W-1:0] de_g, de_gq;
  logic [NG-1:0][NU_W-1:0] nu_g, nu_gq;
  logic                    v0;

  always_comb begin
    de_g = '0;
    nu_g = '0;
    for (int unsigned g = 0; g < NG; g++)
      for (int unsigned k = 0; k < GS; k++) begin
        de_g[g] += DE_W'(weight[g*GS+k]) * DE_W'(in_hc[g*GS+k]);
        nu_g[g] += NU_W'(weight[g*GS+k]) * NU_W'(in_hi[g*GS+k]);
      end
  end

  if (PIPE != 0) begin : g_cut
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v0    <= 1'b0;
        de_gq <= '0;
        nu_gq <= '0;
      end else if (en) begin
        v0 <= in_valid;
        if (in_valid) begin
          de_gq <= de_g;
          nu_gq <= nu_g;
        end
      end
    end
  end else begin : g_direct
    assign v0    = in_valid;
    assign de_gq = de_g;
    assign nu_gq = nu_g;
  end

  logic [DE_W-1:0] de_sum;
  logic [NU_W-1:0] nu_sum;

  always_comb begin
    de_sum = '0;
    nu_sum = '0;
    for (int unsigned g = 0; g < NG; g++) begin
      de_sum += de_gq[g];
      nu_sum += nu_gq[g];
    end
  end

  logic            v1;
  logic [DE_W-1:0] de_q;
  logic [NU_W-1:0] nu_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      de_q <= '0;
      nu_q <= '0;
    end else if (en) begin
      v1 <= v0;
      if (v0) begin
        de_q <= de_sum;
        nu_q <= nu_sum;
      end
    end
  end

  // stage 2: normalisation
  logic [PIX_W-1:0] quot;

  quotient_divider #(.NU_W(NU_W), .DE_W(DE_W), .Q_W(PIX_W)) u_div (
    .nu (nu_q),
    .de (de_q),
    .q  (quot)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else if (en) begin
      out_valid <= v1;
      if (v1) out_pix <= quot;
    end
  end

endmodule
