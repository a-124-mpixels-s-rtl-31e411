// histogram_engine -- integration and extraction of one histogram per cycle.
//
// Works one column x of the extended stripe per cycle, on stripe row y. With
// the sliding origin, IH(x,y) is the histogram of the band of the last SW rows
// (y-SW+1 .. y) over columns 0..x. Integration computes
//     S = D + S' - D' - Bin(Q) + Bin(S_pixel)
// where D = IH(x-1,y), S' = IH(x,y-1), D' = IH(x-1,y-1), Q is the pixel at
// (x, y-SW) leaving the band and S_pixel the pixel at (x,y) entering it.
// Extraction then gives the histogram of the SW x SW window whose lower-right
// corner is (x,y):  h = S - R, with R = IH(x-SW,y), or 0 when x-SW < 0.
//
// S' and R come from the one-line IH memory; D and D' are the previous
// cycle's S and S', kept in two delay registers (the delay-buffer method), so
// only three histograms cross the memory port per cycle. On the first row of
// a stripe S' and D' are taken as zero, which both clears the memory and
// handles the top of the frame; at x = 0, D and D' are zero.
//
// The same module serves as the pixel-count engine (values 1, W = 12) and the
// pixel-intensity engine (values J, W = 20). All NB bins are computed in
// parallel (range-domain parallelism), through the selected-bin adder.
//
// Timing: inputs are taken in the cycle en is high; the extracted histogram
// appears two enabled cycles later on hist_out with out_valid. Stage 1 reads
// the memory, stage 2 adds, writes S back and subtracts R. Everything holds
// while en is low. The dataflow is the document's; the pipeline split, the
// stall enable and the zero-forcing flags are this design's choices.
module histogram_engine #(
  parameter int unsigned NB  = 64,   // bins
  parameter int unsigned W   = 12,   // bin width of the stored IH
  parameter int unsigned VW  = 1,    // width of the integrated value
  parameter int unsigned SW  = 31,   // filter window width
  parameter int unsigned EXT = 90    // extended stripe width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  // one column per cycle
  input  logic                     in_valid,    // a real column (not a bubble)
  input  logic [$clog2(EXT)-1:0]   in_x,        // column in the extended stripe
  input  logic                     in_first_row,// first row of the stripe
  input  logic                     in_extract,  // this column's window is wanted
  input  logic                     add_en,      // entering pixel lies in the frame
  input  logic [$clog2(NB)-1:0]    add_bin,
  input  logic [VW-1:0]            add_val,
  input  logic                     sub_en,      // leaving pixel lies in the frame
  input  logic [$clog2(NB)-1:0]    sub_bin,
  input  logic [VW-1:0]            sub_val,
  // extracted window histogram
  output logic                     out_valid,
  output logic [NB-1:0][W-1:0]     hist_out
);

  localparam int unsigned XW = $clog2(EXT);
  typedef logic [NB-1:0][W-1:0] hist_t;

  // ---------------- stage 1: memory read ----------------
  logic                  v1, first1, ext1, rzero1, add_en1, sub_en1;
  logic [XW-1:0]         x1;
  logic [$clog2(NB)-1:0] add_bin1, sub_bin1;
  logic [VW-1:0]         add_val1, sub_val1;
  hist_t                 sp_raw, r_raw;
  logic [XW-1:0]         ra_r;

  assign ra_r = (in_x >= XW'(SW)) ? in_x - XW'(SW) : '0;

  logic                  we;
  hist_t                 ih_s;

  ih_line_buffer #(.DEPTH(EXT), .DW(NB*W)) u_mem (
    .clk (clk),
    .en  (en),
    .ra0 (in_x),
    .rd0 (sp_raw),
    .ra1 (ra_r),
    .rd1 (r_raw),
    .we  (we),
    .wa  (x1),
    .wd  (ih_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; first1 <= 1'b0; ext1 <= 1'b0; rzero1 <= 1'b1;
      x1 <= '0; add_en1 <= 1'b0; sub_en1 <= 1'b0;
      add_bin1 <= '0; sub_bin1 <= '0; add_val1 <= '0; sub_val1 <= '0;
    end else if (en) begin
      v1       <= in_valid;
      first1   <= in_first_row;
      ext1     <= in_valid && in_extract;
      rzero1   <= (in_x < XW'(SW));
      x1       <= in_x;
      add_en1  <= in_valid && add_en;
      sub_en1  <= in_valid && sub_en;
      add_bin1 <= add_bin;
      sub_bin1 <= sub_bin;
      add_val1 <= add_val;
      sub_val1 <= sub_val;
    end
  end

  // ---------------- stage 2: integrate, write back, extract ----------------
  hist_t d_q, dp_q;           // delay buffers: S and S' of the previous column
  hist_t sp, d, dp, r, partial, hist_x;

  always_comb begin
    sp = first1 ? '0 : sp_raw;
    d  = (x1 == '0) ? '0 : d_q;
    dp = (x1 == '0) ? '0 : dp_q;
    r  = rzero1 ? '0 : r_raw;
    for (int unsigned b = 0; b < NB; b++)
      partial[b] = d[b] + sp[b] - dp[b];
  end

  sba #(.NB(NB), .W(W), .VW(VW)) u_sba (
    .hist_in  (partial),
    .add_en   (add_en1),
    .add_bin  (add_bin1),
    .add_val  (add_val1),
    .sub_en   (sub_en1),
    .sub_bin  (sub_bin1),
    .sub_val  (sub_val1),
    .hist_out (ih_s)
  );

  assign we = en && v1;

  always_comb
    for (int unsigned b = 0; b < NB; b++)
      hist_x[b] = ih_s[b] - r[b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q       <= '0;
      dp_q      <= '0;
      out_valid <= 1'b0;
      hist_out  <= '0;
    end else if (en) begin
      if (v1) begin
        d_q  <= ih_s;
        dp_q <= sp;
      end
      out_valid <= ext1;
      if (ext1) hist_out <= hist_x;
    end
  end

endmodule
