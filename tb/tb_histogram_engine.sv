// tb_histogram_engine -- integration and extraction against brute force.
//
// A small stripe (window 5, extended width 12, 16 slots per row with 4
// bubbles) of random pixels is fed column by column, row by row, as the
// intensity engine (8-bit values, 20-bit bins). Pixels in the two leftmost
// columns and below row HIMG count as outside the frame. en is dropped at
// random. Every extracted window histogram is compared, bin by bin, with one
// summed directly from the pixels of its 5 x 5 window; the number of
// histograms must match the number of windows asked for.
module tb_histogram_engine;
  localparam int unsigned NB = 64, W = 20, VW = 8, SWIN = 5, EXT = 12, NX = 16;
  localparam int unsigned ROWS = 14, HIMG = 11;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic in_valid = 1'b0, in_first_row = 1'b0, in_extract = 1'b0;
  logic [3:0] in_x = '0;
  logic add_en = 1'b0, sub_en = 1'b0;
  logic [5:0] add_bin = '0, sub_bin = '0;
  logic [VW-1:0] add_val = '0, sub_val = '0;
  logic out_valid;
  logic [NB-1:0][W-1:0] hist_out;

  always #5 clk = ~clk;

  histogram_engine #(.NB(NB), .W(W), .VW(VW), .SW(SWIN), .EXT(EXT)) dut (
    .clk, .rst_n, .en, .in_valid, .in_x, .in_first_row, .in_extract,
    .add_en, .add_bin, .add_val, .sub_en, .sub_bin, .sub_val, .out_valid, .hist_out
  );

  logic [5:0] pbin [ROWS][EXT];
  logic [7:0] pval [ROWS][EXT];
  typedef logic [NB-1:0][W-1:0] hist_t;
  hist_t expq [$];
  int checks = 0, failures = 0, asked = 0, got = 0;

  function automatic bit inframe(int x, int y);
    return x >= 2 && y >= 0 && y < int'(HIMG);
  endfunction

  always @(posedge clk) if (rst_n && en && out_valid) begin
    hist_t e;
    got++;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected histogram");
    end else begin
      e = expq.pop_front();
      if (hist_out !== e) begin
        failures++;
        if (failures < 10) $display("histogram %0d differs", got);
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < int'(ROWS); y++)
      for (int x = 0; x < int'(EXT); x++) begin
        pbin[y][x] = 6'($urandom % 6);
        pval[y][x] = 8'($urandom);
      end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int y = 0; y < int'(ROWS); y++)
      for (int x = 0; x < int'(NX); x++) begin
        bit v;
        v = x < int'(EXT);
        in_valid     <= v;
        in_x         <= 4'(x);
        in_first_row <= (y == 0);
        in_extract   <= v && x >= int'(SWIN) - 1;
        add_en       <= v && inframe(x, y);
        sub_en       <= v && inframe(x, y - int'(SWIN));
        add_bin      <= v ? pbin[y][x] : '0;
        add_val      <= v ? pval[y][x] : '0;
        sub_bin      <= (v && y >= int'(SWIN)) ? pbin[y - SWIN][x] : '0;
        sub_val      <= (v && y >= int'(SWIN)) ? pval[y - SWIN][x] : '0;
        if (v && x >= int'(SWIN) - 1) begin
          hist_t e;
          e = '0;
          for (int yy = y - int'(SWIN) + 1; yy <= y; yy++)
            for (int xx = x - int'(SWIN) + 1; xx <= x; xx++)
              if (inframe(xx, yy)) e[pbin[yy][xx]] += W'(pval[yy][xx]);
          expq.push_back(e);
          asked++;
        end
        // hold this slot for a random number of stalled cycles
        en <= 1'b0;
        while ($urandom % 4 == 0) @(posedge clk);
        en <= 1'b1;
        @(posedge clk);
      end
    in_valid <= 1'b0; in_extract <= 1'b0; add_en <= 1'b0; sub_en <= 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (got != asked) begin
      failures++;
      $display("%0d histograms for %0d windows", got, asked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
