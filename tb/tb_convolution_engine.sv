// tb_convolution_engine -- weighting, sums and division of one target pixel.
//
// A Gaussian table is loaded through the write port, then random histogram
// pairs (hi consistent with hc: each counted pixel contributes 0..255) with
// random target intensities are fed, with en dropped at random, to two
// engines side by side: one built without and one with the extra adder-tree
// register (PIPE = 0 and 1). Each result must equal round(sum G hi / sum G hc)
// from a model, arrive 2 + PIPE enabled cycles after its input, and the
// results must come in order, one per input.
module tb_convolution_engine;
  import jbf_ref_pkg::*;
  localparam int unsigned NB = 64, WC = 12, WI = 20;
  localparam real SIGMA = 30.0;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic tbl_wr_en = 1'b0;
  logic [4:0] tbl_wr_addr = '0;
  logic [9:0] tbl_wr_data = '0;
  logic in_valid = 1'b0;
  logic [7:0] in_ic = '0;
  logic [NB-1:0][WC-1:0] in_hc = '0;
  logic [NB-1:0][WI-1:0] in_hi = '0;
  logic [1:0] out_valid;
  logic [1:0][7:0] out_pix;
  int expq0 [$], expq1 [$];
  int checks = 0, failures = 0;
  int recv [2] = '{0, 0};

  always #5 clk = ~clk;

  convolution_engine #(.NB(NB), .WC(WC), .WI(WI), .G_W(10), .TBL_N(32), .PIX_W(8), .PIPE(0)) dut0 (
    .clk, .rst_n, .en, .tbl_wr_en, .tbl_wr_addr, .tbl_wr_data,
    .in_valid, .in_ic, .in_hc, .in_hi, .out_valid(out_valid[0]), .out_pix(out_pix[0])
  );

  convolution_engine #(.NB(NB), .WC(WC), .WI(WI), .G_W(10), .TBL_N(32), .PIX_W(8), .PIPE(1)) dut1 (
    .clk, .rst_n, .en, .tbl_wr_en, .tbl_wr_addr, .tbl_wr_data,
    .in_valid, .in_ic, .in_hc, .in_hi, .out_valid(out_valid[1]), .out_pix(out_pix[1])
  );

  // latency in enabled cycles, measured on a lone pixel
  int lat_count = -1;
  int lat_seen [2] = '{-1, -1};
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++)
      if (en && out_valid[p]) begin
        int e;
        if (lat_seen[p] < 0) lat_seen[p] = lat_count;
        recv[p]++;
        checks++;
        if ((p == 0 ? expq0.size() : expq1.size()) == 0) begin
          failures++; $display("engine %0d: unexpected result", p);
        end else begin
          e = (p == 0) ? expq0.pop_front() : expq1.pop_front();
          if (int'(out_pix[p]) != e) begin
            failures++;
            if (failures < 10) $display("engine %0d result %0d: got %0d expected %0d", p, recv[p], out_pix[p], e);
          end
        end
      end
    if (en && lat_count >= 0) lat_count++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_pixel();
    longint unsigned nu = 0, de = 0;
    int bc;
    in_ic = 8'($urandom);
    bc = int'(in_ic) >> 2;
    for (int b = 0; b < int'(NB); b++) begin
      int cnt, sum;
      cnt = (($urandom % 3) == 0) ? int'($urandom % 40) : 0;
      sum = 0;
      for (int k = 0; k < cnt; k++) sum += int'($urandom % 256);
      in_hc[b] = WC'(cnt);
      in_hi[b] = WI'(sum);
      de += range_weight(bc - b, SIGMA) * longint'(cnt);
      nu += range_weight(bc - b, SIGMA) * longint'(sum);
    end
    expq0.push_back(div_round(nu, de));
    expq1.push_back(div_round(nu, de));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int d = 0; d < 32; d++) begin
      @(negedge clk);
      tbl_wr_en = 1'b1; tbl_wr_addr = 5'(d); tbl_wr_data = 10'(range_weight(d, SIGMA));
    end
    @(negedge clk);
    tbl_wr_en = 1'b0;
    // one lone pixel to measure the latency
    make_pixel();
    in_valid = 1'b1;
    @(posedge clk);
    lat_count = 0;
    @(negedge clk);
    in_valid = 1'b0;
    wait (out_valid[1]);
    @(negedge clk);
    @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (lat_seen[p] != 2 + p) begin
        failures++; $display("engine %0d: latency %0d, expected %0d", p, lat_seen[p], 2 + p);
      end
    end
    // a stream with random stalls
    for (int n = 0; n < 300; n++) begin
      make_pixel();
      in_valid = 1'b1;
      en = 1'b1;
      @(negedge clk);
      while ($urandom % 4 == 0) begin
        en = 1'b0;
        @(negedge clk);
      end
      en = 1'b1;
    end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (recv[p] != 301) begin failures++; $display("engine %0d: %0d results for 301 pixels", p, recv[p]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
