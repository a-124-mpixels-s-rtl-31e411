// tb_jbf_top_full -- one full HD1080p frame through the filter at its default
// sizes (1920 x 1080, 31 x 31 window, 60-pixel stripes, 64 bins).
//
// Guidance and source images are generated here (smooth gradients, a few
// edges and noise). The memory grants every request, so the run shows the
// design's own rate: the check is that the frame takes 32 stripes x 1095 rows
// x 96 cycles plus only the few stall cycles the bus causes at tile starts.
// Output pixels on a sparse grid, and every pixel of the frame's border rows
// and columns, are compared with a brute-force joint bilateral filter.
module tb_jbf_top_full;
  import jbf_ref_pkg::*;

  localparam int unsigned W      = 1920;
  localparam int unsigned H      = 1080;
  localparam int unsigned HALF   = 15;
  localparam int unsigned BASE_I = 32'h0000_0000;
  localparam int unsigned BASE_J = 32'h0020_0000;
  localparam int unsigned BASE_O = 32'h0040_0000;
  localparam real         SIGMA  = 20.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done;
  logic tbl_wr_en = 1'b0;
  logic [4:0] tbl_wr_addr = '0;
  logic [9:0] tbl_wr_data = '0;
  logic bus_req, bus_we, bus_gnt;
  logic [31:0] bus_addr;
  logic [7:0]  bus_be;
  logic [63:0] bus_wdata, bus_rdata;

  always #5 clk = ~clk;

  jbf_top dut (
    .clk, .rst_n, .start, .busy, .done, .img_w(11'(W)), .img_h(11'(H)),
    .base_i(BASE_I), .base_j(BASE_J), .base_o(BASE_O),
    .tbl_wr_en, .tbl_wr_addr, .tbl_wr_data,
    .bus_req, .bus_we, .bus_addr, .bus_be, .bus_gnt, .bus_wdata, .bus_rdata
  );

  offchip_mem_model #(.MEM_BYTES(1 << 23), .GNT_PCT(100)) u_mem (
    .clk, .bus_req, .bus_we, .bus_addr, .bus_be, .bus_gnt, .bus_wdata, .bus_rdata
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  function automatic logic [7:0] pix_i(int r, int c);
    return u_mem.mem[BASE_I + r * W + c];
  endfunction
  function automatic logic [7:0] pix_j(int r, int c);
    return u_mem.mem[BASE_J + r * W + c];
  endfunction

  function automatic int unsigned ref_pixel(int r, int c);
    longint unsigned hc [64];
    longint unsigned hi [64];
    longint unsigned nu = 0, de = 0;
    int bc = pix_i(r, c) >> 2;
    for (int b = 0; b < 64; b++) begin hc[b] = 0; hi[b] = 0; end
    for (int rr = r - int'(HALF); rr <= r + int'(HALF); rr++)
      for (int cc = c - int'(HALF); cc <= c + int'(HALF); cc++)
        if (rr >= 0 && rr < int'(H) && cc >= 0 && cc < int'(W)) begin
          hc[pix_i(rr, cc) >> 2] += 1;
          hi[pix_i(rr, cc) >> 2] += pix_j(rr, cc);
        end
    for (int b = 0; b < 64; b++) begin
      de += range_weight(bc - b, SIGMA) * hc[b];
      nu += range_weight(bc - b, SIGMA) * hi[b];
    end
    return div_round(nu, de);
  endfunction

  function automatic void check_pixel(int r, int c);
    int unsigned exp_v, got;
    exp_v = ref_pixel(r, c);
    got   = u_mem.mem[BASE_O + r * W + c];
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("pixel (%0d,%0d): got %0d expected %0d", r, c, got, exp_v);
    end
  endfunction

  // watchdog
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1, slots;
    for (int r = 0; r < int'(H); r++)
      for (int c = 0; c < int'(W); c++) begin
        int g;
        g = (c * 255) / int'(W);
        if (((r / 120) + (c / 160)) % 2 == 1) g = 255 - g;
        u_mem.mem[BASE_I + r * W + c] = 8'(g + int'($urandom % 9) - 4);
        u_mem.mem[BASE_J + r * W + c] = 8'(g / 2 + int'($urandom % 101));
      end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int d = 0; d < 32; d++) begin
      tbl_wr_en   <= 1'b1;
      tbl_wr_addr <= 5'(d);
      tbl_wr_data <= 10'(range_weight(d, SIGMA));
      @(posedge clk);
    end
    tbl_wr_en <= 1'b0;
    @(posedge clk);
    start <= 1'b1;
    t0 = cycles;
    @(posedge clk);
    start <= 1'b0;
    wait (done);
    t1 = cycles;
    @(posedge clk);

    // rate: 32 stripes x (1080 + 15) rows x 96 cycles, plus at most 2 %
    slots = 64'(32 * (H + HALF) * 96);
    checks++;
    if (t1 - t0 < slots || t1 - t0 > slots + slots / 50) begin
      failures++;
      $display("frame took %0d cycles, expected about %0d", t1 - t0, slots);
    end
    $display("frame cycles=%0d (schedule %0d)", t1 - t0, slots);

    for (int r = 0; r < int'(H); r += 7)
      for (int c = (r % 13); c < int'(W); c += 13) check_pixel(r, c);
    for (int c = 0; c < int'(W); c++) begin
      check_pixel(0, c);
      check_pixel(int'(H) - 1, c);
    end
    for (int r = 0; r < int'(H); r++) begin
      check_pixel(r, 0);
      check_pixel(r, int'(W) - 1);
      check_pixel(r, 59);
      check_pixel(r, 60);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
