// tb_jbf_workloads -- the smaller evaluated frame sizes on the default build.
//
// The design built for frames up to 1920 x 1080 filters a VGA frame
// (640 x 480) and then an HD720p frame (1280 x 720), set at run time, back to
// back. For each frame the cycle count must match the schedule, ceil(W/60)
// stripes x (H + 15) rows x 96 cycles, plus at most 2 % for bus stalls, and
// output pixels on a sparse grid and along all four borders and across the
// stripe seams are compared with a brute-force joint bilateral filter.
module tb_jbf_workloads;
  import jbf_ref_pkg::*;

  int W = 640;
  int H = 480;
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
        if (rr >= 0 && rr < H && cc >= 0 && cc < W) begin
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(int fw, int fh);
    longint t0, t1, slots;
    W = fw;
    H = fh;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int g;
        g = (c * 255) / W;
        if (((r / 120) + (c / 160)) % 2 == 1) g = 255 - g;
        u_mem.mem[BASE_I + r * W + c] = 8'(g + int'($urandom % 9) - 4);
        u_mem.mem[BASE_J + r * W + c] = 8'(g / 2 + int'($urandom % 101));
      end

    @(posedge clk);
    start <= 1'b1;
    t0 = cycles;
    @(posedge clk);
    start <= 1'b0;
    wait (done);
    t1 = cycles;
    @(posedge clk);

    // rate: ceil(W/60) stripes x (H + 15) rows x 96 cycles, plus at most 2 %
    slots = 64'(((W + 59) / 60) * (H + int'(HALF)) * 96);
    checks++;
    if (t1 - t0 < slots || t1 - t0 > slots + slots / 50) begin
      failures++;
      $display("frame took %0d cycles, expected about %0d", t1 - t0, slots);
    end
    $display("%0dx%0d frame cycles=%0d (schedule %0d)", W, H, t1 - t0, slots);

    for (int r = 0; r < H; r += 7)
      for (int c = (r % 13); c < W; c += 13) check_pixel(r, c);
    for (int c = 0; c < W; c++) begin
      check_pixel(0, c);
      check_pixel(H - 1, c);
    end
    for (int r = 0; r < H; r++) begin
      check_pixel(r, 0);
      check_pixel(r, W - 1);
      check_pixel(r, 59);
      check_pixel(r, 60);
    end

  endtask

  initial begin
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
    run_frame(640, 480);
    run_frame(1280, 720);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
