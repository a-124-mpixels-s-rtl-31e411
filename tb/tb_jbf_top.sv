// tb_jbf_top -- end-to-end test of the joint bilateral filter.
//
// A reduced frame (100 x 40 pixels, so one full and one partial stripe, with
// the default 31 x 31 window and 60-pixel stripes) is filtered through the
// whole design: random guidance and source images with a few flat regions
// and edges, a Gaussian range table, and an off-chip memory that grants the
// bus in 80 % of the cycles and now and then not at all for up to 40 cycles,
// so that both kinds of stall occur. Every output
// pixel is compared with a brute-force joint bilateral filter computed here,
// over the same 64-bin histogram with frame-clipped windows. The cycle count
// per stripe row (96 slots) is checked against the scheduler, and each
// mechanism of the design is counted and must occur: input-FIFO stalls,
// output-FIFO stalls, bubble slots, first rows, pixels masked at the frame
// border, partial output words and bus grants to all six requesters.
module tb_jbf_top;
  import jbf_ref_pkg::*;

  localparam int unsigned W      = 100;
  localparam int unsigned H      = 40;
  localparam int unsigned SWIN   = 31;
  localparam int unsigned WSTR   = 60;
  localparam int unsigned HALF   = (SWIN - 1) / 2;
  localparam int unsigned BASE_I = 32'h0000_1000;
  localparam int unsigned BASE_J = 32'h0000_3000;
  localparam int unsigned BASE_O = 32'h0000_5000;
  localparam real         SIGMA  = 24.0;

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

  offchip_mem_model #(.MEM_BYTES(1 << 15), .GNT_PCT(80), .OUT_PCT(2), .OUT_LEN(40)) u_mem (
    .clk, .bus_req, .bus_we, .bus_addr, .bus_be, .bus_gnt, .bus_wdata, .bus_rdata
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // mechanism counters
  int n_stall_in = 0, n_stall_out = 0, n_bubble = 0, n_first = 0, n_mask = 0;
  int n_partial = 0, n_slots = 0;
  int n_grant [6] = '{default: 0};
  int row_slots = 0, n_rows = 0, n_bad_rows = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.en && dut.s_busy) begin
      if (dut.sx == 0) begin
        if (row_slots != 0 && row_slots != 96) n_bad_rows++;
        if (row_slots != 0) n_rows++;
        row_slots = 1;
      end else row_slots++;
    end
    if (dut.stall_in)  n_stall_in++;
    if (dut.stall_out) n_stall_out++;
    if (dut.en && dut.s_busy) n_slots++;
    if (dut.en && dut.s_busy && !dut.col_valid) n_bubble++;
    if (dut.en && dut.s_busy && dut.col_valid && dut.first_row) n_first++;
    if (dut.en && dut.s_busy && dut.col_valid && !dut.add_in) n_mask++;
    if (bus_req && bus_gnt && bus_we && bus_be != 8'hFF) n_partial++;
    for (int i = 0; i < 6; i++) if (dut.grant_seen[i]) n_grant[i]++;
  end

  logic [7:0] img_i [H][W];
  logic [7:0] img_j [H][W];

  function automatic int unsigned ref_pixel(int r, int c);
    longint unsigned hc [64];
    longint unsigned hi [64];
    longint unsigned nu = 0, de = 0;
    int bc = img_i[r][c] >> 2;
    for (int b = 0; b < 64; b++) begin hc[b] = 0; hi[b] = 0; end
    for (int rr = r - int'(HALF); rr <= r + int'(HALF); rr++)
      for (int cc = c - int'(HALF); cc <= c + int'(HALF); cc++)
        if (rr >= 0 && rr < int'(H) && cc >= 0 && cc < int'(W)) begin
          hc[img_i[rr][cc] >> 2] += 1;
          hi[img_i[rr][cc] >> 2] += img_j[rr][cc];
        end
    for (int b = 0; b < 64; b++) begin
      de += range_weight(bc - b, SIGMA) * hc[b];
      nu += range_weight(bc - b, SIGMA) * hi[b];
    end
    return div_round(nu, de);
  endfunction

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t1;
    // images: noise on top of a few regions with sharp edges
    for (int r = 0; r < int'(H); r++)
      for (int c = 0; c < int'(W); c++) begin
        int base;
        base = (c < 33) ? 40 : (c < 70) ? 200 : 120;
        if (r > 25) base = 255 - base;
        img_i[r][c] = 8'(base + int'($urandom % 31) - 15);
        img_j[r][c] = 8'(base / 2 + int'($urandom % 61));
        u_mem.mem[BASE_I + r * W + c] = img_i[r][c];
        u_mem.mem[BASE_J + r * W + c] = img_j[r][c];
      end
    for (int a = 0; a < int'(W * H); a++) u_mem.mem[BASE_O + a] = 8'hEE;

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
    @(posedge clk);
    start <= 1'b0;

    wait (done);
    t1 = cycles;
    repeat (4) @(posedge clk);

    for (int r = 0; r < int'(H); r++)
      for (int c = 0; c < int'(W); c++) begin
        int unsigned exp_v, got;
        exp_v = ref_pixel(r, c);
        got   = u_mem.mem[BASE_O + r * W + c];
        checks++;
        if (got != exp_v) begin
          failures++;
          if (failures < 10) $display("pixel (%0d,%0d): got %0d expected %0d", r, c, got, exp_v);
        end
      end

    // every stripe row is 96 slots: 90 columns and 6 bubbles
    checks++;
    if (n_rows != 2 * (H + HALF) - 1 || n_bad_rows != 0) begin
      failures++;
      $display("rows %0d with %0d not 96 slots long", n_rows, n_bad_rows);
    end
    // slot count: stripes x rows x 96
    checks++;
    if (n_slots != 2 * (H + HALF) * 96) begin
      failures++;
      $display("slots %0d, expected %0d", n_slots, 2 * (H + HALF) * 96);
    end

    $display("cycles=%0d slots=%0d stall_in=%0d stall_out=%0d bubbles=%0d first_row=%0d masked=%0d partial_words=%0d",
             t1, n_slots, n_stall_in, n_stall_out, n_bubble, n_first, n_mask, n_partial);
    $display("grants: IS=%0d JS=%0d IQ=%0d JQ=%0d IC=%0d OUT=%0d",
             n_grant[0], n_grant[1], n_grant[2], n_grant[3], n_grant[4], n_grant[5]);
    begin
      int ev [7];
      ev = '{n_stall_in, n_stall_out, n_bubble, n_first, n_mask, n_partial, 0};
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (n_grant[i] == 0) begin failures++; $display("requester %0d never granted", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
