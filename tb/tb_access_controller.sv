// tb_access_controller -- read streams, write-back and round-robin on the bus.
//
// A 70 x 20 frame (two stripes of 35 rows of 12 tiles) is fetched into five
// modelled input FIFOs that are drained at random, while words put into the
// modelled output FIFO are written back; the memory grants 60 % of requests.
// Checked: every word a stream receives is the 8 bytes at the address its
// stream should read next (tile, then row, then stripe, with its column and
// row offsets and clamped rows; I_c only for tiles 3..11, which hold the
// targets); no FIFO ever overflows; each stream gets exactly its 840 words
// (630 for I_c); every output word lands in memory under its byte
// enables; and whenever all six requesters ask at once the grant goes to the
// one after the last served.
module tb_access_controller;
  localparam int IW = 70, IH = 20, SWIN = 31, WSTR = 60, HALF = 15, TILES = 12;
  localparam int NS = 2, NY = IH + HALF;
  localparam int IC_K0 = (SWIN - 1) / 8;   // I_c starts at the first tile with targets

  function automatic int tiles_of(int st);
    return (st == 4) ? TILES - IC_K0 : TILES;
  endfunction
  localparam int BASE_I = 32'h1000, BASE_J = 32'h4000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [4:0][1:0] in_count;
  logic [4:0] in_push;
  logic [63:0] in_wdata;
  logic out_empty, out_pop;
  logic [103:0] out_entry;
  logic bus_req, bus_we, bus_gnt;
  logic [31:0] bus_addr;
  logic [7:0] bus_be;
  logic [63:0] bus_wdata, bus_rdata;
  logic reads_done, idle;
  logic [5:0] grant_seen;

  always #5 clk = ~clk;

  access_controller #(.IMG_W(IW), .IMG_H(IH), .SW(SWIN), .WS(WSTR), .DEPTH(2)) dut (
    .clk, .rst_n, .start, .img_w(7'(IW)), .img_h(5'(IH)), .base_i(BASE_I), .base_j(BASE_J),
    .in_count, .in_push, .in_wdata, .out_empty, .out_pop, .out_entry,
    .bus_req, .bus_we, .bus_addr, .bus_be, .bus_gnt, .bus_wdata, .bus_rdata,
    .reads_done, .idle, .grant_seen
  );

  offchip_mem_model #(.MEM_BYTES(1 << 16), .GNT_PCT(60)) u_mem (
    .clk, .bus_req, .bus_we, .bus_addr, .bus_be, .bus_gnt, .bus_wdata, .bus_rdata
  );

  int checks = 0, failures = 0;
  int fifo_n [5] = '{default: 0};
  int words [5] = '{default: 0};
  logic [103:0] outq [$];
  logic [103:0] written [$];
  int rr_checks = 0;

  function automatic logic [7:0] pattern(int a);
    return 8'((a & 16'hFFFF) ^ ((a & 16'hFFFF) >> 8) ^ 8'h5A);
  endfunction

  function automatic logic [31:0] stream_addr(int st, int n);
    int k, y, s, dx, dy, col, row, base;
    k = n % tiles_of(st); y = (n / tiles_of(st)) % NY; s = n / (tiles_of(st) * NY);
    if (st == 4) k += IC_K0;
    dx   = (st == 4) ? -HALF : 0;
    dy   = (st == 2 || st == 3) ? -SWIN : (st == 4) ? -HALF : 0;
    base = (st == 1 || st == 3) ? BASE_J : BASE_I;
    col  = s * WSTR - HALF + 8 * k + dx;
    row  = y + dy;
    if (row < 0) row = 0;
    if (row > IH - 1) row = IH - 1;
    return 32'(base + row * IW + col);
  endfunction

  always_comb
    for (int i = 0; i < 5; i++) in_count[i] = 2'(fifo_n[i]);
  assign out_empty = (outq.size() == 0);
  assign out_entry = (outq.size() > 0) ? outq[0] : '0;

  logic [2:0] last_win = 3'd5;
  always @(posedge clk) if (rst_n) begin
    // round robin when everybody asks
    if (dut.load && dut.win_valid) begin
      if (dut.req == 6'h3F) begin
        rr_checks++;
        checks++;
        if (dut.win != 3'((last_win + 1) % 6)) begin
          failures++;
          $display("round robin: granted %0d after %0d", dut.win, last_win);
        end
      end
      last_win <= dut.win;
    end
    // words arriving in the input FIFOs
    for (int i = 0; i < 5; i++) begin
      if (in_push[i]) begin
        logic [31:0] a;
        logic [63:0] e;
        a = stream_addr(i, words[i]);
        for (int b = 0; b < 8; b++) e[8*b +: 8] = u_mem.mem[16'(a + 32'(b))];
        checks++;
        if (in_wdata !== e) begin
          failures++;
          if (failures < 10) $display("stream %0d word %0d: got %h expected %h (addr %h)", i, words[i], in_wdata, e, a);
        end
        if (fifo_n[i] >= 2) begin
          failures++;
          $display("stream %0d FIFO overflow", i);
        end
        words[i]++;
      end
    end
    if (out_pop) begin
      written.push_back(outq[0]);
      void'(outq.pop_front());
    end
  end

  // FIFO levels: pushes from the controller, random pops by the "core"
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 5; i++) begin
      int n;
      n = fifo_n[i];
      if (n > 0 && ($urandom % 3) == 0) n--;
      if (in_push[i]) n++;
      fifo_n[i] <= n;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << 16); a++) u_mem.mem[a] = pattern(a);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    // output words to write back, queued while reads go on
    for (int w = 0; w < 40; w++) begin
      logic [31:0] a;
      logic [7:0]  be;
      repeat ($urandom % 20) @(posedge clk);
      a  = 32'h8000 + 32'(w * 13);
      be = (w % 5 == 4) ? 8'h0F : 8'hFF;
      outq.push_back({a, be, {$urandom, $urandom}});
    end
    wait (reads_done && outq.size() == 0 && idle);
    repeat (4) @(posedge clk);
    checks++;
    if (!idle) begin failures++; $display("bus not idle at the end"); end
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (words[i] != NS * NY * tiles_of(i)) begin
        failures++;
        $display("stream %0d got %0d words, expected %0d", i, words[i], NS * NY * tiles_of(i));
      end
    end
    foreach (written[w]) begin
      logic [31:0] a;
      logic [7:0] be;
      logic [63:0] d;
      {a, be, d} = written[w];
      for (int b = 0; b < 8; b++) begin
        logic [7:0] e;
        e = be[b] ? d[8*b +: 8] : pattern(int'(a) + b);
        checks++;
        if (u_mem.mem[16'(a + 32'(b))] !== e) begin
          failures++;
          if (failures < 10) $display("write %0d byte %0d wrong", w, b);
        end
      end
    end
    checks++;
    if (rr_checks == 0) begin failures++; $display("all six never requested together"); end
    $display("written=%0d rr_checks=%0d", written.size(), rr_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
