// jbf_top -- histogram-based joint bilateral filter, interface and core.
//
// Filters a source image J under the guidance of an image I:
//   out(c) = sum_q g(|I_c - I_q|) J_q / sum_q g(|I_c - I_q|)
// over a SW x SW box window, with the range kernel g taken per histogram bin
// (64 bins of 4 intensity levels). For plain bilateral filtering give the
// same image as I and J. The images and the result live in off-chip memory
// and are moved over a 64-bit bus.
//
// Core: the stripe scheduler issues one column of an extended stripe per
// cycle. Two histogram engines, one counting pixels per bin (hc) and one
// summing source intensities per bin (hi), integrate the window-high band of
// integral histograms held in one-line memories and extract the window
// histogram whose lower-right corner is that column. The convolution engine
// weights both histograms with the range kernel around I_c and divides. The
// output packer gathers results into bus words.
//
// Interface: five input FIFOs (I_S, J_S entering the window, I_Q, J_Q leaving
// it, I_c at the window centre) and one output FIFO, each 2 x 8 pixels, and
// the round-robin access controller on the bus. The core takes one word from
// every input FIFO at the start of each 8-column tile (from the I_c FIFO only
// for the tiles that hold targets) and stalls as a whole
// (en low) when one is empty or when a finished word finds the output FIFO
// full.
//
// Use: write the range table through tbl_wr_*, set the frame size img_w x
// img_h (at most IMG_W x IMG_H, the sizes the counters are built for) and the
// three base addresses (images stored row by row, one byte per pixel, img_w
// bytes per row), pulse start; done pulses when the last result word has been written. Throughput is
// one column per cycle, ceil((SW+WS-1)/8)*8 cycles per stripe row, with
// (img_h + (SW-1)/2) rows per stripe and ceil(img_w/WS) stripes. Pixels
// outside the frame are left out of the histograms, so border windows are
// normalised over the pixels they do hold.
//
// CONV_PIPE = 1 (the default) adds a register inside the convolution engine's
// adder trees, as in the document's 200 MHz version (HD1080p at 60 frames/s);
// CONV_PIPE = 0 is its 100 MHz version. Only the latency changes.
//
// The architecture (stripes, sliding origin, one-line IH memories, delay
// buffers, range-parallel engines, shared range table, FIFOs of 2 x 8 pixels,
// round-robin bus access) is the document's. Border handling, the stall
// scheme, the bus handshake and the pipeline split are this design's.
module jbf_top
  import jbf_pkg::NB, jbf_pkg::BIN_W, jbf_pkg::PIX_W, jbf_pkg::TILE, jbf_pkg::AW, jbf_pkg::BE_W,
         jbf_pkg::BUS_W, jbf_pkg::TBL_AW, jbf_pkg::G_W, jbf_pkg::TBL_N, jbf_pkg::NUM_IN,
         jbf_pkg::ST_IS, jbf_pkg::ST_JS, jbf_pkg::ST_IQ, jbf_pkg::ST_JQ, jbf_pkg::ST_IC;
#(
  parameter int unsigned IMG_W = jbf_pkg::IMG_W,   // largest frame width
  parameter int unsigned IMG_H = jbf_pkg::IMG_H,   // largest frame height
  parameter int unsigned SW    = jbf_pkg::SW,
  parameter int unsigned WS    = jbf_pkg::WS,
  parameter int unsigned CONV_PIPE = 1              // extra cut in the convolution (200 MHz build)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // control
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  input  logic [$clog2(IMG_W+1)-1:0] img_w,        // frame width, 1 .. IMG_W
  input  logic [$clog2(IMG_H+1)-1:0] img_h,        // frame height, 1 .. IMG_H
  input  logic [AW-1:0]          base_i,
  input  logic [AW-1:0]          base_j,
  input  logic [AW-1:0]          base_o,
  // range table
  input  logic                   tbl_wr_en,
  input  logic [TBL_AW-1:0]      tbl_wr_addr,
  input  logic [G_W-1:0]         tbl_wr_data,
  // bus
  output logic                   bus_req,
  output logic                   bus_we,
  output logic [AW-1:0]          bus_addr,
  output logic [BE_W-1:0]        bus_be,
  input  logic                   bus_gnt,
  output logic [BUS_W-1:0]       bus_wdata,
  input  logic [BUS_W-1:0]       bus_rdata
);

  localparam int unsigned HALF  = (SW - 1) / 2;
  localparam int unsigned EXT   = SW + WS - 1;
  localparam int unsigned TILES = (EXT + TILE - 1) / TILE;
  localparam int unsigned NX    = TILES * TILE;
  localparam int unsigned NY    = IMG_H + HALF;
  localparam int unsigned NS    = (IMG_W + WS - 1) / WS;
  localparam int unsigned W_C   = $clog2(SW * EXT);     // pixel-count IH width
  localparam int unsigned W_I   = W_C + PIX_W;          // intensity IH width
  localparam int unsigned OE_W  = AW + BE_W + BUS_W;    // output FIFO entry
  localparam int unsigned DEPTH = 2;
  localparam int unsigned CW    = $clog2(DEPTH + 1);
  localparam int unsigned LAT   = 4 + CONV_PIPE;        // engines (2) + convolution (2 + CONV_PIPE)

  // ---------------- interface: FIFOs and access controller ----------------
  logic [NUM_IN-1:0]             in_push, in_pop, in_empty, in_full;
  logic [BUS_W-1:0]              in_wdata;
  logic [NUM_IN-1:0][BUS_W-1:0]  in_rdata;
  logic [NUM_IN-1:0][CW-1:0]     in_count;
  logic                          out_push, out_pop, out_empty, out_full;
  logic [OE_W-1:0]               out_wentry, out_rentry;
  logic [CW-1:0]                 out_count;
  logic                          reads_done, ctrl_idle;
  logic [NUM_IN:0]               grant_seen;

  for (genvar i = 0; i < int'(NUM_IN); i++) begin : g_in_fifo
    pixel_fifo #(.DW(BUS_W), .DEPTH(DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (in_push[i]),
      .wdata (in_wdata),
      .full  (in_full[i]),
      .pop   (in_pop[i]),
      .rdata (in_rdata[i]),
      .empty (in_empty[i]),
      .count (in_count[i])
    );
  end

  pixel_fifo #(.DW(OE_W), .DEPTH(DEPTH)) u_out_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (out_push),
    .wdata (out_wentry),
    .full  (out_full),
    .pop   (out_pop),
    .rdata (out_rentry),
    .empty (out_empty),
    .count (out_count)
  );

  access_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .SW(SW), .WS(WS), .DEPTH(DEPTH)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start && !busy),
    .img_w      (img_w),
    .img_h      (img_h),
    .base_i     (base_i),
    .base_j     (base_j),
    .in_count   (in_count),
    .in_push    (in_push),
    .in_wdata   (in_wdata),
    .out_empty  (out_empty),
    .out_pop    (out_pop),
    .out_entry  (out_rentry),
    .bus_req    (bus_req),
    .bus_we     (bus_we),
    .bus_addr   (bus_addr),
    .bus_be     (bus_be),
    .bus_gnt    (bus_gnt),
    .bus_wdata  (bus_wdata),
    .bus_rdata  (bus_rdata),
    .reads_done (reads_done),
    .idle       (ctrl_idle),
    .grant_seen (grant_seen)
  );

  // ---------------- core: schedule ----------------
  logic                    en, stall_in, stall_out;
  logic                    s_busy, s_done, col_valid, tile_start, first_row, last_row;
  logic                    add_in, sub_in, tgt_valid, tgt_last;
  logic [$clog2(NX)-1:0]   sx;
  logic [$clog2(NS)-1:0]   stripe;
  logic [$clog2(NY)-1:0]   sy;
  logic [$clog2(IMG_H)-1:0] tgt_row;
  logic [$clog2(WS)-1:0]   tgt_t;

  stripe_scheduler #(.IMG_W(IMG_W), .IMG_H(IMG_H), .SW(SW), .WS(WS), .TILE(TILE)) u_sched (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start && !busy),
    .en         (en),
    .img_w      (img_w),
    .img_h      (img_h),
    .busy       (s_busy),
    .done       (s_done),
    .x          (sx),
    .col_valid  (col_valid),
    .tile_start (tile_start),
    .first_row  (first_row),
    .last_row   (last_row),
    .stripe     (stripe),
    .y          (sy),
    .add_in     (add_in),
    .sub_in     (sub_in),
    .tgt_valid  (tgt_valid),
    .tgt_row    (tgt_row),
    .tgt_t      (tgt_t),
    .tgt_last   (tgt_last)
  );

  // global stall: a tile cannot start without a word from every input FIFO,
  // and a finished output word needs room in the output FIFO
  logic push_pending;
  // I_c words come only for the tiles that hold targets (x >= SW-1)
  localparam int unsigned IC_X0 = ((SW - 1) / TILE) * TILE;
  logic [NUM_IN-1:0] need;
  always_comb begin
    need        = '1;
    need[ST_IC] = int'(sx) >= int'(IC_X0);
  end
  assign stall_in  = s_busy && tile_start && (|(in_empty & need));
  assign stall_out = push_pending && out_full;
  assign en        = !stall_in && !stall_out;
  assign in_pop    = (s_busy && tile_start && en) ? need : '0;

  // ---------------- core: tile words to pixels ----------------
  logic [NUM_IN-1:0][BUS_W-1:0]  held;
  logic [NUM_IN-1:0][PIX_W-1:0]  pix;
  logic [$clog2(TILE)-1:0]       lane;

  assign lane = sx[$clog2(TILE)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               held <= '0;
    else if (in_pop[0])       held <= in_rdata;
  end

  always_comb
    for (int i = 0; i < int'(NUM_IN); i++)
      pix[i] = (lane == '0) ? in_rdata[i][PIX_W-1:0] : held[i][lane*PIX_W +: PIX_W];

  // ---------------- core: histogram engines ----------------
  localparam int unsigned XW = $clog2(EXT);
  logic                    hc_valid, hi_valid;
  logic [NB-1:0][W_C-1:0]  hc;
  logic [NB-1:0][W_I-1:0]  hi;
  logic                    eng_in_valid;

  assign eng_in_valid = s_busy && col_valid;

  histogram_engine #(.NB(NB), .W(W_C), .VW(1), .SW(SW), .EXT(EXT)) u_hc (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (en),
    .in_valid     (eng_in_valid),
    .in_x         (XW'(sx)),
    .in_first_row (first_row),
    .in_extract   (tgt_valid),
    .add_en       (add_in),
    .add_bin      (pix[ST_IS][PIX_W-1 -: BIN_W]),
    .add_val      (1'b1),
    .sub_en       (sub_in),
    .sub_bin      (pix[ST_IQ][PIX_W-1 -: BIN_W]),
    .sub_val      (1'b1),
    .out_valid    (hc_valid),
    .hist_out     (hc)
  );

  histogram_engine #(.NB(NB), .W(W_I), .VW(PIX_W), .SW(SW), .EXT(EXT)) u_hi (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (en),
    .in_valid     (eng_in_valid),
    .in_x         (XW'(sx)),
    .in_first_row (first_row),
    .in_extract   (tgt_valid),
    .add_en       (add_in),
    .add_bin      (pix[ST_IS][PIX_W-1 -: BIN_W]),
    .add_val      (pix[ST_JS]),
    .sub_en       (sub_in),
    .sub_bin      (pix[ST_IQ][PIX_W-1 -: BIN_W]),
    .sub_val      (pix[ST_JQ]),
    .out_valid    (hi_valid),
    .hist_out     (hi)
  );

  // ---------------- core: per-target data alongside the pipeline ----------------
  typedef struct packed {
    logic [PIX_W-1:0]      ic;
    logic [$clog2(WS)-1:0] t;
    logic                  last;
    logic [AW-1:0]         addr0;
  } meta_t;

  meta_t meta_in;
  meta_t meta_q [LAT];

  assign meta_in.ic    = pix[ST_IC];
  assign meta_in.t     = tgt_t;
  assign meta_in.last  = tgt_last;
  assign meta_in.addr0 = base_o + AW'(int'(tgt_row) * int'(img_w) + int'(stripe) * int'(WS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) meta_q[i] <= '0;
    end else if (en) begin
      meta_q[0] <= meta_in;
      for (int i = 1; i < int'(LAT); i++) meta_q[i] <= meta_q[i-1];
    end
  end

  // ---------------- core: convolution engine ----------------
  logic             res_valid;
  logic [PIX_W-1:0] res_pix;

  convolution_engine #(.NB(NB), .WC(W_C), .WI(W_I), .G_W(G_W), .TBL_N(TBL_N), .PIX_W(PIX_W),
                       .PIPE(CONV_PIPE)) u_conv (
    .clk         (clk),
    .rst_n       (rst_n),
    .en          (en),
    .tbl_wr_en   (tbl_wr_en),
    .tbl_wr_addr (tbl_wr_addr),
    .tbl_wr_data (tbl_wr_data),
    .in_valid    (hc_valid && hi_valid),
    .in_ic       (meta_q[1].ic),
    .in_hc       (hc),
    .in_hi       (hi),
    .out_valid   (res_valid),
    .out_pix     (res_pix)
  );

  // ---------------- core: output words ----------------
  output_packer #(.WS(WS)) u_pack (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (en),
    .in_valid     (res_valid),
    .in_pix       (res_pix),
    .in_t         (meta_q[LAT-1].t),
    .in_last      (meta_q[LAT-1].last),
    .in_addr0     (meta_q[LAT-1].addr0),
    .push_pending (push_pending),
    .push         (out_push),
    .out_entry    (out_wentry)
  );

  // ---------------- frame control ----------------
  // after the last slot, LAT enabled cycles flush the pipeline; the frame is
  // done once the output FIFO has drained and the bus is quiet
  logic                   frame_q, sched_end_q;
  logic [$clog2(LAT+1):0] drain_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q     <= 1'b0;
      sched_end_q <= 1'b0;
      drain_q     <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !frame_q) begin
        frame_q     <= 1'b1;
        sched_end_q <= 1'b0;
        drain_q     <= '0;
      end else if (frame_q) begin
        if (s_done) sched_end_q <= 1'b1;
        if (sched_end_q && en && drain_q <= ($clog2(LAT+1)+1)'(LAT)) drain_q <= drain_q + 1'b1;
        if (sched_end_q && drain_q > ($clog2(LAT+1)+1)'(LAT) && out_empty && ctrl_idle && reads_done) begin
          frame_q <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  assign busy = frame_q;

endmodule
