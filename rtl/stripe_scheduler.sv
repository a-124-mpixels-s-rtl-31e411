// stripe_scheduler -- the frame / stripe / stripe-row / pipeline-tile schedule.
//
// The frame is cut into vertical stripes of WS target columns. Each stripe is
// processed row by row over its extended width EXT = SW + WS - 1, which adds
// the (SW-1)/2 columns of support pixels on each side. A stripe row is issued
// as pipeline tiles of TILE columns, one column per cycle, so it takes
// ceil(EXT/TILE)*TILE cycles; the columns past EXT are bubbles (90 columns in
// 12 tiles of 8 = 96 cycles, 6 bubbles, for the default sizes).
//
// For the column issued in a cycle the scheduler also works out where its
// pixels lie in the frame: the entering pixel at (col, y), the leaving pixel
// at (col, y - SW), and the target pixel at (col - HALF, y - HALF) whose
// window has its lower-right corner here. Pixels outside the frame are
// flagged, and a target is flagged valid only if it lies in this stripe and
// in the frame. Each stripe runs HALF rows past the bottom of the frame so the
// last rows of targets are produced.
//
// The frame size is given at run time (img_w x img_h, sampled while busy; keep
// it stable during a frame) up to the IMG_W x IMG_H the counters are sized for.
// Interface: start (one cycle) begins a frame; every cycle with en high while
// busy issues one slot and advances. tile_start marks the first slot of a tile,
// where the core takes one word from each input FIFO. done pulses when the
// last slot has been issued. The stripe/tile schedule and the 96-cycle row are
// the document's; the extra rows and the frame-border flags are this design's.
module stripe_scheduler #(
  parameter int unsigned IMG_W = 1920,   // largest frame width
  parameter int unsigned IMG_H = 1080,   // largest frame height
  parameter int unsigned SW    = 31,
  parameter int unsigned WS    = 60,
  parameter int unsigned TILE  = 8,
  // derived sizes
  localparam int unsigned HALF  = (SW - 1) / 2,
  localparam int unsigned EXT   = SW + WS - 1,
  localparam int unsigned TILES = (EXT + TILE - 1) / TILE,
  localparam int unsigned NX    = TILES * TILE,          // cycles per stripe row
  localparam int unsigned NY    = IMG_H + HALF,          // rows per stripe
  localparam int unsigned NS    = (IMG_W + WS - 1) / WS  // stripes per frame
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          en,
  input  logic [$clog2(IMG_W+1)-1:0]    img_w,      // frame width, 1 .. IMG_W
  input  logic [$clog2(IMG_H+1)-1:0]    img_h,      // frame height, 1 .. IMG_H
  output logic                          busy,
  output logic                          done,
  // the slot issued this cycle (valid while busy)
  output logic [$clog2(NX)-1:0]         x,          // column in the extended stripe
  output logic                          col_valid,  // x < EXT (not a bubble)
  output logic                          tile_start,
  output logic                          first_row,
  output logic                          last_row,
  output logic [$clog2(NS)-1:0]         stripe,
  output logic [$clog2(NY)-1:0]         y,          // row of the entering pixel
  output logic                          add_in,     // entering pixel inside the frame
  output logic                          sub_in,     // leaving pixel inside the frame
  output logic                          tgt_valid,  // window centre is a target pixel
  output logic [$clog2(IMG_H)-1:0]      tgt_row,
  output logic [$clog2(WS)-1:0]         tgt_t,      // target index within the stripe row
  output logic                          tgt_last    // last target of this stripe row
);

  logic [$clog2(NX)-1:0] x_q;
  logic [$clog2(NY)-1:0] y_q;
  logic [$clog2(NS)-1:0] s_q;

  wire last_x = (x_q == ($clog2(NX))'(NX - 1));
  wire last_y = (int'(y_q) == int'(img_h) + int'(HALF) - 1);
  wire last_s = ((int'(s_q) + 1) * int'(WS) >= int'(img_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      x_q  <= '0;
      y_q  <= '0;
      s_q  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        x_q  <= '0;
        y_q  <= '0;
        s_q  <= '0;
      end else if (busy && en) begin
        if (!last_x) begin
          x_q <= x_q + 1'b1;
        end else begin
          x_q <= '0;
          if (!last_y) begin
            y_q <= y_q + 1'b1;
          end else begin
            y_q <= '0;
            if (!last_s) begin
              s_q <= s_q + 1'b1;
            end else begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end
        end
      end
    end
  end

  // frame coordinates of the pixels that belong to this slot
  always_comb begin
    int col;      // frame column of the entering / leaving pixel
    int tcol;     // frame column of the target
    int yi, qy, ty;
    col  = int'(s_q) * int'(WS) - int'(HALF) + int'(x_q);
    tcol = col - int'(HALF);
    yi   = int'(y_q);
    qy   = yi - int'(SW);
    ty   = yi - int'(HALF);

    x          = x_q;
    stripe     = s_q;
    y          = y_q;
    col_valid  = (int'(x_q) < int'(EXT));
    tile_start = (int'(x_q) % int'(TILE)) == 0;
    first_row  = (y_q == '0);
    last_row   = last_y;
    add_in     = col_valid && col >= 0 && col < int'(img_w) && yi < int'(img_h);
    sub_in     = col_valid && col >= 0 && col < int'(img_w) && qy >= 0 && qy < int'(img_h);
    tgt_valid  = col_valid && int'(x_q) >= int'(SW) - 1 && tcol < int'(img_w) &&
                 ty >= 0 && ty < int'(img_h);
    tgt_row    = ($clog2(IMG_H))'((ty >= 0) ? ty : 0);
    tgt_t      = ($clog2(WS))'((int'(x_q) >= int'(SW) - 1) ? int'(x_q) - int'(SW) + 1 : 0);
    tgt_last   = (int'(x_q) == int'(EXT) - 1) || (tcol == int'(img_w) - 1);
  end

endmodule
