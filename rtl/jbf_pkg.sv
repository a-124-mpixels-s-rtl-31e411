// jbf_pkg -- constants shared by the histogram-based joint bilateral filter.
//
// The numbers are those of the HD1080p example configuration: 64 histogram
// bins (intensity quantised by 4), a 31x31 box space window, stripes 60 target
// pixels wide, 8-pixel pipeline tiles on a 64-bit bus and a 10-bit range
// kernel held in a 32-entry table. The widths of the stored integral
// histograms follow from the largest area one of them covers: a window-high
// line of the extended stripe, 31 x 90 pixels, needs 12 bits of pixel count,
// and 8 bits more when intensities are summed. The product and sum widths of
// the convolution are this design's own choice, sized so nothing overflows.
package jbf_pkg;

  // histogram
  localparam int unsigned NB        = 64;                 // number of bins N_b
  localparam int unsigned BIN_W     = $clog2(NB);         // bin index width
  localparam int unsigned PIX_W     = 8;                  // pixel intensity width

  // geometry
  localparam int unsigned SW        = 31;                 // filter window width |S|
  localparam int unsigned WS        = 60;                 // stripe width w_s
  localparam int unsigned EXT_W     = SW + WS - 1;        // extended stripe width (90)
  localparam int unsigned TILE      = 8;                  // pixels per pipeline tile / bus word
  localparam int unsigned IMG_W     = 1920;               // frame width N
  localparam int unsigned IMG_H     = 1080;               // frame height M

  // integral-histogram widths: w_b = ceil(log2(|S| * (|S|+w_s-1)))
  localparam int unsigned WC        = $clog2(SW * EXT_W); // 12 bits, pixel-count IH
  localparam int unsigned WI        = WC + PIX_W;         // 20 bits, pixel-intensity IH

  // range kernel
  localparam int unsigned G_W       = 10;                 // Scale = 1023
  localparam int unsigned TBL_N     = 32;                 // table entries after symmetry/truncation
  localparam int unsigned TBL_AW    = $clog2(TBL_N);

  // bus
  localparam int unsigned BUS_W     = 64;
  localparam int unsigned BE_W      = BUS_W / 8;
  localparam int unsigned AW        = 32;                 // byte address width

  // read streams of the interface, in arbitration order; the output FIFO is
  // requester number NUM_IN
  typedef enum logic [2:0] {
    ST_IS = 3'd0,   // guidance pixel I_S entering the window column
    ST_JS = 3'd1,   // source pixel J_S entering the window column
    ST_IQ = 3'd2,   // guidance pixel I_Q leaving the window column
    ST_JQ = 3'd3,   // source pixel J_Q leaving the window column
    ST_IC = 3'd4    // guidance pixel I_c of the target pixel
  } stream_e;
  localparam int unsigned NUM_IN    = 5;

endpackage
