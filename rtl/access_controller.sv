// access_controller -- bus master of the interface.
//
// Moves pixels between the off-chip frame buffers and the core's FIFOs over a
// 64-bit bus, one 8-pixel word per access. There are six requesters: five
// input FIFOs, each fed by its own read stream, and the output FIFO, which is
// written back. A round-robin arbiter picks the next requester after the one
// served last, so every FIFO gets the bus in turn.
//
// Each read stream walks the same schedule as the core (stripe, row, tile)
// and fetches, for tile k of row y of stripe s, the 8 pixels starting at frame
// column s*WS - HALF + 8k + dx of row y + dy:
//   I_S, J_S  (dx, dy) = (0, 0)          pixels entering the window column
//   I_Q, J_Q  (0, -SW)                   pixels leaving it
//   I_c       (-HALF, -HALF)             guidance pixel of the target
// I_c is fetched only for the tiles that hold targets (k >= (SW-1)/8, tiles
// 3..11 at the default sizes), so a stripe row costs 4 x 12 + 9 reads and 8
// writes.
// Rows above or below the frame are clamped to the nearest frame row; the core
// ignores those pixels anyway. A stream only asks for the bus when its FIFO
// has room for one more word, counting the word it already has in flight.
// Output words carry their own address and byte enables. The frame size is
// given at run time (img_w x img_h, stable during a frame), up to IMG_W x IMG_H.
//
// Bus protocol (pipelined, two phases): in the address phase the master holds
// bus_req, bus_we, bus_addr (byte address) and bus_be until the slave answers
// bus_gnt. The data phase is the cycle after the grant: the slave then drives
// bus_rdata for a read, the master drives bus_wdata for a write. A new address
// phase may overlap a data phase, so one access can complete per cycle.
// Addresses need not be aligned to 8 bytes, as stripes start at any column.
//
// Round-robin arbitration, the 64-bit bus and the request/address plus data
// phases are the document's; the stream addressing, the grant handshake,
// unaligned addresses and byte enables are this design's choices.
module access_controller
  import jbf_pkg::TILE, jbf_pkg::NUM_IN, jbf_pkg::AW, jbf_pkg::BE_W, jbf_pkg::BUS_W,
         jbf_pkg::ST_IC, jbf_pkg::ST_IQ, jbf_pkg::ST_JQ, jbf_pkg::ST_JS;
#(
  parameter int unsigned IMG_W = 1920,   // largest frame width
  parameter int unsigned IMG_H = 1080,   // largest frame height
  parameter int unsigned SW    = 31,
  parameter int unsigned WS    = 60,
  parameter int unsigned DEPTH = 2,
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned NREQ = NUM_IN + 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(IMG_W+1)-1:0]   img_w,     // frame width, 1 .. IMG_W
  input  logic [$clog2(IMG_H+1)-1:0]   img_h,     // frame height, 1 .. IMG_H
  input  logic [AW-1:0]                base_i,    // guidance image I
  input  logic [AW-1:0]                base_j,    // source image J
  // input FIFOs
  input  logic [NUM_IN-1:0][CW-1:0]    in_count,
  output logic [NUM_IN-1:0]            in_push,
  output logic [BUS_W-1:0]             in_wdata,
  // output FIFO: {address, byte enables, data}
  input  logic                         out_empty,
  output logic                         out_pop,
  input  logic [AW+BE_W+BUS_W-1:0]     out_entry,
  // bus
  output logic                         bus_req,
  output logic                         bus_we,
  output logic [AW-1:0]                bus_addr,
  output logic [BE_W-1:0]              bus_be,
  input  logic                         bus_gnt,
  output logic [BUS_W-1:0]             bus_wdata,
  input  logic [BUS_W-1:0]             bus_rdata,
  // status
  output logic                         reads_done, // every read of the frame issued
  output logic                         idle,       // nothing in flight on the bus
  output logic [NREQ-1:0]              grant_seen  // one-cycle pulse per granted requester
);

  localparam int unsigned HALF  = (SW - 1) / 2;
  localparam int unsigned EXT   = SW + WS - 1;
  localparam int unsigned TILES = (EXT + TILE - 1) / TILE;
  localparam int unsigned NY    = IMG_H + HALF;
  localparam int unsigned NS    = (IMG_W + WS - 1) / WS;
  localparam int unsigned RW    = $clog2(NREQ);
  // I_c is needed only from the first tile that holds a target (x >= SW-1)
  localparam int unsigned IC_K0 = (SW - 1) / TILE;

  function automatic logic [$clog2(TILES)-1:0] first_tile(int i);
    return (i == int'(ST_IC)) ? ($clog2(TILES))'(IC_K0) : '0;
  endfunction

  // ---------------- read-stream address generators ----------------
  logic [NUM_IN-1:0][$clog2(TILES)-1:0] k_q;
  logic [NUM_IN-1:0][$clog2(NY)-1:0]    y_q;
  logic [NUM_IN-1:0][$clog2(NS)-1:0]    s_q;
  logic [NUM_IN-1:0]                    sdone_q;
  logic [NUM_IN-1:0][AW-1:0]            s_addr;

  always_comb begin
    for (int i = 0; i < int'(NUM_IN); i++) begin
      int dx, dy, col, row;
      logic [AW-1:0] base;
      dx   = (i == int'(ST_IC)) ? -int'(HALF) : 0;
      dy   = (i == int'(ST_IQ) || i == int'(ST_JQ)) ? -int'(SW) :
             (i == int'(ST_IC)) ? -int'(HALF) : 0;
      base = (i == int'(ST_JS) || i == int'(ST_JQ)) ? base_j : base_i;
      col  = int'(s_q[i]) * int'(WS) - int'(HALF) + int'(k_q[i]) * int'(TILE) + dx;
      row  = int'(y_q[i]) + dy;
      if (row < 0) row = 0;
      if (row > int'(img_h) - 1) row = int'(img_h) - 1;
      s_addr[i] = base + AW'(row * int'(img_w) + col);
    end
  end

  // ---------------- address-phase and data-phase registers ----------------
  logic              aq_valid, aq_we;
  logic [RW-1:0]     aq_id;
  logic [AW-1:0]     aq_addr;
  logic [BE_W-1:0]   aq_be;
  logic [BUS_W-1:0]  aq_wdata;
  logic              dp_valid, dp_we;
  logic [RW-1:0]     dp_id;
  logic [BUS_W-1:0]  dp_wdata;
  logic [RW-1:0]     rr_last;

  // requests
  logic [NREQ-1:0]   req;
  always_comb begin
    for (int i = 0; i < int'(NUM_IN); i++) begin
      int inflight;
      inflight = ((aq_valid && !aq_we && int'(aq_id) == i) ? 1 : 0) +
                 ((dp_valid && !dp_we && int'(dp_id) == i) ? 1 : 0);
      req[i] = !sdone_q[i] && (int'(in_count[i]) + inflight < int'(DEPTH));
    end
    req[NUM_IN] = !out_empty;
  end

  // round robin: first requester after the one served last
  logic          load, win_valid;
  logic [RW-1:0] win;
  always_comb begin
    win_valid = 1'b0;
    win       = '0;
    for (int n = 1; n <= int'(NREQ); n++) begin
      int c;
      c = (int'(rr_last) + n) % int'(NREQ);
      if (!win_valid && req[c]) begin
        win_valid = 1'b1;
        win       = RW'(c);
      end
    end
  end

  assign load    = !aq_valid || bus_gnt;
  assign out_pop = load && win_valid && (win == RW'(NUM_IN));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aq_valid <= 1'b0; aq_we <= 1'b0; aq_id <= '0; aq_addr <= '0; aq_be <= '0; aq_wdata <= '0;
      dp_valid <= 1'b0; dp_we <= 1'b0; dp_id <= '0; dp_wdata <= '0;
      rr_last  <= RW'(NREQ - 1);
      k_q <= '0; y_q <= '0; s_q <= '0; sdone_q <= '1;
    end else begin
      // data phase follows an accepted address phase
      dp_valid <= aq_valid && bus_gnt;
      if (aq_valid && bus_gnt) begin
        dp_we    <= aq_we;
        dp_id    <= aq_id;
        dp_wdata <= aq_wdata;
      end
      if (start) begin
        for (int i = 0; i < int'(NUM_IN); i++) k_q[i] <= first_tile(i);
        y_q <= '0; s_q <= '0; sdone_q <= '0;
      end else if (load) begin
        aq_valid <= win_valid;
        if (win_valid) begin
          rr_last <= win;
          aq_id   <= win;
          if (win == RW'(NUM_IN)) begin
            aq_we    <= 1'b1;
            aq_addr  <= out_entry[BE_W+BUS_W +: AW];
            aq_be    <= out_entry[BUS_W +: BE_W];
            aq_wdata <= out_entry[0 +: BUS_W];
          end else begin
            aq_we    <= 1'b0;
            aq_addr  <= s_addr[win];
            aq_be    <= '1;
            // advance this stream: tile, then row, then stripe
            if (k_q[win] != ($clog2(TILES))'(TILES - 1)) begin
              k_q[win] <= k_q[win] + 1'b1;
            end else begin
              k_q[win] <= first_tile(int'(win));
              if (int'(y_q[win]) != int'(img_h) + int'(HALF) - 1) begin
                y_q[win] <= y_q[win] + 1'b1;
              end else begin
                y_q[win] <= '0;
                if ((int'(s_q[win]) + 1) * int'(WS) < int'(img_w)) s_q[win] <= s_q[win] + 1'b1;
                else                                                sdone_q[win] <= 1'b1;
              end
            end
          end
        end
      end
    end
  end

  assign bus_req   = aq_valid;
  assign bus_we    = aq_we;
  assign bus_addr  = aq_addr;
  assign bus_be    = aq_be;
  assign bus_wdata = dp_wdata;

  always_comb begin
    in_push  = '0;
    in_wdata = bus_rdata;
    if (dp_valid && !dp_we) in_push[dp_id] = 1'b1;
  end

  assign reads_done = &sdone_q;
  assign idle       = !aq_valid && !dp_valid;

  always_comb begin
    grant_seen = '0;
    if (aq_valid && bus_gnt) grant_seen[aq_id] = 1'b1;
  end

  // the address phase holds still until it is granted
  assert property (@(posedge clk) disable iff (!rst_n)
                   (bus_req && !bus_gnt) |=> (bus_req && $stable(bus_addr) && $stable(bus_we)))
    else $error("access_controller: address phase changed before grant");

endmodule
