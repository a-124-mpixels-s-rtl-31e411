// pixel_fifo -- two-entry ping-pong buffer between the bus and the core.
//
// Each entry is one bus word (8 pixels for the input FIFOs; 8 result pixels
// plus their address and byte enables for the output FIFO). With two entries
// one can be filled from the bus while the other is drained, which is all the
// buffering the interface uses: 2 x 8 pixels per FIFO.
//
// Interface: push/wdata when not full, pop when not empty; rdata always shows
// the oldest entry (first-word fall-through). count gives the fill level so
// the access controller can keep track of reads still in flight. Pushing and
// popping in the same cycle is allowed, also when full. Synchronous, reset
// to empty. The 2 x 8-pixel size is the document's; the handshake is this
// design's.
module pixel_fifo #(
  parameter int unsigned DW    = 64,
  parameter int unsigned DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [DW-1:0]              wdata,
  output logic                       full,
  input  logic                       pop,
  output logic [DW-1:0]              rdata,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [DW-1:0] mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  assign empty = (count == '0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign rdata = mem[rd_ptr];

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (do_push ? CW'(1) : CW'(0)) - (do_pop ? CW'(1) : CW'(0));
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_ptr] <= wdata;

  // a full FIFO must not be pushed, an empty one not popped
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("pixel_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("pixel_fifo: pop while empty");

endmodule
