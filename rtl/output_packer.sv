// output_packer -- gathers result pixels into 8-pixel bus words.
//
// The convolution engine delivers one result per cycle in the order of the
// stripe row. Result t of a stripe row (0 .. WS-1) goes to byte lane t mod 8
// of the word whose address is the row's first target address plus
// t - (t mod 8); a stripe of 60 targets thus gives seven full words and one
// half word. The word is handed to the output FIFO, with byte enables for the
// lanes it holds, when lane 7 is filled or the row's last target arrives.
//
// push_pending is high in the cycle a word would be completed; it depends only
// on the inputs, so the core can stall (en low) when the output FIFO is full.
// push = en && push_pending. Stripe-relative word alignment and byte enables
// are this design's choices; the 8-pixel output words are the document's.
module output_packer
  import jbf_pkg::AW, jbf_pkg::BE_W, jbf_pkg::BUS_W, jbf_pkg::PIX_W;
#(
  parameter int unsigned WS = 60
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      in_valid,
  input  logic [PIX_W-1:0]          in_pix,
  input  logic [$clog2(WS)-1:0]     in_t,       // target index within the stripe row
  input  logic                      in_last,    // last target of the stripe row
  input  logic [AW-1:0]             in_addr0,   // address of target 0 of this row
  output logic                      push_pending,
  output logic                      push,
  output logic [AW+BE_W+BUS_W-1:0]  out_entry   // {address, byte enables, data}
);

  localparam int unsigned LW = $clog2(BE_W);

  logic [BUS_W-1:0] data_q, data_n;
  logic [BE_W-1:0]  be_q, be_n;
  logic [LW-1:0]    lane;
  logic [AW-1:0]    waddr;

  assign lane  = in_t[LW-1:0];
  assign waddr = in_addr0 + AW'({in_t[$clog2(WS)-1:LW], {LW{1'b0}}});

  always_comb begin
    data_n = data_q;
    be_n   = be_q;
    data_n[lane*PIX_W +: PIX_W] = in_pix;
    be_n[lane]                  = 1'b1;
  end

  assign push_pending = in_valid && ((lane == LW'(BE_W - 1)) || in_last);
  assign push         = en && push_pending;
  assign out_entry    = {waddr, be_n, data_n};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q <= '0;
      be_q   <= '0;
    end else if (en && in_valid) begin
      if (push_pending) begin
        data_q <= '0;
        be_q   <= '0;
      end else begin
        data_q <= data_n;
        be_q   <= be_n;
      end
    end
  end

endmodule
