// offchip_mem_model -- behavioural model of the off-chip frame memory.
//
// A byte-addressed memory of MEM_BYTES bytes (a power of two; addresses wrap)
// on the filter's 64-bit bus. Address phase: the master holds bus_req with
// bus_we, bus_addr and bus_be; the model grants it in a cycle chosen at random
// with probability GNT_PCT percent. With OUT_PCT > 0 the memory also goes
// away now and then: in any cycle, with probability OUT_PCT percent, it grants
// nothing for the next 1 .. OUT_LEN cycles (long gaps let a test fill the
// output FIFO). Data phase, the cycle after the grant: a
// read returns the 8 bytes from bus_addr upwards (any alignment) on
// bus_rdata, a write stores the bytes of bus_wdata whose enable is set.
// Testbenches reach the contents directly through mem[].
module offchip_mem_model #(
  parameter int unsigned MEM_BYTES = 1 << 16,
  parameter int unsigned GNT_PCT   = 100,
  parameter int unsigned OUT_PCT   = 0,
  parameter int unsigned OUT_LEN   = 1
) (
  input  logic        clk,
  input  logic        bus_req,
  input  logic        bus_we,
  input  logic [31:0] bus_addr,
  input  logic [7:0]  bus_be,
  output logic        bus_gnt,
  input  logic [63:0] bus_wdata,
  output logic [63:0] bus_rdata
);

  localparam int unsigned MW = $clog2(MEM_BYTES);

  logic [7:0]    mem [MEM_BYTES];
  logic          gnt_ok = 1'b1;
  int unsigned   gap = 0;
  logic          wr_pending = 1'b0;
  logic [31:0]   wr_addr;
  logic [7:0]    wr_be;

  assign bus_gnt = bus_req && gnt_ok;

  always_ff @(posedge clk) begin
    if (gap > 0) begin
      gap    <= gap - 1;
      gnt_ok <= 1'b0;
    end else if (($urandom % 100) < OUT_PCT) begin
      gap    <= 1 + ($urandom % OUT_LEN);
      gnt_ok <= 1'b0;
    end else begin
      gnt_ok <= ($urandom % 100) < GNT_PCT;
    end
    // data phase of a write accepted last cycle
    if (wr_pending)
      for (int b = 0; b < 8; b++)
        if (wr_be[b]) mem[MW'(wr_addr + 32'(b))] <= bus_wdata[8*b +: 8];
    wr_pending <= bus_req && bus_gnt && bus_we;
    if (bus_req && bus_gnt) begin
      wr_addr <= bus_addr;
      wr_be   <= bus_be;
      if (!bus_we)
        for (int b = 0; b < 8; b++) bus_rdata[8*b +: 8] <= mem[MW'(bus_addr + 32'(b))];
    end
  end

endmodule
