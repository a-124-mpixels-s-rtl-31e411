// tb_stripe_scheduler -- slot sequence and frame-border flags.
//
// A 70 x 20 frame with the default window (31) and stripes (60): two stripes
// of 20 + 15 rows, 96 slots each. Every issued slot is compared with an
// independent walk of the same loops: column, bubble, tile start, first row,
// the in-frame flags of the entering and leaving pixel, and the target's
// validity, row and index. en is dropped at random and must freeze the
// schedule. The total is checked against stripes x rows x 96 and done must
// pulse once, right after the last slot.
module tb_stripe_scheduler;
  localparam int IW = 70, IH = 20, SWIN = 31, WSTR = 60, HALF = 15, EXT = 90, NX = 96;
  localparam int NS = 2, NY = IH + HALF;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, en = 1'b1;
  logic busy, done, col_valid, tile_start, first_row, last_row, add_in, sub_in, tgt_valid, tgt_last;
  logic [6:0] x;
  logic [0:0] stripe;
  logic [5:0] y;
  logic [4:0] tgt_row;
  logic [5:0] tgt_t;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stripe_scheduler #(.IMG_W(IW), .IMG_H(IH), .SW(SWIN), .WS(WSTR), .TILE(8)) dut (
    .clk, .rst_n, .start, .en, .img_w(7'(IW)), .img_h(5'(IH)), .busy, .done, .x, .col_valid, .tile_start, .first_row, .last_row,
    .stripe, .y, .add_in, .sub_in, .tgt_valid, .tgt_row, .tgt_t, .tgt_last
  );

  task automatic expect_eq(string what, int got, int e);
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, got, e);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int slots = 0, dones = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int s = 0; s < NS; s++)
      for (int yy = 0; yy < NY; yy++)
        for (int xx = 0; xx < NX; xx++) begin
          int col, tcol;
          bit cv;
          while ($urandom % 5 == 0) begin
            en = 1'b0;
            @(negedge clk);
          end
          en = 1'b1;
          col  = s * WSTR - HALF + xx;
          tcol = col - HALF;
          cv   = xx < EXT;
          expect_eq("busy", int'(busy), 1);
          expect_eq("x", int'(x), xx);
          expect_eq("y", int'(y), yy);
          expect_eq("stripe", int'(stripe), s);
          expect_eq("col_valid", int'(col_valid), int'(cv));
          expect_eq("tile_start", int'(tile_start), int'(xx % 8 == 0));
          expect_eq("first_row", int'(first_row), int'(yy == 0));
          expect_eq("add_in", int'(add_in), int'(cv && col >= 0 && col < IW && yy < IH));
          expect_eq("sub_in", int'(sub_in), int'(cv && col >= 0 && col < IW && yy - SWIN >= 0));
          expect_eq("tgt_valid", int'(tgt_valid),
                    int'(cv && xx >= SWIN - 1 && tcol < IW && yy - HALF >= 0 && yy - HALF < IH));
          if (tgt_valid) begin
            expect_eq("tgt_row", int'(tgt_row), yy - HALF);
            expect_eq("tgt_t", int'(tgt_t), xx - SWIN + 1);
            expect_eq("tgt_last", int'(tgt_last), int'(xx == EXT - 1 || tcol == IW - 1));
          end
          slots++;
          @(negedge clk);
          if (done) dones++;
        end
    expect_eq("done after last slot", dones, 1);
    expect_eq("busy after last slot", int'(busy), 0);
    expect_eq("slots", slots, NS * NY * NX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
